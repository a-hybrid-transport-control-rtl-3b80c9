// synzen_ir_tb: self-checking test of the instruction register.
//
// Presents random instructions with a random valid strobe and checks, one
// cycle later, that the register holds the instruction when it was valid and
// the empty instruction (all transport operations invalid, every control
// operation zero, i.e. NOP in NET/NET mode) when it was not, and that reset
// loads the empty instruction.
module synzen_ir_tb;
  import synzen_pkg::*;

  localparam int unsigned NBUS = 16, NUNIT = 8, TOW = 6;

  logic clk = 0, rst_n = 0, valid;
  logic [TOW-1:0] to_i [NBUS], to_o [NBUS], to_e [NBUS];
  ctrl_op_t       co_i [NUNIT], co_o [NUNIT], co_e [NUNIT];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  synzen_ir #(.NBUS(NBUS), .NUNIT(NUNIT), .TO_W(TOW)) dut (
    .clk(clk), .rst_n(rst_n), .valid_i(valid), .to_i(to_i), .co_i(co_i), .to_o(to_o), .co_o(co_o));

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic compare();
    for (int b = 0; b < NBUS; b++) begin
      checks++;
      if (to_o[b] !== to_e[b]) begin failures++; $display("FAIL TO %0d %h exp %h", b, to_o[b], to_e[b]); end
    end
    for (int u = 0; u < NUNIT; u++) begin
      checks++;
      if (co_o[u] !== co_e[u]) begin failures++; $display("FAIL CO %0d %h exp %h", u, co_o[u], co_e[u]); end
    end
  endtask

  initial begin
    int nvalid, nidle;
    nvalid = 0;
    nidle  = 0;
    valid = 1;
    for (int b = 0; b < NBUS; b++) to_i[b] = TOW'($urandom);
    for (int u = 0; u < NUNIT; u++) co_i[u] = ctrl_op_t'($urandom);
    repeat (2) @(posedge clk);
    #1;
    for (int b = 0; b < NBUS; b++) to_e[b] = '0;
    for (int u = 0; u < NUNIT; u++) co_e[u] = '0;
    compare();  // reset loads the empty instruction even with valid high
    @(negedge clk) rst_n = 1;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      valid = ($urandom % 3) != 0;
      for (int b = 0; b < NBUS; b++) to_i[b] = TOW'($urandom);
      for (int u = 0; u < NUNIT; u++) co_i[u] = ctrl_op_t'($urandom);
      for (int b = 0; b < NBUS; b++) to_e[b] = valid ? to_i[b] : '0;
      for (int u = 0; u < NUNIT; u++) co_e[u] = valid ? co_i[u] : '0;
      if (valid) nvalid++; else nidle++;
      @(posedge clk);
      #1 compare();
    end
    if (nvalid == 0 || nidle == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
