// synzen_rf_tb: self-checking test of the 16-entry result register file.
//
// After reset every entry must read zero. Then random writes and reads are
// applied for many cycles while a plain array in the testbench tracks the
// expected contents; the read port, the acc tap (entry 14) and the lnk tap
// (entry 15) are compared every cycle, including the case of a read of the
// entry being written in the same cycle, which must return the old value.
module synzen_rf_tb;
  import synzen_pkg::*;

  localparam int unsigned DATA_W = 32;

  logic clk = 0, rst_n = 0;
  logic we;
  logic [3:0] waddr, raddr;
  logic [DATA_W-1:0] wdata, rdata, acc, lnk;
  logic [DATA_W-1:0] model [16];
  int checks = 0, failures = 0;
  int same_cycle = 0;

  always #5 clk = ~clk;

  synzen_rf #(.DATA_W(DATA_W)) dut (
    .clk(clk), .rst_n(rst_n), .we_i(we), .waddr_i(waddr), .wdata_i(wdata),
    .raddr_i(raddr), .rdata_o(rdata), .acc_o(acc), .lnk_o(lnk));

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input string what, input logic [DATA_W-1:0] got, input logic [DATA_W-1:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s got=%h exp=%h t=%0t", what, got, exp, $time);
    end
  endtask

  initial begin
    we = 0; waddr = 0; raddr = 0; wdata = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int i = 0; i < 16; i++) model[i] = '0;
    for (int i = 0; i < 16; i++) begin
      raddr = 4'(i);
      #1 chk("reset value", rdata, '0);
    end
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      we    = ($urandom % 4) != 0;
      waddr = (n % 7 == 0) ? 4'($urandom % 2 + 14) : 4'($urandom);
      wdata = $urandom;
      raddr = (n % 5 == 0) ? waddr : 4'($urandom);
      #1;
      if (we && raddr == waddr) same_cycle++;
      chk("read port", rdata, model[raddr]);
      chk("acc tap", acc, model[14]);
      chk("lnk tap", lnk, model[15]);
      @(posedge clk);
      if (we) model[waddr] = wdata;
    end
    if (same_cycle == 0) begin failures++; $display("FAIL no same-cycle read/write"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
