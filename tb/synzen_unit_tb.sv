// synzen_unit_tb: self-checking test of one synZEN unit (interface + function
// unit) with short directed programs whose results are worked out by hand:
//   1. latency: operands 7 and 5 delivered over NET with ADD -> R3; the result
//      must not be readable one cycle after the control operation and must be
//      readable two cycles after it (two-stage pipeline, no bypass);
//   2. accumulator mode: Re <- Re + 3 with the right input held constant,
//      issued every second cycle (one delay slot), ten times from Re = 100;
//   3. link mode: left input from lnk_i, right from the network, MUL -> Rf,
//      which must appear on lnk_o;
//   4. NOP with a read address: the register file stays readable and
//      unchanged while the unit performs no operation;
//   5. operand order and hold on the left input: 50 - 8 = 42 into R5, then
//      with the left input held at 50 and 2 on the right, 50 - 2 = 48 into R6,
//      and a shift 50 << 2 = 200 into R7.
module synzen_unit_tb;
  import synzen_pkg::*;

  localparam int unsigned DATA_W = 32;

  logic clk = 0, rst_n = 0;
  ctrl_op_t co;
  logic [DATA_W-1:0] net_l, net_r, lnk_in, lnk_out, net_out;
  logic net_l_we, net_r_we;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  synzen_unit #(.DATA_W(DATA_W)) dut (
    .clk(clk), .rst_n(rst_n), .co_i(co),
    .net_l_i(net_l), .net_l_we_i(net_l_we), .net_r_i(net_r), .net_r_we_i(net_r_we),
    .lnk_i(lnk_in), .lnk_o(lnk_out), .net_o(net_out));

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input string what, input logic [DATA_W-1:0] got, input logic [DATA_W-1:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s got=%0d exp=%0d t=%0t", what, got, exp, $time);
    end
  endtask

  function automatic ctrl_op_t mk(input xfer_mode_e ml, input xfer_mode_e mr,
                                  input int wr, input int rd, input opcode_e op);
    ctrl_op_t c;
    c.mode_l = ml; c.mode_r = mr; c.wr_addr = 4'(wr); c.rd_addr = 4'(rd); c.op = op;
    return c;
  endfunction

  // Apply one control operation (plus optional network data) for one cycle.
  task automatic step(input ctrl_op_t c, input logic lwe = 0, input logic [31:0] l = 0,
                      input logic rwe = 0, input logic [31:0] r = 0);
    @(negedge clk);
    co = c; net_l_we = lwe; net_l = l; net_r_we = rwe; net_r = r;
  endtask

  initial begin
    co = '0; net_l = 0; net_r = 0; net_l_we = 0; net_r_we = 0; lnk_in = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;

    // 1. latency
    step(mk(MODE_NET, MODE_NET, 3, 0, OP_ADD), 1, 7, 1, 5);
    step(mk(MODE_NET, MODE_NET, 0, 3, OP_NOP));
    #1 chk("result not yet visible after 1 cycle", net_out, 0);
    step(mk(MODE_NET, MODE_NET, 0, 3, OP_NOP));
    #1 chk("ADD result after 2 cycles", net_out, 12);

    // 2. accumulator: Re = 100 first, right input = 3 held
    step(mk(MODE_NET, MODE_NET, 14, 0, OP_PASSA), 1, 100, 1, 3);
    step(mk(MODE_NET, MODE_HLD, 0, 14, OP_NOP));
    for (int i = 0; i < 10; i++) begin
      step(mk(MODE_ACC, MODE_HLD, 14, 14, OP_ADD));
      step(mk(MODE_NET, MODE_HLD, 0, 14, OP_NOP));  // delay slot
    end
    step(mk(MODE_NET, MODE_HLD, 0, 14, OP_NOP));
    #1 chk("accumulated Re", net_out, 130);

    // 3. link mode multiply into Rf
    @(negedge clk) lnk_in = 6;
    step(mk(MODE_LNK, MODE_NET, 15, 0, OP_MUL), 0, 0, 1, 9);
    step(mk(MODE_NET, MODE_NET, 0, 0, OP_NOP));
    step(mk(MODE_NET, MODE_NET, 0, 15, OP_NOP));
    #1 chk("lnk output", lnk_out, 54);
    chk("Rf via read port", net_out, 54);

    // 4. NOP keeps contents; reads of all written entries
    step(mk(MODE_NET, MODE_NET, 3, 3, OP_NOP), 1, 1, 1, 1);
    step(mk(MODE_NET, MODE_NET, 3, 3, OP_NOP));
    step(mk(MODE_NET, MODE_NET, 3, 3, OP_NOP));
    #1 chk("R3 unchanged by NOP", net_out, 12);
    step(mk(MODE_NET, MODE_NET, 0, 14, OP_NOP));
    #1 chk("Re unchanged by NOP", net_out, 130);

    // 5. SUB operand order, hold on the left input
    step(mk(MODE_NET, MODE_NET, 5, 0, OP_SUB), 1, 50, 1, 8);
    step(mk(MODE_HLD, MODE_NET, 6, 0, OP_SUB), 0, 0, 1, 2);
    step(mk(MODE_HLD, MODE_NET, 0, 5, OP_NOP));
    #1 chk("SUB 50-8", net_out, 42);
    step(mk(MODE_HLD, MODE_NET, 7, 6, OP_SHL));
    #1 chk("SUB with left held", net_out, 48);
    step(mk(MODE_NET, MODE_NET, 0, 0, OP_NOP));
    step(mk(MODE_NET, MODE_NET, 0, 7, OP_NOP));
    #1 chk("SHL with left held", net_out, 200);


    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
