// synzen_unit_if_tb: self-checking test of the synZEN unit interface.
//
// The function unit is replaced by the testbench, which returns random results
// with a random write strobe. A cycle-by-cycle model kept here tracks the two
// input registers (next value chosen by the NET/ACC/LNK/HLD transfer mode),
// the pipelined opcode and write address and the 16 result registers. Every
// cycle the read port, the link output and the operands and opcode handed to
// the function unit are compared with the model. Random control operations
// never put both inputs in hold mode (that is forbidden and asserted); each
// transfer mode, a NET input with no transport, and writes to the acc and lnk
// entries are counted and must all occur.
module synzen_unit_if_tb;
  import synzen_pkg::*;

  localparam int unsigned DATA_W = 32;

  logic clk = 0, rst_n = 0;
  ctrl_op_t co;
  logic [DATA_W-1:0] net_l, net_r, lnk_in, lnk_out, net_out, fu_a, fu_b, fu_res;
  logic net_l_we, net_r_we, fu_we;
  opcode_e fu_op;
  int checks = 0, failures = 0;
  int mode_cnt [4];
  int net_idle = 0, acc_wr = 0, lnk_wr = 0;

  always #5 clk = ~clk;

  synzen_unit_if #(.DATA_W(DATA_W)) dut (
    .clk(clk), .rst_n(rst_n), .co_i(co),
    .net_l_i(net_l), .net_l_we_i(net_l_we), .net_r_i(net_r), .net_r_we_i(net_r_we),
    .lnk_i(lnk_in), .lnk_o(lnk_out), .net_o(net_out),
    .fu_a_o(fu_a), .fu_b_o(fu_b), .fu_op_o(fu_op), .fu_res_i(fu_res), .fu_we_i(fu_we));

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

  function automatic logic [DATA_W-1:0] next_in(input logic [1:0] m, input logic [DATA_W-1:0] cur,
      input logic [DATA_W-1:0] nv, input logic nwe, input logic [DATA_W-1:0] accv, input logic [DATA_W-1:0] lnkv);
    case (m)
      2'd0: return nwe ? nv : cur;
      2'd1: return accv;
      2'd2: return lnkv;
      default: return cur;
    endcase
  endfunction

  initial begin
    logic [DATA_W-1:0] rf [16];
    logic [DATA_W-1:0] in_l, in_r;
    logic [3:0] op_q, wr_q;
    logic [1:0] ml, mr;
    co = '0; net_l = 0; net_r = 0; net_l_we = 0; net_r_we = 0; lnk_in = 0; fu_res = 0; fu_we = 0;
    for (int i = 0; i < 16; i++) rf[i] = '0;
    in_l = '0; in_r = '0; op_q = '0; wr_q = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int n = 0; n < 4000; n++) begin
      @(negedge clk);
      ml = 2'($urandom);
      mr = 2'($urandom);
      if (ml == 2'd3 && mr == 2'd3) mr = 2'($urandom % 3);
      co.mode_l  = xfer_mode_e'(ml);
      co.mode_r  = xfer_mode_e'(mr);
      co.wr_addr = (n % 4 == 0) ? 4'(14 + $urandom % 2) : 4'($urandom);
      co.rd_addr = 4'($urandom);
      co.op      = opcode_e'(4'($urandom));
      net_l = $urandom; net_r = $urandom; lnk_in = $urandom; fu_res = $urandom;
      net_l_we = 1'($urandom); net_r_we = 1'($urandom);
      fu_we = $urandom % 4 != 0;
      mode_cnt[ml]++; mode_cnt[mr]++;
      if ((ml == 0 && !net_l_we) || (mr == 0 && !net_r_we)) net_idle++;
      #1;
      chk("read port", net_out, rf[co.rd_addr]);
      chk("lnk out", lnk_out, rf[15]);
      chk("fu a", fu_a, in_l);
      chk("fu b", fu_b, in_r);
      chk("fu op", 32'(fu_op), 32'(op_q));
      @(posedge clk);
      // input registers see Re as it was before this edge's write
      in_l = next_in(ml, in_l, net_l, net_l_we, rf[14], lnk_in);
      in_r = next_in(mr, in_r, net_r, net_r_we, rf[14], lnk_in);
      if (fu_we) begin
        rf[wr_q] = fu_res;
        if (wr_q == 14) acc_wr++;
        if (wr_q == 15) lnk_wr++;
      end
      op_q = 4'(co.op);
      wr_q = co.wr_addr;
    end
    for (int m = 0; m < 4; m++) if (mode_cnt[m] == 0) begin failures++; $display("FAIL mode %0d never used", m); end
    if (net_idle == 0 || acc_wr == 0 || lnk_wr == 0) begin failures++; $display("FAIL coverage"); end
    $display("modes net=%0d acc=%0d lnk=%0d hld=%0d", mode_cnt[0], mode_cnt[1], mode_cnt[2], mode_cnt[3]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
