// synzen_fu_alu_tb: self-checking test of the synZEN function unit.
//
// Applies every opcode (all 16 codes, including unused ones) with random and
// corner-case operands and compares result and write enable with values
// computed here from the operation definitions. The unit is combinational, so
// each vector is checked 1 ns after it is applied.
module synzen_fu_alu_tb;
  import synzen_pkg::*;

  localparam int unsigned DATA_W = 32;

  logic [DATA_W-1:0] a, b, res;
  opcode_e           op;
  logic              we;
  int checks = 0, failures = 0;

  synzen_fu_alu #(.DATA_W(DATA_W)) dut (.a_i(a), .b_i(b), .op_i(op), .res_o(res), .we_o(we));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_vec(input logic [3:0] code, input logic [31:0] x, input logic [31:0] y);
    logic [31:0] exp_r;
    logic        exp_w;
    longint unsigned prod;
    a  = x;
    b  = y;
    op = opcode_e'(code);
    prod = longint'(x) * longint'(y);
    exp_w = 1'b1;
    case (code)
      4'd1:  exp_r = x + y;
      4'd2:  exp_r = x - y;
      4'd3:  exp_r = prod[31:0];
      4'd4:  exp_r = x & y;
      4'd5:  exp_r = x | y;
      4'd6:  exp_r = x ^ y;
      4'd7:  exp_r = x << y[4:0];
      4'd8:  exp_r = x >> y[4:0];
      4'd9:  exp_r = x;
      4'd10: exp_r = y;
      default: begin exp_r = 32'h0; exp_w = 1'b0; end
    endcase
    #1;
    checks++;
    if (we !== exp_w || (exp_w && res !== exp_r)) begin
      failures++;
      $display("FAIL op=%0d a=%h b=%h res=%h we=%b exp=%h/%b", code, x, y, res, we, exp_r, exp_w);
    end
  endtask

  initial begin
    for (int c = 0; c < 16; c++) begin
      check_vec(4'(c), 32'hFFFF_FFFF, 32'h0000_0001);
      check_vec(4'(c), 32'h8000_0000, 32'h0000_001F);
      check_vec(4'(c), 32'h0001_0000, 32'h0001_0000);
      for (int i = 0; i < 200; i++) check_vec(4'(c), $urandom, $urandom);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
