// synzen_fu_alu: dyadic function unit of a synZEN unit.
//
// The function unit is the part of a synZEN unit that does the arithmetic; the
// unit interface around it feeds its two operands from the input registers and
// stores its result in the result register file. It is purely combinational:
// the registers before it (input registers) and after it (result registers)
// form the two pipeline stages of the datapath.
//
// Interface: a_i/b_i are the left/right operands, op_i the 4-bit opcode from
// the control operation. res_o is the result and we_o says that the opcode
// produces one (every opcode except NOP), so that a NOP leaves the register
// file untouched.
//
// The architecture fixes only that a function unit decodes a 4-bit opcode and
// shows multiply and add (accumulate) units; the operation set and its codes
// below are this design's choice. All operations are on unsigned words; MUL
// keeps the low DATA_W bits of the product, shifts use the low bits of b_i.
module synzen_fu_alu
  import synzen_pkg::*;
#(
  parameter int unsigned DATA_W = 32
) (
  input  logic [DATA_W-1:0] a_i,
  input  logic [DATA_W-1:0] b_i,
  input  opcode_e           op_i,
  output logic [DATA_W-1:0] res_o,
  output logic              we_o
);

  localparam int unsigned SH_W = idx_w(DATA_W);

  logic [SH_W-1:0] shamt;
  assign shamt = b_i[SH_W-1:0];

  always_comb begin
    we_o  = 1'b1;
    res_o = '0;
    unique case (op_i)
      OP_ADD:   res_o = a_i + b_i;
      OP_SUB:   res_o = a_i - b_i;
      OP_MUL:   res_o = a_i * b_i;
      OP_AND:   res_o = a_i & b_i;
      OP_OR:    res_o = a_i | b_i;
      OP_XOR:   res_o = a_i ^ b_i;
      OP_SHL:   res_o = a_i << shamt;
      OP_SHR:   res_o = a_i >> shamt;
      OP_PASSA: res_o = a_i;
      OP_PASSB: res_o = b_i;
      default:  we_o  = 1'b0;  // OP_NOP and unused codes write nothing
    endcase
  end

endmodule
