// synzen_unit: one synZEN unit, a function unit wrapped by the unit interface.
//
// The interface (synzen_unit_if) decodes the unit's 16-bit control operation,
// loads the two input registers according to their data transfer modes,
// passes the pipelined opcode to the function unit (synzen_fu_alu) and stores
// its result in the 16-entry result register file. A unit is the thing that is
// attached to the interconnection network to extend a synZEN core: it offers
// one network source (its register file read port, net_o) and two network
// destinations (its left and right input), and a link input/output pair that
// joins it to a neighbouring unit without the network.
//
// Timing: operands delivered by instruction k are computed on in cycle k+1 and
// the result is in the register file from cycle k+2 on. The structure follows
// the architecture; the function unit's operation set is this design's.
module synzen_unit
  import synzen_pkg::*;
#(
  parameter int unsigned DATA_W = 32
) (
  input  logic              clk,
  input  logic              rst_n,
  input  ctrl_op_t          co_i,
  input  logic [DATA_W-1:0] net_l_i,
  input  logic              net_l_we_i,
  input  logic [DATA_W-1:0] net_r_i,
  input  logic              net_r_we_i,
  input  logic [DATA_W-1:0] lnk_i,
  output logic [DATA_W-1:0] lnk_o,
  output logic [DATA_W-1:0] net_o
);

  logic [DATA_W-1:0] fu_a, fu_b, fu_res;
  opcode_e           fu_op;
  logic              fu_we;

  synzen_unit_if #(.DATA_W(DATA_W)) u_if (
    .clk        (clk),
    .rst_n      (rst_n),
    .co_i       (co_i),
    .net_l_i    (net_l_i),
    .net_l_we_i (net_l_we_i),
    .net_r_i    (net_r_i),
    .net_r_we_i (net_r_we_i),
    .lnk_i      (lnk_i),
    .lnk_o      (lnk_o),
    .net_o      (net_o),
    .fu_a_o     (fu_a),
    .fu_b_o     (fu_b),
    .fu_op_o    (fu_op),
    .fu_res_i   (fu_res),
    .fu_we_i    (fu_we)
  );

  synzen_fu_alu #(.DATA_W(DATA_W)) u_fu (
    .a_i   (fu_a),
    .b_i   (fu_b),
    .op_i  (fu_op),
    .res_o (fu_res),
    .we_o  (fu_we)
  );

endmodule
