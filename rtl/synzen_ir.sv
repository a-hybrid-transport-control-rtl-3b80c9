// synzen_ir: instruction register of a synZEN core.
//
// One instruction of a synZEN core is everything that starts in one cycle: a
// transport operation for every bus of the interconnection network and a
// control operation for every synZEN unit. The instruction register holds the
// current instruction and hands each field straight to its consumer: TOs to
// the buses, COs peer to peer to the units over a control path that is
// separate from the transport network (the split organisation).
//
// Interface: when valid_i is high at a rising edge, to_i/co_i are captured and
// executed in the following cycle; when it is low, an all-zero instruction is
// captured instead, i.e. no transport (valid bits clear) and a NOP control
// operation in NET/NET mode for every unit, which leaves all state unchanged
// while the second pipeline stage of the previous instruction completes.
// Reset loads the same empty instruction. The IR itself follows the
// architecture; where instructions come from (program memory, sequencing,
// branches) is not part of it and is left to the environment through valid_i.
module synzen_ir
  import synzen_pkg::*;
#(
  parameter int unsigned NBUS  = 16,
  parameter int unsigned NUNIT = 8,
  parameter int unsigned TO_W  = 6
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            valid_i,
  input  logic [TO_W-1:0] to_i [NBUS],
  input  ctrl_op_t        co_i [NUNIT],
  output logic [TO_W-1:0] to_o [NBUS],
  output ctrl_op_t        co_o [NUNIT]
);

  always_ff @(posedge clk) begin
    for (int b = 0; b < int'(NBUS); b++)
      to_o[b] <= (rst_n && valid_i) ? to_i[b] : '0;
    for (int u = 0; u < int'(NUNIT); u++)
      co_o[u] <= (rst_n && valid_i) ? co_i[u] : '0;
  end

endmodule
