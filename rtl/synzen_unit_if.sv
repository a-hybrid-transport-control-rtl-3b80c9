// synzen_unit_if: communication and control interface of a synZEN unit.
//
// Every datapath into or out of a synZEN unit passes through this interface.
// It owns the two input registers of the function unit, the 16-entry result
// register file and the control decode:
//   * Stage 1 (input registers). Each input register takes its next value
//     according to its data transfer mode in the current control operation:
//       NET - the value a transport operation delivers from the network; if no
//             transport addresses the input this cycle the register keeps its
//             value,
//       ACC - entry Re (14) of this unit's own register file, which makes the
//             unit a one-address (accumulator) machine,
//       LNK - entry Rf (15) of the unit linked to this one (lnk_i), bypassing
//             the network, so that linked units act as one polyadic unit,
//       HLD - the current content, for repeated operations on a constant.
//     In the same cycle the opcode and the write address are registered.
//   * Stage 2 (result registers). The function unit works on the input
//     registers with the registered opcode; its result is written to the
//     registered write address at the end of that cycle.
//   The read address of the control operation selects, combinationally, the
//   entry driven onto the network (net_o) in the same cycle, also when the
//   opcode is NOP. A result is therefore readable by a transport two
//   instructions after the one that delivered its operands; hazards are left
//   to the program (no interlock, no bypass), as in the architecture.
//
// Interface: co_i is the unit's control operation; net_l_i/net_r_i with their
// strobes net_l_we_i/net_r_we_i come from the interconnection network; lnk_i is
// the linked unit's Rf entry and lnk_o this unit's; fu_a_o/fu_b_o/fu_op_o feed
// the function unit and fu_res_i/fu_we_i return its result.
//
// The modes, the register file organisation and the CO fields follow the
// architecture. Own choices: a NET input with no transport keeps its value; a
// transport to an input whose mode is not NET is ignored; reset clears the
// input registers, the pending opcode (to NOP) and the register file. The rule
// that at most one input may be in hold mode is checked by an assertion.
module synzen_unit_if
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
  output logic [DATA_W-1:0] net_o,
  output logic [DATA_W-1:0] fu_a_o,
  output logic [DATA_W-1:0] fu_b_o,
  output opcode_e           fu_op_o,
  input  logic [DATA_W-1:0] fu_res_i,
  input  logic              fu_we_i
);

  logic [DATA_W-1:0] in_l_q, in_r_q;
  opcode_e           op_q;
  logic [RF_AW-1:0]  wr_q;
  logic [DATA_W-1:0] acc;

  // Next value of one input register for a given transfer mode.
  function automatic logic [DATA_W-1:0] sel_in(
      input xfer_mode_e mode, input logic [DATA_W-1:0] cur,
      input logic [DATA_W-1:0] net, input logic net_we,
      input logic [DATA_W-1:0] acc_v, input logic [DATA_W-1:0] lnk_v);
    unique case (mode)
      MODE_NET: return net_we ? net : cur;
      MODE_ACC: return acc_v;
      MODE_LNK: return lnk_v;
      default:  return cur;  // MODE_HLD
    endcase
  endfunction

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      in_l_q <= '0;
      in_r_q <= '0;
      op_q   <= OP_NOP;
      wr_q   <= '0;
    end else begin
      in_l_q <= sel_in(co_i.mode_l, in_l_q, net_l_i, net_l_we_i, acc, lnk_i);
      in_r_q <= sel_in(co_i.mode_r, in_r_q, net_r_i, net_r_we_i, acc, lnk_i);
      op_q   <= co_i.op;
      wr_q   <= co_i.wr_addr;
    end
  end

  synzen_rf #(.DATA_W(DATA_W)) u_rf (
    .clk     (clk),
    .rst_n   (rst_n),
    .we_i    (fu_we_i),
    .waddr_i (wr_q),
    .wdata_i (fu_res_i),
    .raddr_i (co_i.rd_addr),
    .rdata_o (net_o),
    .acc_o   (acc),
    .lnk_o   (lnk_o)
  );

  assign fu_a_o  = in_l_q;
  assign fu_b_o  = in_r_q;
  assign fu_op_o = op_q;

  // Hold mode may be active on only one of the two inputs.
  a_single_hold: assert property (@(posedge clk) disable iff (!rst_n)
      !(co_i.mode_l == MODE_HLD && co_i.mode_r == MODE_HLD))
    else $error("synzen_unit_if: hold mode on both inputs");

endmodule
