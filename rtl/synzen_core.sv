// synzen_core: a synZEN processor core in the split-network organisation.
//
// synZEN combines a transport triggered interconnection network with units
// that are steered by their own control operations. Each cycle the instruction
// register (synzen_ir) holds one transport operation (TO) per bus and one
// 16-bit control operation (CO) per synZEN unit:
//   * the TOs route data words over the sparse, multiplexer-based buses of the
//     interconnection network (synzen_icn) from result register file read
//     ports to function unit inputs;
//   * the COs go peer to peer to the units (synzen_unit), choosing for each
//     input its data transfer mode (NET, ACC, LNK, HLD), the register file read
//     and write addresses and the function unit opcode.
// The datapath is a two-stage pipeline: instruction k fills the input
// registers, the function units compute in cycle k+1 and write their result
// register files, and a transport of instruction k+2 can read the result.
// Hazards are resolved by the program (delay slots); there is no interlock
// and no bypass.
//
// Network sources: source u (0..NUNIT-1) is the read port of unit u; source
// NUNIT is ext_data_i, a data input from the environment. Network
// destinations: 2u is the left and 2u+1 the right input of unit u. Unit links
// are fixed at build time as a ring: unit u's LNK input is the Rf entry of
// unit (u-1) mod NUNIT.
//
// Interface: instr_valid_i/to_i/co_i present the next instruction (captured at
// the rising edge, executed in the next cycle; an empty instruction runs when
// instr_valid_i is low). unit_out_o[u] is unit u's read port in the current
// cycle (the entry named by its CO's read address), conflict_o flags two TOs
// writing the same destination. Reset is synchronous and active low.
//
// Default sizes follow the split-network test case with 8 units, 16 buses,
// 8 destinations and 4 sources per bus. Own choices: 32-bit data, the
// external data source, the link ring, the bus connection pattern.
module synzen_core
  import synzen_pkg::*;
#(
  parameter int unsigned DATA_W      = 32,
  parameter int unsigned NUNIT       = 8,
  parameter int unsigned NBUS        = 16,
  parameter int unsigned SRC_PER_BUS = 4,
  parameter int unsigned DST_PER_BUS = 8,
  localparam int unsigned NSRC       = NUNIT + 1,
  localparam int unsigned NDST       = 2 * NUNIT,
  localparam int unsigned TO_W       = 1 + idx_w(DST_PER_BUS) + idx_w(SRC_PER_BUS)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              instr_valid_i,
  input  logic [TO_W-1:0]   to_i [NBUS],
  input  ctrl_op_t          co_i [NUNIT],
  input  logic [DATA_W-1:0] ext_data_i,
  output logic [DATA_W-1:0] unit_out_o [NUNIT],
  output logic              conflict_o
);

  logic [TO_W-1:0]   to_q     [NBUS];
  ctrl_op_t          co_q     [NUNIT];
  logic [DATA_W-1:0] src_data [NSRC];
  logic [DATA_W-1:0] dst_data [NDST];
  logic              dst_we   [NDST];
  logic [DATA_W-1:0] lnk      [NUNIT];

  synzen_ir #(.NBUS(NBUS), .NUNIT(NUNIT), .TO_W(TO_W)) u_ir (
    .clk     (clk),
    .rst_n   (rst_n),
    .valid_i (instr_valid_i),
    .to_i    (to_i),
    .co_i    (co_i),
    .to_o    (to_q),
    .co_o    (co_q)
  );

  synzen_icn #(
    .DATA_W      (DATA_W),
    .NBUS        (NBUS),
    .NSRC        (NSRC),
    .NDST        (NDST),
    .SRC_PER_BUS (SRC_PER_BUS),
    .DST_PER_BUS (DST_PER_BUS)
  ) u_icn (
    .to_i       (to_q),
    .src_data_i (src_data),
    .dst_data_o (dst_data),
    .dst_we_o   (dst_we),
    .conflict_o (conflict_o)
  );

  assign src_data[NUNIT] = ext_data_i;

  for (genvar u = 0; u < int'(NUNIT); u++) begin : g_unit
    synzen_unit #(.DATA_W(DATA_W)) u_unit (
      .clk        (clk),
      .rst_n      (rst_n),
      .co_i       (co_q[u]),
      .net_l_i    (dst_data[2*u]),
      .net_l_we_i (dst_we[2*u]),
      .net_r_i    (dst_data[2*u+1]),
      .net_r_we_i (dst_we[2*u+1]),
      .lnk_i      (lnk[(u + NUNIT - 1) % NUNIT]),
      .lnk_o      (lnk[u]),
      .net_o      (src_data[u])
    );
    assign unit_out_o[u] = src_data[u];
  end

endmodule
