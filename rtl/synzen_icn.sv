// synzen_icn: transport interconnection network (ICN) of a synZEN core.
//
// The ICN is a set of NBUS multiplexer-based buses. Each bus moves at most one
// data word per cycle from one of its connected sources (result register file
// read ports) to one of its connected destinations (function unit inputs), as
// ordered by that bus' transport operation (TO). The network is sparse: bus b
// reaches only SRC_PER_BUS sources and DST_PER_BUS destinations, so a TO
// carries bus-local addresses and is only as wide as that local address space:
//   TO = {valid, dst[DST_AW-1:0], src[SRC_AW-1:0]}, source in the low bits.
// Local source j of bus b is global source (b + j) mod NSRC; local destination
// j is global destination (b*DST_PER_BUS + j) mod NDST. With the default sizes
// every source reaches every destination over some bus.
// Several buses may read the same source in one cycle (multicast). If several
// buses address the same destination, the lowest-numbered bus wins and
// conflict_o is raised; programs must avoid this. A TO whose local address is
// beyond the bus' connection count does nothing. The network is purely
// combinational; the destination registers sit in the units.
//
// Follows the architecture: buses of source/destination multiplexers, one TO
// per bus made of a source and a destination address, sparse connection
// matrices, asymmetric TO with more destinations than sources (default
// 4 sources and 8 destinations per bus, a 2-bit source and 3-bit destination
// field). Own choices: the valid bit, the connection pattern and the conflict
// rule.
module synzen_icn
  import synzen_pkg::*;
#(
  parameter int unsigned DATA_W      = 32,
  parameter int unsigned NBUS        = 16,
  parameter int unsigned NSRC        = 9,
  parameter int unsigned NDST        = 16,
  parameter int unsigned SRC_PER_BUS = 4,
  parameter int unsigned DST_PER_BUS = 8,
  localparam int unsigned SRC_AW     = idx_w(SRC_PER_BUS),
  localparam int unsigned DST_AW     = idx_w(DST_PER_BUS),
  localparam int unsigned TO_W       = 1 + DST_AW + SRC_AW
) (
  input  logic [TO_W-1:0]   to_i       [NBUS],
  input  logic [DATA_W-1:0] src_data_i [NSRC],
  output logic [DATA_W-1:0] dst_data_o [NDST],
  output logic              dst_we_o   [NDST],
  output logic              conflict_o
);

  logic [DATA_W-1:0] bus_data [NBUS];
  logic              bus_act  [NBUS];
  logic [DST_AW-1:0] bus_dsta [NBUS];

  // Source side: one multiplexer per bus over its connected sources.
  always_comb begin
    for (int b = 0; b < int'(NBUS); b++) begin
      bus_data[b] = '0;
      bus_act[b]  = 1'b0;
      bus_dsta[b] = to_i[b][SRC_AW +: DST_AW];
      for (int j = 0; j < int'(SRC_PER_BUS); j++) begin
        if (to_i[b][SRC_AW-1:0] == SRC_AW'(j)) begin
          bus_data[b] = src_data_i[bus_src(b, j, NSRC)];
          bus_act[b]  = to_i[b][TO_W-1];
        end
      end
    end
  end

  // Destination side: one multiplexer per destination over the buses that
  // reach it. Buses are scanned from the highest index down so that the
  // lowest-numbered bus wins a collision.
  always_comb begin
    conflict_o = 1'b0;
    for (int d = 0; d < int'(NDST); d++) begin
      dst_data_o[d] = '0;
      dst_we_o[d]   = 1'b0;
    end
    for (int b = int'(NBUS) - 1; b >= 0; b--) begin
      for (int j = 0; j < int'(DST_PER_BUS); j++) begin
        if (bus_act[b] && bus_dsta[b] == DST_AW'(j)) begin
          if (dst_we_o[bus_dst(b, j, NDST, DST_PER_BUS)]) conflict_o = 1'b1;
          dst_data_o[bus_dst(b, j, NDST, DST_PER_BUS)] = bus_data[b];
          dst_we_o[bus_dst(b, j, NDST, DST_PER_BUS)]   = 1'b1;
        end
      end
    end
  end

endmodule
