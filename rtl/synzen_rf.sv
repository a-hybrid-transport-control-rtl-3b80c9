// synzen_rf: result register file of a synZEN unit.
//
// Sixteen DATA_W-bit entries with one write port, used by the function unit
// result, and one read port, which drives the unit's output onto the
// interconnection network. Entries 14 (Re, "acc") and 15 (Rf, "lnk") are in
// addition tapped permanently: acc_o feeds back to the unit's own input
// registers in accumulator mode and lnk_o goes to the unit linked to this one.
// Both are ordinary entries as well and can be written and read like the other
// fourteen. Seen from the whole core, the register files of all units form a
// distributed memory that grows with the number of units.
//
// Timing: a write takes effect at the rising clock edge; reads are
// combinational and return the value before a same-cycle write (there is no
// bypass). The entry count, the single write and read port and the two tapped
// entries follow the architecture; the synchronous active-low reset that
// clears every entry to zero is this design's choice.
module synzen_rf
  import synzen_pkg::*;
#(
  parameter int unsigned DATA_W = 32
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       we_i,
  input  logic [RF_AW-1:0]          waddr_i,
  input  logic [DATA_W-1:0]          wdata_i,
  input  logic [RF_AW-1:0]          raddr_i,
  output logic [DATA_W-1:0]          rdata_o,
  output logic [DATA_W-1:0]          acc_o,
  output logic [DATA_W-1:0]          lnk_o
);

  logic [DATA_W-1:0] regs [RF_ENTRIES];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < int'(RF_ENTRIES); i++) regs[i] <= '0;
    end else if (we_i) begin
      regs[waddr_i] <= wdata_i;
    end
  end

  assign rdata_o = regs[raddr_i];
  assign acc_o   = regs[ACC_IDX];
  assign lnk_o   = regs[LNK_IDX];

endmodule
