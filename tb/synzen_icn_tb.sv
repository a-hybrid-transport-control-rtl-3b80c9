// synzen_icn_tb: self-checking test of the transport interconnection network.
//
// Builds, in the testbench, the connection tables of the sparse buses from the
// stated connection pattern (local source j of bus b is global source
// (b+j) mod NSRC, local destination j is (b*DST_PER_BUS+j) mod NDST) and
// routes random sets of transport operations through them: each bus copies its
// selected source to its selected destination, the lowest bus wins when two
// buses address one destination, and out-of-range local addresses do nothing.
// Destination data, write strobes and the conflict flag are compared for every
// vector. It also checks that every source can reach every destination and
// counts multicasts (one source on several buses) and conflicts.
module synzen_icn_tb;
  import synzen_pkg::*;

  localparam int unsigned DATA_W = 32, NBUS = 16, NSRC = 9, NDST = 16;
  localparam int unsigned SPB = 4, DPB = 8;
  localparam int unsigned SAW = 2, DAW = 3, TOW = 1 + DAW + SAW;

  logic [TOW-1:0]    to   [NBUS];
  logic [DATA_W-1:0] src  [NSRC];
  logic [DATA_W-1:0] dst  [NDST];
  logic              dwe  [NDST];
  logic              conflict;
  int checks = 0, failures = 0, multicasts = 0, conflicts = 0;

  synzen_icn #(.DATA_W(DATA_W), .NBUS(NBUS), .NSRC(NSRC), .NDST(NDST),
               .SRC_PER_BUS(SPB), .DST_PER_BUS(DPB)) dut (
    .to_i(to), .src_data_i(src), .dst_data_o(dst), .dst_we_o(dwe), .conflict_o(conflict));

  int src_tab [NBUS][SPB];
  int dst_tab [NBUS][DPB];

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply_and_check();
    logic [DATA_W-1:0] e_data [NDST];
    logic              e_we   [NDST];
    logic              e_conf;
    int                uses   [NSRC];
    e_conf = 0;
    for (int d = 0; d < NDST; d++) begin e_data[d] = '0; e_we[d] = 0; end
    for (int s = 0; s < NSRC; s++) uses[s] = 0;
    for (int b = 0; b < NBUS; b++) begin
      int sj, dj;
      sj = int'(to[b][SAW-1:0]);
      dj = int'(to[b][SAW +: DAW]);
      if (to[b][TOW-1] && sj < SPB && dj < DPB) begin
        uses[src_tab[b][sj]]++;
        if (e_we[dst_tab[b][dj]]) e_conf = 1;
        else begin
          e_we[dst_tab[b][dj]]   = 1;
          e_data[dst_tab[b][dj]] = src[src_tab[b][sj]];
        end
      end
    end
    for (int s = 0; s < NSRC; s++) if (uses[s] > 1) multicasts++;
    if (e_conf) conflicts++;
    #1;
    for (int d = 0; d < NDST; d++) begin
      checks++;
      if (dwe[d] !== e_we[d] || (e_we[d] && dst[d] !== e_data[d])) begin
        failures++;
        $display("FAIL dst %0d we=%b data=%h exp we=%b data=%h", d, dwe[d], dst[d], e_we[d], e_data[d]);
      end
    end
    checks++;
    if (conflict !== e_conf) begin failures++; $display("FAIL conflict=%b exp=%b", conflict, e_conf); end
  endtask

  initial begin
    bit reach [NSRC][NDST];
    for (int b = 0; b < NBUS; b++) begin
      for (int j = 0; j < SPB; j++) src_tab[b][j] = (b + j) % NSRC;
      for (int j = 0; j < DPB; j++) dst_tab[b][j] = (b * DPB + j) % NDST;
    end
    // Full reachability of the default connection pattern.
    for (int s = 0; s < NSRC; s++) for (int d = 0; d < NDST; d++) reach[s][d] = 0;
    for (int b = 0; b < NBUS; b++)
      for (int i = 0; i < SPB; i++) for (int j = 0; j < DPB; j++) reach[src_tab[b][i]][dst_tab[b][j]] = 1;
    for (int s = 0; s < NSRC; s++) for (int d = 0; d < NDST; d++) begin
      checks++;
      if (!reach[s][d]) begin failures++; $display("FAIL source %0d cannot reach destination %0d", s, d); end
    end
    // Idle network.
    for (int b = 0; b < NBUS; b++) to[b] = '0;
    for (int s = 0; s < NSRC; s++) src[s] = $urandom;
    apply_and_check();
    // Each single transport in turn, every local address pair of every bus.
    for (int b = 0; b < NBUS; b++)
      for (int i = 0; i < SPB; i++) for (int j = 0; j < DPB; j++) begin
        for (int k = 0; k < NBUS; k++) to[k] = '0;
        to[b] = {1'b1, DAW'(j), SAW'(i)};
        for (int s = 0; s < NSRC; s++) src[s] = $urandom;
        apply_and_check();
      end
    // Random sets of parallel transports.
    for (int n = 0; n < 3000; n++) begin
      for (int b = 0; b < NBUS; b++) to[b] = TOW'($urandom);
      for (int s = 0; s < NSRC; s++) src[s] = $urandom;
      apply_and_check();
    end
    if (multicasts == 0) begin failures++; $display("FAIL no multicast exercised"); end
    if (conflicts == 0)  begin failures++; $display("FAIL no conflict exercised"); end
    $display("multicasts=%0d conflicts=%0d", multicasts, conflicts);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
