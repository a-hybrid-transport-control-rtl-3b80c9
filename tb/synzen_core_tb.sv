// synzen_core_tb: end-to-end test of a synZEN core at its default size
// (8 units, 16 buses, 4 sources and 8 destinations per bus, 32-bit data).
//
// The testbench holds its own cycle-accurate model of the architecture (bus
// connection pattern, transfer modes, two-stage pipeline, register files,
// link ring, function unit operations) and compares every unit's read port
// and the conflict flag with it in every cycle. It runs three programs:
//   1. Fibonacci: unit 4 adds its last result (R0) and unit 5's copy of the
//      previous one; the same instruction multicasts unit 4's R0 to unit 4 and
//      to unit 5, which copies it with its right input in hold mode. After 20
//      steps unit 4's R0 must hold F(21) = 10946.
//   2. Multiply-accumulate A = A + B*C over 12 element pairs stored in units 2
//      and 3: two transports per element feed unit 0 (MUL into its link entry
//      Rf), unit 1 takes the product over the link (LNK) and A from its own
//      accumulator entry (ACC), so no transport is needed for them. The sum is
//      computed here independently.
//   3. Random instructions with bubbles (instr_valid low), all transfer modes,
//      multicasts and bus collisions, checked only against the model.
// Each mechanism (NET transport, ACC, LNK, HLD, multicast, read during NOP,
// bubble, bus conflict) is counted and must occur. The result of a program is
// also checked to appear exactly two instructions after its operands, never
// earlier.
module synzen_core_tb;
  import synzen_pkg::*;

  localparam int NUNIT = 8, NBUS = 16, SPB = 4, DPB = 8;
  localparam int NSRC = NUNIT + 1, NDST = 2 * NUNIT;
  localparam int SAW = 2, DAW = 3, TOW = 1 + DAW + SAW;
  localparam int EXT = NUNIT;  // global index of the external data source

  typedef struct packed {
    logic                           valid;
    logic [NBUS-1:0][TOW-1:0]       to;
    logic [NUNIT-1:0][15:0]         co;
    logic [31:0]                    ext;
  } instr_t;

  logic clk = 0, rst_n = 0;
  logic instr_valid;
  logic [TOW-1:0] to_i [NBUS];
  ctrl_op_t       co_i [NUNIT];
  logic [31:0]    ext_data;
  logic [31:0]    unit_out [NUNIT];
  logic           conflict;

  always #5 clk = ~clk;

  synzen_core dut (
    .clk(clk), .rst_n(rst_n), .instr_valid_i(instr_valid), .to_i(to_i), .co_i(co_i),
    .ext_data_i(ext_data), .unit_out_o(unit_out), .conflict_o(conflict));

  int checks = 0, failures = 0;
  int n_net = 0, n_acc = 0, n_lnk = 0, n_hld = 0, n_mcast = 0, n_nopread = 0, n_bubble = 0, n_conf = 0;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- reference model ----------------
  logic [31:0] m_rf [NUNIT][16];
  logic [31:0] m_inl [NUNIT], m_inr [NUNIT];
  logic [3:0]  m_op [NUNIT], m_wr [NUNIT];
  instr_t      cur;

  function automatic int src_of(int b, int j); return (b + j) % NSRC; endfunction
  function automatic int dst_of(int b, int j); return (b * DPB + j) % NDST; endfunction

  function automatic logic [32:0] alu(logic [3:0] op, logic [31:0] a, logic [31:0] b);
    logic [63:0] p;
    p = {32'h0, a} * {32'h0, b};
    case (op)
      1:  return {1'b1, a + b};
      2:  return {1'b1, a - b};
      3:  return {1'b1, p[31:0]};
      4:  return {1'b1, a & b};
      5:  return {1'b1, a | b};
      6:  return {1'b1, a ^ b};
      7:  return {1'b1, a << b[4:0]};
      8:  return {1'b1, a >> b[4:0]};
      9:  return {1'b1, a};
      10: return {1'b1, b};
      default: return 33'h0;
    endcase
  endfunction

  // Advance the model over one clock edge for instruction `cur`.
  task automatic model_step();
    logic [31:0] src [NSRC];
    logic [31:0] dd  [NDST];
    logic        dw  [NDST];
    logic [32:0] r   [NUNIT];
    int          use_cnt [NSRC];
    logic [31:0] nl, nr;
    for (int s = 0; s < NSRC; s++) use_cnt[s] = 0;
    for (int u = 0; u < NUNIT; u++) src[u] = m_rf[u][cur.co[u][11:8]];
    src[EXT] = cur.ext;
    for (int d = 0; d < NDST; d++) begin dd[d] = 0; dw[d] = 0; end
    for (int b = 0; b < NBUS; b++) begin
      int sj, dj;
      sj = int'(cur.to[b][SAW-1:0]);
      dj = int'(cur.to[b][SAW +: DAW]);
      if (cur.to[b][TOW-1] && sj < SPB && dj < DPB) begin
        use_cnt[src_of(b, sj)]++;
        if (!dw[dst_of(b, dj)]) begin
          dw[dst_of(b, dj)] = 1;
          dd[dst_of(b, dj)] = src[src_of(b, sj)];
        end
      end
    end
    for (int s = 0; s < NSRC; s++) if (use_cnt[s] > 1) n_mcast++;
    for (int u = 0; u < NUNIT; u++) begin
      r[u] = alu(m_op[u], m_inl[u], m_inr[u]);
      if (cur.co[u][15:12] == 0 && use_cnt[u] > 0) n_nopread++;
    end
    for (int u = 0; u < NUNIT; u++) begin
      logic [1:0] ml, mr;
      ml = cur.co[u][1:0];
      mr = cur.co[u][3:2];
      case (ml)
        0: nl = dw[2*u] ? dd[2*u] : m_inl[u];
        1: nl = m_rf[u][14];
        2: nl = m_rf[(u + NUNIT - 1) % NUNIT][15];
        default: nl = m_inl[u];
      endcase
      case (mr)
        0: nr = dw[2*u+1] ? dd[2*u+1] : m_inr[u];
        1: nr = m_rf[u][14];
        2: nr = m_rf[(u + NUNIT - 1) % NUNIT][15];
        default: nr = m_inr[u];
      endcase
      if (ml == 0 && dw[2*u]) n_net++;
      if (mr == 0 && dw[2*u+1]) n_net++;
      if (ml == 1 || mr == 1) n_acc++;
      if (ml == 2 || mr == 2) n_lnk++;
      if (ml == 3 || mr == 3) n_hld++;
      m_inl[u] = nl;
      m_inr[u] = nr;
    end
    for (int u = 0; u < NUNIT; u++) begin
      if (r[u][32]) m_rf[u][m_wr[u]] = r[u][31:0];
      m_op[u] = cur.co[u][15:12];
      m_wr[u] = cur.co[u][7:4];
    end
  endtask

  function automatic logic model_conflict();
    logic hit [NDST];
    logic c;
    c = 0;
    for (int d = 0; d < NDST; d++) hit[d] = 0;
    for (int b = 0; b < NBUS; b++) begin
      int sj, dj;
      sj = int'(cur.to[b][SAW-1:0]);
      dj = int'(cur.to[b][SAW +: DAW]);
      if (cur.to[b][TOW-1] && sj < SPB && dj < DPB) begin
        if (hit[dst_of(b, dj)]) c = 1;
        hit[dst_of(b, dj)] = 1;
      end
    end
    return c;
  endfunction

  // ---------------- program construction ----------------
  instr_t prog [$];
  instr_t bld;

  function automatic logic [15:0] co_f(int ml, int mr, int wr, int rd, int op);
    return {4'(op), 4'(rd), 4'(wr), 2'(mr), 2'(ml)};
  endfunction

  function automatic void bld_clear();
    bld = '0;
    bld.valid = 1;
  endfunction

  // Route global source s to destination d on a free bus of `bld`.
  function automatic void route(int s, int d);
    for (int b = 0; b < NBUS; b++) begin
      if (bld.to[b][TOW-1]) continue;
      for (int i = 0; i < SPB; i++) for (int j = 0; j < DPB; j++)
        if (src_of(b, i) == s && dst_of(b, j) == d) begin
          bld.to[b] = {1'b1, DAW'(j), SAW'(i)};
          return;
        end
    end
    $display("FAIL no free bus from %0d to %0d", s, d);
    failures++;
  endfunction

  function automatic void emit(); prog.push_back(bld); bld_clear(); endfunction

  // Put value v into register `wr` of unit u (via the external source and PASSA).
  function automatic void load_reg(int u, int wr, logic [31:0] v);
    bld_clear();
    route(EXT, 2 * u);
    bld.ext = v;
    bld.co[u] = co_f(0, 0, wr, 0, 9);
    emit();
    emit();  // delay slot: operands are computed next cycle
  endfunction

  // ---------------- execution ----------------
  task automatic run_prog(input int bubble_pct);
    while (prog.size() > 0) begin
      instr_t nx;
      @(negedge clk);
      if (bubble_pct > 0 && ($urandom % 100) < bubble_pct) begin
        nx = '0;
        n_bubble++;
      end else nx = prog.pop_front();
      instr_valid = nx.valid;
      for (int b = 0; b < NBUS; b++) to_i[b] = nx.to[b];
      for (int u = 0; u < NUNIT; u++) co_i[u] = ctrl_op_t'(nx.co[u]);
      @(posedge clk);
      model_step();
      cur = nx.valid ? nx : instr_t'(0);
      #1;
      ext_data = cur.ext;
      #1;
      for (int u = 0; u < NUNIT; u++) begin
        checks++;
        if (unit_out[u] !== m_rf[u][cur.co[u][11:8]]) begin
          failures++;
          $display("FAIL unit %0d out=%h model=%h t=%0t", u, unit_out[u], m_rf[u][cur.co[u][11:8]], $time);
        end
      end
      checks++;
      if (conflict !== model_conflict()) begin failures++; $display("FAIL conflict flag t=%0t", $time); end
      if (conflict) n_conf++;
    end
  endtask

  // Read register rd of unit u through its read port and compare with exp.
  task automatic expect_reg(int u, int rd, logic [31:0] exp, string what);
    bld_clear();
    bld.co[u] = co_f(0, 0, 0, rd, 0);
    emit();
    run_prog(0);
    checks++;
    if (unit_out[u] !== exp) begin
      failures++;
      $display("FAIL %s: unit %0d R%0d = %0d, expected %0d", what, u, rd, unit_out[u], exp);
    end else $display("%s = %0d", what, unit_out[u]);
  endtask

  initial begin
    logic [31:0] fa, fb, ft, acc_ref;
    logic [31:0] bv [12], cv [12];
    instr_valid = 0; ext_data = 0;
    for (int b = 0; b < NBUS; b++) to_i[b] = '0;
    for (int u = 0; u < NUNIT; u++) co_i[u] = '0;
    for (int u = 0; u < NUNIT; u++) begin
      for (int i = 0; i < 16; i++) m_rf[u][i] = 0;
      m_inl[u] = 0; m_inr[u] = 0; m_op[u] = 0; m_wr[u] = 0;
    end
    cur = '0;
    bld_clear();
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;

    // ---- 1. Fibonacci ----
    load_reg(4, 0, 1);  // F(1)
    load_reg(5, 0, 0);  // F(0)
    run_prog(0);
    for (int k = 0; k < 20; k++) begin
      bld_clear();
      route(4, 8);   // U4.R0 -> U4 left
      route(4, 10);  // U4.R0 -> U5 left (multicast)
      route(5, 9);   // U5.R0 -> U4 right
      bld.co[4] = co_f(0, 0, 0, 0, 1);  // NET,NET  R0 <- ADD
      bld.co[5] = co_f(0, 3, 0, 0, 9);  // NET-HLD  R0 <- PASSA
      emit();
      if (k == 1) begin
        // latency check: the sum must not be readable one instruction later
        bld.co[4] = co_f(0, 0, 0, 0, 0);
        emit();
        run_prog(0);
        checks++;
        if (unit_out[4] !== 1) begin failures++; $display("FAIL result visible too early"); end
        expect_reg(4, 0, 2, "F(3) two instructions after issue");
        continue;
      end
      emit();  // delay slot
    end
    run_prog(0);
    fa = 0; fb = 1;
    for (int k = 0; k < 20; k++) begin ft = fa + fb; fa = fb; fb = ft; end
    expect_reg(4, 0, fb, "fibonacci F(21)");

    // ---- 2. multiply-accumulate A = A + B*C ----
    acc_ref = 32'd1000;
    for (int i = 0; i < 12; i++) begin
      bv[i] = $urandom % 1000;
      cv[i] = $urandom % 1000;
      acc_ref += bv[i] * cv[i];
      load_reg(2, i, bv[i]);
      load_reg(3, i, cv[i]);
    end
    load_reg(1, 14, 1000);
    run_prog(0);
    for (int i = 0; i < 14; i++) begin
      bld_clear();
      if (i < 12) begin
        route(2, 0);  // B -> U0 left
        route(3, 1);  // C -> U0 right
        bld.co[2] = co_f(0, 0, 0, i, 0);
        bld.co[3] = co_f(0, 0, 0, i, 0);
        bld.co[0] = co_f(0, 0, 15, 0, 3);   // MUL -> Rf (link entry)
      end
      if (i >= 1 && i <= 12) bld.co[1] = co_f(2, 1, 14, 0, 1);  // LNK + ACC -> Re
      emit();
      emit();  // delay slot
    end
    run_prog(0);
    expect_reg(1, 14, acc_ref, "multiply-accumulate result");

    // ---- 3. random instructions against the model ----
    for (int n = 0; n < 3000; n++) begin
      instr_t x;
      x = '0;
      x.valid = 1;
      x.ext = $urandom;
      for (int b = 0; b < NBUS; b++) x.to[b] = ($urandom % 3 == 0) ? TOW'($urandom) : '0;
      for (int u = 0; u < NUNIT; u++) begin
        logic [15:0] c;
        c = 16'($urandom);
        if (c[1:0] == 3 && c[3:2] == 3) c[3:2] = 0;
        if ($urandom % 4 == 0) c[15:12] = 0;
        x.co[u] = c;
      end
      prog.push_back(x);
    end
    run_prog(10);

    $display("mechanisms: net=%0d acc=%0d lnk=%0d hold=%0d multicast=%0d nop_read=%0d bubble=%0d conflict=%0d",
             n_net, n_acc, n_lnk, n_hld, n_mcast, n_nopread, n_bubble, n_conf);
    if (n_net == 0)     begin failures++; $display("FAIL no NET transport"); end
    if (n_acc == 0)     begin failures++; $display("FAIL no ACC mode"); end
    if (n_lnk == 0)     begin failures++; $display("FAIL no LNK mode"); end
    if (n_hld == 0)     begin failures++; $display("FAIL no HLD mode"); end
    if (n_mcast == 0)   begin failures++; $display("FAIL no multicast"); end
    if (n_nopread == 0) begin failures++; $display("FAIL no read during NOP"); end
    if (n_bubble == 0)  begin failures++; $display("FAIL no bubble"); end
    if (n_conf == 0)    begin failures++; $display("FAIL no bus conflict"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
