// synzen_core_rand_check: reusable random-program check of a synZEN core of
// any size, used by the testbenches that run several core configurations.
//
// It instantiates synzen_core with the given sizes, drives NCYC random
// instructions (random transports on about a third of the buses, random
// control operations with never both inputs on hold, random bubbles, random
// external data) and keeps a cycle-accurate model of the architecture: bus
// connection pattern (local source j of bus b is source (b+j) mod NSRC, local
// destination j is destination (b*DPB+j) mod NDST, lowest bus wins a
// collision), the four transfer modes, the two-stage pipeline, the result
// register files and the link ring. Every unit's read port and the conflict
// flag are compared with the model each cycle. When finished it raises done_o
// with its check and failure counts and the number of operands that arrived
// over the network.
module synzen_core_rand_check
  import synzen_pkg::*;
#(
  parameter int NUNIT = 8,
  parameter int NBUS  = 16,
  parameter int SPB   = 4,
  parameter int DPB   = 8,
  parameter int NCYC  = 1000
) (
  output logic done_o,
  output int   checks_o,
  output int   failures_o,
  output int   transports_o
);
  localparam int NSRC = NUNIT + 1, NDST = 2 * NUNIT;
  localparam int SAW = (SPB <= 1) ? 1 : $clog2(SPB);
  localparam int DAW = (DPB <= 1) ? 1 : $clog2(DPB);
  localparam int TOW = 1 + DAW + SAW;

  logic clk = 0, rst_n = 0, instr_valid = 0;
  logic [TOW-1:0] to_i [NBUS];
  ctrl_op_t       co_i [NUNIT];
  logic [31:0]    ext_data = 0;
  logic [31:0]    unit_out [NUNIT];
  logic           conflict;

  always #5 clk = ~clk;

  synzen_core #(.NUNIT(NUNIT), .NBUS(NBUS), .SRC_PER_BUS(SPB), .DST_PER_BUS(DPB)) dut (
    .clk(clk), .rst_n(rst_n), .instr_valid_i(instr_valid), .to_i(to_i), .co_i(co_i),
    .ext_data_i(ext_data), .unit_out_o(unit_out), .conflict_o(conflict));

  logic [31:0] m_rf [NUNIT][16];
  logic [31:0] m_inl [NUNIT], m_inr [NUNIT];
  logic [3:0]  m_op [NUNIT], m_wr [NUNIT];
  logic [TOW-1:0] c_to [NBUS];
  logic [15:0]    c_co [NUNIT];
  logic [31:0]    c_ext;

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

  // Route the current instruction; returns whether a collision occurred.
  function automatic logic route(output logic [31:0] dd [NDST], output logic dw [NDST]);
    logic [31:0] src [NSRC];
    logic c;
    c = 0;
    for (int u = 0; u < NUNIT; u++) src[u] = m_rf[u][c_co[u][11:8]];
    src[NUNIT] = c_ext;
    for (int d = 0; d < NDST; d++) begin dd[d] = 0; dw[d] = 0; end
    for (int b = 0; b < NBUS; b++) begin
      int sj, dj;
      sj = int'(c_to[b][SAW-1:0]);
      dj = int'(c_to[b][SAW +: DAW]);
      if (c_to[b][TOW-1] && sj < SPB && dj < DPB) begin
        if (dw[(b * DPB + dj) % NDST]) c = 1;
        else begin
          dw[(b * DPB + dj) % NDST] = 1;
          dd[(b * DPB + dj) % NDST] = src[(b + sj) % NSRC];
        end
      end
    end
    return c;
  endfunction

  task automatic model_step();
    logic [31:0] dd [NDST];
    logic        dw [NDST];
    logic [32:0] r  [NUNIT];
    logic [31:0] nl [NUNIT], nr [NUNIT];
    void'(route(dd, dw));
    for (int u = 0; u < NUNIT; u++) begin
      r[u] = alu(m_op[u], m_inl[u], m_inr[u]);
      case (c_co[u][1:0])
        0: nl[u] = dw[2*u] ? dd[2*u] : m_inl[u];
        1: nl[u] = m_rf[u][14];
        2: nl[u] = m_rf[(u + NUNIT - 1) % NUNIT][15];
        default: nl[u] = m_inl[u];
      endcase
      case (c_co[u][3:2])
        0: nr[u] = dw[2*u+1] ? dd[2*u+1] : m_inr[u];
        1: nr[u] = m_rf[u][14];
        2: nr[u] = m_rf[(u + NUNIT - 1) % NUNIT][15];
        default: nr[u] = m_inr[u];
      endcase
      if (c_co[u][1:0] == 0 && dw[2*u]) transports_o++;
      if (c_co[u][3:2] == 0 && dw[2*u+1]) transports_o++;
    end
    for (int u = 0; u < NUNIT; u++) begin
      m_inl[u] = nl[u];
      m_inr[u] = nr[u];
      if (r[u][32]) m_rf[u][m_wr[u]] = r[u][31:0];
      m_op[u] = c_co[u][15:12];
      m_wr[u] = c_co[u][7:4];
    end
  endtask

  initial begin
    logic [31:0] dd [NDST];
    logic        dw [NDST];
    logic        v;
    logic [TOW-1:0] nto [NBUS];
    logic [15:0]    nco [NUNIT];
    logic [31:0]    next;
    done_o = 0; checks_o = 0; failures_o = 0; transports_o = 0;
    for (int b = 0; b < NBUS; b++) begin to_i[b] = '0; c_to[b] = '0; end
    for (int u = 0; u < NUNIT; u++) begin
      co_i[u] = '0; c_co[u] = '0;
      for (int i = 0; i < 16; i++) m_rf[u][i] = 0;
      m_inl[u] = 0; m_inr[u] = 0; m_op[u] = 0; m_wr[u] = 0;
    end
    c_ext = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int n = 0; n < NCYC; n++) begin
      @(negedge clk);
      v = ($urandom % 10) != 0;
      next = $urandom;
      for (int b = 0; b < NBUS; b++) nto[b] = (v && $urandom % 3 == 0) ? TOW'($urandom) : '0;
      for (int u = 0; u < NUNIT; u++) begin
        nco[u] = v ? 16'($urandom) : 16'h0;
        if (nco[u][1:0] == 3 && nco[u][3:2] == 3) nco[u][3:2] = 0;
      end
      instr_valid = v;
      for (int b = 0; b < NBUS; b++) to_i[b] = nto[b];
      for (int u = 0; u < NUNIT; u++) co_i[u] = ctrl_op_t'(nco[u]);
      @(posedge clk);
      model_step();
      c_to = nto;
      c_co = nco;
      c_ext = next;
      #1;
      ext_data = c_ext;
      #1;
      for (int u = 0; u < NUNIT; u++) begin
        checks_o++;
        if (unit_out[u] !== m_rf[u][c_co[u][11:8]]) begin
          failures_o++;
          if (failures_o < 10) $display("FAIL cfg %0d/%0d unit %0d out=%h model=%h", NUNIT, NBUS, u, unit_out[u], m_rf[u][c_co[u][11:8]]);
        end
      end
      checks_o++;
      if (conflict !== route(dd, dw)) failures_o++;
    end
    done_o = 1;
  end
endmodule
