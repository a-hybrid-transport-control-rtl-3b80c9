// synzen_table1_tb: runs the synZEN core at the six split-network sizes of the
// published synthesis experiments (units / buses / destinations per bus /
// sources per bus): 8/16/4/2, 8/16/8/4, 8/16/11/6, 12/24/6/3, 12/24/8/4 and
// 12/24/12/6. Each size runs random programs against the cycle-accurate model
// in synzen_core_rand_check; the test fails if any comparison fails, if a
// size never moved data over its network, or if it does not finish in time.
module synzen_table1_tb;
  localparam int N = 6;
  logic done [N];
  int   chk [N], fail [N], xfer [N];
  int   checks = 0, failures = 0;

  synzen_core_rand_check #(.NUNIT(8),  .NBUS(16), .SPB(2), .DPB(4))  c1 (done[0], chk[0], fail[0], xfer[0]);
  synzen_core_rand_check #(.NUNIT(8),  .NBUS(16), .SPB(4), .DPB(8))  c2 (done[1], chk[1], fail[1], xfer[1]);
  synzen_core_rand_check #(.NUNIT(8),  .NBUS(16), .SPB(6), .DPB(11)) c3 (done[2], chk[2], fail[2], xfer[2]);
  synzen_core_rand_check #(.NUNIT(12), .NBUS(24), .SPB(3), .DPB(6))  c4 (done[3], chk[3], fail[3], xfer[3]);
  synzen_core_rand_check #(.NUNIT(12), .NBUS(24), .SPB(4), .DPB(8))  c5 (done[4], chk[4], fail[4], xfer[4]);
  synzen_core_rand_check #(.NUNIT(12), .NBUS(24), .SPB(6), .DPB(12)) c6 (done[5], chk[5], fail[5], xfer[5]);

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wait (done[0] && done[1] && done[2] && done[3] && done[4] && done[5]);
    for (int i = 0; i < N; i++) begin
      $display("case %0d: checks=%0d failures=%0d network transfers=%0d", i + 1, chk[i], fail[i], xfer[i]);
      checks += chk[i];
      failures += fail[i];
      if (xfer[i] == 0) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
