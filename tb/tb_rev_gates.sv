// tb_rev_gates: exhaustive test of the eight reversible gate modules.
// For every input combination each gate's outputs are compared with its
// equations, and every gate is checked to be reversible: no two input
// combinations give the same output vector. Prints TB_RESULT; a watchdog ends
// the run with a failure if it does not finish in time.
module tb_rev_gates;
  int checks = 0;
  int failures = 0;

  logic [3:0] x;
  logic fg_p, fg_q, f2g_p, f2g_q, f2g_r, tg_p, tg_q, tg_r, frg_p, frg_q, frg_r;
  logic pg_p, pg_q, pg_r, nft_p, nft_q, nft_r;
  logic hng_p, hng_q, hng_r, hng_s, mig_p, mig_q, mig_r, mig_s;

  rev_fg  u_fg  (.a(x[0]), .b(x[1]), .p(fg_p), .q(fg_q));
  rev_f2g u_f2g (.a(x[0]), .b(x[1]), .c(x[2]), .p(f2g_p), .q(f2g_q), .r(f2g_r));
  rev_tg  u_tg  (.a(x[0]), .b(x[1]), .c(x[2]), .p(tg_p), .q(tg_q), .r(tg_r));
  rev_frg u_frg (.a(x[0]), .b(x[1]), .c(x[2]), .p(frg_p), .q(frg_q), .r(frg_r));
  rev_pg  u_pg  (.a(x[0]), .b(x[1]), .c(x[2]), .p(pg_p), .q(pg_q), .r(pg_r));
  rev_nft u_nft (.a(x[0]), .b(x[1]), .c(x[2]), .p(nft_p), .q(nft_q), .r(nft_r));
  rev_hng u_hng (.a(x[0]), .b(x[1]), .c(x[2]), .d(x[3]), .p(hng_p), .q(hng_q), .r(hng_r), .s(hng_s));
  rev_mig u_mig (.a(x[0]), .b(x[1]), .c(x[2]), .d(x[3]), .p(mig_p), .q(mig_q), .r(mig_r), .s(mig_s));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  initial begin : watchdog
    #1ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit [15:0] seen [8];
    for (int g = 0; g < 8; g++) seen[g] = '0;
    for (int i = 0; i < 16; i++) begin
      logic a, b, c, d;
      x = 4'(i);
      {d, c, b, a} = x;
      #1;
      // equations
      check({fg_p, fg_q} == {a, a ^ b}, "Feynman");
      check({f2g_p, f2g_q, f2g_r} == {a, a ^ b, a ^ c}, "double Feynman");
      check({tg_p, tg_q, tg_r} == {a, b, (a & b) ^ c}, "Toffoli");
      check({frg_p, frg_q, frg_r} == (a ? {a, c, b} : {a, b, c}), "Fredkin");
      check({pg_p, pg_q, pg_r} == {a, a ^ b, (a & b) ^ c}, "Peres");
      check({nft_p, nft_q, nft_r} == {a ^ b, (!b & c) ^ (a & !c), (b & c) ^ (a & !c)}, "NFT");
      check({hng_p, hng_q, hng_r, hng_s} == {a, b, a ^ b ^ c, ((a ^ b) & c) ^ (a & b) ^ d}, "HNG");
      check({mig_p, mig_q, mig_r, mig_s} == {a, a ^ b, (a & b) ^ c, (a & !b) ^ d}, "MIG");
      // output vectors, for the reversibility check
      if (i < 4)  seen[0][{fg_p, fg_q}] = 1'b1;
      if (i < 8) begin
        seen[1][{f2g_p, f2g_q, f2g_r}] = 1'b1;
        seen[2][{tg_p, tg_q, tg_r}]    = 1'b1;
        seen[3][{frg_p, frg_q, frg_r}] = 1'b1;
        seen[4][{pg_p, pg_q, pg_r}]    = 1'b1;
        seen[5][{nft_p, nft_q, nft_r}] = 1'b1;
      end
      seen[6][{hng_p, hng_q, hng_r, hng_s}] = 1'b1;
      seen[7][{mig_p, mig_q, mig_r, mig_s}] = 1'b1;
    end
    check($countones(seen[0]) == 4, "Feynman not reversible");
    for (int g = 1; g < 6; g++) check($countones(seen[g]) == 8, $sformatf("3-input gate %0d not reversible", g));
    check($countones(seen[6]) == 16, "HNG not reversible");
    check($countones(seen[7]) == 16, "MIG not reversible");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
