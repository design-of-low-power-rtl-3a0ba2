// lp_bist_top_tb: end-to-end test of the LP-TPG driving c432, at the
// default parameters (36-bit generator, 36 primary inputs).
//
// Runs 1000 enabled clocks (the vector count of a 60 us test at a 60 ns
// clock) with random pauses of test_en. On every clock it checks
//  - the c432 responses against a reference of the priority rules;
//  - that the applied pattern changed in one half only, or not at all when
//    test_en was low.
// Per four-pattern cycle it checks that Ta, Tb and Tc follow from the two
// surrounding LFSR patterns and R, and that the transitions of the cycle
// equal the Hamming distance of the LFSR patterns. Every mechanism (each
// pattern phase, injection of R = 0 and of R = 1, a pause, each bus
// acknowledge, a shared-channel acknowledge) is counted and must occur.
// It also reports the input transitions of the applied sequence against
// those of its LFSR patterns alone, and the toggles of the c432 outputs and
// internal buses for both, using a second c432 instance.
module lp_bist_top_tb;
  import lp_tpg_pkg::*;

  logic        clk = 1'b0, reset, test_en;
  logic [35:0] pattern, lfsr_state;
  phase_e      phase;
  logic        lfsr_pat, so, pa, pb, pc;
  logic [3:0]  chan;

  lp_bist_top dut (.clk, .reset, .test_en, .pattern, .phase, .lfsr_pat,
                   .lfsr_state, .so, .pa, .pb, .pc, .chan);

  always #30 clk = ~clk;  // 60 ns clock

  int checks = 0, failures = 0;
  int n_phase [0:3];
  int n_inj_r0 = 0, n_inj_r1 = 0, n_pause = 0;
  int n_pa = 0, n_pb = 0, n_pc = 0, n_shared = 0;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // reference c432 response for a 36-bit pattern {A, B, C, E}
  function automatic logic [6:0] c432_ref(logic [35:0] p);
    logic [8:0] bus [3];
    logic [8:0] en;
    for (int bi = 0; bi < 3; bi++) bus[bi] = p[35 - 9*bi -: 9];
    en = p[8:0];
    for (int bi = 0; bi < 3; bi++)
      for (int ch = 8; ch >= 0; ch--)
        if (bus[bi][ch] && en[ch])
          return {bi == 0 && bus[0][ch], bi <= 1 && bus[1][ch] && en[ch],
                  bus[2][ch] && en[ch], 4'(ch)};
    return 7'd0;
  endfunction

  typedef logic [17:0] h_t;
  function automatic h_t merge(h_t cur, h_t nxt, logic r);
    h_t m;
    for (int i = 0; i < 18; i++) m[i] = (cur[i] == nxt[i]) ? cur[i] : r;
    return m;
  endfunction

  logic [35:0] seq[$];

  // a second c432 for comparing the switching caused by the applied
  // sequence with that of its LFSR patterns applied back to back
  logic [8:0]  ca, cb, cc, ce;
  logic        cpa, cpb, cpc;
  logic [3:0]  cchan;
  c432 cmp_cut (.a(ca), .b(cb), .c(cc), .e(ce), .pa(cpa), .pb(cpb), .pc(cpc), .chan(cchan));

  // toggles of the c432 outputs and internal buses X1, X2, I over a sequence
  task automatic cut_toggles(input logic [35:0] ps [$], output int tog);
    logic [33:0] prev_n, now_n;
    tog = 0;
    for (int k = 0; k < ps.size(); k++) begin
      {ca, cb, cc, ce} = ps[k];
      #1;
      now_n = {cpa, cpb, cpc, cchan, cmp_cut.x1, cmp_cut.x2, cmp_cut.i};
      if (k > 0) tog += $countones(now_n ^ prev_n);
      prev_n = now_n;
    end
  endtask

  initial begin
    int enabled;
    logic [35:0] prev;
    test_en = 0;
    reset = 1;
    repeat (2) @(posedge clk);
    #1 reset = 0;
    seq.push_back(pattern);
    enabled = 0;
    while (enabled < 1000) begin
      @(negedge clk);
      test_en = ($urandom_range(0, 9) != 0);
      prev = pattern;
      @(posedge clk); #1;
      if (!test_en) begin
        n_pause++;
        chk(pattern == prev, "pattern held while paused");
      end else begin
        enabled++;
        seq.push_back(pattern);
        chk(!(pattern[35:18] != prev[35:18] && pattern[17:0] != prev[17:0]),
            "one half changes per clock");
      end
      chk({pa, pb, pc, chan} == c432_ref(pattern), $sformatf("c432 response to %h", pattern));
      if (pa) n_pa++;
      if (pb) n_pb++;
      if (pc) n_pc++;
      if (int'(pa) + int'(pb) + int'(pc) > 1) n_shared++;
      if (phase != PH_IDLE) n_phase[int'(phase) - 1]++;
    end

    // per-cycle checks; seq[1 + 4k] is LFSR pattern k+1
    begin
      int nT, tr_lp, tr_lfsr, peak_lp, peak_lfsr;
      nT = (seq.size() - 2) / 4;
      tr_lp = 0; tr_lfsr = 0; peak_lp = 0; peak_lfsr = 0;
      for (int k = 0; k < nT; k++) begin
        logic [35:0] t0, t1;
        h_t          inj_a, inj_c;
        int          tr;
        t0 = seq[1 + 4*k];
        t1 = seq[5 + 4*k];
        inj_a = merge(t0[17:0], t1[17:0], t0[0]);
        inj_c = merge(t0[35:18], t1[35:18], t1[0]);
        chk(seq[2 + 4*k] == {t0[35:18], inj_a}, "Ta");
        chk(seq[3 + 4*k] == {t0[35:18], t1[17:0]}, "Tb");
        chk(seq[4 + 4*k] == {inj_c, t1[17:0]}, "Tc");
        // count bits where R was substituted, by the value of R
        if (t0[17:0] != t1[17:0]) begin
          if (t0[0]) n_inj_r1++; else n_inj_r0++;
        end
        if (t0[35:18] != t1[35:18]) begin
          if (t1[0]) n_inj_r1++; else n_inj_r0++;
        end
        tr = 0;
        for (int s = 0; s < 4; s++) begin
          int c;
          c = $countones(seq[1 + 4*k + s] ^ seq[2 + 4*k + s]);
          tr += c;
          if (c > peak_lp) peak_lp = c;
        end
        chk(tr == $countones(t0 ^ t1), "cycle transitions equal LFSR distance");
        tr_lp   += tr;
        tr_lfsr += $countones(t0 ^ t1);
        if ($countones(t0 ^ t1) > peak_lfsr) peak_lfsr = $countones(t0 ^ t1);
      end
      $display("LFSR patterns %0d; input transitions: applied sequence %0d, LFSR patterns alone %0d",
               nT, tr_lp, tr_lfsr);
      $display("peak input transitions per clock: applied %0d, LFSR patterns back to back %0d",
               peak_lp, peak_lfsr);
      chk(peak_lp <= 18, "peak per clock at most half the inputs");
      begin
        logic [35:0] tonly [$];
        int          tog_lp, tog_t;
        for (int k = 0; k <= nT; k++) tonly.push_back(seq[1 + 4*k]);
        cut_toggles(seq, tog_lp);
        cut_toggles(tonly, tog_t);
        $display("c432 output and internal-bus toggles per applied pattern: LP sequence %0d/%0d, LFSR patterns back to back %0d/%0d",
                 tog_lp, seq.size() - 1, tog_t, tonly.size() - 1);
        chk(tog_lp > 0 && tog_t > 0, "circuit under test switched");
      end
    end

    $display("phases T=%0d Ta=%0d Tb=%0d Tc=%0d, R injected as 0: %0d, as 1: %0d, pauses %0d",
             n_phase[0], n_phase[1], n_phase[2], n_phase[3], n_inj_r0, n_inj_r1, n_pause);
    $display("acknowledges PA=%0d PB=%0d PC=%0d shared-channel=%0d", n_pa, n_pb, n_pc, n_shared);
    chk(n_phase[0] > 0 && n_phase[1] > 0 && n_phase[2] > 0 && n_phase[3] > 0, "every phase occurred");
    chk(n_inj_r0 > 0, "R = 0 injected");
    chk(n_inj_r1 > 0, "R = 1 injected");
    chk(n_pause > 0, "test_en pause occurred");
    chk(n_pa > 0 && n_pb > 0 && n_pc > 0, "every bus acknowledged");
    chk(n_shared > 0, "shared-channel acknowledge occurred");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
