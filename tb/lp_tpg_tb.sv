// lp_tpg_tb: self-checking testbench for the low power TPG.
//
// 8-bit instance (feedback from FF8 and FF1, seed 0100_1011): with test_en
// held high from the first clock the outputs must follow the published
// example T1, Ta, Tb, Tc, T2, ... one pattern per clock, T1 one clock after
// test_en rises, and the LFSR patterns repeat after 63 cycles (the period
// of x^8 + x + 1 from this seed). A second 8-bit instance with a primitive
// polynomial and the all-zeros correction must repeat after 256 cycles.
// 36-bit default instance: test_en with random pauses. The sequence of
// applied patterns is recorded and then checked against rules derived
// from the pattern definitions only:
//  - paused clocks leave the pattern unchanged;
//  - every fourth pattern is an LFSR pattern T;
//  - Ta, Tb, Tc are predicted from T(k), T(k+1) and R:
//      Ta = {F(k), merge(L(k), L(k+1), L(k) last bit)}
//      Tb = {F(k), L(k+1)}
//      Tc = {merge(F(k), F(k+1), L(k+1) last bit), L(k+1)}
//    with F/L the first/second half and merge(cur, nxt, r) = cur where
//    cur == nxt, else r;
//  - T(k+1) follows from T(k) and T(k-1) by the shift rules (the value
//    shifted into the second half is the last first-half bit of T(k-1));
//  - the transitions over the four steps equal the Hamming distance of
//    T(k) and T(k+1), and no step changes more than one half.
module lp_tpg_tb;
  import lp_tpg_pkg::*;

  logic clk = 1'b0, reset, te8, te36;
  int   checks = 0, failures = 0;

  logic [7:0]  pat8,  st8;
  logic [35:0] pat36, st36;
  phase_e      ph8, ph36;
  logic        lp8, lp36, r8, r36, so8, so36;

  lp_tpg #(.WIDTH(8), .TAPS(8'b1000_0001), .SEED(8'b0100_1011)) dut8 (
    .clk, .reset, .test_en(te8), .pattern(pat8), .phase(ph8), .lfsr_pat(lp8),
    .state(st8), .r(r8), .so(so8));

  // 8-bit, primitive x^8 + x^6 + x^5 + x^4 + 1 (FF8, FF6, FF5, FF4), with
  // the all-zeros correction: period 2^8 = 256 cycles
  logic [7:0] patz, stz;
  phase_e     phz;
  logic       lpz, rz, soz, tez;
  lp_tpg #(.WIDTH(8), .TAPS(8'b0001_1101), .SEED(8'b1000_0000), .ZERO_STATE(1'b1)) dutz (
    .clk, .reset, .test_en(tez), .pattern(patz), .phase(phz), .lfsr_pat(lpz),
    .state(stz), .r(rz), .so(soz));

  lp_tpg dut36 (
    .clk, .reset, .test_en(te36), .pattern(pat36), .phase(ph36), .lfsr_pat(lp36),
    .state(st36), .r(r36), .so(so36));

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
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

  localparam logic [7:0] GOLD [0:14] = '{
    8'b1010_1011, 8'b1010_1111, 8'b1010_0101, 8'b1111_0101, 8'b0101_0101,
    8'b0101_0111, 8'b0101_0010, 8'b0000_0010, 8'b0010_0010, 8'b0010_0000,
    8'b0010_1001, 8'b1011_1001, 8'b1001_1001, 8'b1001_1101, 8'b1001_0100
  };

  localparam int H = 18;
  typedef logic [35:0] p36_t;
  typedef logic [H-1:0] h_t;

  function automatic h_t merge(h_t cur, h_t nxt, logic r);
    h_t m;
    for (int i = 0; i < H; i++) m[i] = (cur[i] == nxt[i]) ? cur[i] : r;
    return m;
  endfunction

  function automatic h_t fh(p36_t p); return p[35:18]; endfunction
  function automatic h_t sh(p36_t p); return p[17:0];  endfunction

  p36_t seq[$];
  int   steps_changed_both = 0;

  initial begin
    te8 = 0; te36 = 0; tez = 0;
    reset = 1;
    repeat (2) @(posedge clk);
    #1 reset = 0;
    @(negedge clk);
    chk(pat8 == 8'b0100_1011 && ph8 == PH_IDLE, "8-bit seed in idle");
    seq.push_back(pat36);  // the seed

    // ---- 8-bit published example, test_en high continuously ----
    te8 = 1;
    for (int k = 0; k < 15; k++) begin
      @(posedge clk); #1;
      chk(pat8 == GOLD[k], $sformatf("8-bit pattern %0d: got %b", k, pat8));
      chk(lp8 == (k % 4 == 0), "8-bit lfsr_pat every fourth clock");
    end
    // the LFSR patterns repeat with the period of the ordinary LFSR with the
    // same taps: x^8 + x + 1 = (x^2 + x + 1)(x^6 + x^5 + x^3 + x^2 + 1)
    // gives 63 from this seed. T1 alone already reappears after 38 cycles
    // with a different holding flip-flop, so T1, Ta and Tb are compared.
    begin
      logic [7:0] p8 [$];
      int per;
      for (int k = 0; k < 15; k++) p8.push_back(GOLD[k]);
      for (int k = 15; k < 4 * 64 + 3; k++) begin
        @(posedge clk); #1;
        p8.push_back(pat8);
      end
      per = 0;
      for (int c = 1; c <= 64 && per == 0; c++)
        if (p8[4*c] == GOLD[0] && p8[4*c + 1] == GOLD[1] && p8[4*c + 2] == GOLD[2]) per = c;
      chk(per == 63, $sformatf("8-bit LFSR pattern period %0d, expected 63", per));
    end
    te8 = 0;

    // ---- all-zeros correction: period 256, flip-flops pass through zero ----
    begin
      logic [7:0] pz [$];
      int per, zeros;
      tez = 1;
      zeros = 0;
      for (int k = 0; k < 4 * 258; k++) begin
        @(posedge clk); #1;
        pz.push_back(patz);
        if (stz == 8'h00) zeros++;
      end
      tez = 0;
      per = 0;
      for (int c = 1; c <= 257 && per == 0; c++)
        if (pz[4*c] == pz[0] && pz[4*c + 1] == pz[1] && pz[4*c + 2] == pz[2]) per = c;
      chk(per == 256, $sformatf("all-zeros variant period %0d, expected 256", per));
      chk(zeros > 0, "all-zeros flip-flop state reached");
    end

    // ---- 36-bit with pauses ----
    for (int k = 0; k < 3000; k++) begin
      p36_t prev_pat;
      @(negedge clk);
      te36   = ($urandom_range(0, 5) != 0);
      prev_pat = pat36;
      @(posedge clk); #1;
      if (!te36) chk(pat36 == prev_pat, "pattern held while paused");
      else       seq.push_back(pat36);
    end

    // ---- offline checks on the 36-bit sequence ----
    // seq[0] is the seed, seq[1] = T1, seq[1+4k] = T(k+1)
    begin
      int   nT, maxstep, maxstep_lfsr;
      logic hold;
      nT = (seq.size() - 2) / 4;
      maxstep = 0;
      maxstep_lfsr = 0;
      hold = seq[0][35-(H-1)];  // FF18 of the seed
      for (int k = 0; k < nT; k++) begin
        p36_t t0, t1, ta, tb, tc, tn;
        logic fb;
        int   tr;
        t0 = seq[1 + 4*k];
        t1 = seq[5 + 4*k];
        ta = {fh(t0), merge(sh(t0), sh(t1), t0[0])};
        tb = {fh(t0), sh(t1)};
        tc = {merge(fh(t0), fh(t1), t1[0]), sh(t1)};
        tr = 0;
        chk(seq[2 + 4*k] == ta, $sformatf("Ta after T%0d", k + 1));
        chk(seq[3 + 4*k] == tb, $sformatf("Tb after T%0d", k + 1));
        chk(seq[4 + 4*k] == tc, $sformatf("Tc after T%0d", k + 1));
        // shift rules: second half takes the held bit, then the first half
        // shifts with feedback FF36 ^ FF25, both taken after the second half shift
        tn[17:0] = {hold, t0[17:1]};
        fb       = tn[0] ^ tn[11];
        tn[35:18] = {fb, t0[35:19]};
        chk(t1 == tn, $sformatf("T%0d from shift rules", k + 2));
        hold = t0[18];
        for (int s = 0; s < 4; s++) begin
          p36_t a, b;
          int   c;
          a = seq[1 + 4*k + s];
          b = seq[2 + 4*k + s];
          c = $countones(a ^ b);
          tr += c;
          if (c > maxstep) maxstep = c;
          if ((fh(a) != fh(b)) && (sh(a) != sh(b))) steps_changed_both++;
        end
        chk(tr == $countones(t0 ^ t1), "transitions equal LFSR Hamming distance");
        if ($countones(t0 ^ t1) > maxstep_lfsr) maxstep_lfsr = $countones(t0 ^ t1);
      end
      chk(steps_changed_both == 0, "only one half changes per clock");
      chk(maxstep <= H, "per-clock transitions bounded by half width");
      chk(nT > 100, "enough LFSR patterns simulated");
      $display("LFSR patterns %0d, peak transitions per clock: LP %0d, LFSR %0d",
               nT, maxstep, maxstep_lfsr);
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
