// lp_tpg_width_run: drives one lp_tpg of a given width with test_en high
// for NCLK clocks and checks the applied sequence: every fourth pattern is
// an LFSR pattern; Ta, Tb and Tc follow from the surrounding LFSR patterns
// and R; the four steps of a cycle change as many bits as the Hamming
// distance of the LFSR patterns; each clock changes one half only. Used by
// lp_tpg_workload_tb for the input counts of the benchmark circuits.
module lp_tpg_width_run #(
  parameter int unsigned      WIDTH = 36,
  parameter int unsigned      HALF  = WIDTH / 2,
  parameter logic [WIDTH-1:0] TAPS  = WIDTH'(1),
  parameter int unsigned      NCLK  = 1480
) (
  input  logic clk,
  input  logic reset,
  output logic done,
  output int   checks,
  output int   failures
);
  import lp_tpg_pkg::*;

  localparam int unsigned LOW = WIDTH - HALF;
  typedef logic [WIDTH-1:0] p_t;

  logic       test_en;
  p_t         pattern, state;
  phase_e     phase;
  logic       lfsr_pat, r, so;

  lp_tpg #(.WIDTH(WIDTH), .HALF(HALF), .TAPS(TAPS), .SEED(~p_t'(0) ^ p_t'(32'h5A5A_0F0F))) dut (
    .clk, .reset, .test_en, .pattern, .phase, .lfsr_pat, .state, .r, .so);

  function automatic p_t merge(p_t cur, p_t nxt, logic rv);
    p_t m;
    for (int i = 0; i < WIDTH; i++) m[i] = (cur[i] == nxt[i]) ? cur[i] : rv;
    return m;
  endfunction

  p_t seq[$];
  p_t lo_mask;
  assign lo_mask = (p_t'(1) << LOW) - 1;

  initial begin
    int peak_lp, peak_lfsr, tr_lp;
    checks = 0; failures = 0; done = 0; test_en = 0;
    @(negedge reset);
    @(negedge clk);
    test_en = 1;
    for (int k = 0; k < NCLK; k++) begin
      @(posedge clk); #1;
      seq.push_back(pattern);
      checks++;
      if (lfsr_pat != (k % 4 == 0)) failures++;
    end
    peak_lp = 0; peak_lfsr = 0; tr_lp = 0;
    for (int k = 0; 4*k + 4 < seq.size(); k++) begin
      p_t t0, t1, ea, eb, ec;
      int tr;
      t0 = seq[4*k];
      t1 = seq[4*k + 4];
      ea = (t0 & ~lo_mask) | (merge(t0, t1, t0[0]) & lo_mask);
      eb = (t0 & ~lo_mask) | (t1 & lo_mask);
      ec = (merge(t0, t1, t1[0]) & ~lo_mask) | (t1 & lo_mask);
      checks += 3;
      if (seq[4*k + 1] != ea) failures++;
      if (seq[4*k + 2] != eb) failures++;
      if (seq[4*k + 3] != ec) failures++;
      tr = 0;
      for (int s = 0; s < 4; s++) begin
        p_t d;
        d = seq[4*k + s] ^ seq[4*k + s + 1];
        tr += $countones(d);
        if ($countones(d) > peak_lp) peak_lp = $countones(d);
        checks++;
        if ((d & lo_mask) != 0 && (d & ~lo_mask) != 0) failures++;
      end
      checks++;
      if (tr != $countones(t0 ^ t1)) failures++;
      tr_lp += tr;
      if ($countones(t0 ^ t1) > peak_lfsr) peak_lfsr = $countones(t0 ^ t1);
    end
    $display("width %0d: %0d patterns applied (%0d LFSR patterns), %0d input transitions, peak per clock %0d vs %0d for LFSR patterns back to back",
             WIDTH, NCLK, (NCLK + 3) / 4, tr_lp, peak_lp, peak_lfsr);
    done = 1;
  end
endmodule
