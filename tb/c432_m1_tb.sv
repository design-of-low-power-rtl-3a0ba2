// c432_m1_tb: self-checking testbench for c432_m1, the bus A stage of c432.
// Random 9-bit inputs of varying density are applied; the expected outputs
// come from the rule written out below with loops over the channels.
module c432_m1_tb;
  import c432_pkg::*;

  int checks = 0, failures = 0;
  int n_hit = 0, n_miss = 0;

  chan_vec_t a, e, x1;
  logic      pa;
  c432_m1 dut (.a, .e, .pa, .x1);

  logic clk = 1'b0;
  always #5 clk = ~clk;
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic chan_vec_t rnd(int pct);
    chan_vec_t v;
    for (int i = 0; i < 9; i++) v[i] = ($urandom_range(0, 99) < pct);
    return v;
  endfunction

  initial begin
    for (int k = 0; k < 20000; k++) begin
      int d;
      d = $urandom_range(2, 90);

      a = rnd(d / 3); e = rnd(100 - d / 2);
      #1;
      begin
        int hi; logic epa; chan_vec_t ex;
        hi = -1;
        for (int i = 0; i < 9; i++) if (a[i] && e[i]) hi = i;
        epa = (hi >= 0);
        ex  = (hi >= 0) ? chan_vec_t'(1 << hi) : 9'h1ff;
        if (epa) n_hit++; else n_miss++;
        checks++;
        if ({pa, x1} !== {epa, ex}) begin
          failures++;
          $display("FAIL a=%b e=%b: got pa=%b x1=%b expected %b %b", a, e, pa, x1, epa, ex);
        end
      end
    end
    checks++;
    if (n_hit == 0 || n_miss == 0) begin
      failures++;
      $display("FAIL both outcomes must occur");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
