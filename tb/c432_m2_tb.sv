// c432_m2_tb: self-checking testbench for c432_m2, the bus B stage of c432.
// Random 9-bit inputs of varying density are applied; the expected outputs
// come from the rule written out below with loops over the channels.
module c432_m2_tb;
  import c432_pkg::*;

  int checks = 0, failures = 0;
  int n_hit = 0, n_miss = 0;

  chan_vec_t x1, b, e, x2;
  logic      pb;
  c432_m2 dut (.x1, .b, .e, .pb, .x2);

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

      b = rnd(d); e = rnd(100 - d / 2);
      // x1 is all ones (bus A idle) or one-hot (bus A acknowledged)
      x1 = ($urandom_range(0, 1) == 0) ? 9'h1ff : chan_vec_t'(1 << $urandom_range(0, 8));
      #1;
      begin
        int hi; logic epb; chan_vec_t ex;
        hi = -1;
        for (int i = 0; i < 9; i++) if (b[i] && e[i] && x1[i]) hi = i;
        epb = (hi >= 0);
        ex  = (hi >= 0) ? chan_vec_t'(1 << hi) : x1;
        if (epb) n_hit++; else n_miss++;
        checks++;
        if ({pb, x2} !== {epb, ex}) begin
          failures++;
          $display("FAIL x1=%b b=%b e=%b: got pb=%b x2=%b expected %b %b", x1, b, e, pb, x2, epb, ex);
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
