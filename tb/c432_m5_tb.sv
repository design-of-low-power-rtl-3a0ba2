// c432_m5_tb: self-checking testbench for c432_m5, the priority encoder of c432.
// Random 9-bit inputs of varying density are applied; the expected outputs
// come from the rule written out below with loops over the channels.
module c432_m5_tb;
  import c432_pkg::*;

  int checks = 0, failures = 0;
  int n_hit = 0, n_miss = 0;

  chan_vec_t  i;
  logic [3:0] chan;
  c432_m5 dut (.i, .chan);

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

      i = rnd(d / 4);
      #1;
      begin
        logic [3:0] ec;
        ec = 0;
        for (int k2 = 0; k2 < 9; k2++) if (i[k2]) ec = 4'(k2);
        if (i != 0) n_hit++; else n_miss++;
        checks++;
        if (chan !== ec) begin
          failures++;
          $display("FAIL i=%b: got chan=%0d expected %0d", i, chan, ec);
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
