// c432_m3_tb: self-checking testbench for c432_m3, the bus C stage of c432.
// Random 9-bit inputs of varying density are applied; the expected outputs
// come from the rule written out below with loops over the channels.
module c432_m3_tb;
  import c432_pkg::*;

  int checks = 0, failures = 0;
  int n_hit = 0, n_miss = 0;

  chan_vec_t x1, x2, c, e;
  logic      pc;
  c432_m3 dut (.x1, .x2, .c, .e, .pc);

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

      c = rnd(d); e = rnd(100 - d / 2);
      x1 = ($urandom_range(0, 1) == 0) ? 9'h1ff : chan_vec_t'(1 << $urandom_range(0, 8));
      x2 = ($urandom_range(0, 1) == 0) ? x1 : chan_vec_t'(1 << $urandom_range(0, 8));
      #1;
      begin
        logic epc;
        epc = 0;
        for (int i = 0; i < 9; i++) if (c[i] && e[i] && x1[i] && x2[i]) epc = 1;
        if (epc) n_hit++; else n_miss++;
        checks++;
        if (pc !== epc) begin
          failures++;
          $display("FAIL x1=%b x2=%b c=%b e=%b: got pc=%b", x1, x2, c, e, pc);
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
