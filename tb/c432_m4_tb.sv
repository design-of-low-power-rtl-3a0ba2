// c432_m4_tb: self-checking testbench for c432_m4, the channel selection of c432.
// Random 9-bit inputs of varying density are applied; the expected outputs
// come from the rule written out below with loops over the channels.
module c432_m4_tb;
  import c432_pkg::*;

  int checks = 0, failures = 0;
  int n_hit = 0, n_miss = 0;

  chan_vec_t a, b, c, e, i;
  logic      pa, pb, pc;
  c432_m4 dut (.pa, .pb, .pc, .e, .a, .b, .c, .i);

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

      a = rnd(d); b = rnd(d); c = rnd(d); e = rnd(100 - d / 2);
      {pa, pb, pc} = 3'($urandom);
      #1;
      begin
        chan_vec_t ei;
        for (int k2 = 0; k2 < 9; k2++)
          ei[k2] = e[k2] && (pa ? a[k2] : pb ? b[k2] : pc ? c[k2] : 1'b0);
        if (ei != 0) n_hit++; else n_miss++;
        checks++;
        if (i !== ei) begin
          failures++;
          $display("FAIL pa%b pb%b pc%b: got i=%b expected %b", pa, pb, pc, i, ei);
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
