// lp_tpg_workload_tb: runs the LP-TPG at the primary input counts of the
// three benchmark circuits: 36 (c432), 41 (c499) and 60 (c880), each for
// 1480 patterns (370 LFSR patterns, the c432 test length). The 36-bit
// instance uses the default taps; the 41- and 60-bit instances use
// x^41 + x^38 + 1 and x^60 + x^59 + 1 (feedback from FF41/FF38 and
// FF60/FF59), widely tabulated maximal-length choices. Each instance checks
// the structure of its own sequence (see lp_tpg_width_run).
module lp_tpg_workload_tb;

  logic clk = 1'b0, reset;
  always #5 clk = ~clk;

  logic d36, d41, d60;
  int   c36, c41, c60, f36, f41, f60;

  lp_tpg_width_run #(.WIDTH(36)) u36 (
    .clk, .reset, .done(d36), .checks(c36), .failures(f36));
  lp_tpg_width_run #(.WIDTH(41), .TAPS(41'h9)) u41 (
    .clk, .reset, .done(d41), .checks(c41), .failures(f41));
  lp_tpg_width_run #(.WIDTH(60), .TAPS(60'h3)) u60 (
    .clk, .reset, .done(d60), .checks(c60), .failures(f60));

  initial begin
    repeat (20000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", c36 + c41 + c60, f36 + f41 + f60 + 1);
    $finish;
  end

  initial begin
    reset = 1;
    repeat (2) @(posedge clk);
    #1 reset = 0;
    wait (d36 && d41 && d60);
    $display("TB_RESULT checks=%0d failures=%0d", c36 + c41 + c60, f36 + f41 + f60);
    $finish;
  end
endmodule
