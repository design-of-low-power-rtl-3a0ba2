// lp_tpg_ctrl_tb: self-checking testbench for the pattern generation
// controller. Drives test_en with random pauses and checks en1, en2, sel1,
// sel2 and the phase against the four-pattern control table, tracked by a
// counter kept in this testbench. Also checks that nothing is enabled while
// test_en is low and that one pattern is produced per enabled clock.
module lp_tpg_ctrl_tb;
  import lp_tpg_pkg::*;

  logic   clk = 1'b0, reset, test_en;
  logic   en1, en2, sel1, sel2, lfsr_pat;
  phase_e phase;
  int     checks = 0, failures = 0;
  int     seen [0:3];
  int     paused = 0;

  lp_tpg_ctrl dut (.clk, .reset, .test_en, .en1, .en2, .sel1, .sel2, .phase, .lfsr_pat);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // expected {sel1, sel2} of the pattern shown, index 0 = T .. 3 = Tc
  localparam logic [1:0] SEL [0:3] = '{2'b11, 2'b10, 2'b11, 2'b01};
  // expected {en1, en2} for the edge that produces pattern index n
  localparam logic [1:0] EN  [0:3] = '{2'b10, 2'b00, 2'b01, 2'b00};

  task automatic chk(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  int ph;  // -1 idle, 0..3 = T, Ta, Tb, Tc
  initial begin
    test_en = 0;
    reset   = 1;
    repeat (2) @(posedge clk);
    #1 reset = 0;
    ph = -1;
    for (int k = 0; k < 3000; k++) begin
      @(negedge clk);
      test_en = ($urandom_range(0, 7) != 0);
      #1;
      // selects of the pattern now shown
      if (ph < 0) begin
        chk(sel1 && sel2 && phase == PH_IDLE && !lfsr_pat, "idle outputs");
      end else begin
        chk({sel1, sel2} == SEL[ph], $sformatf("sel in phase %0d", ph));
        chk(phase == phase_e'(ph + 1), "phase encoding");
        chk(lfsr_pat == (ph == 0), "lfsr_pat");
      end
      // enables for the coming edge
      if (test_en) chk({en1, en2} == EN[(ph + 1) % 4], "enables");
      else begin
        chk({en1, en2} == 2'b00, "no enable while paused");
        paused++;
      end
      @(posedge clk);
      if (test_en) begin
        ph = (ph + 1) % 4;
        seen[ph]++;
      end
    end
    for (int i = 0; i < 4; i++) chk(seen[i] > 0, "every phase reached");
    chk(paused > 0, "pause exercised");
    // one pattern per enabled clock: the four phases occur equally often
    chk(seen[0] - seen[3] inside {0, 1}, "T and Tc counts");
    $display("phases T=%0d Ta=%0d Tb=%0d Tc=%0d paused=%0d", seen[0], seen[1], seen[2], seen[3], paused);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
