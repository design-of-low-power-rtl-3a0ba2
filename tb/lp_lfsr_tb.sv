// lp_lfsr_tb: self-checking testbench for the LP-LFSR datapath.
//
// Part 1 drives an 8-bit instance (feedback from FF8 and FF1, seed
// 0100_1011) with the control values of the four-pattern cycle and compares
// its outputs with the published example vectors T1, Ta, Tb, Tc, T2 and the
// ten patterns that follow them.
// Part 2 drives the default 36-bit instance with random enables and selects
// and compares every output with a bit-level model of the shift rules kept
// in this testbench.
module lp_lfsr_tb;

  localparam int unsigned N8  = 8;
  localparam int unsigned N36 = 36;

  logic clk = 1'b0;
  logic reset;
  int   checks = 0, failures = 0;

  // ---------------- 8-bit example instance ----------------
  logic          en1_a, en2_a, sel1_a, sel2_a;
  logic [N8-1:0] pat_a, st_a;
  logic          r_a, so_a;

  lp_lfsr #(.WIDTH(N8), .HALF(4), .TAPS(8'b1000_0001), .SEED(8'b0100_1011)) dut_a (
    .clk, .reset, .en1(en1_a), .en2(en2_a), .sel1(sel1_a), .sel2(sel2_a),
    .pattern(pat_a), .state(st_a), .r(r_a), .so(so_a)
  );

  // ---------------- 36-bit default instance ----------------
  logic           en1_b, en2_b, sel1_b, sel2_b;
  logic [N36-1:0] pat_b, st_b;
  logic           r_b, so_b;

  lp_lfsr dut_b (
    .clk, .reset, .en1(en1_b), .en2(en2_b), .sel1(sel1_b), .sel2(sel2_b),
    .pattern(pat_b), .state(st_b), .r(r_b), .so(so_b)
  );

  always #5 clk = ~clk;

  // watchdog
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check8(input logic [7:0] exp, input string what);
    checks++;
    if (pat_a !== exp) begin
      failures++;
      $display("FAIL %s: got %b_%b expected %b_%b", what,
               pat_a[7:4], pat_a[3:0], exp[7:4], exp[3:0]);
    end
  endtask

  // ---------------- bit-level reference for the 36-bit instance ----------
  // ff[1..N] are FF1..FFn, hold is the flip-flop between the halves
  bit ff [1:N36];
  bit hold;
  localparam int unsigned H36 = N36 / 2;
  localparam logic [N36-1:0] TAPS36 = 36'h0_0000_0801;

  function automatic bit ref_next(int i);
    bit f;
    if (i == 1) begin
      f = 0;
      for (int k = 1; k <= N36; k++)
        if (TAPS36[N36-k]) f ^= ff[k];
      return f;
    end
    if (i == H36 + 1) return hold;
    return ff[i-1];
  endfunction

  function automatic logic [N36-1:0] ref_out(bit s1, bit s2);
    logic [N36-1:0] o;
    for (int i = 1; i <= N36; i++) begin
      bit sel = (i <= H36) ? s1 : s2;
      bit nx  = ref_next(i);
      if (sel)              o[N36-i] = ff[i];
      else if (nx == ff[i]) o[N36-i] = ff[i];
      else                  o[N36-i] = ff[N36];
    end
    return o;
  endfunction

  task automatic ref_clock(bit e1, bit e2);
    bit nff [1:N36];
    bit nhold;
    nff   = ff;
    nhold = hold;
    if (e1) begin
      for (int i = 1; i <= H36; i++) nff[i] = ref_next(i);
      nhold = ff[H36];
    end
    if (e2)
      for (int i = H36 + 1; i <= N36; i++) nff[i] = ref_next(i);
    ff   = nff;
    hold = nhold;
  endtask

  // published example: T1 Ta Tb Tc T2 and the patterns that follow
  localparam logic [7:0] GOLD [0:14] = '{
    8'b1010_1011, 8'b1010_1111, 8'b1010_0101, 8'b1111_0101, 8'b0101_0101,
    8'b0101_0111, 8'b0101_0010, 8'b0000_0010, 8'b0010_0010, 8'b0010_0000,
    8'b0010_1001, 8'b1011_1001, 8'b1001_1001, 8'b1001_1101, 8'b1001_0100
  };
  // control values per pattern: {en1, en2, sel1, sel2}
  localparam logic [3:0] CTRL [0:3] = '{4'b1011, 4'b0010, 4'b0111, 4'b0001};

  initial begin
    en1_a = 0; en2_a = 0; sel1_a = 1; sel2_a = 1;
    en1_b = 0; en2_b = 0; sel1_b = 1; sel2_b = 1;
    reset = 1;
    repeat (2) @(posedge clk);
    #1 reset = 0;

    // seed visible after reset
    @(negedge clk);
    check8(8'b0100_1011, "seed");
    checks++;
    if (st_b !== 36'h4_B4B4_B4B4) begin failures++; $display("FAIL 36-bit seed"); end

    // ---- part 1: the published example ----
    for (int k = 0; k < 15; k++) begin
      {en1_a, en2_a} = CTRL[k % 4][3:2];
      @(posedge clk);
      #1 {en1_a, en2_a} = 2'b00;
      {sel1_a, sel2_a} = CTRL[k % 4][1:0];
      #1 check8(GOLD[k], $sformatf("pattern %0d", k));
      // R is the last flip-flop
      checks++;
      if (r_a !== st_a[0] || so_a !== st_a[0]) begin failures++; $display("FAIL R"); end
    end

    // ---- part 2: random control of the 36-bit instance ----
    for (int i = 1; i <= N36; i++) ff[i] = st_b[N36-i];
    hold = 0;
    // the holding flop is unknown to the model until the first en1: do one
    ref_clock(1, 0);
    @(negedge clk); en1_b = 1; @(posedge clk); #1 en1_b = 0;
    for (int k = 0; k < 4000; k++) begin
      @(negedge clk);
      en1_b  = 1'($urandom);
      en2_b  = 1'($urandom);
      sel1_b = 1'($urandom);
      sel2_b = 1'($urandom);
      #1;
      checks++;
      if (pat_b !== ref_out(sel1_b, sel2_b)) begin
        failures++;
        if (failures < 10)
          $display("FAIL 36-bit step %0d sel=%b%b: got %h expected %h", k, sel1_b,
                   sel2_b, pat_b, ref_out(sel1_b, sel2_b));
      end
      @(posedge clk);
      ref_clock(en1_b, en2_b);
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
