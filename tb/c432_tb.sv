// c432_tb: self-checking testbench for the 27-channel interrupt controller.
//
// The reference below applies the priority rules directly: find the
// highest-priority bus (A, then B, then C) with an enabled request, take its
// highest enabled requesting channel, and acknowledge every bus that has an
// enabled request on that channel. Directed cases (including the example
// A4, A2, B6, C4 -> PA, PC, channel 4) are followed by random vectors of
// varying density, and each kind of result is counted.
module c432_tb;
  import c432_pkg::*;

  chan_vec_t  a, b, c, e;
  logic       pa, pb, pc;
  logic [3:0] chan;
  int         checks = 0, failures = 0;
  int         n_a = 0, n_b = 0, n_c = 0, n_none = 0, n_shared = 0;

  c432 dut (.a, .b, .c, .e, .pa, .pb, .pc, .chan);

  logic clk = 1'b0;
  always #5 clk = ~clk;
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_ref();
    logic [8:0] bus [3];
    int         win_bus, win_ch;
    logic       epa, epb, epc;
    logic [3:0] ech;
    bus[0] = a; bus[1] = b; bus[2] = c;
    win_bus = -1; win_ch = 0;
    for (int bi = 0; bi < 3 && win_bus < 0; bi++)
      for (int ch = 8; ch >= 0; ch--)
        if (bus[bi][ch] && e[ch]) begin
          win_bus = bi;
          win_ch  = ch;
          break;
        end
    if (win_bus < 0) begin
      {epa, epb, epc} = 3'b000;
      ech = 0;
      n_none++;
    end else begin
      epa = a[win_ch] && e[win_ch] && win_bus == 0;
      epb = b[win_ch] && e[win_ch] && win_bus <= 1;
      epc = c[win_ch] && e[win_ch];
      ech = 4'(win_ch);
      if (win_bus == 0) n_a++; else if (win_bus == 1) n_b++; else n_c++;
      if (int'(epa) + int'(epb) + int'(epc) > 1) n_shared++;
    end
    #1;
    checks++;
    if ({pa, pb, pc, chan} !== {epa, epb, epc, ech}) begin
      failures++;
      if (failures < 20)
        $display("FAIL a=%b b=%b c=%b e=%b: got pa%b pb%b pc%b chan%0d, expected pa%b pb%b pc%b chan%0d",
                 a, b, c, e, pa, pb, pc, chan, epa, epb, epc, ech);
    end
  endtask

  function automatic chan_vec_t rnd(int pct);
    chan_vec_t v;
    for (int i = 0; i < 9; i++) v[i] = ($urandom_range(0, 99) < pct);
    return v;
  endfunction

  initial begin
    // the example from the description
    a = 9'b0_0001_0100; b = 9'b0_0100_0000; c = 9'b0_0001_0000; e = '1;
    expect_ref();
    checks++;
    if (!(pa && !pb && pc && chan == 4)) begin
      failures++;
      $display("FAIL worked example");
    end
    // disabled channel is ignored
    a = 9'b1_0000_0000; b = 9'b0_0000_0001; c = '0; e = 9'b0_1111_1111;
    expect_ref();
    // nothing pending
    a = '0; b = '0; c = '0; e = '1;
    expect_ref();
    // single requests on every channel of every bus
    for (int bi = 0; bi < 3; bi++)
      for (int ch = 0; ch < 9; ch++) begin
        a = '0; b = '0; c = '0; e = '1;
        case (bi)
          0: a[ch] = 1'b1;
          1: b[ch] = 1'b1;
          default: c[ch] = 1'b1;
        endcase
        expect_ref();
      end
    // random vectors of varying density
    for (int k = 0; k < 20000; k++) begin
      int d;
      d = $urandom_range(3, 60);
      a = rnd(d / 3); b = rnd(d / 2); c = rnd(d); e = rnd(100 - d / 2);
      expect_ref();
    end
    checks++;
    if (n_a == 0 || n_b == 0 || n_c == 0 || n_none == 0 || n_shared == 0) begin
      failures++;
      $display("FAIL a kind of result never occurred");
    end
    $display("wins A=%0d B=%0d C=%0d none=%0d shared-channel=%0d", n_a, n_b, n_c, n_none, n_shared);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
