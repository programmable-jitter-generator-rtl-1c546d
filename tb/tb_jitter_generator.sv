// End-to-end testbench of jitter_generator at its default parameters
// (32 taps of 50 ps, 1024 x 5 pattern memory).
//
// s_in is a 200 MHz clock (T = 5000 ps); the histogram-logic clock is s_in
// inverted, so a new tap is chosen at every falling edge of s_in, while all
// taps are still high (32 * 50 ps < T/2). The testbench acts as the
// controller: it loads five PDF patterns, each 31 used words of tap indices
// computed here:
//   0  Gaussian, sigma = 3 cells (counts from the sampled density)
//   1  dual-Dirac (duty-cycle distortion), taps 15 -/+ 4
//   2  sinusoidal, 15 + round(10 cos(2 pi i / 31))
//   3  every tap except the reference: extremes -15 and +16 cells
//   4  all words 15: no jitter
// It then runs each pattern for two LFSR periods (62 clocks) and measures,
// for every edge of s_out, the delay after the matching edge of s_in. That
// must be (k + 1) * 50 ps, where k is the tap a model of the LFSR and
// memory predicts; the edge's deviation from the ideal (reference) edge is
// (k - 15) * 50 ps. The histogram of measured deviations must equal twice
// the pattern's histogram. Every period must carry exactly one rising and
// one falling edge on s_out (no glitch from a tap switch).
// Mechanisms counted, each of which must occur: early, late and zero
// deviation, the extreme taps, a pattern switch while running, a hold with
// en low, a memory write, and the LFSR wrapping after 31 steps.
module tb_jitter_generator;
  timeunit 1ps;
  timeprecision 1ps;

  localparam int T   = 5000;
  localparam int TAU = 50;
  localparam int REF = 15;

  logic       s_in = 1'b0;
  logic       clk;
  logic       rst_n = 1'b0;
  logic       en = 1'b0;
  logic [4:0] pattern = '0;
  logic       we = 1'b0;
  logic [9:0] waddr = '0;
  logic [4:0] wdata = '0;
  logic [4:0] sel;
  logic       s_out;

  jitter_generator dut (.s_in(s_in), .clk(clk), .rst_n(rst_n), .en(en), .pattern(pattern),
                        .we(we), .waddr(waddr), .wdata(wdata), .sel(sel), .s_out(s_out));

  assign clk = ~s_in;
  always #(T / 2) s_in = ~s_in;

  int checks = 0;
  int failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // ---------------- model of the pattern memory and LFSR ----------------
  logic [4:0] model [1024];
  logic [4:0] m_lfsr = 5'b00001;
  logic [4:0] m_sel = 5'd15;
  int         m_steps = 0;

  function automatic logic [4:0] lfsr_next(logic [4:0] s);
    return {s[0], s[4], s[3] ^ s[0], s[2], s[1]};
  endfunction

  // mechanism counters
  int n_early = 0, n_late = 0, n_zero = 0, n_min = 0, n_max = 0;
  int n_switch = 0, n_hold = 0, n_write = 0, n_wrap = 0;

  always @(posedge clk) begin
    if (!rst_n) begin
      m_lfsr <= 5'b00001;
      m_sel  <= 5'd15;
    end else begin
      if (we) begin
        model[waddr] <= wdata;
        n_write++;
      end
      if (en) begin
        m_sel  <= model[{pattern, m_lfsr}];
        m_lfsr <= lfsr_next(m_lfsr);
        m_steps++;
        if (lfsr_next(m_lfsr) == 5'b00001) n_wrap++;
      end else begin
        n_hold++;
      end
    end
  end

  // ---------------- edge measurement ----------------
  time t_rise, t_fall;
  int  out_rises = 0, out_falls = 0;
  bit  measure = 1'b0;
  int  hist [32];

  always @(posedge s_in) t_rise = $time;
  always @(negedge s_in) t_fall = $time;

  task automatic score(input int d, input int k, input string edge_name);
    int dev;
    check(d == (k + 1) * TAU,
          $sformatf("%s edge at %0t: delay %0d ps, expected %0d (tap %0d)", edge_name, $time, d, (k + 1) * TAU, k));
    dev = d / TAU - 1 - REF;
    if (measure) begin
      if (dev >= -REF && dev <= 31 - REF) hist[dev + REF]++;
      if (dev < 0) n_early++;
      if (dev > 0) n_late++;
      if (dev == 0) n_zero++;
      if (dev == -REF) n_min++;
      if (dev == 31 - REF) n_max++;
    end
  endtask

  always @(posedge s_out) begin
    out_rises++;
    if (rst_n) score(int'($time - t_rise), int'(m_sel), "rising");
  end
  always @(negedge s_out) begin
    out_falls++;
    if (rst_n) score(int'($time - t_fall), int'(m_sel), "falling");
  end

  // one rising and one falling edge of s_out per period of s_in
  always @(posedge s_in) begin
    if (rst_n && $time > time'(T)) begin
      check(out_rises == 1 && out_falls == 1,
            $sformatf("period ending %0t: %0d rising, %0d falling edges", $time, out_rises, out_falls));
    end
    out_rises = 0;
    out_falls = 0;
  end

  // ---------------- patterns ----------------
  logic [4:0] pat [5][32];

  function automatic void build_patterns();
    real w [32];
    real sum;
    int  n, cnt;
    // 0: Gaussian, sigma 3 cells, around the reference tap
    sum = 0.0;
    for (int t = 0; t < 32; t++) begin
      w[t] = $exp(-((t - REF) * (t - REF)) / (2.0 * 9.0));
      sum += w[t];
    end
    n = 1;
    for (int t = 0; t < 32; t++) begin
      cnt = int'($floor(31.0 * w[t] / sum + 0.5));
      for (int c = 0; c < cnt && n < 32; c++) pat[0][n++] = 5'(t);
    end
    while (n < 32) pat[0][n++] = 5'(REF);
    // 1: dual-Dirac, peak-to-peak 8 cells
    for (int i = 1; i < 32; i++) pat[1][i] = (i % 2 == 1) ? 5'(REF - 4) : 5'(REF + 4);
    // 2: sinusoidal, amplitude 10 cells
    for (int i = 1; i < 32; i++)
      pat[2][i] = 5'(REF + int'($floor(10.0 * $cos(2.0 * 3.14159265358979 * i / 31.0) + 0.5)));
    // 3: every tap but the reference
    for (int i = 1; i < 32; i++) pat[3][i] = (i <= REF) ? 5'(i - 1) : 5'(i);
    // 4: no jitter
    for (int i = 1; i < 32; i++) pat[4][i] = 5'(REF);
    for (int p = 0; p < 5; p++) pat[p][0] = 5'(REF);
  endfunction

  // ---------------- watchdog ----------------
  initial begin : watchdog
    repeat (2000) @(posedge s_in);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- controller ----------------
  initial begin : controller
    int hist_exp [32];
    for (int a = 0; a < 1024; a++) model[a] = 5'd15;
    build_patterns();
    repeat (3) @(posedge s_in);
    rst_n = 1'b1;
    // load the patterns: inputs change at rising s_in, i.e. falling clk
    for (int p = 0; p < 5; p++)
      for (int w = 0; w < 32; w++) begin
        @(posedge s_in);
        we = 1'b1;
        waddr = {5'(p), 5'(w)};
        wdata = pat[p][w];
      end
    @(posedge s_in) we = 1'b0;
    check(sel == 5'd15, "no tap change while loading");
    // run each pattern for two LFSR periods without stopping
    for (int p = 0; p < 5; p++) begin
      if (p > 0) n_switch++;
      pattern = 5'(p);
      en = 1'b1;
      // the first tap of this pattern is chosen at the next clock; measure
      // from the falling edge it sets to the rising edge after the 62nd
      @(posedge clk);
      hist = '{default: 0};
      measure = 1'b1;
      repeat (61) @(posedge clk);
      @(posedge s_out);
      #1 measure = 1'b0;
      hist_exp = '{default: 0};
      for (int i = 1; i < 32; i++) hist_exp[pat[p][i]] += 4;  // 2 periods x 2 edges
      for (int t = 0; t < 32; t++)
        check(hist[t] == hist_exp[t],
              $sformatf("pattern %0d tap %0d: %0d edges, expected %0d", p, t, hist[t], hist_exp[t]));
      @(posedge s_in);
    end
    // hold: en low freezes the tap
    @(posedge s_in) en = 1'b0;
    begin
      logic [4:0] held;
      @(posedge clk);
      held = sel;
      repeat (4) begin
        @(posedge clk);
        #1 check(sel == held, "tap changed with en low");
      end
    end
    // every mechanism must have happened
    check(n_early > 0, "no early edge");
    check(n_late > 0, "no late edge");
    check(n_zero > 0, "no edge at the reference phase");
    check(n_min > 0, "tap 0 (-15 cells) never used");
    check(n_max > 0, "tap 31 (+16 cells) never used");
    check(n_switch > 0, "no pattern switch");
    check(n_hold > 0, "no hold");
    check(n_write == 5 * 32, $sformatf("%0d memory writes, expected 160", n_write));
    check(n_wrap >= 10, $sformatf("LFSR wrapped %0d times", n_wrap));
    $display("mechanisms: early=%0d late=%0d zero=%0d min=%0d max=%0d switch=%0d hold=%0d write=%0d wrap=%0d",
             n_early, n_late, n_zero, n_min, n_max, n_switch, n_hold, n_write, n_wrap);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
