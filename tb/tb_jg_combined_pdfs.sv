// Workload testbench: combined jitter densities on jitter_generator at its
// default parameters (32 taps of 50 ps, 200 MHz input clock).
//
// Four densities are built here by discrete convolution of component
// densities on a grid of one cell (tau):
//   0  random jitter: Gaussian, sigma 4 cells
//   1  triangular periodic jitter (uniform density, +/-8 cells) convolved
//      with bounded uncorrelated jitter (Gaussian sigma 2 truncated at +/-5)
//   2  sinusoidal periodic jitter (amplitude 10 cells, arcsine density)
//      convolved with inter-symbol interference (deltas at -3, 0, +3 with
//      weights 1/4, 1/2, 1/4)
//   3  Gaussian (sigma 2, +/-6) * sinusoidal (amplitude 6) * bounded
//      uncorrelated (uniform +/-3)
// Each density is quantised to the 31 usable words of a pattern by largest
// remainders, so every tap's count differs from 31*p by less than one.
// After loading, every pattern runs for three LFSR periods (93 clocks).
// Each s_out edge must fall at the delay the LFSR/memory model predicts, and
// the histogram of measured deviations must equal three times (two edges
// per clock: six times) the stored counts. The testbench also checks the
// measured mean and peak-to-peak deviation against the quantised density.
module tb_jg_combined_pdfs;
  timeunit 1ps;
  timeprecision 1ps;

  localparam int T    = 5000;
  localparam int TAU  = 50;
  localparam int REF  = 15;
  localparam int NPAT = 4;
  localparam int RUNS = 3;

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

  // ---------------- densities (index = offset + 32, offsets -32..31) ----
  typedef real pmf_t [64];

  function automatic pmf_t zero_pmf();
    pmf_t p;
    foreach (p[i]) p[i] = 0.0;
    return p;
  endfunction

  function automatic pmf_t normalise(pmf_t p);
    real s = 0.0;
    foreach (p[i]) s += p[i];
    foreach (p[i]) p[i] = p[i] / s;
    return p;
  endfunction

  function automatic pmf_t gauss(real sigma, int lim);
    pmf_t p = zero_pmf();
    for (int d = -lim; d <= lim; d++) p[d + 32] = $exp(-(d * d) / (2.0 * sigma * sigma));
    return normalise(p);
  endfunction

  function automatic pmf_t uniform(int lim);
    pmf_t p = zero_pmf();
    for (int d = -lim; d <= lim; d++) p[d + 32] = 1.0;
    return normalise(p);
  endfunction

  // sampled sinusoid: the amplitude histogram of A cos over 64 phases
  function automatic pmf_t sine(real a);
    pmf_t p = zero_pmf();
    for (int i = 0; i < 64; i++)
      p[32 + int'($floor(a * $cos(2.0 * 3.14159265358979 * i / 64.0) + 0.5))] += 1.0;
    return normalise(p);
  endfunction

  function automatic pmf_t conv(pmf_t a, pmf_t b);
    pmf_t c = zero_pmf();
    for (int i = 0; i < 64; i++)
      for (int j = 0; j < 64; j++)
        if (i + j - 32 >= 0 && i + j - 32 < 64) c[i + j - 32] += a[i] * b[j];
    return c;
  endfunction

  pmf_t target [NPAT];
  int   counts [NPAT][32];
  logic [4:0] pat [NPAT][32];

  // largest-remainder quantisation of a density to 31 words
  function automatic void quantise(int p);
    real exact [32];
    real rem [32];
    int  total = 0;
    for (int t = 0; t < 32; t++) begin
      exact[t] = 31.0 * target[p][t - REF + 32];
      counts[p][t] = int'($floor(exact[t]));
      rem[t] = exact[t] - counts[p][t];
      total += counts[p][t];
    end
    while (total < 31) begin
      int best = 0;
      for (int t = 1; t < 32; t++) if (rem[t] > rem[best]) best = t;
      counts[p][best]++;
      rem[best] = -1.0;
      total++;
    end
  endfunction

  task automatic build();
    pmf_t isi = zero_pmf();
    isi[32 - 3] = 0.25;
    isi[32]     = 0.5;
    isi[32 + 3] = 0.25;
    target[0] = gauss(4.0, 15);
    target[1] = conv(uniform(8), gauss(2.0, 5));
    target[2] = conv(sine(10.0), isi);
    target[3] = conv(conv(gauss(2.0, 6), sine(6.0)), uniform(3));
    for (int p = 0; p < NPAT; p++) begin
      int n = 1;
      quantise(p);
      pat[p][0] = 5'(REF);
      for (int t = 0; t < 32; t++)
        for (int c = 0; c < counts[p][t]; c++) pat[p][n++] = 5'(t);
      // no density may reach outside the 32 taps
      begin
        real outside = 0.0;
        for (int i = 0; i < 64; i++)
          if (i - 32 < -REF || i - 32 > 31 - REF) outside += target[p][i];
        check(outside < 1e-9, $sformatf("density %0d exceeds the tap range", p));
      end
      for (int t = 0; t < 32; t++)
        check(counts[p][t] - 31.0 * target[p][t - REF + 32] < 1.0 &&
              31.0 * target[p][t - REF + 32] - counts[p][t] < 1.0,
              $sformatf("density %0d tap %0d quantisation", p, t));
    end
  endtask

  // ---------------- model and measurement ----------------
  logic [4:0] model [1024];
  logic [4:0] m_lfsr = 5'b00001;
  logic [4:0] m_sel = 5'd15;

  function automatic logic [4:0] lfsr_next(logic [4:0] s);
    return {s[0], s[4], s[3] ^ s[0], s[2], s[1]};
  endfunction

  always @(posedge clk) begin
    if (!rst_n) begin
      m_lfsr <= 5'b00001;
      m_sel  <= 5'd15;
    end else begin
      if (we) model[waddr] <= wdata;
      if (en) begin
        m_sel  <= model[{pattern, m_lfsr}];
        m_lfsr <= lfsr_next(m_lfsr);
      end
    end
  end

  time t_rise, t_fall;
  bit  measure = 1'b0;
  int  hist [32];
  int  dev_sum, dev_min, dev_max, n_edges;

  always @(posedge s_in) t_rise = $time;
  always @(negedge s_in) t_fall = $time;

  task automatic score(input int d);
    int dev;
    check(d == (int'(m_sel) + 1) * TAU,
          $sformatf("edge at %0t: delay %0d ps, expected %0d", $time, d, (int'(m_sel) + 1) * TAU));
    if (measure) begin
      dev = d / TAU - 1 - REF;
      hist[dev + REF]++;
      dev_sum += dev;
      n_edges++;
      if (dev < dev_min) dev_min = dev;
      if (dev > dev_max) dev_max = dev;
    end
  endtask

  always @(posedge s_out) if (rst_n) score(int'($time - t_rise));
  always @(negedge s_out) if (rst_n) score(int'($time - t_fall));

  initial begin : watchdog
    repeat (1500) @(posedge s_in);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : controller
    for (int a = 0; a < 1024; a++) model[a] = 5'd15;
    build();
    repeat (3) @(posedge s_in);
    rst_n = 1'b1;
    for (int p = 0; p < NPAT; p++)
      for (int w = 0; w < 32; w++) begin
        @(posedge s_in);
        we = 1'b1;
        waddr = {5'(p), 5'(w)};
        wdata = pat[p][w];
      end
    @(posedge s_in) we = 1'b0;
    for (int p = 0; p < NPAT; p++) begin
      int  exp_sum, exp_min, exp_max;
      real mean_ps;
      pattern = 5'(p);
      en = 1'b1;
      @(posedge clk);
      hist = '{default: 0};
      dev_sum = 0; n_edges = 0; dev_min = 99; dev_max = -99;
      measure = 1'b1;
      repeat (31 * RUNS - 1) @(posedge clk);
      @(posedge s_out);
      #1 measure = 1'b0;
      exp_sum = 0; exp_min = 99; exp_max = -99;
      for (int t = 0; t < 32; t++) begin
        check(hist[t] == 2 * RUNS * counts[p][t],
              $sformatf("density %0d tap %0d: %0d edges, expected %0d", p, t, hist[t], 2 * RUNS * counts[p][t]));
        exp_sum += counts[p][t] * (t - REF);
        if (counts[p][t] > 0 && t - REF < exp_min) exp_min = t - REF;
        if (counts[p][t] > 0 && t - REF > exp_max) exp_max = t - REF;
      end
      check(n_edges == 2 * RUNS * 31, $sformatf("density %0d: %0d edges", p, n_edges));
      check(dev_sum == 2 * RUNS * exp_sum, $sformatf("density %0d: mean deviation", p));
      check(dev_min == exp_min && dev_max == exp_max, $sformatf("density %0d: peak-to-peak", p));
      mean_ps = real'(dev_sum) * TAU / n_edges;
      $display("density %0d: mean %0.1f ps, peak-to-peak %0d ps (%0d..%0d cells)",
               p, mean_ps, (dev_max - dev_min) * TAU, dev_min, dev_max);
      @(posedge s_in);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
