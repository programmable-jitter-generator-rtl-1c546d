// Self-checking testbench for histogram_logic at its defaults (32 patterns
// of 32 five-bit words, LFSR mask 5'b10100).
//
// It loads four patterns with random tap indices, then runs the LFSR and
// compares sel after every clock with a testbench model: its own LFSR
// (written bit by bit) addressing its own copy of the memory, with the
// word showing one clock after the address. Also checked: sel is 15 after
// reset, en low freezes sel, a pattern change takes effect on the next
// clock, and over any 31 consecutive enabled clocks each word 1..31 of a
// pattern is used exactly once, so the histogram of sel equals the
// histogram of the stored words.
module tb_histogram_logic;
  timeunit 1ps;
  timeprecision 1ps;

  logic       clk = 1'b0;
  logic       rst_n = 1'b0;
  logic       en = 1'b0;
  logic [4:0] pattern = '0;
  logic       we = 1'b0;
  logic [9:0] waddr = '0;
  logic [4:0] wdata = '0;
  logic [4:0] sel;

  logic [4:0] model [1024];
  logic [4:0] m_lfsr;
  int         checks = 0;
  int         failures = 0;

  histogram_logic dut (.clk(clk), .rst_n(rst_n), .en(en), .pattern(pattern),
                       .we(we), .waddr(waddr), .wdata(wdata), .sel(sel));

  always #500 clk = ~clk;

  function automatic logic [4:0] lfsr_next(logic [4:0] s);
    return {s[0], s[4], s[3] ^ s[0], s[2], s[1]};
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // one enabled clock: returns the tap expected on sel afterwards
  task automatic step(output logic [4:0] exp);
    exp = model[{pattern, m_lfsr}];
    m_lfsr = lfsr_next(m_lfsr);
    @(posedge clk);
    #1 check(sel == exp, $sformatf("pattern %0d: sel %0d expected %0d", pattern, sel, exp));
  endtask

  initial begin : watchdog
    #10000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : stimulus
    logic [4:0] exp;
    int hist_exp [32];
    int hist_got [32];
    for (int a = 0; a < 1024; a++) model[a] = 5'd15;
    repeat (2) @(posedge clk);
    #1 check(sel == 5'd15, "reset value");
    rst_n = 1'b1;
    // load patterns 0..3 (en low, so sel must not move)
    for (int p = 0; p < 4; p++)
      for (int w = 0; w < 32; w++) begin
        @(negedge clk);
        we = 1'b1;
        waddr = {5'(p), 5'(w)};
        wdata = 5'($urandom);
        model[waddr] = wdata;
      end
    @(negedge clk) we = 1'b0;
    check(sel == 5'd15, "sel held during loading");
    m_lfsr = 5'b00001;
    for (int p = 0; p < 4; p++) begin
      if (p == 0) @(negedge clk);
      pattern = 5'(p);
      en = 1'b1;
      hist_exp = '{default: 0};
      hist_got = '{default: 0};
      for (int w = 1; w < 32; w++) hist_exp[model[{5'(p), 5'(w)}]]++;
      for (int n = 0; n < 31; n++) begin
        step(exp);
        hist_got[sel]++;
        if (!(p == 3 && n == 30)) @(negedge clk);
      end
      for (int t = 0; t < 32; t++)
        check(hist_got[t] == hist_exp[t],
              $sformatf("pattern %0d tap %0d count %0d expected %0d", p, t, hist_got[t], hist_exp[t]));
    end
    // freeze
    @(negedge clk) en = 1'b0;
    exp = sel;
    repeat (4) begin
      @(posedge clk);
      #1 check(sel == exp, "sel changed with en low");
    end
    // resume, then reset
    @(negedge clk) en = 1'b1;
    repeat (5) begin
      step(exp);
      @(negedge clk);
    end
    rst_n = 1'b0;
    @(posedge clk);
    #1 check(sel == 5'd15, "reset mid-run");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
