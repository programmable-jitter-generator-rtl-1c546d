// Data-stream testbench of jitter_generator at its default parameters.
//
// Here s_in is a pseudorandom NRZ bit stream at 200 Mbit/s (bit time
// T = 5000 ps, bits from a 7-bit PRBS written in the testbench), so edges
// occur only where the data changes. The histogram-logic clock rises in
// the middle of every bit (T/2 after a bit boundary), when the last
// transition has passed all 32 cells (32 * 50 ps < T/2). A uniform pattern
// over taps 8..22 (offsets -7..+7 cells) is loaded.
// Checked: s_out carries exactly the bit sequence of s_in (no bit lost,
// added or glitched); each s_out transition follows its s_in transition by
// (k + 1) * 50 ps, where k is the tap the LFSR/memory model predicts for
// that bit; early, late and on-time transitions and runs of equal bits all
// occur.
module tb_jg_data_stream;
  timeunit 1ps;
  timeprecision 1ps;

  localparam int T     = 5000;
  localparam int TAU   = 50;
  localparam int REF   = 15;
  localparam int NBITS = 400;

  logic       s_in = 1'b0;
  logic       clk = 1'b0;
  logic       rst_n = 1'b0;
  logic       en = 1'b0;
  logic [4:0] pattern = 5'd7;
  logic       we = 1'b0;
  logic [9:0] waddr = '0;
  logic [4:0] wdata = '0;
  logic [4:0] sel;
  logic       s_out;

  jitter_generator dut (.s_in(s_in), .clk(clk), .rst_n(rst_n), .en(en), .pattern(pattern),
                        .we(we), .waddr(waddr), .wdata(wdata), .sel(sel), .s_out(s_out));

  int checks = 0;
  int failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // clk: rising in the middle of every bit
  initial begin
    #(T / 2);
    forever begin
      clk = 1'b1;
      #(T / 2);
      clk = 1'b0;
      #(T / 2);
    end
  end

  // model of the tap choice
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

  // transitions of s_in and s_out
  time t_in;
  int  n_trans_in = 0, n_trans_out = 0;
  int  n_early = 0, n_late = 0, n_zero = 0, n_runs = 0;
  bit  measure = 1'b0;

  always @(s_in) begin
    t_in = $time;
    if (measure) n_trans_in++;
  end

  always @(s_out) begin
    if (measure) begin
      int d;
      n_trans_out++;
      d = int'($time - t_in);
      check(d == (int'(m_sel) + 1) * TAU,
            $sformatf("transition at %0t: delay %0d ps, expected %0d", $time, d, (int'(m_sel) + 1) * TAU));
      if (int'(m_sel) < REF) n_early++;
      if (int'(m_sel) > REF) n_late++;
      if (int'(m_sel) == REF) n_zero++;
    end
  end

  initial begin : watchdog
    #(time'(T) * time'(NBITS + 200));
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : controller
    static logic [6:0] prbs = 7'h5a;
    static logic       prev = 1'b0;
    for (int a = 0; a < 1024; a++) model[a] = 5'd15;
    // load pattern 7 at clock falling edges: words 1..31 hold taps 8..22
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int w = 0; w < 32; w++) begin
      @(negedge clk);
      we = 1'b1;
      waddr = {5'd7, 5'(w)};
      wdata = 5'(8 + (w % 15));
    end
    @(negedge clk) we = 1'b0;
    en = 1'b1;
    // bits start at a falling clk edge = bit boundary
    @(negedge clk);
    measure = 1'b1;
    for (int b = 0; b < NBITS; b++) begin
      logic bit_v;
      bit_v = prbs[6] ^ prbs[5];
      prbs = {prbs[5:0], bit_v};
      if (bit_v == prev) n_runs++;
      prev = bit_v;
      s_in = bit_v;
      // by the end of the bit its transition (if any) has reached s_out
      #(T);
      check(s_out == bit_v, $sformatf("bit %0d: s_out %b, sent %b", b, s_out, bit_v));
    end
    measure = 1'b0;
    check(n_trans_in == n_trans_out,
          $sformatf("%0d transitions in, %0d out", n_trans_in, n_trans_out));
    check(n_early > 0, "no early transition");
    check(n_late > 0, "no late transition");
    check(n_zero > 0, "no on-time transition");
    check(n_runs > 0, "no run of equal bits");
    $display("transitions=%0d early=%0d late=%0d on-time=%0d repeated bits=%0d",
             n_trans_out, n_early, n_late, n_zero, n_runs);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
