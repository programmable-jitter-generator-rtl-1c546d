// Self-checking testbench for the vcdl delay-line model at its defaults
// (32 cells of 50 ps). It sends rising and falling edges into s_in and
// records when each tap changes: tap k must follow after (k+1) * 50 ps, so
// the reference tap 15 lags 800 ps and each tap is one cell away from its
// neighbours (taps 0..14 early, 16..31 late relative to tap 15).
module tb_vcdl;
  timeunit 1ps;
  timeprecision 1ps;

  localparam int N   = 32;
  localparam int TAU = 50;

  logic         s_in = 1'b0;
  logic [N-1:0] taps;
  time          t_edge;
  time          t_tap [N];
  int           checks = 0;
  int           failures = 0;

  vcdl dut (.s_in(s_in), .taps(taps));

  logic [N-1:0] taps_q = '0;

  always @(taps) begin
    for (int k = 0; k < N; k++)
      if (taps[k] != taps_q[k]) t_tap[k] = $time;
    taps_q = taps;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin : watchdog
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : stimulus
    #3000;
    check(taps == '0, "taps settle low");
    for (int e = 0; e < 4; e++) begin
      s_in = ~s_in;
      t_edge = $time;
      #3000;
      for (int k = 0; k < N; k++) begin
        check(taps[k] == s_in, $sformatf("edge %0d: tap %0d level", e, k));
        check(t_tap[k] - t_edge == time'(64'((k + 1) * TAU)),
              $sformatf("edge %0d: tap %0d delay %0t, expected %0d", e, k,
                        t_tap[k] - t_edge, (k + 1) * TAU));
      end
      // tap 15 is the zero-phase reference: tap k deviates by (k-15) cells
      for (int k = 0; k < N; k++)
        check(int'(t_tap[k]) - int'(t_tap[15]) == (k - 15) * TAU,
              $sformatf("tap %0d deviation from reference", k));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
