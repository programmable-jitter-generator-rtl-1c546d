// Self-checking testbench for galois_lfsr at its default size (5 bits,
// mask 5'b10100). The expected next state is written out bit by bit for
// x^5 + x^3 + 1, independently of the shift-and-mask form of the design.
// Checks: reset loads the seed; each enabled step matches the bit formula;
// en low holds the state; the sequence visits all 31 non-zero states once
// and returns to the seed after exactly 31 steps.
module tb_galois_lfsr;
  timeunit 1ps;
  timeprecision 1ps;

  logic       clk = 1'b0;
  logic       rst_n = 1'b0;
  logic       en = 1'b0;
  logic [4:0] state;
  int         checks = 0;
  int         failures = 0;

  galois_lfsr dut (.clk(clk), .rst_n(rst_n), .en(en), .state(state));

  always #500 clk = ~clk;

  function automatic logic [4:0] next_of(logic [4:0] s);
    logic [4:0] n;
    n[4] = s[0];
    n[3] = s[4];
    n[2] = s[3] ^ s[0];
    n[1] = s[2];
    n[0] = s[1];
    return n;
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin : watchdog
    repeat (1000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : stimulus
    logic [4:0] exp;
    bit seen [32];
    int steps;
    repeat (2) @(posedge clk);
    #1 check(state == 5'b00001, "reset value");
    rst_n = 1'b1;
    en = 1'b1;
    exp = 5'b00001;
    steps = 0;
    do begin
      @(posedge clk);
      #1;
      exp = next_of(exp);
      steps++;
      check(state == exp, $sformatf("step %0d: got %b expected %b", steps, state, exp));
      check(!seen[state], $sformatf("state %b repeated early", state));
      seen[state] = 1'b1;
    end while (state != 5'b00001 && steps < 40);
    check(steps == 31, $sformatf("period %0d, expected 31", steps));
    check(!seen[0], "zero state reached");
    // hold
    en = 1'b0;
    exp = state;
    repeat (5) begin
      @(posedge clk);
      #1 check(state == exp, "state changed with en low");
    end
    // reset in the middle of the sequence
    en = 1'b1;
    repeat (7) @(posedge clk);
    #1 rst_n = 1'b0;
    @(posedge clk);
    #1 check(state == 5'b00001, "reset mid-sequence");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
