// Self-checking testbench for signal_selector (32:1). For every select value
// it drives a one-hot and a one-cold tap vector plus random vectors and
// checks that s_out equals the addressed tap.
module tb_signal_selector;
  timeunit 1ps;
  timeprecision 1ps;

  logic [31:0] r;
  logic [4:0]  sel;
  logic        s_out;
  int          checks = 0;
  int          failures = 0;

  signal_selector dut (.r(r), .sel(sel), .s_out(s_out));

  task automatic check(input bit exp, input string what);
    #1;
    checks++;
    if (s_out !== exp) begin
      failures++;
      $display("FAIL: %s: sel=%0d r=%h s_out=%b", what, sel, r, s_out);
    end
  endtask

  initial begin : watchdog
    #1000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : stimulus
    for (int s = 0; s < 32; s++) begin
      sel = 5'(s);
      r = 32'd1 << s;     check(1'b1, "one-hot");
      r = ~(32'd1 << s);  check(1'b0, "one-cold");
      repeat (4) begin
        r = $urandom;
        check(r[s], "random");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
