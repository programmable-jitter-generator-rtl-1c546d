// Self-checking testbench for pdf_memory at its default size (1024 x 5).
// Checks: every word powers up as 15; written words read back one clock
// later; re low holds rdata; reset sets rdata to 15; a read of the word
// being written returns the old word. Expected contents come from a
// testbench copy of the memory.
module tb_pdf_memory;
  timeunit 1ps;
  timeprecision 1ps;

  localparam int DEPTH = 1024;

  logic       clk = 1'b0;
  logic       rst_n = 1'b0;
  logic       we = 1'b0;
  logic [9:0] waddr = '0;
  logic [4:0] wdata = '0;
  logic       re = 1'b0;
  logic [9:0] raddr = '0;
  logic [4:0] rdata;
  logic [4:0] model [DEPTH];
  int         checks = 0;
  int         failures = 0;

  pdf_memory dut (.clk(clk), .rst_n(rst_n), .we(we), .waddr(waddr), .wdata(wdata),
                  .re(re), .raddr(raddr), .rdata(rdata));

  always #500 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic read(input int a, input logic [4:0] exp, input string what);
    @(negedge clk);
    re = 1'b1;
    raddr = 10'(a);
    @(posedge clk);
    #1 check(rdata == exp, $sformatf("%s: addr %0d got %0d expected %0d", what, a, rdata, exp));
    re = 1'b0;
  endtask

  initial begin : watchdog
    #20000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : stimulus
    repeat (2) @(posedge clk);
    #1 check(rdata == 5'd15, "reset value");
    rst_n = 1'b1;
    for (int a = 0; a < DEPTH; a++) model[a] = 5'd15;
    for (int a = 0; a < DEPTH; a += 37) read(a, 5'd15, "power-up");
    // fill the whole memory
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk);
      we = 1'b1;
      waddr = 10'(a);
      wdata = 5'($urandom);
      model[a] = wdata;
    end
    @(negedge clk) we = 1'b0;
    for (int a = 0; a < DEPTH; a++) read(a, model[a], "readback");
    // re low holds the output
    read(5, model[5], "before hold");
    raddr = 10'd6;
    repeat (3) begin
      @(posedge clk);
      #1 check(rdata == model[5], "hold with re low");
    end
    // read during write of the same word returns the old word
    @(negedge clk);
    we = 1'b1; waddr = 10'd9; wdata = ~model[9];
    re = 1'b1; raddr = 10'd9;
    @(posedge clk);
    #1 check(rdata == model[9], "read-during-write returns old word");
    model[9] = ~model[9];
    @(negedge clk) we = 1'b0; re = 1'b0;
    read(9, model[9], "after write");
    // reset
    @(negedge clk) rst_n = 1'b0;
    @(posedge clk);
    #1 check(rdata == 5'd15, "reset clears output");
    rst_n = 1'b1;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
