// PDF pattern memory of the histogram logic: DEPTH words of WIDTH bits.
//
// Every word holds a delay-line tap index. A stored pattern is a list of tap
// indices whose histogram is the jitter probability density wanted: a tap
// stored in n of the words read at random is chosen with probability n/31
// (see histogram_logic). The controller writes words through the write
// port; the read port has a registered output: on a clock with re high,
// rdata takes the word at raddr, and it holds otherwise (the form a block
// RAM provides). Reading and writing the same word in one clock returns the
// old word. A synchronous active-low reset sets rdata to INIT_VALUE.
//
// The 1024 x 5 size follows the document. The write port, the read latency
// and the power-up contents (every word INIT_VALUE, the reference tap, so an
// unloaded memory adds no jitter) are this design's choices.
module pdf_memory #(
  parameter int unsigned     DEPTH      = 1024,
  parameter int unsigned     WIDTH      = 5,
  parameter logic [WIDTH-1:0] INIT_VALUE = 5'd15
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     we,
  input  logic [$clog2(DEPTH)-1:0] waddr,
  input  logic [WIDTH-1:0]         wdata,
  input  logic                     re,
  input  logic [$clog2(DEPTH)-1:0] raddr,
  output logic [WIDTH-1:0]         rdata
);
  timeunit 1ps;
  timeprecision 1ps;

  logic [WIDTH-1:0] mem [DEPTH];

  initial begin
    for (int i = 0; i < int'(DEPTH); i++) mem[i] = INIT_VALUE;
  end

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  always_ff @(posedge clk) begin
    if (!rst_n)  rdata <= INIT_VALUE;
    else if (re) rdata <= mem[raddr];
  end
endmodule
