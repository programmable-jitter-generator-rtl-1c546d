// Histogram logic (HL): draws one delay-line tap per clock according to a
// stored probability density.
//
// A 5-bit Galois LFSR steps through its 31 non-zero states in a fixed
// pseudorandom order. Its state, appended to the pattern number, addresses
// the PDF pattern memory: address = {pattern, lfsr}. The word read is the
// tap index and drives the selector lines sel. Over 31 clocks every word
// 1..31 of the active pattern is used once, so a tap written into n of those
// words is chosen n times in 31; word 0 of each pattern is never read.
//
// Timing: with en high, each rising clk edge advances the LFSR and registers
// the word addressed by the LFSR state before the edge, so sel changes just
// after the clock edge and holds until the next clock with en. A pattern change takes effect on
// the next read. After reset sel is the reference tap 15 until the first
// word is read.
//
// The LFSR and the 1024 x 5 memory are the document's; the address split
// into 32 patterns of 32 words, the pattern input, the enable and the write
// port are this design's choices.
module histogram_logic
  import jg_pkg::*;
#(
  parameter logic [SEL_W-1:0] POLY = 5'b10100,
  parameter logic [SEL_W-1:0] SEED = 5'b00001
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             en,
  input  logic [PAT_W-1:0] pattern,
  input  logic             we,
  input  mem_addr_t        waddr,
  input  tap_sel_t         wdata,
  output tap_sel_t         sel
);
  timeunit 1ps;
  timeprecision 1ps;

  tap_sel_t  lfsr;
  mem_addr_t raddr;

  galois_lfsr #(.WIDTH(SEL_W), .POLY(POLY), .SEED(SEED)) u_lfsr (
    .clk  (clk),
    .rst_n(rst_n),
    .en   (en),
    .state(lfsr)
  );

  assign raddr = {pattern, lfsr};

  // The registered memory output is the select: on a clock with en it takes
  // the word addressed by the LFSR state before that clock.
  pdf_memory #(.DEPTH(MEM_DEPTH), .WIDTH(SEL_W), .INIT_VALUE(SEL_W'(REF_TAP))) u_mem (
    .clk  (clk),
    .rst_n(rst_n),
    .we   (we),
    .waddr(waddr),
    .wdata(wdata),
    .re   (en),
    .raddr(raddr),
    .rdata(sel)
  );
endmodule
