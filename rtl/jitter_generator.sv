// Programmable jitter generator: injects jitter of a stored probability
// density into a clock or data stream.
//
// s_in runs through a delay line of 32 identical cells of delay TAU_PS. Tap
// k is s_in delayed by (k+1) cells; tap 15 is taken as the ideal (zero
// phase) output, so choosing tap k moves the edges of s_out by
// (k - 15) * TAU_PS: up to 15 cells early and 16 late. On every rising edge
// of clk with en high the histogram logic draws a new tap: a 5-bit Galois
// LFSR picks one of 31 words of the active pattern in the PDF memory, and
// the word read is the tap index that the 32:1 selector connects to s_out.
// How often each tap appears in a pattern sets the shape of the jitter
// (Gaussian, dual-Dirac, sinusoidal, ...); the rate of clk sets how often
// the phase changes.
//
// Interface: the pattern memory (32 patterns x 32 words of 5 bits, address
// {pattern, word}) is loaded through we/waddr/wdata, and pattern selects the
// active one; these and clk come from an external controller. sel shows the
// tap in use.
//
// Timing: sel changes just after a rising edge of clk. For a glitch-free
// s_out that must happen while all taps carry the same level: at least
// 32*TAU_PS after an edge of s_in and before the next one. The delay line,
// selector, LFSR and memory size follow the document; TAU_PS, the memory
// organisation and the clk phasing rule are this design's choices. The delay
// line is a behavioural model (fixed cell delays), so this top level
// simulates but only the histogram logic and the selector synthesize.
module jitter_generator
  import jg_pkg::*;
#(
  parameter int unsigned TAU_PS = 50
) (
  input  logic             s_in,
  input  logic             clk,
  input  logic             rst_n,
  input  logic             en,
  input  logic [PAT_W-1:0] pattern,
  input  logic             we,
  input  mem_addr_t        waddr,
  input  tap_sel_t         wdata,
  output tap_sel_t         sel,
  output logic             s_out
);
  timeunit 1ps;
  timeprecision 1ps;

  logic [N_TAPS-1:0] taps;

  vcdl #(.N_TAPS(N_TAPS), .TAU_PS(TAU_PS)) u_vcdl (
    .s_in(s_in),
    .taps(taps)
  );

  histogram_logic u_hl (
    .clk    (clk),
    .rst_n  (rst_n),
    .en     (en),
    .pattern(pattern),
    .we     (we),
    .waddr  (waddr),
    .wdata  (wdata),
    .sel    (sel)
  );

  signal_selector #(.N_IN(N_TAPS)) u_mux (
    .r    (taps),
    .sel  (sel),
    .s_out(s_out)
  );
endmodule
