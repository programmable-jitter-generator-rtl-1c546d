// Behavioural model of the delay line (VCDL). Not synthesizable logic: a
// chain of delays, which only a physical buffer chain can provide.
//
// The input s_in passes through N_TAPS identical buffer cells D_0 .. D_N-1,
// each of delay TAU_PS picoseconds. The output of cell k is tap taps[k]
// (input r_k of the selector), so taps[k] follows s_in after (k+1)*TAU_PS.
// With the reference at tap 15 (U_0), taps 0..14 are the early phases
// U_-15..U_-1 and taps 16..31 the late phases U_1..U_16.
//
// As in the document's FPGA version the cells are fixed delays; the delay
// line control voltage of a true voltage-controlled line is not modelled.
// TAU_PS is this design's choice (the document gives no value); it must
// satisfy N_TAPS*TAU_PS < T/2 for the clock or bit period T in use. Each cell
// is an inertial delay, so pulses shorter than TAU_PS are swallowed.
module vcdl #(
  parameter int unsigned N_TAPS = 32,
  parameter int unsigned TAU_PS = 50
) (
  input  logic              s_in,
  output logic [N_TAPS-1:0] taps
);
  timeunit 1ps;
  timeprecision 1ps;

  logic [N_TAPS:0] chain;

  assign chain[0] = s_in;

  for (genvar k = 0; k < N_TAPS; k++) begin : g_cell
    assign #(TAU_PS) chain[k+1] = chain[k];
  end

  assign taps = chain[N_TAPS:1];
endmodule
