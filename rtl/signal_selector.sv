// Signal selector (MUX 32:1): puts delay-line tap r[sel] on s_out.
//
// Purely combinational. sel is the binary tap index driven by the histogram
// logic (select lines s_0..s_4). The caller must change sel only while all
// taps carry the same level, which the delay line guarantees for part of
// every half period because its total delay is below half a period; then
// switching taps cannot produce a glitch. The 32 inputs and the single
// output follow the document; the binary select encoding follows its
// structure drawing and the 5-bit pattern words.
module signal_selector #(
  parameter int unsigned N_IN = 32
) (
  input  logic [N_IN-1:0]         r,
  input  logic [$clog2(N_IN)-1:0] sel,
  output logic                    s_out
);
  timeunit 1ps;
  timeprecision 1ps;

  always_comb s_out = r[sel];
endmodule
