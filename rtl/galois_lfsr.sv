// Galois linear feedback shift register, the pseudorandom generator of the
// histogram logic.
//
// Each clock with en high the register shifts right by one; when the bit
// shifted out is 1, the feedback mask POLY is XORed into the shifted value
// (Galois form: the feedback XORs sit between the stages, so no XOR chain
// limits the clock rate). With the default mask 5'b10100, the polynomial
// x^5 + x^3 + 1, the state runs through all 31 non-zero values before
// repeating. Synchronous active-low reset loads SEED, which must be non-zero.
//
// The five flip-flops and the Galois structure follow the document; the
// polynomial, the seed, the reset and the enable are this design's choices.
module galois_lfsr #(
  parameter int unsigned     WIDTH = 5,
  parameter logic [WIDTH-1:0] POLY = 5'b10100,
  parameter logic [WIDTH-1:0] SEED = 5'b00001
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             en,
  output logic [WIDTH-1:0] state
);
  timeunit 1ps;
  timeprecision 1ps;

  always_ff @(posedge clk) begin
    if (!rst_n)
      state <= SEED;
    else if (en)
      state <= (state >> 1) ^ (state[0] ? POLY : '0);
  end

  initial assert (SEED != '0) else $error("galois_lfsr: SEED must be non-zero");
  a_nonzero: assert property (@(posedge clk) disable iff (!rst_n) state != '0);
endmodule
