// Shared constants of the programmable jitter generator.
//
// The generator delays its input through a chain of N_TAPS identical cells
// and, for every clock of the histogram logic, connects one tap to the
// output. Tap k lies (k+1) cell delays behind the input; tap REF_TAP is the
// zero-phase reference, so tap k shifts an edge by (k - REF_TAP) cell
// delays: 15 taps early, the reference, and 16 taps late.
//
// The tap choice comes from a pattern memory of PAT_NUM patterns of
// PAT_LEN words each (1024 words of SEL_W bits in all), indexed by a
// SEL_W-bit pseudorandom sequence. The 32-tap chain, the reference tap and
// the 1024 x 5 memory follow the document; splitting the memory into 32
// patterns of 32 words is this design's own choice.
package jg_pkg;
  timeunit 1ps;
  timeprecision 1ps;

  localparam int unsigned N_TAPS    = 32;
  localparam int unsigned SEL_W     = $clog2(N_TAPS);   // 5 select lines
  localparam int unsigned REF_TAP   = 15;               // U_0: zero phase
  localparam int unsigned PAT_W     = 5;                // pattern-number width
  localparam int unsigned PAT_NUM   = 1 << PAT_W;       // 32 stored patterns
  localparam int unsigned PAT_LEN   = 1 << SEL_W;       // 32 words per pattern
  localparam int unsigned MEM_DEPTH = PAT_NUM * PAT_LEN; // 1024 words
  localparam int unsigned ADDR_W    = $clog2(MEM_DEPTH); // 10 address bits

  typedef logic [SEL_W-1:0]  tap_sel_t;
  typedef logic [ADDR_W-1:0] mem_addr_t;
endpackage
