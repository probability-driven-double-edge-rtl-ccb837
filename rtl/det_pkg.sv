// det_pkg: constants and types shared by the double-edge-triggered
// multi-bit flip-flop (DET-MBFF) and its data-driven clock gating.
//
// MBFF_WIDTH is the number of bits grouped under one shared clock in the
// design as built: a 32-bit group, matching the 32-bit D1/Q2 buses of the
// reference schematic. det_style_e selects how a DET-MBFF is realised:
//   DET_FLOP_MUX  - a rising-edge register and a falling-edge register in
//                   parallel, output chosen by a 2:1 mux driven by the clock
//                   (the structure used for the synthesised design);
//   DET_LATCH_MUX - the "side-by-side" form: a high-transparent and a
//                   low-transparent latch in parallel, the mux always
//                   showing the latch that is currently holding.
package det_pkg;

  localparam int unsigned MBFF_WIDTH = 32;

  typedef enum logic [0:0] {
    DET_FLOP_MUX  = 1'b0,
    DET_LATCH_MUX = 1'b1
  } det_style_e;

endpackage
