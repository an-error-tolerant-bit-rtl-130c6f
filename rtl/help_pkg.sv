`timescale 1ns / 1ps
// help_pkg: types and constants shared by the HELP path-delay PUF engine.
//
// Sizes that follow the design description: 256 MUT outputs / insertion
// points, a 264-FF REBEL capture row, 8-bit PUF numbers (PNs) in the range
// 0..128 produced by the capture-clock fine phase adjust (FPA), a 32-bit
// launch-vector LFSR, a 28-bit pairing LFSR, 64 PNs for temperature
// compensation and 256-bit bitstrings. Sizes marked "own choice" are not
// given by the description and were chosen for this implementation.
package help_pkg;

  localparam int unsigned N_IP      = 256;  // MUT outputs = insertion points
  localparam int unsigned ROW_LEN   = 264;  // REBEL capture row length
  localparam int unsigned PN_W      = 8;    // PN width
  localparam int unsigned FPA_MAX   = 128;  // FPA setting at the start of a sweep
  localparam int unsigned LC_LFSR_W = 32;
  localparam int unsigned BG_LFSR_W = 28;
  localparam int unsigned TCOMP_N   = 64;   // PNs averaged for temperature compensation
  localparam int unsigned NBITS_MAX = 256;  // bitstring length
  localparam int unsigned CHAIN_LEN = 8;    // delay-chain segment analysed (own choice)
  localparam int unsigned TARGET_FF = 4;    // target FF distance from the IP (own choice)
  localparam int unsigned PN_DEPTH  = 16384; // PN memory words (own choice)
  localparam int unsigned VP_DEPTH  = 524288; // valid-path bits (own choice)

  // Enrollment creates a bitstring and the public helper data; regeneration
  // replays the helper data to reproduce the bitstring.
  typedef enum logic { MODE_ENROLL = 1'b0, MODE_REGEN = 1'b1 } help_mode_e;

  // Run parameters loaded through the serial interface.
  typedef struct packed {
    logic [31:0] seed;      // LC LFSR seed
    logic [7:0]  mod_m;     // modulus M (even, 2..128)
    logic [7:0]  win;       // half-width of the enrollment acceptance window
    logic [7:0]  k;         // DPNC run length (odd)
    logic [7:0]  thresh;    // max PN range over the repeated samples
    logic [15:0] num_pns;   // valid PNs to collect during enrollment
    logic [15:0] nbits;     // bits to generate
  } run_params_t;

endpackage
