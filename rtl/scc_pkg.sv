`timescale 1ns/1ps
// scc_pkg: constants and types shared by the suppressed carrier clock (SCC)
// modulator, its testbenches and the top level.
//
// The SCC is a clock whose transitions are skipped at chosen points. The
// "modulation profile" is the sequence of the number of transitions between
// two adjacent skipped points; this design produces a saw-tooth profile, an
// increasing arithmetic series that restarts from its first value.
//
// The default series 1, 3, 5, 7, 9, 11 (first value 1, increment 2, limit 11)
// is the worked example that goes with the profile generator of the design.
// PROFILE_W (8 bits) is this design's own choice: it holds the longest
// profile value of the saw-tooth series 1..100 that the design is meant to
// produce.
package scc_pkg;

  // Width of the profile register and of the down-counter.
  localparam int unsigned PROFILE_W = 8;

  // Worked example of the saw-tooth generator: 1, 3, 5, 7, 9, 11, 1, ...
  localparam int unsigned DEF_START = 1;
  localparam int unsigned DEF_STEP  = 2;
  localparam int unsigned DEF_LIMIT = 11;
  // Divider ratio: each profile value is used DEF_DIV times in a row
  // (1 gives 1, 3, 5, ...; 2 gives 1, 1, 3, 3, 5, 5, ...).
  localparam int unsigned DEF_DIV   = 1;

  // Which of the two saw-tooth profile generators drives the down-counter.
  typedef enum logic {
    GEN_ADDER   = 1'b0,  // generator I: multiplexer, adder, comparator, divider, register
    GEN_COUNTER = 1'b1   // generator II: loadable up-counter and comparator
  } gen_sel_e;

endpackage
