`timescale 1ns/1ps
// scc_modulator: suppressed carrier clock (SCC) modulator with a saw-tooth
// modulation profile.
//
// A modulation controller (one of the two saw-tooth profile generators)
// supplies profile values; the down-counter counts each value down to 0 and
// then toggles the modulating signal; the glitch-free multiplexer turns the
// regular clock into the SCC, skipping one carrier transition at every
// toggle. The resulting SCC makes value transitions between two adjacent
// skipped transitions, value running through the saw-tooth series. This
// composition follows the published modulator; the GEN parameter that picks
// either generator is this design's way of offering both.
//
// Ports: clk_in is the regular clock (rising edges drive the controller and
// down-counter, falling edges the output stage); rst_n is an active-low
// asynchronous reset; start/step/limit/div_n are the generator's initial
// values (step and div_n are used by generator I only); scc_out is the SCC
// at half the clk_in frequency; mod_out is the modulating signal aligned
// with scc_out; rec_clk_out = scc_out XOR mod_out; profile is the value the
// controller currently offers; skip_strobe is high in the clk_in cycle in
// which the down-counter is 0.
module scc_modulator
  import scc_pkg::*;
#(
  parameter int unsigned WIDTH = PROFILE_W,
  parameter gen_sel_e    GEN   = GEN_ADDER
) (
  input  logic             clk_in,
  input  logic             rst_n,
  input  logic [WIDTH-1:0] start,
  input  logic [WIDTH-1:0] step,
  input  logic [WIDTH-1:0] limit,
  input  logic [WIDTH-1:0] div_n,
  output logic             scc_out,
  output logic             mod_out,
  output logic             rec_clk_out,
  output logic [WIDTH-1:0] profile,
  output logic             skip_strobe
);

  logic mod_sig;

  generate
    if (GEN == GEN_ADDER) begin : g_gen_i
      sawtooth_gen_i #(.WIDTH(WIDTH)) u_gen (
        .clk     (clk_in),
        .rst_n   (rst_n),
        .advance (skip_strobe),
        .start   (start),
        .step    (step),
        .limit   (limit),
        .div_n   (div_n),
        .value   (profile)
      );
    end else begin : g_gen_ii
      sawtooth_gen_ii #(.WIDTH(WIDTH)) u_gen (
        .clk     (clk_in),
        .rst_n   (rst_n),
        .advance (skip_strobe),
        .start   (start),
        .limit   (limit),
        .value   (profile)
      );
    end
  endgenerate

  scc_down_counter #(.WIDTH(WIDTH)) u_cnt (
    .clk     (clk_in),
    .rst_n   (rst_n),
    .value   (profile),
    .zero    (skip_strobe),
    .mod_sig (mod_sig)
  );

  gf_clock_mux u_mux (
    .clk_in      (clk_in),
    .rst_n       (rst_n),
    .mod_in      (mod_sig),
    .scc_out     (scc_out),
    .mod_out     (mod_out),
    .rec_clk_out (rec_clk_out)
  );

endmodule
