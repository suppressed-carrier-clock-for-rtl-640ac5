`timescale 1ns/1ps
// gf_clock_mux: glitch-free multiplexer that builds the suppressed carrier
// clock (SCC) from a regular clock and a modulating signal.
//
// Conceptually the SCC is the regular clock multiplied by a +/-1 modulating
// signal: the multiplexer passes either the clock or its inverse, so every
// change of the modulating signal swallows one clock transition. Switching
// a clock with a bare gate can glitch, so here the clock is never switched
// directly. Instead:
//   * a toggle flip-flop on the rising edge of clk_in makes the carrier
//     (half the frequency of clk_in, one possible transition per clk_in
//     period);
//   * a flip-flop on the same edge re-times the modulating signal;
//   * the exclusive-or of the two is captured on the falling edge of clk_in,
//     half a period after both inputs have settled, so scc_out changes only
//     on falling edges of clk_in and never glitches;
//   * the re-timed modulating signal is captured on the same falling edge
//     (mod_out), so scc_out XOR mod_out gives back the plain carrier
//     (rec_clk_out), the recovered clock of a receiver that knows the
//     modulating signal.
// The flip-flop structure follows the published glitch-free multiplexer;
// the active-low asynchronous reset to all-zero is this design's choice.
//
// Timing: a change of mod_in seen at rising edge k of clk_in suppresses the
// scc_out transition at the falling edge that follows edge k+1 (it is
// re-timed once at edge k+1). Between two changes of mod_in that are P+1
// clk_in periods apart, scc_out makes exactly P transitions.
//
// Ports: clk_in (regular clock, twice the carrier frequency), rst_n,
// mod_in (modulating signal, synchronous to rising clk_in), scc_out,
// mod_out, rec_clk_out.
module gf_clock_mux (
  input  logic clk_in,
  input  logic rst_n,
  input  logic mod_in,
  output logic scc_out,
  output logic mod_out,
  output logic rec_clk_out
);

  logic carrier_q;  // toggle flip-flop, D = not Q
  logic mod_q;      // re-timed modulating signal

  always_ff @(posedge clk_in or negedge rst_n) begin
    if (!rst_n) begin
      carrier_q <= 1'b0;
      mod_q     <= 1'b0;
    end else begin
      carrier_q <= ~carrier_q;
      mod_q     <= mod_in;
    end
  end

  // Output stage on the falling edge, half a period away from the inputs.
  always_ff @(negedge clk_in or negedge rst_n) begin
    if (!rst_n) begin
      scc_out <= 1'b0;
      mod_out <= 1'b0;
    end else begin
      scc_out <= carrier_q ^ mod_q;
      mod_out <= mod_q;
    end
  end

  assign rec_clk_out = scc_out ^ mod_out;

endmodule
