`timescale 1ns/1ps
// scc_demodulator: behavioural model (not synthesizable) of the SCC
// demodulator, which recovers a regular periodic clock from the suppressed
// carrier clock alone, without knowing the modulating signal.
//
// How it works: an exclusive-or of a signal with a copy of itself delayed
// by a quarter clock gives a short pulse at every transition. One such
// transition detector watches the SCC, a second watches the SCC delayed by
// one clock. Where the SCC skipped a transition, the delayed copy still has
// the transition of the slot before, so the OR of the two detectors pulses in
// every transition slot. A divide-by-2 (a toggle on each pulse) turns the
// pulse train back into a square clock with the carrier period. The
// structure (two quarter-clock delayers, a one-clock delayer, two XORs, an
// OR and a divide-by-2) is the published one.
//
// The delays are analog delay lines, so they are modelled here with
// transport delays. This design's choices: "one clock" is one transition
// slot T_SLOT (the period of the clock that feeds the modulator, half the
// carrier period) and "a quarter clock" is T_SLOT/4; T_SLOT defaults to 1 ns,
// the slot of a 500 MHz carrier. The phase of the recovered clock is set by
// the initial state of the divider, which this model starts at 0. Two skips
// in adjacent slots (a profile value of 0) leave a slot with no pulse and
// the recovered clock loses a half period there.
//
// Ports: scc_in (the SCC), rec_clk_out (recovered clock, period 2*T_SLOT),
// pulse_out (the OR output, one pulse per slot).
module scc_demodulator #(
  parameter realtime T_SLOT = 1.0
) (
  input  logic scc_in,
  output logic rec_clk_out,
  output logic pulse_out
);

  logic scc_q;    // SCC after the quarter-clock delayer
  logic scc_d;    // SCC after the one-clock delayer
  logic scc_dq;   // delayed SCC after its quarter-clock delayer

  initial begin
    scc_q       = 1'b0;
    scc_d       = 1'b0;
    scc_dq      = 1'b0;
    rec_clk_out = 1'b0;
  end

  always @(scc_in) scc_q  <= #(T_SLOT / 4.0) scc_in;
  always @(scc_in) scc_d  <= #(T_SLOT) scc_in;
  always @(scc_d)  scc_dq <= #(T_SLOT / 4.0) scc_d;

  assign pulse_out = (scc_in ^ scc_q) | (scc_d ^ scc_dq);

  always @(posedge pulse_out) rec_clk_out <= ~rec_clk_out;

endmodule
