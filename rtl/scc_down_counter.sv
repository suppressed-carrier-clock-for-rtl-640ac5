`timescale 1ns/1ps
// scc_down_counter: turns profile values into the modulating signal.
//
// The counter loads the current profile value, counts it down to 0 on the
// rising edges of the regular clock, and, in the cycle in which it reads 0,
// reloads and toggles the modulating signal. Each toggle makes the glitch-free
// multiplexer switch between the clock and its inverse, i.e. skip one
// transition. With a profile value P held in the counter, the modulating
// signal therefore toggles every P+1 clock periods and the SCC makes P
// transitions between the two skips. The load on "all 0" and the switch of
// the multiplexer at that moment follow the published design; the reset
// values (count 0, so the first value is loaded in the first cycle, and the
// modulating signal low) are this design's choice.
//
// Ports: clk, rst_n, value (profile value, sampled when the count is 0),
// zero (high during the cycle in which the count is 0; also the "advance"
// strobe for the profile generator), mod_sig (modulating signal, a
// registered output). An assertion checks that mod_sig changes only after a
// zero cycle; its reset qualifier makes lint report rst_n as used both
// synchronously and asynchronously, which is expected.
module scc_down_counter #(
  parameter int unsigned WIDTH = scc_pkg::PROFILE_W
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [WIDTH-1:0] value,
  output logic             zero,
  output logic             mod_sig
);

  logic [WIDTH-1:0] count_q;

  assign zero = (count_q == '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      count_q <= '0;
      mod_sig <= 1'b0;
    end else if (zero) begin
      count_q <= value;
      mod_sig <= ~mod_sig;
    end else begin
      count_q <= count_q - 1'b1;
    end
  end

  // The modulating signal may change only at a zero of the count, so every
  // skipped transition is accounted for by exactly one loaded value.
  a_toggle_at_zero: assert property (@(posedge clk) disable iff (!rst_n)
                                     $changed(mod_sig) |-> $past(zero));

endmodule
