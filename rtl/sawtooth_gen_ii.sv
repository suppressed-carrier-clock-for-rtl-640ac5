`timescale 1ns/1ps
// sawtooth_gen_ii: saw-tooth modulation profile generator built from a
// loadable up-counter and a comparator.
//
// The up-counter holds the profile value handed to the down-counter and
// counts up by one each time the down-counter reaches 0 (advance). When the
// comparator finds that it has reached limit, the counter loads its initial
// value start instead. With start = 1 and limit = 100 it produces the
// saw-tooth profile 1, 2, 3, ..., 100, 1, ... The structure follows the
// published generator; counting on the down-counter's "all 0" strobe, the
// "value >= limit" comparison and the reset to start are this design's
// choices.
//
// Timing: value is registered and changes on the rising edge of clk at which
// advance is high, the same edge at which the down-counter loads the old
// value.
module sawtooth_gen_ii #(
  parameter int unsigned WIDTH = scc_pkg::PROFILE_W
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             advance,   // down-counter at 0
  input  logic [WIDTH-1:0] start,     // initial value of the up-counter
  input  logic [WIDTH-1:0] limit,     // initial value of the comparator
  output logic [WIDTH-1:0] value
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)               value <= start;
    else if (advance) begin
      if (value >= limit)     value <= start;
      else                    value <= value + 1'b1;
    end
  end

endmodule
