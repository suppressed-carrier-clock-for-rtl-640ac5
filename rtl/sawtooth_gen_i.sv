`timescale 1ns/1ps
// sawtooth_gen_i: saw-tooth modulation profile generator built from a
// multiplexer, an adder, a comparator, a divider and a register.
//
// The register holds the profile value handed to the down-counter. Each time
// the divider has seen div_n "advance" strobes (the down-counter reaching 0)
// the register takes a new value: the multiplexer loads the initial value
// start when the comparator finds that the register has reached limit, and
// the adder's output value + step otherwise. With start = 1, step = 2,
// limit = 11 and div_n = 1 the register runs 1, 3, 5, 7, 9, 11, 1, ...;
// div_n = 2 repeats every value (1, 1, 3, 3, 5, 5, ...). Any increasing
// arithmetic series can be set up this way.
//
// The structure follows the published generator. This design's choices:
// the comparator tests "value >= limit" so that a limit not on the series
// still restarts it (after the first value past the limit); the initial
// values are input ports, meant to be tied to constants; div_n = 0 is treated
// like 1; the adder wraps modulo 2**WIDTH; reset loads start and clears the
// divider.
//
// Timing: value changes on the rising edge of clk at which the divider
// count completes, the same edge at which the down-counter loads the old
// value; it is a registered output.
module sawtooth_gen_i #(
  parameter int unsigned WIDTH = scc_pkg::PROFILE_W
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             advance,   // down-counter at 0
  input  logic [WIDTH-1:0] start,     // initial value for the multiplexer
  input  logic [WIDTH-1:0] step,      // initial value for the adder
  input  logic [WIDTH-1:0] limit,     // initial value for the comparator
  input  logic [WIDTH-1:0] div_n,     // divider ratio
  output logic [WIDTH-1:0] value
);

  logic [WIDTH-1:0] div_q;
  logic             div_tick;
  logic             at_limit;
  logic [WIDTH-1:0] sum;
  logic [WIDTH-1:0] next_value;

  // Divider: one tick every div_n advance strobes.
  assign div_tick = advance && ((div_q + 1'b1) >= div_n);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        div_q <= '0;
    else if (div_tick) div_q <= '0;
    else if (advance)  div_q <= div_q + 1'b1;
  end

  // Adder, comparator, multiplexer.
  assign sum        = value + step;
  assign at_limit   = (value >= limit);
  assign next_value = at_limit ? start : sum;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        value <= start;
    else if (div_tick) value <= next_value;
  end

endmodule
