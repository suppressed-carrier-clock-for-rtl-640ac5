`timescale 1ns/1ps
// scc_link: a complete suppressed carrier clock (SCC) link, the saw-tooth
// SCC modulator driving the SCC demodulator.
//
// The modulator turns the regular clock clk_in into the SCC, whose carrier
// is clk_in/2 with one transition skipped at the end of every profile value
// (START, START+STEP, ... up to LIMIT, each used DIV_N times, then again from
// START). The spectrum of such a clock has no line at the carrier frequency
// and its harmonics; its energy sits in side bands. The demodulator, at the
// receiving end, rebuilds a regular clock from the SCC alone. The local
// recovered clock rec_clk_local needs the modulating signal as well.
//
// The parameters' defaults are the generator's worked example (1, 3, 5, 7, 9,
// 11) with generator I; the slot time of the demodulator model is
// T_SLOT = 1 ns (500 MHz carrier). The demodulator is a behavioural model
// with transport delays; everything else is synthesizable.
//
// Ports: clk_in, rst_n (active-low asynchronous); scc_out; mod_out
// (modulating signal aligned with scc_out); rec_clk_local (scc_out XOR
// mod_out); rec_clk (demodulator output); profile (current profile value);
// skip_strobe (one clk_in cycle per skipped transition); rec_pulse (the
// demodulator's slot pulse train, one pulse per transition slot).
module scc_link
  import scc_pkg::*;
#(
  parameter int unsigned WIDTH = PROFILE_W,
  parameter gen_sel_e    GEN   = GEN_ADDER,
  parameter int unsigned START = DEF_START,
  parameter int unsigned STEP  = DEF_STEP,
  parameter int unsigned LIMIT = DEF_LIMIT,
  parameter int unsigned DIV_N = DEF_DIV,
  parameter realtime     T_SLOT = 1.0
) (
  input  logic             clk_in,
  input  logic             rst_n,
  output logic             scc_out,
  output logic             mod_out,
  output logic             rec_clk_local,
  output logic             rec_clk,
  output logic [WIDTH-1:0] profile,
  output logic             skip_strobe,
  output logic             rec_pulse
);

  scc_modulator #(.WIDTH(WIDTH), .GEN(GEN)) u_mod (
    .clk_in      (clk_in),
    .rst_n       (rst_n),
    .start       (WIDTH'(START)),
    .step        (WIDTH'(STEP)),
    .limit       (WIDTH'(LIMIT)),
    .div_n       (WIDTH'(DIV_N)),
    .scc_out     (scc_out),
    .mod_out     (mod_out),
    .rec_clk_out (rec_clk_local),
    .profile     (profile),
    .skip_strobe (skip_strobe)
  );

  scc_demodulator #(.T_SLOT(T_SLOT)) u_demod (
    .scc_in      (scc_out),
    .rec_clk_out (rec_clk),
    .pulse_out   (rec_pulse)
  );

endmodule
