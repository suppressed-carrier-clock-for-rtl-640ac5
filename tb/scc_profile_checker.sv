`timescale 1ns/1ps
// scc_profile_checker: measures the modulation profile of an SCC (through
// scc_profile_monitor) and compares every run of transitions between two
// skipped transitions with the saw-tooth reference model. The run that ends
// at the first skip after reset starts at reset, not at a skip, and is not
// compared. It also checks that the locally recovered clock changes in every
// slot. Counters: checks, failures, runs compared, restarts (runs where the
// series went back to its first value), max_run.
module scc_profile_checker #(
  parameter int unsigned START = 1,
  parameter int unsigned STEP  = 2,
  parameter int unsigned LIMIT = 11,
  parameter int unsigned DIV   = 1
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        scc,
  input  logic        rec_clk,
  output int unsigned checks,
  output int unsigned failures,
  output int unsigned runs,
  output int unsigned restarts,
  output int unsigned max_run
);
  import scc_ref_pkg::*;

  logic        run_valid;
  int unsigned run_len, skips;
  saw_ref      r;
  int unsigned prev_exp;
  logic        rec_prev;
  bit          rec_started;

  scc_profile_monitor u_mon (.clk, .rst_n, .scc, .run_valid, .run_len, .skips);

  initial begin
    r = new(START, STEP, LIMIT, DIV);
    checks = 0; failures = 0; runs = 0; restarts = 0; max_run = 0;
    prev_exp = 0; rec_prev = 1'b0; rec_started = 1'b0;
  end

  always @(posedge clk) begin
    if (run_valid && skips > 1) begin
      int unsigned e;
      e = r.next();
      checks++;
      runs++;
      if (runs > 1 && e < prev_exp) restarts++;
      prev_exp = e;
      if (run_len > max_run) max_run = run_len;
      if (run_len != e) begin
        failures++;
        $display("%m: run %0d has %0d transitions, expected %0d", runs, run_len, e);
      end
    end
    // Locally recovered clock: one change per slot.
    if (rst_n) begin
      if (rec_started) begin
        checks++;
        if (rec_clk == rec_prev) begin
          failures++;
          $display("%m: recovered clock missed a slot at %t", $realtime);
        end
      end
      rec_started = (rec_clk != rec_prev) || rec_started;
      rec_prev = rec_clk;
    end
  end
endmodule
