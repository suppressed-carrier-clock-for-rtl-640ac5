`timescale 1ns/1ps
// gf_clock_mux_tb: self-checking test of the glitch-free SCC multiplexer.
// A random modulating signal, changed just after rising edges of the clock,
// drives the multiplexer. After every falling edge the outputs are compared
// with the product rule: scc_out = carrier XOR (modulating signal re-timed
// once), carrier being the count of rising edges since reset modulo 2. It
// also checks that scc_out never changes away from a falling edge (no
// glitch), that rec_clk_out equals the carrier, and that between two
// modulating-signal changes P+1 cycles apart the SCC makes P transitions.
module gf_clock_mux_tb;
  logic clk = 1'b0, rst_n = 1'b0, mod_in = 1'b0;
  logic scc_out, mod_out, rec_clk_out;
  int   checks = 0, failures = 0;
  int   n_rise = 0;
  logic mod_sampled = 1'b0;
  logic in_fall = 1'b0;
  int   cycles = 0;

  gf_clock_mux dut (.clk_in(clk), .rst_n, .mod_in, .scc_out, .mod_out, .rec_clk_out);

  always #1 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Reference state, sampled at rising edges.
  always @(posedge clk) if (rst_n) begin
    n_rise++;
    mod_sampled = mod_in;
  end

  // Compare shortly after each falling edge.
  always @(negedge clk) if (rst_n && n_rise > 0) begin
    in_fall = 1'b1;
    #0.2;
    in_fall = 1'b0;
    checks += 3;
    if (scc_out !== ((n_rise[0]) ^ mod_sampled)) begin
      failures++; $display("scc mismatch at rise %0d", n_rise);
    end
    if (mod_out !== mod_sampled) begin
      failures++; $display("mod_out mismatch at rise %0d", n_rise);
    end
    if (rec_clk_out !== n_rise[0]) begin
      failures++; $display("rec_clk mismatch at rise %0d", n_rise);
    end
  end

  // scc_out may only move at a falling edge.
  always @(scc_out) if (rst_n && !in_fall) begin
    failures++; $display("scc_out moved away from a falling edge at %t", $realtime);
  end

  // Run-length check: skip spacing equals modulating-signal change spacing.
  int unsigned gap_q[$];
  int unsigned since_change = 0;
  int unsigned run_cnt = 0, runs_checked = 0;
  logic scc_prev = 1'b0;
  bit   first_skip = 1'b1;
  bit   started = 1'b0;
  always @(negedge clk) if (rst_n && n_rise > 0) started <= 1'b1;
  always @(posedge clk) if (rst_n && started) begin
    if (scc_out != scc_prev) run_cnt++;
    else begin
      if (!first_skip) begin
        checks++;
        runs_checked++;
        if (gap_q.size() == 0 || run_cnt != gap_q[0] - 1) begin
          failures++;
          $display("run %0d at %0d transitions, expected %0d", runs_checked, run_cnt,
                   gap_q.size() ? gap_q[0] - 1 : -1);
        end
        if (gap_q.size()) void'(gap_q.pop_front());
      end else if (gap_q.size()) void'(gap_q.pop_front());
      first_skip = 1'b0;
      run_cnt = 0;
    end
    scc_prev = scc_out;
  end

  initial begin
    int unsigned gap;
    repeat (3) @(posedge clk);
    #0.3 rst_n = 1'b1;
    for (int i = 0; i < 300; i++) begin
      gap = 1 + ($urandom % 12);
      repeat (gap) @(posedge clk);
      #0.3 mod_in = ~mod_in;
      gap_q.push_back(gap);
    end
    repeat (20) @(posedge clk);
    checks++;
    if (runs_checked < 250) begin
      failures++; $display("too few runs checked: %0d", runs_checked);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
