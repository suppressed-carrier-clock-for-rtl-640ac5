`timescale 1ns/1ps
// scc_workloads_tb: runs the SCC link on the modulation profiles used to
// judge the saw-tooth profile, with a 500 MHz carrier (1 ns slot):
//   saw: saw-tooth 1, 1, 2, 2, ..., 100, 100 (generator I, increment 1,
//        divider 2): 200 skips per modulation period, on average one skip
//        per 51.5 slots, 10,300 slots (about 10,000 clocks) per period;
//   flat: the zero-offset profile 50, 50, 50, ... (increment 0);
//   up: generator II counting 1, 2, ..., 100;
//   off: offset 10 around 50, i.e. 40, 41, ..., 60, each value used 10
//        times (about 200 skips per modulation period).
// For each, the measured profile is compared with the reference, the
// demodulator's recovered clock must keep a 2 ns period across every skip,
// and for saw the restart-to-restart distance must be 10,300 slots.
module scc_workloads_tb;
  import scc_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  int unsigned checks = 0, failures = 0;

  always #0.5 clk = ~clk;

  initial begin : watchdog
    repeat (60000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic scc_s, mod_s, recl_s, rec_s, skip_s, pul_s;
  logic scc_f, mod_f, recl_f, rec_f, skip_f, pul_f;
  logic scc_u, mod_u, recl_u, rec_u, skip_u, pul_u;
  logic scc_o, mod_o, recl_o, rec_o, skip_o, pul_o;
  logic [PROFILE_W-1:0] prof_s, prof_f, prof_u, prof_o;

  scc_link #(.START(1), .STEP(1), .LIMIT(100), .DIV_N(2)) saw (
    .clk_in(clk), .rst_n, .scc_out(scc_s), .mod_out(mod_s), .rec_clk_local(recl_s),
    .rec_clk(rec_s), .profile(prof_s), .skip_strobe(skip_s), .rec_pulse(pul_s));
  scc_link #(.START(50), .STEP(0), .LIMIT(50), .DIV_N(1)) flat (
    .clk_in(clk), .rst_n, .scc_out(scc_f), .mod_out(mod_f), .rec_clk_local(recl_f),
    .rec_clk(rec_f), .profile(prof_f), .skip_strobe(skip_f), .rec_pulse(pul_f));
  scc_link #(.GEN(GEN_COUNTER), .START(1), .LIMIT(100)) up (
    .clk_in(clk), .rst_n, .scc_out(scc_u), .mod_out(mod_u), .rec_clk_local(recl_u),
    .rec_clk(rec_u), .profile(prof_u), .skip_strobe(skip_u), .rec_pulse(pul_u));

  scc_link #(.START(40), .STEP(1), .LIMIT(60), .DIV_N(10)) off (
    .clk_in(clk), .rst_n, .scc_out(scc_o), .mod_out(mod_o), .rec_clk_local(recl_o),
    .rec_clk(rec_o), .profile(prof_o), .skip_strobe(skip_o), .rec_pulse(pul_o));

  int unsigned ck[4], f[4], runs[4], rs[4], mx[4];
  scc_profile_checker #(.START(1), .STEP(1), .LIMIT(100), .DIV(2)) chk_s (
    .clk, .rst_n, .scc(scc_s), .rec_clk(recl_s), .checks(ck[0]), .failures(f[0]),
    .runs(runs[0]), .restarts(rs[0]), .max_run(mx[0]));
  scc_profile_checker #(.START(50), .STEP(0), .LIMIT(50), .DIV(1)) chk_f (
    .clk, .rst_n, .scc(scc_f), .rec_clk(recl_f), .checks(ck[1]), .failures(f[1]),
    .runs(runs[1]), .restarts(rs[1]), .max_run(mx[1]));
  scc_profile_checker #(.START(1), .STEP(1), .LIMIT(100), .DIV(1)) chk_u (
    .clk, .rst_n, .scc(scc_u), .rec_clk(recl_u), .checks(ck[2]), .failures(f[2]),
    .runs(runs[2]), .restarts(rs[2]), .max_run(mx[2]));

  scc_profile_checker #(.START(40), .STEP(1), .LIMIT(60), .DIV(10)) chk_o (
    .clk, .rst_n, .scc(scc_o), .rec_clk(recl_o), .checks(ck[3]), .failures(f[3]),
    .runs(runs[3]), .restarts(rs[3]), .max_run(mx[3]));

  // Modulation period of the saw-tooth workload.
  int unsigned cyc = 0, last_restart = 0, n_restart = 0, period_checks = 0;
  logic [PROFILE_W-1:0] prev_prof = '0;
  always @(posedge clk) if (rst_n) begin
    cyc++;
    if (prof_s < prev_prof) begin
      if (n_restart > 0) begin
        checks++;
        period_checks++;
        if (cyc - last_restart != 10300) begin
          failures++; $display("saw: period %0d slots", cyc - last_restart);
        end
      end
      n_restart++;
      last_restart = cyc;
    end
    prev_prof = prof_s;
  end

  // Recovered clock period of the three demodulators.
  bit armed = 1'b0;
  realtime last[4] = '{0.0, 0.0, 0.0, 0.0};
  int unsigned edges[4] = '{0, 0, 0, 0};
  task automatic rec_edge(int i);
    if (armed) begin
      checks++;
      edges[i]++;
      if (($realtime - last[i]) > 2.001 || ($realtime - last[i]) < 1.999) begin
        failures++; $display("link %0d: recovered period %0.3f at %0.3f", i, $realtime - last[i], $realtime);
      end
    end
    last[i] = $realtime;
  endtask
  always @(posedge rec_s) rec_edge(0);
  always @(posedge rec_f) rec_edge(1);
  always @(posedge rec_u) rec_edge(2);
  always @(posedge rec_o) rec_edge(3);

  initial begin
    repeat (3) @(posedge clk);
    #0.2 rst_n = 1'b1;
    repeat (20) @(posedge clk);
    #0.7 armed = 1'b1;
    repeat (32000) @(posedge clk);
    armed = 1'b0;
    for (int i = 0; i < 4; i++) begin
      checks += ck[i] + 1;
      failures += f[i];
      if (edges[i] < 10000) begin failures++; $display("link %0d: %0d edges", i, edges[i]); end
    end
    checks += 4;
    if (rs[3] < 2 || mx[3] != 60)          begin failures++; $display("off: %0d restarts", rs[3]); end
    if (period_checks < 1 || mx[0] != 100) begin failures++; $display("saw: %0d periods, max %0d", period_checks, mx[0]); end
    if (runs[1] < 300 || mx[1] != 50)      begin failures++; $display("flat: %0d runs", runs[1]); end
    if (rs[2] < 2 || mx[2] != 100)         begin failures++; $display("up: %0d restarts", rs[2]); end
    $display("saw runs %0d periods %0d; flat runs %0d; up runs %0d restarts %0d; off runs %0d restarts %0d",
             runs[0], period_checks, runs[1], runs[2], rs[2], runs[3], rs[3]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
