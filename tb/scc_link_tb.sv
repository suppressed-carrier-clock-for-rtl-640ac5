`timescale 1ns/1ps
// scc_link_tb: end-to-end test of the SCC link at its default parameters
// (generator I, series 1, 3, 5, 7, 9, 11, 1 ns slot). The regular clock
// (1 ns period) drives the modulator; the SCC feeds the demodulator model.
// Checked: the measured profile against the reference series; the locally
// recovered clock changing in every slot; the demodulator's recovered clock
// rising exactly every 2 ns after settling, across skipped transitions; the
// length of one modulation period (sum of (value+1) over the series = 42
// slots) from restart to restart. Each mechanism must occur: skipped
// transitions, series restarts at the comparator, skips bridged by the
// demodulator.
module scc_link_tb;
  import scc_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic scc, mod_o, rec_local, rec, skip, pulse;
  logic [PROFILE_W-1:0] profile;
  int unsigned checks = 0, failures = 0;

  scc_link dut (.clk_in(clk), .rst_n, .scc_out(scc), .mod_out(mod_o),
                .rec_clk_local(rec_local), .rec_clk(rec), .profile,
                .skip_strobe(skip), .rec_pulse(pulse));

  always #0.5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int unsigned ck, f, runs, restarts, max_run;
  scc_profile_checker #(.START(DEF_START), .STEP(DEF_STEP), .LIMIT(DEF_LIMIT),
                        .DIV(DEF_DIV)) chk (
    .clk, .rst_n, .scc, .rec_clk(rec_local), .checks(ck), .failures(f),
    .runs, .restarts, .max_run);

  // Expected modulation period in slots.
  function automatic int unsigned period_slots();
    int unsigned s = 0;
    for (int unsigned v = DEF_START; v <= DEF_LIMIT; v += DEF_STEP) s += (v + 1) * DEF_DIV;
    return s;
  endfunction

  // Restart-to-restart distance, from the profile register.
  int unsigned cyc = 0, last_restart = 0, n_restart = 0, period_checks = 0;
  logic [PROFILE_W-1:0] prev_profile = '0;
  always @(posedge clk) if (rst_n) begin
    cyc++;
    if (profile < prev_profile) begin
      if (n_restart > 0) begin
        checks++;
        period_checks++;
        if (cyc - last_restart != period_slots()) begin
          failures++;
          $display("modulation period %0d slots, expected %0d", cyc - last_restart, period_slots());
        end
      end
      n_restart++;
      last_restart = cyc;
    end
    prev_profile = profile;
  end

  // Demodulated clock: period 2 ns once settled; count skips it bridges.
  realtime last_rec = 0.0;
  bit      armed = 1'b0;
  int unsigned rec_edges = 0, skips_bridged = 0;
  always @(posedge rec) begin
    if (armed) begin
      checks++;
      rec_edges++;
      if (($realtime - last_rec) > 2.001 || ($realtime - last_rec) < 1.999) begin
        failures++;
        $display("recovered clock period %0.3f ns at %0.3f", $realtime - last_rec, $realtime);
      end
    end
    last_rec = $realtime;
  end
  always @(posedge clk) if (armed && skip) skips_bridged++;

  initial begin
    repeat (3) @(posedge clk);
    #0.2 rst_n = 1'b1;
    repeat (10) @(posedge clk);
    @(posedge rec);
    armed = 1'b1;
    repeat (5000) @(posedge clk);
    armed = 1'b0;
    checks += ck + 3;
    failures += f;
    if (chk.u_mon.skips == 0) begin failures++; $display("no skipped transition"); end
    if (restarts == 0 || period_checks == 0) begin failures++; $display("no series restart"); end
    if (skips_bridged == 0 || rec_edges < 2400) begin
      failures++; $display("demodulator bridged %0d skips, %0d edges", skips_bridged, rec_edges);
    end
    $display("mechanisms: skips %0d, restarts %0d, skips bridged by demodulator %0d, runs %0d",
             chk.u_mon.skips, restarts, skips_bridged, runs);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
