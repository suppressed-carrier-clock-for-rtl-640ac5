`timescale 1ns/1ps
// scc_demodulator_tb: self-checking test of the SCC demodulator model. The
// testbench synthesises an SCC directly: a possible transition every
// T_SLOT = 1 ns, with transitions skipped after random runs of 1 to 15
// transitions, then a stretch of plain clock with no skips, then the
// worked-example saw-tooth 1, 3, 5, 7, 9, 11. After a short settling time,
// the slot pulse train must rise exactly once per slot and the recovered
// clock must rise exactly every 2 ns, whatever the skips.
module scc_demodulator_tb;
  localparam realtime T = 1.0;
  logic scc = 1'b0;
  logic rec, pulse;
  int unsigned checks = 0, failures = 0;
  int unsigned skips_sent = 0, slots = 0;

  scc_demodulator dut (.scc_in(scc), .rec_clk_out(rec), .pulse_out(pulse));

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // One slot: a transition, or a skip.
  task automatic slot(bit skip);
    #(T);
    slots++;
    if (skip) skips_sent++;
    else      scc = ~scc;
  endtask

  task automatic run_then_skip(int unsigned n);
    repeat (n) slot(1'b0);
    slot(1'b1);
  endtask

  // Edge spacing checks, armed after settling.
  bit      armed = 1'b0;
  realtime last_rec = 0.0, last_pulse = 0.0;
  bit      have_rec = 1'b0, have_pulse = 1'b0;
  int unsigned rec_edges = 0, pulse_edges = 0;

  always @(posedge rec) begin
    if (armed && have_rec) begin
      checks++;
      rec_edges++;
      if ((($realtime - last_rec) - 2.0 * T) > 0.001 || ((2.0 * T) - ($realtime - last_rec)) > 0.001) begin
        failures++;
        $display("recovered clock period %0.3f ns at %0.3f", $realtime - last_rec, $realtime);
      end
    end
    last_rec = $realtime;
    have_rec = 1'b1;
  end

  always @(posedge pulse) begin
    if (armed && have_pulse) begin
      checks++;
      pulse_edges++;
      if ((($realtime - last_pulse) - T) > 0.001 || (T - ($realtime - last_pulse)) > 0.001) begin
        failures++;
        $display("slot pulse spacing %0.3f ns at %0.3f", $realtime - last_pulse, $realtime);
      end
    end
    last_pulse = $realtime;
    have_pulse = 1'b1;
  end

  initial begin
    #0.5;
    repeat (4) slot(1'b0);
    armed = 1'b1;
    for (int i = 0; i < 400; i++) run_then_skip(1 + ($urandom % 15));
    repeat (50) slot(1'b0);
    for (int k = 0; k < 20; k++)
      for (int v = 1; v <= 11; v += 2) run_then_skip(v);
    repeat (4) slot(1'b0);
    #(2.0 * T);
    checks += 2;
    if (rec_edges < slots / 2 - 8) begin
      failures++; $display("only %0d recovered clock edges for %0d slots", rec_edges, slots);
    end
    if (skips_sent < 500) begin
      failures++; $display("only %0d skips sent", skips_sent);
    end
    $display("slots %0d skips %0d recovered edges %0d pulses %0d", slots, skips_sent, rec_edges, pulse_edges);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
