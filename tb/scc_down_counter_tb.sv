`timescale 1ns/1ps
// scc_down_counter_tb: self-checking test of the down-counter. The profile
// value input changes at random every cycle; the counter must sample it only
// in the cycle in which it reads 0, then read 0 again exactly value+1 cycles
// later, and toggle the modulating signal once per zero cycle.
module scc_down_counter_tb;
  localparam int W = 8;
  logic         clk = 1'b0, rst_n = 1'b0;
  logic [W-1:0] value = '0;
  logic         zero, mod_sig;
  int checks = 0, failures = 0;

  scc_down_counter #(.WIDTH(W)) dut (.clk, .rst_n, .value, .zero, .mod_sig);

  always #1 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int   cyc = 0;
  int   next_zero = 0;       // cycle at which the next zero is due
  logic exp_mod = 1'b0;
  int   zeros = 0;

  initial begin
    repeat (2) @(posedge clk);
    #0.3 rst_n = 1'b1;
    while (zeros < 400) begin
      @(posedge clk);
      // Sample just before the edge takes effect: the values seen here are
      // the ones the counter used at this edge.
      checks += 2;
      if (zero !== (cyc == next_zero)) begin
        failures++; $display("zero=%b at cycle %0d, expected at %0d", zero, cyc, next_zero);
      end
      if (mod_sig !== exp_mod) begin
        failures++; $display("mod_sig wrong at cycle %0d", cyc);
      end
      if (cyc == next_zero) begin
        next_zero = cyc + int'(value) + 1;
        exp_mod   = ~exp_mod;
        zeros++;
      end
      cyc++;
      #0.3 value = W'($urandom % 24);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
