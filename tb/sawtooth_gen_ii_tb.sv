`timescale 1ns/1ps
// sawtooth_gen_ii_tb: self-checking test of saw-tooth profile generator II
// (up-counter and comparator). Random advance strobes step it through the
// series 1..100 and a few other start/limit pairs; each value is compared
// with the reference model (increment 1, no repetition).
module sawtooth_gen_ii_tb;
  import scc_ref_pkg::*;
  localparam int W = 8;
  logic         clk = 1'b0, rst_n = 1'b0, advance = 1'b0;
  logic [W-1:0] start, limit, value;
  int checks = 0, failures = 0;

  sawtooth_gen_ii #(.WIDTH(W)) dut (.clk, .rst_n, .advance, .start, .limit, .value);

  always #1 clk = ~clk;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_cfg(int unsigned s, int unsigned l, int unsigned n_adv);
    saw_ref r;
    int unsigned exp_v;
    r = new(s, 1, l, 1);
    start = W'(s); limit = W'(l);
    rst_n = 1'b0;
    repeat (2) @(posedge clk);
    #0.3 rst_n = 1'b1;
    exp_v = r.next();
    for (int i = 0; i < int'(n_adv); i++) begin
      checks++;
      if (value !== W'(exp_v)) begin
        failures++;
        $display("cfg %0d/%0d step %0d: value %0d expected %0d", s, l, i, value, exp_v);
      end
      repeat ($urandom % 3) @(posedge clk);   // idle cycles between strobes
      #0.3;
      advance = 1'b1;
      @(posedge clk);
      #0.3 advance = 1'b0;
      exp_v = r.next();
    end
  endtask

  initial begin
    run_cfg(1, 100, 250);
    run_cfg(1, 11, 30);
    run_cfg(50, 50, 10);
    run_cfg(20, 255, 300);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
