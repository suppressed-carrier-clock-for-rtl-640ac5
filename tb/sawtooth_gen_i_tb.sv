`timescale 1ns/1ps
// sawtooth_gen_i_tb: self-checking test of saw-tooth profile generator I.
// Random advance strobes step the generator through several configurations:
// the worked example 1, 3, ..., 11 (checked against the literal list), the
// same series with every value repeated (divider 2), the series 1..100, a
// constant profile (increment 0) and a limit that is not on the series. Each
// new value is compared with the reference model.
module sawtooth_gen_i_tb;
  import scc_ref_pkg::*;
  localparam int W = 8;
  logic         clk = 1'b0, rst_n = 1'b0, advance = 1'b0;
  logic [W-1:0] start, step, limit, div_n, value;
  int checks = 0, failures = 0;

  sawtooth_gen_i #(.WIDTH(W)) dut (.clk, .rst_n, .advance, .start, .step,
                                   .limit, .div_n, .value);

  always #1 clk = ~clk;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_cfg(int unsigned s, int unsigned st, int unsigned l,
                         int unsigned d, int unsigned n_adv);
    saw_ref r;
    int unsigned exp_v;
    r = new(s, st, l, d);
    start = W'(s); step = W'(st); limit = W'(l); div_n = W'(d);
    rst_n = 1'b0;
    repeat (2) @(posedge clk);
    #0.3 rst_n = 1'b1;
    exp_v = r.next();
    for (int i = 0; i < int'(n_adv); i++) begin
      checks++;
      if (value !== W'(exp_v)) begin
        failures++;
        $display("cfg %0d/%0d/%0d/%0d step %0d: value %0d expected %0d",
                 s, st, l, d, i, value, exp_v);
      end
      repeat ($urandom % 3) @(posedge clk);   // idle cycles between strobes
      #0.3;
      advance = 1'b1;
      @(posedge clk);
      #0.3 advance = 1'b0;
      exp_v = r.next();
    end
  endtask

  int unsigned example[7] = '{1, 3, 5, 7, 9, 11, 1};

  initial begin
    advance = 1'b0;
    start = 8'd1; step = 8'd2; limit = 8'd11; div_n = 8'd1;
    // Literal worked example.
    repeat (2) @(posedge clk);
    #0.3 rst_n = 1'b1;
    foreach (example[i]) begin
      checks++;
      if (value !== W'(example[i])) begin
        failures++; $display("example entry %0d: %0d", i, value);
      end
      advance = 1'b1;
      @(posedge clk);
      #0.3 advance = 1'b0;
      @(posedge clk);
      #0.3;
    end
    run_cfg(1, 2, 11, 1, 40);
    run_cfg(1, 2, 11, 2, 40);
    run_cfg(1, 1, 100, 2, 420);
    run_cfg(50, 0, 50, 1, 20);
    run_cfg(1, 2, 12, 3, 60);
    run_cfg(5, 7, 200, 1, 100);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
