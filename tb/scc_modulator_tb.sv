`timescale 1ns/1ps
// scc_modulator_tb: self-checking test of the complete SCC modulator with
// both profile generators. Three modulators run from one clock:
//   a: generator I, worked example 1, 3, 5, 7, 9, 11 (the module defaults);
//   b: generator I with divider 2, giving 1, 1, 3, 3, 5, 5, ...;
//   c: generator II, 1, 2, ..., 20.
// The SCC of each is measured (transitions between skipped transitions) and
// compared with the reference series; the locally recovered clock must
// change in every slot, and each skipped transition must match exactly one
// down-counter zero cycle. The first ten runs of modulator a are also
// checked against the literal list, including the cycle count of each run
// (run value plus one clock periods from one skip to the next).
module scc_modulator_tb;
  import scc_pkg::*;
  localparam int W = 8;
  logic clk = 1'b0, rst_n = 1'b0;
  logic scc_a, mod_a, rec_a, skip_a;
  logic scc_b, mod_b, rec_b, skip_b;
  logic scc_c, mod_c, rec_c, skip_c;
  logic [W-1:0] prof_a, prof_b, prof_c;
  int unsigned checks = 0, failures = 0;

  scc_modulator #(.WIDTH(W)) dut_a (
    .clk_in(clk), .rst_n, .start(8'd1), .step(8'd2), .limit(8'd11), .div_n(8'd1),
    .scc_out(scc_a), .mod_out(mod_a), .rec_clk_out(rec_a), .profile(prof_a),
    .skip_strobe(skip_a));
  scc_modulator #(.WIDTH(W), .GEN(GEN_ADDER)) dut_b (
    .clk_in(clk), .rst_n, .start(8'd1), .step(8'd2), .limit(8'd11), .div_n(8'd2),
    .scc_out(scc_b), .mod_out(mod_b), .rec_clk_out(rec_b), .profile(prof_b),
    .skip_strobe(skip_b));
  scc_modulator #(.WIDTH(W), .GEN(GEN_COUNTER)) dut_c (
    .clk_in(clk), .rst_n, .start(8'd1), .step(8'd0), .limit(8'd20), .div_n(8'd0),
    .scc_out(scc_c), .mod_out(mod_c), .rec_clk_out(rec_c), .profile(prof_c),
    .skip_strobe(skip_c));

  int unsigned ck_a, f_a, r_a, rs_a, mx_a;
  int unsigned ck_b, f_b, r_b, rs_b, mx_b;
  int unsigned ck_c, f_c, r_c, rs_c, mx_c;
  scc_profile_checker #(.START(1), .STEP(2), .LIMIT(11), .DIV(1)) chk_a (
    .clk, .rst_n, .scc(scc_a), .rec_clk(rec_a), .checks(ck_a), .failures(f_a),
    .runs(r_a), .restarts(rs_a), .max_run(mx_a));
  scc_profile_checker #(.START(1), .STEP(2), .LIMIT(11), .DIV(2)) chk_b (
    .clk, .rst_n, .scc(scc_b), .rec_clk(rec_b), .checks(ck_b), .failures(f_b),
    .runs(r_b), .restarts(rs_b), .max_run(mx_b));
  scc_profile_checker #(.START(1), .STEP(1), .LIMIT(20), .DIV(1)) chk_c (
    .clk, .rst_n, .scc(scc_c), .rec_clk(rec_c), .checks(ck_c), .failures(f_c),
    .runs(r_c), .restarts(rs_c), .max_run(mx_c));

  always #1 clk = ~clk;

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Literal list and skip spacing for modulator a.
  int unsigned lit[10] = '{1, 3, 5, 7, 9, 11, 1, 3, 5, 7};
  int unsigned cyc = 0, last_skip_cyc = 0, n_skip = 0, strobes_a = 0;
  logic prev_scc_a = 1'b0;
  bit   go = 1'b0;
  always @(negedge clk) if (rst_n && cyc > 0) go <= 1'b1;
  always @(posedge clk) if (rst_n) begin
    cyc++;
    if (skip_a) strobes_a++;
    if (go) begin
      if (scc_a == prev_scc_a) begin
        n_skip++;
        if (n_skip >= 2 && n_skip <= 11) begin
          checks++;
          if (cyc - last_skip_cyc != lit[n_skip-2] + 1) begin
            failures++;
            $display("skip %0d: %0d cycles after the previous one, expected %0d",
                     n_skip, cyc - last_skip_cyc, lit[n_skip-2] + 1);
          end
        end
        last_skip_cyc = cyc;
      end
      prev_scc_a = scc_a;
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    #0.3 rst_n = 1'b1;
    repeat (3000) @(posedge clk);
    checks += ck_a + ck_b + ck_c;
    failures += f_a + f_b + f_c;
    // Every run length of the series must have been seen, restarts included.
    checks += 4;
    if (r_a < 60 || rs_a < 5) begin failures++; $display("a: runs %0d restarts %0d", r_a, rs_a); end
    if (r_b < 60 || rs_b < 2) begin failures++; $display("b: runs %0d restarts %0d", r_b, rs_b); end
    if (r_c < 40 || rs_c < 2 || mx_c != 20) begin failures++; $display("c: runs %0d restarts %0d max %0d", r_c, rs_c, mx_c); end
    // One down-counter zero per skipped transition (within the pipeline lag).
    if (strobes_a < n_skip || strobes_a > n_skip + 2) begin
      failures++; $display("a: %0d zero strobes for %0d skips", strobes_a, n_skip);
    end
    $display("runs a/b/c = %0d/%0d/%0d, restarts %0d/%0d/%0d", r_a, r_b, r_c, rs_a, rs_b, rs_c);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
