`timescale 1ns/1ps
// scc_spectrum_tb: line spectrum of the SCC around its carrier, compared
// with a regular clock. Each link runs from reset until its profile restarts;
// the SCC is then sampled once per slot for exactly one modulation period of
// N slots (each sample +1 or -1). Because the regular carrier sampled this
// way is (-1)^n, the spectral lines of the SCC at carrier + k/N (k = -K..K)
// are X[k] = (1/N) * sum_n s[n] * (-1)^n * exp(-j*2*pi*k*n/N), while the
// regular clock gives |X[0]| = 1. Suppression = -20*log10(max |X[k]|).
// The measured spectra are compared with the same sums computed from the
// reference model of the profile (a modulating sign that flips after every
// value+1 slots), and with the behaviour the SCC is meant to have:
//   * no line at the carrier (|X[0]| below -100 dB) for the saw-tooth
//     1..100 with divider 2 and for the constant profile 50, whose
//     modulating signal is balanced over a period;
//   * the saw-tooth suppresses the peak line by about 18 dB, clearly more
//     than the constant spacing.
module scc_spectrum_tb;
  import scc_pkg::*;
  import scc_ref_pkg::*;
  localparam int K = 150;             // side-band lines examined each side
  logic clk = 1'b0, rst_n = 1'b0;
  int unsigned checks = 0, failures = 0;

  always #0.5 clk = ~clk;

  initial begin : watchdog
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic scc_s, scc_f, scc_e;
  logic [PROFILE_W-1:0] prof_s, prof_f, prof_e;
  logic unused_s[6], unused_f[6], unused_e[6];

  scc_link #(.START(1), .STEP(1), .LIMIT(100), .DIV_N(2)) saw (
    .clk_in(clk), .rst_n, .scc_out(scc_s), .mod_out(unused_s[0]), .rec_clk_local(unused_s[1]),
    .rec_clk(unused_s[2]), .profile(prof_s), .skip_strobe(unused_s[3]), .rec_pulse(unused_s[4]));
  scc_link #(.START(50), .STEP(0), .LIMIT(50), .DIV_N(1)) flat (
    .clk_in(clk), .rst_n, .scc_out(scc_f), .mod_out(unused_f[0]), .rec_clk_local(unused_f[1]),
    .rec_clk(unused_f[2]), .profile(prof_f), .skip_strobe(unused_f[3]), .rec_pulse(unused_f[4]));
  scc_link ex (
    .clk_in(clk), .rst_n, .scc_out(scc_e), .mod_out(unused_e[0]), .rec_clk_local(unused_e[1]),
    .rec_clk(unused_e[2]), .profile(prof_e), .skip_strobe(unused_e[3]), .rec_pulse(unused_e[4]));

  // Peak line (max over k) and carrier line (k = 0) of a +/-1 sequence
  // multiplied by (-1)^n, in dB relative to a regular clock.
  function automatic void lines(input int s[$], output real peak_db, output real carrier_db);
    real re, im, mag, peak, w;
    int  n_len;
    n_len = s.size();
    peak = 0.0;
    carrier_db = 0.0;
    for (int k = -K; k <= K; k++) begin
      re = 0.0; im = 0.0;
      w = 2.0 * 3.14159265358979 * real'(k) / real'(n_len);
      for (int n = 0; n < n_len; n++) begin
        re += real'(s[n] * ((n % 2) ? -1 : 1)) * $cos(w * real'(n));
        im -= real'(s[n] * ((n % 2) ? -1 : 1)) * $sin(w * real'(n));
      end
      mag = $sqrt(re * re + im * im) / real'(n_len);
      if (mag > peak) peak = mag;
      if (k == 0) carrier_db = 20.0 * $log10(mag + 1.0e-12);
    end
    peak_db = 20.0 * $log10(peak);
  endfunction

  // Reference: modulating sign flips after value+1 slots, carrier (-1)^n.
  function automatic void ref_seq(int unsigned st, int unsigned inc, int unsigned lim,
                                  int unsigned dv, int unsigned n_vals, output int s[$]);
    saw_ref r;
    int     sign = 1;
    int unsigned v;
    r = new(st, inc, lim, dv);
    s.delete();
    for (int unsigned i = 0; i < n_vals; i++) begin
      v = r.next();
      for (int unsigned j = 0; j <= v; j++) begin
        s.push_back(sign * ((s.size() % 2) ? -1 : 1));
      end
      sign = -sign;
    end
  endfunction

  // Record one modulation period of an SCC, starting at a profile restart
  // (a constant profile has none; any point of it will do, the window being
  // a whole number of periods and the magnitudes shift-invariant).
  task automatic record(ref logic scc, ref logic [PROFILE_W-1:0] prof,
                        input int unsigned n_slots, input bit constant, output int s[$]);
    logic [PROFILE_W-1:0] prev;
    s.delete();
    prev = prof;
    if (constant) repeat (200) @(posedge clk);
    else forever begin
      @(posedge clk);
      if (prof < prev) break;
      prev = prof;
    end
    repeat (3) @(posedge clk);   // SCC lags the profile register by three edges
    for (int unsigned i = 0; i < n_slots; i++) begin
      s.push_back(scc ? 1 : -1);
      @(posedge clk);
    end
  endtask

  task automatic compare(string name, int meas[$], int refs[$],
                         output real peak_db, output real carrier_db);
    real rp, rc;
    lines(meas, peak_db, carrier_db);
    lines(refs, rp, rc);
    checks += 2;
    if ((peak_db - rp) > 0.01 || (rp - peak_db) > 0.01) begin
      failures++; $display("%s: peak line %0.2f dB, reference %0.2f dB", name, peak_db, rp);
    end
    if ((carrier_db - rc) > 0.01 || (rc - carrier_db) > 0.01) begin
      // Both may sit at the numerical floor; only a difference above it counts.
      if (carrier_db > -100.0 || rc > -100.0) begin
        failures++; $display("%s: carrier line %0.2f dB, reference %0.2f dB", name, carrier_db, rc);
      end
    end
    $display("%s: %0d slots, carrier line %0.1f dB, peak line %0.2f dB below a regular clock",
             name, meas.size(), carrier_db, -peak_db);
  endtask

  int  m_s[$], m_f[$], m_e[$], r_s[$], r_f[$], r_e[$];
  real pk_s, ca_s, pk_f, ca_f, pk_e, ca_e;

  initial begin
    repeat (3) @(posedge clk);
    #0.2 rst_n = 1'b1;
    fork
      record(scc_s, prof_s, 10300, 1'b0, m_s);
      record(scc_f, prof_f, 51 * 20, 1'b1, m_f);
      record(scc_e, prof_e, 42, 1'b0, m_e);
    join
    ref_seq(1, 1, 100, 2, 200, r_s);
    ref_seq(50, 0, 50, 1, 20, r_f);
    ref_seq(1, 2, 11, 1, 6, r_e);
    compare("saw-tooth 1..100 x2", m_s, r_s, pk_s, ca_s);
    compare("constant 50", m_f, r_f, pk_f, ca_f);
    compare("default 1,3,..,11", m_e, r_e, pk_e, ca_e);
    checks += 4;
    if (ca_s > -100.0 || ca_f > -100.0) begin
      failures++; $display("carrier line not suppressed");
    end
    if (-pk_s < 17.0) begin
      failures++; $display("saw-tooth suppression only %0.2f dB", -pk_s);
    end
    if (-pk_s < -pk_f + 6.0) begin
      failures++; $display("saw-tooth not clearly better than the constant profile");
    end
    if (-pk_e <= 0.0) begin
      failures++; $display("default series does not suppress the peak line");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
