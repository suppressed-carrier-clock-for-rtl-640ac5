`timescale 1ns/1ps
// scc_profile_monitor: measures the modulation profile of a suppressed
// carrier clock. It samples the SCC at every rising edge of the clock that
// drives the modulator (the SCC only changes on falling edges), counts the
// transitions between two samples that are equal (a skipped transition), and
// reports each run length with a one-cycle run_valid strobe. It also counts
// the skips. Monitoring starts at the first SCC transition after rst_n rises.
module scc_profile_monitor (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        scc,
  output logic        run_valid,
  output int unsigned run_len,
  output int unsigned skips
);
  logic        prev;
  int unsigned cnt;
  bit          seen;

  initial begin
    prev = 1'b0; cnt = 0; seen = 1'b0; skips = 0; run_valid = 1'b0; run_len = 0;
  end

  always @(posedge clk) begin
    run_valid <= 1'b0;
    if (rst_n && !seen) begin
      // Wait for the first transition after reset.
      if (scc != prev) begin
        seen = 1'b1;
        cnt  = 1;
      end
      prev = scc;
    end else if (rst_n) begin
      if (scc != prev) begin
        cnt = cnt + 1;
      end else begin
        run_valid <= 1'b1;
        run_len   <= cnt;
        skips     <= skips + 1;
        cnt = 0;
      end
      prev = scc;
    end
  end
endmodule
