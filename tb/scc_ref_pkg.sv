`timescale 1ns/1ps
// scc_ref_pkg: reference model of the saw-tooth modulation profile, used by
// the testbenches to predict the profile values independently of the RTL.
// The series starts at start, grows by step, restarts at start after the
// value that reaches limit, and holds every value for div profile entries.
package scc_ref_pkg;

  class saw_ref;
    int unsigned start, step, limit, div;
    int unsigned cur;
    int unsigned rep;

    function new(int unsigned start, int unsigned step,
                 int unsigned limit, int unsigned div);
      this.start = start;
      this.step  = step;
      this.limit = limit;
      this.div   = (div == 0) ? 1 : div;
      this.cur   = start;
      this.rep   = 0;
    endfunction

    // Returns the next profile value of the series.
    function int unsigned next();
      int unsigned v;
      v = cur;
      rep++;
      if (rep == div) begin
        rep = 0;
        cur = (cur >= limit) ? start : cur + step;
      end
      return v;
    endfunction
  endclass

endpackage
