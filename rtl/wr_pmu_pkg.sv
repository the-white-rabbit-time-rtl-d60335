// Shared types, constants and time arithmetic of the WR-PMU timing block.
//
// A PMU time is a UTC second counter plus a nanosecond counter (0 .. 10^9-1),
// the same split as the time read from the White Rabbit node. The internal
// clock keeps an additional femtosecond residue, which is not part of the
// published time. The widths (32-bit seconds, 30-bit nanoseconds) are this
// design's choice; the split itself follows the clock structure of the design.
package wr_pmu_pkg;

  localparam int unsigned NS_PER_SEC = 1_000_000_000;
  localparam int unsigned FS_PER_NS  = 1_000_000;

  typedef struct packed {
    logic [31:0] sec;
    logic [29:0] ns;
  } pmu_time_t;

  // a - b in nanoseconds (signed, 64 bit)
  function automatic logic signed [63:0] time_diff_ns(pmu_time_t a, pmu_time_t b);
    logic signed [63:0] ds, dn;
    ds = $signed({32'd0, a.sec}) - $signed({32'd0, b.sec});
    dn = $signed({34'd0, a.ns}) - $signed({34'd0, b.ns});
    return ds * 64'sd1_000_000_000 + dn;
  endfunction

  // t + d, with |d| < 1 s, normalised so that 0 <= ns < 10^9
  function automatic pmu_time_t time_add_ns(pmu_time_t t, logic signed [31:0] d);
    pmu_time_t r;
    logic signed [32:0] n;
    n = $signed({3'd0, t.ns}) + 33'(d);
    r.sec = t.sec;
    if (n >= 33'sd1_000_000_000) begin
      n = n - 33'sd1_000_000_000;
      r.sec = t.sec + 32'd1;
    end else if (n < 0) begin
      n = n + 33'sd1_000_000_000;
      r.sec = t.sec - 32'd1;
    end
    r.ns = n[29:0];
    return r;
  endfunction

endpackage
