// bb_coeff_rom: Brownian-bridge coefficient table, one entry per time point.
// The bridge fills point p of an NT-step path (t_p = p*T/NT) from the known
// points l < p < r of its interval with
//   W(t_p) = a*W(t_l) + (1-a)*W(t_r) + b*Z,
//   a = (t_r - t_p)/(t_r - t_l),  b = sqrt((t_r - t_p)(t_p - t_l)/(t_r - t_l)).
// With bisection (NT a power of two) the interval of p is fixed by p: its
// half-length h is the lowest set bit of p, l = p - h, r = p + h. Entry NT
// holds the endpoint W(T) = sqrt(T)*Z (a = 1-a = 0, b = sqrt(T)). Entry 0 is
// unused. Entries are {a, 1-a, b} as doubles, computed at elaboration.
// Synchronous read, latency 1. T_HORIZON = 1.0 is this design's choice.
module bb_coeff_rom
  import qmc_pkg::*;
#(
  parameter int unsigned NT        = 512,
  parameter real         T_HORIZON = 1.0
) (
  input  logic                   clk,
  input  logic [$clog2(NT+1)-1:0] addr,
  output fp64_t                  a,
  output fp64_t                  c,
  output fp64_t                  b
);
  typedef fp64_t tab_t [3 * (NT + 1)];   // entry p at 3p (a), 3p+1 (1-a), 3p+2 (b)

  function automatic tab_t build();
    tab_t tb;
    real dt, h, av, bv;
    dt = T_HORIZON / NT;
    for (int p = 0; p <= int'(NT); p++) begin
      if (p == int'(NT)) begin
        av = 0.0; bv = $sqrt(T_HORIZON);
        tb[3*p] = FP_ZERO; tb[3*p+1] = FP_ZERO; tb[3*p+2] = $realtobits(bv);
      end else if (p == 0) begin
        tb[0] = FP_ZERO; tb[1] = FP_ZERO; tb[2] = FP_ZERO;
      end else begin
        h = real'(p & -p);                     // half-length in steps
        av = 0.5;                              // (r - p)/(r - l)
        bv = $sqrt((h * h) / (2.0 * h) * dt);  // sqrt((r-p)(p-l)/(r-l))
        tb[3*p] = $realtobits(av); tb[3*p+1] = $realtobits(1.0 - av); tb[3*p+2] = $realtobits(bv);
      end
    end
    return tb;
  endfunction

  localparam tab_t ROM = build();

  always_ff @(posedge clk) begin
    a <= ROM[3 * int'(addr)];
    c <= ROM[3 * int'(addr) + 1];
    b <= ROM[3 * int'(addr) + 2];
  end

  if ((NT & (NT - 1)) != 0) begin : g_bad
    $error("bb_coeff_rom: NT must be a power of two");
  end
endmodule
