// icdf_coeff_rom: coefficient ROM of the central region of the inverse
// normal CDF. Entry i * 2^R + j holds the KC+1 monomial coefficients
// (c[0] constant term) of the order-KC polynomial in t in [0,1) that
// approximates Phi^-1 on segment j of octave i:
//   u = 2^-(i+2) + (j + t) * 2^-(i+2+R).
// The table is computed at elaboration, one segment at a time (qmc_pkg::central_coeffs: interpolation
// at Chebyshev nodes, a near-minimax fit). It has two read ports, so one ROM
// serves two ICDF lanes; reads are registered (latency 1, enable `en`).
module icdf_coeff_rom
  import qmc_pkg::*;
#(
  parameter int unsigned M  = 11,
  parameter int unsigned R  = 6,
  parameter int unsigned KC = 3
) (
  input  logic                   clk,
  input  logic                   en,
  input  logic [$clog2(M)+R-1:0] addr_a,
  input  logic [$clog2(M)+R-1:0] addr_b,
  output fp64_t                  q_a [KC+1],
  output fp64_t                  q_b [KC+1]
);
  localparam int unsigned NSEG = M * (1 << R);

  // One constant evaluation per segment keeps each within tool step limits.
  fp64_t rom [NSEG][KC+1];
  for (genvar e = 0; e < NSEG; e++) begin : g_seg
    localparam rvec8_t CF = central_coeffs(e / (1 << R), e % (1 << R), R, KC);
    for (genvar k = 0; k <= KC; k++) begin : g_k
      assign rom[e][k] = $realtobits(CF[k]);
    end
  end

  always_ff @(posedge clk) begin
    if (en) begin
      q_a <= rom[addr_a];
      q_b <= rom[addr_b];
    end
  end
endmodule
