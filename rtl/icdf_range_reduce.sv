// icdf_range_reduce: range reduction of the inverse normal CDF.
// The 32-bit input is the uniform u = din / 2^32. Because Phi^-1 is odd about
// 0.5, inputs at or above 0.5 are folded to a = 2^32 - din and the sign of the
// result is flipped (flip = 1). With p the position of the leading one of a:
//   a = 2^31 (u = 0.5)          -> region HALF, result 0;
//   p >= 31 - M                 -> region CENTRAL: octave i = 30 - p
//                                  (u in [2^-(i+2), 2^-(i+1))), segment j =
//                                  the R bits below the leading one, and the
//                                  offset t in [0,1) within the segment, exact
//                                  as a double; ROM index = i * 2^R + j;
//   otherwise (a < 2^(31-M))    -> region TAIL, a itself goes to the tail unit.
// din = 0 lies outside [2^-32, 1) and is treated as din = 1 (own choice).
// One register stage with clock enable `en`: latency 1.
module icdf_range_reduce
  import qmc_pkg::*;
#(
  parameter int unsigned M = 11,  // octaves in the central region
  parameter int unsigned R = 6    // log2 segments per octave
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 en,
  input  logic                 in_valid,
  input  logic [31:0]          din,
  output logic                 out_valid,
  output icdf_region_e         region,
  output logic                 flip,
  output logic [$clog2(M)+R-1:0] rom_idx,
  output fp64_t                t,
  output logic [31:0]          tail_a
);
  localparam int unsigned IW = $clog2(M) + R;

  logic [31:0] a;
  int          p;
  logic [31:0] off;
  icdf_region_e rg;
  logic [IW-1:0] idx;
  logic [R-1:0]  seg;

  always_comb begin
    a = din[31] ? (32'd0 - din) : din;
    if (a == 32'd0) a = 32'd1;
    p = 0;
    for (int i = 0; i < 32; i++) if (a[i]) p = i;
    off = '0;
    seg = '0;
    idx = '0;
    if (a == 32'h8000_0000) begin
      rg = RG_HALF;
    end else if (p >= 31 - int'(M)) begin
      rg  = RG_CENTRAL;
      seg = R'(a >> (p - int'(R)));
      off = a & ((32'd1 << (p - int'(R))) - 32'd1);
      idx = IW'((30 - p) * (1 << R)) + IW'(seg);
    end else begin
      rg = RG_TAIL;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0; region <= RG_HALF; flip <= 1'b0; rom_idx <= '0;
      t <= FP_ZERO; tail_a <= '0;
    end else if (en) begin
      out_valid <= in_valid;
      region    <= rg;
      flip      <= din[31];
      rom_idx   <= idx;
      t         <= fp64_from_uint(53'(off), p - int'(R));
      tail_a    <= a;
    end
  end

  if (31 < M + R) begin : g_bad
    $error("icdf_range_reduce: M + R must not exceed 31");
  end
endmodule
