// fp64_mul: pipelined IEEE-754 double-precision multiplier.
//
// One product per enabled cycle, latency FP_MUL_LAT (3) enabled cycles:
//   stage 1 unpacks the operands and adds the exponents,
//   stage 2 forms the 106-bit significand product,
//   stage 3 normalises and rounds to nearest, ties to even.
// `en` is a clock enable for the whole pipeline, so a stalled consumer can
// freeze it; `in_valid` travels with the data to `out_valid`.
// Simplifications chosen for this design: subnormal inputs are read as zero
// and underflow flushes to zero; overflow gives infinity; NaN and infinity
// inputs are not treated specially (the accelerator never produces them).
module fp64_mul
  import qmc_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  en,
  input  logic  in_valid,
  input  fp64_t a,
  input  fp64_t b,
  output logic  out_valid,
  output fp64_t y
);

  // stage 1
  logic        v1, s1, z1;
  logic signed [13:0] e1;
  logic [52:0] ma1, mb1;
  // stage 2
  logic        v2, s2, z2;
  logic signed [13:0] e2;
  logic [105:0] p2;

  logic signed [13:0] e_n;
  logic [52:0] m_n;
  logic        rnd;
  logic [53:0] m_r;
  logic signed [13:0] e_r;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v1 <= 1'b0; v2 <= 1'b0; out_valid <= 1'b0;
      s1 <= 1'b0; z1 <= 1'b1; e1 <= '0; ma1 <= '0; mb1 <= '0;
      s2 <= 1'b0; z2 <= 1'b1; e2 <= '0; p2 <= '0;
      y <= FP_ZERO;
    end else if (en) begin
      v1  <= in_valid;
      s1  <= a[63] ^ b[63];
      z1  <= (a[62:52] == 11'd0) || (b[62:52] == 11'd0);
      e1  <= 14'(signed'({3'b0, a[62:52]})) + 14'(signed'({3'b0, b[62:52]})) - 14'sd1023;
      ma1 <= {1'b1, a[51:0]};
      mb1 <= {1'b1, b[51:0]};

      v2 <= v1; s2 <= s1; z2 <= z1; e2 <= e1;
      p2 <= ma1 * mb1;

      out_valid <= v2;
      if (z2 || e_r <= 0)       y <= {s2, 63'd0};
      else if (e_r >= 14'sd2047) y <= {s2, 11'h7FF, 52'd0};
      else                       y <= {s2, e_r[10:0], m_r[51:0]};
    end
  end

  // normalise: product in [1,4)
  always_comb begin
    if (p2[105]) begin
      m_n = p2[105:53];
      e_n = e2 + 14'sd1;
      rnd = p2[52] & ((|p2[51:0]) | p2[53]);
    end else begin
      m_n = p2[104:52];
      e_n = e2;
      rnd = p2[51] & ((|p2[50:0]) | p2[52]);
    end
    m_r = {1'b0, m_n} + 54'(rnd);
    e_r = e_n;
    if (m_r[53]) begin
      m_r = m_r >> 1;
      e_r = e_n + 14'sd1;
    end
  end

endmodule
