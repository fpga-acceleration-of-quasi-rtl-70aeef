// fp64_add: pipelined IEEE-754 double-precision adder (a + b).
//
// One sum per enabled cycle, latency FP_ADD_LAT (3) enabled cycles:
//   stage 1 orders the operands by magnitude and aligns the smaller one,
//           keeping guard, round and sticky bits,
//   stage 2 adds or subtracts the 56-bit significands,
//   stage 3 normalises (leading-zero count) and rounds to nearest, ties to even.
// `en` is a clock enable for the whole pipeline; `in_valid` travels with the
// data to `out_valid`. Simplifications chosen for this design: subnormal
// inputs are read as zero, underflow flushes to zero, an exact cancellation
// gives +0, and NaN/infinity inputs are not treated specially.
module fp64_add
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

  // unpack and order (combinational, before stage 1)
  logic        big_is_a;
  fp64_t       big, sml;
  logic [10:0] eb, es, ediff;
  logic [55:0] mb_c, ms_c, ms_sh;
  logic        sticky_c;

  always_comb begin
    big_is_a = a[62:0] >= b[62:0];
    big = big_is_a ? a : b;
    sml = big_is_a ? b : a;
    eb  = big[62:52];
    es  = sml[62:52];
    mb_c = (eb == 11'd0) ? 56'd0 : {1'b1, big[51:0], 3'b000};
    ms_c = (es == 11'd0) ? 56'd0 : {1'b1, sml[51:0], 3'b000};
    ediff = eb - es;
    if (ediff >= 11'd56) begin
      ms_sh    = 56'd0;
      sticky_c = |ms_c;
    end else begin
      ms_sh    = ms_c >> ediff;
      sticky_c = |(ms_c & ((56'd1 << ediff) - 56'd1));
    end
    ms_sh[0] = ms_sh[0] | sticky_c;
  end

  // stage 1
  logic        v1, s1, sub1;
  logic [10:0] e1;
  logic [55:0] mb1, ms1;
  // stage 2
  logic        v2, s2;
  logic [10:0] e2;
  logic [56:0] sum2;

  // normalisation of stage 2 (combinational)
  logic [56:0] nrm;
  logic signed [12:0] e_n;
  int          lead;
  logic        rnd;
  logic [53:0] m_r;
  logic signed [12:0] e_r;

  always_comb begin
    lead = -1;
    for (int i = 0; i < 57; i++) if (sum2[i]) lead = i;
    if (lead == 56) begin
      nrm = sum2 >> 1;
      nrm[0] = nrm[0] | sum2[0];
      e_n = 13'(e2) + 13'sd1;
    end else if (lead >= 0) begin
      nrm = sum2 << (55 - lead);
      e_n = 13'(e2) - 13'(55 - lead);
    end else begin
      nrm = '0;
      e_n = '0;
    end
    // nrm[55] is the hidden bit, nrm[54:3] the fraction, nrm[2:0] G,R,S
    rnd = nrm[2] & ((|nrm[1:0]) | nrm[3]);
    m_r = {1'b0, nrm[55:3]} + 54'(rnd);
    e_r = e_n;
    if (m_r[53]) begin
      m_r = m_r >> 1;
      e_r = e_n + 13'sd1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v1 <= 1'b0; v2 <= 1'b0; out_valid <= 1'b0;
      s1 <= 1'b0; sub1 <= 1'b0; e1 <= '0; mb1 <= '0; ms1 <= '0;
      s2 <= 1'b0; e2 <= '0; sum2 <= '0;
      y <= FP_ZERO;
    end else if (en) begin
      v1   <= in_valid;
      s1   <= big[63];
      sub1 <= a[63] ^ b[63];
      e1   <= eb;
      mb1  <= mb_c;
      ms1  <= ms_sh;

      v2   <= v1;
      s2   <= s1;
      e2   <= e1;
      sum2 <= sub1 ? ({1'b0, mb1} - {1'b0, ms1}) : ({1'b0, mb1} + {1'b0, ms1});

      out_valid <= v2;
      if (lead < 0 || e_r <= 0)    y <= FP_ZERO;
      else if (e_r >= 13'sd2047)   y <= {s2, 11'h7FF, 52'd0};
      else                         y <= {s2, e_r[10:0], m_r[51:0]};
    end
  end

endmodule
