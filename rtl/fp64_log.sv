// fp64_log: multi-cycle double-precision natural logarithm of a positive,
// normal double x, built from one fp64_mul and one fp64_add used in turn.
//   x = 2^e * m, m in [1,2); j = top 6 fraction bits of m selects a table
//   entry inv_j ~ 1 / (1 + (j + 0.5)/64) (rounded to double), so
//   r = m * inv_j - 1 has |r| < 2^-7, and
//   ln x = e*ln2 - ln(inv_j) + ln(1 + r),
//   ln(1 + r) = r*(1 + r*(-1/2 + r*(1/3 - ... + r*(1/9)))) (Horner, 9 terms).
// The tables (inv_j and -ln(inv_j) of the rounded inv_j) are computed at
// elaboration. 22 dependent operations are issued one at a time, each waiting
// for its result: `done` rises 22*4 + 1 = 89 cycles after the start edge.
// Interface: pulse `start` with x while `ready`; `done` pulses with y.
// The method is this design's own choice: the logarithm unit is only named.
module fp64_log
  import qmc_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  start,
  input  fp64_t x,
  output logic  ready,
  output logic  done,
  output fp64_t y
);
  localparam int unsigned NT = 9;   // series terms

  typedef fp64_t tab_t [64];
  function automatic tab_t mk_inv();
    tab_t t;
    for (int j = 0; j < 64; j++) t[j] = $realtobits(1.0 / (1.0 + (j + 0.5) / 64.0));
    return t;
  endfunction
  localparam tab_t INV = mk_inv();
  function automatic tab_t mk_nlninv();
    tab_t t;
    for (int j = 0; j < 64; j++) t[j] = $realtobits(-$ln($bitstoreal(INV[j])));
    return t;
  endfunction
  localparam tab_t NLNINV = mk_nlninv();
  typedef fp64_t ser_t [NT+1];
  function automatic ser_t mk_ser();
    ser_t t;
    t[0] = FP_ZERO;
    for (int n = 1; n <= int'(NT); n++) t[n] = $realtobits(((n % 2 == 1) ? 1.0 : -1.0) / n);
    return t;
  endfunction
  localparam ser_t SER = mk_ser();

  localparam int unsigned NSTEP = 3 + 2 * (NT - 1) + 3;   // 22

  logic        busy, wait_res;
  logic [4:0]  step;
  fp64_t       m, e_d, inv, nli, r, p, acc;
  logic        mul_v, add_v, mul_ov, add_ov;
  fp64_t       op_a, op_b, mul_y, add_y;
  logic        is_mul;
  logic [10:0] ex;
  logic [10:0] e_abs;

  fp64_mul u_mul (.clk, .rst_n, .en(1'b1), .in_valid(mul_v), .a(op_a), .b(op_b),
                  .out_valid(mul_ov), .y(mul_y));
  fp64_add u_add (.clk, .rst_n, .en(1'b1), .in_valid(add_v), .a(op_a), .b(op_b),
                  .out_valid(add_ov), .y(add_y));

  // operation of each step
  always_comb begin
    is_mul = 1'b1;
    op_a = p;
    op_b = r;
    if (step == 5'd0) begin
      op_a = m; op_b = inv;                        // r = m * inv
    end else if (step == 5'd1) begin
      is_mul = 1'b0; op_a = r; op_b = FP_NEG_ONE;  // r = r - 1
    end else if (step == 5'd2) begin
      op_a = SER[NT]; op_b = r;                    // p = c9 * r
    end else if (step < 5'(NSTEP - 3)) begin
      if (step[0]) begin                           // p = p + c_n
        is_mul = 1'b0; op_a = p; op_b = SER[NT - 1 - (int'(step) - 3) / 2];
      end else begin                               // p = p * r
        op_a = p; op_b = r;
      end
    end else if (step == 5'(NSTEP - 3)) begin
      op_a = e_d; op_b = FP_LN2;                   // acc = e * ln2
    end else if (step == 5'(NSTEP - 2)) begin
      is_mul = 1'b0; op_a = acc; op_b = nli;       // acc = acc - ln(inv)
    end else begin
      is_mul = 1'b0; op_a = acc; op_b = p;         // y = acc + ln(1+r)
    end
  end

  assign ready = !busy;
  assign mul_v = busy && !wait_res && is_mul;
  assign add_v = busy && !wait_res && !is_mul;
  assign ex    = x[62:52];
  assign e_abs = (ex >= 11'd1023) ? ex - 11'd1023 : 11'd1023 - ex;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0; wait_res <= 1'b0; step <= '0; done <= 1'b0; y <= FP_ZERO;
      m <= FP_ZERO; e_d <= FP_ZERO; inv <= FP_ZERO; nli <= FP_ZERO;
      r <= FP_ZERO; p <= FP_ZERO; acc <= FP_ZERO;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          busy <= 1'b1; wait_res <= 1'b0; step <= '0;
          m   <= {1'b0, 11'd1023, x[51:0]};
          e_d <= fp64_from_uint(53'(e_abs), 0) | {(ex < 11'd1023), 63'd0};
          inv <= INV[x[51:46]];
          nli <= NLNINV[x[51:46]];
        end
      end else if (!wait_res) begin
        wait_res <= 1'b1;
      end else if (mul_ov || add_ov) begin
        fp64_t res;
        res = mul_ov ? mul_y : add_y;
        wait_res <= 1'b0;
        step <= step + 1'b1;
        if (step <= 5'd1) r <= res;
        else if (step < 5'(NSTEP - 3)) p <= res;
        else if (step < 5'(NSTEP - 1)) acc <= res;
        else begin
          y <= res; done <= 1'b1; busy <= 1'b0;
        end
      end
    end
  end
endmodule
