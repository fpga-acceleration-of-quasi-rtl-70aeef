// icdf_tail: tail-region evaluation of the inverse normal CDF, multi-cycle,
// with one logarithm unit (fp64_log), one adder and one multiplier.
// A request carries the folded input a (1 <= a < 2^(31-M), i.e.
// x = a/2^32 in [2^-32, 2^-(M+1))), the sign flag and a TAG_W-bit tag.
//   X = a / 2^32 (exact), L = ln X, y = ln(-L)     (two logarithms)
//   s = y - y_c, y_c the centre of the y interval   (one add)
//   P = c0 + s*(c1 + ... + s*c7)                    (Horner, KT mul + KT add)
//   result = flip ? -P : P
// The KT+1 coefficients interpolate Phi^-1 at Chebyshev nodes in y; they
// are computed at elaboration (qmc_pkg::tail_coeffs). Centring on y_c is this
// design's choice, for a well-conditioned monomial form.
// One request at a time: req_ready is high while idle; a result takes about
// about 2*89 + 4 + 2*KT*4 cycles (239 for KT = 7) and is presented for one cycle on resp_valid.
module icdf_tail
  import qmc_pkg::*;
#(
  parameter int unsigned M     = 11,
  parameter int unsigned KT    = 7,
  parameter int unsigned TAG_W = 3
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             req_valid,
  output logic             req_ready,
  input  logic [31:0]      req_a,
  input  logic             req_flip,
  input  logic [TAG_W-1:0] req_tag,
  output logic             resp_valid,
  output fp64_t            resp_y,
  output logic [TAG_W-1:0] resp_tag
);
  typedef fp64_t coef_t [KT+1];
  function automatic coef_t mk_coef();
    coef_t c;
    rvec8_t rc;
    rc = tail_coeffs(M, KT);
    for (int k = 0; k <= int'(KT); k++) c[k] = $realtobits(rc[k]);
    return c;
  endfunction
  localparam coef_t COEF = mk_coef();
  localparam fp64_t NEG_YC = $realtobits(-tail_centre(M));

  typedef enum logic [2:0] {T_IDLE, T_LOG1, T_LOG2, T_ISSUE, T_WAIT} tstate_e;
  tstate_e st;
  logic [4:0] step;          // 0: s = y - yc; then mul/add pairs
  logic       flip;
  logic [TAG_W-1:0] tag;
  fp64_t      s, p;

  logic  log_start, log_ready, log_done;
  fp64_t log_x, log_y;
  logic  mul_v, add_v, mul_ov, add_ov;
  fp64_t op_a, op_b, mul_y, add_y;
  logic  is_mul;

  fp64_log u_log (.clk, .rst_n, .start(log_start), .x(log_x), .ready(log_ready),
                  .done(log_done), .y(log_y));
  fp64_mul u_mul (.clk, .rst_n, .en(1'b1), .in_valid(mul_v), .a(op_a), .b(op_b),
                  .out_valid(mul_ov), .y(mul_y));
  fp64_add u_add (.clk, .rst_n, .en(1'b1), .in_valid(add_v), .a(op_a), .b(op_b),
                  .out_valid(add_ov), .y(add_y));

  // step 0: s = y + (-yc); step 2k-1: p = p * s; step 2k: p = p + c[KT-k]
  always_comb begin
    is_mul = 1'b0;
    op_a = p;
    op_b = NEG_YC;
    if (step == 5'd0) begin
      op_a = s; op_b = NEG_YC;
    end else if (step[0]) begin
      is_mul = 1'b1; op_a = p; op_b = s;
    end else begin
      op_a = p; op_b = COEF[int'(KT) - int'(step) / 2];
    end
  end

  assign req_ready = (st == T_IDLE);
  assign mul_v = (st == T_ISSUE) && is_mul;
  assign add_v = (st == T_ISSUE) && !is_mul;
  assign log_start = (st == T_IDLE && req_valid) || (st == T_LOG1 && log_done);
  assign log_x = (st == T_IDLE) ? fp64_from_uint(53'(req_a), 32) : fp64_neg(log_y);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= T_IDLE; step <= '0; flip <= 1'b0; tag <= '0; s <= FP_ZERO; p <= FP_ZERO;
      resp_valid <= 1'b0; resp_y <= FP_ZERO; resp_tag <= '0;
    end else begin
      resp_valid <= 1'b0;
      case (st)
        T_IDLE: if (req_valid) begin
          st <= T_LOG1; flip <= req_flip; tag <= req_tag;
        end
        T_LOG1: if (log_done) st <= T_LOG2;
        T_LOG2: if (log_done) begin
          s <= log_y; step <= '0; st <= T_ISSUE;
        end
        T_ISSUE: st <= T_WAIT;
        T_WAIT: if (mul_ov || add_ov) begin
          if (step == 5'd0) begin
            s <= add_y;
            p <= COEF[KT];
            step <= 5'd1;
            st <= T_ISSUE;
          end else begin
            p <= mul_ov ? mul_y : add_y;
            if (step == 5'(2 * KT)) begin
              resp_valid <= 1'b1;
              resp_y <= flip ? fp64_neg(add_y) : add_y;
              resp_tag <= tag;
              st <= T_IDLE;
            end else begin
              step <= step + 1'b1;
              st <= T_ISSUE;
            end
          end
        end
        default: st <= T_IDLE;
      endcase
    end
  end
endmodule
