// bb_fp_pipe: Brownian-bridge floating-point pipeline for one asset,
//   w = a*wl + c*wr + b*z   (c = 1 - a),
// in double precision, one result per cycle with a fixed latency of
// FP_MUL_LAT + 2*FP_ADD_LAT = 9 cycles: three multipliers in parallel, then
// a*wl + c*wr while b*z waits in a delay line, then the final sum.
// The pipeline never stalls (no enable), so a controller can schedule it by
// its latency alone and drive several of these in lock-step.
module bb_fp_pipe
  import qmc_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  input  fp64_t a,
  input  fp64_t c,
  input  fp64_t b,
  input  fp64_t wl,
  input  fp64_t wr,
  input  fp64_t z,
  output logic  out_valid,
  output fp64_t w
);
  fp64_t p_l, p_r, p_z, s_lr, p_z_d;
  logic  v_l, v_r, v_z, v_lr;

  fp64_mul u_ml (.clk, .rst_n, .en(1'b1), .in_valid, .a(a), .b(wl), .out_valid(v_l), .y(p_l));
  fp64_mul u_mr (.clk, .rst_n, .en(1'b1), .in_valid, .a(c), .b(wr), .out_valid(v_r), .y(p_r));
  fp64_mul u_mz (.clk, .rst_n, .en(1'b1), .in_valid, .a(b), .b(z),  .out_valid(v_z), .y(p_z));
  fp64_add u_a1 (.clk, .rst_n, .en(1'b1), .in_valid(v_l), .a(p_l), .b(p_r), .out_valid(v_lr), .y(s_lr));
  pipe_delay #(.WIDTH(64), .N(FP_ADD_LAT)) u_dz (.clk, .rst_n, .en(1'b1), .d(p_z), .q(p_z_d));
  fp64_add u_a2 (.clk, .rst_n, .en(1'b1), .in_valid(v_lr), .a(s_lr), .b(p_z_d), .out_valid, .y(w));
endmodule
