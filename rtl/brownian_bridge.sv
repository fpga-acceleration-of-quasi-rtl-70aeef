// brownian_bridge: Brownian-bridge path construction for NA assets with NA
// lock-step floating-point pipelines and one controller.
//
// The path W(t_0..t_NT), W(0) = 0, is built by bisection: first the endpoint
// W(T) = sqrt(T)*Z, then the midpoint of [0, T], then the midpoints of the
// two halves, and so on. Each issued interval consumes one vector of NA
// standard normal draws (z_valid/z_ready handshake) and yields one point per
// asset through bb_fp_pipe, w = a*W(l) + (1-a)*W(r) + b*Z, with a, 1-a, b
// from bb_coeff_rom addressed by the midpoint position.
//
// Controller, one decision per cycle:
//   * a result leaves the pipelines: it is reported (out_valid, out_pos,
//     out_w) and splits its interval; the left half is issued at once (if a
//     Z vector is ready, else queued) and the right half is queued;
//   * otherwise, if the queue holds an interval and a Z vector is ready,
//     the oldest interval is issued; this includes cycles in which the
//     result's halves are single steps (nothing to issue from the result),
//     which the plain pseudo-code form would leave idle (own choice);
//   * the run ends when the queue and the pipelines are empty.
// Intervals of a single time step have no interior point and are neither
// queued nor issued. Queue entries and pipeline context carry the interval
// ends and the path values at both ends, so no path memory is read.
// Latency from an issue decision to its result: 1 (coefficient ROM) + 9.
// Points leave in the order they are computed (not in time order); a client
// must collect a whole path. `start` (while idle) begins one path; `done`
// pulses after its last point. T_HORIZON = 1 and the queue depth are this
// design's choices.
module brownian_bridge
  import qmc_pkg::*;
#(
  parameter int unsigned NA        = 8,
  parameter int unsigned NT        = 512,
  parameter int unsigned QDEPTH    = NT / 2,
  parameter real         T_HORIZON = 1.0
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    start,
  output logic                    busy,
  output logic                    done,
  // Gaussian draws, one vector per computed point
  input  logic                    z_valid,
  output logic                    z_ready,
  input  fp64_t                   z [NA],
  // results
  output logic                    out_valid,
  output logic [$clog2(NT+1)-1:0] out_pos,
  output fp64_t                   out_w [NA],
  // occupancy, for monitoring
  output logic [$clog2(QDEPTH+1)-1:0] queue_count
);
  localparam int unsigned PB = $clog2(NT + 1);
  localparam int unsigned LAT_FP = FP_MUL_LAT + 2 * FP_ADD_LAT;
  localparam int unsigned QW = 2 * PB + 2 * NA * 64;      // {l, r, Wl[], Wr[]}
  localparam int unsigned CXW = 1 + 3 * PB + 2 * NA * 64; // {end, l, r, p, Wl[], Wr[]}

  typedef struct packed {
    logic [PB-1:0] l;
    logic [PB-1:0] r;
    logic [NA*64-1:0] wl;
    logic [NA*64-1:0] wr;
  } ivl_t;

  typedef struct packed {
    logic          ep;
    logic [PB-1:0] l;
    logic [PB-1:0] r;
    logic [PB-1:0] p;
    logic [NA*64-1:0] wl;
    logic [NA*64-1:0] wr;
  } ctx_t;

  // ------------------------------------------------------------ state
  logic running, ep_pending;
  logic [PB:0] inflight;

  // ------------------------------------------------------------ results
  logic [NA-1:0] pv;
  fp64_t         pw [NA];
  ctx_t          rctx;
  logic [CXW-1:0] rctx_bits;
  logic          res_v;
  logic [NA*64-1:0] res_flat;

  always_comb for (int k = 0; k < int'(NA); k++) res_flat[k*64 +: 64] = pw[k];
  assign rctx  = ctx_t'(rctx_bits);
  assign res_v = pv[0];

  // new intervals from a result
  ivl_t new_l, new_r;
  logic has_sub, has_r;
  always_comb begin
    if (rctx.ep) begin
      new_l = '{l: '0, r: PB'(NT), wl: '0, wr: res_flat};
      has_sub = (NT >= 2);
      has_r = 1'b0;
    end else begin
      new_l = '{l: rctx.l, r: rctx.p, wl: rctx.wl, wr: res_flat};
      has_sub = (rctx.p - rctx.l) >= PB'(2);
      has_r = has_sub;
    end
    new_r = '{l: rctx.p, r: rctx.r, wl: res_flat, wr: rctx.wr};
  end

  // ------------------------------------------------------------ decision
  ivl_t q_head;
  logic [QW-1:0] q_rdata;
  logic q_empty, q_pop, push0, push1;
  ivl_t push0_d, push1_d;
  logic issue, issue_ep;
  ivl_t issue_ivl;
  logic [PB-1:0] issue_p;

  assign q_head = ivl_t'(q_rdata);

  always_comb begin
    issue = 1'b0; issue_ep = 1'b0; issue_ivl = new_l;
    q_pop = 1'b0; push0 = 1'b0; push1 = 1'b0;
    push0_d = new_r; push1_d = new_r;
    if (running) begin
      // a result with no sub-interval (its halves are single steps) leaves
      // the cycle free for the queue
      if (res_v && has_sub) begin
        if (z_valid) begin
          issue = 1'b1; issue_ivl = new_l;
          push0 = has_r; push0_d = new_r;
        end else begin
          push0 = 1'b1; push0_d = new_l;
          push1 = has_r; push1_d = new_r;
        end
      end else if (!q_empty && z_valid) begin
        issue = 1'b1; issue_ivl = q_head; q_pop = 1'b1;
      end else if (ep_pending && z_valid) begin
        issue = 1'b1; issue_ep = 1'b1;
        issue_ivl = '{l: '0, r: PB'(NT), wl: '0, wr: '0};
      end
    end
    issue_p = issue_ep ? PB'(NT) : PB'((int'(issue_ivl.l) + int'(issue_ivl.r)) / 2);
  end

  assign z_ready = issue;

  bb_queue #(.WIDTH(QW), .DEPTH(QDEPTH)) u_queue (
    .clk, .rst_n, .push0, .wdata0(push0_d), .push1, .wdata1(push1_d),
    .pop(q_pop), .rdata(q_rdata), .empty(q_empty), .count(queue_count));

  // ------------------------------------------------------------ issue stage
  logic   iss_v;
  ctx_t   iss_ctx;
  fp64_t  iss_z [NA];
  fp64_t  ca, cc, cb;

  bb_coeff_rom #(.NT(NT), .T_HORIZON(T_HORIZON)) u_coef (.clk, .addr(issue_p), .a(ca), .c(cc), .b(cb));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      iss_v <= 1'b0; iss_ctx <= '0;
      for (int k = 0; k < int'(NA); k++) iss_z[k] <= FP_ZERO;
    end else begin
      iss_v   <= issue;
      iss_ctx <= '{ep: issue_ep, l: issue_ivl.l, r: issue_ivl.r, p: issue_p,
                   wl: issue_ivl.wl, wr: issue_ivl.wr};
      for (int k = 0; k < int'(NA); k++) iss_z[k] <= z[k];
    end
  end

  for (genvar k = 0; k < NA; k++) begin : g_fp
    bb_fp_pipe u_pipe (.clk, .rst_n, .in_valid(iss_v), .a(ca), .c(cc), .b(cb),
      .wl(iss_ctx.wl[k*64 +: 64]), .wr(iss_ctx.wr[k*64 +: 64]), .z(iss_z[k]),
      .out_valid(pv[k]), .w(pw[k]));
  end

  pipe_delay #(.WIDTH(CXW), .N(LAT_FP)) u_ctx (.clk, .rst_n, .en(1'b1), .d(iss_ctx), .q(rctx_bits));

  // ------------------------------------------------------------ control
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      running <= 1'b0; ep_pending <= 1'b0; inflight <= '0; done <= 1'b0;
    end else begin
      done <= 1'b0;
      if (!running) begin
        if (start) begin
          running <= 1'b1; ep_pending <= 1'b1;
        end
      end else begin
        if (issue_ep) ep_pending <= 1'b0;
        if (issue && !res_v) inflight <= inflight + 1'b1;
        else if (!issue && res_v) inflight <= inflight - 1'b1;
        if (!ep_pending && !res_v && !issue && q_empty && inflight == '0) begin
          running <= 1'b0; done <= 1'b1;
        end
      end
    end
  end

  assign busy      = running;
  assign out_valid = res_v;
  assign out_pos   = rctx.p;
  assign out_w     = pw;

  a_z_handshake: assert property (@(posedge clk) disable iff (!rst_n) z_ready |-> z_valid)
    else $error("brownian_bridge: Z consumed without a valid vector");
endmodule
