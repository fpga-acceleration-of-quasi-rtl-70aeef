// icdf: D-lane inverse normal cumulative distribution function,
// z = Phi^-1(u) with u = din / 2^32, in IEEE double precision.
// Per lane: range reduction (fold about 0.5, pick octave/segment or tail) ->
// coefficient ROM read -> central polynomial pipeline (order KC) -> merge.
// Inputs whose folded value lies below 2^-(M+1) go through a per-lane
// tail-request FIFO, a round-robin request arbiter, one shared multi-cycle
// tail unit and a response demux back to the lane's merge FIFO. The merge
// returns results in input order and stalls while a tail result is missing.
// ceil(D/2) dual-port coefficient ROMs serve the lanes (no double clocking).
//
// Stall: in_ready (= pipeline enable) is low when the merge's order FIFO is
// full (its head waiting on a tail result, or the consumer not ready); the
// whole range-reduction/ROM/central pipeline then holds. The tail FIFOs are
// deep enough for every tail input that can be in flight, so they never
// overflow and never need to stall the pipeline themselves. The input handshake is
// in_valid/in_ready, the output out_valid/out_ready. Latency without tail
// inputs: 1 (range) + 1 (ROM) + KC*6 (central) = 20 enabled cycles, plus the
// merge FIFO's fall-through.
module icdf
  import qmc_pkg::*;
#(
  parameter int unsigned D      = 8,
  parameter int unsigned M      = 11,
  parameter int unsigned R      = 6,
  parameter int unsigned KC     = 3,
  parameter int unsigned KT     = 7,
  parameter int unsigned QDEPTH = 256  // order FIFO: above the tail latency
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  output logic          in_ready,
  input  logic [31:0]   din [D],
  output logic          out_valid,
  input  logic          out_ready,
  output fp64_t         dout [D],
  // activity, for monitoring
  output logic          tail_issue,   // a tail request entered the tail unit
  output logic          tail_wait     // merge is waiting on a tail result
);
  localparam int unsigned IW    = $clog2(M) + R;
  localparam int unsigned TAG_W = (D > 1) ? $clog2(D) : 1;
  localparam int unsigned NROM  = (D + 1) / 2;
  // Tail inputs of a lane that can be on their way at once: every slot of the
  // pipeline and of the order FIFO, so the tail FIFOs can never overflow.
  localparam int unsigned TDEPTH = QDEPTH + 2 + KC * (FP_MUL_LAT + FP_ADD_LAT) + 2;
  localparam int unsigned CW     = $clog2(TDEPTH + 1);

  logic en, space;

  assign en       = space;
  assign in_ready = en;

  // per-lane signals
  logic            rr_v   [D];
  icdf_region_e    rr_rg  [D];
  logic            rr_flip[D];
  logic [IW-1:0]   rr_idx [D];
  fp64_t           rr_t   [D];
  logic [31:0]     rr_a   [D];
  fp64_t           coef   [D][KC+1];
  logic            ce_v   [D];
  fp64_t           ce_y   [D];
  logic [D-1:0]    mg_tail;
  fp64_t           mg_y   [D];
  logic            mg_v;

  logic [D-1:0]    tq_valid, tq_pop, tq_flip;
  logic [31:0]     tq_a [D];
  logic [D-1:0]    resp_valid;
  fp64_t           resp_y;

  for (genvar l = 0; l < D; l++) begin : g_lane
    icdf_range_reduce #(.M(M), .R(R)) u_rr (
      .clk, .rst_n, .en, .in_valid, .din(din[l]), .out_valid(rr_v[l]), .region(rr_rg[l]),
      .flip(rr_flip[l]), .rom_idx(rr_idx[l]), .t(rr_t[l]), .tail_a(rr_a[l]));

    // tail-request FIFO
    logic push_t, tq_full, tq_empty;
    logic [CW-1:0] tq_count;
    logic [32:0] tq_rdata;
    assign push_t = en && rr_v[l] && (rr_rg[l] == RG_TAIL);
    sync_fifo #(.WIDTH(33), .DEPTH(TDEPTH)) u_treq (
      .clk, .rst_n, .push(push_t), .wdata({rr_flip[l], rr_a[l]}), .pop(tq_pop[l]),
      .rdata(tq_rdata), .full(tq_full), .empty(tq_empty), .count(tq_count));
    assign tq_valid[l] = !tq_empty;
    assign tq_a[l]     = tq_rdata[31:0];
    assign tq_flip[l]  = tq_rdata[32];


    // ROM latency: delay the rest of the range-reduction output by one
    logic          d_v, d_flip;
    icdf_region_e  d_rg;
    fp64_t         d_t;
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        d_v <= 1'b0; d_flip <= 1'b0; d_rg <= RG_HALF; d_t <= FP_ZERO;
      end else if (en) begin
        d_v <= rr_v[l]; d_flip <= rr_flip[l]; d_rg <= rr_rg[l]; d_t <= rr_t[l];
      end
    end

    logic [2:0] side_o;
    icdf_central #(.KC(KC), .SW(3)) u_central (
      .clk, .rst_n, .en, .in_valid(d_v), .c(coef[l]), .t(d_t),
      .side_in({d_flip, d_rg}), .out_valid(ce_v[l]), .y(ce_y[l]), .side_out(side_o));

    always_comb begin
      mg_tail[l] = (icdf_region_e'(side_o[1:0]) == RG_TAIL);
      if (icdf_region_e'(side_o[1:0]) == RG_HALF) mg_y[l] = FP_ZERO;
      else mg_y[l] = side_o[2] ? fp64_neg(ce_y[l]) : ce_y[l];
    end
  end

  for (genvar k = 0; k < NROM; k++) begin : g_rom
    if (2 * k + 1 < D) begin : g_two
      icdf_coeff_rom #(.M(M), .R(R), .KC(KC)) u_rom (
        .clk, .en, .addr_a(rr_idx[2*k]), .addr_b(rr_idx[2*k+1]),
        .q_a(coef[2*k]), .q_b(coef[2*k+1]));
    end else begin : g_one
      fp64_t unused_q [KC+1];
      icdf_coeff_rom #(.M(M), .R(R), .KC(KC)) u_rom (
        .clk, .en, .addr_a(rr_idx[2*k]), .addr_b(rr_idx[2*k]),
        .q_a(coef[2*k]), .q_b(unused_q));
    end
  end

  assign mg_v = en && ce_v[0];

  // shared tail unit
  logic             t_req_valid, t_req_ready, t_req_flip, t_resp_valid;
  logic [31:0]      t_req_a;
  logic [TAG_W-1:0] t_req_tag, t_resp_tag;
  fp64_t            t_resp_y;

  icdf_tail_arbiter #(.D(D), .TAG_W(TAG_W)) u_arb (
    .clk, .rst_n, .lane_valid(tq_valid), .lane_a(tq_a), .lane_flip(tq_flip),
    .lane_pop(tq_pop), .lane_resp_valid(resp_valid), .lane_resp_y(resp_y),
    .tail_req_valid(t_req_valid), .tail_req_ready(t_req_ready), .tail_req_a(t_req_a),
    .tail_req_flip(t_req_flip), .tail_req_tag(t_req_tag),
    .tail_resp_valid(t_resp_valid), .tail_resp_y(t_resp_y), .tail_resp_tag(t_resp_tag));

  icdf_tail #(.M(M), .KT(KT), .TAG_W(TAG_W)) u_tail (
    .clk, .rst_n, .req_valid(t_req_valid), .req_ready(t_req_ready), .req_a(t_req_a),
    .req_flip(t_req_flip), .req_tag(t_req_tag), .resp_valid(t_resp_valid),
    .resp_y(t_resp_y), .resp_tag(t_resp_tag));

  assign tail_issue = t_req_valid && t_req_ready;

  icdf_merge #(.D(D), .QDEPTH(QDEPTH), .TDEPTH(TDEPTH)) u_merge (
    .clk, .rst_n, .in_valid(mg_v), .in_is_tail(mg_tail), .in_y(mg_y), .space,
    .tail_valid(resp_valid), .tail_res(resp_y),
    .out_valid, .out_ready, .out_y(dout), .tail_wait);
endmodule
