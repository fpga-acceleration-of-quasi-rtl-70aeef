// icdf_merge: result merge of the D-lane inverse normal CDF.
// Central-pipeline outputs enter an order FIFO (one D-wide entry per input
// vector, each lane holding a tail flag and its central or special value).
// Tail results arrive per lane, in request order, into per-lane tail FIFOs.
// The head vector leaves when every lane flagged as tail has a tail result
// waiting; its output takes the tail result in those lanes. Outputs thus
// leave in input order. If the head waits on a tail result, the merge stalls
// (tail_wait), and when the order FIFO fills, `space` falls and the ICDF
// pipeline in front is frozen.
// Output stream: out_valid/out_ready handshake, first-word fall-through.
module icdf_merge
  import qmc_pkg::*;
#(
  parameter int unsigned D      = 8,
  parameter int unsigned QDEPTH = 32,   // order FIFO entries
  parameter int unsigned TDEPTH = 4     // tail results per lane
) (
  input  logic          clk,
  input  logic          rst_n,
  // from the central pipeline
  input  logic          in_valid,
  input  logic [D-1:0]  in_is_tail,
  input  fp64_t         in_y [D],
  output logic          space,
  // from the tail response demux
  input  logic [D-1:0]  tail_valid,
  input  fp64_t         tail_res,
  // output
  output logic          out_valid,
  input  logic          out_ready,
  output fp64_t         out_y [D],
  output logic          tail_wait
);
  localparam int unsigned EW = D * 65;

  logic [EW-1:0] q_wdata, q_rdata;
  logic          q_full, q_empty, q_pop;
  logic [$clog2(QDEPTH+1)-1:0] q_count;

  always_comb begin
    for (int l = 0; l < int'(D); l++) q_wdata[l*65 +: 65] = {in_is_tail[l], in_y[l]};
  end

  sync_fifo #(.WIDTH(EW), .DEPTH(QDEPTH)) u_order (
    .clk, .rst_n, .push(in_valid), .wdata(q_wdata), .pop(q_pop), .rdata(q_rdata),
    .full(q_full), .empty(q_empty), .count(q_count));

  logic [D-1:0] t_empty, t_full, t_pop, head_tail;
  fp64_t        t_rdata [D];

  for (genvar l = 0; l < D; l++) begin : g_lane
    logic [$clog2(TDEPTH+1)-1:0] t_count;
    sync_fifo #(.WIDTH(64), .DEPTH(TDEPTH)) u_tail (
      .clk, .rst_n, .push(tail_valid[l]), .wdata(tail_res), .pop(t_pop[l]),
      .rdata(t_rdata[l]), .full(t_full[l]), .empty(t_empty[l]), .count(t_count));
    assign head_tail[l] = q_rdata[l*65 + 64];
    assign out_y[l]     = head_tail[l] ? t_rdata[l] : q_rdata[l*65 +: 64];
    assign t_pop[l]     = q_pop && head_tail[l];
  end

  assign space      = !q_full;
  assign out_valid  = !q_empty && ((head_tail & t_empty) == '0);
  assign tail_wait  = !q_empty && ((head_tail & t_empty) != '0);
  assign q_pop      = out_valid && out_ready;
endmodule
