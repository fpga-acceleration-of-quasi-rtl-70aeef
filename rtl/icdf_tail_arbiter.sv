// icdf_tail_arbiter: request arbiter and response demultiplexer that share
// one tail evaluation unit among D ICDF lanes.
// Each lane offers a request (valid, folded input a, sign flag) from its
// tail-request FIFO. When the tail unit is ready, a round-robin choice,
// starting after the lane granted last, forwards one request with the lane
// number as tag and pops that lane (lane_pop). Responses come back tagged
// and are steered to the lane named by the tag (resp_valid one-hot).
// Combinational request path; round-robin pointer is the only state.
module icdf_tail_arbiter
  import qmc_pkg::*;
#(
  parameter int unsigned D = 8,
  parameter int unsigned TAG_W = (D > 1) ? $clog2(D) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  // lanes
  input  logic [D-1:0]     lane_valid,
  input  logic [31:0]      lane_a    [D],
  input  logic [D-1:0]     lane_flip,
  output logic [D-1:0]     lane_pop,
  output logic [D-1:0]     lane_resp_valid,
  output fp64_t            lane_resp_y,
  // tail unit
  output logic             tail_req_valid,
  input  logic             tail_req_ready,
  output logic [31:0]      tail_req_a,
  output logic             tail_req_flip,
  output logic [TAG_W-1:0] tail_req_tag,
  input  logic             tail_resp_valid,
  input  fp64_t            tail_resp_y,
  input  logic [TAG_W-1:0] tail_resp_tag
);
  logic [TAG_W-1:0] last, pick;
  logic             found;

  always_comb begin
    found = 1'b0;
    pick  = '0;
    for (int k = 1; k <= int'(D); k++) begin
      int l;
      l = (int'(last) + k) % int'(D);
      if (!found && lane_valid[l]) begin
        found = 1'b1;
        pick  = TAG_W'(l);
      end
    end
    tail_req_valid = found;
    tail_req_a     = lane_a[pick];
    tail_req_flip  = lane_flip[pick];
    tail_req_tag   = pick;
    lane_pop       = '0;
    if (found && tail_req_ready) lane_pop[pick] = 1'b1;
    lane_resp_valid = '0;
    if (tail_resp_valid) lane_resp_valid[tail_resp_tag] = 1'b1;
    lane_resp_y = tail_resp_y;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) last <= TAG_W'(D - 1);
    else if (found && tail_req_ready) last <= pick;
  end
endmodule
