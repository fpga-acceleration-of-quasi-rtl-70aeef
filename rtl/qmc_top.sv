// qmc_top: quasi-random Brownian motion accelerator for quasi-Monte Carlo
// pricing. Three pipelined stages run concurrently:
//   sobol_gen        - Sobol vectors of S = NA*NT dimensions, NA per cycle;
//   icdf             - NA inverse-normal-CDF lanes turn the 32-bit uniforms
//                      into double-precision standard normal draws;
//   brownian_bridge  - NA floating-point pipelines build one NT-step standard
//                      Brownian path per asset by bisection.
// One Sobol vector feeds one path: its dimensions k*NA .. k*NA+NA-1 are the
// k-th Gaussian vector the bridge consumes, so the lowest dimensions drive
// the largest bridge intervals. Stages are linked by valid/ready handshakes:
// the ICDF holds the Sobol generator while its merge waits for a tail result,
// and the bridge takes a Gaussian vector only when it issues an interval.
//
// Interface: load the Sobol direction vectors through rom_we/rom_addr/
// rom_wdata (layout: see sobol_gen), then pulse `start` with num_paths.
// Points of each path stream out on out_valid/out_pos/out_w (position p of
// t_p = p*T/NT, one value per asset) in computation order, not time order;
// path_done pulses after the last point of each path. There is no
// back-pressure on the result stream. The activity outputs count nothing
// themselves; they show tail-unit use and the stalls, for monitoring.
// D = NA (one Gaussian per asset per cycle) is this design's choice.
module qmc_top
  import qmc_pkg::*;
#(
  parameter int unsigned NA = 8,     // assets, = dimensions per cycle
  parameter int unsigned NT = 512,   // time steps per path
  parameter int unsigned W  = 32     // bits per Sobol dimension
) (
  input  logic                        clk,
  input  logic                        rst_n,
  // Sobol direction-vector load
  input  logic                        rom_we,
  input  logic [$clog2(NT*W)-1:0]     rom_addr,
  input  logic [NA*W-1:0]             rom_wdata,
  // control
  input  logic                        start,
  input  logic [31:0]                 num_paths,
  output logic                        busy,
  output logic                        path_done,
  // results
  output logic                        out_valid,
  output logic [$clog2(NT+1)-1:0]     out_pos,
  output fp64_t                       out_w [NA],
  // activity
  output logic                        icdf_tail_issue,
  output logic                        icdf_tail_wait,
  output logic                        icdf_stall,
  output logic                        bb_starved,
  output logic [$clog2(NT/2+1)-1:0]   bb_queue_count
);
  localparam int unsigned S = NA * NT;

  // ------------------------------------------------------------ Sobol
  logic              sb_valid, sb_ready, sb_busy, sb_last;
  logic [NA*W-1:0]   sb_dout;
  logic [$clog2(NT)-1:0] sb_group;

  sobol_gen #(.W(W), .S(S), .D(NA)) u_sobol (
    .clk, .rst_n, .rom_we, .rom_addr, .rom_wdata,
    .start(start && !busy), .num_vectors(num_paths), .busy(sb_busy),
    .ready(sb_ready), .out_valid(sb_valid), .dout(sb_dout),
    .out_dim_group(sb_group), .out_last(sb_last));

  // ------------------------------------------------------------ ICDF
  logic [31:0] u_in [NA];
  fp64_t       g_out [NA];
  logic        g_valid, g_ready;

  always_comb for (int l = 0; l < int'(NA); l++) u_in[l] = sb_dout[l*W +: 32];

  icdf #(.D(NA)) u_icdf (
    .clk, .rst_n, .in_valid(sb_valid), .in_ready(sb_ready), .din(u_in),
    .out_valid(g_valid), .out_ready(g_ready), .dout(g_out),
    .tail_issue(icdf_tail_issue), .tail_wait(icdf_tail_wait));

  // ------------------------------------------------------------ bridge
  logic        bb_start, bb_busy, bb_done;
  logic [31:0] paths_left;

  brownian_bridge #(.NA(NA), .NT(NT)) u_bb (
    .clk, .rst_n, .start(bb_start), .busy(bb_busy), .done(bb_done),
    .z_valid(g_valid), .z_ready(g_ready), .z(g_out),
    .out_valid, .out_pos, .out_w, .queue_count(bb_queue_count));

  // one bridge run per path
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) paths_left <= '0;
    else if (start && !busy) paths_left <= num_paths;
    else if (bb_start) paths_left <= paths_left - 1'b1;
  end
  assign bb_start  = (paths_left != '0) && !bb_busy;
  assign busy      = sb_busy || (paths_left != '0) || bb_busy;
  assign path_done = bb_done;

  assign icdf_stall = sb_valid && !sb_ready;
  assign bb_starved = bb_busy && !g_valid;

  if (W != 32) begin : g_bad
    $error("qmc_top: the ICDF takes 32-bit uniforms, W must be 32");
  end
endmodule
