// icdf_central: central-region evaluation of the inverse normal CDF, a fully
// pipelined Horner evaluation of an order-KC polynomial,
//   y = c[0] + t*(c[1] + t*(c[2] + ... + t*c[KC])),
// one polynomial per enabled cycle. Each Horner step is one fp64_mul followed
// by one fp64_add; t, the coefficients still to be used and SW bits of side
// information travel alongside in delay lines. Latency
// KC * (FP_MUL_LAT + FP_ADD_LAT) enabled cycles (18 for KC = 3).
// `en` is a clock enable of the whole pipeline (the ICDF stall).
module icdf_central
  import qmc_pkg::*;
#(
  parameter int unsigned KC = 3,
  parameter int unsigned SW = 4
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          en,
  input  logic          in_valid,
  input  fp64_t         c [KC+1],
  input  fp64_t         t,
  input  logic [SW-1:0] side_in,
  output logic          out_valid,
  output fp64_t         y,
  output logic [SW-1:0] side_out
);
  localparam int unsigned STEP = FP_MUL_LAT + FP_ADD_LAT;
  localparam int unsigned BW = 64 * (KC + 1) + SW;   // t, c[0..KC-1], side

  // stage s (0..KC): accumulator, validity and the carried bundle
  fp64_t          acc  [KC+1];
  logic           vld  [KC+1];
  logic [BW-1:0]  bun  [KC+1];

  logic [BW-1:0] bun_in;
  always_comb begin
    bun_in = '0;
    bun_in[63:0] = t;
    for (int k = 0; k < int'(KC); k++) bun_in[64*(k+1) +: 64] = c[k];
    bun_in[64*(KC+1) +: SW] = side_in;
  end
  assign acc[0] = c[KC];
  assign vld[0] = in_valid;
  assign bun[0] = bun_in;

  for (genvar s = 0; s < KC; s++) begin : g_step
    fp64_t prod, sum;
    logic  pv, sv;
    logic [BW-1:0] bun_m;
    fp64_t coef;

    fp64_mul u_mul (.clk, .rst_n, .en, .in_valid(vld[s]), .a(acc[s]), .b(bun[s][63:0]),
                    .out_valid(pv), .y(prod));
    pipe_delay #(.WIDTH(BW), .N(FP_MUL_LAT)) u_dm (.clk, .rst_n, .en, .d(bun[s]), .q(bun_m));
    // coefficient for this step: c[KC-1-s]
    assign coef = bun_m[64*(KC-s) +: 64];
    fp64_add u_add (.clk, .rst_n, .en, .in_valid(pv), .a(prod), .b(coef),
                    .out_valid(sv), .y(sum));
    pipe_delay #(.WIDTH(BW), .N(FP_ADD_LAT)) u_da (.clk, .rst_n, .en, .d(bun_m), .q(bun[s+1]));
    assign acc[s+1] = sum;
    assign vld[s+1] = sv;
  end

  assign out_valid = vld[KC];
  assign y         = acc[KC];
  assign side_out  = bun[KC][64*(KC+1) +: SW];
endmodule
