// sobol_gen: pipelined Sobol quasi-random vector generator (Antonov-Saleev
// Gray-code form). For each index n = 1, 2, ... it produces the S-dimensional
// vector x_n, where x_n^(j) = x_(n-1)^(j) XOR v_k^(j) and k is the bit in
// which the Gray codes of n and n-1 differ. D dimensions of W bits are
// produced per cycle, so one vector takes C = S/D cycles ("cycles per vector").
//
// Structure, following the generator's block diagram:
//   cpv counter (0..C-1) -> its terminal count increments the simulation
//   counter n -> Gray code -> previous/current Gray code XOR (one-hot) ->
//   one-hot to binary (k) -> ROM address = k + base, where the base
//   accumulates W once per cycle of the vector (base = cpv*W).
//   The direction-vector ROM (D*W bits x C*W words; word cpv*W+k holds v_k of
//   dimensions cpv*D .. cpv*D+D-1, dimension cpv*D+l in bits [l*W +: W]) is
//   XORed with the state RAM (D*W bits x C words, address = cpv), the result
//   is registered as dout and written back to the state RAM after a delay.
// The state RAM is read for vector n a whole vector (C cycles) after it was
// written for vector n-1, so C must exceed the RAM read+write latency (3).
// The state of vector 0 is zero: while n == 1 the RAM read data is masked.
//
// Interface: `start` (one cycle, while idle) begins a run of `num_vectors`
// vectors from n = 1. dout/out_valid/out_dim_group form a stream that moves
// only when `ready` is high: `ready` is a clock enable of the whole pipeline.
// Direction vectors are computed off-line; the load port (rom_we, rom_addr,
// rom_wdata) writing the ROM word by word is this design's own choice, as is
// the start/num_vectors control. Pipeline latency from counter to dout: 6.
module sobol_gen
#(
  parameter int unsigned W = 32,     // bits per dimension
  parameter int unsigned S = 4096,   // dimensions per vector (n_a * n_t)
  parameter int unsigned D = 8,      // dimensions per cycle
  parameter int unsigned NBITS = 32  // width of the simulation counter n
) (
  input  logic                        clk,
  input  logic                        rst_n,
  // direction-vector ROM load port
  input  logic                        rom_we,
  input  logic [$clog2(S*W/D)-1:0]    rom_addr,
  input  logic [D*W-1:0]              rom_wdata,
  // control
  input  logic                        start,
  input  logic [NBITS-1:0]            num_vectors,
  output logic                        busy,
  // output stream
  input  logic                        ready,
  output logic                        out_valid,
  output logic [D*W-1:0]              dout,
  output logic [$clog2(S/D)-1:0]      out_dim_group,
  output logic                        out_last      // last group of a vector
);

  localparam int unsigned C  = S / D;
  localparam int unsigned CW = (C > 1) ? $clog2(C) : 1;
  localparam int unsigned AW = $clog2(S * W / D);
  localparam int unsigned KW = $clog2(W);

  // memories
  logic [D*W-1:0] rom   [C*W];
  logic [D*W-1:0] state [C];

  // ------------------------------------------------------------ counters
  logic [CW-1:0]    cpv;
  logic [NBITS-1:0] n, remaining;
  logic             run;
  logic             tc;

  assign tc   = run && (cpv == CW'(C - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cpv <= '0; n <= '0; remaining <= '0; run <= 1'b0;
    end else if (start && !busy) begin
      cpv <= '0; n <= NBITS'(1); remaining <= num_vectors; run <= (num_vectors != 0);
    end else if (ready && run) begin
      cpv <= tc ? '0 : cpv + 1'b1;
      if (tc) begin
        n <= n + 1'b1;
        remaining <= remaining - 1'b1;
        if (remaining == NBITS'(1)) run <= 1'b0;
      end
    end
  end

  // ------------------------------------------------------------ pipeline
  logic [NBITS-1:0] g_prev_hold;   // Gray code of n-1, updated when n advances

  // stage 1: Gray code of n, and of n-1 (held from the previous vector)
  logic             v1, first1;
  logic [CW-1:0]    c1;
  logic [NBITS-1:0] g_cur, g_prev;
  // stage 2: one-hot difference
  logic             v2, first2;
  logic [CW-1:0]    c2;
  logic [NBITS-1:0] onehot;
  // stage 3: bit index k
  logic             v3, first3;
  logic [CW-1:0]    c3;
  logic [KW-1:0]    k3;
  logic [AW-1:0]    base3;
  // stage 4: ROM address and state RAM read address
  logic             v4, first4;
  logic [CW-1:0]    c4;
  logic [AW-1:0]    addr4;
  // stage 5: memory outputs
  logic             v5, first5;
  logic [CW-1:0]    c5;
  logic [D*W-1:0]   rom_q, st_q;
  // stage 6: dout; write-back address (sync delay)
  logic [CW-1:0]    c6;

  function automatic logic [KW-1:0] onehot_to_bin(input logic [NBITS-1:0] oh);
    logic [KW-1:0] b;
    b = '0;
    for (int i = 0; i < NBITS; i++) if (oh[i]) b = b | KW'(i);
    return b;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v1 <= 1'b0; v2 <= 1'b0; v3 <= 1'b0; v4 <= 1'b0; v5 <= 1'b0; out_valid <= 1'b0;
      first1 <= 1'b0; first2 <= 1'b0; first3 <= 1'b0; first4 <= 1'b0; first5 <= 1'b0;
      c1 <= '0; c2 <= '0; c3 <= '0; c4 <= '0; c5 <= '0; c6 <= '0;
      g_cur <= '0; g_prev <= '0; onehot <= '0; k3 <= '0; base3 <= '0; addr4 <= '0;
      rom_q <= '0; st_q <= '0; dout <= '0; out_last <= 1'b0;
    end else if (ready) begin
      // stage 1
      v1     <= run;
      first1 <= (n == NBITS'(1));
      c1     <= cpv;
      g_cur  <= n ^ (n >> 1);
      g_prev <= g_prev_hold;
      // stage 2
      v2 <= v1; first2 <= first1; c2 <= c1;
      onehot <= g_cur ^ g_prev;
      // stage 3
      v3 <= v2; first3 <= first2; c3 <= c2;
      k3 <= onehot_to_bin(onehot);
      base3 <= (c2 == '0) ? '0 : base3 + AW'(W);   // w accumulator
      // stage 4
      v4 <= v3; first4 <= first3; c4 <= c3;
      addr4 <= base3 + AW'(k3);
      // stage 5: synchronous reads
      v5 <= v4; first5 <= first4; c5 <= c4;
      rom_q <= rom[addr4];
      st_q  <= state[c4];
      // stage 6
      out_valid <= v5;
      dout      <= rom_q ^ (first5 ? '0 : st_q);
      out_last  <= (c5 == CW'(C - 1));
      c6        <= c5;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) g_prev_hold <= '0;
    else if (start && !busy) g_prev_hold <= '0;
    else if (ready && tc) g_prev_hold <= n ^ (n >> 1);
  end

  assign out_dim_group = c6;
  assign busy = run || v1 || v2 || v3 || v4 || v5 || out_valid;

  // state RAM write-back and ROM load
  always_ff @(posedge clk) begin
    if (ready && out_valid) state[c6] <= dout;
    if (rom_we) rom[rom_addr] <= rom_wdata;
  end

  if (S % D != 0 || C <= 3) begin : g_bad_size
    $error("sobol_gen: S must be a multiple of D and S/D above 3");
  end

endmodule
