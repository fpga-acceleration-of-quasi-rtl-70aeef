// tb_sobol_gen: self-checking testbench of sobol_gen.
// Loads random direction vectors (any values are legal: the generator only
// XORs them), runs 70 vectors with random back-pressure, and checks every
// output word against x_n = x_(n-1) XOR v_k with k = number of trailing zeros
// of n, computed here directly. A second run with `ready` held high checks
// the rate: one group of D dimensions per cycle, N*C groups in N*C+6 cycles.
module tb_sobol_gen;
  localparam int W = 32, S = 24, D = 4, C = S / D, NV = 70;
  localparam int AW = $clog2(S * W / D);
  logic clk = 1'b0, rst_n = 1'b0;
  logic rom_we = 1'b0;
  logic [AW-1:0] rom_addr = '0;
  logic [D*W-1:0] rom_wdata = '0;
  logic start = 1'b0, busy, ready = 1'b0, out_valid, out_last;
  logic [31:0] num_vectors = '0;
  logic [D*W-1:0] dout;
  logic [$clog2(C)-1:0] out_dim_group;
  int checks = 0, failures = 0;
  logic [W-1:0] v [S][W];
  logic [W-1:0] x [S];
  int n_exp, g_exp, cyc, groups;

  sobol_gen #(.W(W), .S(S), .D(D)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int ctz(input int n);
    int k = 0;
    while (((n >> k) & 1) == 0) k++;
    return k;
  endfunction

  // reference check on every accepted output group
  always @(posedge clk) if (rst_n && ready && out_valid) begin
    for (int l = 0; l < D; l++) begin
      automatic int dim = g_exp * D + l;
      checks++;
      if (dout[l*W +: W] !== (x[dim] ^ v[dim][ctz(n_exp)])) begin
        failures++;
        if (failures < 10) $display("n=%0d dim=%0d got %h exp %h", n_exp, dim,
                                     dout[l*W +: W], x[dim] ^ v[dim][ctz(n_exp)]);
      end
      x[dim] = x[dim] ^ v[dim][ctz(n_exp)];
    end
    checks++;
    if (out_dim_group != g_exp[$clog2(C)-1:0] || out_last != (g_exp == C - 1)) failures++;
    groups++;
    if (g_exp == C - 1) begin g_exp = 0; n_exp++; end else g_exp++;
  end

  task automatic run(input int nv, input bit stall, output int cycles);
    int t0;
    foreach (x[i]) x[i] = '0;
    n_exp = 1; g_exp = 0; groups = 0;
    @(negedge clk);
    num_vectors = nv; start = 1'b1;
    @(negedge clk) start = 1'b0;
    t0 = cyc;
    while (busy) begin
      ready = stall ? 1'($urandom % 4 != 0) : 1'b1;
      @(negedge clk);
    end
    cycles = cyc - t0;
    ready = 1'b0;
  endtask

  initial begin
    int cy;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int d = 0; d < S; d++) for (int k = 0; k < W; k++) v[d][k] = $urandom;
    for (int c = 0; c < C; c++) for (int k = 0; k < W; k++) begin
      @(negedge clk);
      rom_we = 1'b1; rom_addr = AW'(c * W + k);
      for (int l = 0; l < D; l++) rom_wdata[l*W +: W] = v[c*D + l][k];
    end
    @(negedge clk) rom_we = 1'b0;
    run(NV, 1'b1, cy);
    checks++;
    if (groups != NV * C) failures++;
    run(40, 1'b0, cy);
    checks++;
    if (groups != 40 * C || cy != 40 * C + 6) begin
      failures++;
      $display("rate: %0d groups in %0d cycles", groups, cy);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
