// tb_icdf: end-to-end self-checking testbench of the D-lane icdf.
// Feeds random 32-bit uniforms, with a share of tail-region inputs (folded
// value below 2^20), exact 0.5, and the extremes 0, 1 and 2^32-1, under
// random input gaps and random output back-pressure. Every output must come
// back in input order, with Phi(z) matching u: the implied error in z,
// (Phi(z) - u) / pdf(z), must be below 2e-9*|z| + 1e-10, where Phi is an
// independent numerical integral. 0.5 must give exactly 0 and the result
// must be odd about 0.5. Counts tail-unit uses and merge stalls and fails if
// either never happened; with no tail inputs the pipeline must accept one
// vector per cycle.
module tb_icdf;
  import qmc_pkg::*;
  import tb_normal_pkg::*;
  localparam int D = 3;
  localparam int NVEC = 700;
  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid = 1'b0, in_ready, out_valid, out_ready = 1'b0, tail_issue, tail_wait;
  logic [31:0] din [D];
  fp64_t dout [D];
  int checks = 0, failures = 0, n_tail = 0, n_wait = 0, n_stall = 0, got = 0;
  real maxrel = 0.0;
  logic [31:0] exp_q [$];

  icdf #(.D(D)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (tail_issue) n_tail++;
    if (tail_wait) n_wait++;
    if (in_valid && !in_ready) n_stall++;
  end

  always @(posedge clk) if (rst_n && out_valid && out_ready) begin
    for (int l = 0; l < D; l++) begin
      automatic logic [31:0] u32 = exp_q.pop_front();
      automatic real u = (u32 == 0 ? 1.0 : real'(u32)) / 4294967296.0;
      automatic real z = $bitstoreal(dout[l]);
      automatic real e = icdf_err(u, z);
      checks++;
      if (u32 == 32'h8000_0000) begin
        if (dout[l] != FP_ZERO) failures++;
      end else begin
        if (rabs(e) > 2e-9 * rabs(z) + 1e-10 || ((u < 0.5) != (z < 0.0))) begin
          failures++;
          if (failures < 10) $display("u=%h z=%.15g err=%g", u32, z, e);
        end
        if (rabs(z) > 1e-3 && rabs(e / z) > maxrel) maxrel = rabs(e / z);
      end
    end
    got++;
  end

  function automatic logic [31:0] pick(input int i);
    int r;
    r = $urandom % 16;
    if (i < 3) return (i == 0) ? 32'd0 : (i == 1) ? 32'd1 : 32'hFFFF_FFFF;
    if (r == 0) return 32'h8000_0000;
    if (r == 1) return 32'($urandom % (1 << 20));
    if (r == 2) return 32'd0 - 32'(1 + $urandom % (1 << 20));
    return $urandom;
  endfunction

  initial begin
    int t0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    fork
      forever begin
        @(negedge clk) out_ready = ($urandom % 3 != 0);
      end
    join_none
    for (int i = 0; i < NVEC; i++) begin
      @(negedge clk);
      for (int l = 0; l < D; l++) din[l] = pick(i * D + l);
      in_valid = 1'b1;
      #1;
      while (!in_ready) @(negedge clk);
      for (int l = 0; l < D; l++) exp_q.push_back(din[l]);
      @(negedge clk) in_valid = 1'b0;
      if ($urandom % 4 == 0) repeat ($urandom % 5) @(negedge clk);
    end
    while (got < NVEC) @(posedge clk);
    // throughput with central inputs only and no back-pressure
    disable fork;
    @(negedge clk) out_ready = 1'b1;
    repeat (40) @(negedge clk);
    t0 = got;
    for (int i = 0; i < 200; i++) begin
      for (int l = 0; l < D; l++) din[l] = 32'h0100_0000 + 32'($urandom % (1 << 30));
      in_valid = 1'b1;
      #1;
      checks++;
      if (!in_ready) failures++;
      for (int l = 0; l < D; l++) exp_q.push_back(din[l]);
      @(negedge clk);
    end
    in_valid = 1'b0;
    repeat (40) @(posedge clk);
    checks++;
    if (got - t0 != 200 || exp_q.size() != 0) failures++;
    checks += 2;
    if (n_tail == 0) failures++;
    if (n_wait == 0) failures++;
    $display("tail requests=%0d merge waits=%0d input stalls=%0d max rel err=%g", n_tail, n_wait, n_stall, maxrel);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
