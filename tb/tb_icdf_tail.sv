// tb_icdf_tail: self-checking testbench of icdf_tail.
// Sends tail-region inputs a (x = a/2^32 from 2^-32 up to 2^-12) with both
// sign flags and random tags, waits for each response and checks the tag,
// the sign and the value: the implied error in z, (Phi(z) - x) / pdf(z), must
// stay below 2e-9*|z|, with Phi an independent numerical integral. Also
// checks that req_ready is low while a request is in progress and that each
// result arrives 239 cycles after its request.
module tb_icdf_tail;
  import qmc_pkg::*;
  import tb_normal_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic req_valid = 1'b0, req_ready, req_flip = 1'b0, resp_valid;
  logic [31:0] req_a = '0;
  logic [2:0] req_tag = '0, resp_tag;
  fp64_t resp_y;
  int checks = 0, failures = 0, lat;
  real maxrel = 0.0;

  icdf_tail #(.M(11), .KT(7), .TAG_W(3)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 120; i++) begin
      logic [31:0] a;
      real x, z, e;
      a = (i == 0) ? 32'd1 : (i == 1) ? 32'((1 << 20) - 1) : 32'(1 + $urandom % ((1 << 20) - 1));
      if (i % 3 == 2) a = 32'(1 << ($urandom % 20)) + 32'($urandom % 4);
      @(negedge clk);
      req_valid = 1'b1; req_a = a; req_flip = 1'($urandom); req_tag = 3'($urandom);
      @(negedge clk);
      req_valid = 1'b0;
      checks++;
      if (req_ready) failures++;
      lat = 1;
      while (!resp_valid) begin @(negedge clk); lat++; end
      x = real'(a) / 4294967296.0;
      z = $bitstoreal(resp_y);
      if (req_flip) z = -z;
      e = icdf_err(x, z);
      checks++;
      if (resp_tag != req_tag || z >= 0.0 || rabs(e) > 2e-9 * rabs(z)) begin
        failures++;
        $display("a=%0d z=%.15g err=%g tag %0d/%0d", a, z, e, resp_tag, req_tag);
      end
      if (rabs(e / z) > maxrel) maxrel = rabs(e / z);
      checks++;
      if (lat != 239) failures++;
    end
    $display("latency %0d cycles, max rel err %g", lat, maxrel);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
