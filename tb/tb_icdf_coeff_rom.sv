// tb_icdf_coeff_rom: self-checking testbench of icdf_coeff_rom.
// Reads random segments through both ports, evaluates the stored cubic at
// random t in real arithmetic and checks the result against the inverse
// normal CDF at u = 2^-(i+2) + (j + t)*2^-(i+2+R): the implied error in z,
// (Phi(z) - u)/pdf(z), with Phi an independent numerical integral, must stay
// below 1e-10*|z| + 1e-11. Also checks the one-cycle read latency by holding
// the enable low.
module tb_icdf_coeff_rom;
  import qmc_pkg::*;
  import tb_normal_pkg::*;
  localparam int M = 11, R = 6, KC = 3;
  localparam int IW = $clog2(M) + R;
  logic clk = 1'b0, en = 1'b0;
  logic [IW-1:0] addr_a = '0, addr_b = '0;
  fp64_t q_a [KC+1], q_b [KC+1];
  int checks = 0, failures = 0;

  icdf_coeff_rom #(.M(M), .R(R), .KC(KC)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real eval(input fp64_t c [KC+1], input real t);
    real y = 0.0;
    for (int k = KC; k >= 0; k--) y = y * t + $bitstoreal(c[k]);
    return y;
  endfunction

  task automatic check(input int e, input fp64_t c [KC+1]);
    int i, j;
    real t, u, z, er;
    i = e / (1 << R); j = e % (1 << R);
    for (int s = 0; s < 3; s++) begin
      t = (s == 0) ? 0.0 : ($urandom % 1000000) / 1000000.0;
      u = 2.0 ** (-(i + 2)) + (j + t) * 2.0 ** (-(i + 2 + R));
      z = eval(c, t);
      er = icdf_err(u, z);
      checks++;
      if (rabs(er) > 1e-10 * rabs(z) + 1e-11) begin
        failures++;
        $display("seg %0d/%0d t=%g z=%.15g err=%g", i, j, t, z, er);
      end
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    for (int n = 0; n < 300; n++) begin
      int ea, eb;
      ea = (n == 0) ? 0 : (n == 1) ? M * (1 << R) - 1 : int'($urandom % (M * (1 << R)));
      eb = int'($urandom % (M * (1 << R)));
      addr_a = IW'(ea); addr_b = IW'(eb); en = 1'b1;
      @(negedge clk);
      en = 1'b0;
      addr_a = '0; addr_b = '0;
      @(negedge clk);
      check(ea, q_a);
      check(eb, q_b);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
