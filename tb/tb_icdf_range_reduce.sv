// tb_icdf_range_reduce: self-checking testbench of icdf_range_reduce.
// For random inputs (and 0, 1, 2^31, 2^32-1, octave and segment edges) it
// works out independently, in real arithmetic, the region (0.5, central if
// the folded uniform is at least 2^-(M+1), tail otherwise), the sign flag,
// and for central inputs the octave i = floor(-log2 u) - 1, the segment
// j = floor((u - 2^-(i+2)) / 2^-(i+2+R)) and the offset t, and checks the
// registered outputs one cycle later, also with the enable held low.
module tb_icdf_range_reduce;
  import qmc_pkg::*;
  localparam int M = 11, R = 6;
  logic clk = 1'b0, rst_n = 1'b0, en = 1'b1, in_valid = 1'b0, out_valid, flip;
  logic [31:0] din = '0, tail_a;
  icdf_region_e region;
  logic [$clog2(M)+R-1:0] rom_idx;
  fp64_t t;
  int checks = 0, failures = 0;

  icdf_range_reduce #(.M(M), .R(R)) dut (.*);

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
    for (int n = 0; n < 5000; n++) begin
      logic [31:0] v;
      real u, lo, dl, te;
      int i, j;
      icdf_region_e rg;
      case (n)
        0: v = 32'd0;  1: v = 32'd1;  2: v = 32'h8000_0000;  3: v = 32'hFFFF_FFFF;
        4: v = 32'h0010_0000; 5: v = 32'h000F_FFFF; 6: v = 32'hFFF0_0000; 7: v = 32'h4000_0000;
        default: v = (n % 3 == 0) ? 32'($urandom % (1 << 22)) : $urandom;
      endcase
      @(negedge clk);
      din = v; in_valid = 1'b1; en = 1'b1;
      @(negedge clk);
      in_valid = 1'b0;
      en = (n % 7 != 0);
      din = ~v;        // must not matter while the output is checked
      u = real'(v) / 4294967296.0;
      if (v == 0) u = 1.0 / 4294967296.0;
      if (u > 0.5) u = 1.0 - u;
      i = 0; j = 0; te = 0.0;
      if (v == 32'h8000_0000) rg = RG_HALF;
      else if (u >= 2.0 ** (-(M + 1))) begin
        rg = RG_CENTRAL;
        while (u < 2.0 ** (-(i + 1))) i++;
        i = i - 1;
        lo = 2.0 ** (-(i + 2));
        dl = 2.0 ** (-(i + 2 + R));
        j = int'($floor((u - lo) / dl));
        te = (u - lo) / dl - j;
      end else rg = RG_TAIL;
      checks++;
      if (!out_valid || region != rg || flip != v[31] ||
          (rg == RG_CENTRAL && (rom_idx != ($clog2(M)+R)'(i * (1 << R) + j) || $bitstoreal(t) != te))) begin
        failures++;
        if (failures < 10) $display("din=%h region %0d/%0d idx %0d/%0d t %g/%g", v, region, rg,
                                    rom_idx, i * (1 << R) + j, $bitstoreal(t), te);
      end
      if (rg == RG_TAIL) begin
        checks++;
        if (real'(tail_a) != u * 4294967296.0) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
