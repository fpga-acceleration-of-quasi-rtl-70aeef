// tb_icdf_tail_arbiter: self-checking testbench of icdf_tail_arbiter.
// Random lanes raise requests that stay up until granted; a model tail unit
// is ready on random cycles. Each cycle the testbench checks that at most
// one lane is popped, only when the unit is ready, that the forwarded
// request carries the granted lane's data and tag, and that the grant is the
// first requesting lane after the previous grant (round robin). Tagged
// responses must reach exactly the lane named by the tag. No lane may see
// more than D-1 grants to other lanes while it waits.
module tb_icdf_tail_arbiter;
  import qmc_pkg::*;
  localparam int D = 5, TAG_W = 3;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [D-1:0] lane_valid = '0, lane_flip = '0, lane_pop, lane_resp_valid;
  logic [31:0] lane_a [D];
  fp64_t lane_resp_y;
  logic tail_req_valid, tail_req_ready = 1'b0, tail_req_flip;
  logic [31:0] tail_req_a;
  logic [TAG_W-1:0] tail_req_tag, tail_resp_tag = '0;
  logic tail_resp_valid = 1'b0;
  fp64_t tail_resp_y = '0;
  int checks = 0, failures = 0, last = D - 1, waitc [D];

  icdf_tail_arbiter #(.D(D), .TAG_W(TAG_W)) dut (.*);

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
    for (int n = 0; n < 4000; n++) begin
      int exp_l;
      @(negedge clk);
      for (int l = 0; l < D; l++) if (!lane_valid[l] && $urandom % 4 == 0) begin
        lane_valid[l] = 1'b1; lane_a[l] = $urandom; lane_flip[l] = 1'($urandom);
      end
      tail_req_ready = ($urandom % 2 == 0);
      tail_resp_valid = ($urandom % 3 == 0);
      tail_resp_tag = TAG_W'($urandom % D);
      tail_resp_y = {$urandom, $urandom};
      #1;
      exp_l = -1;
      for (int k = 1; k <= D; k++) if (exp_l < 0 && lane_valid[(last + k) % D]) exp_l = (last + k) % D;
      checks++;
      if ((exp_l >= 0) != tail_req_valid) failures++;
      if (exp_l >= 0) begin
        checks++;
        if (tail_req_tag != TAG_W'(exp_l) || tail_req_a != lane_a[exp_l] ||
            tail_req_flip != lane_flip[exp_l] ||
            lane_pop != (tail_req_ready ? D'(1) << exp_l : '0)) begin
          failures++;
          $display("cycle %0d: grant %0d expected %0d pop %b", n, tail_req_tag, exp_l, lane_pop);
        end
      end else if (lane_pop != '0) failures++;
      checks++;
      if (lane_resp_valid != (tail_resp_valid ? D'(1) << tail_resp_tag : '0) || lane_resp_y != tail_resp_y)
        failures++;
      @(posedge clk);
      #1;
      if (exp_l >= 0 && tail_req_ready) begin
        for (int l = 0; l < D; l++) if (lane_valid[l] && l != exp_l) waitc[l]++;
        lane_valid[exp_l] = 1'b0;
        last = exp_l;
        checks++;
        if (waitc[exp_l] > D - 1) failures++;   // grants to others while waiting
        waitc[exp_l] = 0;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
