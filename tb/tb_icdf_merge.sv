// tb_icdf_merge: self-checking testbench of icdf_merge.
// Pushes D-wide entries in which random lanes are marked as tail inputs;
// the tail results for those lanes are delivered later, in per-lane order,
// after random delays. Random output back-pressure. Each output vector must
// match its entry, with the tail result in the marked lanes, in push order.
// Checks that `space` falls when the order FIFO is full, and that the merge
// waits (tail_wait) while a head tail result is missing.
module tb_icdf_merge;
  import qmc_pkg::*;
  localparam int D = 3, QDEPTH = 8, TDEPTH = 16;
  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid = 1'b0, space, out_valid, out_ready = 1'b0, tail_wait;
  logic [D-1:0] in_is_tail = '0, tail_valid = '0;
  fp64_t in_y [D], tail_res = '0, out_y [D];
  int checks = 0, failures = 0, n_wait = 0, n_full = 0, pushed = 0, popped = 0;
  fp64_t exp_q [$];              // D values per pushed entry
  fp64_t tail_pending [D][$];    // tail results not yet delivered

  icdf_merge #(.D(D), .QDEPTH(QDEPTH), .TDEPTH(TDEPTH)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n) begin
    if (tail_wait) n_wait++;
    if (!space) n_full++;
    if (out_valid && out_ready) begin
      for (int l = 0; l < D; l++) begin
        automatic fp64_t e = exp_q.pop_front();
        checks++;
        if (out_y[l] !== e) failures++;
      end
      popped++;
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      out_ready = ($urandom % 3 != 0) && !(n > 200 && n < 260);
      // deliver one pending tail result now and then
      tail_valid = '0;
      if ($urandom % 5 == 0) begin
        int l;
        l = $urandom % D;
        if (tail_pending[l].size() > 0) begin
          tail_valid[l] = 1'b1;
          tail_res = tail_pending[l].pop_front();
        end
      end
      in_valid = 1'b0;
      if (space && ($urandom % 2 == 0) && pushed < 1500) begin
        in_valid = 1'b1;
        for (int l = 0; l < D; l++) begin
          fp64_t tv;
          in_is_tail[l] = ($urandom % 8 == 0);
          in_y[l] = {$urandom, $urandom};
          tv = {$urandom, $urandom};
          if (in_is_tail[l]) begin
            tail_pending[l].push_back(tv);
            exp_q.push_back(tv);
          end else exp_q.push_back(in_y[l]);
        end
        pushed++;
      end
    end
    @(negedge clk) in_valid = 1'b0; out_ready = 1'b1; tail_valid = '0;
    for (int r = 0; r < 200; r++) begin
      @(negedge clk);
      tail_valid = '0;
      for (int l = 0; l < D; l++) if (tail_valid == '0 && tail_pending[l].size() > 0) begin
        tail_valid[l] = 1'b1;
        tail_res = tail_pending[l].pop_front();
      end
    end
    @(negedge clk) tail_valid = '0;
    repeat (5) @(negedge clk);
    checks += 3;
    if (popped != pushed || exp_q.size() != 0) failures++;
    if (n_wait == 0) failures++;
    if (n_full == 0) failures++;
    $display("pushed %0d popped %0d waits %0d full %0d", pushed, popped, n_wait, n_full);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
