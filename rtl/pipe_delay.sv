// pipe_delay: N-stage register delay line with a common clock enable.
// Carries side information alongside fixed-latency arithmetic so that it
// leaves together with the result. N = 0 is a plain wire.
module pipe_delay #(
  parameter int unsigned WIDTH = 8,
  parameter int unsigned N     = 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             en,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);
  if (N == 0) begin : g_wire
    assign q = d;
  end else begin : g_regs
    logic [WIDTH-1:0] r [N];
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        for (int i = 0; i < N; i++) r[i] <= '0;
      end else if (en) begin
        r[0] <= d;
        for (int i = 1; i < N; i++) r[i] <= r[i-1];
      end
    end
    assign q = r[N-1];
  end
endmodule
