// pipe_delay: delays a W-bit word by D clock cycles (D = 0: a wire).
// Used to keep the sorted tracks, their prefix sums and eps in step with
// the sorting networks they run beside. No reset: the data are qualified by
// valid flags that travel through the reset pipelines of the other blocks.
module pipe_delay #(
  parameter int W = 8,
  parameter int D = 1
) (
  input  logic         clk,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);

  if (D == 0) begin : g_wire
    assign q = d;
  end else begin : g_pipe
    logic [W-1:0] r [D];
    always_ff @(posedge clk) begin
      r[0] <= d;
      for (int i = 1; i < D; i++) r[i] <= r[i-1];
    end
    assign q = r[D-1];
  end

endmodule
