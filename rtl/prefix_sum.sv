// prefix_sum: inclusive running sum of the pT of the z0-sorted tracks,
// out_sum[i] = pt[0] + ... + pt[i], so that the pT of any cluster a..b is
// out_sum[b] - out_sum[a-1] with one subtraction.
//
// Hillis-Steele (Kogge-Stone) scan: clog2(N) levels; at level s every lane
// i >= 2**s adds the value of lane i - 2**s. All lanes work in parallel.
//
// Timing: a register follows every REG_EVERY levels and the last level,
// LATENCY = ceil(clog2(N)/REG_EVERY) cycles, one event per cycle. The use of
// a parallel prefix sum follows the method; the scan structure and pipelining
// are this design's choices. Invalid lanes must carry pT = 0.
module prefix_sum
  import dbscan_pkg::*;
#(
  parameter int N         = 232,
  parameter int REG_EVERY = 2
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   in_valid,
  input  pt_t    in_pt  [N],
  output logic   out_valid,
  output ptsum_t out_sum [N]
);

  localparam int LG      = $clog2(N);
  localparam int LATENCY = pipe_cycles(LG, REG_EVERY);

  initial assert (N >= 2) else $error("prefix_sum needs N >= 2");

  ptsum_t st_in [N];
  always_comb for (int i = 0; i < N; i++) st_in[i] = ptsum_t'(in_pt[i]);

  for (genvar s = 0; s < LG; s++) begin : g_lvl
    localparam int  D   = 1 << s;
    localparam bit  REG = ((s + 1) % REG_EVERY == 0) || (s == LG - 1);

    ptsum_t a [N], cmb [N], o [N];

    if (s == 0) begin : g_first
      assign a = st_in;
    end else begin : g_next
      assign a = g_lvl[s-1].o;
    end

    always_comb begin
      for (int i = 0; i < N; i++) cmb[i] = (i >= D) ? a[i] + a[i-D] : a[i];
    end

    if (REG) begin : g_reg
      always_ff @(posedge clk) o <= cmb;
    end else begin : g_wire
      assign o = cmb;
    end
  end

  assign out_sum = g_lvl[LG-1].o;

  logic [LATENCY:0] vpipe;
  assign vpipe[0] = in_valid;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) vpipe[LATENCY:1] <= '0;
    else        vpipe[LATENCY:1] <= vpipe[LATENCY-1:0];
  end
  assign out_valid = vpipe[LATENCY];

endmodule
