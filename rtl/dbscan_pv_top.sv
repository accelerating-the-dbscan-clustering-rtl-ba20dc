// dbscan_pv_top: primary-vertex finder for one bunch crossing, using DBSCAN
// along the beam line with minPts = 2, fully parallel and fully pipelined.
//
// An event is up to N_TRACKS tracks (z0, pT, valid) plus the cluster radius
// eps, presented together in one cycle. The pipeline:
//   1. track_sorter     sorts the tracks by z0 (bitonic network, N_TRACKS);
//   2. boundary_finder  links each track to its predecessor when they are
//                       within eps and marks the two ends of every run of
//                       linked tracks (a cluster); lone tracks are noise;
//   3. boundary_sorter  sorts the boundary indices (bitonic, N_TRACKS) so
//                       that entries 2k, 2k+1 are the ends of cluster k;
//      prefix_sum       meanwhile forms the running pT sum of the sorted
//                       tracks;
//   4. vertex_calc      gives each cluster its median z0 and pT sum;
//   5. vertex_sorter    sorts the vertices by decreasing pT sum (bitonic,
//                       N_TRACKS/2); entry 0 is the primary vertex.
// pipe_delay stages carry eps, the sorted z0 and the prefix sums beside the
// sorting networks so that every block sees one event at a time.
//
// Interface: in_valid qualifies in_tracks and in_eps; out_valid qualifies
// out_vertices (valid ones first, by decreasing pT sum), out_primary
// (= out_vertices[0]) and out_n_vertices. Tracks with valid = 0 are ignored.
// Timing: a new event may enter every cycle; results leave LATENCY cycles
// later (52 cycles at the defaults with REG_EVERY = 2, i.e. 520 ns at
// 100 MHz). Reset (rst_n, asynchronous, active low) clears only the valid
// pipeline.
//
// The algorithm, its order of steps and the sizes (232 tracks, 116 vertices,
// eps = 0.15 cm) follow the method; the number formats (dbscan_pkg), the
// pipelining depth and the single-cycle event interface are this design's
// choices.
module dbscan_pv_top
  import dbscan_pkg::*;
#(
  parameter int N_TRACKS  = 232,
  parameter int REG_EVERY = 2
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  input  track_t                  in_tracks [N_TRACKS],
  input  logic [Z_W-1:0]          in_eps,
  output logic                    out_valid,
  output vertex_t                 out_vertices [N_TRACKS/2],
  output vertex_t                 out_primary,
  output logic [$clog2(N_TRACKS/2+1)-1:0] out_n_vertices
);

  localparam int N      = N_TRACKS;
  localparam int NV     = N_TRACKS / 2;
  localparam int IDX_W  = $clog2(N + 1);
  localparam int LAT_TS = sorter_latency(N, REG_EVERY);
  localparam int LAT_BS = sorter_latency(N, REG_EVERY);
  localparam int LAT_PS = prefix_latency(N, REG_EVERY);
  localparam int LAT_VS = sorter_latency(NV, REG_EVERY);
  localparam int D_PS   = 1 + LAT_BS - LAT_PS;   // prefix sum to vertex_calc
  localparam int D_Z    = 1 + LAT_BS;            // sorted z0 to vertex_calc
  localparam int LATENCY = LAT_TS + 1 + LAT_BS + 1 + LAT_VS;

  initial begin
    assert (NV >= 2) else $error("dbscan_pv_top needs N_TRACKS >= 4");
    assert (D_PS >= 0) else $error("prefix sum slower than boundary sort");
  end

  // ---- 1. sort tracks by z0 ------------------------------------------------
  logic   ts_valid;
  track_t ts_tracks [N];

  track_sorter #(.N(N), .REG_EVERY(REG_EVERY)) u_track_sorter (
    .clk, .rst_n,
    .in_valid, .in_tracks,
    .out_valid(ts_valid), .out_tracks(ts_tracks)
  );

  logic [Z_W-1:0] eps_d;
  pipe_delay #(.W(Z_W), .D(LAT_TS)) u_eps_delay (.clk, .d(in_eps), .q(eps_d));

  // ---- 2. cluster boundaries -----------------------------------------------
  logic             bf_valid;
  logic [IDX_W-1:0] bf_index [N];
  logic             bf_is_bnd [N];

  boundary_finder #(.N(N), .IDX_W(IDX_W)) u_boundary_finder (
    .clk, .rst_n,
    .in_valid(ts_valid), .in_tracks(ts_tracks), .eps(eps_d),
    .out_valid(bf_valid), .out_index(bf_index), .out_is_bnd(bf_is_bnd)
  );

  // ---- 3. pair boundaries; prefix sum of pT alongside -----------------------
  logic             bs_valid;
  logic [IDX_W-1:0] bs_first [NV], bs_last [NV];
  logic             bs_pair_valid [NV];

  boundary_sorter #(.N(N), .IDX_W(IDX_W), .NV(NV), .REG_EVERY(REG_EVERY)) u_boundary_sorter (
    .clk, .rst_n,
    .in_valid(bf_valid), .in_index(bf_index), .in_is_bnd(bf_is_bnd),
    .out_valid(bs_valid), .out_first(bs_first), .out_last(bs_last),
    .out_pair_valid(bs_pair_valid)
  );

  pt_t    ts_pt [N];
  logic   ps_valid;
  ptsum_t ps_sum [N];

  always_comb for (int i = 0; i < N; i++) ts_pt[i] = ts_tracks[i].valid ? ts_tracks[i].pt : '0;

  prefix_sum #(.N(N), .REG_EVERY(REG_EVERY)) u_prefix_sum (
    .clk, .rst_n,
    .in_valid(ts_valid), .in_pt(ts_pt),
    .out_valid(ps_valid), .out_sum(ps_sum)
  );

  // Delay lines: flatten, delay, unflatten.
  logic [N*SUM_W-1:0] ps_flat, ps_flat_d;
  logic [N*Z_W-1:0] z_flat, z_flat_d;
  ptsum_t           vc_psum [N];
  z0_t              vc_z0   [N];
  logic             ps_valid_d;

  always_comb begin
    for (int i = 0; i < N; i++) begin
      ps_flat[i*SUM_W +: SUM_W] = ps_sum[i];
      z_flat[i*Z_W +: Z_W]      = ts_tracks[i].z0;
    end
  end

  pipe_delay #(.W(N*SUM_W),   .D(D_PS)) u_psum_delay (.clk, .d(ps_flat), .q(ps_flat_d));
  pipe_delay #(.W(N*Z_W),     .D(D_Z))  u_z_delay    (.clk, .d(z_flat),  .q(z_flat_d));

  always_comb begin
    for (int i = 0; i < N; i++) begin
      vc_psum[i] = ps_flat_d[i*SUM_W +: SUM_W];
      vc_z0[i]   = z0_t'(z_flat_d[i*Z_W +: Z_W]);
    end
  end

  // Valid flag of the delayed prefix sums, reset like the other valid pipelines.
  logic [D_PS:0] ps_vpipe;
  assign ps_vpipe[0] = ps_valid;
  if (D_PS > 0) begin : g_ps_vpipe
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) ps_vpipe[D_PS:1] <= '0;
      else        ps_vpipe[D_PS:1] <= ps_vpipe[D_PS-1:0];
    end
  end
  assign ps_valid_d = ps_vpipe[D_PS];

  // The prefix sums must arrive with the boundary pairs of the same event.
  a_psum_aligned: assert property (@(posedge clk) disable iff (!rst_n) ps_valid_d == bs_valid);

  // ---- 4. vertices ------------------------------------------------------------
  logic    vc_valid;
  vertex_t vc_vertex [NV];

  vertex_calc #(.N(N), .IDX_W(IDX_W), .NV(NV)) u_vertex_calc (
    .clk, .rst_n,
    .in_valid(bs_valid), .in_z0(vc_z0), .in_psum(vc_psum),
    .in_first(bs_first), .in_last(bs_last), .in_pair_valid(bs_pair_valid),
    .out_valid(vc_valid), .out_vertex(vc_vertex)
  );

  // ---- 5. sort vertices by pT sum ------------------------------------------
  vertex_sorter #(.NV(NV), .REG_EVERY(REG_EVERY)) u_vertex_sorter (
    .clk, .rst_n,
    .in_valid(vc_valid), .in_vertex(vc_vertex),
    .out_valid, .out_vertex(out_vertices)
  );

  assign out_primary = out_vertices[0];

  always_comb begin
    out_n_vertices = '0;
    for (int i = 0; i < NV; i++) out_n_vertices += {{($bits(out_n_vertices)-1){1'b0}}, out_vertices[i].valid};
  end

endmodule
