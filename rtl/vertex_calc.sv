// vertex_calc: turns each cluster (first and last index into the z0-sorted
// tracks) into a vertex: its median z0 and its summed pT (Algorithm lines
// 14-15). NV identical units work in parallel, one per possible cluster.
//
// For cluster a..b the tracks are already in z0 order, so the median is
// read directly: with m = (a+b)/2 it is z0[m] for an odd count of tracks and
// the mean of z0[m] and z0[m+1], rounded towards minus infinity, for an even
// count. The pT sum is psum[b] - psum[a-1] (psum[b] when a = 0), taken from
// the inclusive prefix sum of the sorted pT.
//
// Timing: outputs registered, 1 cycle after the inputs; one event per cycle.
// Invalid pairs give invalid vertices with zero fields. The median and pT
// sum follow the method; the rounding of an even-count median is this
// design's choice.
module vertex_calc
  import dbscan_pkg::*;
#(
  parameter int N     = 232,
  parameter int IDX_W = $clog2(N + 1),
  parameter int NV    = N / 2
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  z0_t              in_z0   [N],   // z0 of the sorted tracks
  input  ptsum_t           in_psum [N],   // inclusive prefix sum of their pT
  input  logic [IDX_W-1:0] in_first [NV],
  input  logic [IDX_W-1:0] in_last  [NV],
  input  logic             in_pair_valid [NV],
  output logic             out_valid,
  output vertex_t          out_vertex [NV]
);

  vertex_t vtx [NV];

  // Read lane `idx` of an array, 0 when out of range ("infinity").
  function automatic z0_t pick_z(input z0_t arr [N], input logic [IDX_W-1:0] idx);
    return (idx < IDX_W'(N)) ? arr[idx] : '0;
  endfunction

  function automatic ptsum_t pick_s(input ptsum_t arr [N], input logic [IDX_W-1:0] idx);
    return (idx < IDX_W'(N)) ? arr[idx] : '0;
  endfunction

  always_comb begin
    for (int k = 0; k < NV; k++) begin
      logic [IDX_W:0]   mid2;
      logic [IDX_W-1:0] mid;
      logic             odd;
      logic signed [Z_W:0] zsum;
      z0_t              za, zb;
      ptsum_t           s_last, s_before;

      mid2     = {1'b0, in_first[k]} + {1'b0, in_last[k]};
      mid      = mid2[IDX_W:1];
      odd      = ~mid2[0];                       // a+b even <=> odd count
      za       = pick_z(in_z0, mid);
      zb       = pick_z(in_z0, mid + 1'b1);
      zsum     = (Z_W+1)'(za) + (Z_W+1)'(zb);
      s_last   = pick_s(in_psum, in_last[k]);
      s_before = (in_first[k] == '0) ? '0 : pick_s(in_psum, in_first[k] - 1'b1);

      vtx[k].valid  = in_pair_valid[k];
      vtx[k].z0     = in_pair_valid[k] ? (odd ? za : zsum[Z_W:1]) : '0;
      vtx[k].pt_sum = in_pair_valid[k] ? s_last - s_before : '0;
    end
  end

  always_ff @(posedge clk) out_vertex <= vtx;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= in_valid;
  end

endmodule
