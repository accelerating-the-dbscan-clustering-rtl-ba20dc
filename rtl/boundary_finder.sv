// boundary_finder: marks where the clusters of a z0-sorted event begin and
// end (Algorithm lines 2-12), for DBSCAN with minPts = 2.
//
// With minPts = 2 a cluster is a maximal run of sorted tracks in which each
// track lies within eps of the one before it. The block computes, for every
// lane i,
//   linked[i]   = track i is within eps of track i-1 (both valid),
//                 with linked[0] = linked[N] = 0;
//   boundary[i] = linked[i] xor linked[i+1].
// A cluster of tracks a..b then gives exactly two boundaries, a (start:
// not linked to the previous, linked to the next) and b (end), and a lone
// track ("noise") gives none. Lane i's boundary index is i where it is a
// boundary and all ones ("infinity") elsewhere, so that sorting the indices
// pairs each cluster's start with its end.
//
// Timing: outputs registered, 1 cycle after the inputs; one event per cycle.
// eps is taken with the tracks of the same cycle. The eps comparison and the
// edge rule follow the method; the index encoding of infinity as all ones
// and the 1-cycle register are this design's choices.
module boundary_finder
  import dbscan_pkg::*;
#(
  parameter int N     = 232,
  parameter int IDX_W = $clog2(N + 1)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  track_t           in_tracks [N],   // sorted by z0, invalid lanes last
  input  logic [Z_W-1:0]   eps,             // cluster radius, unsigned, z0 units
  output logic             out_valid,
  output logic [IDX_W-1:0] out_index [N],   // i, or all ones where no boundary
  output logic             out_is_bnd [N]
);

  logic linked [N+1];

  always_comb begin
    logic signed [Z_W:0] dz;
    linked[0] = 1'b0;
    linked[N] = 1'b0;
    for (int i = 1; i < N; i++) begin
      dz = (Z_W+1)'(in_tracks[i].z0) - (Z_W+1)'(in_tracks[i-1].z0);
      linked[i] = in_tracks[i].valid && in_tracks[i-1].valid
                  && (dz <= $signed({1'b0, eps}));
    end
  end

  always_ff @(posedge clk) begin
    for (int i = 0; i < N; i++) begin
      out_is_bnd[i] <= linked[i] ^ linked[i+1];
      out_index[i]  <= (linked[i] ^ linked[i+1]) ? IDX_W'(i) : '1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= in_valid;
  end

endmodule
