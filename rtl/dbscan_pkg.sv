// dbscan_pkg: data formats and latency helpers shared by the DBSCAN
// primary-vertex finder.
//
// A track is reduced to what vertexing needs: its z0 (where it crosses the
// beam line) and its transverse momentum pT, plus a valid flag so that an
// event may carry fewer tracks than the design has lanes. A vertex is the
// median z0 of a cluster and the sum of the pT of its tracks.
//
// Number formats are this design's choice (the clustering method fixes only
// eps = 0.15 cm and minPts = 2):
//   z0     : Z_W-bit two's complement, 1 LSB = 0.01 cm (range +-20.47 cm),
//            so the eps of 0.15 cm is the integer EPS_DEFAULT = 15.
//   pT     : PT_W-bit unsigned, unit left to the track finder.
//   pT sum : SUM_W bits, wide enough for 2048 tracks of full-scale pT.
package dbscan_pkg;

  localparam int Z_W   = 12;
  localparam int PT_W  = 16;
  localparam int SUM_W = PT_W + 11;

  // Nominal cluster radius: 0.15 cm in units of 0.01 cm.
  localparam logic [Z_W-1:0] EPS_DEFAULT = Z_W'(15);

  typedef logic signed [Z_W-1:0] z0_t;
  typedef logic        [PT_W-1:0] pt_t;
  typedef logic       [SUM_W-1:0] ptsum_t;

  typedef struct packed {
    logic valid;
    z0_t  z0;
    pt_t  pt;
  } track_t;

  typedef struct packed {
    logic   valid;
    z0_t    z0;       // median z0 of the cluster
    ptsum_t pt_sum;   // sum of pT of the cluster's tracks
  } vertex_t;

  // Number of compare-exchange levels of a bitonic network on 2**lg inputs.
  function automatic int bitonic_levels(input int lg);
    return lg * (lg + 1) / 2;
  endfunction

  // Clock cycles of a chain of `levels` combinational levels with a
  // register after every `reg_every` of them (and after the last one).
  function automatic int pipe_cycles(input int levels, input int reg_every);
    return (levels + reg_every - 1) / reg_every;
  endfunction

  // Latency in cycles of bitonic_sorter for n inputs.
  function automatic int sorter_latency(input int n, input int reg_every);
    return pipe_cycles(bitonic_levels($clog2(n)), reg_every);
  endfunction

  // Latency in cycles of prefix_sum for n inputs.
  function automatic int prefix_latency(input int n, input int reg_every);
    return pipe_cycles($clog2(n), reg_every);
  endfunction

endpackage
