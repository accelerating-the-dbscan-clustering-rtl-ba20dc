// track_sorter: orders the tracks of an event by z0 (Algorithm step "sort
// tracks"), so that neighbours along the beam line sit in adjacent lanes and
// every later step can work on all lanes in parallel.
//
// The sort key is {~valid, z0 with its sign bit inverted}: inverting the
// sign bit turns two's complement into an unsigned order, and the leading
// ~valid bit sends empty lanes behind every real track. The key is itself
// the z0, so only pT travels as payload; valid and z0 are rebuilt from the
// sorted key.
//
// Timing: bitonic_sorter latency, LATENCY cycles, one event per cycle.
// Sorting by z0 with a bitonic network follows the method; the key encoding
// is this design's choice.
module track_sorter
  import dbscan_pkg::*;
#(
  parameter int N         = 232,
  parameter int REG_EVERY = 2
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   in_valid,
  input  track_t in_tracks  [N],
  output logic   out_valid,
  output track_t out_tracks [N]
);

  localparam int KEY_W   = Z_W + 1;

  logic [KEY_W-1:0] key_i [N], key_o [N];
  pt_t              pt_i  [N], pt_o  [N];

  always_comb begin
    for (int i = 0; i < N; i++) begin
      key_i[i] = {~in_tracks[i].valid, ~in_tracks[i].z0[Z_W-1], in_tracks[i].z0[Z_W-2:0]};
      pt_i[i]  = in_tracks[i].pt;
    end
  end

  bitonic_sorter #(
    .N(N), .KEY_W(KEY_W), .PAY_W(PT_W), .REG_EVERY(REG_EVERY)
  ) u_sort (
    .clk, .rst_n,
    .in_valid, .in_key(key_i), .in_pay(pt_i),
    .out_valid, .out_key(key_o), .out_pay(pt_o)
  );

  always_comb begin
    for (int i = 0; i < N; i++) begin
      out_tracks[i].valid = ~key_o[i][KEY_W-1];
      out_tracks[i].z0    = {~key_o[i][Z_W-1], key_o[i][Z_W-2:0]};
      out_tracks[i].pt    = pt_o[i];
    end
  end

endmodule
