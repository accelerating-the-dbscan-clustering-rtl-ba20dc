// boundary_sorter: sorts the boundary indices of an event (Algorithm line
// 13) and pairs them into clusters.
//
// Non-boundary lanes carry the index "infinity" (all ones), so after an
// ascending sort the real boundaries are packed at the front in track order,
// and since every cluster contributes exactly two consecutive boundaries,
// entries 2k and 2k+1 are the first and last sorted-track index of cluster k.
// With minPts = 2 an event of N tracks has at most NV = N/2 clusters.
// Each entry carries its boundary flag as payload; a pair is valid when its
// first entry is a real boundary.
//
// Timing: bitonic_sorter latency, one event per cycle. The sort follows the
// method; the pairing into start/end/valid outputs is how this design
// presents the sorted list.
module boundary_sorter
  import dbscan_pkg::*;
#(
  parameter int N         = 232,
  parameter int IDX_W     = $clog2(N + 1),
  parameter int NV        = N / 2,
  parameter int REG_EVERY = 2
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  logic [IDX_W-1:0] in_index  [N],
  input  logic             in_is_bnd [N],
  output logic             out_valid,
  output logic [IDX_W-1:0] out_first [NV],  // first track of cluster k
  output logic [IDX_W-1:0] out_last  [NV],  // last track of cluster k
  output logic             out_pair_valid [NV]
);

  logic [IDX_W-1:0] key_o [N];
  logic [0:0]       flg_i [N], flg_o [N];

  always_comb for (int i = 0; i < N; i++) flg_i[i] = in_is_bnd[i];

  bitonic_sorter #(
    .N(N), .KEY_W(IDX_W), .PAY_W(1), .REG_EVERY(REG_EVERY)
  ) u_sort (
    .clk, .rst_n,
    .in_valid, .in_key(in_index), .in_pay(flg_i),
    .out_valid, .out_key(key_o), .out_pay(flg_o)
  );

  always_comb begin
    for (int k = 0; k < NV; k++) begin
      out_first[k]      = key_o[2*k];
      out_last[k]       = key_o[2*k+1];
      out_pair_valid[k] = flg_o[2*k][0];
    end
  end

endmodule
