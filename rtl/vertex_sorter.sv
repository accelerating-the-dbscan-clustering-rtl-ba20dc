// vertex_sorter: orders the vertices of an event by decreasing pT sum
// (Algorithm line 16); entry 0 is then the primary vertex.
//
// The sort key is {~valid, ~pt_sum}, so an ascending bitonic network puts
// valid vertices first, largest pT sum first, and empty entries last. Only
// z0 travels as payload; valid and pT sum are rebuilt from the key. Equal pT
// sums keep no particular order.
//
// Timing: bitonic_sorter latency, one event per cycle. The pT sort follows
// the method; the key encoding is this design's choice.
module vertex_sorter
  import dbscan_pkg::*;
#(
  parameter int NV        = 116,
  parameter int REG_EVERY = 2
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    in_valid,
  input  vertex_t in_vertex  [NV],
  output logic    out_valid,
  output vertex_t out_vertex [NV]
);

  localparam int KEY_W = SUM_W + 1;

  logic [KEY_W-1:0] key_i [NV], key_o [NV];
  logic [Z_W-1:0]   z_i   [NV], z_o   [NV];

  always_comb begin
    for (int i = 0; i < NV; i++) begin
      key_i[i] = ~{in_vertex[i].valid, in_vertex[i].pt_sum};
      z_i[i]   = in_vertex[i].z0;
    end
  end

  bitonic_sorter #(
    .N(NV), .KEY_W(KEY_W), .PAY_W(Z_W), .REG_EVERY(REG_EVERY)
  ) u_sort (
    .clk, .rst_n,
    .in_valid, .in_key(key_i), .in_pay(z_i),
    .out_valid, .out_key(key_o), .out_pay(z_o)
  );

  always_comb begin
    for (int i = 0; i < NV; i++) begin
      {out_vertex[i].valid, out_vertex[i].pt_sum} = ~key_o[i];
      out_vertex[i].z0 = z0_t'(z_o[i]);
    end
  end

endmodule
