// bitonic_sorter: pipelined bitonic sorting network, ascending on a key.
//
// Sorts N elements of {key, payload} at once, one whole set per clock. N
// need not be a power of two: the network is built for NP = 2**clog2(N)
// inputs and the NP-N spare inputs are held at the largest key, so they
// collect at the top end and only the lowest N outputs are brought out.
// A spare can only displace a real element whose key is also all ones;
// callers reserve that key for "empty" entries.
//
// The network has LG*(LG+1)/2 levels of NP/2 compare-exchange cells
// (LG = clog2(N)): merge phase p (block size 2**(p+1)) runs sub-levels at
// distances 2**p ... 1; a cell at lane i compares lanes i and i+d, and it
// orders them ascending when bit p+1 of i is 0 and descending otherwise, so
// the last phase leaves the whole vector ascending. Ties keep no particular
// order.
//
// Timing: a register follows every REG_EVERY levels and the last level, so
// out_* appear LATENCY = ceil(levels/REG_EVERY) cycles after in_*; a new set
// may enter every cycle. in_valid travels alongside (reset to 0); the data
// registers have no reset.
//
// The use of a bitonic network follows the method; the pipelining depth,
// the padding and the handling of ties are this design's choices.
module bitonic_sorter #(
  parameter int N         = 232,
  parameter int KEY_W     = 13,
  parameter int PAY_W     = 16,
  parameter int REG_EVERY = 2
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  logic [KEY_W-1:0] in_key  [N],
  input  logic [PAY_W-1:0] in_pay  [N],
  output logic             out_valid,
  output logic [KEY_W-1:0] out_key [N],
  output logic [PAY_W-1:0] out_pay [N]
);

  localparam int LG      = $clog2(N);
  localparam int NP      = 1 << LG;
  localparam int LEVELS  = dbscan_pkg::bitonic_levels(LG);
  localparam int LATENCY = dbscan_pkg::pipe_cycles(LEVELS, REG_EVERY);
  localparam int EW      = KEY_W + PAY_W;

  typedef logic [EW-1:0] elem_t;

  initial begin
    assert (N >= 2) else $error("bitonic_sorter needs N >= 2");
    assert (REG_EVERY >= 1) else $error("bitonic_sorter needs REG_EVERY >= 1");
  end

  // Level phase p and compare distance 2**q of a flat level number l.
  function automatic int level_phase(input int l);
    int p;
    p = 0;
    while ((p + 1) * (p + 2) / 2 <= l) p++;
    return p;
  endfunction

  function automatic int level_dist_log(input int l);
    int p;
    p = level_phase(l);
    return p - (l - p * (p + 1) / 2);
  endfunction

  elem_t st_in [NP];

  for (genvar i = 0; i < NP; i++) begin : g_in
    if (i < N) begin : g_real
      assign st_in[i] = {in_key[i], in_pay[i]};
    end else begin : g_pad
      assign st_in[i] = {{KEY_W{1'b1}}, {PAY_W{1'b0}}};
    end
  end

  for (genvar l = 0; l < LEVELS; l++) begin : g_lvl
    localparam int  P   = level_phase(l);
    localparam int  Q   = level_dist_log(l);
    localparam bit  REG = ((l + 1) % REG_EVERY == 0) || (l == LEVELS - 1);

    elem_t a   [NP];   // vector entering this level
    elem_t cmb [NP];   // after the compare-exchange cells
    elem_t o   [NP];   // vector leaving this level

    if (l == 0) begin : g_first
      assign a = st_in;
    end else begin : g_next
      assign a = g_lvl[l-1].o;
    end

    for (genvar i = 0; i < NP; i++) begin : g_cell
      if (((i >> Q) & 1) == 0) begin : g_ce
        localparam int J   = i + (1 << Q);
        localparam bit ASC = ((i >> (P + 1)) & 1) == 0;
        logic [KEY_W-1:0] ka, kb;
        logic             swap;
        assign ka     = a[i][EW-1 -: KEY_W];
        assign kb     = a[J][EW-1 -: KEY_W];
        assign swap   = ASC ? (ka > kb) : (ka < kb);
        assign cmb[i] = swap ? a[J] : a[i];
        assign cmb[J] = swap ? a[i] : a[J];
      end
    end

    if (REG) begin : g_reg
      always_ff @(posedge clk) o <= cmb;
    end else begin : g_wire
      assign o = cmb;
    end
  end

  for (genvar i = 0; i < N; i++) begin : g_out
    assign out_key[i] = g_lvl[LEVELS-1].o[i][EW-1 -: KEY_W];
    assign out_pay[i] = g_lvl[LEVELS-1].o[i][PAY_W-1:0];
  end

  // Valid flag pipeline, same depth as the data.
  logic [LATENCY:0] vpipe;
  assign vpipe[0] = in_valid;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) vpipe[LATENCY:1] <= '0;
    else        vpipe[LATENCY:1] <= vpipe[LATENCY-1:0];
  end
  assign out_valid = vpipe[LATENCY];

endmodule
