// tb_boundary_finder: self-checking test of the cluster-edge marking.
// N = 16 lanes of z0-sorted tracks whose gaps are drawn around eps (gaps of
// exactly eps included, eps varied per event), with a random number of empty
// lanes at the end. The expected boundary lanes come from the reference
// clustering: first and last track of every run of two or more. Checks every
// lane's flag and index, and the 1-cycle latency.
module tb_boundary_finder;
  import dbscan_pkg::*;
  import dbscan_ref_pkg::*;

  localparam int N = 16;
  localparam int IW = $clog2(N + 1);

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic           iv, ov;
  track_t         it [N];
  logic [Z_W-1:0] eps;
  logic [IW-1:0]  oidx [N];
  logic           obnd [N];

  boundary_finder #(.N(N)) dut (
    .clk, .rst_n, .in_valid(iv), .in_tracks(it), .eps,
    .out_valid(ov), .out_index(oidx), .out_is_bnd(obnd));

  initial begin
    trk_q_t  s;
    span_q_t c;
    bit      want [N];
    int      nvalid, z, e;
    iv = 0; eps = '0;
    for (int i = 0; i < N; i++) it[i] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 500; n++) begin
      @(negedge clk);
      e = (n < 20) ? 15 : $urandom_range(0, 30);
      nvalid = (n % 7 == 0) ? N : $urandom_range(0, N);
      z = -1000 + $urandom_range(0, 200);
      s = {};
      for (int i = 0; i < N; i++) begin
        case ($urandom_range(0, 3))
          0: z += e;                              // exactly eps
          1: z += $urandom_range(0, e);           // inside
          2: z += e + 1;                          // just outside
          default: z += $urandom_range(e + 1, 4 * e + 40);
        endcase
        it[i].valid = (i < nvalid);
        it[i].z0    = z0_t'(z);
        it[i].pt    = pt_t'($urandom);
        if (i < nvalid) s.push_back(it[i]);
      end
      eps = Z_W'(e);
      iv = 1;
      c = find_clusters(s, e);
      for (int i = 0; i < N; i++) want[i] = 0;
      foreach (c[k]) begin want[c[k].first] = 1; want[c[k].last] = 1; end
      @(posedge clk); #1;
      checks++;
      if (!ov) begin failures++; $display("valid missing"); end
      for (int i = 0; i < N; i++) begin
        checks++;
        if (obnd[i] != want[i] || oidx[i] != (want[i] ? IW'(i) : '1)) begin
          failures++;
          $display("event %0d lane %0d: flag %0d idx %0d, expected %0d", n, i, obnd[i], oidx[i], want[i]);
        end
      end
    end
    @(negedge clk); iv = 0;
    @(posedge clk); #1;
    checks++;
    if (ov) begin failures++; $display("valid stuck"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
