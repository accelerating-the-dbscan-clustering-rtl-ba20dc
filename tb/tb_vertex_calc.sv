// tb_vertex_calc: self-checking test of the per-cluster median z0 and pT sum.
// N = 16 sorted tracks with random, partly negative, non-decreasing z0; a
// random set of disjoint clusters of odd and even size, starting at lane 0
// or not. The prefix sums are computed here. Every vertex is compared with
// the reference model's, unused pairs must give invalid vertices, and the
// result must appear one cycle later.
module tb_vertex_calc;
  import dbscan_pkg::*;
  import dbscan_ref_pkg::*;

  localparam int N = 16, NV = N / 2;
  localparam int IW = $clog2(N + 1);

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0, n_odd = 0, n_even = 0;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic          iv, ov;
  z0_t           z [N];
  ptsum_t        ps [N];
  logic [IW-1:0] f [NV], l [NV];
  logic          pv [NV];
  vertex_t       ovx [NV];

  vertex_calc #(.N(N)) dut (
    .clk, .rst_n, .in_valid(iv), .in_z0(z), .in_psum(ps),
    .in_first(f), .in_last(l), .in_pair_valid(pv), .out_valid(ov), .out_vertex(ovx));

  initial begin
    trk_q_t  s;
    span_q_t c;
    vertex_t want;
    int zz, pos, len;
    longint acc;
    iv = 0;
    for (int i = 0; i < N; i++) begin z[i] = '0; ps[i] = '0; end
    for (int k = 0; k < NV; k++) begin f[k] = '1; l[k] = '1; pv[k] = 0; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 400; n++) begin
      @(negedge clk);
      s = {};
      zz = -300 + $urandom_range(0, 100);
      acc = 0;
      for (int i = 0; i < N; i++) begin
        track_t t;
        zz += $urandom_range(0, 7) == 0 ? 0 : $urandom_range(1, 9);
        t.valid = 1; t.z0 = z0_t'(zz); t.pt = pt_t'($urandom);
        s.push_back(t);
        z[i] = t.z0;
        acc += t.pt;
        ps[i] = ptsum_t'(acc);
      end
      c = {};
      pos = $urandom_range(0, 2);
      while (n % 13 != 5) begin
        len = $urandom_range(2, 6);
        if (pos + len > N) break;
        c.push_back('{pos, pos + len - 1});
        pos += len + $urandom_range(0, 2);
      end
      for (int k = 0; k < NV; k++) begin
        pv[k] = (k < c.size());
        f[k]  = pv[k] ? IW'(c[k].first) : '1;
        l[k]  = pv[k] ? IW'(c[k].last)  : '1;
      end
      iv = 1;
      @(posedge clk); #1;
      checks++;
      if (!ov) begin failures++; $display("valid missing"); end
      for (int k = 0; k < NV; k++) begin
        checks++;
        if (k < c.size()) begin
          want = make_vertex(s, c[k]);
          if ((c[k].last - c[k].first) % 2 == 0) n_odd++; else n_even++;
          if (ovx[k] != want) begin
            failures++;
            $display("vertex %0d (%0d..%0d): z %0d pt %0d, expected z %0d pt %0d", k, c[k].first,
                     c[k].last, ovx[k].z0, ovx[k].pt_sum, want.z0, want.pt_sum);
          end
        end else if (ovx[k].valid) begin
          failures++; $display("vertex %0d should be invalid", k);
        end
      end
    end
    checks++;
    if (n_odd == 0 || n_even == 0) begin failures++; $display("odd/even medians not both seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
