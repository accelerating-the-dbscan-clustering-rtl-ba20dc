// tb_boundary_sorter: self-checking test of the boundary sort and pairing.
// N = 16 lanes, REG_EVERY = 1. Each event places random disjoint clusters
// (two or more lanes, possibly back to back, from none up to N/2) and marks
// their first and last lanes as boundaries, the rest as infinity. Checks
// that pair k holds cluster k's ends in track order, that exactly the first
// cluster-count pairs are valid, and the latency, with an event every cycle.
module tb_boundary_sorter;
  import dbscan_pkg::*;
  import dbscan_ref_pkg::*;

  localparam int N = 16, R = 1, NV = N / 2;
  localparam int IW = $clog2(N + 1);
  localparam int LAT = sorter_latency(N, R);

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0, cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic          iv, ov;
  logic [IW-1:0] idx [N], of [NV], ol [NV];
  logic          bnd [N], opv [NV];

  boundary_sorter #(.N(N), .REG_EVERY(R)) dut (
    .clk, .rst_n, .in_valid(iv), .in_index(idx), .in_is_bnd(bnd),
    .out_valid(ov), .out_first(of), .out_last(ol), .out_pair_valid(opv));

  span_q_t exp_q [$];
  int      t_q [$];

  always @(posedge clk) if (rst_n && ov) begin
    span_q_t c;
    int t;
    if (exp_q.size() == 0) begin checks++; failures++; $display("unexpected output"); end
    else begin
      c = exp_q.pop_front();
      t = t_q.pop_front();
      for (int k = 0; k < NV; k++) begin
        checks++;
        if (k < c.size()) begin
          if (!opv[k] || of[k] != IW'(c[k].first) || ol[k] != IW'(c[k].last)) begin
            failures++;
            $display("pair %0d: %0d %0d..%0d, expected %0d..%0d", k, opv[k], of[k], ol[k], c[k].first, c[k].last);
          end
        end else if (opv[k]) begin
          failures++; $display("pair %0d should be empty", k);
        end
      end
      checks++;
      if (cycle - t != LAT) begin failures++; $display("latency %0d", cycle - t); end
    end
  end

  initial begin
    span_q_t c;
    int pos, len;
    iv = 0;
    for (int i = 0; i < N; i++) begin idx[i] = '1; bnd[i] = 0; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 400; n++) begin
      @(negedge clk);
      c = {};
      pos = (n % 5 == 0) ? 0 : $urandom_range(0, 3);
      while (1) begin
        len = (n % 5 == 0) ? 2 : $urandom_range(2, 5);
        if (n % 11 == 3 || pos + len > N) break;
        c.push_back('{pos, pos + len - 1});
        pos += len + ((n % 5 == 0) ? 0 : $urandom_range(0, 3));
      end
      for (int i = 0; i < N; i++) begin idx[i] = '1; bnd[i] = 0; end
      foreach (c[k]) begin
        idx[c[k].first] = IW'(c[k].first); bnd[c[k].first] = 1;
        idx[c[k].last]  = IW'(c[k].last);  bnd[c[k].last]  = 1;
      end
      iv = ($urandom_range(0, 4) != 0);
      if (iv) begin exp_q.push_back(c); t_q.push_back(cycle); end
    end
    @(negedge clk); iv = 0;
    repeat (LAT + 4) @(posedge clk);
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("events lost"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
