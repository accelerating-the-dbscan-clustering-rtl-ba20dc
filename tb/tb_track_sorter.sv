// tb_track_sorter: self-checking test of the z0 sort of the tracks.
// N = 20 lanes, random events every cycle with negative and positive z0,
// equal z0 values and empty lanes. Checks that valid tracks come first in
// non-decreasing z0, that they are the input's valid tracks (z0, pT), that
// the empty lanes are flagged invalid, and the latency.
module tb_track_sorter;
  import dbscan_pkg::*;

  localparam int N = 20, R = 1;
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

  logic   iv, ov;
  track_t it [N], ot [N];

  track_sorter #(.N(N), .REG_EVERY(R)) dut (
    .clk, .rst_n, .in_valid(iv), .in_tracks(it), .out_valid(ov), .out_tracks(ot));

  typedef logic [Z_W+PT_W-1:0] zp_t;
  typedef zp_t zq_t [$];
  zq_t exp_q [$];
  int  t_q [$];

  always @(posedge clk) if (rst_n && ov) begin
    zq_t got, want;
    bit  order_ok;
    int  t;
    order_ok = 1;
    got = {};
    for (int i = 0; i < N; i++) begin
      if (ot[i].valid) begin
        if (i > 0 && !ot[i-1].valid) order_ok = 0;
        if (i > 0 && ot[i-1].valid && ot[i].z0 < ot[i-1].z0) order_ok = 0;
        got.push_back({ot[i].z0, ot[i].pt});
      end
    end
    checks++;
    if (!order_ok) begin failures++; $display("order wrong"); end
    if (exp_q.size() == 0) begin checks++; failures++; $display("unexpected output"); end
    else begin
      want = exp_q.pop_front();
      t = t_q.pop_front();
      got.sort();
      checks++;
      if (got != want) begin failures++; $display("track set differs"); end
      checks++;
      if (cycle - t != LAT) begin failures++; $display("latency %0d", cycle - t); end
    end
  end

  initial begin
    zq_t q;
    iv = 0;
    for (int i = 0; i < N; i++) it[i] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 300; n++) begin
      @(negedge clk);
      iv = ($urandom_range(0, 5) != 0);
      q = {};
      for (int i = 0; i < N; i++) begin
        it[i].valid = ($urandom_range(0, 3) != 0) || (n % 10 == 0);
        it[i].z0    = (n % 4 == 1) ? z0_t'($signed($urandom_range(0, 6)) - 3) : z0_t'($urandom);
        it[i].pt    = pt_t'($urandom);
        if (it[i].valid) q.push_back({it[i].z0, it[i].pt});
      end
      q.sort();
      if (iv) begin exp_q.push_back(q); t_q.push_back(cycle); end
    end
    @(negedge clk); iv = 0;
    repeat (LAT + 4) @(posedge clk);
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("events lost"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
