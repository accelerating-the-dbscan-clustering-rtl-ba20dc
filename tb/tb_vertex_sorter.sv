// tb_vertex_sorter: self-checking test of the pT-sum ordering of vertices.
// NV = 10 with a register after every level, random events every cycle with
// a random number of valid vertices, some with equal pT sums. Checks that
// the valid vertices come first by non-increasing pT sum, that they are the
// input's vertices, that the rest are invalid, and the latency.
module tb_vertex_sorter;
  import dbscan_pkg::*;
  import dbscan_ref_pkg::*;

  localparam int NV = 10, R = 1;
  localparam int LAT = sorter_latency(NV, R);

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

  logic    iv, ov;
  vertex_t vi [NV], vo [NV];

  vertex_sorter #(.NV(NV), .REG_EVERY(R)) dut (
    .clk, .rst_n, .in_valid(iv), .in_vertex(vi), .out_valid(ov), .out_vertex(vo));

  vtx_q_t exp_q [$];
  int     t_q [$];

  always @(posedge clk) if (rst_n && ov) begin
    vtx_q_t got, want;
    int t;
    got = {};
    for (int i = 0; i < NV; i++) if (vo[i].valid) got.push_back(vo[i]);
    if (exp_q.size() == 0) begin checks++; failures++; $display("unexpected output"); end
    else begin
      want = exp_q.pop_front();
      t = t_q.pop_front();
      checks++;
      if (!same_vertices(got, want)) begin failures++; $display("vertex list differs"); end
      for (int i = 0; i < NV; i++) begin
        checks++;
        if (vo[i].valid != (i < want.size())) begin failures++; $display("valid lane %0d wrong", i); end
      end
      checks++;
      if (cycle - t != LAT) begin failures++; $display("latency %0d", cycle - t); end
    end
  end

  initial begin
    vtx_q_t q;
    int nv;
    iv = 0;
    for (int i = 0; i < NV; i++) vi[i] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 400; n++) begin
      @(negedge clk);
      nv = $urandom_range(0, NV);
      q = {};
      for (int i = 0; i < NV; i++) begin
        vi[i].valid  = ($urandom_range(0, NV - 1) < nv);
        vi[i].z0     = z0_t'($urandom);
        vi[i].pt_sum = (n % 3 == 0) ? ptsum_t'($urandom_range(0, 3)) : ptsum_t'($urandom);
        if (!vi[i].valid) vi[i].pt_sum = ptsum_t'($urandom);  // ignored
        if (vi[i].valid) q.push_back(vi[i]);
      end
      iv = ($urandom_range(0, 4) != 0);
      if (iv) begin exp_q.push_back(sort_vertices(q)); t_q.push_back(cycle); end
    end
    @(negedge clk); iv = 0;
    repeat (LAT + 4) @(posedge clk);
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("events lost"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
