// tb_prefix_sum: self-checking test of the pT running sum.
// Two instances, N = 13 with a register after every level and N = 232 (the
// full track count) with the default pipelining, each fed a random event
// every cycle with gaps, including full-scale pT. Checks every lane against
// a sequential running sum, and the latency.
module tb_prefix_sum;
  import dbscan_pkg::*;

  localparam int NA = 13, RA = 1, NB = 232, RB = 2;
  localparam int LAT_A = prefix_latency(NA, RA);
  localparam int LAT_B = prefix_latency(NB, RB);

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

  logic   iv, ova, ovb;
  pt_t    pa [NA], pb [NB];
  ptsum_t sa [NA], sb [NB];

  prefix_sum #(.N(NA), .REG_EVERY(RA)) dut_a (
    .clk, .rst_n, .in_valid(iv), .in_pt(pa), .out_valid(ova), .out_sum(sa));
  prefix_sum #(.N(NB), .REG_EVERY(RB)) dut_b (
    .clk, .rst_n, .in_valid(iv), .in_pt(pb), .out_valid(ovb), .out_sum(sb));

  typedef ptsum_t sq_t [$];
  sq_t qa [$], qb [$];
  int  ta [$], tb [$];

  task automatic cmp(input string nm, input ptsum_t got [], input sq_t want, input int t, input int lat);
    checks++;
    if (cycle - t != lat) begin failures++; $display("%s latency %0d", nm, cycle - t); end
    foreach (want[i]) begin
      checks++;
      if (got[i] != want[i]) begin failures++; $display("%s lane %0d: %0d vs %0d", nm, i, got[i], want[i]); end
    end
  endtask

  always @(posedge clk) if (rst_n) begin
    ptsum_t g [];
    if (ova) begin
      g = new[NA]; foreach (g[i]) g[i] = sa[i];
      if (qa.size() == 0) begin checks++; failures++; end
      else cmp("A", g, qa.pop_front(), ta.pop_front(), LAT_A);
    end
    if (ovb) begin
      g = new[NB]; foreach (g[i]) g[i] = sb[i];
      if (qb.size() == 0) begin checks++; failures++; end
      else cmp("B", g, qb.pop_front(), tb.pop_front(), LAT_B);
    end
  end

  initial begin
    sq_t w;
    longint acc;
    iv = 0;
    for (int i = 0; i < NA; i++) pa[i] = '0;
    for (int i = 0; i < NB; i++) pb[i] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 200; n++) begin
      @(negedge clk);
      iv = ($urandom_range(0, 4) != 0);
      for (int i = 0; i < NA; i++) pa[i] = (n % 9 == 0) ? '1 : pt_t'($urandom);
      for (int i = 0; i < NB; i++) pb[i] = (n % 9 == 0) ? '1 : pt_t'($urandom);
      if (iv) begin
        w = {}; acc = 0;
        for (int i = 0; i < NA; i++) begin acc += pa[i]; w.push_back(ptsum_t'(acc)); end
        qa.push_back(w); ta.push_back(cycle);
        w = {}; acc = 0;
        for (int i = 0; i < NB; i++) begin acc += pb[i]; w.push_back(ptsum_t'(acc)); end
        qb.push_back(w); tb.push_back(cycle);
      end
    end
    @(negedge clk); iv = 0;
    repeat (LAT_A + LAT_B + 4) @(posedge clk);
    checks++;
    if (qa.size() != 0 || qb.size() != 0) begin failures++; $display("events lost"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
