// tb_bitonic_sorter: self-checking test of the pipelined bitonic network.
//
// Two instances, N = 13 with a register after every level and N = 16 with a
// register after every third level, receive a random set every cycle (with
// gaps), including sets full of ties and sets holding the all-ones key.
// For each output set the testbench checks that the keys are non-decreasing,
// that the {key, payload} pairs are a permutation of the inputs, and that the
// set left exactly LATENCY cycles after it entered.
module tb_bitonic_sorter;

  localparam int KW = 6, PW = 8;
  localparam int NA = 13, RA = 1;
  localparam int NB = 16, RB = 3;
  localparam int LAT_A = dbscan_pkg::sorter_latency(NA, RA);   // 10 levels
  localparam int LAT_B = dbscan_pkg::sorter_latency(NB, RB);   // 10 levels

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

  logic          va, vb, ova, ovb;
  logic [KW-1:0] ka [NA], kao [NA], kb [NB], kbo [NB];
  logic [PW-1:0] pa [NA], pao [NA], pb [NB], pbo [NB];

  bitonic_sorter #(.N(NA), .KEY_W(KW), .PAY_W(PW), .REG_EVERY(RA)) dut_a (
    .clk, .rst_n, .in_valid(va), .in_key(ka), .in_pay(pa),
    .out_valid(ova), .out_key(kao), .out_pay(pao));
  bitonic_sorter #(.N(NB), .KEY_W(KW), .PAY_W(PW), .REG_EVERY(RB)) dut_b (
    .clk, .rst_n, .in_valid(vb), .in_key(kb), .in_pay(pb),
    .out_valid(ovb), .out_key(kbo), .out_pay(pbo));

  typedef logic [KW+PW-1:0] e_t;
  typedef e_t eq_t [$];

  // Reference queues: sorted multiset of {key,pay} and entry cycle per set.
  eq_t ref_a [$], ref_b [$];
  int  t_a [$], t_b [$];

  // Sorted copy; an all-ones key marks an empty entry whose payload is
  // not kept (spare lanes of the network carry that key too).
  function automatic eq_t sort_q(eq_t q);
    foreach (q[i]) if (q[i][KW+PW-1:PW] == '1) q[i][PW-1:0] = '0;
    q.sort();
    return q;
  endfunction

  task automatic check_set(input string name, input eq_t got_raw, input eq_t expect_q,
                           input int t_in, input int lat);
    eq_t got;
    bit ok;
    ok = 1;
    for (int i = 1; i < got_raw.size(); i++)
      if (got_raw[i][KW+PW-1:PW] < got_raw[i-1][KW+PW-1:PW]) ok = 0;
    checks++; if (!ok) begin failures++; $display("%s: keys not ascending", name); end
    got = sort_q(got_raw);
    checks++; if (got != expect_q) begin failures++; $display("%s: not a permutation", name); end
    checks++;
    if (cycle - t_in != lat) begin
      failures++; $display("%s: latency %0d, expected %0d", name, cycle - t_in, lat);
    end
  endtask

  always @(posedge clk) if (rst_n) begin
    eq_t g;
    if (ova) begin
      g = {};
      for (int i = 0; i < NA; i++) g.push_back({kao[i], pao[i]});
      if (ref_a.size() == 0) begin checks++; failures++; $display("A: unexpected output"); end
      else check_set("A", g, ref_a.pop_front(), t_a.pop_front(), LAT_A);
    end
    if (ovb) begin
      g = {};
      for (int i = 0; i < NB; i++) g.push_back({kbo[i], pbo[i]});
      if (ref_b.size() == 0) begin checks++; failures++; $display("B: unexpected output"); end
      else check_set("B", g, ref_b.pop_front(), t_b.pop_front(), LAT_B);
    end
  end

  function automatic logic [KW-1:0] rkey(int mode);
    case (mode)
      0: return KW'($urandom);
      1: return KW'($urandom_range(0, 2));      // many ties
      default: return ($urandom_range(0, 3) == 0) ? '1 : KW'($urandom);
    endcase
  endfunction

  initial begin
    eq_t q;
    int mode;
    va = 0; vb = 0;
    for (int i = 0; i < NA; i++) begin ka[i] = '0; pa[i] = '0; end
    for (int i = 0; i < NB; i++) begin kb[i] = '0; pb[i] = '0; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 400; n++) begin
      @(negedge clk);
      mode = n % 3;
      va = ($urandom_range(0, 4) != 0);
      vb = ($urandom_range(0, 4) != 0);
      for (int i = 0; i < NA; i++) begin ka[i] = rkey(mode); pa[i] = PW'($urandom); end
      for (int i = 0; i < NB; i++) begin kb[i] = rkey(mode); pb[i] = PW'($urandom); end
      if (va) begin
        q = {}; for (int i = 0; i < NA; i++) q.push_back({ka[i], pa[i]});
        ref_a.push_back(sort_q(q)); t_a.push_back(cycle);
      end
      if (vb) begin
        q = {}; for (int i = 0; i < NB; i++) q.push_back({kb[i], pb[i]});
        ref_b.push_back(sort_q(q)); t_b.push_back(cycle);
      end
    end
    @(negedge clk); va = 0; vb = 0;
    repeat (LAT_A + LAT_B + 5) @(posedge clk);
    checks++;
    if (ref_a.size() != 0 || ref_b.size() != 0) begin
      failures++; $display("sets lost: %0d %0d", ref_a.size(), ref_b.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
