// tb_dbscan_pv_top: end-to-end test of the primary-vertex finder at its
// default size (232 track lanes, 116 vertices), against the sequential
// reference model in dbscan_ref_pkg.
//
// Events are built like a pile-up crossing: a number of vertices, each with a
// few tracks spread around its z0, plus isolated noise tracks over +-15 cm,
// in random lane order with the unused lanes empty. Special events cover the
// corner cases: a full event of 232 tracks, an event of 116 two-track
// clusters (every vertex slot used), an event with only noise, an empty
// event, and events with eps other than 0.15 cm. Events enter back to back
// and with gaps. For every event the testbench checks the vertex list, the
// primary vertex, the vertex count and the latency, which must also stay
// within 73 cycles (0.73 us at 100 MHz). It counts how often each mechanism
// occurred and fails any that never did.
module tb_dbscan_pv_top;
  import dbscan_pkg::*;
  import dbscan_ref_pkg::*;

  localparam int N  = 232;
  localparam int NV = N / 2;
  localparam int LAT = sorter_latency(N, 2) + 1 + sorter_latency(N, 2) + 1
                     + sorter_latency(NV, 2);
  localparam int LAT_MAX = 73;
  localparam int EVENTS  = 80;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0, cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (EVENTS * 4 + 2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic           iv, ov;
  track_t         it [N];
  logic [Z_W-1:0] eps;
  vertex_t        ovx [NV];
  vertex_t        opv;
  logic [$clog2(NV+1)-1:0] onv;

  dbscan_pv_top dut (
    .clk, .rst_n, .in_valid(iv), .in_tracks(it), .in_eps(eps),
    .out_valid(ov), .out_vertices(ovx), .out_primary(opv), .out_n_vertices(onv));

  // Mechanism counters.
  int m_noise = 0, m_empty_lanes = 0, m_full = 0, m_all_slots = 0, m_no_vertex = 0;
  int m_odd = 0, m_even = 0, m_back_to_back = 0, m_eps_change = 0, m_idle = 0;

  vtx_q_t exp_q [$];
  int     t_q [$];

  always @(posedge clk) if (rst_n && ov) begin
    vtx_q_t got, want;
    int t;
    got = {};
    for (int i = 0; i < NV; i++) if (ovx[i].valid) got.push_back(ovx[i]);
    if (exp_q.size() == 0) begin checks++; failures++; $display("unexpected output"); end
    else begin
      want = exp_q.pop_front();
      t = t_q.pop_front();
      checks++;
      if (!same_vertices(got, want)) begin
        failures++;
        $display("event at %0d: %0d vertices, expected %0d", t, got.size(), want.size());
      end
      for (int i = 0; i < NV; i++) begin
        checks++;
        if (ovx[i].valid != (i < want.size())) begin failures++; $display("valid lane %0d wrong", i); end
      end
      checks++;
      if (int'(onv) != want.size()) begin failures++; $display("count %0d vs %0d", onv, want.size()); end
      checks++;
      if (want.size() > 0 ? (opv.pt_sum != want[0].pt_sum || !opv.valid) : opv.valid) begin
        failures++; $display("primary vertex wrong");
      end
      checks++;
      if (cycle - t != LAT || cycle - t > LAT_MAX) begin
        failures++; $display("latency %0d, expected %0d (max %0d)", cycle - t, LAT, LAT_MAX);
      end
    end
  end

  // Build one event into `it`; returns the tracks as a queue.
  function automatic trk_q_t make_event(int kind, int e);
    trk_q_t q;
    track_t t;
    int nvtx, ntrk, zc, nnoise, slot;
    q = {};
    case (kind)
      1: begin  // full: pile-up plus noise filling all lanes
        while (q.size() < N) begin
          zc = $urandom_range(0, 2800) - 1400;
          ntrk = $urandom_range(1, 12);
          for (int j = 0; j < ntrk && q.size() < N; j++) begin
            t.valid = 1; t.z0 = z0_t'(zc + $urandom_range(0, 2 * e) - e);
            t.pt = pt_t'($urandom_range(2, 400)); q.push_back(t);
          end
        end
      end
      2: begin  // 116 two-track clusters, far apart
        for (int k = 0; k < NV; k++) begin
          zc = -1740 + 30 * k;
          t.valid = 1; t.pt = pt_t'($urandom_range(2, 60000));
          t.z0 = z0_t'(zc); q.push_back(t);
          t.pt = pt_t'($urandom_range(2, 60000));
          t.z0 = z0_t'(zc + $urandom_range(0, e / 2)); q.push_back(t);
        end
      end
      3: begin  // noise only: tracks more than eps apart
        nnoise = $urandom_range(1, 90);
        for (int j = 0; j < nnoise; j++) begin
          t.valid = 1; t.z0 = z0_t'(-1800 + j * (e + 1 + $urandom_range(0, 3)));
          t.pt = pt_t'($urandom_range(2, 400)); q.push_back(t);
        end
      end
      4: ;      // empty event
      default: begin  // typical: some vertices plus noise, lanes left empty
        nvtx = $urandom_range(1, 20);
        for (int k = 0; k < nvtx; k++) begin
          zc = $urandom_range(0, 2800) - 1400;
          ntrk = $urandom_range(2, 9);
          for (int j = 0; j < ntrk; j++) begin
            t.valid = 1; t.z0 = z0_t'(zc + $urandom_range(0, e) - e / 2);
            t.pt = pt_t'($urandom_range(2, 400)); q.push_back(t);
          end
        end
        nnoise = $urandom_range(0, 60);
        for (int j = 0; j < nnoise && q.size() < N - 5; j++) begin
          t.valid = 1; t.z0 = z0_t'($urandom_range(0, 3000) - 1500);
          t.pt = pt_t'($urandom_range(2, 400)); q.push_back(t);
        end
      end
    endcase
    // Shuffle into random lanes.
    for (int i = q.size() - 1; i > 0; i--) begin
      track_t tmp;
      slot = $urandom_range(0, i);
      tmp = q[i]; q[i] = q[slot]; q[slot] = tmp;
    end
    return q;
  endfunction

  initial begin
    trk_q_t  q, s;
    span_q_t c;
    vtx_q_t  v;
    int e, kind, prev_e, lone;
    bit prev_valid;
    iv = 0; eps = EPS_DEFAULT; prev_e = 15; prev_valid = 0;
    for (int i = 0; i < N; i++) it[i] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < EVENTS; n++) begin
      @(negedge clk);
      if (n % 9 == 8) begin      // idle cycle between events
        iv = 0; prev_valid = 0; m_idle++;
        @(negedge clk);
      end
      kind = (n < 5) ? n : ((n % 10 == 7) ? 1 : 0);
      e = (n % 6 == 5) ? $urandom_range(3, 40) : 15;
      q = make_event(kind, e);
      for (int i = 0; i < N; i++) it[i] = (i < q.size()) ? q[i] : track_t'('0);
      eps = Z_W'(e);
      iv = 1;
      // Reference result and coverage.
      v = event_vertices(q, e);
      s = sort_tracks(q);
      c = find_clusters(s, e);
      lone = s.size();
      foreach (c[k]) begin
        lone -= c[k].last - c[k].first + 1;
        if ((c[k].last - c[k].first) % 2 == 0) m_odd++; else m_even++;
      end
      if (lone > 0) m_noise++;
      if (q.size() < N) m_empty_lanes++;
      if (q.size() == N) m_full++;
      if (v.size() == NV) m_all_slots++;
      if (v.size() == 0) m_no_vertex++;
      if (prev_valid) m_back_to_back++;
      if (e != prev_e) m_eps_change++;
      prev_e = e; prev_valid = 1;
      exp_q.push_back(v); t_q.push_back(cycle);
    end
    @(negedge clk); iv = 0;
    repeat (LAT + 5) @(posedge clk);
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("events lost: %0d", exp_q.size()); end
    $display("mechanisms: noise=%0d empty_lanes=%0d full=%0d all_slots=%0d no_vertex=%0d odd=%0d even=%0d back_to_back=%0d eps_change=%0d idle=%0d",
             m_noise, m_empty_lanes, m_full, m_all_slots, m_no_vertex, m_odd, m_even,
             m_back_to_back, m_eps_change, m_idle);
    checks += 10;
    if (m_noise == 0)        begin failures++; $display("no noise track seen"); end
    if (m_empty_lanes == 0)  begin failures++; $display("no partial event"); end
    if (m_full == 0)         begin failures++; $display("no full event"); end
    if (m_all_slots == 0)    begin failures++; $display("vertex slots never all used"); end
    if (m_no_vertex == 0)    begin failures++; $display("no event without vertex"); end
    if (m_odd == 0)          begin failures++; $display("no odd-size cluster"); end
    if (m_even == 0)         begin failures++; $display("no even-size cluster"); end
    if (m_back_to_back == 0) begin failures++; $display("no back-to-back events"); end
    if (m_eps_change == 0)   begin failures++; $display("eps never changed"); end
    if (m_idle == 0)         begin failures++; $display("no idle cycle"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
