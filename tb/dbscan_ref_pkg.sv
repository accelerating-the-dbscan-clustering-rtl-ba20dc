// dbscan_ref_pkg: plain sequential reference model of minPts = 2 DBSCAN
// primary vertexing, for the testbenches. It works on queues, one track at
// a time, and shares no code with the hardware: sort by z0, cut the sorted
// list where neighbours are more than eps apart, keep runs of at least two
// tracks, take each run's median z0 (mean of the two middle values, rounded
// down, for an even count) and pT sum, and order the vertices by pT sum.
package dbscan_ref_pkg;
  import dbscan_pkg::*;

  typedef struct {
    int first;
    int last;
  } span_t;

  typedef track_t  trk_q_t [$];
  typedef span_t   span_q_t [$];
  typedef vertex_t vtx_q_t [$];

  // Valid tracks in increasing z0 (insertion sort).
  function automatic trk_q_t sort_tracks(trk_q_t in);
    trk_q_t out;
    foreach (in[i]) begin
      int pos;
      if (!in[i].valid) continue;
      pos = out.size();
      while (pos > 0 && out[pos-1].z0 > in[i].z0) pos--;
      out.insert(pos, in[i]);
    end
    return out;
  endfunction

  // Runs of >= 2 tracks where each is within eps of the previous.
  function automatic span_q_t find_clusters(trk_q_t s, int eps);
    span_q_t c;
    int start;
    start = 0;
    for (int i = 1; i <= s.size(); i++) begin
      if (i == s.size() || int'(s[i].z0) - int'(s[i-1].z0) > eps) begin
        if (i - 1 > start) c.push_back('{start, i - 1});
        start = i;
      end
    end
    return c;
  endfunction

  function automatic vertex_t make_vertex(trk_q_t s, span_t c);
    vertex_t v;
    int n, m;
    longint sum;
    n = c.last - c.first + 1;
    m = (c.first + c.last) / 2;
    v.valid = 1'b1;
    if (n % 2 == 1) v.z0 = s[m].z0;
    else            v.z0 = z0_t'((int'(s[m].z0) + int'(s[m+1].z0)) >>> 1);
    sum = 0;
    for (int i = c.first; i <= c.last; i++) sum += s[i].pt;
    v.pt_sum = ptsum_t'(sum);
    return v;
  endfunction

  // Vertices by decreasing pT sum (stable on ties).
  function automatic vtx_q_t sort_vertices(vtx_q_t in);
    vtx_q_t out;
    foreach (in[i]) begin
      int pos;
      pos = out.size();
      while (pos > 0 && out[pos-1].pt_sum < in[i].pt_sum) pos--;
      out.insert(pos, in[i]);
    end
    return out;
  endfunction

  function automatic vtx_q_t event_vertices(trk_q_t tracks, int eps);
    trk_q_t  s;
    span_q_t c;
    vtx_q_t  v;
    s = sort_tracks(tracks);
    c = find_clusters(s, eps);
    foreach (c[i]) v.push_back(make_vertex(s, c[i]));
    return sort_vertices(v);
  endfunction

  // True when got (hardware order) holds the same vertices as want and is
  // ordered by non-increasing pT sum; vertices of equal pT sum may swap.
  function automatic bit same_vertices(vtx_q_t got, vtx_q_t want);
    vtx_q_t left;
    if (got.size() != want.size()) return 0;
    for (int i = 0; i < got.size(); i++) begin
      if (got[i].pt_sum != want[i].pt_sum) return 0;
    end
    left = want;
    foreach (got[i]) begin
      int hit;
      hit = -1;
      foreach (left[j]) if (hit < 0 && left[j] == got[i]) hit = j;
      if (hit < 0) return 0;
      left.delete(hit);
    end
    return 1;
  endfunction

endpackage
