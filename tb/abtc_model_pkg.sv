// abtc_model_pkg: behavioural reference model of the ABTC encoder used by
// the testbenches.  Written with plain integers and bit queues, apart from
// the RTL, to give expected values: colour conversion, block moments,
// classification, pattern-error coding (linear and square root),
// intra-frame (previous block) and inter-frame (previous frame) tests, and
// the record layout.  Records are bit queues, first bit sent at index 0.
package abtc_model_pkg;

  typedef bit bitq_t [$];

  typedef struct {
    int th_am, th_sae, th_sad, th_map, cut;
    bit srq;
  } mcfg_t;

  typedef struct {
    int btype;      // 1 uniform, 0 normal, 2 pattern (same codes as the record)
    int mean, am;
    bit [15:0] bp;
  } mmom_t;

  // state carried from block to block and frame to frame
  typedef struct {
    bit    have_prev;
    mmom_t prev;
    int    prev_e [16];
  } mintra_t;

  function automatic int iabs(int v);
    return v < 0 ? -v : v;
  endfunction

  function automatic int sat(int v, int lo, int hi);
    return v < lo ? lo : (v > hi ? hi : v);
  endfunction

  function automatic void ycc(input int r, g, b, output int y, cb, cr);
    // floor division by 256 for negative numbers as an arithmetic shift does
    y  = sat((77 * r + 150 * g + 29 * b + 128) >>> 8, 0, 255);
    cb = sat(((-43 * r - 85 * g + 128 * b + 128) >>> 8) + 128, 0, 255);
    cr = sat(((128 * r - 107 * g - 21 * b + 128) >>> 8) + 128, 0, 255);
  endfunction

  function automatic int srq_k(int e);
    int q, best, bestd;
    q = iabs(sat(e, -128, 127)) / 2;
    best = 0; bestd = q;
    for (int k = 1; k < 8; k++)
      if (iabs(k * k - q) < bestd) begin bestd = iabs(k * k - q); best = k; end
    return best;
  endfunction

  function automatic void put(ref bitq_t q, input int v, input int n);
    for (int i = n - 1; i >= 0; i--) q.push_back(bit'((v >> i) & 1));
  endfunction

  // Moments of one block of luminance.
  function automatic void moments(input int y [16], input mcfg_t c,
                                  output mmom_t m, output int e [16],
                                  output int sae);
    int s, sa, am5, lo, hi, rec;
    s = 0;
    foreach (y[i]) s += y[i];
    m.mean = s / 16;
    sa = 0;
    foreach (y[i]) begin
      e[i] = y[i] - m.mean;
      m.bp[i] = (y[i] < m.mean);
      sa += iabs(e[i]);
    end
    m.am = sa / 16;
    am5 = m.am > 31 ? 31 : m.am;
    lo = sat(m.mean - am5, 0, 255);
    hi = sat(m.mean + am5, 0, 255);
    sae = 0;
    foreach (y[i]) begin
      rec = m.bp[i] ? lo : hi;
      sae += iabs(rec - y[i]);
    end
    if (m.am < c.th_am)      m.btype = 1;
    else if (sae < c.th_sae) m.btype = 0;
    else                     m.btype = 2;
  endfunction

  function automatic int popc(bit [15:0] v);
    int n = 0;
    for (int i = 0; i < 16; i++) n += v[i];
    return n;
  endfunction

  // Encode one block.  kind: 0 normal,1 uniform,2 pattern,3 SPB,4 SPF.
  function automatic bitq_t encode_block(
      input int y [16], input int cb [16], input int cr [16],
      input mcfg_t c, input bit sof, input bit ref_ok, input mmom_t pf,
      ref mintra_t st, output mmom_t cur, output int kind);
    bitq_t q;
    int e [16], sae, cbm, crm, n, mx, a [16], sad;
    bit spb, spf, mok;
    moments(y, c, cur, e, sae);
    cbm = 0; crm = 0;
    foreach (cb[i]) begin cbm += cb[i]; crm += cr[i]; end
    cbm = (cbm / 16) / 4;
    crm = (crm / 16) / 4;
    // inter-frame test
    spf = 0;
    if (ref_ok) begin
      mok = iabs(cur.mean - pf.mean) < c.th_am;
      if (cur.btype == 1 && pf.btype == 1) spf = mok;
      else spf = mok && iabs(cur.am - pf.am) < c.th_am && popc(cur.bp ^ pf.bp) < c.th_map;
    end
    // intra-frame test
    spb = 0;
    if (st.have_prev && !sof && st.prev.btype == cur.btype) begin
      mok = iabs(cur.mean - st.prev.mean) < c.th_am;
      sad = 0;
      foreach (e[i]) sad += iabs(e[i] - st.prev_e[i]);
      case (cur.btype)
        1: spb = mok;
        0: spb = mok && iabs(cur.am - st.prev.am) < c.th_am && popc(cur.bp ^ st.prev.bp) < c.th_map;
        default: spb = mok && sad < c.th_sad;
      endcase
    end
    st.have_prev = 1;
    st.prev = cur;
    st.prev_e = e;
    if (spf) begin
      kind = 4; put(q, 1, 1);
    end else if (spb) begin
      kind = 3; put(q, 3, 3);
    end else begin
      kind = cur.btype;
      put(q, cur.btype, 3);
      if (cur.btype == 1) begin
        put(q, cur.mean, 8);
      end else if (cur.btype == 0) begin
        put(q, cur.mean, 8);
        put(q, cur.am > 31 ? 31 : cur.am, 5);
        for (int i = 0; i < 16; i++) put(q, cur.bp[i], 1);
      end else begin
        mx = 0;
        foreach (e[i]) begin
          a[i] = c.srq ? srq_k(e[i]) : sat(iabs(e[i]) >> c.cut, 0, 127);
          if (a[i] > mx) mx = a[i];
        end
        n = 0;
        while ((1 << n) <= mx) n++;
        if (c.srq) n = 3;
        put(q, n, 3);
        put(q, cur.mean, 8);
        for (int i = 0; i < 16; i++) put(q, cur.bp[i], 1);
        for (int i = 0; i < 16; i++) put(q, a[i], n);
      end
      put(q, cbm, 6);
      put(q, crm, 6);
    end
    return q;
  endfunction

endpackage
