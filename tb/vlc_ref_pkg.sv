// vlc_ref_pkg: testbench model of the VLC code tables and of the coding rules.
//
// make_table() builds an arbitrary, standard-dependent code table (the real
// standards' tables are configuration data, not logic): entry e gets length
// 2 + (7e + 3s) mod 13 and code (37e + 11s) masked to that length; every
// eleventh AC entry is left empty to force escapes.  cfg_stream() turns a table
// into the windowed configuration file (segment count, then start/end cell and
// data per segment).  encode_block() codes one block by the rules stated in
// vlc_coder, written independently as a bit list.
package vlc_ref_pkg;
  localparam int EOB = 0, ESC = 1, DC0 = 2, AC0 = 15, AC1 = 143, NENT = 271;

  typedef struct { int len; int code; } ent_t;
  typedef ent_t  tab_t [NENT];
  typedef bit    bits_t [$];
  typedef byte unsigned bytes_t [$];

  function automatic tab_t make_table(input int s);
    tab_t t;
    for (int e = 0; e < NENT; e++) begin
      t[e].len  = 2 + (7 * e + 3 * s) % 13;
      t[e].code = (37 * e + 11 * s) & ((1 << t[e].len) - 1);
      if (e >= AC0 && (e % 11) == 5) t[e].len = 0;
      if (e >= AC0 && t[e].len == 0) t[e].code = 0;
    end
    return t;
  endfunction

  // segments: [EOB..DC], [AC0 section], and [AC1 section] for H.263 (s == 3)
  function automatic bytes_t cfg_stream(input tab_t t, input int s, input int base);
    bytes_t b;
    int lo [3], hi [3];
    int nseg = (s == 3) ? 3 : 2;
    lo[0] = 0;   hi[0] = AC0 - 1;
    lo[1] = AC0; hi[1] = AC1 - 1;
    lo[2] = AC1; hi[2] = NENT - 1;
    b.push_back(byte'(nseg));
    for (int g = 0; g < nseg; g++) begin
      int sa = base + 3 * lo[g], ea = base + 3 * hi[g] + 2;
      b.push_back(byte'(sa >> 8)); b.push_back(byte'(sa));
      b.push_back(byte'(ea >> 8)); b.push_back(byte'(ea));
      for (int e = lo[g]; e <= hi[g]; e++) begin
        b.push_back(byte'(t[e].len));
        b.push_back(byte'(t[e].code >> 8));
        b.push_back(byte'(t[e].code));
      end
    end
    return b;
  endfunction

  function automatic void put(ref bits_t q, input int v, input int n);
    for (int i = n - 1; i >= 0; i--) q.push_back(v[i]);
  endfunction

  function automatic int nbits(input int v);
    int a = (v < 0) ? -v : v;
    int n = 0;
    while (a > 0) begin n++; a = a >> 1; end
    return n;
  endfunction

  // lev: 64 levels in zigzag order
  function automatic bits_t encode_block(input int lev [64], input bit intra, input int blk,
                                         input int s, input tab_t t, ref int dcp [3],
                                         ref int n_esc);
    bits_t q;
    int comp = (blk < 4) ? 0 : (blk == 4 ? 1 : 2);
    int first = 0, lastnz = -1, run = 0;
    for (int k = 0; k < 64; k++) if (lev[k] != 0) lastnz = k;
    if (intra) begin
      int diff = lev[0] - dcp[comp];
      int c = nbits(diff);
      dcp[comp] = lev[0];
      if (t[DC0 + c].len > 0) begin
        put(q, t[DC0 + c].code, t[DC0 + c].len);
        put(q, (diff < 0) ? diff - 1 : diff, c);
      end
      first = 1;
    end
    for (int k = first; k <= lastnz; k++) begin
      if (lev[k] == 0) run++;
      else begin
        int l = lev[k];
        int m = (l < 0) ? -l : l;
        bit last = (k == lastnz);
        int e = -1;
        if (s == 0) begin
          int c = nbits(l);
          if (run <= 15 && c <= 8) e = AC0 + run * 8 + c - 1;
          if (e >= 0 && t[e].len > 0) begin
            put(q, t[e].code, t[e].len); put(q, (l < 0) ? l - 1 : l, c);
          end else e = -1;
        end else begin
          if (run <= 15 && m <= 8) e = ((s == 3 && last) ? AC1 : AC0) + run * 8 + m - 1;
          if (e >= 0 && t[e].len > 0) begin
            put(q, t[e].code, t[e].len); put(q, (l < 0) ? 1 : 0, 1);
          end else e = -1;
        end
        if (e < 0) begin
          n_esc++;
          put(q, t[ESC].code, t[ESC].len);
          if (s == 3) put(q, last ? 1 : 0, 1);
          put(q, run, 6); put(q, l, 12);
        end
        run = 0;
      end
    end
    if (s != 3) put(q, t[EOB].code, t[EOB].len);
    return q;
  endfunction
endpackage
