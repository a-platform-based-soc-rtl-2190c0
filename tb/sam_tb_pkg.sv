// sam_tb_pkg: reference model for the SAM testbenches.
//
// sam_model compiles a set of patterns into a textbook Aho-Corasick
// automaton (goto, failure and output functions) and derives from it every
// table the hardware reads:
//   * bitmap AC state table: per state a 256-bit bitmap of its goto bytes,
//     its failure state and the base of its children in the next table,
//     children stored in byte order (so child rank = count of 1s below);
//   * root-indexing tables: IDX_j ranks, from 1 in byte order, every byte
//     that occurs at depth 1..j of the trie (0 for any other byte); the
//     root next table entry {IDX_1[c1], IDX_2[c2]} holds the state reached
//     from the root after c1 c2;
//   * pre-hashing bit vectors: V1 of state s holds H1(c) for every byte c
//     with a goto from s or a non-root state on its failure chain; V2 holds
//     H2(c1,c2) for every such c1 leading to v and every c2 with a goto
//     from v or its non-root failure chain, and for every c2 if a pattern
//     ends at v. This over-approximation makes a pre-hash non-hit imply
//     that the state after two bytes equals the root-indexing result and
//     that no match is skipped.
// H1(c) = c[3:0], H2(c1,c2) = {c1[1:0], c2[1:0]}, both as one-hot indexes.
// The golden matcher walks the text byte by byte with the full AC
// transition function and lists (position, state) for every byte after
// which a pattern ends.
package sam_tb_pkg;

  localparam int MAXS = 8192;

  typedef struct {
    int pos;
    int id;
  } ev_t;

  class sam_model;
    int       n;                 // number of states, root = 0
    int       g[];               // goto, MAXS*256, -1 = none
    int       fail[];
    int       depth[];
    bit       out[];
    // derived tables
    bit [255:0] bitmap[];
    int         base[];
    int         nx[];            // {matched, id} as 17-bit values
    int         nnx;
    int         idx[2][256];
    int         rnext[];         // 65536 entries
    bit [31:0]  bv[];

    function new();
      g = new[MAXS * 256];
      foreach (g[i]) g[i] = -1;
      fail  = new[MAXS];
      depth = new[MAXS];
      out   = new[MAXS];
      n = 1;
      depth[0] = 0;
      out[0] = 0;
    endfunction

    function void add(string p);
      int s = 0;
      for (int i = 0; i < p.len(); i++) begin
        int c = int'(p[i]) & 255;   // string elements are signed bytes
        if (g[s*256 + c] < 0) begin
          g[s*256 + c] = n;
          depth[n] = depth[s] + 1;
          out[n] = 0;
          n++;
        end
        s = g[s*256 + c];
      end
      out[s] = 1;
    endfunction

    function int delta(int s, int c);
      while (s != 0 && g[s*256 + c] < 0) s = fail[s];
      return (g[s*256 + c] >= 0) ? g[s*256 + c] : 0;
    endfunction

    function int enc(int s);
      return (int'(out[s]) << 16) | s;
    endfunction

    function void build();
      int q[$];
      fail[0] = 0;
      for (int c = 0; c < 256; c++) begin
        int t = g[c];
        if (t >= 0) begin fail[t] = 0; q.push_back(t); end
      end
      while (q.size() > 0) begin
        int r = q.pop_front();
        for (int c = 0; c < 256; c++) begin
          int t = g[r*256 + c];
          if (t >= 0) begin
            fail[t] = delta(fail[r], c);
            if (out[fail[t]]) out[t] = 1;
            q.push_back(t);
          end
        end
      end
      // bitmap AC tables
      bitmap = new[n];
      base   = new[n];
      nx     = new[n];
      nnx = 0;
      for (int s = 0; s < n; s++) begin
        bitmap[s] = '0;
        base[s] = nnx;
        for (int c = 0; c < 256; c++) begin
          if (g[s*256 + c] >= 0) begin
            bitmap[s][c] = 1'b1;
            nx[nnx] = enc(g[s*256 + c]);
            nnx++;
          end
        end
      end
      // root indexing
      for (int j = 0; j < 2; j++) begin
        bit seen[256];
        int rank = 1;
        foreach (seen[c]) seen[c] = 0;
        for (int p = 0; p < n; p++)
          for (int c = 0; c < 256; c++)
            if (g[p*256 + c] >= 0 && depth[g[p*256 + c]] <= j + 1) seen[c] = 1;
        for (int c = 0; c < 256; c++) begin
          idx[j][c] = seen[c] ? rank : 0;
          if (seen[c]) rank++;
        end
      end
      rnext = new[65536];
      foreach (rnext[i]) rnext[i] = 0;
      for (int c1 = 0; c1 < 256; c1++) begin
        int s1 = delta(0, c1);
        for (int c2 = 0; c2 < 256; c2++) begin
          rnext[(idx[0][c1] << 8) | idx[1][c2]] = enc(delta(s1, c2));
        end
      end
      // pre-hashing bit vectors
      bv = new[n];
      begin
        bit [255:0] cont[];      // bytes with a goto from s or its non-root failure chain
        cont = new[n];
        for (int s = 0; s < n; s++) begin
          cont[s] = '0;
          for (int u = s; u != 0; u = fail[u])
            for (int c = 0; c < 256; c++) if (g[u*256 + c] >= 0) cont[s][c] = 1'b1;
        end
        for (int s = 0; s < n; s++) begin
          bv[s] = '0;
          if (s != 0) begin
            for (int u = s; u != 0; u = fail[u]) begin
              for (int c1 = 0; c1 < 256; c1++) begin
                int v = g[u*256 + c1];
                if (v >= 0) begin
                  bv[s][c1 & 15] = 1'b1;
                  for (int c2 = 0; c2 < 256; c2++)
                    if (out[v] || cont[v][c2]) bv[s][16 + (((c1 & 3) << 2) | (c2 & 3))] = 1'b1;
                end
              end
            end
          end
        end
      end
    endfunction

    // golden matcher over a byte string
    function void run(input byte unsigned t[$], input int pos0, ref int s, ref ev_t evs[$]);
      for (int i = 0; i < t.size(); i++) begin
        s = delta(s, t[i]);
        if (out[s]) evs.push_back('{pos: pos0 + i, id: s});
      end
    endfunction
  endclass

  // random patterns over a small alphabet so that matches are frequent
  function automatic string rand_pattern(int minlen, int maxlen, int alpha);
    string p = "";
    int len = minlen + int'($urandom_range(maxlen - minlen));
    for (int i = 0; i < len; i++) p = {p, string'(byte'(8'h41 + $urandom_range(alpha - 1)))};
    return p;
  endfunction

endpackage
