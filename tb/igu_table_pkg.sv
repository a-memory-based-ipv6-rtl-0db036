// igu_table_pkg -- table builder used by the testbenches to load an IGU.
//
// An igu_table collects the group prefixes (already expanded to the group
// length L), assigns them local indices 1..k in order of insertion, and
// computes the memory contents:
//   transformation: variable v (0 .. NV-1) is x[v], and variable 0 is
//                   additionally xor-ed with x[L-1] (the first prefix bit);
//                   variables 0 .. h_in-1 are the row, the rest the column;
//   H memory:       row shift r(row), found by the first-fit rule: rows are
//                   taken in decreasing order of their number of entries,
//                   and each gets the smallest shift that puts none of its
//                   entries on a G address already taken;
//   G/AUX memory:   at r(row) + col the word {index, prefix}, 0 elsewhere.
// A prefix whose transformed vector equals one already present is refused,
// as is a longer expansion that repeats a value already present.
package igu_table_pkg;

  class igu_table;
    int unsigned L, h_in, h_out, g_in, col_w, nv;
    bit [63:0]   ent_val [$];                 // expanded prefixes (L bits)
    int unsigned by_val  [bit [63:0]];        // prefix -> index
    bit          y_used  [bit [63:0]];
    int unsigned hmem    [];                  // row shifts
    bit [63:0]   gval    [];                  // stored prefix per G address
    int unsigned gidx    [];                  // index per G address
    int unsigned nonzero_shift_rows;

    function new(int unsigned L_, int unsigned h_in_, int unsigned h_out_,
                 int unsigned g_in_, int unsigned col_w_);
      L = L_; h_in = h_in_; h_out = h_out_; g_in = g_in_; col_w = col_w_;
      nv = h_in + col_w;
      hmem = new[1 << h_in];
      gval = new[1 << g_in];
      gidx = new[1 << g_in];
    endfunction

    // Transformation entry v as written to the hardware: {xor_en, sel_b, sel_a}.
    function bit [12:0] lt_word(int unsigned v);
      return {(v == 0) ? 1'b1 : 1'b0, 6'(L - 1), 6'(v)};
    endfunction

    function bit [63:0] y_of(bit [63:0] x);
      bit [63:0] y = '0;
      for (int unsigned v = 0; v < nv; v++) y[v] = x[v] ^ ((v == 0) ? x[L-1] : 1'b0);
      return y;
    endfunction

    function int unsigned row_of(bit [63:0] x);
      return int'(y_of(x) & ((64'd1 << h_in) - 1));
    endfunction

    function int unsigned col_of(bit [63:0] x);
      return int'((y_of(x) >> h_in) & ((64'd1 << col_w) - 1));
    endfunction

    function bit add(bit [63:0] x);
      bit [63:0] y = y_of(x);
      if (y_used.exists(y) || by_val.exists(x)) return 1'b0;
      y_used[y] = 1'b1;
      ent_val.push_back(x);
      by_val[x] = ent_val.size();
      return 1'b1;
    endfunction

    function int unsigned lookup(bit [63:0] x);
      return by_val.exists(x) ? by_val[x] : 0;
    endfunction

    // First-fit row shifts; returns 0 if some row does not fit.
    function bit build();
      int unsigned rows = 1 << h_in;
      int unsigned cnt [];
      int unsigned maxc = 0;
      bit          occ [];
      cnt = new[rows];
      occ = new[1 << g_in];
      foreach (gval[a]) begin gval[a] = '0; gidx[a] = 0; end
      foreach (ent_val[e]) cnt[row_of(ent_val[e])]++;
      foreach (cnt[r]) if (cnt[r] > maxc) maxc = cnt[r];
      foreach (hmem[r]) hmem[r] = 0;
      nonzero_shift_rows = 0;
      for (int c = int'(maxc); c >= 1; c--) begin
        for (int unsigned r = 0; r < rows; r++) begin
          if (cnt[r] == c) begin
            bit placed = 1'b0;
            for (int unsigned s = 0; s < (1 << h_out) && !placed; s++) begin
              bit ok = 1'b1;
              foreach (ent_val[e])
                if (row_of(ent_val[e]) == r) begin
                  int unsigned a = s + col_of(ent_val[e]);
                  if (a >= (1 << g_in) || occ[a]) ok = 1'b0;
                end
              if (ok) begin
                placed  = 1'b1;
                hmem[r] = s;
                if (s != 0) nonzero_shift_rows++;
                foreach (ent_val[e])
                  if (row_of(ent_val[e]) == r) begin
                    int unsigned a = s + col_of(ent_val[e]);
                    occ[a]  = 1'b1;
                    gval[a] = ent_val[e];
                    gidx[a] = e + 1;
                  end
              end
            end
            if (!placed) return 1'b0;
          end
        end
      end
      return 1'b1;
    endfunction
  endclass

endpackage
