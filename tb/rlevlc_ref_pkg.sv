// rlevlc_ref_pkg: software reference of the RLE-VLC intra-column code, for
// the testbenches.
//
// encode() turns a list of active regions (sorted by column, then by linear
// position core*2^BR + region) into the expected bit sequence, written from
// the code alphabet without reference to the RTL: the region coding is picked
// by comparing the two lengths, and the gap rule by comparing the cost of the
// runs with the cost of a new cluster address. Bits are kept in a queue, first
// bit first. Helpers make random events with a ToT distribution that favours
// the values 0 and 2, as in measured hit patterns.
package rlevlc_ref_pkg;

  typedef struct {
    int col;
    int core;
    int rg;
    int tot[4];
  } hit_t;

  typedef bit bitq_t[$];

  class rlevlc_ref;
    int bc = 6, bk = 6, br = 4, bp = 4, brun = 3, v1 = 0, v2 = 2;
    // symbol statistics of the last encode() call
    int n_c, n_k, n_vlc, n_cur, n_run, n_eok, n_eoc, n_split;

    function void put(ref bitq_t q, input int val, input int n);
      for (int i = n - 1; i >= 0; i--) q.push_back(bit'((val >> i) & 1));
    endfunction

    function int vlc_len(int tot[4]);
      int l = 1;
      foreach (tot[i]) l += (tot[i] == v1) ? 1 : (tot[i] == v2) ? 2 : 2 + bp;
      return l;
    endfunction

    function void region(ref bitq_t q, input int tot[4], input bit with_f);
      if (with_f) q.push_back(1'b1);
      if (vlc_len(tot) < 1 + 4 * bp) begin
        n_vlc++;
        q.push_back(1'b0);
        foreach (tot[i]) begin
          if (tot[i] == v1) q.push_back(1'b0);
          else if (tot[i] == v2) begin q.push_back(1'b1); q.push_back(1'b1); end
          else begin q.push_back(1'b1); q.push_back(1'b0); put(q, tot[i], bp); end
        end
      end else begin
        n_cur++;
        q.push_back(1'b1);
        foreach (tot[i]) put(q, tot[i], bp);
      end
    endfunction

    function bitq_t encode(hit_t hits[$]);
      bitq_t q;
      int lrmax = (1 << brun) - 2;
      int cur_col = -1, prev = 0;
      n_c = 0; n_k = 0; n_vlc = 0; n_cur = 0; n_run = 0; n_eok = 0; n_eoc = 0; n_split = 0;
      foreach (hits[i]) begin
        int pos = hits[i].core * (1 << br) + hits[i].rg;
        if (hits[i].col != cur_col) begin
          if (cur_col >= 0) begin put(q, 0, 1 + brun); n_eoc++; end
          put(q, hits[i].col, bc); n_c++;
          put(q, pos, bk + br); n_k++;
          region(q, hits[i].tot, 1'b0);
          cur_col = hits[i].col;
        end else begin
          int d = pos - prev - 1;
          int nr = 0;
          for (int r = d; r > 0; r -= lrmax) nr++;
          if (d == 0) begin
            region(q, hits[i].tot, 1'b1);
          end else if (nr * (1 + brun) < bk + br) begin
            for (int r = d; r > 0; r -= lrmax) begin
              put(q, 0, 1); put(q, (r > lrmax) ? lrmax : r, brun); n_run++;
            end
            if (nr > 1) n_split++;
            region(q, hits[i].tot, 1'b1);
          end else begin
            put(q, (1 << (1 + brun)) / 2 - 1, 1 + brun); n_eok++;
            put(q, pos, bk + br); n_k++;
            region(q, hits[i].tot, 1'b0);
          end
        end
        prev = pos;
      end
      if (cur_col >= 0) begin put(q, 0, 1 + brun); n_eoc++; end
      return q;
    endfunction

    // Random ToT value: mostly 0, often 2, otherwise uniform.
    function int rand_tot();
      int r = $urandom_range(99);
      if (r < 55) return v1;
      if (r < 70) return v2;
      return $urandom_range((1 << bp) - 1);
    endfunction

    // Random event over ncols columns of ncores cores: a few clusters per
    // column, each a short sequence of active regions with small gaps.
    function void rand_event(ref hit_t hits[$], input int ncols, input int ncores,
                             input int max_clusters);
      int npos = ncores * (1 << br);
      hits.delete();
      for (int c = 0; c < ncols; c++) begin
        int pos;
        int ncl;
        if ($urandom_range(99) < 50) continue;
        ncl = $urandom_range(max_clusters, 1);
        pos = $urandom_range(20);
        for (int k = 0; k < ncl && pos < npos; k++) begin
          int len = $urandom_range(8, 1);
          for (int j = 0; j < len && pos < npos; j++) begin
            hit_t h;
            h.col = c; h.core = pos / (1 << br); h.rg = pos % (1 << br);
            foreach (h.tot[t]) h.tot[t] = rand_tot();
            hits.push_back(h);
            case ($urandom_range(9))
              0, 1, 2, 3: pos += 1;
              4, 5:       pos += 2;
              6:          pos += $urandom_range(7, 3);
              7:          pos += $urandom_range(13, 8);
              default:    pos += 1;
            endcase
          end
          pos += $urandom_range(60, 14);
        end
      end
    endfunction

    // The cluster of column 12 used as the worked example of the code
    // (cores 22 and 23, sixteen regions of which nine are active).
    function void example(ref hit_t hits[$]);
      int ex[9][6] = '{
        '{22,  9,  4,  0, 0, 0}, '{22, 11,  1,  5, 0, 0}, '{22, 13,  0,  7, 5, 0},
        '{22, 15, 15, 13, 3, 5}, '{23,  0,  4,  0, 0, 0}, '{23,  1,  0,  0, 0, 3},
        '{23,  2, 14,  4, 0, 0}, '{23,  4,  0,  4, 2, 0}, '{23,  8,  0,  0, 0, 5}};
      foreach (ex[i]) begin
        hit_t h;
        h.col = 12; h.core = ex[i][0]; h.rg = ex[i][1];
        for (int t = 0; t < 4; t++) h.tot[t] = ex[i][2 + t];
        hits.push_back(h);
      end
    endfunction
  endclass

  // Expected bitstream of the example cluster (up to and including its EOK).
  localparam string EXAMPLE_BITS = {
    "001100", "0101101001", "0", "100100", "000", "0001", "10", "100001", "100101", "00",
    "0001", "10", "0", "100111", "100101", "0", "0001", "1", "11111110100110101", "10",
    "100100", "000", "10", "000", "100011", "10", "101110", "100100", "00", "0001", "10",
    "0", "100100", "11", "0", "0011", "10", "000", "100101", "0111"};

endpackage
