// cascade_prog_pkg: testbench-side compiler from a list of registered
// vectors to the contents of a uniform LUT cascade.
//
// For registered vectors v_1..v_k (n bits, x1 in the MSB) and a cascade of
// s cells with p inputs and q rails, cell i reads the first c_i = p + i*r
// input bits in total. Two vectors with the same c_i-bit prefix must leave
// cell i on the same rail value, and vectors with different prefixes may
// share a rail value only if no later input tells them apart; the simplest
// safe choice, used here, gives every distinct prefix its own number
// 1..(number of distinct prefixes), which is at most k < 2^q. The last cell
// gives vector j its address j. Every entry that no registered vector
// reaches is either 0 (an exact generator: all other inputs give 0) or,
// with dc_fill, a random value (a generator that relies on an auxiliary
// memory to reject the wrong addresses it then produces).
package cascade_prog_pkg;

  typedef logic [127:0] vec_t;

  class cascade_image;
    int unsigned n, p, q, r, s, w, pad;
    vec_t        vecs[$];         // vecs[j] has address j + 1
    int unsigned tbl[][];         // tbl[cell][entry]

    function new(int unsigned n_, int unsigned p_, int unsigned q_);
      n = n_; p = p_; q = q_; r = p - q;
      s = (n <= p) ? 1 : (n - q + r - 1) / r;
      w = p + (s - 1) * r;
      pad = w - n;
    endfunction

    // c_i-bit prefix of padded vector v (cell i has read c_i bits)
    function vec_t prefix(vec_t v, int unsigned i);
      vec_t pv;
      pv = v << pad;
      return pv >> (w - (p + i * r));
    endfunction

    // the new inputs of cell i (p bits for cell 0, r bits after)
    function int unsigned chunk(vec_t v, int unsigned i);
      vec_t pv;
      int unsigned len;
      pv  = v << pad;
      len = (i == 0) ? p : r;
      return int'((pv >> (w - (p + i * r))) & ((vec_t'(1) << len) - 1));
    endfunction

    function void build(bit dc_fill);
      int unsigned id_prev[];
      int unsigned id_cur[];
      int unsigned seen[vec_t];
      int unsigned ndist;
      tbl = new[s];
      id_prev = new[vecs.size()];
      id_cur  = new[vecs.size()];
      for (int unsigned i = 0; i < s; i++) begin
        tbl[i] = new[1 << p];
        foreach (tbl[i][e]) tbl[i][e] = dc_fill ? ($urandom & ((1 << q) - 1)) : 0;
        seen.delete();
        ndist = 0;
        foreach (vecs[j]) begin
          if (i == s - 1) begin
            id_cur[j] = j + 1;
          end else if (seen.exists(prefix(vecs[j], i))) begin
            id_cur[j] = seen[prefix(vecs[j], i)];
          end else begin
            ndist++;
            id_cur[j] = ndist;
            seen[prefix(vecs[j], i)] = ndist;
          end
        end
        foreach (vecs[j]) begin
          int unsigned e;
          e = (i == 0) ? chunk(vecs[j], 0) : ((id_prev[j] << r) | chunk(vecs[j], i));
          tbl[i][e] = id_cur[j];
        end
        id_prev = id_cur;
        id_cur  = new[vecs.size()];
      end
      index.delete();
      foreach (vecs[j]) index[vecs[j]] = j + 1;
    endfunction

    // registered vector -> address, filled by build() and add()
    int unsigned index[vec_t];

    // append a vector (call build() after the last one)
    function void add(vec_t v);
      vecs.push_back(v);
      index[v] = vecs.size();
    endfunction

    // reference: address of v, 0 if not registered
    function int unsigned lookup(vec_t v);
      if (index.exists(v)) return index[v];
      return 0;
    endfunction
  endclass

endpackage
