// pq_net_pkg: computes the memory contents of a multi-level network of
// pq-elements that acts as an address generator, for testbenches.
//
// A network is described element by element, in an order where every
// element comes after the elements it reads. An element's address is the
// concatenation of its sources, the first source in the upper bits; a
// source is a bit range of the primary input vector or of an earlier
// element's output code. For each registered vector, in order, every
// element's address is evaluated; an address not seen before for that
// element gets the next free code 1, 2, 3, ...; the last element gets the
// vector's address j + 1 instead. All other words stay 0. Because every
// element is one-to-one on the addresses that registered vectors produce,
// and every code of a registered vector is non-zero, an unregistered vector
// can only reach the last element with an address no registered vector
// produced, and reads 0 there. Codes must fit the element's output width,
// which holds whenever at most 2^q - 1 vectors are registered.
package pq_net_pkg;

  typedef struct {
    int src;                    // -1: primary input, else element index
    int unsigned hi, lo;
  } seg_t;

  class net_image;
    int unsigned n_el;
    int unsigned p [$];
    int unsigned q;
    seg_t segs [$][$];
    int unsigned tbl [][];
    logic [63:0] vecs [$];
    int overflow;

    function new(int unsigned q_);
      q = q_;
      n_el = 0;
    endfunction

    function int add_element(int unsigned p_);
      seg_t none [$];
      p.push_back(p_);
      segs.push_back(none);
      n_el++;
      return n_el - 1;
    endfunction

    function void src(int el, int s, int unsigned hi, int unsigned lo);
      seg_t t;
      t.src = s; t.hi = hi; t.lo = lo;
      segs[el].push_back(t);
    endfunction

    // address of element el given the primary input and earlier codes
    function int unsigned el_addr(int el, logic [63:0] v, int unsigned code []);
      int unsigned a = 0;
      foreach (segs[el][i]) begin
        int unsigned w = segs[el][i].hi - segs[el][i].lo + 1;
        logic [63:0] s = (segs[el][i].src < 0) ? v : 64'(code[segs[el][i].src]);
        a = (a << w) | int'((s >> segs[el][i].lo) & ((64'(1) << w) - 1));
      end
      return a;
    endfunction

    function void build();
      int unsigned next [];
      int unsigned code [];
      tbl = new[n_el];
      next = new[n_el];
      code = new[n_el];
      overflow = 0;
      foreach (tbl[e]) begin
        tbl[e] = new[1 << p[e]];
        foreach (tbl[e][a]) tbl[e][a] = 0;
        next[e] = 1;
      end
      foreach (vecs[j]) begin
        for (int e = 0; e < n_el; e++) begin
          int unsigned a = el_addr(e, vecs[j], code);
          if (e == n_el - 1) tbl[e][a] = j + 1;
          else begin
            if (tbl[e][a] == 0) begin
              if (next[e] >= (1 << q)) overflow++;
              tbl[e][a] = next[e]++;
            end
            code[e] = tbl[e][a];
          end
        end
      end
    endfunction

    // output of the network as loaded, evaluated from the tables
    function int unsigned eval(logic [63:0] v);
      int unsigned code [];
      code = new[n_el];
      for (int e = 0; e < n_el; e++) code[e] = tbl[e][el_addr(e, v, code)];
      return code[n_el - 1];
    endfunction

    function int unsigned mem_bits();
      mem_bits = 0;
      foreach (p[e]) mem_bits += (1 << p[e]) * q;
    endfunction
  endclass

endpackage
