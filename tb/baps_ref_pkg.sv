// baps_ref_pkg: behavioural reference of the BAPS predistorter for the
// testbenches. It holds its own copy of the four operation tables (as text
// rows "kind a b c m"), evaluates every basis function with the rounding
// reference of fp_ref_pkg in the same operation order as the hardware
// (p = phi_j * conj(phi_k) first, then phi_i * p; complex products as four
// products and two sums), and forms y as a pairwise tree sum of
// theta_r * phi_r. It also reports how many cycles the builder should spend
// on one sample.
package baps_ref_pkg;
  import fp_ref_pkg::*;

  typedef struct {
    logic [63:0] re;
    logic [63:0] im;
  } cpx_t;

  // op kinds: 0 input, 1 delay (phi_a delayed m), 2 phi_a*phi_b*conj(phi_c)
  typedef struct {
    int kind, a, b, c, m;
  } rop_t;

  // cfg: 0 BAPS8-mem1, 1 BAPS8-mem5, 2 BAPS12-mem1, 3 BAPS12-mem5 (1-based
  // indices in the rows, as a table would print them)
  function automatic rop_t row(int cfg, int r);
    int mem5 = cfg % 2;
    rop_t o;
    int t[12][5];
    if (mem5 == 0)
      t = '{'{0,0,0,0,0}, '{2,1,1,1,0}, '{1,1,0,0,1}, '{1,3,0,0,1},
            '{2,2,3,3,0}, '{1,4,0,0,1}, '{2,6,1,1,0}, '{2,2,1,1,0},
            '{1,6,0,0,1}, '{2,1,3,3,0}, '{2,10,1,1,0}, '{2,1,2,2,0}};
    else
      t = '{'{0,0,0,0,0}, '{2,1,1,1,0}, '{1,1,0,0,4}, '{2,2,1,1,0},
            '{1,2,0,0,1}, '{2,3,1,1,0}, '{1,2,0,0,2}, '{1,5,0,0,1},
            '{1,1,0,0,1}, '{1,9,0,0,3}, '{2,10,1,1,0}, '{2,9,9,9,0}};
    o.kind = t[r][0]; o.a = t[r][1] - 1; o.b = t[r][2] - 1; o.c = t[r][3] - 1; o.m = t[r][4];
    return o;
  endfunction

  function automatic int nbasis(int cfg);
    return (cfg < 2) ? 8 : 12;
  endfunction

  function automatic cpx_t cmul(cpx_t x, cpx_t y, bit conj_y, int w, int t);
    cpx_t z;
    logic [63:0] yi;
    yi = conj_y ? (y.im ^ (64'd1 << (w + t))) : y.im;
    z.re = ref_sub(ref_mul(x.re, y.re, w, t), ref_mul(x.im, yi, w, t), w, t);
    z.im = ref_add(ref_mul(x.re, yi, w, t), ref_mul(x.im, y.re, w, t), w, t);
    return z;
  endfunction

  function automatic cpx_t cadd(cpx_t x, cpx_t y, int w, int t);
    cpx_t z;
    z.re = ref_add(x.re, y.re, w, t);
    z.im = ref_add(x.im, y.im, w, t);
    return z;
  endfunction

  // pairwise tree: neighbours are added, an odd last term moves up unchanged
  function automatic cpx_t tree_sum(cpx_t v[$], int w, int t);
    cpx_t nx[$];
    while (v.size() > 1) begin
      nx = {};
      for (int i = 0; i < v.size(); i += 2)
        nx.push_back((i + 1 < v.size()) ? cadd(v[i], v[i+1], w, t) : v[i]);
      v = nx;
    end
    return v[0];
  endfunction

  class baps_model;
    int   cfg, w, t, R;
    cpx_t hist[$][12];     // hist[0] = newest sample's phi set
    cpx_t theta[12];

    function new(int cfg_i, int w_i, int t_i);
      cpx_t zrow[12];
      cfg = cfg_i; w = w_i; t = t_i; R = nbasis(cfg);
      for (int i = 0; i < 12; i++) begin
        zrow[i].re = 0; zrow[i].im = 0;
        theta[i].re = 0; theta[i].im = 0;
      end
      for (int d = 0; d < 8; d++) hist.push_back(zrow);
    endfunction

    // builder cycles from accepting a sample to its done state
    function int step_cycles();
      bit have[12];
      int n = 0;
      rop_t o;
      for (int r = 0; r < R; r++) begin
        o = row(cfg, r);
        if (o.kind != 2) n += 1;
        else begin
          n += (o.b == o.c && have[o.b]) ? 2 : 3;
          if (o.b == o.c) have[o.b] = 1;
        end
      end
      return n;
    endfunction

    // number of Type II operations whose |phi_b|^2 comes from the cache
    function int cache_hits();
      bit have[12];
      int n = 0;
      rop_t o;
      for (int r = 0; r < R; r++) begin
        o = row(cfg, r);
        if (o.kind == 2 && o.b == o.c) begin
          if (have[o.b]) n++;
          have[o.b] = 1;
        end
      end
      return n;
    endfunction

    // compute phi(n) for input x, push it to the history, return output y
    function cpx_t step(cpx_t x, output cpx_t phi[12]);
      cpx_t p, prods[$];
      rop_t o;
      for (int r = 0; r < 12; r++) begin phi[r].re = 0; phi[r].im = 0; end
      for (int r = 0; r < R; r++) begin
        o = row(cfg, r);
        case (o.kind)
          0: phi[r] = x;
          1: phi[r] = hist[o.m - 1][o.a];
          default: begin
            p      = cmul(phi[o.b], phi[o.c], 1'b1, w, t);
            phi[r] = cmul(phi[o.a], p, 1'b0, w, t);
          end
        endcase
      end
      hist.push_front(phi);
      void'(hist.pop_back());
      for (int r = 0; r < R; r++) prods.push_back(cmul(theta[r], phi[r], 1'b0, w, t));
      return tree_sum(prods, w, t);
    endfunction
  endclass

endpackage
