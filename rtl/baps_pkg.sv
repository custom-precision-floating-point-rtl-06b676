// baps_pkg: configuration tables of the BAPS (basis-propagating selection)
// predistorter.
//
// A BAPS model builds R basis functions phi_1..phi_R one after another for
// every input sample x(n). phi_1 is the input itself; every later phi_r is
// either a Type I operation, a delay q^-m of an earlier basis function, or a
// Type II operation phi_i * phi_j * conj(phi_k) with i, j, k < r. The output
// is y(n) = sum_r theta_r * phi_r(n).
//
// The four operation sequences below (BAPS8/BAPS12, memory depth 1 or 5) are
// the ones the design is built for; they are fixed at elaboration time by the
// CFG parameter of the modules that use this package. All Type II entries of
// these tables have j == k, i.e. phi_i * |phi_j|^2. Indices are 0-based here:
// phi_1 of the tables is entry 0.
package baps_pkg;

  // Largest basis-function count and delay of any supported configuration.
  localparam int MAX_R     = 12;
  localparam int MAX_DELAY = 4;
  localparam int IDX_W     = 4;   // bits of a basis-function index
  localparam int DLY_W     = 3;   // bits of a delay amount

  typedef enum logic [1:0] {
    OP_INPUT  = 2'd0,   // phi_r = x(n)
    OP_DELAY  = 2'd1,   // Type I : phi_r = q^-m phi_a
    OP_NONLIN = 2'd2    // Type II: phi_r = phi_a * phi_b * conj(phi_c)
  } op_kind_e;

  typedef struct packed {
    op_kind_e         kind;
    logic [IDX_W-1:0] a;   // delayed source (Type I) or phi_i (Type II)
    logic [IDX_W-1:0] b;   // phi_j (Type II)
    logic [IDX_W-1:0] c;   // phi_k, conjugated (Type II)
    logic [DLY_W-1:0] m;   // delay in samples (Type I)
  } baps_op_t;

  typedef enum logic [1:0] {
    BAPS8_MEM1  = 2'd0,
    BAPS8_MEM5  = 2'd1,
    BAPS12_MEM1 = 2'd2,
    BAPS12_MEM5 = 2'd3
  } baps_cfg_e;

  function automatic int num_basis(baps_cfg_e cfg);
    return (cfg == BAPS8_MEM1 || cfg == BAPS8_MEM5) ? 8 : 12;
  endfunction

  function automatic baps_op_t op_in();
    return '{kind: OP_INPUT, a: '0, b: '0, c: '0, m: '0};
  endfunction

  function automatic baps_op_t op_dly(int src, int m);
    return '{kind: OP_DELAY, a: IDX_W'(src), b: '0, c: '0, m: DLY_W'(m)};
  endfunction

  // phi_i * |phi_j|^2, the only Type II form the tables use
  function automatic baps_op_t op_mag(int i, int j);
    return '{kind: OP_NONLIN, a: IDX_W'(i), b: IDX_W'(j), c: IDX_W'(j), m: '0};
  endfunction

  // Operation that produces basis function r (0-based) in configuration cfg.
  // BAPS8 variants are the first eight rows of the BAPS12 variants.
  function automatic baps_op_t get_op(baps_cfg_e cfg, int r);
    baps_op_t op;
    op = op_in();
    if (cfg == BAPS8_MEM1 || cfg == BAPS12_MEM1) begin
      case (r)
        0:  op = op_in();
        1:  op = op_mag(0, 0);   // phi1 |phi1|^2
        2:  op = op_dly(0, 1);   // q^-1 phi1
        3:  op = op_dly(2, 1);   // q^-1 phi3
        4:  op = op_mag(1, 2);   // phi2 |phi3|^2
        5:  op = op_dly(3, 1);   // q^-1 phi4
        6:  op = op_mag(5, 0);   // phi6 |phi1|^2
        7:  op = op_mag(1, 0);   // phi2 |phi1|^2
        8:  op = op_dly(5, 1);   // q^-1 phi6
        9:  op = op_mag(0, 2);   // phi1 |phi3|^2
        10: op = op_mag(9, 0);   // phi10 |phi1|^2
        11: op = op_mag(0, 1);   // phi1 |phi2|^2
        default: op = op_in();
      endcase
    end else begin
      case (r)
        0:  op = op_in();
        1:  op = op_mag(0, 0);   // phi1 |phi1|^2
        2:  op = op_dly(0, 4);   // q^-4 phi1
        3:  op = op_mag(1, 0);   // phi2 |phi1|^2
        4:  op = op_dly(1, 1);   // q^-1 phi2
        5:  op = op_mag(2, 0);   // phi3 |phi1|^2
        6:  op = op_dly(1, 2);   // q^-2 phi2
        7:  op = op_dly(4, 1);   // q^-1 phi5
        8:  op = op_dly(0, 1);   // q^-1 phi1
        9:  op = op_dly(8, 3);   // q^-3 phi9
        10: op = op_mag(9, 0);   // phi10 |phi1|^2
        11: op = op_mag(8, 8);   // phi9 |phi9|^2
        default: op = op_in();
      endcase
    end
    return op;
  endfunction

endpackage
