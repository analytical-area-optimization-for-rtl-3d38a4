// Multiplier-less multiple constant multiplication (MCM) block (document Sec. 2.1.4, Fig. 5).
//
// Multiplies one input x by NOUT constants at once using only shift-add adders that share
// common subexpressions. NET lists NA adder nodes (see mcm_pkg); output k is node OUT_NODE[k]
// shifted left by OUT_SHIFT[k] (even constants are an odd node times a power of two). Every node
// is exactly as wide as its product needs (in_w + clog2(constant) bits), and each adder is the
// bitwidth-reduced kind of shift_add_adder. ADDER_BITS is the total adder bit count in the
// document's measure, max(m, n+l) - l per adder (max(m, n+l) for the reverse-subtract form),
// which is the cost its ILP minimises.
//
// Default: the document's motivating example, an 8-bit x times {19, 21, 31, 121, 125}. The
// 6-adder netlist below (3, 19, 31, 21, 125, 121) was found by a small exhaustive search under
// the cost rule above and costs 65 adder bits; the document quotes 67 bits for its 7-adder
// solution and 64 bits for its 8-adder one, whose graphs it does not list.
// Combinational; products are sign-extended to OUT_W bits.
module mcm_block import mcm_pkg::*; #(
  parameter int       IN_W  = 8,
  parameter int       OUT_W = 16,
  parameter int       NA    = 6,
  parameter int       NOUT  = 5,
  parameter mcm_net_t NET   = '{
    1: mcm_node_t'{a: 5'd0, b: 5'd0, sh: 5'd1, op: OP_ADD},   //   3 = 1 + 1<<1
    2: mcm_node_t'{a: 5'd1, b: 5'd0, sh: 5'd4, op: OP_ADD},   //  19 = 3 + 1<<4
    3: mcm_node_t'{a: 5'd2, b: 5'd1, sh: 5'd2, op: OP_ADD},   //  31 = 19 + 3<<2
    4: mcm_node_t'{a: 5'd2, b: 5'd0, sh: 5'd1, op: OP_ADD},   //  21 = 19 + 1<<1
    5: mcm_node_t'{a: 5'd0, b: 5'd3, sh: 5'd2, op: OP_ADD},   // 125 = 1 + 31<<2
    6: mcm_node_t'{a: 5'd5, b: 5'd0, sh: 5'd2, op: OP_SUB},   // 121 = 125 - 1<<2
    default: mcm_node_t'{a: 5'd0, b: 5'd0, sh: 5'd0, op: OP_ADD}
  },
  parameter mcm_idx_t OUT_NODE  = '{0: 2, 1: 4, 2: 3, 3: 6, 4: 5, default: 0},
  parameter mcm_idx_t OUT_SHIFT = '{default: 0}
) (
  input  logic signed [IN_W-1:0]  x,
  output logic signed [OUT_W-1:0] y [NOUT]
);
  localparam int MAXW = IN_W + 32;

  function automatic int nw(int i);
    return prod_width(IN_W, node_value(NET, i));
  endfunction

  function automatic int adder_bits(int i);
    int m, n, l, t;
    m = nw(int'(NET[i].a));
    n = nw(int'(NET[i].b));
    l = int'(NET[i].sh);
    t = (m > n + l) ? m : n + l;
    return (NET[i].op == OP_RSUB) ? t : t - l;
  endfunction

  function automatic int total_bits();
    int t;
    t = 0;
    for (int i = 1; i <= NA; i++) t += adder_bits(i);
    return t;
  endfunction

  localparam int ADDER_BITS = total_bits();

  logic signed [MAXW-1:0] v [NA+1];
  assign v[0] = MAXW'(x);

  for (genvar i = 1; i <= NA; i++) begin : g_node
    localparam int IA = int'(NET[i].a);
    localparam int IB = int'(NET[i].b);
    localparam int AW = nw(IA);
    localparam int BW = nw(IB);
    localparam int RW = nw(i);
    logic signed [RW-1:0] r;
    shift_add_adder #(.PW(AW), .QW(BW), .L(int'(NET[i].sh)), .RW(RW), .OP(NET[i].op)) u_add (
      .p(v[IA][AW-1:0]),
      .q(v[IB][BW-1:0]),
      .r(r)
    );
    assign v[i] = MAXW'(r);
  end

  for (genvar k = 0; k < NOUT; k++) begin : g_out
    assign y[k] = OUT_W'(v[OUT_NODE[k]] <<< OUT_SHIFT[k]);
  end
endmodule
