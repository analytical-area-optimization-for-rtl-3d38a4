// Types shared by the multiplier-less multiple constant multiplication (MCM) blocks.
//
// An MCM network is described as a list of adder nodes. Node 0 is the input x itself (value 1);
// node i >= 1 combines two earlier nodes a and b with a left shift sh:
//   OP_ADD : v_i = v_a + (v_b << sh)
//   OP_SUB : v_i = v_a - (v_b << sh)
//   OP_RSUB: v_i = (v_b << sh) - v_a
// This is the decomposition c = d + f*2^l of the document (d, f odd, either may be negative).
// Which decompositions to use is decided offline (the document's ILP picks them to minimise the
// total adder bit count); the netlist produced is passed to the hardware as a parameter.
package mcm_pkg;
  typedef enum logic [1:0] {
    OP_ADD  = 2'd0,
    OP_SUB  = 2'd1,
    OP_RSUB = 2'd2
  } mcm_op_e;

  typedef struct packed {
    logic [4:0] a;
    logic [4:0] b;
    logic [4:0] sh;
    mcm_op_e    op;
  } mcm_node_t;

  localparam int MAX_NODES = 32;
  localparam int MAX_OUTS  = 32;

  typedef mcm_node_t mcm_net_t [MAX_NODES];
  typedef int        mcm_idx_t [MAX_OUTS];

  // Value (the constant it multiplies x by) of node i of a netlist.
  function automatic longint node_value(mcm_net_t net, int i);
    longint v [MAX_NODES];
    v[0] = 1;
    for (int j = 1; j <= i; j++) begin
      case (net[j].op)
        OP_ADD:  v[j] = v[net[j].a] + (v[net[j].b] <<< net[j].sh);
        OP_SUB:  v[j] = v[net[j].a] - (v[net[j].b] <<< net[j].sh);
        default: v[j] = (v[net[j].b] <<< net[j].sh) - v[net[j].a];
      endcase
    end
    return v[i];
  endfunction

  // Bits of |c| (c odd or 1): a product c*x of an in_w-bit signed x fits in in_w + clog2(|c|).
  function automatic int prod_width(int in_w, longint c);
    longint m;
    int b;
    m = (c < 0) ? -c : c;
    b = 0;
    while ((longint'(1) << b) < m) b++;
    return in_w + b;
  endfunction
endpackage
