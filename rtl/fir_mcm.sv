// Transposed-form FIR filter built around one MCM block (document Sec. 2.1.1, Fig. 3).
//
// y(n) = sum_k c_k * x(n-k), k = 0..NT-1. In the transposed form every tap multiplies the same
// present input sample, so all NT products c_k * x(n) come from a single multiplier-less MCM
// block; a chain of NT-1 adders and registers then delays and sums them:
//   r[NT-1] <= p[NT-1],  r[k] <= p[k] + r[k+1],  y <= p[0] + r[1].
// Tap k uses MCM output k. The default coefficients {19, 21, 31, 121, 125} are the constants of
// the document's MCM example, used here as a 5-tap filter; the document's evaluated filters are
// random Remez designs whose coefficients it does not list. Register widths, the in_valid
// enable and the registered output (one cycle after the sample enters) are this design's choices.
module fir_mcm import mcm_pkg::*; #(
  parameter int       IN_W   = 8,
  parameter int       COEF_W = 8,
  parameter int       NT     = 5,
  parameter int       NA     = 6,
  parameter mcm_net_t NET    = '{
    1: mcm_node_t'{a: 5'd0, b: 5'd0, sh: 5'd1, op: OP_ADD},
    2: mcm_node_t'{a: 5'd1, b: 5'd0, sh: 5'd4, op: OP_ADD},
    3: mcm_node_t'{a: 5'd2, b: 5'd1, sh: 5'd2, op: OP_ADD},
    4: mcm_node_t'{a: 5'd2, b: 5'd0, sh: 5'd1, op: OP_ADD},
    5: mcm_node_t'{a: 5'd0, b: 5'd3, sh: 5'd2, op: OP_ADD},
    6: mcm_node_t'{a: 5'd5, b: 5'd0, sh: 5'd2, op: OP_SUB},
    default: mcm_node_t'{a: 5'd0, b: 5'd0, sh: 5'd0, op: OP_ADD}
  },
  parameter mcm_idx_t OUT_NODE  = '{0: 2, 1: 4, 2: 3, 3: 6, 4: 5, default: 0},
  parameter mcm_idx_t OUT_SHIFT = '{default: 0},
  parameter int       ACC_W     = IN_W + COEF_W + $clog2(NT)
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  input  logic signed [IN_W-1:0]  x,
  output logic                    out_valid,
  output logic signed [ACC_W-1:0] y
);
  localparam int PW = IN_W + COEF_W;

  logic signed [PW-1:0]    p [NT];
  logic signed [ACC_W-1:0] r [NT+1];

  mcm_block #(.IN_W(IN_W), .OUT_W(PW), .NA(NA), .NOUT(NT), .NET(NET),
              .OUT_NODE(OUT_NODE), .OUT_SHIFT(OUT_SHIFT)) u_mcm (.x(x), .y(p));

  assign r[NT] = '0;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 1; k < NT; k++) r[k] <= '0;
      y         <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        for (int k = 1; k < NT; k++) r[k] <= ACC_W'(p[k]) + r[k+1];
        y <= ACC_W'(p[0]) + r[1];
      end
    end
  end
endmodule
