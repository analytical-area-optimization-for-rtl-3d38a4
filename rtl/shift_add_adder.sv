// Bitwidth-reduced shift-add adder of an MCM block (document Fig. 6 and Fig. 7).
//
// Computes r = p + (q << L), p - (q << L) or (q << L) - p for signed p (PW bits) and q (QW bits)
// into an RW-bit result that the caller sizes from the constant it produces. When p is the
// unshifted operand of an add or subtract, the L low bits of the result are p's own L low bits:
// nothing is added there and no carry can come out of them, so they are wired straight through
// and only the upper RW-L bits go through an adder. This is the document's point that the adder
// for p + (q << l) needs only max(m, n+l) - l bits. For (q << L) - p the low bits depend on the
// negation of p, so that case uses a full-width adder. Combinational.
module shift_add_adder import mcm_pkg::*; #(
  parameter int      PW = 8,
  parameter int      QW = 8,
  parameter int      L  = 2,
  parameter int      RW = 11,
  parameter mcm_op_e OP = OP_ADD
) (
  input  logic signed [PW-1:0] p,
  input  logic signed [QW-1:0] q,
  output logic signed [RW-1:0] r
);
  localparam int UW = RW - L;      // width of the adder that is actually built

  if (OP == OP_RSUB) begin : g_full
    assign r = (RW'(q) <<< L) - RW'(p);
  end else begin : g_reduced
    logic signed [RW+PW-1:0] p_ext;
    logic signed [UW-1:0]    p_hi, q_ext, sum_hi;
    assign p_ext  = (RW+PW)'(p);
    assign p_hi   = UW'(p_ext >>> L);
    assign q_ext  = UW'(q);
    assign sum_hi = (OP == OP_SUB) ? (p_hi - q_ext) : (p_hi + q_ext);
    if (L > 0) begin : g_low
      assign r = {sum_hi, p_ext[L-1:0]};
    end else begin : g_nolow
      assign r = sum_hi;
    end
  end
endmodule
