// Radix-2 butterfly, BFI/BFII type, with fixed-wordlength output scaling.
//
// Computes x = a + b' and y = a - b', where b' = b, or b' = -j*b when neg_j is set. As in the
// document's BFII, the -j product is not a multiplier: it is a real/imaginary swap with the
// add/subtract of each part chosen by multiplexers (a + (-j)b = (ar + bi) + j(ai - br)).
// The exact sums are W+1 bits wide. The output keeps the input wordlength W, as the
// fixed-wordlength scheme requires, in one of two ways chosen per stage:
//   scale = 1: divide by two (move one bit from the fraction to the integer part); the dropped
//              LSB is truncated (floor), never rounded;
//   scale = 0: keep the number format and saturate to the largest/smallest W-bit value.
// Truncation and saturation follow the document; floor-type truncation is its definition of
// truncation. Outputs are registered and advance only when en is high (one cycle latency).
module r2_butterfly #(
  parameter int W = 12
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                en,
  input  logic                neg_j,
  input  logic                scale,
  input  logic signed [W-1:0] a_re,
  input  logic signed [W-1:0] a_im,
  input  logic signed [W-1:0] b_re,
  input  logic signed [W-1:0] b_im,
  output logic signed [W-1:0] x_re,
  output logic signed [W-1:0] x_im,
  output logic signed [W-1:0] y_re,
  output logic signed [W-1:0] y_im
);
  localparam logic signed [W:0] MAXV = (W+1)'((1 <<< (W - 1)) - 1);
  localparam logic signed [W:0] MINV = -(W+1)'(1 <<< (W - 1));

  function automatic logic signed [W-1:0] fit(input logic signed [W:0] v, input logic sc);
    if (sc) return v[W:1];
    if (v > MAXV) return MAXV[W-1:0];
    if (v < MINV) return MINV[W-1:0];
    return v[W-1:0];
  endfunction

  logic signed [W:0] br_sel, bi_sel;
  logic signed [W:0] sr, si, dr, di;

  always_comb begin
    // real part of b' is bi (if -j) else br; imaginary part of b' is -br (if -j) else bi
    br_sel = neg_j ? (W+1)'(b_im) : (W+1)'(b_re);
    bi_sel = neg_j ? (W+1)'(b_re) : (W+1)'(b_im);
    sr = (W+1)'(a_re) + br_sel;
    dr = (W+1)'(a_re) - br_sel;
    if (neg_j) begin
      si = (W+1)'(a_im) - bi_sel;
      di = (W+1)'(a_im) + bi_sel;
    end else begin
      si = (W+1)'(a_im) + bi_sel;
      di = (W+1)'(a_im) - bi_sel;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x_re <= '0; x_im <= '0; y_re <= '0; y_im <= '0;
    end else if (en) begin
      x_re <= fit(sr, scale);
      x_im <= fit(si, scale);
      y_re <= fit(dr, scale);
      y_im <= fit(di, scale);
    end
  end
endmodule
