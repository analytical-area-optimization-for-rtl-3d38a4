// Complex twiddle multiplier for a fixed-wordlength FFT.
//
// p = x * w with x in W-bit two's complement (re, im) and w a TW-bit twiddle whose value 1.0 is
// 2^(TW-2). The four real products are summed exactly, the TW-2 fraction bits of the twiddle are
// dropped by truncation (floor), and the result saturates to W bits, so the output keeps the
// input number format. The document only counts these multipliers (Table 7); the structure,
// the twiddle format and the truncation here are this design's choices, made to match the
// truncation and saturation the document uses for its butterflies. Registered, one cycle, en.
module cmul_twiddle #(
  parameter int W  = 12,
  parameter int TW = 12
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 en,
  input  logic signed [W-1:0]  x_re,
  input  logic signed [W-1:0]  x_im,
  input  logic signed [TW-1:0] w_re,
  input  logic signed [TW-1:0] w_im,
  output logic signed [W-1:0]  p_re,
  output logic signed [W-1:0]  p_im
);
  localparam int PW = W + TW + 1;
  localparam logic signed [PW-1:0] MAXV = PW'((1 <<< (W - 1)) - 1);
  localparam logic signed [PW-1:0] MINV = -PW'(1 <<< (W - 1));

  function automatic logic signed [W-1:0] fit(input logic signed [PW-1:0] v);
    logic signed [PW-1:0] s;
    s = v >>> (TW - 2);
    if (s > MAXV) return MAXV[W-1:0];
    if (s < MINV) return MINV[W-1:0];
    return s[W-1:0];
  endfunction

  logic signed [PW-1:0] pr, pi;
  always_comb begin
    pr = PW'(x_re) * PW'(w_re) - PW'(x_im) * PW'(w_im);
    pi = PW'(x_re) * PW'(w_im) + PW'(x_im) * PW'(w_re);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      p_re <= '0; p_im <= '0;
    end else if (en) begin
      p_re <= fit(pr);
      p_im <= fit(pi);
    end
  end
endmodule
