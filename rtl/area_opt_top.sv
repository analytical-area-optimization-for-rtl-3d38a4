// Top level: the three area-optimised DSP datapaths side by side, each with its own ports.
//
//  * fir_*  : transposed-form FIR filter whose tap products come from one multiplier-less,
//             bitwidth-aware MCM block (8-bit input, 5 taps {19, 21, 31, 121, 125}).
//  * emdc_* : 256-point radix-2^2 expandable MDC FFT with parallelism T = 16 (32 lanes,
//             8 cycles per transform), 12-bit fixed wordlength, per-stage static scaling 245.
//  * mfft_* : 8192-point memory-based radix-2 FFT, 11-bit fixed wordlength, per-stage static
//             scaling (default: halve at every stage).
// The three share only the clock and the active-low asynchronous reset; see each module for
// its interface and timing.
module area_opt_top (
  input  logic               clk,
  input  logic               rst_n,
  // FIR filter
  input  logic               fir_in_valid,
  input  logic signed [7:0]  fir_x,
  output logic               fir_out_valid,
  output logic signed [18:0] fir_y,
  // R2^2EMDC FFT (256 points, 32 lanes)
  input  logic               emdc_in_valid,
  input  logic signed [11:0] emdc_in_re  [32],
  input  logic signed [11:0] emdc_in_im  [32],
  output logic               emdc_out_valid,
  output logic [2:0]         emdc_out_pos,
  output logic signed [11:0] emdc_out_re [32],
  output logic signed [11:0] emdc_out_im [32],
  // memory-based FFT (8192 points)
  input  logic               mfft_in_valid,
  output logic               mfft_in_ready,
  input  logic signed [10:0] mfft_in_re,
  input  logic signed [10:0] mfft_in_im,
  output logic               mfft_out_valid,
  output logic [12:0]        mfft_out_idx,
  output logic signed [10:0] mfft_out_re,
  output logic signed [10:0] mfft_out_im
);
  fir_mcm u_fir (
    .clk, .rst_n,
    .in_valid(fir_in_valid), .x(fir_x),
    .out_valid(fir_out_valid), .y(fir_y)
  );

  emdc_fft #(.N(256), .T(16), .W(12), .TW(12), .SCALE(8'd245)) u_emdc (
    .clk, .rst_n,
    .in_valid(emdc_in_valid), .in_re(emdc_in_re), .in_im(emdc_in_im),
    .out_valid(emdc_out_valid), .out_pos(emdc_out_pos),
    .out_re(emdc_out_re), .out_im(emdc_out_im)
  );

  mem_fft #(.N(8192), .W(11), .TW(11)) u_mfft (
    .clk, .rst_n,
    .in_valid(mfft_in_valid), .in_ready(mfft_in_ready),
    .in_re(mfft_in_re), .in_im(mfft_in_im),
    .out_valid(mfft_out_valid), .out_idx(mfft_out_idx),
    .out_re(mfft_out_re), .out_im(mfft_out_im)
  );
endmodule
