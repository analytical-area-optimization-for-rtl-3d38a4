// Twiddle factor table: for index k it returns W_N^k = exp(-j*2*pi*k/N).
//
// The table has DEPTH entries (k = 0..DEPTH-1, DEPTH <= N) and is computed at elaboration from
// cos/sin, so no data file is needed; synthesis turns it into a ROM. Format: TW-bit signed,
// 1.0 = 2^(TW-2), rounded to nearest (see fft_pkg). Read is combinational.
module twiddle_rom #(
  parameter int N     = 256,
  parameter int DEPTH = 256,
  parameter int TW    = 12,
  parameter int AW    = $clog2(DEPTH)
) (
  input  logic [AW-1:0]        k,
  output logic signed [TW-1:0] w_re,
  output logic signed [TW-1:0] w_im
);
  typedef logic signed [2*TW-1:0] table_t [DEPTH];

  function automatic table_t make_table();
    table_t t;
    for (int i = 0; i < DEPTH; i++)
      t[i] = {TW'(fft_pkg::tw_re(i, N, TW)), TW'(fft_pkg::tw_im(i, N, TW))};
    return t;
  endfunction

  localparam table_t TABLE = make_table();

  assign w_re = TABLE[k][2*TW-1:TW];
  assign w_im = TABLE[k][TW-1:0];
endmodule
