// R2^2EMDC: radix-2^2 expandable multi-path delay commutator FFT.
//
// An N-point FFT whose datapath is widened by a degree of parallelism T: it has L = 2T lanes
// (rows), accepts L complex samples per enabled cycle and returns L per cycle, so one transform
// takes M = N/L cycles. T = 1 is the classic two-path radix-2^2 MDC; T = N/2 is fully parallel.
// Resources match the document's counts: 2T*log2(N) complex adders (T butterflies per stage),
// T*(2*ceil(log4 N) - 2) complex multipliers and N - 2T FIFO words.
//
// Algorithm: radix-2^2 decimation in frequency. Stages alternate BFI (odd stages, plain
// butterfly) and BFII (even stages, -j on the second input of sub-blocks that came from the
// difference output of the previous BFI). After every even stage except the last, each lane has
// a general twiddle multiplier. With K = log2(L):
//  * Stages 1..K are spatial: the partners sit in different rows in the same cycle. Before stage
//    s an IPM (Eq. (8) of the document; I_n swaps row-index bit 0 with bit log2(n)-1) brings the
//    partners into adjacent rows 2p, 2p+1; no FIFOs are needed here.
//  * Stages K+1..log2(N) are temporal: after stage K every lane holds an independent sub-FFT of
//    M points in time order. Each lane pair has a delay commutator (delays M/2, M/4, ..., 1,
//    two per stage) that lines the partners up, as in a classic MDC.
// The document's generic template (its Figure 11) puts the FIFO part in front of the IPM part;
// ordering the spatial part first, the input layout and the output order below are this
// design's choices (the resource counts are the same either way).
//
// Input layout: lane l carries x[l*M + c] in frame cycle c = 0..M-1 (L contiguous blocks).
// Output order: in output frame cycle tau (bits tau_1..tau_mu, tau_1 the MSB, mu = log2 M) and
// row rho = 2p + lb, the sample is X[f], f = sum b_j 2^(j-1), with DIF path bits
//   b_m = lb, b_(K+i) = !tau_(i+1) for i = 0..mu-1   (when mu = 0: b_K = lb)
//   b_1..b_(K-1) read from row bits 1..K-1: bit K-1 holds b_(K-1), bit j (1..K-2) holds
//   b_(K-1-j).
// Number format: fixed wordlength W for every stage. SCALE holds one bit per stage, MSB for
// stage 1 (the document's configuration ID): 1 = halve the butterfly output (truncate),
// 0 = keep the format and saturate. The default 245 = 11110101 is the configuration the
// document reports as best for a 256-point radix-2 FFT with uniform input in 12b1f format.
//
// Timing: every register advances only when in_valid is high (a stall freezes the pipe).
// Frames must start on the first valid cycle after reset and follow back to back. The result
// leaves LAT enabled cycles after it entered; out_valid marks cycles whose outputs are a real
// transform, out_pos is tau. Feeding further frames (or zeros) flushes the last one.
module emdc_fft import fft_pkg::*; #(
  parameter int N  = 256,
  parameter int T  = 16,
  parameter int W  = 12,
  parameter int TW = 12,
  parameter logic [$clog2(N)-1:0] SCALE = 245
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic signed [W-1:0]  in_re  [2*T],
  input  logic signed [W-1:0]  in_im  [2*T],
  output logic                 out_valid,
  output logic [((N/(2*T)) > 1 ? $clog2(N/(2*T)) : 1)-1:0] out_pos,
  output logic signed [W-1:0]  out_re [2*T],
  output logic signed [W-1:0]  out_im [2*T]
);
  localparam int S  = $clog2(N);
  localparam int L  = 2 * T;
  localparam int K  = $clog2(L);
  localparam int MU = S - K;
  localparam int M  = N / L;
  localparam int CW = (MU > 0) ? MU : 1;
  localparam int DW = 2 * W;

  // ---------------------------------------------------------------- elaboration helpers
  function automatic bit has_mult(int s);
    return (s % 2 == 0) && (s < S);
  endfunction

  function automatic int stage_lat(int s);
    int d;
    d = (s <= K) ? 0 : (M >> (s - K));
    return d + 1 + (has_mult(s) ? 1 : 0);
  endfunction

  // enabled cycles from a frame entering the FFT to it entering stage s
  function automatic int offset(int s);
    int o;
    o = 0;
    for (int j = 1; j < s; j++) o += stage_lat(j);
    return o;
  endfunction

  localparam int LAT = offset(S + 1);

  // Row-bit bookkeeping of the spatial part. Row bit positions hold either an input lane bit
  // (id 0..K-1) or a DIF path bit b_j (id 100+j). Before stage s, the IPM swaps position 0 with
  // swap_pos(s); the butterfly then turns position 0 into b_s.
  function automatic int swap_pos(int s);
    return (s < K) ? (K - s) : (K - 1);
  endfunction

  function automatic int holder(int s, int after_bf, int pos);
    int h [K+1];
    int tmp;
    for (int i = 0; i <= K; i++) h[i] = i;
    for (int st = 1; st <= s; st++) begin
      tmp = h[0];
      h[0] = h[swap_pos(st)];
      h[swap_pos(st)] = tmp;
      if (st < s || after_bf != 0) h[0] = 100 + st;
    end
    return h[pos];
  endfunction

  function automatic int pos_of(int s, int after_bf, int id);
    for (int p = 0; p < K; p++) if (holder(s, after_bf, p) == id) return p;
    return 0;
  endfunction

  // twiddle exponent multiplier e = b_(s-1) + 2*b_s, and the position of the row's data inside
  // its sub-block (without the cycle part), for the multiplier after spatial stage s
  function automatic int sp_e(int s, int row);
    return ((row >> pos_of(s, 1, 100 + s - 1)) & 1) + 2 * (row & 1);
  endfunction

  function automatic int sp_rem(int s, int row);
    int r;
    r = 0;
    for (int j = 0; j < K - s; j++) r |= ((row >> pos_of(s, 1, j)) & 1) << j;
    return r;
  endfunction

  // ---------------------------------------------------------------- control
  logic [CW-1:0] cnt;
  logic [15:0]   fill;
  logic          en;

  assign en = in_valid;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt  <= '0;
      fill <= '0;
    end else if (en) begin
      if (MU > 0) cnt <= cnt + 1'b1;
      if (fill != 16'(LAT)) fill <= fill + 1'b1;
    end
  end

  assign out_valid = en && (fill == 16'(LAT));
  assign out_pos   = (MU > 0) ? CW'(cnt - CW'(LAT)) : '0;

  // ---------------------------------------------------------------- datapath
  logic [DW-1:0] bnd [S+1][L];

  for (genvar l = 0; l < L; l++) begin : g_in
    assign bnd[0][l] = {in_re[l], in_im[l]};
    assign out_re[l] = bnd[S][l][DW-1:W];
    assign out_im[l] = bnd[S][l][W-1:0];
  end

  for (genvar s = 1; s <= S; s++) begin : g_stage
    logic [DW-1:0] bf_out [L];

    if (s <= K) begin : g_spatial
      localparam int SP = swap_pos(s);
      logic [DW-1:0] perm [L];

      ipm #(.n(2 << SP), .GROUPS(L / (2 << SP)), .DW(DW)) u_ipm (
        .din (bnd[s-1]),
        .dout(perm)
      );

      for (genvar p = 0; p < T; p++) begin : g_bf
        localparam bit NEGJ = (s % 2 == 0) && (((2 * p) >> pos_of(s, 0, 100 + s - 1)) & 1) != 0;
        logic signed [W-1:0] xr, xi, yr, yi;
        r2_butterfly #(.W(W)) u_bf (
          .clk, .rst_n, .en,
          .neg_j(NEGJ),
          .scale(SCALE[S - s]),
          .a_re(perm[2*p][DW-1:W]),   .a_im(perm[2*p][W-1:0]),
          .b_re(perm[2*p+1][DW-1:W]), .b_im(perm[2*p+1][W-1:0]),
          .x_re(xr), .x_im(xi), .y_re(yr), .y_im(yi)
        );
        assign bf_out[2*p]   = {xr, xi};
        assign bf_out[2*p+1] = {yr, yi};
      end

      if (has_mult(s)) begin : g_mult
        // cycle inside the frame of the sample now at the multiplier input
        logic [CW-1:0] c;
        assign c = CW'(cnt - CW'(offset(s) + 1));
        for (genvar r = 0; r < L; r++) begin : g_row
          localparam int E    = sp_e(s, r);
          localparam int BASE = E * sp_rem(s, r) * M;
          logic [S-1:0] kidx;
          logic signed [TW-1:0] wr, wi;
          logic signed [W-1:0] pr, pi;
          assign kidx = S'((BASE + E * int'(c)) << (s - 2));
          twiddle_rom #(.N(N), .DEPTH(N), .TW(TW)) u_rom (.k(kidx), .w_re(wr), .w_im(wi));
          cmul_twiddle #(.W(W), .TW(TW)) u_mul (
            .clk, .rst_n, .en,
            .x_re(bf_out[r][DW-1:W]), .x_im(bf_out[r][W-1:0]),
            .w_re(wr), .w_im(wi), .p_re(pr), .p_im(pi)
          );
          assign bnd[s][r] = {pr, pi};
        end
      end else begin : g_nomult
        assign bnd[s] = bf_out;
      end

    end else begin : g_temporal
      localparam int D  = M >> (s - K);
      localparam int PB = $clog2(2 * D);
      // phase of the commutator input window, of the butterfly input and of the multiplier input
      logic [CW-1:0] ph_sw, ph_bf;
      assign ph_sw  = CW'(cnt - CW'(offset(s)));
      assign ph_bf  = CW'(cnt - CW'(offset(s) + D));

      logic sw_swap, bf_upper;
      assign sw_swap   = ((int'(ph_sw)  % (2 * D)) >= D);
      // first half of each 2D window carries lane B's segment, i.e. b_(s-1) = 1
      assign bf_upper  = ((int'(ph_bf)  % (2 * D)) < D);

      for (genvar p = 0; p < T; p++) begin : g_pair
        logic [DW-1:0] fa, sb;
        logic signed [W-1:0] xr, xi, yr, yi;
        delay_commutator #(.D(D), .DW(DW)) u_com (
          .clk, .rst_n, .en,
          .swap(sw_swap),
          .a_in(bnd[s-1][2*p]), .b_in(bnd[s-1][2*p+1]),
          .first_o(fa), .second_o(sb)
        );
        r2_butterfly #(.W(W)) u_bf (
          .clk, .rst_n, .en,
          .neg_j((s % 2 == 0) && bf_upper),
          .scale(SCALE[S - s]),
          .a_re(fa[DW-1:W]), .a_im(fa[W-1:0]),
          .b_re(sb[DW-1:W]), .b_im(sb[W-1:0]),
          .x_re(xr), .x_im(xi), .y_re(yr), .y_im(yi)
        );
        assign bf_out[2*p]   = {xr, xi};
        assign bf_out[2*p+1] = {yr, yi};
      end

      if (has_mult(s)) begin : g_mult
        logic [CW-1:0] ph_mul;
        logic          mul_upper;
        logic [PB-1:0] xpos;
        assign ph_mul    = CW'(cnt - CW'(offset(s) + D + 1));
        assign mul_upper = ((int'(ph_mul) % (2 * D)) < D);
        assign xpos      = PB'(int'(ph_mul) % D);
        for (genvar r = 0; r < L; r++) begin : g_row
          logic [2:0] e;
          logic [S-1:0] kidx;
          logic signed [TW-1:0] wr, wi;
          logic signed [W-1:0] pr, pi;
          assign e    = {1'b0, (r % 2 == 1), 1'b0} + {2'b0, mul_upper};
          assign kidx = S'((int'(e) * int'(xpos)) << (s - 2));
          twiddle_rom #(.N(N), .DEPTH(N), .TW(TW)) u_rom (.k(kidx), .w_re(wr), .w_im(wi));
          cmul_twiddle #(.W(W), .TW(TW)) u_mul (
            .clk, .rst_n, .en,
            .x_re(bf_out[r][DW-1:W]), .x_im(bf_out[r][W-1:0]),
            .w_re(wr), .w_im(wi), .p_re(pr), .p_im(pi)
          );
          assign bnd[s][r] = {pr, pi};
        end
      end else begin : g_nomult
        assign bnd[s] = bf_out;
      end
    end
  end
endmodule
