// Checker for one configuration of emdc_fft: random frames go in (with random stall cycles),
// (the third frame, if any, is a full-scale constant so that unscaled stages saturate);
// every output of the first NF frames is compared with a plain fixed-point radix-2^2
// decimation-in-frequency model written here over a natural-order array, using the same
// truncation and saturation rules and twiddle format. The output position of each bin follows
// the order documented in emdc_fft. Also checks the latency and that frames leave back to
// back (one frame every N/(2T) enabled cycles), and reports the SQNR against an exact DFT.
module emdc_check #(
  parameter int N  = 16,
  parameter int T  = 1,
  parameter int W  = 12,
  parameter int TW = 12,
  parameter logic [$clog2(N)-1:0] SCALE = '1,
  parameter int NF = 3,
  parameter bit OWN_DUT = 1
) (
  input  logic clk,
  input  logic rst_n,
  output logic done,
  output int   checks,
  output int   failures,
  output int   stalls,
  output int   sat_events,
  // connection to an emdc_fft outside the checker (used when OWN_DUT = 0)
  output logic                x_valid,
  output logic signed [W-1:0] x_re [2*T],
  output logic signed [W-1:0] x_im [2*T],
  input  logic                y_valid,
  input  logic [((N/(2*T)) > 1 ? $clog2(N/(2*T)) : 1)-1:0] y_pos,
  input  logic signed [W-1:0] y_re [2*T],
  input  logic signed [W-1:0] y_im [2*T]
);
  localparam int S  = $clog2(N);
  localparam int L  = 2 * T;
  localparam int K  = $clog2(L);
  localparam int MU = S - K;
  localparam int M  = N / L;
  localparam int CW = (M > 1) ? $clog2(M) : 1;
  localparam real PI = 3.14159265358979323846;

  logic                in_valid, out_valid;
  logic signed [W-1:0] in_re [L], in_im [L], out_re [L], out_im [L];
  logic [CW-1:0]       out_pos;

  // latency in enabled cycles: one register per butterfly and per multiplier, plus the
  // commutator delays M/2 + M/4 + ... + 1
  localparam int EXP_LAT = S + (S - 1) / 2 + M - 1;

  assign x_valid = in_valid;
  assign x_re    = in_re;
  assign x_im    = in_im;

  if (OWN_DUT) begin : g_dut
    emdc_fft #(.N(N), .T(T), .W(W), .TW(TW), .SCALE(SCALE)) dut (
      .clk, .rst_n, .in_valid, .in_re, .in_im, .out_valid, .out_pos, .out_re, .out_im);
  end else begin : g_ext
    assign out_valid = y_valid;
    assign out_pos   = y_pos;
    assign out_re    = y_re;
    assign out_im    = y_im;
  end

  int xin_re [NF][N], xin_im [NF][N];
  int ref_re [NF][N], ref_im [NF][N];   // indexed by frequency

  int nsat;
  function automatic int fit(int v, bit sc);
    if (sc) return v >>> 1;
    if (v > (1 << (W - 1)) - 1) begin nsat++; return (1 << (W - 1)) - 1; end
    if (v < -(1 << (W - 1))) begin nsat++; return -(1 << (W - 1)); end
    return v;
  endfunction

  function automatic int sat(longint v);
    if (v > (1 << (W - 1)) - 1) return (1 << (W - 1)) - 1;
    if (v < -(1 << (W - 1))) return -(1 << (W - 1));
    return int'(v);
  endfunction

  function automatic int twr(int k);
    return $rtoi($floor($cos(2.0 * PI * k / N) * (2.0 ** (TW - 2)) + 0.5));
  endfunction
  function automatic int twi(int k);
    return $rtoi($floor(-$sin(2.0 * PI * k / N) * (2.0 ** (TW - 2)) + 0.5));
  endfunction

  function automatic int brev(int v, int bits);
    int r = 0;
    for (int i = 0; i < bits; i++) r = (r << 1) | ((v >> i) & 1);
    return r;
  endfunction

  task automatic model(int f);
    int xr [N], xi [N];
    for (int n = 0; n < N; n++) begin xr[n] = xin_re[f][n]; xi[n] = xin_im[f][n]; end
    for (int s = 1; s <= S; s++) begin
      int d = N >> s;
      bit sc = SCALE[S - s];
      for (int n = 0; n < N; n++) if ((n & d) == 0) begin
        int ar = xr[n], ai = xi[n], br = xr[n+d], bi = xi[n+d], t;
        if (s % 2 == 0 && ((n >> (S - s + 1)) & 1) == 1) begin
          t = br; br = bi; bi = -t;                    // b * (-j)
        end
        xr[n] = fit(ar + br, sc);  xi[n] = fit(ai + bi, sc);
        xr[n+d] = fit(ar - br, sc); xi[n+d] = fit(ai - bi, sc);
      end
      if (s % 2 == 0 && s < S) begin
        for (int n = 0; n < N; n++) begin
          int e = ((n >> (S - s + 1)) & 1) + 2 * ((n >> (S - s)) & 1);
          int k = ((e * (n % (N >> s))) << (s - 2)) % N;
          longint pr = longint'(xr[n]) * twr(k) - longint'(xi[n]) * twi(k);
          longint pi = longint'(xr[n]) * twi(k) + longint'(xi[n]) * twr(k);
          xr[n] = sat(pr >>> (TW - 2));
          xi[n] = sat(pi >>> (TW - 2));
        end
      end
    end
    for (int n = 0; n < N; n++) begin
      ref_re[f][brev(n, S)] = xr[n];
      ref_im[f][brev(n, S)] = xi[n];
    end
  endtask

  // frequency bin at output cycle tau, row rho (the documented output order)
  function automatic int out_freq(int tau, int rho);
    int b [64];
    int f = 0;
    for (int j = 0; j < 64; j++) b[j] = 0;
    if (MU == 0) b[K] = rho & 1;
    else begin
      b[S] = rho & 1;
      for (int i = 0; i < MU; i++) b[K + i] = 1 - ((tau >> (MU - 1 - i)) & 1);
    end
    for (int j = 1; j <= K - 1; j++)
      b[j] = (j == K - 1) ? ((rho >> (K - 1)) & 1) : ((rho >> (K - 1 - j)) & 1);
    for (int j = 1; j <= S; j++) f += b[j] << (j - 1);
    return f;
  endfunction

  real sig_p, err_p;
  int  out_cycles, first_out_en, en_count, frames_out;

  initial begin
    done = 0; checks = 0; failures = 0; stalls = 0; nsat = 0;
    in_valid = 0;
    for (int l = 0; l < L; l++) begin in_re[l] = '0; in_im[l] = '0; end
    for (int f = 0; f < NF; f++) begin
      for (int n = 0; n < N; n++) begin
        // the third frame is a full-scale constant, which drives the unscaled stages into saturation
        xin_re[f][n] = (f == 2) ? (1 << (W - 1)) - 1 : $signed(W'($urandom));
        xin_im[f][n] = (f == 2) ? 0 : $signed(W'($urandom));
      end
      model(f);
    end
    // exact DFT of frame 0, scaled like the configuration, for an SQNR figure
    sig_p = 0; err_p = 0;
    begin
      automatic int nsh = 0;
      for (int s = 0; s < S; s++) nsh += SCALE[s];
      for (int kf = 0; kf < N; kf++) begin
        automatic real sr = 0, si = 0;
        for (int n = 0; n < N; n++) begin
          sr += xin_re[0][n] * $cos(2.0*PI*kf*n/N) + xin_im[0][n] * $sin(2.0*PI*kf*n/N);
          si += xin_im[0][n] * $cos(2.0*PI*kf*n/N) - xin_re[0][n] * $sin(2.0*PI*kf*n/N);
        end
        sr = sr / (2.0 ** nsh); si = si / (2.0 ** nsh);
        sig_p += sr*sr + si*si;
        err_p += (sr - ref_re[0][kf])**2 + (si - ref_im[0][kf])**2;
      end
    end
    @(posedge rst_n);
    @(posedge clk);
    for (int f = 0; f < NF + 2 + (40 + 2*N) / M; f++) begin
      for (int c = 0; c < M; c++) begin
        while ($urandom_range(0, 5) == 0) begin
          in_valid <= 0;
          stalls++;
          @(posedge clk);
        end
        in_valid <= 1;
        for (int l = 0; l < L; l++) begin
          in_re[l] <= (f < NF) ? W'(xin_re[f][l*M + c]) : '0;
          in_im[l] <= (f < NF) ? W'(xin_im[f][l*M + c]) : '0;
        end
        @(posedge clk);
      end
    end
    in_valid <= 0;
    @(posedge clk);
    if (frames_out < NF) begin
      failures++;
      $display("emdc N=%0d T=%0d: only %0d frames came out", N, T, frames_out);
    end
    $display("emdc N=%0d T=%0d scale=%b: SQNR of frame 0 = %0.2f dB, stalls=%0d",
             N, T, SCALE, 10.0 * $log10(sig_p / (err_p + 1e-30)), stalls);
    sat_events = nsat;
    done = 1;
  end

  // output monitor
  initial begin
    out_cycles = 0; en_count = 0; first_out_en = -1; frames_out = 0;
    forever begin
      @(posedge clk);
      if (in_valid) begin
        if (out_valid && first_out_en < 0) begin
          first_out_en = en_count;
          checks++;
          if (first_out_en != EXP_LAT) begin
            failures++;
            $display("emdc N=%0d T=%0d: latency %0d, expected %0d", N, T, first_out_en, EXP_LAT);
          end
        end
        en_count++;
      end
      if (out_valid && frames_out < NF) begin
        automatic int tau = out_cycles % M;
        checks++;
        if (int'(out_pos) != tau) begin
          failures++;
          $display("emdc N=%0d T=%0d: out_pos %0d, expected %0d", N, T, out_pos, tau);
        end
        for (int r = 0; r < L; r++) begin
          automatic int fq = out_freq(tau, r);
          checks++;
          if (out_re[r] != ref_re[frames_out][fq] || out_im[r] != ref_im[frames_out][fq]) begin
            failures++;
            if (failures < 10)
              $display("emdc N=%0d T=%0d frame %0d tau %0d row %0d bin %0d: got (%0d,%0d) want (%0d,%0d)",
                       N, T, frames_out, tau, r, fq, out_re[r], out_im[r],
                       ref_re[frames_out][fq], ref_im[frames_out][fq]);
          end
        end
        out_cycles++;
        if (out_cycles % M == 0) frames_out++;
      end
    end
  end
endmodule
