// Checker for one configuration of mem_fft: loads NF random frames (with random gaps in
// in_valid), compares every output bin bit-exactly with a plain radix-2 decimation-in-frequency
// fixed-point model written here (same truncation, saturation and twiddle format), checks the
// output index order and that each transform takes log2(N)*(N/2+2) cycles (one butterfly per
// cycle plus two idle cycles per pass) plus one output register cycle, and reports the SQNR
// against an exact DFT (a failure if it is below MIN_SQNR). Frame CONST_FRAME, if set, is a
// full-scale constant that drives unscaled stages into saturation; sat_events counts the
// saturations the model saw.
module memfft_check #(
  parameter int N  = 64,
  parameter int W  = 12,
  parameter int TW = 12,
  parameter logic [$clog2(N)-1:0] SCALE = '1,
  parameter int NF = 2,
  parameter bit SQNR_DFT = 1,
  parameter real MIN_SQNR = 0.0,
  parameter int CONST_FRAME = -1,      // this frame is a full-scale constant (forces saturation)
  parameter bit OWN_DUT = 1
) (
  input  logic clk,
  input  logic rst_n,
  output logic done,
  output int   checks,
  output int   failures,
  output int   gaps,
  output int   sat_events,
  // connection to a mem_fft outside the checker (used when OWN_DUT = 0)
  output logic                  x_valid,
  output logic signed [W-1:0]   x_re,
  output logic signed [W-1:0]   x_im,
  input  logic                  x_ready,
  input  logic                  y_valid,
  input  logic [$clog2(N)-1:0]  y_idx,
  input  logic signed [W-1:0]   y_re,
  input  logic signed [W-1:0]   y_im
);
  localparam int S = $clog2(N);
  localparam real PI = 3.14159265358979323846;

  logic                in_valid, in_ready, out_valid;
  logic signed [W-1:0] in_re, in_im, out_re, out_im;
  logic [S-1:0]        out_idx;

  assign x_valid = in_valid;
  assign x_re    = in_re;
  assign x_im    = in_im;

  if (OWN_DUT) begin : g_dut
    mem_fft #(.N(N), .W(W), .TW(TW), .SCALE(SCALE)) dut (
      .clk, .rst_n, .in_valid, .in_ready, .in_re, .in_im, .out_valid, .out_idx, .out_re, .out_im);
  end else begin : g_ext
    assign in_ready  = x_ready;
    assign out_valid = y_valid;
    assign out_idx   = y_idx;
    assign out_re    = y_re;
    assign out_im    = y_im;
  end

  int xr [N], xi [N], rr [N], ri [N];
  real ct [N], st [N];

  int nsat = 0;
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

  function automatic int brev(int v, int bits);
    int r = 0;
    for (int i = 0; i < bits; i++) r = (r << 1) | ((v >> i) & 1);
    return r;
  endfunction

  task automatic model();
    int ar [N], ai [N];
    for (int n = 0; n < N; n++) begin ar[n] = xr[n]; ai[n] = xi[n]; end
    for (int s = 1; s <= S; s++) begin
      int d = N >> s;
      bit sc = SCALE[S - s];
      for (int n = 0; n < N; n++) if ((n & d) == 0) begin
        int k = (n % d) << (s - 1);
        int wr = $rtoi($floor($cos(2.0 * PI * k / N) * (2.0 ** (TW - 2)) + 0.5));
        int wi = $rtoi($floor(-$sin(2.0 * PI * k / N) * (2.0 ** (TW - 2)) + 0.5));
        int sr = fit(ar[n] + ar[n+d], sc), si = fit(ai[n] + ai[n+d], sc);
        int dr = fit(ar[n] - ar[n+d], sc), di = fit(ai[n] - ai[n+d], sc);
        ar[n] = sr; ai[n] = si;
        ar[n+d] = sat((longint'(dr) * wr - longint'(di) * wi) >>> (TW - 2));
        ai[n+d] = sat((longint'(dr) * wi + longint'(di) * wr) >>> (TW - 2));
      end
    end
    for (int n = 0; n < N; n++) begin rr[brev(n, S)] = ar[n]; ri[brev(n, S)] = ai[n]; end
  endtask

  initial begin
    done = 0; checks = 0; failures = 0; gaps = 0; sat_events = 0;
    in_valid = 0; in_re = '0; in_im = '0;
    @(posedge rst_n);
    for (int f = 0; f < NF; f++) begin
      int t_load, t_out, got;
      real sp, ep;
      for (int n = 0; n < N; n++) begin
        xr[n] = (f == CONST_FRAME) ? (1 << (W - 1)) - 1 : $signed(W'($urandom));
        xi[n] = (f == CONST_FRAME) ? 0 : $signed(W'($urandom));
      end
      model();
      // load
      for (int n = 0; n < N; n++) begin
        @(negedge clk);
        while ($urandom_range(0, 7) == 0) begin in_valid = 0; gaps++; @(negedge clk); end
        checks++;
        if (!in_ready) begin failures++; $display("memfft N=%0d: not ready at load %0d", N, n); end
        in_valid = 1; in_re = W'(xr[n]); in_im = W'(xi[n]);
      end
      @(negedge clk);
      in_valid = 0;
      t_load = 0;
      while (!out_valid) begin @(negedge clk); t_load++; end
      checks++;
      if (t_load != S * (N / 2 + 2) + 1) begin
        failures++;
        $display("memfft N=%0d: %0d compute cycles, expected %0d", N, t_load, S * (N / 2 + 2) + 1);
      end
      got = 0;
      while (got < N) begin
        checks++;
        if (!out_valid || int'(out_idx) != got || out_re != W'(rr[got]) || out_im != W'(ri[got])) begin
          failures++;
          if (failures < 10)
            $display("memfft N=%0d bin %0d: idx %0d valid %0b got (%0d,%0d) want (%0d,%0d)",
                     N, got, out_idx, out_valid, out_re, out_im, rr[got], ri[got]);
        end
        got++;
        @(negedge clk);
      end
      if (SQNR_DFT && f == 0) begin
        automatic int nsh = 0;
        automatic real sq;
        sp = 0; ep = 0;
        for (int s = 0; s < S; s++) nsh += SCALE[s];
        for (int n = 0; n < N; n++) begin
          ct[n] = $cos(2.0 * PI * n / N);
          st[n] = $sin(2.0 * PI * n / N);
        end
        for (int kf = 0; kf < N; kf++) begin
          automatic real a = 0, b = 0;
          for (int n = 0; n < N; n++) begin
            automatic int ix = (kf * n) % N;
            a += xr[n] * ct[ix] + xi[n] * st[ix];
            b += xi[n] * ct[ix] - xr[n] * st[ix];
          end
          a = a / (2.0 ** nsh); b = b / (2.0 ** nsh);
          sp += a*a + b*b; ep += (a - rr[kf])**2 + (b - ri[kf])**2;
        end
        sq = 10.0 * $log10(sp / (ep + 1e-30));
        $display("memfft N=%0d W=%0d scale=%b: SQNR %0.2f dB", N, W, SCALE, sq);
        checks++;
        if (sq < MIN_SQNR) begin
          failures++;
          $display("memfft N=%0d: SQNR %0.2f dB below the required %0.2f dB", N, sq, MIN_SQNR);
        end
      end
      t_out = 0;
    end
    sat_events = nsat;
    done = 1;
  end
endmodule
