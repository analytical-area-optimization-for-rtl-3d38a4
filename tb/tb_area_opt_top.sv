// End-to-end testbench of area_opt_top at its default (full) size: the FIR filter, the
// 256-point/32-lane R2^2EMDC FFT and the 8192-point memory-based FFT run at the same time.
//  * FIR: random 8-bit samples with random idle cycles, compared with a direct convolution.
//  * EMDC: three frames (two random, one full-scale constant) streamed with random stalls,
//    every lane of every output cycle compared bit-exactly with a radix-2^2 model (emdc_check).
//  * Memory FFT: a random frame and a full-scale constant frame, with random load gaps; every
//    bin compared bit-exactly with a radix-2 model, compute time checked, and the SQNR of the
//    default 11-bit configuration against an exact DFT required to be >= 30 dB (memfft_check).
// Each mechanism must be seen at least once or it counts as a failure: EMDC input stalls,
// saturation in an unscaled EMDC stage, FIR idle cycles, gaps while loading the memory FFT,
// the memory FFT refusing input (in_ready low) while it computes, and saturation in one of
// the memory FFT's unscaled stages.
module tb_area_opt_top;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic               fir_in_valid, fir_out_valid;
  logic signed [7:0]  fir_x;
  logic signed [18:0] fir_y;
  logic               emdc_in_valid, emdc_out_valid;
  logic signed [11:0] emdc_in_re [32], emdc_in_im [32], emdc_out_re [32], emdc_out_im [32];
  logic [2:0]         emdc_out_pos;
  logic               mfft_in_valid, mfft_in_ready, mfft_out_valid;
  logic signed [10:0] mfft_in_re, mfft_in_im, mfft_out_re, mfft_out_im;
  logic [12:0]        mfft_out_idx;

  area_opt_top dut (.*);

  // ---- the two FFTs, driven and checked by their checkers ----
  logic e_done, m_done;
  int   e_checks, e_failures, e_stalls, e_sat, m_checks, m_failures, m_gaps, m_sat;

  emdc_check #(.N(256), .T(16), .W(12), .TW(12), .SCALE(8'd245), .NF(3), .OWN_DUT(0)) u_emdc_chk (
    .clk, .rst_n, .done(e_done), .checks(e_checks), .failures(e_failures), .stalls(e_stalls),
    .sat_events(e_sat),
    .x_valid(emdc_in_valid), .x_re(emdc_in_re), .x_im(emdc_in_im),
    .y_valid(emdc_out_valid), .y_pos(emdc_out_pos), .y_re(emdc_out_re), .y_im(emdc_out_im));

  memfft_check #(.N(8192), .W(11), .TW(11), .SCALE(13'b1111010101010), .NF(2), .SQNR_DFT(1), .MIN_SQNR(30.0),
                 .CONST_FRAME(1), .OWN_DUT(0)) u_mfft_chk (
    .clk, .rst_n, .done(m_done), .checks(m_checks), .failures(m_failures), .gaps(m_gaps), .sat_events(m_sat),
    .x_valid(mfft_in_valid), .x_re(mfft_in_re), .x_im(mfft_in_im), .x_ready(mfft_in_ready),
    .y_valid(mfft_out_valid), .y_idx(mfft_out_idx), .y_re(mfft_out_re), .y_im(mfft_out_im));

  // ---- FIR ----
  localparam int C [5] = '{19, 21, 31, 121, 125};
  int  f_checks = 0, f_failures = 0, f_idle = 0, busy = 0;
  int  hist [5], want;
  bit  pend;

  initial begin
    fir_in_valid = 0; fir_x = '0; pend = 0;
    for (int k = 0; k < 5; k++) hist[k] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    while (!(e_done && m_done)) begin
      @(negedge clk);
      f_checks++;
      if (pend) begin
        if (!fir_out_valid || int'(fir_y) != want) begin
          f_failures++;
          if (f_failures < 10) $display("fir: got %0d (valid %0b) want %0d", fir_y, fir_out_valid, want);
        end
        pend = 0;
      end else if (fir_out_valid) begin
        f_failures++;
        $display("fir: spurious out_valid");
      end
      if ($urandom_range(0, 4) == 0) begin
        fir_in_valid = 0;
        f_idle++;
      end else begin
        fir_in_valid = 1;
        fir_x = 8'($urandom);
        for (int k = 4; k > 0; k--) hist[k] = hist[k-1];
        hist[0] = int'(fir_x);
        want = 0;
        for (int k = 0; k < 5; k++) want += C[k] * hist[k];
        pend = 1;
      end
    end
    finish(0);
  end

  always @(posedge clk) if (rst_n && !mfft_in_ready) busy++;

  task automatic finish(int extra);
    int checks, failures;
    checks   = f_checks + e_checks + m_checks + 6;
    failures = f_failures + e_failures + m_failures + extra;
    if (e_stalls == 0) begin failures++; $display("mechanism never seen: EMDC input stall"); end
    if (e_sat == 0)    begin failures++; $display("mechanism never seen: EMDC stage saturation"); end
    if (f_idle == 0)   begin failures++; $display("mechanism never seen: FIR idle cycle"); end
    if (m_gaps == 0)   begin failures++; $display("mechanism never seen: memory FFT load gap"); end
    if (busy == 0)     begin failures++; $display("mechanism never seen: memory FFT busy"); end
    if (m_sat == 0)    begin failures++; $display("mechanism never seen: memory FFT stage saturation"); end
    $display("fir checks=%0d idle=%0d | emdc checks=%0d stalls=%0d saturations=%0d | mfft checks=%0d gaps=%0d busy=%0d saturations=%0d",
             f_checks, f_idle, e_checks, e_stalls, e_sat, m_checks, m_gaps, busy, m_sat);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    $display("watchdog expired");
    finish(1);
  end
endmodule
