// Testbench of emdc_fft: nine configurations run side by side, from the classic two-path MDC
// (T = 1) to the fully parallel case (T = N/2): 16 points with T = 1, 2, 4 and 8, 32 and 64
// points, 256 points with T = 1 and with the T = 16 default, and 1024 points with T = 4, with
// different per-stage scaling choices. Each is checked bit-exactly by emdc_check, with random
// stalls; a configuration that never stalled counts as a failure.
module tb_emdc_fft;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  localparam int NC = 9;
  logic done [NC];
  int   ch [NC], fa [NC], st [NC], sa [NC];

  emdc_check #(.N(16),  .T(1),  .SCALE(4'b1111))    c0 (.clk, .rst_n, .done(done[0]), .checks(ch[0]), .failures(fa[0]), .stalls(st[0]), .sat_events(sa[0]),
      .x_valid(), .x_re(), .x_im(), .y_valid(1'b0), .y_pos('0), .y_re('{default: '0}), .y_im('{default: '0}));
  emdc_check #(.N(16),  .T(2),  .SCALE(4'b1010))    c1 (.clk, .rst_n, .done(done[1]), .checks(ch[1]), .failures(fa[1]), .stalls(st[1]), .sat_events(sa[1]),
      .x_valid(), .x_re(), .x_im(), .y_valid(1'b0), .y_pos('0), .y_re('{default: '0}), .y_im('{default: '0}));
  emdc_check #(.N(32),  .T(4),  .SCALE(5'b11011))   c2 (.clk, .rst_n, .done(done[2]), .checks(ch[2]), .failures(fa[2]), .stalls(st[2]), .sat_events(sa[2]),
      .x_valid(), .x_re(), .x_im(), .y_valid(1'b0), .y_pos('0), .y_re('{default: '0}), .y_im('{default: '0}));
  emdc_check #(.N(64),  .T(2),  .SCALE(6'b111010))  c3 (.clk, .rst_n, .done(done[3]), .checks(ch[3]), .failures(fa[3]), .stalls(st[3]), .sat_events(sa[3]),
      .x_valid(), .x_re(), .x_im(), .y_valid(1'b0), .y_pos('0), .y_re('{default: '0}), .y_im('{default: '0}));
  emdc_check #(.N(16),  .T(8),  .SCALE(4'b1101))    c4 (.clk, .rst_n, .done(done[4]), .checks(ch[4]), .failures(fa[4]), .stalls(st[4]), .sat_events(sa[4]),
      .x_valid(), .x_re(), .x_im(), .y_valid(1'b0), .y_pos('0), .y_re('{default: '0}), .y_im('{default: '0}));
  emdc_check #(.N(256), .T(16), .SCALE(8'd245))     c5 (.clk, .rst_n, .done(done[5]), .checks(ch[5]), .failures(fa[5]), .stalls(st[5]), .sat_events(sa[5]),
      .x_valid(), .x_re(), .x_im(), .y_valid(1'b0), .y_pos('0), .y_re('{default: '0}), .y_im('{default: '0}));
  emdc_check #(.N(16), .T(4), .SCALE(4'b1111)) c6 (.clk, .rst_n, .done(done[6]), .checks(ch[6]), .failures(fa[6]), .stalls(st[6]), .sat_events(sa[6]),
      .x_valid(), .x_re(), .x_im(), .y_valid(1'b0), .y_pos('0), .y_re('{default: '0}), .y_im('{default: '0}));
  emdc_check #(.N(256), .T(1), .SCALE(8'd245)) c7 (.clk, .rst_n, .done(done[7]), .checks(ch[7]), .failures(fa[7]), .stalls(st[7]), .sat_events(sa[7]),
      .x_valid(), .x_re(), .x_im(), .y_valid(1'b0), .y_pos('0), .y_re('{default: '0}), .y_im('{default: '0}));
  emdc_check #(.N(1024), .T(4), .SCALE(10'b1111110101)) c8 (.clk, .rst_n, .done(done[8]), .checks(ch[8]), .failures(fa[8]), .stalls(st[8]), .sat_events(sa[8]),
      .x_valid(), .x_re(), .x_im(), .y_valid(1'b0), .y_pos('0), .y_re('{default: '0}), .y_im('{default: '0}));

  int checks, failures;

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
  end

  initial begin
    bit all;
    do begin
      @(posedge clk);
      all = 1;
      for (int i = 0; i < NC; i++) all &= done[i];
    end while (!all);
    checks = 0; failures = 0;
    for (int i = 0; i < NC; i++) begin
      checks += ch[i]; failures += fa[i];
      checks++;
      if (st[i] == 0) begin failures++; $display("config %0d saw no stall", i); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
