// Testbench of mem_fft: five small configurations (halve at every stage, mixed halve/saturate
// choices, an odd number of stages, and the 256-point configuration 245 at 12 and 16 bits)
// checked bit-exactly by memfft_check, with random gaps in the input stream.
module tb_mem_fft;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  localparam int NC = 5;
  logic done [NC];
  int   ch [NC], fa [NC], gp [NC];

  memfft_check #(.N(16),  .W(12), .TW(12), .SCALE(4'b1111))     c0 (.clk, .rst_n, .done(done[0]), .checks(ch[0]), .failures(fa[0]), .sat_events(), .gaps(gp[0]),
      .x_valid(), .x_re(), .x_im(), .x_ready(1'b0), .y_valid(1'b0), .y_idx('0), .y_re('0), .y_im('0));
  memfft_check #(.N(64),  .W(12), .TW(12), .SCALE(6'b111010))   c1 (.clk, .rst_n, .done(done[1]), .checks(ch[1]), .failures(fa[1]), .sat_events(), .gaps(gp[1]),
      .x_valid(), .x_re(), .x_im(), .x_ready(1'b0), .y_valid(1'b0), .y_idx('0), .y_re('0), .y_im('0));
  memfft_check #(.N(128), .W(11), .TW(11), .SCALE(7'b1101011))  c2 (.clk, .rst_n, .done(done[2]), .checks(ch[2]), .failures(fa[2]), .sat_events(), .gaps(gp[2]),
      .x_valid(), .x_re(), .x_im(), .x_ready(1'b0), .y_valid(1'b0), .y_idx('0), .y_re('0), .y_im('0));
  memfft_check #(.N(256), .W(12), .TW(12), .SCALE(8'd245))      c3 (.clk, .rst_n, .done(done[3]), .checks(ch[3]), .failures(fa[3]), .sat_events(), .gaps(gp[3]),
      .x_valid(), .x_re(), .x_im(), .x_ready(1'b0), .y_valid(1'b0), .y_idx('0), .y_re('0), .y_im('0));
  memfft_check #(.N(256), .W(16), .TW(16), .SCALE(8'd245))      c4 (.clk, .rst_n, .done(done[4]), .checks(ch[4]), .failures(fa[4]), .sat_events(), .gaps(gp[4]),
      .x_valid(), .x_re(), .x_im(), .x_ready(1'b0), .y_valid(1'b0), .y_idx('0), .y_re('0), .y_im('0));

  int checks = 0, failures = 0;

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
    for (int i = 0; i < NC; i++) begin checks += ch[i]; failures += fa[i]; end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
