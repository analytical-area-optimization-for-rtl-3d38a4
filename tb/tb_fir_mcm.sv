// Testbench of fir_mcm (default 5 taps {19, 21, 31, 121, 125}, 8-bit input): random samples
// with random idle cycles, output compared with a direct-form convolution computed here.
// Also checks the one-cycle output latency (out_valid follows in_valid).
module tb_fir_mcm;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  localparam int C [5] = '{19, 21, 31, 121, 125};
  int checks = 0, failures = 0;

  logic              in_valid, out_valid;
  logic signed [7:0] x;
  logic signed [18:0] y;

  fir_mcm dut (.*);

  int hist [5];
  int want, idle;
  bit pend;

  initial begin
    in_valid = 0; x = '0; pend = 0; idle = 0;
    for (int k = 0; k < 5; k++) hist[k] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      // check the result of the previous accepted sample
      if (pend) begin
        checks++;
        if (!out_valid || int'(y) != want) begin
          failures++;
          if (failures < 10) $display("n=%0d: got %0d (valid %0b) want %0d", n, y, out_valid, want);
        end
        pend = 0;
      end else begin
        checks++;
        if (out_valid) begin failures++; $display("n=%0d: spurious out_valid", n); end
      end
      if ($urandom_range(0, 4) == 0) begin
        in_valid = 0;
        idle++;
      end else begin
        in_valid = 1;
        x = 8'($urandom);
        for (int k = 4; k > 0; k--) hist[k] = hist[k-1];
        hist[0] = int'(x);
        want = 0;
        for (int k = 0; k < 5; k++) want += C[k] * hist[k];
        pend = 1;
      end
    end
    checks++;
    if (idle == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
