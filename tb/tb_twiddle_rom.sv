// Testbench of twiddle_rom: every entry of the default table (N = 256, TW = 12) and of the
// memory FFT table (N = 8192, 4096 entries, TW = 11) is compared with cos/sin computed here
// in floating point: w_re = round(cos(2*pi*k/N) * 2^(TW-2)), w_im = round(-sin(...) * 2^(TW-2)).
module tb_twiddle_rom;
  localparam real PI = 3.14159265358979323846;
  int checks = 0, failures = 0;

  logic [7:0]  k;
  logic signed [11:0] w_re, w_im;
  twiddle_rom dut (.*);

  logic [11:0] k2;
  logic signed [10:0] w2_re, w2_im;
  twiddle_rom #(.N(8192), .DEPTH(4096), .TW(11)) dut2 (.k(k2), .w_re(w2_re), .w_im(w2_im));

  function automatic int rnd(real v);
    return (v >= 0) ? $rtoi(v + 0.5) : -$rtoi(-v + 0.5);
  endfunction

  task automatic cmp(string tag, int idx, int got, int want);
    checks++;
    if (got != want) begin
      failures++;
      if (failures < 10) $display("%s[%0d]: got %0d want %0d", tag, idx, got, want);
    end
  endtask

  initial begin
    for (int i = 0; i < 256; i++) begin
      k = 8'(i);
      #1;
      cmp("re256", i, w_re, rnd($cos(2.0 * PI * i / 256) * 1024.0));
      cmp("im256", i, w_im, rnd(-$sin(2.0 * PI * i / 256) * 1024.0));
    end
    for (int i = 0; i < 4096; i++) begin
      k2 = 12'(i);
      #1;
      cmp("re8192", i, w2_re, rnd($cos(2.0 * PI * i / 8192) * 512.0));
      cmp("im8192", i, w2_im, rnd(-$sin(2.0 * PI * i / 8192) * 512.0));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
