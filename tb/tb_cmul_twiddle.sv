// Testbench of cmul_twiddle (W = 12, TW = 12 and W = 11, TW = 11): random data times random
// twiddle-range coefficients (|w| <= 2^(TW-2), 1.0 = 2^(TW-2)) and a few out-of-range
// coefficients that force saturation. The registered product is compared with an integer
// model: floor((x*w) / 2^(TW-2)) then saturated to W bits. Checks the hold on en = 0.
module tb_cmul_twiddle;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0, n_sat = 0, n_hold = 0;

  logic en;
  logic signed [11:0] x_re, x_im, w_re, w_im, p_re, p_im;
  cmul_twiddle dut (.*);

  logic signed [10:0] x11_re, x11_im, w11_re, w11_im, p11_re, p11_im;
  cmul_twiddle #(.W(11), .TW(11)) dut11 (
    .clk, .rst_n, .en, .x_re(x11_re), .x_im(x11_im), .w_re(w11_re), .w_im(w11_im),
    .p_re(p11_re), .p_im(p11_im));

  function automatic int model(longint v, int w, int tw);
    longint s;
    s = v >>> (tw - 2);
    if (s > (1 << (w - 1)) - 1) return (1 << (w - 1)) - 1;
    if (s < -(1 << (w - 1))) return -(1 << (w - 1));
    return int'(s);
  endfunction

  task automatic cmp(string tag, int got, int want);
    checks++;
    if (got != want) begin
      failures++;
      if (failures < 10) $display("%s: got %0d want %0d", tag, got, want);
    end
  endtask

  int er, ei, er11, ei11, oldr, oldi;

  initial begin
    en = 0; {x_re, x_im, w_re, w_im} = '0; {x11_re, x11_im, w11_re, w11_im} = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 4000; n++) begin
      @(negedge clk);
      en = ($urandom_range(0, 7) != 0);
      x_re = 12'($urandom); x_im = 12'($urandom);
      if ($urandom_range(0, 9) == 0) begin
        w_re = 12'($urandom); w_im = 12'($urandom);          // up to about +-2.0: may saturate
      end else begin
        w_re = 12'($signed(11'($urandom_range(0, 2048)) - 11'sd1024));
        w_im = 12'($signed(11'($urandom_range(0, 2048)) - 11'sd1024));
      end
      x11_re = x_re[11:1]; x11_im = x_im[11:1];
      w11_re = 11'(w_re >>> 1); w11_im = 11'(w_im >>> 1);
      er   = model(longint'(x_re) * w_re - longint'(x_im) * w_im, 12, 12);
      ei   = model(longint'(x_re) * w_im + longint'(x_im) * w_re, 12, 12);
      er11 = model(longint'(x11_re) * w11_re - longint'(x11_im) * w11_im, 11, 11);
      ei11 = model(longint'(x11_re) * w11_im + longint'(x11_im) * w11_re, 11, 11);
      oldr = p_re; oldi = p_im;
      @(posedge clk); #1;
      if (!en) begin
        n_hold++;
        cmp("hold re", p_re, oldr); cmp("hold im", p_im, oldi);
      end else begin
        if (er == 2047 || er == -2048 || ei == 2047 || ei == -2048) n_sat++;
        cmp("p_re", p_re, er); cmp("p_im", p_im, ei);
        cmp("p11_re", p11_re, er11); cmp("p11_im", p11_im, ei11);
      end
    end
    checks += 2;
    if (n_sat == 0)  begin failures++; $display("saturation never happened"); end
    if (n_hold == 0) begin failures++; $display("hold never happened"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
