// Testbench of r2_butterfly (W = 12 and W = 8): random operands, random -j selection, random
// halve/saturate choice and random enable. Each registered result is compared with an
// integer model: x = a + b', y = a - b', b' = -j*b when neg_j, then floor-halved or saturated.
// Each mechanism (-j, halving, positive and negative saturation, hold when en = 0) must occur.
module tb_r2_butterfly;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_negj = 0, n_half = 0, n_satp = 0, n_satn = 0, n_hold = 0;

  function automatic int fit(int v, bit sc, int w);
    if (sc) return v >>> 1;
    if (v > (1 << (w - 1)) - 1) return (1 << (w - 1)) - 1;
    if (v < -(1 << (w - 1))) return -(1 << (w - 1));
    return v;
  endfunction

  // ---- W = 12 ----
  logic en, neg_j, scale;
  logic signed [11:0] a_re, a_im, b_re, b_im, x_re, x_im, y_re, y_im;
  r2_butterfly dut (.*);

  // ---- W = 8 ----
  logic signed [7:0] a8_re, a8_im, b8_re, b8_im, x8_re, x8_im, y8_re, y8_im;
  r2_butterfly #(.W(8)) dut8 (
    .clk, .rst_n, .en, .neg_j, .scale,
    .a_re(a8_re), .a_im(a8_im), .b_re(b8_re), .b_im(b8_im),
    .x_re(x8_re), .x_im(x8_im), .y_re(y8_re), .y_im(y8_im));

  task automatic expect_bf(int ar, int ai, int br, int bi, bit nj, bit sc, int w,
                           output int xr, output int xi, output int yr, output int yi);
    int pr, pi;
    pr = nj ? bi : br;
    pi = nj ? -br : bi;
    xr = fit(ar + pr, sc, w);  xi = fit(ai + pi, sc, w);
    yr = fit(ar - pr, sc, w);  yi = fit(ai - pi, sc, w);
  endtask

  int e [4], e8 [4], old [4];

  task automatic cmp(string tag, int got, int want);
    checks++;
    if (got != want) begin
      failures++;
      if (failures < 10) $display("%s: got %0d want %0d", tag, got, want);
    end
  endtask

  initial begin
    en = 0; neg_j = 0; scale = 0;
    {a_re, a_im, b_re, b_im} = '0; {a8_re, a8_im, b8_re, b8_im} = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 4000; n++) begin
      @(negedge clk);
      en    = ($urandom_range(0, 7) != 0);
      neg_j = 1'($urandom);
      scale = 1'($urandom);
      // mostly full-range values, sometimes large same-sign values to force saturation
      if ($urandom_range(0, 3) == 0) begin
        a_re = 12'sd2047 - 12'($urandom_range(0, 100)); b_re = a_re; a_im = -a_re; b_im = a_im;
      end else begin
        a_re = 12'($urandom); a_im = 12'($urandom); b_re = 12'($urandom); b_im = 12'($urandom);
      end
      {a8_re, a8_im, b8_re, b8_im} = {a_re[11:4], a_im[11:4], b_re[11:4], b_im[11:4]};
      old = '{int'(x_re), int'(x_im), int'(y_re), int'(y_im)};
      expect_bf(a_re, a_im, b_re, b_im, neg_j, scale, 12, e[0], e[1], e[2], e[3]);
      expect_bf(a8_re, a8_im, b8_re, b8_im, neg_j, scale, 8, e8[0], e8[1], e8[2], e8[3]);
      @(posedge clk); #1;
      if (!en) begin
        n_hold++;
        e = old;
      end else begin
        if (neg_j) n_negj++;
        if (scale) n_half++;
        foreach (e[i]) begin
          if (!scale && e[i] == 2047) n_satp++;
          if (!scale && e[i] == -2048) n_satn++;
        end
        cmp("x8_re", x8_re, e8[0]); cmp("x8_im", x8_im, e8[1]);
        cmp("y8_re", y8_re, e8[2]); cmp("y8_im", y8_im, e8[3]);
      end
      cmp("x_re", x_re, e[0]); cmp("x_im", x_im, e[1]);
      cmp("y_re", y_re, e[2]); cmp("y_im", y_im, e[3]);
    end
    checks += 5;
    if (n_negj == 0 || n_half == 0 || n_satp == 0 || n_satn == 0 || n_hold == 0) begin
      failures++;
      $display("a mechanism never happened: negj=%0d half=%0d satp=%0d satn=%0d hold=%0d",
               n_negj, n_half, n_satp, n_satn, n_hold);
    end
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
