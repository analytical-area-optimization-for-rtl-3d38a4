// Testbench of ipm: for n = 2, 4, 8 and 16 (two groups each) random words are applied and
// each output is checked against the index permutation I_n of the document's Eq. (8), which
// exchanges the least and most significant bits of the port index inside each group of n.
module tb_ipm;
  int checks = 0, failures = 0;

  function automatic int swap_ends(int p, int n);
    int hb;
    hb = $clog2(n) - 1;
    if (hb == 0) return p;
    return (p & ~(1 | (1 << hb))) | ((p & 1) << hb) | (((p >> hb) & 1));
  endfunction

  logic [15:0] d2i [4],  d2o [4];
  logic [15:0] d4i [8],  d4o [8];
  logic [15:0] d8i [16], d8o [16];
  logic [15:0] d16i [32], d16o [32];
  logic [23:0] dfi [4], dfo [4];

  ipm #(.n(2),  .GROUPS(2), .DW(16)) u2  (.din(d2i),  .dout(d2o));
  ipm #(.n(4),  .GROUPS(2), .DW(16)) u4  (.din(d4i),  .dout(d4o));
  ipm #(.n(8),  .GROUPS(2), .DW(16)) u8  (.din(d8i),  .dout(d8o));
  ipm #(.n(16), .GROUPS(2), .DW(16)) u16 (.din(d16i), .dout(d16o));
  ipm dut (.din(dfi), .dout(dfo));

  task automatic cmp(int n, int p, logic [23:0] got, logic [23:0] want);
    checks++;
    if (got != want) begin
      failures++;
      if (failures < 10) $display("I_%0d port %0d: got %h want %h", n, p, got, want);
    end
  endtask

  initial begin
    for (int t = 0; t < 20; t++) begin
      foreach (d2i[i])  d2i[i]  = 16'($urandom);
      foreach (d4i[i])  d4i[i]  = 16'($urandom);
      foreach (d8i[i])  d8i[i]  = 16'($urandom);
      foreach (d16i[i]) d16i[i] = 16'($urandom);
      foreach (dfi[i])  dfi[i]  = 24'($urandom);
      #1;
      for (int g = 0; g < 2; g++) begin
        for (int p = 0; p < 2; p++)  cmp(2,  g*2 + p,  d2o[g*2 + swap_ends(p, 2)],    d2i[g*2 + p]);
        for (int p = 0; p < 4; p++)  cmp(4,  g*4 + p,  d4o[g*4 + swap_ends(p, 4)],    d4i[g*4 + p]);
        for (int p = 0; p < 8; p++)  cmp(8,  g*8 + p,  d8o[g*8 + swap_ends(p, 8)],    d8i[g*8 + p]);
        for (int p = 0; p < 16; p++) cmp(16, g*16 + p, d16o[g*16 + swap_ends(p, 16)], d16i[g*16 + p]);
      end
      // the document's I_4 example: ports 1 and 2 exchange, 0 and 3 stay
      cmp(4, 0, dfo[0], dfi[0]); cmp(4, 1, dfo[2], dfi[1]);
      cmp(4, 2, dfo[1], dfi[2]); cmp(4, 3, dfo[3], dfi[3]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
