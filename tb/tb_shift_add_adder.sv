// Testbench of shift_add_adder: exhaustive over all 8-bit p and q for the three operations and
// several shifts (including a shift wider than p), compared with plain integer arithmetic.
module tb_shift_add_adder;
  import mcm_pkg::*;
  int checks = 0, failures = 0;

  logic signed [7:0]  p, q;
  logic signed [10:0] r_add2;   // p + (q << 2), 8+2+1 bits
  logic signed [9:0]  r_sub1;   // p - (q << 1)
  logic signed [13:0] r_rsub5;  // (q << 5) - p
  logic signed [17:0] r_add9;   // p + (q << 9), shift wider than p
  logic signed [7:0]  p6;
  logic signed [9:0]  r_add0;   // p + q, no shift

  shift_add_adder #(.PW(8), .QW(8), .L(2), .RW(11), .OP(OP_ADD))  u_add2  (.p(p), .q(q), .r(r_add2));
  shift_add_adder #(.PW(8), .QW(8), .L(1), .RW(10), .OP(OP_SUB))  u_sub1  (.p(p), .q(q), .r(r_sub1));
  shift_add_adder #(.PW(8), .QW(8), .L(5), .RW(14), .OP(OP_RSUB)) u_rsub5 (.p(p), .q(q), .r(r_rsub5));
  shift_add_adder #(.PW(8), .QW(8), .L(9), .RW(18), .OP(OP_ADD))  u_add9  (.p(p), .q(q), .r(r_add9));
  shift_add_adder #(.PW(8), .QW(8), .L(0), .RW(10), .OP(OP_ADD))  u_add0  (.p(p), .q(q), .r(r_add0));

  task automatic chk(int got, int want, string what);
    checks++;
    if (got != want) begin
      failures++;
      if (failures < 10) $display("%s p=%0d q=%0d: got %0d want %0d", what, p, q, got, want);
    end
  endtask

  initial begin
    for (int i = -128; i < 128; i++) begin
      for (int j = -128; j < 128; j++) begin
        p = 8'(i); q = 8'(j);
        #1;
        chk(int'(r_add2),  i + j * 4,   "add<<2");
        chk(int'(r_sub1),  i - j * 2,   "sub<<1");
        chk(int'(r_rsub5), j * 32 - i,  "rsub<<5");
        chk(int'(r_add9),  i + j * 512, "add<<9");
        chk(int'(r_add0),  i + j,       "add<<0");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
