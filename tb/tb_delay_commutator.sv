// Testbench of delay_commutator for D = 4 (default) and D = 1 with random stalls. Two lanes
// carry tagged words in windows of 2D enabled cycles; swap is high in the second half of each
// window. After the pipeline fills, the unit must pair element i with element i + D of the
// same lane: during the second half of window w it outputs (B[w][i], B[w][i+D]) and during the
// first half of window w+1 it outputs (A[w][i], A[w][i+D]) on (first_o, second_o).
module tb_delay_commutator;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0, stalls = 0;

  logic        en, swap4, swap1;
  logic [23:0] a4, b4, f4, s4, a1, b1, f1, s1;

  delay_commutator dut (.clk, .rst_n, .en, .swap(swap4), .a_in(a4), .b_in(b4),
                        .first_o(f4), .second_o(s4));
  delay_commutator #(.D(1)) dut1 (.clk, .rst_n, .en, .swap(swap1), .a_in(a1), .b_in(b1),
                                  .first_o(f1), .second_o(s1));

  // tag = {lane (1 = B), window, index within window}
  function automatic logic [23:0] tag(bit lane, int w, int i);
    return {1'b0, lane, 14'(w), 8'(i)};
  endfunction

  task automatic cmp(string tag_s, int t, logic [23:0] got, logic [23:0] want);
    checks++;
    if (got != want) begin
      failures++;
      if (failures < 10) $display("%s t=%0d: got %h want %h", tag_s, t, got, want);
    end
  endtask

  task automatic drive(int d, int t, output logic sw, output logic [23:0] a, output logic [23:0] b);
    int w, i;
    w  = t / (2 * d);
    i  = t % (2 * d);
    sw = (i >= d);
    a  = tag(0, w, i);
    b  = tag(1, w, i);
  endtask

  task automatic check(string nm, int d, int t, logic [23:0] f, logic [23:0] s);
    int w, i;
    w = t / (2 * d);
    i = t % (2 * d);
    if (t < 2 * d) return;           // pipeline still filling
    if (i >= d) begin
      cmp({nm, " first"},  t, f, tag(1, w, i - d));
      cmp({nm, " second"}, t, s, tag(1, w, i));
    end else begin
      cmp({nm, " first"},  t, f, tag(0, w - 1, i));
      cmp({nm, " second"}, t, s, tag(0, w - 1, i + d));
    end
  endtask

  int t;

  initial begin
    en = 0; swap4 = 0; swap1 = 0; {a4, b4, a1, b1} = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    t = 0;
    while (t < 400) begin
      @(negedge clk);
      if ($urandom_range(0, 4) == 0) begin
        en = 0; stalls++;
        // change the inputs during a stall: they must be ignored
        a4 = 24'($urandom); b4 = 24'($urandom); a1 = 24'($urandom); b1 = 24'($urandom);
      end else begin
        en = 1;
        drive(4, t, swap4, a4, b4);
        drive(1, t, swap1, a1, b1);
        // outputs are combinational on the current slot
        #1;
        check("D=4", 4, t, f4, s4);
        check("D=1", 1, t, f1, s1);
        t++;
      end
    end
    checks++;
    if (stalls == 0) begin failures++; $display("no stall happened"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
