// Testbench of mcm_block. Default configuration: every 8-bit input times {19, 21, 31, 121, 125},
// checked against ordinary multiplication, plus the adder bit count. A second netlist exercises
// the subtract and reverse-subtract adders and an even constant made by an output shift:
// {7, 9, 23, 41, 25, 50}.
module tb_mcm_block;
  import mcm_pkg::*;
  int checks = 0, failures = 0;

  logic signed [7:0]  x;
  logic signed [15:0] y  [5];
  logic signed [15:0] y2 [6];

  localparam int C1 [5] = '{19, 21, 31, 121, 125};
  localparam int C2 [6] = '{7, 9, 23, 41, 25, 50};

  mcm_block dut (.x(x), .y(y));

  mcm_block #(
    .NA(5), .NOUT(6),
    .NET('{
      1: mcm_node_t'{a: 5'd0, b: 5'd0, sh: 5'd3, op: OP_RSUB},  //  7 = 1<<3 - 1
      2: mcm_node_t'{a: 5'd0, b: 5'd0, sh: 5'd3, op: OP_ADD},   //  9 = 1 + 1<<3
      3: mcm_node_t'{a: 5'd1, b: 5'd0, sh: 5'd4, op: OP_ADD},   // 23 = 7 + 1<<4
      4: mcm_node_t'{a: 5'd2, b: 5'd0, sh: 5'd5, op: OP_ADD},   // 41 = 9 + 1<<5
      5: mcm_node_t'{a: 5'd4, b: 5'd0, sh: 5'd4, op: OP_SUB},   // 25 = 41 - 1<<4
      default: mcm_node_t'{a: 5'd0, b: 5'd0, sh: 5'd0, op: OP_ADD}
    }),
    .OUT_NODE('{0: 1, 1: 2, 2: 3, 3: 4, 4: 5, 5: 5, default: 0}),
    .OUT_SHIFT('{5: 1, default: 0})
  ) dut2 (.x(x), .y(y2));

  initial begin
    checks++;
    // by hand, max(m, n+l) - l per adder: 3:8 5:8 19:8 21:8 31:11 25:11 125:13 121:10
    if (dut.ADDER_BITS != 65) begin
      failures++;
      $display("adder bits %0d, expected 65", dut.ADDER_BITS);
    end
    for (int i = -128; i < 128; i++) begin
      x = 8'(i);
      #1;
      for (int k = 0; k < 5; k++) begin
        checks++;
        if (int'(y[k]) != C1[k] * i) begin
          failures++;
          if (failures < 10) $display("x=%0d c=%0d: got %0d", i, C1[k], y[k]);
        end
      end
      for (int k = 0; k < 6; k++) begin
        checks++;
        if (int'(y2[k]) != C2[k] * i) begin
          failures++;
          if (failures < 10) $display("x=%0d c=%0d: got %0d", i, C2[k], y2[k]);
        end
      end
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
