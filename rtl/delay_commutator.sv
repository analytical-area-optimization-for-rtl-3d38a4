// Delay commutator of one lane pair in the MDC part of the FFT (the FIFOs and switch of the
// document's data reordering stage).
//
// Structure: delay D on lane A, a 2x2 switch, delay D on the lower switch output. Each lane
// carries back-to-back segments of 2D samples that must be butterflied at distance D. If a
// segment S on lane A and S' on lane B start in the same cycle T (swap = 0 during
// [T, T+D), 1 during [T+D, T+2D), and so on with period 2D), the outputs carry
//   cycles [T+D,  T+2D): first = S'[x], second = S'[x+D]
//   cycles [T+2D, T+3D): first = S[x],  second = S[x+D]
// i.e. both butterfly partners of lane B's segment, then those of lane A's. The two delays hold
// 2D words in all. D >= 1. Shift-register FIFOs advance only when en is high. The switch state
// comes from the FFT's controller.
module delay_commutator #(
  parameter int D  = 4,
  parameter int DW = 24
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          en,
  input  logic          swap,
  input  logic [DW-1:0] a_in,
  input  logic [DW-1:0] b_in,
  output logic [DW-1:0] first_o,
  output logic [DW-1:0] second_o
);
  logic [DW-1:0] fifo_a [D];
  logic [DW-1:0] fifo_l [D];
  logic [DW-1:0] u, v, sw_up, sw_lo;

  assign u = fifo_a[D-1];
  assign v = b_in;
  assign sw_up = swap ? v : u;
  assign sw_lo = swap ? u : v;
  assign second_o = sw_up;
  assign first_o  = fifo_l[D-1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < D; i++) begin
        fifo_a[i] <= '0;
        fifo_l[i] <= '0;
      end
    end else if (en) begin
      fifo_a[0] <= a_in;
      fifo_l[0] <= sw_lo;
      for (int i = 1; i < D; i++) begin
        fifo_a[i] <= fifo_a[i-1];
        fifo_l[i] <= fifo_l[i-1];
      end
    end
  end
endmodule
