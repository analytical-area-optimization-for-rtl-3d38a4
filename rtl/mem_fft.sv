// Memory-based radix-2 FFT with a fixed wordlength and static per-stage scaling.
//
// One radix-2 decimation-in-frequency butterfly and one twiddle multiplier work in place on a
// single N-word memory, one butterfly per cycle, log2(N) passes of N/2 butterflies. The memory
// word is 2W bits (re, im) and never widens, so every stage must bring its W+1-bit sums back to
// W bits; SCALE fixes how, stage by stage (MSB = stage 1, the document's configuration ID):
// 1 = halve (one more integer bit, LSB truncated), 0 = keep the format and saturate. All-ones
// is the classic halve-every-stage scheme. The default, 1111010101010, keeps the format at
// stages 5, 7, 9, 11 and 13; it was chosen offline for uniform 11-bit input (the same greedy
// search picks the document's configuration 245 for 256 points) and raises the SQNR from
// about 18 dB (all ones) to about 35 dB. With another N, pass a SCALE of matching width.
// The twiddle product is truncated and saturated back to W bits.
//
// Sequence: LOAD accepts N samples in natural order (in_valid/in_ready), RUN computes for
// log2(N)*(N/2 + 2) cycles (two idle cycles between passes let the last results of a pass reach
// memory before the next pass reads them), UNLOAD streams the N results in natural frequency
// order (bit-reversed reads), one per cycle with out_valid and out_idx, then LOAD again.
// The document reports an 8192-point, 11-bit radix-2 FFT processor built with this scaling
// (180k bits of storage, which equals this memory: 8192 x 22 bits) but not its insides: the
// single-butterfly in-place organisation, the memory with two reads and two writes per cycle,
// the pipeline and the handshake are this design's choices.
module mem_fft #(
  parameter int N  = 8192,
  parameter int W  = 11,
  parameter int TW = 11,
  parameter logic [$clog2(N)-1:0] SCALE = 13'b1111010101010
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  output logic                 in_ready,
  input  logic signed [W-1:0]  in_re,
  input  logic signed [W-1:0]  in_im,
  output logic                 out_valid,
  output logic [$clog2(N)-1:0] out_idx,
  output logic signed [W-1:0]  out_re,
  output logic signed [W-1:0]  out_im
);
  localparam int S  = $clog2(N);
  localparam int SW = $clog2(S + 1);

  typedef enum logic [1:0] {LOAD, RUN, UNLOAD} state_e;

  state_e          state;
  logic [S-1:0]    cnt;        // load / unload index
  logic [S-1:0]    j;          // butterfly index in the pass (N/2 + 2 slots)
  logic [SW-1:0]   stage;      // 1..S
  logic [2*W-1:0]  mem [N];

  // ------------------------------------------------------------------ butterfly addressing
  logic            issue;
  logic [S-1:0]    bf_dist, addr_a, addr_b, jj;
  logic [S-2:0]    tw_k;       // twiddle exponent, always below N/2

  assign issue = (state == RUN) && (j < S'(N / 2));
  assign bf_dist  = S'(N >> stage);
  assign jj    = j & S'(N / 2 - 1);
  // insert a 0 at bit position log2(bf_dist): a = (jj / bf_dist) * 2 * bf_dist + jj % bf_dist
  assign addr_a = ((jj & ~(bf_dist - 1'b1)) << 1) | (jj & (bf_dist - 1'b1));
  assign addr_b = addr_a | bf_dist;
  assign tw_k   = (S-1)'((addr_a & (bf_dist - 1'b1)) << (stage - 1'b1));

  logic signed [TW-1:0] wr, wi, wr_q, wi_q;
  twiddle_rom #(.N(N), .DEPTH(N / 2), .TW(TW)) u_rom (.k(tw_k), .w_re(wr), .w_im(wi));

  logic signed [W-1:0] x_re, x_im, y_re, y_im, p_re, p_im, s_re, s_im;

  r2_butterfly #(.W(W)) u_bf (
    .clk, .rst_n, .en(1'b1),
    .neg_j(1'b0),
    .scale(SCALE[S - int'(stage)]),
    .a_re(mem[addr_a][2*W-1:W]), .a_im(mem[addr_a][W-1:0]),
    .b_re(mem[addr_b][2*W-1:W]), .b_im(mem[addr_b][W-1:0]),
    .x_re, .x_im, .y_re, .y_im
  );

  cmul_twiddle #(.W(W), .TW(TW)) u_mul (
    .clk, .rst_n, .en(1'b1),
    .x_re(y_re), .x_im(y_im), .w_re(wr_q), .w_im(wi_q), .p_re, .p_im
  );

  // pipeline tags: stage 1 = butterfly register, stage 2 = multiplier register
  logic         v1, v2;
  logic [S-1:0] a1, b1, a2, b2;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v1 <= 1'b0; v2 <= 1'b0;
      a1 <= '0; b1 <= '0; a2 <= '0; b2 <= '0;
      wr_q <= '0; wi_q <= '0;
      s_re <= '0; s_im <= '0;
    end else begin
      v1 <= issue;  a1 <= addr_a; b1 <= addr_b;
      v2 <= v1;     a2 <= a1;     b2 <= b1;
      wr_q <= wr;   wi_q <= wi;
      s_re <= x_re; s_im <= x_im;
    end
  end

  // ------------------------------------------------------------------ control and memory
  assign in_ready = (state == LOAD);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= LOAD;
      cnt       <= '0;
      j         <= '0;
      stage     <= SW'(1);
      out_valid <= 1'b0;
      out_idx   <= '0;
      out_re    <= '0;
      out_im    <= '0;
    end else begin
      out_valid <= 1'b0;
      case (state)
        LOAD: if (in_valid) begin
          cnt <= cnt + 1'b1;
          if (cnt == S'(N - 1)) begin
            state <= RUN;
            j     <= '0;
            stage <= SW'(1);
          end
        end
        RUN: begin
          if (j == S'(N / 2 + 1)) begin
            j <= '0;
            if (stage == SW'(S)) begin
              state <= UNLOAD;
              cnt   <= '0;
            end else begin
              stage <= stage + 1'b1;
            end
          end else begin
            j <= j + 1'b1;
          end
        end
        default: begin   // UNLOAD
          out_valid <= 1'b1;
          out_idx   <= cnt;
          out_re    <= mem[fft_pkg::bitrev(int'(cnt), S)][2*W-1:W];
          out_im    <= mem[fft_pkg::bitrev(int'(cnt), S)][W-1:0];
          cnt       <= cnt + 1'b1;
          if (cnt == S'(N - 1)) state <= LOAD;
        end
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (state == LOAD && in_valid) mem[cnt] <= {in_re, in_im};
    if (v2) begin
      mem[a2] <= {s_re, s_im};
      mem[b2] <= {p_re, p_im};
    end
  end
endmodule
