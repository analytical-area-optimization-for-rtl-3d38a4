// Interconnection permutation matrix I_n of the R2^2EMDC FFT (document Eq. (8)).
//
// Input port p drives output port q, with
//   q = p + (p mod 2)*(n/2 - 1)              for p <  n/2
//   q = p + (p mod 2)*(n/2 - 1) - (n/2 - 1)  for p >= n/2.
// Ports whose bit 0 equals their top bit stay put; port 2i+1 of the lower half and port n/2+2i
// of the upper half trade places. Seen on the port numbers, I_n swaps bit 0 with bit log2(n)-1,
// which is how the FFT uses it: it brings the two rows a butterfly needs next to each other.
// GROUPS copies of I_n sit side by side over GROUPS*n rows. Pure wiring, no logic, no delay.
module ipm #(
  parameter int n      = 4,
  parameter int GROUPS = 1,
  parameter int DW     = 24
) (
  input  logic [DW-1:0] din  [n*GROUPS],
  output logic [DW-1:0] dout [n*GROUPS]
);
  function automatic int dest(int p);
    if (p < n / 2) return p + (p % 2) * (n / 2 - 1);
    return p + (p % 2) * (n / 2 - 1) - (n / 2 - 1);
  endfunction

  for (genvar g = 0; g < GROUPS; g++) begin : g_grp
    for (genvar p = 0; p < n; p++) begin : g_port
      assign dout[g * n + dest(p)] = din[g * n + p];
    end
  end
endmodule
