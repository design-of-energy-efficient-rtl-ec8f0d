// prefix_adder: W-bit two-operand adder with a Kogge-Stone parallel-prefix
// carry network.
//
// Bit generate g = x & y and propagate p = x ^ y are combined in ceil(log2 W)
// levels; level d merges each (G, P) pair with the one 2^d positions below
// (G = G_hi | P_hi & G_lo, P = P_hi & P_lo). The carry into bit i is the
// group generate of bits i-1..0, and s = p ^ carries. No carry in; the carry
// out is dropped, so s = x + y mod 2^W. The published scheme names a prefix adder for
// the final addition without saying which one; Kogge-Stone is this design's
// choice. Purely combinational.
module prefix_adder #(
  parameter int W = 32  // operand and sum width
) (
  input  logic [W-1:0] x,
  input  logic [W-1:0] y,
  output logic [W-1:0] s
);
  localparam int L = $clog2(W);

  logic [W-1:0] gen [L+1];
  logic [W-1:0] prp [L+1];

  assign gen[0] = x & y;
  assign prp[0] = x ^ y;

  for (genvar d = 0; d < L; d++) begin : g_level
    localparam int D = 1 << d;
    for (genvar i = 0; i < W; i++) begin : g_bit
      if (i >= D) begin : g_merge
        assign gen[d+1][i] = gen[d][i] | (prp[d][i] & gen[d][i-D]);
        assign prp[d+1][i] = prp[d][i] & prp[d][i-D];
      end else begin : g_keep
        assign gen[d+1][i] = gen[d][i];
        assign prp[d+1][i] = prp[d][i];
      end
    end
  end

  assign s = prp[0] ^ {gen[L][W-2:0], 1'b0};
endmodule
