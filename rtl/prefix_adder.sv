// prefix_adder: W-bit carry-lookahead adder with a parallel-prefix carry
// network, s = a + b + cin (mod 2^W) and cout the carry out of bit W-1.
//
// Bit generate/propagate pairs (g = a&b, p = a^b) are combined by the operator
// (G,P)[hi] o (G,P)[lo] = (G_hi | P_hi & G_lo, P_hi & P_lo). cin is folded into
// the generate of bit 0, so after the network G[i] is the carry into bit i+1.
// TOPO picks the network, as in the adder comparison the design is based on:
//   KOGGE_STONE  log2(W) levels, every bit combined at every level (default);
//   SKLANSKY     log2(W) levels, divide and conquer with large fan-out;
//   BRENT_KUNG   2*log2(W)-1 levels, an up-sweep and a down-sweep tree.
// The published design names the three networks; their wiring is the textbook one.
// Purely combinational.
module prefix_adder
  import sos_pkg::*;
#(
  parameter int unsigned W    = 24,
  parameter adder_topo_e TOPO = KOGGE_STONE
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] s,
  output logic         cout
);
  localparam int unsigned L    = clog2_min1(W);
  localparam int unsigned NLEV = 2 * L;

  // Index of the bit that bit i combines with at level k, or -1 to pass.
  function automatic int src(input int unsigned k, input int unsigned i);
    int unsigned t;
    case (TOPO)
      KOGGE_STONE:
        if (k < L && i >= (1 << k)) return int'(i - (1 << k));
      SKLANSKY:
        if (k < L && ((i >> k) & 1) == 1) return int'(((i >> k) << k) - 1);
      BRENT_KUNG:
        if (k < L) begin
          // up-sweep: bit i joins the block ending 2^k below it
          if (((i + 1) % (1 << (k + 1))) == 0) return int'(i - (1 << k));
        end else if (k < 2 * L - 1) begin
          // down-sweep, level t counting down to 0
          t = 2 * L - 2 - k;
          if (((i + 1) % (1 << (t + 1))) == (1 << t) && i >= (1 << (t + 1)))
            return int'(i - (1 << t));
        end
      default: ;
    endcase
    return -1;
  endfunction

  logic [NLEV:0][W-1:0] gg, pp;
  logic [W-1:0]         p0;

  assign p0    = a ^ b;
  assign gg[0] = {a[W-1:1] & b[W-1:1], (a[0] & b[0]) | (p0[0] & cin)};
  assign pp[0] = p0;

  for (genvar k = 0; k < NLEV; k++) begin : g_lvl
    for (genvar i = 0; i < W; i++) begin : g_bit
      localparam int J = src(k, i);
      if (J >= 0) begin : g_op
        assign gg[k+1][i] = gg[k][i] | (pp[k][i] & gg[k][J]);
        assign pp[k+1][i] = pp[k][i] & pp[k][J];
      end else begin : g_pass
        assign gg[k+1][i] = gg[k][i];
        assign pp[k+1][i] = pp[k][i];
      end
    end
  end

  assign s    = p0 ^ {gg[NLEV][W-2:0], cin};
  assign cout = gg[NLEV][W-1];
endmodule
