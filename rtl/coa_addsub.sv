// Copy-of-operand approximate adder/subtractor.
//
// One operand, U, arrives unshifted; the other, B, is shifted left by S bits
// inside the block (a shift is free wiring). Because the shifted operand's
// low S bits are zero, an exact adder needs no full adders there. The
// approximate version goes K bits further: the low S+K bits of the result are
// copied from U (from ~U when U is the subtrahend), and a W-S-K bit
// ripple-carry adder sums the upper bits with carry-in equal to the highest
// copied bit. A subtraction is made by inverting the subtrahend without the
// +1 carry-in, since the approximate adder has no carry input of its own.
// The resulting error matches the closed-form models
//   add:          e  =  U[S+K-1]*2^(S+K) - sum_{i=S}^{S+K-1} Bs_i*2^i
//   U - (B<<S):   e  = -2^S + U[S+K-1]*2^(S+K) - sum_{i=S}^{S+K-1} ~Bs_i*2^i
//   (B<<S) - U:   e  = -1 + ~U[S+K-1]*2^(S+K) - sum_{i=S}^{S+K-1} Bs_i*2^i
// where Bs = B << S. For OP_B_SUB the error model of the design assumes S>0;
// with S=0 the same hardware is used.
//
// K = 0 selects an exact adder/subtractor (a group with K = 0 is exact);
// that choice, and building the exact subtractor with a +1 carry-in, are
// this implementation's reading of the method.
//
// Purely combinational; operands and result are W-bit two's complement and
// wrap modulo 2**W. Requires S + K < W.
module coa_addsub
  import fir_approx_pkg::*;
#(
  parameter int unsigned W  = OUT_W,  // operand and result width
  parameter int unsigned S  = 0,      // left shift applied to operand B
  parameter int unsigned K  = 0,      // number of approximate (copied) bits
  parameter addsub_op_e  OP = OP_ADD  // operation
) (
  input  logic [W-1:0] u,   // unshifted operand (its bits are copied)
  input  logic [W-1:0] b,   // operand to be shifted left by S
  output logic [W-1:0] y    // result
);

  localparam int unsigned L = S + K;  // number of low result bits copied

  if (L >= W) begin : g_bad
    $error("coa_addsub: S + K must be below W");
  end

  logic [W-1:0] bs;
  assign bs = b << S;

  if (K == 0) begin : g_exact
    always_comb begin
      unique case (OP)
        OP_ADD:   y = u + bs;
        OP_U_SUB: y = u - bs;
        default:  y = bs - u;
      endcase
    end
  end else begin : g_approx
    // Copied part: U, or its inverse when U is the subtrahend.
    logic [L-1:0]   lo;
    logic           cin;
    logic [W-L-1:0] hi_a, hi_b;  // operands of the upper ripple-carry adder
    always_comb begin
      unique case (OP)
        OP_ADD: begin
          lo   = u[L-1:0];
          hi_a = u[W-1:L];
          hi_b = bs[W-1:L];
        end
        OP_U_SUB: begin
          lo   = u[L-1:0];
          hi_a = u[W-1:L];
          hi_b = ~bs[W-1:L];
        end
        default: begin
          lo   = ~u[L-1:0];
          hi_a = bs[W-1:L];
          hi_b = ~u[W-1:L];
        end
      endcase
      cin = lo[L-1];
      y   = {hi_a + hi_b + (W-L)'(cin), lo};
    end
  end

endmodule
