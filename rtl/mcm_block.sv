// Multiple-constant multiplication (MCM) block of the example 10-tap filter.
//
// Computes h_i * x for the coefficients -22, -13, 60, 193, 302, 302, 193,
// 60, -13, -22 with six adders/subtractors, free shifts and two exact
// negations (graph in fir_approx_pkg):
//   15x  = (x<<4) - x          depth 1
//   17x  = x + (x<<4)          depth 1
//   11x  = 15x - (x<<2)        depth 2
//   13x  = 15x - (x<<1)        depth 2
//   151x = 15x + (17x<<3)      depth 2
//   193x = (13x<<4) - 15x      depth 3
//   outputs: -22x = -(11x<<1), -13x = -(13x), 60x = 15x<<2, 193x, 302x = 151x<<1
// Taps i and 9-i share a product.
//
// Logic-level approximation: each adder is a copy-of-operand adder
// (coa_addsub) whose number of approximate bits is set per depth group
// (K_D1, K_D2, K_D3). The unshifted operand is the copied one. The negations
// stay exact.
//
// Architectural-level approximation: REMOVE bit k-1 deletes adder node k
// (bit 0 = 15x, 1 = 17x, 2 = 11x, 3 = 13x, 4 = 151x, 5 = 193x). The node is
// rewired to a shallower remaining adder or the input, shifted left; the
// choice is made at elaboration by fir_approx_pkg::rewire(), which picks the
// value closest to the one the removed adder computed. REMOVE = 6'b100001
// removes 15x (becomes x<<4 = 16x) and 193x (becomes 12x<<4 = 192x), with a
// summed output error of 20 for x = 1. The tie-breaking order of rewire() is
// this implementation's choice.
//
// In the exact configuration an assertion compares every product with
// h_i * x.
//
// Purely combinational. Input x is a COEF_W-bit signed sample, sign-extended
// to OUT_W bits; outputs p[i] = h_i * x modulo 2**OUT_W (approximately,
// when approximation is enabled).
module mcm_block
  import fir_approx_pkg::*;
#(
  parameter int unsigned          K_D1   = 0,   // approximate bits, depth-1 adders
  parameter int unsigned          K_D2   = 0,   // approximate bits, depth-2 adders
  parameter int unsigned          K_D3   = 0,   // approximate bits, depth-3 adder
  parameter logic [N_ADDERS-1:0]  REMOVE = '0   // adders removed and rewired
) (
  input  logic signed [COEF_W-1:0] x,
  output word_t                    p [N_TAPS]
);

  localparam int unsigned K_BY_DEPTH [4] = '{0, K_D1, K_D2, K_D3};

  // Node values: nd[0] = x, nd[1..6] = adder outputs.
  word_t nd [N_NODES];
  assign nd[0] = word_t'(x);

  for (genvar n = 1; n < N_NODES; n++) begin : g_node
    if (REMOVE[n-1]) begin : g_removed
      localparam int unsigned SRC = rewire(REMOVE, n, 1'b1);
      localparam int unsigned SH  = rewire(REMOVE, n, 1'b0);
      assign nd[n] = nd[SRC] <<< SH;
    end else begin : g_adder
      coa_addsub #(
        .W(OUT_W), .S(NODE_SH[n]), .K(K_BY_DEPTH[NODE_DEPTH[n]]), .OP(NODE_OP[n])
      ) u_add (
        .u(nd[NODE_U[n]]), .b(nd[NODE_B[n]]), .y(nd[n])
      );
    end
  end

  // Output stage: exact negations and free shifts.
  word_t m22, m13, c60, c193, c302;
  assign m22  = -(nd[3] <<< 1);
  assign m13  = -nd[4];
  assign c60  = nd[1] <<< 2;
  assign c193 = nd[6];
  assign c302 = nd[5] <<< 1;

  assign p[0] = m22;
  assign p[1] = m13;
  assign p[2] = c60;
  assign p[3] = c193;
  assign p[4] = c302;
  assign p[5] = c302;
  assign p[6] = c193;
  assign p[7] = c60;
  assign p[8] = m13;
  assign p[9] = m22;

  // With no approximation every product must equal h_i * x exactly.
  if (K_D1 == 0 && K_D2 == 0 && K_D3 == 0 && REMOVE == '0) begin : g_exact_chk
    always_comb begin
      for (int i = 0; i < N_TAPS; i++)
        assert (p[i] == word_t'(COEFS[i] * int'(x)))
          else $error("mcm_block: product %0d is %0d, expected %0d", i, p[i], COEFS[i] * int'(x));
    end
  end

endmodule
