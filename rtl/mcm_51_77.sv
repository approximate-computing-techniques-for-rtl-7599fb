// Shift-adds multiplication of one input by the two constants 51 and 77.
//
// Two solutions of the multiple-constant multiplication problem are built
// and selected by GRAPH_BASED:
//   common-subexpression form (4 operations):
//     17x = (x<<4) + x,  51x = (17x<<2) - 17x,  81x = 17x + (x<<6),
//     77x = 81x - (x<<2)
//   graph-based form (3 operations):
//     3x = x + (x<<1),  51x = 3x + (3x<<4),  77x = (x<<7) - 51x
// Both use exact adders and only shifts otherwise; they differ in the adder
// count (4 against 3), not in the result. Combinational; x is W-bit signed
// and the outputs are W+7 bits, wide enough for 77x without overflow.
module mcm_51_77 #(
  parameter int unsigned W           = 8,    // input width
  parameter bit          GRAPH_BASED = 1'b1  // 1: graph-based, 0: CSE form
) (
  input  logic signed [W-1:0]   x,
  output logic signed [W+6:0]   y51,
  output logic signed [W+6:0]   y77
);

  localparam int unsigned OW = W + 7;
  logic signed [OW-1:0] xe;
  assign xe = OW'(x);

  if (GRAPH_BASED) begin : g_gb
    logic signed [OW-1:0] t3;
    assign t3  = xe + (xe <<< 1);
    assign y51 = t3 + (t3 <<< 4);
    assign y77 = (xe <<< 7) - y51;
  end else begin : g_cse
    logic signed [OW-1:0] t17, t81;
    assign t17 = (xe <<< 4) + xe;
    assign y51 = (t17 <<< 2) - t17;
    assign t81 = t17 + (xe <<< 6);
    assign y77 = t81 - (xe <<< 2);
  end

endmodule
