// Approximate shift-adds FIR filter: the example 10-tap low-pass filter.
//
// A transposed-form FIR filter whose constant multiplications are done by a
// shared shift-adds graph (mcm_block) and whose products are accumulated by a
// register-add chain (register_add). Two approximation methods trade output
// accuracy for adders:
//   - architectural level: the REMOVE mask removes adders from the MCM graph
//     and rewires their nodes to the closest shifted lower-depth node;
//   - logic level: each adder group uses copy-of-operand adders with K
//     approximate bits: K_RA for the register-add adders, K_D1..K_D3 for the
//     MCM adders of depth 1..3.
// With every parameter at its default the filter is exact.
//
// Beside the filter, and unconnected to it, stands the small 51x/77x MCM
// example (mcm_51_77) with its own ports.
//
// Interface: x_in is a 10-bit signed sample, accepted on a rising clock edge
// while x_valid is high; y_out is the 20-bit two's-complement output for that
// sample, valid in the same cycle (y_valid = x_valid). rst_n is synchronous,
// active low.
module approx_fir_top
  import fir_approx_pkg::*;
#(
  parameter int unsigned K_RA        = 0,
  parameter int unsigned K_D1        = 0,
  parameter int unsigned K_D2        = 0,
  parameter int unsigned K_D3        = 0,
  parameter logic [N_ADDERS-1:0] REMOVE = '0,  // MCM adders removed (see mcm_block)
  parameter int unsigned EX_W        = 8,    // width of the 51x/77x example input
  parameter bit          EX_GB       = 1'b1  // 51x/77x example: graph-based form
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     x_valid,
  input  logic signed [COEF_W-1:0] x_in,
  output logic signed [OUT_W-1:0]  y_out,
  output logic                     y_valid,
  // 51x / 77x MCM example
  input  logic signed [EX_W-1:0]   ex_x,
  output logic signed [EX_W+6:0]   ex_y51,
  output logic signed [EX_W+6:0]   ex_y77
);

  word_t prod [N_TAPS];

  mcm_block #(
    .K_D1(K_D1), .K_D2(K_D2), .K_D3(K_D3),
    .REMOVE(REMOVE)
  ) u_mcm (
    .x(x_in), .p(prod)
  );

  register_add #(.N(N_TAPS), .K_RA(K_RA)) u_ra (
    .clk(clk), .rst_n(rst_n), .in_valid(x_valid),
    .p(prod), .y(y_out), .out_valid(y_valid)
  );

  mcm_51_77 #(.W(EX_W), .GRAPH_BASED(EX_GB)) u_ex (
    .x(ex_x), .y51(ex_y51), .y77(ex_y77)
  );

endmodule
