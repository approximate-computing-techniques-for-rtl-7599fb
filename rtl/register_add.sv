// Register-add block of a transposed-form FIR filter.
//
// Takes the N products h_i * x[n] of the MCM block for the current sample and
// accumulates them through a chain of N-1 adders and N-1 registers:
//   r[N-2] <= p[N-1]
//   r[i]   <= p[i+1] + r[i+1]        for i = 0 .. N-3
//   y       = p[0]   + r[0]
// so that y[n] = sum_i h_i * x[n-i]. All N-1 adders form one adder group
// with K_RA approximate bits (K_RA = 0 is exact); in each adder the MCM
// product is the unshifted operand whose low bits are copied, which is this
// implementation's choice since neither operand is shifted here.
//
// Timing: the registers advance on a rising clock edge when in_valid is
// high; y is combinational from the current products and the registers, so
// out_valid = in_valid and the sample's output appears in the same cycle
// (zero latency, one sample per enabled cycle). Reset is synchronous and
// active-low and clears the registers (x[n-i] = 0 before the first sample).
module register_add
  import fir_approx_pkg::*;
#(
  parameter int unsigned N    = N_TAPS,  // number of taps
  parameter int unsigned K_RA = 0        // approximate bits of every adder
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  input  word_t p [N],
  output word_t y,
  output logic  out_valid
);

  word_t [N-2:0] r;  // pipeline registers
  word_t sum [N-1];  // adder outputs, sum[i] = p[i] + r[i]

  for (genvar i = 0; i < N - 1; i++) begin : g_add
    coa_addsub #(.W(OUT_W), .S(0), .K(K_RA), .OP(OP_ADD)) u_add (
      .u(p[i]), .b(r[i]), .y(sum[i])
    );
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      r <= '0;
    end else if (in_valid) begin
      for (int i = 0; i < N - 2; i++) r[i] <= sum[i+1];
      r[N-2] <= p[N-1];
    end
  end

  assign y         = sum[0];
  assign out_valid = in_valid;

endmodule
