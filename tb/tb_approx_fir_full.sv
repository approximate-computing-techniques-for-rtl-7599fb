// Full-size testbench: the filter with every parameter at its default.
//
// Applies a unit impulse (x = 1 then zeros), which must reproduce the ten
// coefficients -22, -13, 60, 193, 302, 302, 193, 60, -13, -22 one per
// sample, then an impulse of -512 (the most negative input), then 500 random
// full-range samples compared with the direct convolution modulo 2**20.
module tb_approx_fir_full;
  import fir_approx_pkg::*;

  int checks = 0;
  int failures = 0;

  logic clk = 0;
  logic rst_n;
  logic x_valid;
  logic signed [COEF_W-1:0] x_in;
  logic signed [OUT_W-1:0]  y_out;
  logic                     y_valid;
  logic signed [7:0]        ex_x;
  logic signed [14:0]       ex_y51, ex_y77;

  always #5 clk = ~clk;

  approx_fir_top dut (
    .clk, .rst_n, .x_valid, .x_in, .y_out, .y_valid, .ex_x, .ex_y51, .ex_y77
  );

  longint xhist [N_TAPS];
  localparam longint MASK = (longint'(1) << OUT_W) - 1;

  task automatic push_and_check(int xv);
    longint conv = 0;
    x_valid = 1;
    x_in = COEF_W'(xv);
    ex_x = 8'(xv);
    for (int i = N_TAPS - 1; i > 0; i--) xhist[i] = xhist[i-1];
    xhist[0] = longint'(x_in);
    #1;
    for (int i = 0; i < N_TAPS; i++) conv += COEFS[i] * xhist[i];
    checks += 4;
    if ((longint'(y_out) & MASK) != (conv & MASK)) begin
      failures++;
      if (failures < 10) $display("FAIL x=%0d y=%0d expected %0d", x_in, y_out, conv);
    end
    if (!y_valid) failures++;
    if (int'(ex_y51) != 51 * int'(ex_x)) failures++;
    if (int'(ex_y77) != 77 * int'(ex_x)) failures++;
    @(posedge clk); #1;
  endtask

  initial begin
    rst_n = 0; x_valid = 0; x_in = '0; ex_x = '0;
    for (int i = 0; i < N_TAPS; i++) xhist[i] = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    // impulse response
    push_and_check(1);   // y = h0 * 1 = -22, checked against the convolution
    for (int i = 1; i < N_TAPS; i++) begin
      x_valid = 1; x_in = '0;
      #1;
      checks++;
      if (int'(y_out) != COEFS[i]) begin
        failures++;
        $display("FAIL impulse tap %0d: %0d expected %0d", i, y_out, COEFS[i]);
      end
      for (int j = N_TAPS - 1; j > 0; j--) xhist[j] = xhist[j-1];
      xhist[0] = 0;
      @(posedge clk); #1;
    end
    push_and_check(-512);
    for (int i = 1; i < N_TAPS; i++) push_and_check(0);
    for (int n = 0; n < 500; n++) push_and_check(int'($urandom_range(1023)) - 512);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
