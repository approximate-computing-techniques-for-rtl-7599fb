// End-to-end testbench of the approximate FIR filter.
//
// Three filters see the same 2000-sample pseudo-Gaussian input (sum of four
// uniform variables), with random idle cycles between samples:
//   exact   - all parameters at their defaults; compared with the direct
//             convolution y[n] = sum h_i x[n-i] (mod 2**20);
//   logic   - copy-of-operand adders with K = [8, 0, 2, 6] for the groups
//             (register-add, MCM depth 1, depth 2, depth 3);
//   removed - the 15x and 193x MCM adders removed and rewired.
// The two approximate filters are compared with a software model built from
// the closed-form adder error terms. The signal-to-noise ratio of each
// approximate filter against the exact one is printed. The mechanisms that
// must each occur at least once are counted: idle cycles (registers hold),
// outputs changed by approximate adders, outputs changed by adder removal,
// and a reset in the middle of the stream. The 51x/77x example beside the
// filter is checked on the same inputs.
module tb_approx_fir_top;
  import fir_approx_pkg::*;
  import fir_ref_pkg::*;

  localparam int NSAMP = 2000;
  localparam int NV = 3;
  localparam int unsigned V_KRA [NV] = '{0, 8, 0};
  localparam int unsigned V_K1  [NV] = '{0, 0, 0};
  localparam int unsigned V_K2  [NV] = '{0, 2, 0};
  localparam int unsigned V_K3  [NV] = '{0, 6, 0};
  localparam logic [5:0]  V_RM  [NV] = '{6'h00, 6'h00, 6'h21};

  int checks = 0;
  int failures = 0;

  logic clk = 0;
  logic rst_n;
  logic x_valid;
  logic signed [COEF_W-1:0] x_in;
  logic signed [OUT_W-1:0]  y [NV];
  logic                     yv [NV];
  logic signed [7:0]        ex_x;
  logic signed [14:0]       ex51 [NV], ex77 [NV];

  always #5 clk = ~clk;

  approx_fir_top dut_exact (
    .clk, .rst_n, .x_valid, .x_in, .y_out(y[0]), .y_valid(yv[0]),
    .ex_x, .ex_y51(ex51[0]), .ex_y77(ex77[0])
  );
  approx_fir_top #(.K_RA(V_KRA[1]), .K_D1(V_K1[1]), .K_D2(V_K2[1]), .K_D3(V_K3[1]), .EX_GB(1'b0)) dut_logic (
    .clk, .rst_n, .x_valid, .x_in, .y_out(y[1]), .y_valid(yv[1]),
    .ex_x, .ex_y51(ex51[1]), .ex_y77(ex77[1])
  );
  approx_fir_top #(.REMOVE(V_RM[2])) dut_removed (
    .clk, .rst_n, .x_valid, .x_in, .y_out(y[2]), .y_valid(yv[2]),
    .ex_x, .ex_y51(ex51[2]), .ex_y77(ex77[2])
  );

  // Software models: products of the current sample and chain registers.
  longint rmod [NV][N_TAPS-1];
  longint xhist [N_TAPS];
  int n_idle = 0, n_logic_diff = 0, n_removed_diff = 0, n_reset = 0;
  real sig_pow = 0.0, noise_pow [NV];

  task automatic check(string what, longint got, longint exp);
    checks++;
    if ((got & MASK) != (exp & MASK)) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %h expected %h", what, got & MASK, exp & MASK);
    end
  endtask

  task automatic clear_models();
    for (int v = 0; v < NV; v++) for (int i = 0; i < N_TAPS - 1; i++) rmod[v][i] = 0;
    for (int i = 0; i < N_TAPS; i++) xhist[i] = 0;
  endtask

  function automatic int gauss_sample();
    int s = 0;
    for (int j = 0; j < 4; j++) s += $urandom_range(254) - 127;
    return s;
  endfunction

  initial begin
    rst_n = 0;
    x_valid = 0;
    x_in = '0;
    ex_x = '0;
    clear_models();
    foreach (noise_pow[v]) noise_pow[v] = 0.0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int n = 0; n < NSAMP; n++) begin
      prod_t pr;
      longint yref [NV];
      longint conv;
      if (n == NSAMP / 2) begin
        // reset in the middle of the stream
        rst_n = 0; x_valid = 0;
        @(posedge clk); #1;
        rst_n = 1;
        clear_models();
        n_reset++;
      end
      if ($urandom_range(4) == 0) begin
        x_valid = 0;
        x_in = COEF_W'($urandom);
        @(posedge clk); #1;
        n_idle++;
      end
      x_valid = 1;
      x_in = COEF_W'(gauss_sample());
      ex_x = 8'($urandom);
      for (int i = N_TAPS - 1; i > 0; i--) xhist[i] = xhist[i-1];
      xhist[0] = longint'(x_in);
      #1;
      conv = 0;
      for (int i = 0; i < N_TAPS; i++) conv += COEFS[i] * xhist[i];
      for (int v = 0; v < NV; v++) begin
        pr = ref_mcm(longint'(x_in), V_K1[v], V_K2[v], V_K3[v], V_RM[v]);
        yref[v] = ref_addsub(pr[0], rmod[v][0], 0, V_KRA[v], OP_ADD);
        for (int i = 0; i < N_TAPS - 2; i++)
          rmod[v][i] = ref_addsub(pr[i+1], rmod[v][i+1], 0, V_KRA[v], OP_ADD);
        rmod[v][N_TAPS-2] = pr[N_TAPS-1];
        check($sformatf("filter %0d sample %0d", v, n), longint'(y[v]), yref[v]);
        checks++;
        if (!yv[v]) begin failures++; $display("FAIL y_valid low"); end
        check("51x", longint'(ex51[v]), 51 * longint'(ex_x));
        check("77x", longint'(ex77[v]), 77 * longint'(ex_x));
        if (v > 0) noise_pow[v] += real'(sext(longint'(y[v])) - sext(longint'(y[0]))) ** 2;
      end
      check("exact = convolution", longint'(y[0]), conv);
      sig_pow += real'(sext(longint'(y[0]))) ** 2;
      if (y[1] != y[0]) n_logic_diff++;
      if (y[2] != y[0]) n_removed_diff++;
      @(posedge clk); #1;
    end
    for (int v = 1; v < NV; v++)
      $display("filter %0d: SNR against exact = %0.1f dB", v, 10.0 * $log10(sig_pow / noise_pow[v]));
    $display("idle cycles %0d, outputs changed by approximate adders %0d, by adder removal %0d, resets %0d",
             n_idle, n_logic_diff, n_removed_diff, n_reset);
    checks += 4;
    if (n_idle == 0)         begin failures++; $display("FAIL no idle cycle"); end
    if (n_logic_diff == 0)   begin failures++; $display("FAIL approximate adders never changed an output"); end
    if (n_removed_diff == 0) begin failures++; $display("FAIL adder removal never changed an output"); end
    if (n_reset == 0)        begin failures++; $display("FAIL no reset"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NSAMP * 3 + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
