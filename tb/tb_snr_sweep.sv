// Accuracy sweep of the approximate filter.
//
// Thirteen filters run on the same 2000-sample pseudo-Gaussian input (sum of
// four uniform variables, about 8.2 bits rms of the 10-bit range), ten
// times with different random streams, as in an SNR measurement that averages
// several noise records:
//   config 0      exact (defaults)
//   configs 1-5   logic level, K = [K_RA, K_D1, K_D2, K_D3] =
//                 [1,0,0,0] [4,0,0,0] [5,0,0,3] [7,0,0,4] [8,0,2,6]
//   configs 6-11  architectural level, one adder removed (15x, 17x, 11x,
//                 13x, 151x, 193x in turn)
//   config 12     15x and 193x removed
// Every output of every filter is checked against the reference model. For
// each approximate filter the mean SNR against the exact filter is printed,
// together with E = sum_i |p_i - h_i| of the MCM block outputs at x = 1. The
// approximate filters must differ from the exact one (nonzero noise), and
// adding approximate bits in the order listed must not raise the noise.
module tb_snr_sweep;
  import fir_approx_pkg::*;
  import fir_ref_pkg::*;

  localparam int NSAMP = 2000;
  localparam int NRUN  = 10;
  localparam int NC    = 13;
  localparam int unsigned C_KRA [NC] = '{0, 1, 4, 5, 7, 8, 0, 0, 0, 0, 0, 0, 0};
  localparam int unsigned C_K1  [NC] = '{0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0};
  localparam int unsigned C_K2  [NC] = '{0, 0, 0, 0, 0, 2, 0, 0, 0, 0, 0, 0, 0};
  localparam int unsigned C_K3  [NC] = '{0, 0, 0, 3, 4, 6, 0, 0, 0, 0, 0, 0, 0};
  localparam logic [5:0]  C_RM  [NC] = '{6'h00, 6'h00, 6'h00, 6'h00, 6'h00, 6'h00,
                                         6'h01, 6'h02, 6'h04, 6'h08, 6'h10, 6'h20, 6'h21};

  int checks = 0;
  int failures = 0;

  logic clk = 0;
  logic rst_n;
  logic x_valid;
  logic signed [COEF_W-1:0] x_in;
  logic signed [OUT_W-1:0]  y [NC];
  logic                     yv [NC];
  logic signed [7:0]        ex_x;

  always #5 clk = ~clk;

  for (genvar c = 0; c < NC; c++) begin : g_f
    logic signed [14:0] e51, e77;
    approx_fir_top #(.K_RA(C_KRA[c]), .K_D1(C_K1[c]), .K_D2(C_K2[c]), .K_D3(C_K3[c]),
                     .REMOVE(C_RM[c])) dut (
      .clk, .rst_n, .x_valid, .x_in, .y_out(y[c]), .y_valid(yv[c]),
      .ex_x, .ex_y51(e51), .ex_y77(e77)
    );
  end

  longint rmod [NC][N_TAPS-1];
  real snr_sum [NC];

  function automatic int gauss_sample();
    int s = 0;
    for (int j = 0; j < 4; j++) s += $urandom_range(254) - 127;
    return s;
  endfunction

  initial begin
    prod_t pr;
    ex_x = '0;
    foreach (snr_sum[c]) snr_sum[c] = 0.0;
    for (int run = 0; run < NRUN; run++) begin
      real sig, noise [NC];
      sig = 0.0;
      foreach (noise[c]) noise[c] = 0.0;
      rst_n = 0; x_valid = 0; x_in = '0;
      for (int c = 0; c < NC; c++) for (int i = 0; i < N_TAPS - 1; i++) rmod[c][i] = 0;
      @(posedge clk); #1;
      rst_n = 1;
      for (int n = 0; n < NSAMP; n++) begin
        x_valid = 1;
        x_in = COEF_W'(gauss_sample());
        #1;
        for (int c = 0; c < NC; c++) begin
          longint yr;
          pr = ref_mcm(longint'(x_in), C_K1[c], C_K2[c], C_K3[c], C_RM[c]);
          yr = ref_addsub(pr[0], rmod[c][0], 0, C_KRA[c], OP_ADD);
          for (int i = 0; i < N_TAPS - 2; i++)
            rmod[c][i] = ref_addsub(pr[i+1], rmod[c][i+1], 0, C_KRA[c], OP_ADD);
          rmod[c][N_TAPS-2] = pr[N_TAPS-1];
          checks++;
          if ((longint'(y[c]) & MASK) != yr) begin
            failures++;
            if (failures < 10) $display("FAIL config %0d sample %0d: %h expected %h", c, n, y[c], yr);
          end
          if (c > 0) noise[c] += real'(sext(longint'(y[c])) - sext(longint'(y[0]))) ** 2;
        end
        sig += real'(sext(longint'(y[0]))) ** 2;
        @(posedge clk); #1;
      end
      for (int c = 1; c < NC; c++) begin
        checks++;
        if (noise[c] == 0.0) begin
          failures++;
          $display("FAIL config %0d never differed from the exact filter", c);
        end else begin
          snr_sum[c] += 10.0 * $log10(sig / noise[c]);
        end
      end
    end
    for (int c = 1; c < NC; c++) begin
      prod_t p1;
      longint e, d;
      p1 = ref_mcm(1, C_K1[c], C_K2[c], C_K3[c], C_RM[c]);
      e = 0;
      for (int i = 0; i < N_TAPS; i++) begin
        d = sext(p1[i]) - COEFS[i];
        e += (d < 0) ? -d : d;
      end
      $display("config %2d  K=[%0d,%0d,%0d,%0d]  REMOVE=%b  mean SNR %5.1f dB  E(x=1)=%0d",
               c, C_KRA[c], C_K1[c], C_K2[c], C_K3[c], C_RM[c], snr_sum[c] / NRUN, e);
    end
    // more approximate bits in every group must not give a better SNR
    for (int c = 2; c <= 5; c++) begin
      checks++;
      if (snr_sum[c] > snr_sum[c-1]) begin
        failures++;
        $display("FAIL SNR rose from config %0d to %0d", c - 1, c);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NRUN * (NSAMP + 10) + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
