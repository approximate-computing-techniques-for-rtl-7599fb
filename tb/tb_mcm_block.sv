// Self-checking testbench of the example filter's MCM block.
//
// Ten instances: exact, five adder-removal masks (15x; 15x+193x; 193x; all
// six; 17x+151x), three sets of per-depth approximate bits, and removal
// combined with approximate bits. Every 10-bit input value is applied. The exact
// instance is compared with h_i * x; the others with a node-by-node model
// built from the closed-form adder error terms (fir_ref_pkg::ref_mcm).
// For x = 1 the worked removal example is checked literally: with 15x
// removed the nodes become 17x, 12x, 14x, 152x, 208x, and with 193x removed
// as well the total output error E = sum |p_i - h_i| is 20.
module tb_mcm_block;
  import fir_approx_pkg::*;
  import fir_ref_pkg::*;

  localparam int NCFG = 10;
  localparam int unsigned C_K1 [NCFG] = '{0, 0, 0, 0, 2, 1, 10, 0, 0, 3};
  localparam int unsigned C_K2 [NCFG] = '{0, 0, 0, 0, 3, 0, 10, 0, 0, 2};
  localparam int unsigned C_K3 [NCFG] = '{0, 0, 0, 0, 4, 5, 10, 0, 0, 1};
  localparam logic [5:0]  C_RM [NCFG] = '{6'h00, 6'h01, 6'h21, 6'h20, 6'h00, 6'h00, 6'h00,
                                          6'h3f, 6'h12, 6'h0c};

  int checks = 0;
  int failures = 0;
  int done_cfgs = 0;

  logic signed [COEF_W-1:0] x;
  word_t p [NCFG][N_TAPS];

  for (genvar c = 0; c < NCFG; c++) begin : g_cfg
    mcm_block #(.K_D1(C_K1[c]), .K_D2(C_K2[c]), .K_D3(C_K3[c]),
                .REMOVE(C_RM[c])) dut (.x(x), .p(p[c]));
  end

  function automatic longint err_e(int c);
    longint e = 0;
    for (int i = 0; i < N_TAPS; i++) begin
      longint d = sext(longint'(p[c][i])) - COEFS[i];
      e += (d < 0) ? -d : d;
    end
    return e;
  endfunction

  initial begin
    prod_t r;
    for (int v = 0; v < (1 << COEF_W); v++) begin
      x = COEF_W'(v);
      #1;
      for (int c = 0; c < NCFG; c++) begin
        if (c == 0) begin
          for (int i = 0; i < N_TAPS; i++) r[i] = (longint'(COEFS[i]) * longint'(x)) & MASK;
        end else begin
          r = ref_mcm(longint'(x), C_K1[c], C_K2[c], C_K3[c], C_RM[c]);
        end
        for (int i = 0; i < N_TAPS; i++) begin
          checks++;
          if ((longint'(p[c][i]) & MASK) != r[i]) begin
            failures++;
            if (failures < 10) $display("FAIL cfg %0d x=%0d p[%0d]=%h expected %h", c, x, i, p[c][i], r[i]);
          end
        end
      end
    end
    // Worked removal example at x = 1.
    x = 1;
    #1;
    checks += 5;
    if (p[1][3] != 208) begin failures++; $display("FAIL 15x removed: 193x node = %0d", p[1][3]); end
    if (p[1][0] != -24) begin failures++; $display("FAIL 15x removed: -22x -> %0d", p[1][0]); end
    if (p[1][1] != -14) begin failures++; $display("FAIL 15x removed: -13x -> %0d", p[1][1]); end
    if (p[1][4] != 304) begin failures++; $display("FAIL 15x removed: 302x -> %0d", p[1][4]); end
    if (err_e(2) != 20) begin failures++; $display("FAIL pair removed: E = %0d", err_e(2)); end
    checks += 2;
    if (p[2][3] != 192) begin failures++; $display("FAIL pair removed: 193x -> %0d", p[2][3]); end
    if (err_e(0) != 0)  begin failures++; $display("FAIL exact: E = %0d", err_e(0)); end
    // 193x alone: closest shifted shallower value is 13x<<4 = 208x; all
    // removed: every node becomes a shifted input (16x, 16x, 8x, 16x, 128x, 256x).
    checks += 3;
    if (p[3][3] != 208) begin failures++; $display("FAIL 193x removed: %0d", p[3][3]); end
    if (p[7][4] != 256) begin failures++; $display("FAIL all removed: 302x -> %0d", p[7][4]); end
    if (p[7][3] != 256) begin failures++; $display("FAIL all removed: 193x -> %0d", p[7][3]); end
    for (int c = 0; c < NCFG; c++) $display("config %0d: E(x=1) = %0d", c, err_e(c));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
