// Self-checking testbench of the copy-of-operand adder/subtractor.
//
// Twelve 20-bit instances cover additions, both kinds of subtraction, shifts
// of 0..4 and 0..10 approximate bits. Each is driven with random operands
// and compared with the closed-form model "exact result + error term"
// written out independently in fir_ref_pkg::ref_addsub(). Two small instances reproduce
// the worked examples: 1011 + 0011 with K=2 gives 1111 (4 bits), and
// 11 + (3<<2) with K=2 gives 27 instead of 23 (6 bits).
module tb_coa_addsub;
  import fir_approx_pkg::*;
  import fir_ref_pkg::*;

  localparam int unsigned NCFG = 12;
  localparam int unsigned CFG_S [NCFG] = '{0, 4, 2, 4, 0, 2, 1, 4, 4, 3, 0, 0};
  localparam int unsigned CFG_K [NCFG] = '{0, 0, 0, 3, 5, 4, 10, 6, 10, 7, 3, 2};
  localparam addsub_op_e  CFG_OP[NCFG] = '{OP_ADD, OP_B_SUB, OP_U_SUB, OP_ADD, OP_ADD,
                                           OP_U_SUB, OP_U_SUB, OP_B_SUB, OP_B_SUB,
                                           OP_ADD, OP_B_SUB, OP_U_SUB};
  localparam int unsigned NVEC = 3000;

  int checks = 0;
  int failures = 0;
  int done_cfgs = 0;

  for (genvar c = 0; c < NCFG; c++) begin : g_cfg
    logic [W-1:0] u, b, y;
    coa_addsub #(.W(W), .S(CFG_S[c]), .K(CFG_K[c]), .OP(CFG_OP[c])) dut (.u(u), .b(b), .y(y));
    initial begin
      longint r;
      for (int n = 0; n < NVEC; n++) begin
        u = W'($urandom);
        b = W'($urandom);
        if (n == 0) begin u = '0; b = '0; end
        if (n == 1) begin u = '1; b = '1; end
        #1;
        r = ref_addsub(longint'(u), longint'(b), CFG_S[c], CFG_K[c], CFG_OP[c]);
        checks++;
        if (longint'(y) != r) begin
          failures++;
          if (failures < 10)
            $display("FAIL cfg %0d: u=%h b=%h y=%h expected %h", c, u, b, y, r);
        end
      end
      done_cfgs++;
    end
  end

  // Worked examples at their original 4- and 6-bit sizes.
  logic [3:0] ex9_y;
  logic [5:0] ex10_y, ex10_exact;
  coa_addsub #(.W(4), .S(0), .K(2), .OP(OP_ADD)) u_ex9  (.u(4'b1011), .b(4'b0011), .y(ex9_y));
  coa_addsub #(.W(6), .S(2), .K(2), .OP(OP_ADD)) u_ex10 (.u(6'd11), .b(6'd3), .y(ex10_y));
  coa_addsub #(.W(6), .S(2), .K(0), .OP(OP_ADD)) u_ex10e(.u(6'd11), .b(6'd3), .y(ex10_exact));

  initial begin
    #5;
    checks += 3;
    if (ex9_y != 4'b1111) begin failures++; $display("FAIL 4-bit example: %b", ex9_y); end
    if (ex10_y != 6'd27)  begin failures++; $display("FAIL 6-bit example: %0d", ex10_y); end
    if (ex10_exact != 6'd23) begin failures++; $display("FAIL 6-bit exact: %0d", ex10_exact); end
    wait (done_cfgs == NCFG);
    #1;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Watchdog.
  initial begin
    #(NVEC * 10 + 1000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
