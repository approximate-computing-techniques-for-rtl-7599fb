// Self-checking testbench of the 51x / 77x shift-adds multiplier.
//
// Both forms (common-subexpression and graph-based) are applied every 8-bit
// signed input and compared with 51*x and 77*x.
module tb_mcm_51_77;
  localparam int unsigned W = 8;

  int checks = 0;
  int failures = 0;

  logic signed [W-1:0] x;
  logic signed [W+6:0] y51_gb, y77_gb, y51_cse, y77_cse;

  mcm_51_77 #(.W(W), .GRAPH_BASED(1'b1)) dut_gb  (.x(x), .y51(y51_gb),  .y77(y77_gb));
  mcm_51_77 #(.W(W), .GRAPH_BASED(1'b0)) dut_cse (.x(x), .y51(y51_cse), .y77(y77_cse));

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s x=%0d: got %0d expected %0d", what, x, got, exp);
    end
  endtask

  initial begin
    for (int v = -(1 << (W - 1)); v < (1 << (W - 1)); v++) begin
      x = W'(v);
      #1;
      check("GB 51x", int'(y51_gb), 51 * v);
      check("GB 77x", int'(y77_gb), 77 * v);
      check("CSE 51x", int'(y51_cse), 51 * v);
      check("CSE 77x", int'(y77_cse), 77 * v);
    end
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
