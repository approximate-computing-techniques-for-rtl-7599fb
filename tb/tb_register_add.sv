// Self-checking testbench of the register-add block.
//
// Two 10-tap instances, one exact (K_RA = 0) and one with 6 approximate bits
// per adder, receive the same random products with random idle cycles
// (in_valid low) between samples. The exact output is compared with the
// delayed sum y[n] = sum_i p_{n-i}[i] over the products of the last ten
// accepted samples; the approximate one with a software register chain that
// uses the closed-form adder error model. The output must belong to the
// sample presented in the same cycle (zero latency), the registers must hold
// during idle cycles and reset must clear them.
module tb_register_add;
  import fir_approx_pkg::*;
  import fir_ref_pkg::*;

  localparam int unsigned N = N_TAPS;
  localparam int unsigned KA = 6;
  localparam int NSAMP = 2000;

  int checks = 0;
  int failures = 0;

  logic clk = 0;
  logic rst_n;
  logic in_valid;
  word_t p [N];
  word_t y_ex, y_ap;
  logic v_ex, v_ap;

  register_add #(.N(N), .K_RA(0))  dut_ex (.clk, .rst_n, .in_valid, .p, .y(y_ex), .out_valid(v_ex));
  register_add #(.N(N), .K_RA(KA)) dut_ap (.clk, .rst_n, .in_valid, .p, .y(y_ap), .out_valid(v_ap));

  always #5 clk = ~clk;

  longint hist [N][N];   // hist[j] = products of the j-th most recent accepted sample
  longint rmod [N-1];    // software model of the approximate chain registers
  int idle_cycles = 0;

  task automatic check(string what, longint got, longint exp);
    checks++;
    if ((got & MASK) != (exp & MASK)) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %h expected %h", what, got & MASK, exp & MASK);
    end
  endtask

  initial begin
    rst_n = 0;
    in_valid = 0;
    foreach (p[i]) p[i] = '0;
    for (int j = 0; j < N; j++) for (int i = 0; i < N; i++) hist[j][i] = 0;
    for (int i = 0; i < N - 1; i++) rmod[i] = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int n = 0; n < NSAMP; n++) begin
      longint ye, ya;
      // random idle cycles: registers must hold
      if ($urandom_range(3) == 0) begin
        in_valid = 0;
        foreach (p[i]) p[i] = word_t'($urandom);
        @(posedge clk); #1;
        idle_cycles++;
      end
      in_valid = 1;
      foreach (p[i]) p[i] = word_t'($urandom);
      if (n < 3) foreach (p[i]) p[i] = word_t'(i + 1);
      for (int j = N - 1; j > 0; j--) hist[j] = hist[j-1];
      for (int i = 0; i < N; i++) hist[0][i] = longint'(p[i]) & MASK;
      #1;
      ye = 0;
      for (int i = 0; i < N; i++) ye += hist[i][i];
      ya = ref_addsub(hist[0][0], rmod[0], 0, KA, OP_ADD);
      check("exact y", longint'(y_ex), ye);
      check("approx y", longint'(y_ap), ya);
      checks++;
      if (!(v_ex && v_ap)) begin failures++; $display("FAIL out_valid low"); end
      // advance the software chain as the hardware does on this edge
      for (int i = 0; i < N - 2; i++) rmod[i] = ref_addsub(hist[0][i+1], rmod[i+1], 0, KA, OP_ADD);
      rmod[N-2] = hist[0][N-1];
      @(posedge clk); #1;
    end
    // synchronous reset clears the chain: output equals p[0]
    rst_n = 0;
    in_valid = 0;
    @(posedge clk); #1;
    rst_n = 1;
    in_valid = 1;
    foreach (p[i]) p[i] = word_t'($urandom);
    #1;
    check("after reset", longint'(y_ex), longint'(p[0]));
    check("after reset approx", longint'(y_ap), ref_addsub(longint'(p[0]) & MASK, 0, 0, KA, OP_ADD));
    checks++;
    if (idle_cycles == 0) begin failures++; $display("FAIL no idle cycles exercised"); end
    $display("idle cycles: %0d", idle_cycles);
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
