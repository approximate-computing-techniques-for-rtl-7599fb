// Shared constants and types of the approximate shift-adds FIR filter.
//
// The example filter is a 10-tap low-pass filter whose coefficients are
// quantised to 10 bits. Following the filter convention of the design, the
// input sample has as many bits as a coefficient and the output (and every
// internal partial sum) has twice as many. All arithmetic is two's
// complement and wraps modulo 2**OUT_W.
package fir_approx_pkg;

  // Coefficient and input sample width.
  localparam int unsigned COEF_W = 10;
  // Output and internal partial-sum width: twice the input width.
  localparam int unsigned OUT_W  = 2 * COEF_W;
  // Number of taps of the example filter.
  localparam int unsigned N_TAPS = 10;

  // Coefficients h0..h9 of the example filter (symmetric).
  localparam int COEFS [N_TAPS] = '{-22, -13, 60, 193, 302, 302, 193, 60, -13, -22};

  // Operation of a copy-of-operand adder/subtractor. The "unshifted"
  // operand U is the one whose low bits are copied; the other operand is
  // B shifted left by S bits.
  typedef enum logic [1:0] {
    OP_ADD   = 2'd0,  // U + (B << S)
    OP_U_SUB = 2'd1,  // U - (B << S)   (shifted operand is the subtrahend)
    OP_B_SUB = 2'd2   // (B << S) - U   (unshifted operand is the subtrahend)
  } addsub_op_e;

  typedef logic signed [OUT_W-1:0] word_t;

  // ---------------------------------------------------------------------
  // Shift-adds graph of the example filter's MCM block.
  // Node 0 is the input x; nodes 1..6 are the adders, in order of depth:
  //   1: 15x = (x<<4) - x      2: 17x = x + (x<<4)      (depth 1)
  //   3: 11x = 15x - (x<<2)    4: 13x = 15x - (x<<1)
  //   5: 151x = 15x + (17x<<3)                           (depth 2)
  //   6: 193x = (13x<<4) - 15x                           (depth 3)
  // For each adder: U = unshifted operand node, B = shifted operand node,
  // SH = shift of B, OP = operation.
  localparam int unsigned N_NODES = 7;
  localparam int unsigned N_ADDERS = N_NODES - 1;
  localparam int unsigned NODE_U     [N_NODES] = '{0, 0, 0, 1, 1, 1, 1};
  localparam int unsigned NODE_B     [N_NODES] = '{0, 0, 0, 0, 0, 2, 4};
  localparam int unsigned NODE_SH    [N_NODES] = '{0, 4, 4, 2, 1, 3, 4};
  localparam addsub_op_e  NODE_OP    [N_NODES] = '{OP_ADD, OP_B_SUB, OP_ADD, OP_U_SUB,
                                                   OP_U_SUB, OP_ADD, OP_B_SUB};
  localparam int unsigned NODE_DEPTH [N_NODES] = '{0, 1, 1, 2, 2, 2, 3};
  // Largest left shift considered when rewiring a removed adder.
  localparam int unsigned REWIRE_MAX_SH = COEF_W;

  // Value of an operation applied to integer node values.
  function automatic longint node_op(addsub_op_e op, longint u, longint b, int unsigned sh);
    longint bs = b <<< sh;
    case (op)
      OP_ADD:   return u + bs;
      OP_U_SUB: return u - bs;
      default:  return bs - u;
    endcase
  endfunction

  // Rewiring of removed adders (architectural-level approximation).
  // REMOVE bit k-1 removes adder node k. Removed adders are handled in order
  // of depth; each is replaced by the node of smaller depth that is still an
  // adder, or by the input, shifted left by 0..REWIRE_MAX_SH, whose value (with
  // the earlier removals applied) is closest to the value the removed adder
  // computed in the original graph. Ties go to the input, then to the lower
  // node number, then to the smaller shift. Returns the source node
  // (want_src = 1) or the shift (want_src = 0) for node k.
  function automatic int unsigned rewire(logic [N_ADDERS-1:0] remove, int unsigned k, bit want_src);
    longint orig [N_NODES];
    longint cur  [N_NODES];
    int unsigned src [N_NODES];
    int unsigned sh  [N_NODES];
    orig[0] = 1;
    cur[0]  = 1;
    for (int unsigned n = 0; n < N_NODES; n++) begin
      src[n] = 0;
      sh[n]  = 0;
    end
    for (int unsigned n = 1; n < N_NODES; n++) begin
      orig[n] = node_op(NODE_OP[n], orig[NODE_U[n]], orig[NODE_B[n]], NODE_SH[n]);
      if (remove[n-1]) begin
        longint best_d = -1;
        for (int unsigned c = 0; c < n; c++) begin
          if (NODE_DEPTH[c] < NODE_DEPTH[n] && (c == 0 || !remove[c-1])) begin
            for (int unsigned s = 0; s <= REWIRE_MAX_SH; s++) begin
              longint d = (cur[c] <<< s) - orig[n];
              if (d < 0) d = -d;
              if (best_d < 0 || d < best_d) begin
                best_d = d;
                src[n] = c;
                sh[n]  = s;
              end
            end
          end
        end
        cur[n] = cur[src[n]] <<< sh[n];
      end else begin
        cur[n] = node_op(NODE_OP[n], cur[NODE_U[n]], cur[NODE_B[n]], NODE_SH[n]);
      end
    end
    for (int unsigned n = 0; n < N_NODES; n++)
      if (n == k) return want_src ? src[n] : sh[n];
    return 0;
  endfunction

endpackage
