// Reference models shared by the testbenches.
//
// ref_addsub(): the copy-of-operand adder/subtractor as "exact result plus
// error term", using the closed-form error expressions rather than the
// bit-level structure of the hardware.
// ref_plan(): the rewiring of removed adders, searched at x = 1.
// ref_mcm(): the example filter's MCM graph evaluated node by node with
// ref_addsub(), including removed and rewired adders.
// All results are reduced modulo 2**W (W = 20).
package fir_ref_pkg;
  import fir_approx_pkg::*;

  localparam int unsigned W = OUT_W;
  localparam longint MASK = (longint'(1) << W) - 1;

  typedef longint prod_t [N_TAPS];

  function automatic longint ref_addsub(longint u, longint b, int s, int k, addsub_op_e op);
    longint bs = (b << s) & MASK;
    longint ex, e;
    int l = s + k;
    case (op)
      OP_ADD:   ex = u + bs;
      OP_U_SUB: ex = u - bs;
      default:  ex = bs - u;
    endcase
    e = 0;
    if (k > 0) begin
      case (op)
        OP_ADD: begin
          e = ((u >> (l - 1)) & 1) << l;
          for (int i = s; i < l; i++) e -= ((bs >> i) & 1) << i;
        end
        OP_U_SUB: begin
          e = -(longint'(1) << s) + (((u >> (l - 1)) & 1) << l);
          for (int i = s; i < l; i++) e -= (((bs >> i) & 1) ^ 1) << i;
        end
        default: begin
          e = -1 + ((((u >> (l - 1)) & 1) ^ 1) << l);
          for (int i = s; i < l; i++) e -= ((bs >> i) & 1) << i;
        end
      endcase
    end
    return (ex + e) & MASK;
  endfunction

  // Sign-extended value of a W-bit word.
  function automatic longint sext(longint v);
    v &= MASK;
    return (v >= (longint'(1) << (W - 1))) ? v - (longint'(1) << W) : v;
  endfunction

  // Rewiring of removed adders, worked out at x = 1: each removed adder (in
  // order) takes the remaining shallower adder or the input, shifted left by
  // 0..10, closest to its original value; first candidate wins a tie.
  function automatic void ref_plan(logic [5:0] rm, output int src [7], output int sh [7]);
    int orig [7] = '{1, 15, 17, 11, 13, 151, 193};
    int dep  [7] = '{0, 1, 1, 2, 2, 2, 3};
    longint cur [7];
    cur[0] = 1;
    for (int n = 0; n < 7; n++) begin src[n] = 0; sh[n] = 0; end
    for (int n = 1; n < 7; n++) begin
      if (rm[n-1]) begin
        longint best = 1 << 30;
        for (int c = 0; c < n; c++)
          if (dep[c] < dep[n] && (c == 0 || !rm[c-1]))
            for (int t = 0; t <= 10; t++) begin
              longint d = (cur[c] << t) - orig[n];
              if (d < 0) d = -d;
              if (d < best) begin best = d; src[n] = c; sh[n] = t; end
            end
        cur[n] = cur[src[n]] << sh[n];
      end else begin
        case (n)
          1: cur[n] = 16 * cur[0] - cur[0];
          2: cur[n] = cur[0] + 16 * cur[0];
          3: cur[n] = cur[1] - 4 * cur[0];
          4: cur[n] = cur[1] - 2 * cur[0];
          5: cur[n] = cur[1] + 8 * cur[2];
          default: cur[n] = 16 * cur[4] - cur[1];
        endcase
      end
    end
  endfunction

  function automatic prod_t ref_mcm(longint x, int k1, int k2, int k3, logic [5:0] rm);
    prod_t p;
    int src [7], sh [7];
    longint v [7];
    ref_plan(rm, src, sh);
    v[0] = x & MASK;
    for (int n = 1; n < 7; n++) begin
      if (rm[n-1]) v[n] = (v[src[n]] << sh[n]) & MASK;
      else case (n)
        1: v[n] = ref_addsub(v[0], v[0], 4, k1, OP_B_SUB);
        2: v[n] = ref_addsub(v[0], v[0], 4, k1, OP_ADD);
        3: v[n] = ref_addsub(v[1], v[0], 2, k2, OP_U_SUB);
        4: v[n] = ref_addsub(v[1], v[0], 1, k2, OP_U_SUB);
        5: v[n] = ref_addsub(v[1], v[2], 3, k2, OP_ADD);
        default: v[n] = ref_addsub(v[1], v[4], 4, k3, OP_B_SUB);
      endcase
    end
    p[0] = (-(v[3] << 1)) & MASK;
    p[1] = (-v[4]) & MASK;
    p[2] = (v[1] << 2) & MASK;
    p[3] = v[6];
    p[4] = (v[5] << 1) & MASK;
    for (int i = 5; i < 10; i++) p[i] = p[9 - i];
    return p;
  endfunction

endpackage
