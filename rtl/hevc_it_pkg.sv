// hevc_it_pkg -- shared constants, types and the butterfly stage program of the
// 16x16 / 32x32 HEVC large inverse transform.
//
// The 1-D transform follows Chen's fast DCT flow graph: a 32-point inverse
// transform is a 16-point inverse transform of the even coefficients (the
// "upper" part, 6 butterfly stages) plus a 16-value odd part (the "lower" part,
// 7 stages), joined by one last add/subtract stage.  Both parts run, one after
// the other, on the same 16 processing elements (PEs).  Every stage node is
//     y[p] = (a * x[p] + b * x[partner]) >>> 8
// with a, b in [-256, 256].  The partner of position p is always one of
// p^1, p^3, p^7 or p^15, so each PE needs only a 4:1 partner multiplexer.
//
// Rotation coefficients are floor(256*cos(k*pi/64)) (table cos256 below);
// these are the integer values printed in the document's flow graph and in its
// first-stage coefficient table.  Each coefficient is applied as a sum of
// canonical-signed-digit (CSD) shifted terms, at most 5 of them (4 for the
// "Type A" shifter/adders, 5 for "Type B").  The CSD form, the stage order
// inside the 6/7-stage frames and the sign conventions of the inner rotations
// are this design's own derivation of Chen's graph; they reproduce the
// coefficient values and the partner lines of the document.
package hevc_it_pkg;

  localparam int NPE   = 16;   // processing elements per processing unit
  localparam int NT    = 5;    // CSD terms per coefficient (Type B width)
  localparam int NUP   = 6;    // stages of the upper part (16-point transform)
  localparam int NLO   = 7;    // stages of the lower part (odd half of 32-point)
  localparam int NSTEP = NUP + NLO;
  localparam int CSH   = 8;    // coefficients carry 8 fractional bits

  // Cycles one processing unit spends on one 1-D vector.
  localparam int CYC32 = 15;   // 6 upper + 7 lower + 1 last stage + 1 output
  localparam int CYC16 = 7;    // 6 stages + 1 output

  // Partner line of a PE: position p ^ 1, p ^ 3, p ^ 7 or p ^ 15.
  typedef enum logic [1:0] {P_X1 = 2'd0, P_X3 = 2'd1, P_X7 = 2'd2, P_X15 = 2'd3} psel_e;

  // One shifter of a shift/add module: x << sh, optionally negated.
  typedef struct packed {
    logic       en;
    logic       neg;
    logic [3:0] sh;
  } csd_term_t;

  typedef csd_term_t [NT-1:0] csd_t;

  // Control word of one PE for one stage.
  typedef struct packed {
    psel_e psel;   // partner line
    csd_t  top;    // coefficient a on the PE's own line
    csd_t  bot;    // coefficient b on the partner line
  } pe_ctrl_t;

  typedef pe_ctrl_t    [NPE-1:0]   stage_ctrl_t;
  typedef stage_ctrl_t [NSTEP-1:0] prog_t;

  // Transpose-buffer shift axis.
  //   AX_COL: a line enters the left column, cells shift right, the right
  //           column is the line read out.
  //   AX_ROW: a line enters the bottom row, cells shift up, the top row is
  //           the line read out.
  typedef enum logic {AX_COL = 1'b0, AX_ROW = 1'b1} axis_e;

  // floor(256 * cos(k*pi/64)), k = 0..32
  function automatic int cos256(input int k);
    case (k)
      0: return 256;  1: return 255;  2: return 254;  3: return 253;
      4: return 251;  5: return 248;  6: return 244;  7: return 241;
      8: return 236;  9: return 231; 10: return 225; 11: return 219;
     12: return 212; 13: return 205; 14: return 197; 15: return 189;
     16: return 181; 17: return 171; 18: return 162; 19: return 152;
     20: return 142; 21: return 131; 22: return 120; 23: return 109;
     24: return 97;  25: return 86;  26: return 74;  27: return 62;
     28: return 49;  29: return 37;  30: return 25;  31: return 12;
     default: return 0;
    endcase
  endfunction

  // Input coefficient index (32-point numbering) held by position p of the
  // upper part: the even coefficients in bit-reversed order.
  function automatic int up_idx(input int p);
    case (p)
      0: return 16;  1: return 0;   2: return 8;   3: return 24;
      4: return 4;   5: return 20;  6: return 12;  7: return 28;
      8: return 2;   9: return 18; 10: return 10; 11: return 26;
     12: return 6;  13: return 22; 14: return 14; default: return 30;
    endcase
  endfunction

  // Input coefficient index held by position p of the lower part:
  // 2*bitrev4(p)+1.
  function automatic int lo_idx(input int p);
    int r;
    r = 8 * (p % 2) + 4 * ((p / 2) % 2) + 2 * ((p / 4) % 2) + (p / 8) % 2;
    return 2 * r + 1;
  endfunction

  // Type of the top (own line) and bottom (partner line) shift/add module of
  // each PE: 4 = Type A, 5 = Type B.
  function automatic int nt_top(input int p);
    return (p == 2 || p == 3 || p == 14 || p == 15) ? 4 : 5;
  endfunction
  function automatic int nt_bot(input int p);
    return (p == 2 || p == 3 || p == 15) ? 4 : 5;
  endfunction

  // Canonical signed digit (non-adjacent form) of v as shifter controls.
  function automatic csd_t to_csd(input int v);
    csd_t r;
    int   a;
    int   i;
    int   pos;
    logic ng;
    r   = '0;
    ng  = (v < 0);
    a   = ng ? -v : v;
    i   = 0;
    pos = 0;
    while (a != 0 && i < NT) begin
      if (a % 2 == 1) begin
        r[i].en  = 1'b1;
        r[i].sh  = 4'(pos);
        if (a % 4 == 1) begin
          r[i].neg = ng;
          a        = a - 1;
        end else begin
          r[i].neg = !ng;
          a        = a + 1;
        end
        i++;
      end
      a   = a / 2;
      pos++;
    end
    return r;
  endfunction

  function automatic psel_e mask2sel(input int m);
    case (m)
      1: return P_X1;
      3: return P_X3;
      7: return P_X7;
      default: return P_X15;
    endcase
  endfunction

  // Node operation: partner mask m (p ^ m), own coefficient a, partner coefficient b.
  typedef struct packed {
    logic [4:0]         m;
    logic signed [15:0] a;
    logic signed [15:0] b;
  } node_t;

  function automatic node_t mk(input int m, input int a, input int b);
    node_t n;
    n.m = 5'(m % 32);
    n.a = 16'(a % 65536);
    n.b = 16'(b % 65536);
    return n;
  endfunction

  // First rotation of an odd part: pairs (l, l^(M-1)) inside block
  // [base, base+M), angle k*pi/64 with k the 32-point index of the input on
  // the low line l:  y_l = S*x_l - C*x_h,  y_h = S*x_h + C*x_l.
  function automatic node_t first_rot(input int p, input int base, input int m1,
                                      input bit lower);
    int i, l, k, c, s;
    i = p - base;
    l = base + ((i < (m1 + 1) / 2) ? i : (i ^ m1));
    k = lower ? lo_idx(l) : up_idx(l);
    c = cos256(k);
    s = cos256(32 - k);
    return (p == l) ? mk(m1, s, -c) : mk(m1, s, c);
  endfunction

  // Butterfly of a group of mask+1 lines: pairs (i, i^mask).  Even groups
  // give (lo+hi, lo-hi), odd groups give (hi-lo, lo+hi).
  function automatic node_t bfly(input int i, input int mask);
    bit odd, lo;
    odd = ((i / (mask + 1)) % 2) == 1;
    lo  = (i % (mask + 1)) <= (mask / 2);
    if (odd == lo) return mk(mask, -256, 256);
    else           return mk(mask, 256, 256);
  endfunction

  // Inner rotations, angle k*pi/64, low line l and high line h:
  //   form A: y_l = -C*x_l + S*x_h,  y_h =  C*x_h + S*x_l
  //   form B: y_l = -S*x_l - C*x_h,  y_h =  S*x_h - C*x_l
  function automatic node_t rot_a(input bit is_lo, input int m, input int k);
    int c, s;
    c = cos256(k);
    s = cos256(32 - k);
    return is_lo ? mk(m, -c, s) : mk(m, c, s);
  endfunction
  function automatic node_t rot_b(input bit is_lo, input int m, input int k);
    int c, s;
    c = cos256(k);
    s = cos256(32 - k);
    return is_lo ? mk(m, -s, -c) : mk(m, s, -c);
  endfunction

  // Operation of position p in program step st (0..5 upper, 6..12 lower).
  function automatic node_t node_op(input int st, input int p);
    node_t n;
    n = mk(1, 256, 0);  // pass through
    case (st)
      // ---- upper part: 16-point transform of the even coefficients ----
      0: if (p >= 8) n = first_rot(p, 8, 7, 1'b0);
      1: begin
        if (p >= 4 && p < 8) n = first_rot(p, 4, 3, 1'b0);
        if (p >= 8)          n = bfly(p - 8, 1);
      end
      2: begin
        if (p == 0)              n = mk(1, 181, 181);
        if (p == 1)              n = mk(1, 181, -181);
        if (p == 2 || p == 3)    n = first_rot(p, 2, 1, 1'b0);
        if (p >= 4 && p < 8)     n = bfly(p - 4, 1);
        if (p == 9 || p == 14)   n = rot_a(p == 9, 7, 8);
        if (p == 10 || p == 13)  n = rot_b(p == 10, 7, 8);
      end
      3: begin
        if (p < 4)               n = bfly(p, 3);
        if (p == 5 || p == 6)    n = rot_a(p == 5, 3, 16);
        if (p >= 8)              n = bfly(p - 8, 3);
      end
      4: begin
        if (p < 8)               n = bfly(p, 7);
        if (p >= 10 && p <= 13)  n = rot_a(p < 12, 7, 16);
      end
      5: n = bfly(p, 15);
      // ---- lower part: odd half of the 32-point transform ----
      6: n = first_rot(p, 0, 15, 1'b1);
      7: n = bfly(p, 1);
      8: begin
        if (p == 1 || p == 14)   n = rot_a(p == 1, 15, 4);
        if (p == 2 || p == 13)   n = rot_b(p == 2, 15, 4);
        if (p == 5 || p == 10)   n = rot_a(p == 5, 15, 20);
        if (p == 6 || p == 9)    n = rot_b(p == 6, 15, 20);
      end
      9: n = bfly(p, 3);
      10: begin
        if (p == 2 || p == 13 || p == 3 || p == 12) n = rot_a(p < 8, 15, 8);
        if (p == 4 || p == 11 || p == 5 || p == 10) n = rot_b(p < 8, 15, 8);
      end
      11: n = bfly(p, 7);
      12: if (p >= 4 && p < 12) n = rot_a(p < 8, 15, 16);
      default: ;
    endcase
    return n;
  endfunction

  function automatic pe_ctrl_t node2ctrl(input node_t n);
    pe_ctrl_t c;
    c.psel = mask2sel(int'(n.m));
    c.top  = to_csd(int'(n.a));
    c.bot  = to_csd(int'(n.b));
    return c;
  endfunction

  // Whole program, evaluated at elaboration time.
  function automatic prog_t build_prog();
    prog_t pr;
    for (int st = 0; st < NSTEP; st++)
      for (int p = 0; p < NPE; p++)
        pr[st][p] = node2ctrl(node_op(st, p));
    return pr;
  endfunction

  // Last stage of the 32-point transform: PE p computes D[p] - x[p^15].
  function automatic pe_ctrl_t final_ctrl();
    return node2ctrl(mk(15, 256, -256));
  endfunction

endpackage
