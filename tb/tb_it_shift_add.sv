// tb_it_shift_add -- self-checking testbench of the shift/add constant
// multiplier, Type A (4 terms) and Type B (5 terms).
//
// For every coefficient the transform uses (and every value -256..256 that
// fits the module's term count) it builds the CSD control word and checks
// y == coef * x for random and extreme operands.  The expected product is the
// plain integer product.
module tb_it_shift_add;
  import hevc_it_pkg::*;

  localparam int W = 24;

  logic signed [W-1:0] x;
  csd_t                ta, tb5;
  logic signed [W+9:0] ya, yb;

  it_shift_add #(.W(W), .NTERM(4)) u_a (.x(x), .terms(ta),  .y(ya));
  it_shift_add #(.W(W), .NTERM(5)) u_b (.x(x), .terms(tb5), .y(yb));

  int checks = 0, failures = 0;

  function automatic int nterms(input csd_t t);
    int n = 0;
    for (int k = 0; k < NT; k++) if (t[k].en) n++;
    return n;
  endfunction

  initial begin
    int n4 = 0;
    ta = '0; tb5 = '0; x = '0;
    for (int c = -256; c <= 256; c++) begin
      csd_t t;
      t   = to_csd(c);
      tb5 = t;
      ta  = (nterms(t) <= 4) ? t : '0;
      for (int r = 0; r < 8; r++) begin
        case (r)
          0: x = W'(-(1 <<< 21));
          1: x = W'((1 <<< 21) - 1);
          2: x = '0;
          default: x = W'($signed($urandom_range(0, 1 << 22)) - (1 << 21));
        endcase
        #1;
        checks++;
        if (longint'(yb) != longint'(c) * longint'(x)) begin
          failures++;
          $display("FAIL type B coef %0d x %0d y %0d", c, x, yb);
        end
        if (nterms(t) <= 4) begin
          checks++;
          if (longint'(ya) != longint'(c) * longint'(x)) begin
            failures++;
            $display("FAIL type A coef %0d x %0d y %0d", c, x, ya);
          end
        end
      end
      if (nterms(t) <= 4) n4++;
      // no coefficient needs more than the 5 shifters of a Type B module
      checks++;
      if (nterms(t) > NT) failures++;
    end
    $display("coefficients with <= 4 terms: %0d of 513", n4);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
