// it_shift_add -- multiplier-less constant multiplier of a processing element.
//
// Computes y = sum over k of (+/-) (x << sh_k), k < NTERM, with each term
// enabled, negated and shifted by its control field.  With the CSD control
// words of hevc_it_pkg this is y = coef * x for any coefficient of the
// transform (|coef| <= 256).  NTERM = 4 is the document's "Type A" module
// (four shifters, two adders feeding one), NTERM = 5 is "Type B" (a fifth
// shifter added after that tree).  Each shifter is a 4-level log shifter
// (by 1, 2, 4 and 8 places).  Purely combinational; the PE registers the
// result.  Per-term negation (instead of add/subtract adders) is this design's
// choice.
module it_shift_add
  import hevc_it_pkg::*;
#(
  parameter int W     = 24,   // operand width
  parameter int NTERM = 5     // 4 = Type A, 5 = Type B
) (
  input  logic signed [W-1:0]    x,
  input  csd_t                   terms,
  output logic signed [W+9:0]    y
);
  logic signed [W+9:0] t [NTERM];
  logic signed [W+9:0] xe;

  assign xe = (W+10)'(x);

  // Each shifter is a 4-level log shifter (shift by 1, 2, 4, 8 or not), so
  // it is built from fixed wiring and 2:1 multiplexers.
  function automatic logic signed [W+9:0] lsh(input logic signed [W+9:0] v,
                                               input logic [3:0] sh);
    logic signed [W+9:0] r;
    r = v;
    if (sh[0]) r = r <<< 1;
    if (sh[1]) r = r <<< 2;
    if (sh[2]) r = r <<< 4;
    if (sh[3]) r = r <<< 8;
    return r;
  endfunction

  always_comb begin
    for (int k = 0; k < NTERM; k++) begin
      t[k] = '0;
      if (terms[k].en)
        t[k] = terms[k].neg ? -lsh(xe, terms[k].sh) : lsh(xe, terms[k].sh);
    end
  end

  // adder tree: (t0 + t1) + (t2 + t3) [+ t4]
  if (NTERM == 5) begin : g_type_b
    assign y = ((t[0] + t[1]) + (t[2] + t[3])) + t[4];
  end else begin : g_type_a
    assign y = (t[0] + t[1]) + (t[2] + t[3]);
  end

  // A Type A module must never be given a fifth term.
  if (NTERM < NT) begin : g_chk
    always_comb
      assert (!terms[NT-1].en) else $error("it_shift_add: Type A module given a fifth CSD term");
  end
endmodule
