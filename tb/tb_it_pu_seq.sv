// tb_it_pu_seq -- self-checking testbench of the processing-unit sequencer.
//
// Runs one 32-point and one 16-point vector through the sequencer and checks
// the control words it issues against values written out by hand:
//   * the first stage of the lower (odd) part: coefficient pairs and partner
//     lines of the first-stage decomposition table, e.g. g16 = 12*x1 - 255*x31;
//   * the partner line of every PE in the 7 lower stages (a blank entry means
//     the PE passes its value: own coefficient 256, partner coefficient 0);
//   * the partner lines of the upper stages, as ordered lists;
//   * the cycle plan: operands from the input at cycles 0 and 6, D loaded at
//     cycle 6, last stage at cycle 13, out_valid at cycle 14 (16-point: result
//     captured at cycle 5, out_valid at cycle 6).
module tb_it_pu_seq;
  import hevc_it_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic start, size32_i, out_ready, ready, size32;
  stage_ctrl_t ctrl;
  logic step_en, from_input, lower_in, load_d, final_step, cap16, out_valid;

  it_pu_seq dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 15) $display("FAIL: %s", msg);
    end
  endtask

  function automatic int val(input csd_t t);
    int v = 0;
    for (int k = 0; k < NT; k++)
      if (t[k].en) v += t[k].neg ? -(1 << t[k].sh) : (1 << t[k].sh);
    return v;
  endfunction

  function automatic int pmask(input psel_e s);
    case (s)
      P_X1: return 1;
      P_X3: return 3;
      P_X7: return 7;
      default: return 15;
    endcase
  endfunction

  // first-stage table of the lower part: own and partner coefficient
  int t2a [16] = '{12, 189, 109, 241, 62, 219, 152, 253, 253, 152, 219, 62, 241, 109, 189, 12};
  int t2b [16] = '{-255, -171, -231, -86, -248, -131, -205, -37, 37, 205, 131, 248, 86, 231, 171, 255};
  // partner line of lower PE p (output Y16+p) in stages 1..7, -1 = pass
  int t1lo [16][7] = '{
    '{15, 1, -1, 3, -1, 7, -1},   '{14, 0, 14, 2, -1, 6, -1},
    '{13, 3, 13, 1, 13, 5, -1},   '{12, 2, -1, 0, 12, 4, -1},
    '{11, 5, -1, 7, 11, 3, 11},   '{10, 4, 10, 6, 10, 2, 10},
    '{9, 7, 9, 5, -1, 1, 9},      '{8, 6, -1, 4, -1, 0, 8},
    '{7, 9, -1, 11, -1, 15, 7},   '{6, 8, 6, 10, -1, 14, 6},
    '{5, 11, 5, 9, 5, 13, 5},     '{4, 10, -1, 8, 4, 12, 4},
    '{3, 13, -1, 15, 3, 11, -1},  '{2, 12, 2, 14, 2, 10, -1},
    '{1, 15, 1, 13, -1, 9, -1},   '{0, 14, -1, 12, -1, 8, -1}};
  // leading partner lines of upper PE p over its non-pass stages
  int t1up [16][4] = '{
    '{1, 3, 7, 15},  '{0, 2, 6, 14},  '{3, 1, 5, 13},  '{2, 0, 4, 12},
    '{7, 5, 3, -1},  '{6, 4, 6, 2},   '{5, 7, 5, 1},   '{4, 6, 0, -1},
    '{15, 9, 11, -1}, '{14, 8, 14, 10}, '{13, 11, 13, 9}, '{12, 10, 8, -1},
    '{11, 13, 15, -1}, '{10, 12, 10, 14}, '{9, 15, 9, 13}, '{8, 14, 12, -1}};

  stage_ctrl_t seen [16];

  initial begin
    start = 1'b0; size32_i = 1'b0; out_ready = 1'b1;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    // ---- 32-point vector ----
    chk(ready, "ready after reset");
    start = 1'b1; size32_i = 1'b1;
    @(posedge clk); #1 start = 1'b0;
    for (int c = 0; c < 15; c++) begin
      seen[c] = ctrl;
      chk(from_input == (c == 0 || c == 6), $sformatf("from_input at %0d", c));
      chk(lower_in == (c == 6), $sformatf("lower_in at %0d", c));
      chk(load_d == (c == 6), $sformatf("load_d at %0d", c));
      chk(final_step == (c == 13), $sformatf("final_step at %0d", c));
      chk(out_valid == (c == 14), $sformatf("out_valid at %0d", c));
      chk(step_en == (c < 14), $sformatf("step_en at %0d", c));
      chk(ready == (c == 14), $sformatf("ready at %0d", c));
      @(posedge clk); #1;
    end
    chk(!out_valid && ready, "idle after 15 cycles");
    // lower stage 1 coefficients
    for (int p = 0; p < 16; p++) begin
      chk(val(seen[6][p].top) == t2a[p] && val(seen[6][p].bot) == t2b[p] &&
          pmask(seen[6][p].psel) == 15, $sformatf("first stage coefficients of g%0d", 16 + p));
    end
    // lower partner lines
    for (int s = 0; s < 7; s++)
      for (int p = 0; p < 16; p++) begin
        if (t1lo[p][s] < 0)
          chk(val(seen[6 + s][p].top) == 256 && val(seen[6 + s][p].bot) == 0,
              $sformatf("lower stage %0d PE%0d pass", s + 1, p));
        else
          chk(val(seen[6 + s][p].bot) != 0 && (p ^ pmask(seen[6 + s][p].psel)) == t1lo[p][s],
              $sformatf("lower stage %0d PE%0d partner", s + 1, p));
      end
    // upper partner lines, in order over the non-pass stages
    for (int p = 0; p < 16; p++) begin
      int k = 0;
      for (int s = 0; s < 6 && k < 4; s++) begin
        if (val(seen[s][p].bot) != 0) begin
          if (t1up[p][k] >= 0)
            chk((p ^ pmask(seen[s][p].psel)) == t1up[p][k], $sformatf("upper PE%0d stage %0d", p, s + 1));
          k++;
        end
      end
    end
    // last stage: own line (D) minus partner p^15
    for (int p = 0; p < 16; p++)
      chk(val(seen[13][p].top) == 256 && val(seen[13][p].bot) == -256 && pmask(seen[13][p].psel) == 15,
          "last stage control");
    // ---- 16-point vector, with an output stall ----
    start = 1'b1; size32_i = 1'b0; out_ready = 1'b0;
    @(posedge clk); #1 start = 1'b0;
    for (int c = 0; c < 7; c++) begin
      chk(cap16 == (c == 5), $sformatf("cap16 at %0d", c));
      chk(from_input == (c == 0), $sformatf("16: from_input at %0d", c));
      chk(!load_d && !final_step, "16: no D, no last stage");
      chk(out_valid == (c == 6), $sformatf("16: out_valid at %0d", c));
      @(posedge clk); #1;
    end
    chk(out_valid && !ready, "stall holds the result");
    out_ready = 1'b1;
    #1 chk(ready, "ready once accepted");
    @(posedge clk); #1;
    chk(!out_valid, "released");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
