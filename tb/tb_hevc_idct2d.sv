// tb_hevc_idct2d -- end-to-end testbench of the 2-D inverse transform at its
// default parameters.
//
// Streams a sequence of 32x32 and 16x16 transform units (TUs) with random,
// partly sparse coefficients and compares every output row with a reference
// 2-D transform built from it_ref_pkg (columns first, results saturated to
// 16 bits, then rows).  It checks:
//   * every sample of every row, the row indices and the size tag;
//   * that 32x32 TUs fed without gaps come out every 481 cycles;
//   * that each mechanism of the design happened: lock-step write+read
//     shifts, write-only and read-only shifts, reads along both buffer axes,
//     vertical-unit stalls, input gaps, 16/32 size switches and saturation of
//     the 1-D results.
module tb_hevc_idct2d;
  import it_ref_pkg::*;

  localparam int NTU = 14;

  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid, in_ready, in_size32, out_valid, out_size32;
  logic signed [15:0] in_col [32];
  logic [4:0]         out_row_idx;
  logic signed [23:0] out_row [32];

  hevc_idct2d dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic fail(input string msg);
    failures++;
    if (failures < 12) $display("FAIL @%0d: %s", cyc, msg);
  endtask

  // TU list: size and input-gap behaviour
  bit     tu_s32 [NTU] = '{1, 1, 1, 1, 0, 0, 0, 1, 0, 1, 1, 0, 1, 1};
  bit     tu_gap [NTU] = '{0, 0, 0, 0, 0, 0, 1, 0, 0, 1, 0, 0, 0, 0};
  int     tu_amp [NTU] = '{300, 60, 2000, 30000, 200, 8000, 100, 500, 30000, 50, 400, 900, 1000, 64};
  longint coef [NTU][32][32];    // [tu][row][col]
  longint expo [NTU][32][32];    // expected output [tu][row][col]

  function automatic longint sat16(input longint v);
    return (v > 32767) ? 32767 : (v < -32768) ? -32768 : v;
  endfunction

  int nsat = 0;
  task automatic make_tu(input int t);
    int n;
    longint col [32], res [32], ce [16], re [16];
    longint mid [32][32];   // [row][col] after the vertical pass
    n = tu_s32[t] ? 32 : 16;
    for (int r = 0; r < 32; r++)
      for (int c = 0; c < 32; c++) begin
        coef[t][r][c] = 0;
        if (r < n && c < n && ($urandom_range(0, 3) == 0 || (r < 4 && c < 4)))
          coef[t][r][c] = longint'($urandom_range(0, 2 * tu_amp[t])) - tu_amp[t];
      end
    for (int c = 0; c < n; c++) begin
      for (int r = 0; r < 32; r++) col[r] = coef[t][r][c];
      if (n == 32) idct32(col, res);
      else begin
        for (int r = 0; r < 16; r++) ce[r] = col[r];
        idct16(ce, re);
        for (int r = 0; r < 16; r++) res[r] = re[r];
      end
      for (int r = 0; r < n; r++) begin
        mid[r][c] = sat16(res[r]);
        if (mid[r][c] != res[r]) nsat++;
      end
    end
    for (int r = 0; r < n; r++) begin
      for (int c = 0; c < 32; c++) col[c] = (c < n) ? mid[r][c] : 0;
      if (n == 32) idct32(col, res);
      else begin
        for (int c = 0; c < 16; c++) ce[c] = col[c];
        idct16(ce, re);
        for (int c = 0; c < 16; c++) res[c] = re[c];
      end
      for (int c = 0; c < 32; c++) expo[t][r][c] = (c < n) ? res[c] : 0;
    end
  endtask

  // driver
  int ngap = 0;
  initial begin
    in_valid = 1'b0; in_size32 = 1'b0;
    foreach (in_col[i]) in_col[i] = '0;
    for (int t = 0; t < NTU; t++) make_tu(t);
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk);
    for (int t = 0; t < NTU; t++) begin
      int n;
      n = tu_s32[t] ? 32 : 16;
      for (int c = 0; c < n; c++) begin
        if (tu_gap[t] && $urandom_range(0, 2) == 0) begin
          in_valid = 1'b0;
          ngap++;
          repeat ($urandom_range(1, 40)) @(posedge clk);
        end
        for (int r = 0; r < 32; r++) in_col[r] = 16'(coef[t][r][c]);
        in_size32 = tu_s32[t];
        in_valid  = 1'b1;
        @(posedge clk);
        while (!in_ready) @(posedge clk);
      end
    end
    in_valid = 1'b0;
  end

  // mechanism counters (taken from the design's internal handshakes)
  int n_both = 0, n_wonly = 0, n_ronly = 0, n_rd_row = 0, n_rd_col = 0, n_vstall = 0, n_switch = 0;
  bit last_rsize = 1'b1;
  always @(posedge clk) if (rst_n) begin
    if (dut.wr && dut.rd)  n_both++;
    if (dut.wr && !dut.rd) n_wonly++;
    if (!dut.wr && dut.rd) n_ronly++;
    if (dut.rd && dut.axis == hevc_it_pkg::AX_ROW) n_rd_row++;
    if (dut.rd && dut.axis == hevc_it_pkg::AX_COL) n_rd_col++;
    if (dut.v_valid && !dut.wr) n_vstall++;
    if (dut.rd && dut.rd_size32 != last_rsize) begin
      n_switch++;
      last_rsize = dut.rd_size32;
    end
  end

  // output monitor
  int     otu = 0;
  int     nrows = 0;
  logic [31:0] seen;
  int     first_idx;
  longint tu_first_out [NTU];
  always @(posedge clk) if (rst_n && out_valid && otu < NTU) begin
    int n;
    n = tu_s32[otu] ? 32 : 16;
    if (nrows == 0) begin
      seen = '0;
      first_idx = out_row_idx;
      tu_first_out[otu] = cyc;
      checks++;
      if (out_row_idx != 0 && out_row_idx != 5'(n - 1)) fail("first row index");
    end
    checks++;
    if (out_size32 != tu_s32[otu]) fail($sformatf("TU %0d size tag", otu));
    checks++;
    if (int'(out_row_idx) >= n || seen[out_row_idx]) fail($sformatf("TU %0d row index %0d", otu, out_row_idx));
    else begin
      // rows come out monotonically from the first index
      checks++;
      if (out_row_idx != ((first_idx == 0) ? 5'(nrows) : 5'(n - 1 - nrows)))
        fail($sformatf("TU %0d row order", otu));
      seen[out_row_idx] = 1'b1;
      for (int c = 0; c < 32; c++) begin
        checks++;
        if (longint'(out_row[c]) != expo[otu][out_row_idx][c])
          fail($sformatf("TU %0d row %0d col %0d: got %0d exp %0d", otu, out_row_idx, c,
                         out_row[c], expo[otu][out_row_idx][c]));
      end
    end
    nrows++;
    if (nrows == n) begin
      nrows = 0;
      otu++;
    end
  end

  // end of test
  initial begin
    wait (otu == NTU);
    repeat (5) @(posedge clk);
    // 32x32 TUs 1..3 were fed back to back: one TU every 481 cycles
    for (int t = 1; t <= 3; t++) begin
      checks++;
      if (tu_first_out[t] - tu_first_out[t - 1] != 481)
        fail($sformatf("TU interval %0d", tu_first_out[t] - tu_first_out[t - 1]));
    end
    $display("mechanisms: lockstep=%0d write_only=%0d read_only=%0d read_row_axis=%0d read_col_axis=%0d",
             n_both, n_wonly, n_ronly, n_rd_row, n_rd_col);
    $display("            vpu_stall=%0d input_gaps=%0d size_switches=%0d saturations=%0d",
             n_vstall, ngap, n_switch, nsat);
    $display("TU interval (32x32, no gaps) = %0d cycles", tu_first_out[2] - tu_first_out[1]);
    checks += 9;
    if (n_both == 0)   fail("no lock-step shift");
    if (n_wonly == 0)  fail("no write-only shift");
    if (n_ronly == 0)  fail("no read-only shift");
    if (n_rd_row == 0) fail("no read along the row axis");
    if (n_rd_col == 0) fail("no read along the column axis");
    if (n_vstall == 0) fail("no vertical-unit stall");
    if (ngap == 0)     fail("no input gap");
    if (n_switch < 2)  fail("no size switch");
    if (nsat == 0)     fail("no saturation");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("watchdog expired: %0d TUs out", otu);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
