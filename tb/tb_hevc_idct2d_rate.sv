// tb_hevc_idct2d_rate -- throughput of the 2-D inverse transform under the
// frame-rate workloads it is sized for, at default parameters.
//
// Streams 32x32 TUs in three phases and measures the steady-state interval
// between the acceptance of the first columns of consecutive TUs (output
// rows of a TU leave in lock step with the next TU's input, so the input
// side sets the pace):
//   * no stall                 : expect 481 cycles per TU (2.1289 samples/cycle);
//   * 50% of the time stalled  : whenever the transform is ready for the next
//                                column, the column is withheld for 15 cycles
//                                (15 working + 15 stalled cycles per column);
//   * 20% of the time stalled  : the same 15-cycle stall before every fourth
//                                column (15 of 75 cycles).
// From each measured interval it works out the clock needed for 3840x2160
// video (248,832,000 samples/s at 30 frames/s, twice that at 60) and checks
// it against a 300 MHz clock: 4K@30 must fit without stall and with 50%
// stall, 4K@60 with 20% stall.  A fourth phase of 16x16 TUs at full rate
// checks their 113-cycle period (16 columns x 7 cycles + 1).  Every output row is also checked against an
// independent 2-D reference (columns, 16-bit saturation, rows) so the rate
// is that of correct results.
module tb_hevc_idct2d_rate;
  import it_ref_pkg::*;

  localparam int NPH   = 4;     // phases (the last one 16x16)
  localparam int TUPH  = 4;     // TUs per phase
  localparam int NTU   = NPH * TUPH;
  localparam real FCLK = 300.0e6;
  localparam real PIX30 = 3840.0 * 2160.0 * 30.0;

  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid, in_ready, in_size32, out_valid, out_size32;
  logic signed [15:0] in_col [32];
  logic [4:0]         out_row_idx;
  logic signed [23:0] out_row [32];

  hevc_idct2d dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint cyc = 0;
  longint coef [NTU][32][32];     // [tu][col][row]
  longint expd [NTU][32][32];     // [tu][row][col]
  longint tu_start [NTU];

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", msg);
    end
  endtask

  function automatic longint sat16(input longint v);
    return (v > 32767) ? 32767 : ((v < -32768) ? -32768 : v);
  endfunction

  // reference: columns (1-D), saturate, rows (1-D)
  function automatic void idct_n(input bit s32, input longint x [32], output longint y [32]);
    longint a [16], b [16];
    if (s32) idct32(x, y);
    else begin
      for (int i = 0; i < 16; i++) a[i] = x[i];
      idct16(a, b);
      for (int i = 0; i < 32; i++) y[i] = (i < 16) ? b[i] : 0;
    end
  endfunction

  task automatic make_ref(input int t, input bit s32);
    longint x [32], y [32];
    longint mid [32][32];   // [row][col]
    for (int c = 0; c < 32; c++) begin
      for (int r = 0; r < 32; r++) x[r] = coef[t][c][r];
      idct_n(s32, x, y);
      for (int r = 0; r < 32; r++) mid[r][c] = sat16(y[r]);
    end
    for (int r = 0; r < 32; r++) begin
      for (int c = 0; c < 32; c++) x[c] = mid[r][c];
      idct_n(s32, x, y);
      for (int c = 0; c < 32; c++) expd[t][r][c] = y[c];
    end
  endtask

  always @(posedge clk) cyc <= cyc + 1;

  // output monitor
  int orow = 0, otu = 0;
  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      bit ok;
      ok = (out_size32 == (otu < 3 * TUPH));
      for (int c = 0; c < 32; c++)
        if (longint'(out_row[c]) != expd[otu][out_row_idx][c]) ok = 1'b0;
      chk(ok, $sformatf("tu %0d row %0d: got %0d %0d exp %0d %0d", otu, out_row_idx,
                        out_row[0], out_row[1], expd[otu][out_row_idx][0], expd[otu][out_row_idx][1]));
      orow++;
      if (orow == ((otu < 3 * TUPH) ? 32 : 16)) begin
        orow = 0;
        otu++;
      end
    end
  end

  initial begin
    in_valid = 1'b0; in_size32 = 1'b1;
    foreach (in_col[i]) in_col[i] = '0;
    for (int t = 0; t < NTU; t++) begin
      int n;
      n = (t < 3 * TUPH) ? 32 : 16;
      for (int c = 0; c < 32; c++)
        for (int r = 0; r < 32; r++)
          coef[t][c][r] = (r + c < 12 && r < n && c < n) ? longint'($urandom_range(0, 400)) - 200 : 0;
      make_ref(t, n == 32);
    end
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    @(posedge clk); #1;
    // inputs change 1 time unit after a clock edge; in_ready is sampled at
    // the falling edge, before the edge that takes the column
    for (int t = 0; t < NTU; t++) begin
      int ph;
      ph = t / TUPH;
      for (int c = 0; c < ((ph < 3) ? 32 : 16); c++) begin
        bit acc;
        in_valid  = 1'b1;
        in_size32 = (ph < 3);
        for (int r = 0; r < 32; r++) in_col[r] = 16'(coef[t][c][r]);
        do begin
          @(negedge clk) acc = in_ready;
          @(posedge clk);
          if (acc && c == 0) tu_start[t] = cyc;
          #1;
        end while (!acc);
        in_valid = 1'b0;
        // a stall: once the transform asks for the next column, withhold it
        // for 15 cycles (as long as the unit works on one column)
        if (ph == 1 || (ph == 2 && c % 4 == 3)) begin
          do @(negedge clk); while (!in_ready);
          repeat (15) @(posedge clk);
          #1;
        end
      end
    end
    wait (otu == NTU);
    begin
      string nm [3];
      real need [3];
      nm = '{"4K@30, no stall", "4K@30, 50% stall", "4K@60, 20% stall"};
      for (int ph = 0; ph < NPH - 1; ph++) begin
        longint iv;
        real spc, mhz;
        // interval between two TUs inside the phase (steady state)
        iv  = tu_start[ph * TUPH + 2] - tu_start[ph * TUPH + 1];
        spc = 1024.0 / real'(iv);
        mhz = PIX30 * ((ph == 2) ? 2.0 : 1.0) / spc / 1.0e6;
        need[ph] = mhz;
        $display("%s: %0d cycles per 32x32 TU, %f samples/cycle, needs %f MHz",
                 nm[ph], iv, spc, mhz);
        chk(mhz <= FCLK / 1.0e6, $sformatf("%s does not fit 300 MHz", nm[ph]));
        if (ph == 0) chk(iv == 481, $sformatf("no-stall interval %0d, expected 481", iv));
        if (ph == 1) chk(iv >= 2 * 480 && iv <= 2 * 480 + 40, $sformatf("50%% stall interval %0d, expected about 960", iv));
        if (ph == 2) chk(iv >= 600 && iv <= 610, $sformatf("20%% stall interval %0d, expected about 601", iv));
      end
    end
    // 16x16 TUs at full rate: 16 columns x 7 cycles + 1
    begin
      longint iv;
      iv = tu_start[3 * TUPH + 2] - tu_start[3 * TUPH + 1];
      $display("16x16, no stall: %0d cycles per TU", iv);
      chk(iv == 113, $sformatf("16x16 interval %0d, expected 113", iv));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog: %0d TUs out", otu);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
