// tb_it_pu -- self-checking testbench of the processing unit.
//
// Sends random 16- and 32-point vectors back to back, with a few gaps and
// output stalls, and compares every result with the node-by-node reference
// of it_ref_pkg.  It also checks that the reference stays close to the exact
// inverse DCT, that a 32-point vector takes 15 cycles and a 16-point vector
// 7 cycles from start to out_valid, and that back-to-back vectors are
// accepted every 15 (7) cycles.
module tb_it_pu;
  import it_ref_pkg::*;

  localparam int NVEC = 400;

  logic clk = 1'b0, rst_n = 1'b0;
  logic start, size32_i, ready, out_valid, out_ready, out_size32;
  logic signed [15:0] x [32];
  logic signed [23:0] y [32];

  int checks = 0, failures = 0;

  it_pu dut (.*);

  always #5 clk = ~clk;

  // expected results, in order
  longint exp_m [NVEC][32];
  bit     siz_m [NVEC];
  int     nput = 0;
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic fail(input string msg);
    failures++;
    if (failures < 10) $display("FAIL @%0d: %s", cyc, msg);
  endtask

  // driver
  initial begin
    longint xv [32], yv [32], ye [16], xe [16];
    start = 1'b0; size32_i = 1'b0;
    foreach (x[i]) x[i] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int v = 0; v < NVEC; v++) begin
      int amp, mode;
      bit s32;
      s32  = (v % 3 != 1);
      mode = $urandom_range(0, 3);
      amp  = (mode == 0) ? 60 : (mode == 1) ? 2000 : (mode == 2) ? 32767 : 400;
      for (int i = 0; i < 32; i++) begin
        xv[i] = (s32 || i < 16) ? longint'($signed($urandom_range(0, 2 * amp))) - amp : 0;
        if (mode == 2 && $urandom_range(0, 1) == 1) xv[i] = (i % 2 == 0) ? 32767 : -32768;
        if (!s32 && i >= 16) xv[i] = $urandom_range(0, 255);  // ignored lines
      end
      if (s32) idct32(xv, yv);
      else begin
        for (int i = 0; i < 16; i++) xe[i] = xv[i];
        idct16(xe, ye);
        for (int i = 0; i < 32; i++) yv[i] = (i < 16) ? ye[i] : 0;
      end
      // the reference approximates the exact transform
      begin
        longint sum_abs = 0;
        int npt;
        npt = s32 ? 32 : 16;
        for (int i = 0; i < npt; i++) sum_abs += (xv[i] < 0) ? -xv[i] : xv[i];
        for (int n = 0; n < npt; n++) begin
          real err;
          err = real'(yv[n]) - idct_real(xv, npt, n);
          checks++;
          if (err > 0.02 * real'(sum_abs) + 2.0 || err < -(0.02 * real'(sum_abs) + 2.0))
            fail($sformatf("reference far from exact IDCT: n=%0d err=%f", n, err));
        end
      end
      exp_m[v] = yv;
      siz_m[v] = s32;
      nput     = v + 1;
      // occasional idle gap
      if ($urandom_range(0, 9) == 0) repeat ($urandom_range(1, 20)) @(posedge clk);
      for (int i = 0; i < 32; i++) x[i] = 16'(xv[i]);
      size32_i = s32;
      start    = 1'b1;
      @(posedge clk);
      while (!ready) @(posedge clk);
      start = 1'b0;
    end
  end

  // output stalls
  always @(posedge clk) out_ready <= ($urandom_range(0, 7) != 0);

  // monitor
  int ngot = 0;
  int nstall = 0, nb2b = 0, nfull = 0;
  longint last_start = -100;
  bit     last_s32;
  bit     seen_valid = 1'b0;
  always @(posedge clk) if (rst_n) begin
    // latency: out_valid is sampled 15 (7) clock edges after start
    if (out_valid && !seen_valid) begin
      seen_valid = 1'b1;
      checks++;
      if (cyc - last_start != longint'(last_s32 ? 15 : 7))
        fail($sformatf("latency %0d", cyc - last_start));
    end
    if (start && ready) begin
      // back-to-back: a start in the out_valid cycle of the previous vector
      if (out_valid && out_ready) begin
        nb2b++;
        checks++;
        if (cyc - last_start < longint'(last_s32 ? 15 : 7))
          fail("back-to-back period");
        if (cyc - last_start == longint'(last_s32 ? 15 : 7)) nfull++;
      end
      last_start = cyc;
      last_s32   = size32_i;
      seen_valid = 1'b0;
    end
    if (out_valid && !out_ready) nstall++;
    if (out_valid && out_ready) begin
      checks++;
      if (ngot >= nput) fail("result without a started vector");
      if (out_size32 !== siz_m[ngot]) fail("size tag");
      for (int i = 0; i < 32; i++) begin
        checks++;
        if (longint'(y[i]) != exp_m[ngot][i]) fail($sformatf("vec %0d y[%0d]=%0d exp %0d", ngot, i, y[i], exp_m[ngot][i]));
      end
      ngot++;
    end
    if (ngot == NVEC) begin
      checks++;
      if (nstall == 0 || nb2b == 0 || nfull == 0) fail("stall or back-to-back never exercised");
      $display("vectors=%0d stalls=%0d back_to_back=%0d full_rate=%0d", ngot, nstall, nb2b, nfull);
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
