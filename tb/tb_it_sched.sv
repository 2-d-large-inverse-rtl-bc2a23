// tb_it_sched -- self-checking testbench of the TU scheduler, run together
// with the transpose buffer it controls.
//
// A producer stands in for the vertical unit: it offers the 1-D lines
// (columns) of a list of TUs of mixed size, with random gaps; a consumer
// stands in for the horizontal unit with a random ready.  Element r of
// column c of TU t carries a tag of (t, c, r).  For every line read the
// testbench checks that
//   * it belongs to the oldest unread TU, with that TU's size,
//   * every row index of the TU is read exactly once,
//   * element j of the row (after undoing the reversed order of AX_ROW reads)
//     is tag(t, j, row), i.e. the buffer really transposed the TU,
//   * a TU is never read in the cycle its last column is written (its last
//     line reaches the array only at that edge), and the write axis
//     alternates from TU to TU.
// A final full-rate phase (producer and consumer always ready) checks that
// the buffer then moves one line per cycle: 32x32 TUs follow each other every
// 32 cycles, each TU read in lock step with the writing of the next.
module tb_it_sched;
  import hevc_it_pkg::*;

  localparam int NTU = 24;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic v_valid, v_size32, h_ready;
  logic wr, rd, shift, size32, rd_rev, rd_size32;
  axis_e axis;
  logic [4:0] rd_idx;
  logic signed [15:0] b_in  [32];
  logic signed [15:0] b_out [32];

  it_sched dut (.*);
  it_tbuf #(.BW(16), .N(32)) u_tbuf (
    .clk, .shift, .axis, .size32, .wr_en(wr), .wr_line(b_in), .rd_line(b_out)
  );

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  bit tu_s32 [NTU];
  bit full_rate = 1'b0;

  function automatic logic signed [15:0] tag(input int t, input int c, input int r);
    return 16'(((t % 32) * 1024 + c * 32 + r) % 32768);
  endfunction

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 12) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // producer state
  int pt = 0, pc = 0;
  // consumer state
  int ct = 0, cn = 0;
  bit seen [32];
  int last_wr_done_cyc = -10;
  int cyc = 0;
  axis_e prev_axis;
  int tu_wr_axis_checks = 0;
  int first_rd_cyc [NTU];

  always_comb begin
    v_size32 = (pt < NTU) ? tu_s32[pt] : 1'b1;
    for (int r = 0; r < 32; r++) b_in[r] = tag(pt, pc, r);
  end

  always @(posedge clk) begin
    if (rst_n) begin
      cyc++;
      // ---- read side ----
      if (rd) begin
        int n;
        n = tu_s32[ct] ? 32 : 16;
        chk(ct < NTU, "read beyond last TU");
        chk(rd_size32 == tu_s32[ct], "read size");
        chk(!seen[rd_idx] && rd_idx < n, "row index repeated or out of range");
        seen[rd_idx] = 1'b1;
        if (cn == 0) begin
          chk(cyc > last_wr_done_cyc[31:0] || ct != pt - 1 || pc != 0, "read in write-done cycle");
          first_rd_cyc[ct] = cyc;
        end
        for (int j = 0; j < n; j++) begin
          logic signed [15:0] e, g;
          e = tag(ct, j, rd_idx);
          g = rd_rev ? b_out[n - 1 - j] : b_out[j];
          chk(g == e, $sformatf("data tu %0d row %0d col %0d got %0d exp %0d", ct, rd_idx, j, g, e));
        end
        cn++;
        if (cn == n) begin
          cn = 0; ct++;
          foreach (seen[i]) seen[i] = 1'b0;
        end
      end
      // ---- write side ----
      if (wr) begin
        if (pc == 0) begin
          if (pt > 0) chk(axis != prev_axis, "write axis alternates");
          prev_axis = axis;
        end
        pc++;
        if (pc == (tu_s32[pt] ? 32 : 16)) begin
          pc = 0; pt++;
          last_wr_done_cyc = cyc;
        end
      end
      v_valid <= (pt < NTU) && (full_rate || ($urandom_range(0, 3) != 0));
      h_ready <= full_rate || ($urandom_range(0, 4) != 0);
    end
  end

  initial begin
    for (int t = 0; t < NTU; t++) tu_s32[t] = (t < 6) ? 1'b1 : ((t < 18) ? 1'($urandom_range(0, 1)) : 1'b1);
    tu_s32[6] = 1'b0; tu_s32[7] = 1'b0; tu_s32[8] = 1'b1;
    v_valid = 1'b0; h_ready = 1'b0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    wait (pt == 18);
    full_rate = 1'b1;
    wait (ct == NTU);
    repeat (3) @(posedge clk);
    chk(pt == NTU && pc == 0, "all lines written");
    // steady state period of the full-rate 32x32 TUs
    for (int t = 21; t < NTU; t++)
      chk(first_rd_cyc[t] - first_rd_cyc[t - 1] == 32,
          $sformatf("TU period %0d exp 32", first_rd_cyc[t] - first_rd_cyc[t - 1]));
    $display("TU periods at full rate: %0d %0d %0d", first_rd_cyc[21] - first_rd_cyc[20],
             first_rd_cyc[22] - first_rd_cyc[21], first_rd_cyc[23] - first_rd_cyc[22]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog: pt=%0d ct=%0d", pt, ct);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
