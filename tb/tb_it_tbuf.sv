// tb_it_tbuf -- self-checking testbench of the transpose buffer.
//
// Writes TUs of 32 (or 16) tagged lines and reads them back along the other
// axis, both as separate fill/drain phases and overlapped (the next TU
// written in the same shifts that read the current one), for the full array
// and for the 16x16 quarter.  The value of element i of written line j of TU
// t is a tag of (t, j, i), so every read element can be checked against the
// transposition it must produce:
//   written along AX_COL, k-th read along AX_ROW: element i = line N-1-i, elem k
//   written along AX_ROW, k-th read along AX_COL: element i = line i, elem N-1-k
module tb_it_tbuf;
  import hevc_it_pkg::*;

  logic clk = 1'b0;
  logic shift, size32, wr_en;
  axis_e axis;
  logic signed [15:0] wr_line [32];
  logic signed [15:0] rd_line [32];

  it_tbuf #(.BW(16), .N(32)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  function automatic logic signed [15:0] tag(input int t, input int j, input int i);
    return 16'((t * 1024 + j * 32 + i) % 32768);
  endfunction

  task automatic set_line(input int t, input int j);
    for (int i = 0; i < 32; i++) wr_line[i] = tag(t, j, i);
  endtask

  // check the line at the read edge: TU t, k-th read, written along wax
  task automatic check_read(input int t, input int k, input axis_e wax, input int n);
    for (int i = 0; i < n; i++) begin
      logic signed [15:0] e;
      e = (wax == AX_COL) ? tag(t, n - 1 - i, k) : tag(t, i, n - 1 - k);
      checks++;
      if (rd_line[i] !== e) begin
        failures++;
        if (failures < 10) $display("FAIL tu %0d read %0d elem %0d: %0d exp %0d", t, k, i, rd_line[i], e);
      end
    end
  endtask

  // one full-speed sequence of NT TUs of size n: fill, then overlapped
  // read/write, then drain
  task automatic run(input int ntu, input bit s32, input int tbase);
    int n;
    axis_e wax;
    n = s32 ? 32 : 16;
    size32 = s32;
    wax = AX_COL;
    // fill TU 0
    for (int j = 0; j < n; j++) begin
      axis = wax; shift = 1'b1; wr_en = 1'b1; set_line(tbase, j);
      @(posedge clk); #1;
    end
    shift = 1'b0; wr_en = 1'b0;
    for (int t = 0; t < ntu; t++) begin
      axis_e rax;
      rax = (wax == AX_COL) ? AX_ROW : AX_COL;
      for (int k = 0; k < n; k++) begin
        axis = rax;
        #1 check_read(tbase + t, k, wax, n);
        shift = 1'b1;
        // next TU written in the same shifts (lines 0..n-2 with reads 1..n-1)
        wr_en = (t + 1 < ntu) && (k >= 1);
        if (wr_en) set_line(tbase + t + 1, k - 1);
        @(posedge clk); #1;
      end
      if (t + 1 < ntu) begin
        // last line of the next TU: write-only shift
        axis = rax; shift = 1'b1; wr_en = 1'b1; set_line(tbase + t + 1, n - 1);
        @(posedge clk); #1;
      end
      shift = 1'b0; wr_en = 1'b0;
      wax = rax;
    end
  endtask

  initial begin
    shift = 1'b0; wr_en = 1'b0; size32 = 1'b1; axis = AX_COL;
    foreach (wr_line[i]) wr_line[i] = '0;
    @(posedge clk); #1;
    run(4, 1'b1, 0);
    run(3, 1'b0, 10);
    // idle cycles keep the contents
    run(1, 1'b1, 20);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
