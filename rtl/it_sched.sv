// it_sched -- transform-unit scheduler of the 2-D inverse transform.
//
// Decides, every cycle, whether the transpose buffer takes the vertical
// unit's finished 1-D line (write), hands a line to the horizontal unit
// (read), or both, so that the 1-D pass of TU n+1 runs while the 2-D pass of
// TU n reads the same buffer:
//   * The TU being read ("R") was written along one axis and is read along
//     the other; the TU being written ("W") uses R's read axis, so a write and
//     a read in one cycle are one shift of the array.
//   * While R still has unread lines and W has lines in the buffer, a line
//     may only move in together with a line moving out (otherwise a line would
//     be pushed off the edge): the two units then run in lock step.
//   * A read with no W line in the buffer, and a write once R is empty, are
//     single shifts.
//   * A TU becomes readable the cycle after its last line is written (the
//     line written last must first reach the array).  Behind processing
//     units that deliver a line every 15 cycles, this one-cycle wait makes a
//     32x32 TU take 481 cycles in steady state (480 + 1), the rate the
//     document reports.
//   * A TU of the other size waits until the buffer holds no unread line.
// The first TU is written along AX_COL (lines enter on the left and shift
// right) and read along AX_ROW (top row out, shift up), as the document
// describes; the axes then alternate from TU to TU.  A line read along
// AX_ROW has its elements in reverse order (rd_rev), and its row index is
// the read count; along AX_COL the row index counts down.
module it_sched
  import hevc_it_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       v_valid,   // vertical unit offers a 1-D line
  input  logic       v_size32,  // its TU size
  input  logic       h_ready,   // horizontal unit can take a line
  output logic       wr,        // line written (also the vertical unit's out_ready)
  output logic       rd,        // line read (also the horizontal unit's start)
  output logic       shift,
  output axis_e      axis,
  output logic       size32,    // buffer geometry of this cycle
  output logic       rd_rev,    // read line elements are in reverse order
  output logic [4:0] rd_idx,    // output row index of the line read
  output logic       rd_size32
);
  logic [5:0] r_left;     // unread lines of R
  logic [4:0] r_cnt;      // lines of R read so far
  logic       r_size32;
  axis_e      r_axis;
  logic [5:0] w_cnt;      // lines of W written
  logic       w_size32;
  logic       w_full;     // W complete, waiting to become R
  axis_e      nxt_axis;   // write axis of W

  logic       r_act;
  logic [5:0] w_lines;

  logic       w_done, r_empty_nxt;

  assign r_act       = (r_left != '0);
  assign w_done      = wr && (w_cnt + 6'd1 == (v_size32 ? 6'd32 : 6'd16));
  assign r_empty_nxt = !r_act || (rd && r_left == 6'd1);
  assign w_lines = w_size32 ? 6'd32 : 6'd16;

  always_comb begin
    rd = 1'b0;
    wr = 1'b0;
    if (r_act) begin
      if (w_cnt == '0 && !w_full) begin
        rd = h_ready;
        wr = rd && v_valid && (v_size32 == r_size32);
      end else begin
        rd = h_ready && v_valid && !w_full;
        wr = rd;
      end
    end else begin
      wr = v_valid && !w_full;
    end
    shift     = rd || wr;
    axis      = r_act ? r_axis : nxt_axis;
    size32    = r_act ? r_size32 : ((w_cnt == '0) ? v_size32 : w_size32);
    rd_rev    = (r_axis == AX_ROW);
    rd_idx    = (r_axis == AX_ROW) ? r_cnt
              : 5'((r_size32 ? 6'd31 : 6'd15) - {1'b0, r_cnt});
    rd_size32 = r_size32;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      r_left   <= '0;
      r_cnt    <= '0;
      r_size32 <= 1'b0;
      r_axis   <= AX_ROW;
      w_cnt    <= '0;
      w_size32 <= 1'b0;
      w_full   <= 1'b0;
      nxt_axis <= AX_COL;
    end else begin
      if (rd) begin
        r_left <= r_left - 6'd1;
        r_cnt  <= r_cnt + 5'd1;
      end
      if (wr) begin
        if (w_cnt == '0) w_size32 <= v_size32;
        w_cnt <= w_cnt + 6'd1;
      end
      // a complete W becomes R as soon as R is empty
      if ((w_done && r_empty_nxt) || (w_full && !r_act)) begin
        r_left   <= w_full ? w_lines : (v_size32 ? 6'd32 : 6'd16);
        r_cnt    <= '0;
        r_size32 <= w_full ? w_size32 : v_size32;
        r_axis   <= (nxt_axis == AX_COL) ? AX_ROW : AX_COL;
        nxt_axis <= (nxt_axis == AX_COL) ? AX_ROW : AX_COL;
        w_cnt    <= '0;
        w_full   <= 1'b0;
      end else if (w_done) begin
        w_full   <= 1'b1;
      end
    end
  end

  // a W line may only enter while R has lines if it has R's size (both
  // properties are vacuous in reset, where r_left and w_cnt are zero)
  a_size_mix: assert property (@(posedge clk)
    (wr && r_act) |-> (v_size32 == r_size32));
  a_size_tu: assert property (@(posedge clk)
    (wr && w_cnt != '0) |-> (v_size32 == w_size32));
endmodule
