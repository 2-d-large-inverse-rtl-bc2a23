// it_tbuf -- 32x32 shift-register transpose buffer shared by the two
// processing units.
//
// The array R[row][col] moves one line per operation along one axis:
//   AX_COL: the line written enters the left column (R[i][c0] <= wr_line[i])
//           and every cell moves one column right; the right column is the
//           line read out (rd_line[i] = R[i][31]).
//   AX_ROW: the line written enters the bottom row (R[rb][c0+i] <= wr_line[i])
//           and every cell moves one row up; the top row is the line read out
//           (rd_line[i] = R[0][c0+i]).
// A write and a read in the same cycle are one shift.  A TU (transform unit)
// written along one axis comes out transposed when read along the other, and
// the next TU can be written along the axis the current one is read on, so one
// buffer serves both processing units at once.  The right/up shifts, the
// 1-D lines entering on the left or at the bottom and the 2-D lines leaving at
// the top or on the right follow the document's buffer drawing; alternating
// the axes from TU to TU is this design's reading of it.
// For 16x16 transforms only the top-right 16x16 quarter is used (c0 = 16,
// rb = 15; rd_line[15:0]), as in the document.  The array has no reset; every
// read line has been written first.
// Timing: rd_line is combinational from the array and shows the line that the
// next shift (on the rising clock edge with shift = 1) pushes out; wr_line is
// taken on that same edge.
module it_tbuf
  import hevc_it_pkg::*;
#(
  parameter int BW = 16,   // word width
  parameter int N  = 32    // array side
) (
  input  logic                 clk,
  input  logic                 shift,    // one line moves in (and out)
  input  axis_e                axis,
  input  logic                 size32,   // 0: use the top-right N/2 x N/2 quarter
  input  logic                 wr_en,    // wr_line enters (else zeros)
  input  logic signed [BW-1:0] wr_line [N],
  output logic signed [BW-1:0] rd_line [N]
);
  localparam int H = N / 2;

  logic signed [BW-1:0] r  [N][N];
  logic signed [BW-1:0] wv [N];     // line entering (zeros when not writing)

  always_comb begin
    for (int i = 0; i < N; i++) wv[i] = wr_en ? wr_line[i] : '0;
  end

  // Each cell's two possible sources are fixed by its position; only the
  // cells on the quarter's entry edges also depend on size32.
  for (genvar i = 0; i < N; i++) begin : g_row
    for (genvar c = 0; c < N; c++) begin : g_col
      localparam bit IN_Q = (i < H) && (c >= H);   // inside the 16x16 quarter
      logic signed [BW-1:0] from_left, from_below;

      if (c == 0) begin : g_l0
        assign from_left = wv[i];
      end else if (c == H) begin : g_lh
        assign from_left = size32 ? r[i][c - 1] : wv[i];
      end else begin : g_l
        assign from_left = r[i][c - 1];
      end

      if (i == N - 1) begin : g_b0
        assign from_below = wv[c];
      end else if (i == H - 1 && IN_Q) begin : g_bh
        assign from_below = size32 ? r[i + 1][c] : wv[c - H];
      end else begin : g_b
        assign from_below = r[i + 1][c];
      end

      always_ff @(posedge clk) begin
        if (shift && (size32 || IN_Q))
          r[i][c] <= (axis == AX_COL) ? from_left : from_below;
      end
    end
  end

  always_comb begin
    for (int i = 0; i < N; i++) begin
      if (axis == AX_COL) rd_line[i] = r[i][N - 1];
      else if (size32)    rd_line[i] = r[0][i];
      else                rd_line[i] = (i < H) ? r[0][i + H] : '0;
    end
  end
endmodule
