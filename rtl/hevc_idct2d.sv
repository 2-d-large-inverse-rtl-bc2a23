// hevc_idct2d -- 2-D 16x16 / 32x32 HEVC large inverse transform.
//
// Two 1-D processing units share one 32x32 transpose buffer (it_tbuf):
//   vertical unit   : 1-D inverse transform of each input column of a TU;
//                     its result line goes into the transpose buffer;
//   horizontal unit : 1-D inverse transform of each line read back from the
//                     buffer, i.e. of each row of the column-transformed TU.
// The scheduler (it_sched) overlaps the vertical pass of TU n+1 with the
// horizontal pass of TU n.  A 32x32 TU takes 32 x 15 cycles per pass and
// TUs follow each other every 481 cycles; a 16x16 TU uses 16 x 7 cycles per
// pass.
//
// Input: one column of coefficients per handshake (in_valid & in_ready),
// columns 0..N-1 of a TU in order, in_col[i] = coefficient of row i (only
// [0..15] used for 16x16), in_size32 constant over a TU.
// Output: one row of the 2-D result per out_valid pulse (no back-pressure):
// out_row[j] = sample (out_row_idx, j).  Rows of a TU come out in ascending
// or descending index order, alternating from TU to TU with the buffer axis.
// Vertical results are saturated to BW bits before the buffer (the document
// does not give the word widths; 16 bits is this design's choice).
module hevc_idct2d
  import hevc_it_pkg::*;
#(
  parameter int IN_W = 16,   // coefficient width
  parameter int BW   = 16,   // transpose-buffer word width
  parameter int W    = 24    // processing-unit data width (output width)
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   in_valid,
  output logic                   in_ready,
  input  logic                   in_size32,
  input  logic signed [IN_W-1:0] in_col [32],
  output logic                   out_valid,
  output logic                   out_size32,
  output logic [4:0]             out_row_idx,
  output logic signed [W-1:0]    out_row [32]
);
  // vertical unit
  logic                v_valid, v_size32;
  logic signed [W-1:0] v_y [32];
  // scheduler / buffer
  logic                wr, rd, shift, bsize32, rd_rev, rd_size32;
  axis_e               axis;
  logic [4:0]          rd_idx;
  logic signed [BW-1:0] b_in  [32];
  logic signed [BW-1:0] b_out [32];
  // horizontal unit
  logic                h_ready;
  logic signed [IN_W-1:0] h_x [32];
  logic [4:0]          h_idx;

  it_pu #(.IN_W(IN_W), .W(W)) u_vpu (
    .clk, .rst_n,
    .start     (in_valid),
    .size32_i  (in_size32),
    .x         (in_col),
    .ready     (in_ready),
    .out_valid (v_valid),
    .out_ready (wr),
    .out_size32(v_size32),
    .y         (v_y)
  );

  // saturate the 1-D results to the buffer width
  localparam logic signed [W-1:0] BMAX = W'((64'sd1 <<< (BW - 1)) - 1);
  localparam logic signed [W-1:0] BMIN = -BMAX - W'(1);
  always_comb begin
    for (int i = 0; i < 32; i++) begin
      if (v_y[i] > BMAX)      b_in[i] = BW'(BMAX);
      else if (v_y[i] < BMIN) b_in[i] = BW'(BMIN);
      else                    b_in[i] = BW'(v_y[i]);
    end
  end

  it_sched u_sched (
    .clk, .rst_n,
    .v_valid, .v_size32, .h_ready,
    .wr, .rd, .shift, .axis, .size32(bsize32), .rd_rev, .rd_idx, .rd_size32
  );

  it_tbuf #(.BW(BW), .N(32)) u_tbuf (
    .clk, .shift, .axis, .size32(bsize32), .wr_en(wr), .wr_line(b_in), .rd_line(b_out)
  );

  // line read out of the buffer, in natural element order
  always_comb begin
    for (int j = 0; j < 32; j++) begin
      if (!rd_rev)        h_x[j] = IN_W'(b_out[j]);
      else if (rd_size32) h_x[j] = IN_W'(b_out[31 - j]);
      else                h_x[j] = (j < 16) ? IN_W'(b_out[15 - j]) : '0;
    end
  end

  it_pu #(.IN_W(IN_W), .W(W)) u_hpu (
    .clk, .rst_n,
    .start     (rd),
    .size32_i  (rd_size32),
    .x         (h_x),
    .ready     (h_ready),
    .out_valid (out_valid),
    .out_ready (1'b1),
    .out_size32(out_size32),
    .y         (out_row)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  h_idx <= '0;
    else if (rd) h_idx <= rd_idx;
  end
  assign out_row_idx = h_idx;
endmodule
