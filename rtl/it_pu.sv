// it_pu -- processing unit: one 1-D 16- or 32-point inverse transform per
// 7 or 15 cycles with 16 reused processing elements.
//
// On start the 32 input values x[] are latched (for a 16-point vector only
// x[0..15] are used).  The sequencer then drives the PEs through the upper
// part (the 16-point transform of the even inputs, 6 stages), then, for a
// 32-point vector, saves that result in register D and runs the lower part
// (odd inputs, 7 stages).  The last 32-point stage forms both halves at once:
//     y[q]      = D[q] + L[15-q]   (adder after D)
//     y[31 - q] = D[q] - L[15-q]   (PE q)
// where L[] is the lower-part result.  A 16-point result is y[0..15], with
// y[16..31] = 0.  Results wait in an output register while out_valid is high
// until out_ready (handshake of this design).  Inputs and outputs are in
// natural order; the bit-reversed placement on the PE lines is internal.
// Arithmetic is W bits wide and is not saturated (W = 24 holds any 1-D
// transform of 16-bit inputs).
module it_pu
  import hevc_it_pkg::*;
#(
  parameter int IN_W = 16,
  parameter int W    = 24
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   start,
  input  logic                   size32_i,  // 1: 32-point, 0: 16-point
  input  logic signed [IN_W-1:0] x [32],
  output logic                   ready,
  output logic                   out_valid,
  input  logic                   out_ready,
  output logic                   out_size32,
  output logic signed [W-1:0]    y [32]
);
  stage_ctrl_t ctrl;
  logic step_en, from_input, lower_in, load_d, final_step, cap16, size32;

  logic signed [IN_W-1:0] xin  [32];
  logic signed [W-1:0]    iv   [NPE];   // input value on each PE line
  logic signed [W-1:0]    xq   [NPE];   // PE feedback registers
  logic signed [W-1:0]    xc   [NPE];   // PE results this cycle
  logic signed [W-1:0]    d    [NPE];   // register D
  logic signed [W-1:0]    yo   [32];

  it_pu_seq u_seq (
    .clk, .rst_n, .start, .size32_i, .out_ready, .ready, .size32, .ctrl,
    .step_en, .from_input, .lower_in, .load_d, .final_step, .cap16, .out_valid
  );

  always_ff @(posedge clk) begin
    if (start && ready) xin <= x;
  end

  // input placement on the PE lines (bit-reversed orders of hevc_it_pkg)
  always_comb begin
    for (int p = 0; p < NPE; p++) begin
      if (lower_in)    iv[p] = W'(xin[lo_idx(p)]);
      else if (size32) iv[p] = W'(xin[up_idx(p)]);
      else             iv[p] = W'(xin[up_idx(p) / 2]);
    end
  end

  for (genvar p = 0; p < NPE; p++) begin : g_pe
    logic signed [W-1:0] in_part [4];
    logic signed [W-1:0] fb_part [4];
    assign in_part = '{iv[p ^ 1], iv[p ^ 3], iv[p ^ 7], iv[p ^ 15]};
    assign fb_part = '{xq[p ^ 1], xq[p ^ 3], xq[p ^ 7], xq[p ^ 15]};

    it_pe #(.W(W), .NT_TOP(nt_top(p)), .NT_BOT(nt_bot(p))) u_pe (
      .clk, .rst_n,
      .step_en   (step_en && !final_step),
      .from_input(from_input),
      .use_d     (final_step),
      .ctrl      (ctrl[p]),
      .in_self   (iv[p]),
      .d_self    (d[p]),
      .in_part   (in_part),
      .fb_part   (fb_part),
      .y_q       (xq[p]),
      .y_c       (xc[p])
    );

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n)      d[p] <= '0;
      else if (load_d) d[p] <= xq[p];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < 32; i++) yo[i] <= '0;
    end else if (final_step) begin
      for (int q = 0; q < NPE; q++) begin
        yo[q]      <= d[q] + xq[q ^ 15];
        yo[31 - q] <= xc[q];
      end
    end else if (cap16) begin
      for (int q = 0; q < NPE; q++) begin
        yo[q]      <= xc[q];
        yo[q + 16] <= '0;
      end
    end
  end

  assign y          = yo;
  assign out_size32 = size32;
endmodule
