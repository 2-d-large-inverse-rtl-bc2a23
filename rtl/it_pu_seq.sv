// it_pu_seq -- stage sequencer of a processing unit.
//
// Steps one 1-D vector through the butterfly stages and hands each PE its
// control word (partner select and CSD shifter controls) from the stage
// program of hevc_it_pkg, which is built at elaboration time.
//
// Cycle plan of one vector (cnt counts from 0 after start):
//   32-point (15 cycles): cnt 0..5   upper part, cnt 0 reads the even inputs
//                         cnt 6..12  lower part, cnt 6 reads the odd inputs
//                                    and copies the upper result into D
//                         cnt 13     last stage, 32 results into the output
//                                    register
//                         cnt 14     out_valid (result offered to the buffer)
//   16-point (7 cycles):  cnt 0..5   the six stages, cnt 5 also loads the
//                                    output register
//                         cnt 6      out_valid
// If out_ready is low the unit waits in its out_valid cycle (stall).  A new
// start is accepted in the out_valid cycle when out_ready is high, so vectors
// follow each other every 15 (7) cycles.  The 15-cycle period per 32-point
// vector is the document's; the split of those cycles is this design's.
module it_pu_seq
  import hevc_it_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic        size32_i,    // size of the vector being started
  input  logic        out_ready,
  output logic        ready,       // start is accepted this cycle
  output logic        size32,      // size of the vector in flight
  output stage_ctrl_t ctrl,        // control words of the 16 PEs
  output logic        step_en,     // PEs register their results
  output logic        from_input,  // PE operands come from the input vector
  output logic        lower_in,    // odd (lower) inputs are presented
  output logic        load_d,      // D <= PE registers
  output logic        final_step,  // last 32-point stage
  output logic        cap16,       // 16-point result into output register
  output logic        out_valid
);
  localparam prog_t PROG = build_prog();

  logic       run;
  logic [3:0] cnt;
  logic [3:0] last;

  assign last      = size32 ? 4'(CYC32 - 1) : 4'(CYC16 - 1);
  assign out_valid = run && (cnt == last);
  assign ready     = !run || (out_valid && out_ready);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      run    <= 1'b0;
      cnt    <= '0;
      size32 <= 1'b0;
    end else if (start && ready) begin
      run    <= 1'b1;
      cnt    <= '0;
      size32 <= size32_i;
    end else if (run) begin
      if (cnt != last)    cnt <= cnt + 4'd1;
      else if (out_ready) run <= 1'b0;
    end
  end

  always_comb begin
    step_en    = run && (cnt < last);
    final_step = run && size32 && (cnt == 4'(CYC32 - 2));
    from_input = run && ((cnt == 4'd0) || (size32 && cnt == 4'(NUP)));
    lower_in   = run && size32 && (cnt == 4'(NUP));
    load_d     = lower_in;
    cap16      = run && !size32 && (cnt == 4'(NUP - 1));
    if (final_step)             ctrl = {NPE{final_ctrl()}};
    else if (cnt < 4'(NSTEP))   ctrl = PROG[cnt];
    else                        ctrl = PROG[0];
  end
endmodule
