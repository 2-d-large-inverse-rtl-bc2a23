// it_pe -- processing element (PE) of a processing unit.
//
// One butterfly node per clock:  y = (a * s + b * t) >>> 8, where
//   s (own line)     is the PE's own feedback register, the input value of its
//                    position, or register D (last 32-point stage);
//   t (partner line) is one of four lines, p^1, p^3, p^7 or p^15, taken from
//                    the input vector or from the other PEs' registers
//                    (the 4:1 multiplexer of the document).
// a and b arrive as CSD shifter controls and are applied by two shift/add
// modules, "top" on the own line and "bottom" on the partner line, of Type A
// (4 shifters) or Type B (5 shifters), chosen per PE by NT_TOP / NT_BOT.
// y is registered in the PE (the feedback loop) when step_en is high, and is
// also available combinationally on y_c for the unit's output register.
// The arithmetic shift by 8 rounds toward minus infinity (this design's choice).
module it_pe
  import hevc_it_pkg::*;
#(
  parameter int W      = 24,
  parameter int NT_TOP = 5,
  parameter int NT_BOT = 5
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                step_en,     // register y this cycle
  input  logic                from_input,  // operands from the input vector
  input  logic                use_d,       // own operand is register D
  input  pe_ctrl_t            ctrl,
  input  logic signed [W-1:0] in_self,     // input value of this position
  input  logic signed [W-1:0] d_self,      // register D of this position
  input  logic signed [W-1:0] in_part [4], // input values at p^1, p^3, p^7, p^15
  input  logic signed [W-1:0] fb_part [4], // registers at p^1, p^3, p^7, p^15
  output logic signed [W-1:0] y_q,         // feedback register
  output logic signed [W-1:0] y_c          // node result, this cycle
);
  logic signed [W-1:0]  s_op, t_op;
  logic signed [W+9:0]  top_y, bot_y;
  logic signed [W+10:0] sum;

  always_comb begin
    if (use_d)           s_op = d_self;
    else if (from_input) s_op = in_self;
    else                 s_op = y_q;
    t_op = from_input ? in_part[ctrl.psel] : fb_part[ctrl.psel];
  end

  it_shift_add #(.W(W), .NTERM(NT_TOP)) u_top (.x(s_op), .terms(ctrl.top), .y(top_y));
  it_shift_add #(.W(W), .NTERM(NT_BOT)) u_bot (.x(t_op), .terms(ctrl.bot), .y(bot_y));

  assign sum = (W+11)'(top_y) + (W+11)'(bot_y);
  assign y_c = W'(sum >>> CSH);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)       y_q <= '0;
    else if (step_en) y_q <= y_c;
  end
endmodule
