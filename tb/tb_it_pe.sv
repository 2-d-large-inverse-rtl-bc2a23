// tb_it_pe -- self-checking testbench of the processing element.
//
// Applies random coefficients (as CSD controls), partner selects and operand
// sources, and checks the node result y_c = (a*s + b*t) >>> 8 against an
// integer computation, and that y_q registers y_c only when step_en is high.
module tb_it_pe;
  import hevc_it_pkg::*;

  localparam int W = 24;

  logic clk = 1'b0, rst_n = 1'b0;
  logic step_en, from_input, use_d;
  pe_ctrl_t ctrl;
  logic signed [W-1:0] in_self, d_self, y_q, y_c;
  logic signed [W-1:0] in_part [4];
  logic signed [W-1:0] fb_part [4];

  it_pe #(.W(W)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  function automatic logic signed [W-1:0] rnd();
    return W'($signed($urandom_range(0, 1 << 21)) - (1 << 20));
  endfunction

  initial begin
    longint a, b, s, t, e, prev;
    step_en = 1'b0; from_input = 1'b0; use_d = 1'b0; ctrl = '0;
    in_self = '0; d_self = '0;
    foreach (in_part[i]) begin in_part[i] = '0; fb_part[i] = '0; end
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int it = 0; it < 3000; it++) begin
      int sel;
      a = longint'($urandom_range(0, 512)) - 256;
      b = longint'($urandom_range(0, 512)) - 256;
      sel = $urandom_range(0, 3);
      ctrl.psel = psel_e'(sel);
      ctrl.top  = to_csd(int'(a));
      ctrl.bot  = to_csd(int'(b));
      from_input = $urandom_range(0, 1);
      use_d      = ($urandom_range(0, 3) == 0);
      step_en    = $urandom_range(0, 1);
      in_self = rnd(); d_self = rnd();
      foreach (in_part[i]) begin in_part[i] = rnd(); fb_part[i] = rnd(); end
      #1;
      s = use_d ? longint'(d_self) : from_input ? longint'(in_self) : longint'(y_q);
      t = from_input ? longint'(in_part[sel]) : longint'(fb_part[sel]);
      e = (a * s + b * t) >>> 8;
      checks++;
      if (longint'(y_c) != e) begin
        failures++;
        if (failures < 10) $display("FAIL a=%0d b=%0d s=%0d t=%0d y=%0d exp=%0d", a, b, s, t, y_c, e);
      end
      prev = longint'(y_q);
      @(posedge clk);
      #1;
      checks++;
      if (longint'(y_q) != (step_en ? e : prev)) begin
        failures++;
        if (failures < 10) $display("FAIL register");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
