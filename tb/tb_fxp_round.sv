// tb_fxp_round: checks the requantiser against the integer rounding model
// for the formats the network uses: exhaustive ties (round half to even in
// both signs), random values, a widening shift and wrap-around of values that
// do not fit.
module tb_fxp_round;
  import gesture_ref_pkg::*;

  logic signed [25:0] a_in;  logic signed [12:0] a_out;   // conv1: 26/7 -> 13/0
  logic signed [32:0] b_in;  logic signed [14:0] b_out;   // dense1: 33/7 -> 15/1
  logic signed [9:0]  c_in;  logic signed [13:0] c_out;   // widen: 10/2 -> 14/4

  fxp_round #(.IN_W(26), .IN_F(7), .OUT_W(13), .OUT_F(0)) u_a (.din(a_in), .dout(a_out));
  fxp_round #(.IN_W(33), .IN_F(7), .OUT_W(15), .OUT_F(1)) u_b (.din(b_in), .dout(b_out));
  fxp_round #(.IN_W(10), .IN_F(2), .OUT_W(14), .OUT_F(4)) u_c (.din(c_in), .dout(c_out));

  int checks = 0, failures = 0;

  task automatic chk(longint got, longint exp, string what);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL: %s got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // hand-worked ties: 2.5 -> 2, 3.5 -> 4, -2.5 -> -2, -3.5 -> -4, 2.5078 -> 3
    a_in = 26'sd320;  #1 chk(a_out, 2,  "2.5");
    a_in = 26'sd448;  #1 chk(a_out, 4,  "3.5");
    a_in = -26'sd320; #1 chk(a_out, -2, "-2.5");
    a_in = -26'sd448; #1 chk(a_out, -4, "-3.5");
    a_in = 26'sd321;  #1 chk(a_out, 3,  "2.5+");
    a_in = 26'sd319;  #1 chk(a_out, 2,  "2.5-");
    a_in = 26'sd524288; #1 chk(a_out, -4096, "wrap 4096 -> -4096");
    for (int i = -300; i <= 300; i++) begin
      a_in = 26'(i * 64);            // all multiples of one half
      #1 chk(a_out, rq(i * 64, 7, 13), $sformatf("tie %0d", i));
    end
    for (int i = 0; i < 3000; i++) begin
      longint v;
      v = longint'($urandom_range(33554431, 0)) - 33554432 / 2;
      a_in = 26'(v);
      v = sx(v, 26);
      b_in = 33'(v * 37);
      c_in = 10'(v);
      #1;
      chk(a_out, rq(v, 7, 13), "random conv1");
      chk(b_out, rq(v * 37, 6, 15), "random dense1");
      chk(c_out, sx(sx(v, 10) * 4, 14), "widen");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
