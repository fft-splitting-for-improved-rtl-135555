// Test of comb3_cplx: random and extreme complex inputs, forward and inverse
// variants, compared with the 3-point combination computed in double precision
// (tolerance one LSB for the rounding), and the one-cycle latency of out_valid.
module comb3_cplx_tb;
  localparam int IW = 14;
  localparam real PI = 3.14159265358979323846;

  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic in_valid = 1'b0;
  logic signed [IW-1:0] a_re, a_im, b_re, b_im, c_re, c_im;
  logic fv, iv;
  logic signed [IW+1:0] f0r, f0i, f1r, f1i, f2r, f2i, i0r, i0i, i1r, i1i, i2r, i2i;

  comb3_cplx #(.IW(IW), .INVERSE(1'b0)) u_fwd (.clk, .in_valid, .a_re, .a_im, .b_re, .b_im,
    .c_re, .c_im, .out_valid(fv), .o0_re(f0r), .o0_im(f0i), .o1_re(f1r), .o1_im(f1i), .o2_re(f2r), .o2_im(f2i));
  comb3_cplx #(.IW(IW), .INVERSE(1'b1)) u_inv (.clk, .in_valid, .a_re, .a_im, .b_re, .b_im,
    .c_re, .c_im, .out_valid(iv), .o0_re(i0r), .o0_im(i0i), .o1_re(i1r), .o1_im(i1i), .o2_re(i2r), .o2_im(i2i));

  task automatic chk(input int got, input real exp, input string what);
    checks++;
    if (real'(got) - exp > 1.0 || exp - real'(got) > 1.0) begin
      failures++;
      $display("FAIL %s: got %0d expected %0.2f", what, got, exp);
    end
  endtask

  // o_k = a + b*exp(-j2pi k/3) + c*exp(-j4pi k/3)
  task automatic expect_k(input int k, input real sgn, output real er, output real ei);
    real ang1, ang2;
    ang1 = sgn * 2.0 * PI * k / 3.0;
    ang2 = sgn * 4.0 * PI * k / 3.0;
    er = a_re + b_re * $cos(ang1) - b_im * $sin(ang1) + c_re * $cos(ang2) - c_im * $sin(ang2);
    ei = a_im + b_re * $sin(ang1) + b_im * $cos(ang1) + c_re * $sin(ang2) + c_im * $cos(ang2);
  endtask

  initial begin
    int lim;
    real er, ei;
    lim = 1 << (IW - 1);
    for (int t = 0; t < 2000; t++) begin
      @(negedge clk);
      if (t < 8) begin
        // extremes
        a_re = (t[0]) ? IW'(lim - 1) : IW'(-lim);
        a_im = (t[1]) ? IW'(lim - 1) : IW'(-lim);
        b_re = (t[2]) ? IW'(lim - 1) : IW'(-lim);
        b_im = (t[0]) ? IW'(-lim) : IW'(lim - 1);
        c_re = (t[1]) ? IW'(-lim) : IW'(lim - 1);
        c_im = (t[2]) ? IW'(-lim) : IW'(lim - 1);
      end else begin
        a_re = IW'($urandom); a_im = IW'($urandom);
        b_re = IW'($urandom); b_im = IW'($urandom);
        c_re = IW'($urandom); c_im = IW'($urandom);
      end
      in_valid = t[0];
      @(posedge clk);
      #1;
      checks++;
      if (fv != t[0] || iv != t[0]) begin failures++; $display("FAIL valid latency"); end
      expect_k(0, -1.0, er, ei); chk(f0r, er, "f0r"); chk(f0i, ei, "f0i"); chk(i0r, er, "i0r"); chk(i0i, ei, "i0i");
      expect_k(1, -1.0, er, ei); chk(f1r, er, "f1r"); chk(f1i, ei, "f1i");
      expect_k(2, -1.0, er, ei); chk(f2r, er, "f2r"); chk(f2i, ei, "f2i");
      expect_k(1,  1.0, er, ei); chk(i1r, er, "i1r"); chk(i1i, ei, "i1i");
      expect_k(2,  1.0, er, ei); chk(i2r, er, "i2r"); chk(i2i, ei, "i2i");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
