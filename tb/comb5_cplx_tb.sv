// Test of comb5_cplx: random and extreme complex inputs, forward and inverse
// variants, compared with the 5-point combination computed in double precision,
// and the one-cycle latency of out_valid. Tolerance: one LSB for the rounding plus
// the effect of the Q1.15 constants, at most 2^-16 per unit of each of the four
// pair sums and differences, i.e. 2^-15 * sum over sections 1..4 of |re| + |im|.
module comb5_cplx_tb;
  localparam int IW = 16;
  localparam real PI = 3.14159265358979323846;

  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic in_valid = 1'b0;
  logic signed [IW-1:0] in_re [5], in_im [5];
  logic fv, iv;
  logic signed [IW+2:0] f_re [5], f_im [5], i_re [5], i_im [5];

  comb5_cplx #(.IW(IW), .INVERSE(1'b0)) u_fwd (.clk, .in_valid, .in_re, .in_im,
    .out_valid(fv), .o_re(f_re), .o_im(f_im));
  comb5_cplx #(.IW(IW), .INVERSE(1'b1)) u_inv (.clk, .in_valid, .in_re, .in_im,
    .out_valid(iv), .o_re(i_re), .o_im(i_im));

  real tol;

  task automatic chk(input int got, input real exp, input string what);
    checks++;
    if (real'(got) - exp > tol || exp - real'(got) > tol) begin
      failures++;
      $display("FAIL %s: got %0d expected %0.2f", what, got, exp);
    end
  endtask

  // o_k = sum_m x_m * exp(sgn * j*2*pi*k*m/5)
  task automatic expect_k(input int k, input real sgn, output real er, output real ei);
    real ang;
    er = 0.0;
    ei = 0.0;
    for (int m = 0; m < 5; m++) begin
      ang = sgn * 2.0 * PI * real'(k * m) / 5.0;
      er += real'(in_re[m]) * $cos(ang) - real'(in_im[m]) * $sin(ang);
      ei += real'(in_re[m]) * $sin(ang) + real'(in_im[m]) * $cos(ang);
    end
  endtask

  initial begin
    int lim;
    real er, ei;
    lim = 1 << (IW - 1);
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      for (int m = 0; m < 5; m++) begin
        if (t < 64) begin
          // extremes: every input at one of the two full-scale values
          in_re[m] = ((t >> m) & 1) != 0 ? IW'(lim - 1) : IW'(-lim);
          in_im[m] = ((t >> ((m + 2) % 5)) & 1) != 0 ? IW'(-lim) : IW'(lim - 1);
        end else begin
          in_re[m] = IW'($urandom);
          in_im[m] = IW'($urandom);
        end
      end
      tol = 1.0;
      for (int m = 1; m < 5; m++)
        tol += (2.0 ** -15) * ($sqrt(real'(in_re[m]) ** 2) + $sqrt(real'(in_im[m]) ** 2));
      in_valid = t[0];
      @(posedge clk);
      #1;
      checks++;
      if (fv != t[0] || iv != t[0]) begin failures++; $display("FAIL valid latency"); end
      for (int k = 0; k < 5; k++) begin
        expect_k(k, -1.0, er, ei);
        chk(int'(f_re[k]), er, $sformatf("forward %0d re", k));
        chk(int'(f_im[k]), ei, $sformatf("forward %0d im", k));
        expect_k(k, 1.0, er, ei);
        chk(int'(i_re[k]), er, $sformatf("inverse %0d re", k));
        chk(int'(i_im[k]), ei, $sformatf("inverse %0d im", k));
      end
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
