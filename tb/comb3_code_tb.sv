// Test of comb3_code: all 27 combinations of ternary code samples, compared with
// the 3-point combination computed in double precision at the 2^HFRAC scale
// (tolerance one LSB), plus the one-cycle latency of out_valid.
module comb3_code_tb;
  localparam int OW = 16;
  localparam int HFRAC = 12;
  localparam real PI = 3.14159265358979323846;

  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic in_valid = 1'b0;
  logic signed [1:0] h_a, h_b, h_c;
  logic ov;
  logic signed [OW-1:0] h0r, h0i, h1r, h1i, h2r, h2i;

  comb3_code #(.OW(OW), .HFRAC(HFRAC)) dut (.clk, .in_valid, .h_a, .h_b, .h_c, .out_valid(ov),
    .h0_re(h0r), .h0_im(h0i), .h1_re(h1r), .h1_im(h1i), .h2_re(h2r), .h2_im(h2i));

  task automatic chk(input int got, input real exp, input string what);
    checks++;
    if (real'(got) - exp > 1.0 || exp - real'(got) > 1.0) begin
      failures++;
      $display("FAIL %s (a=%0d b=%0d c=%0d): got %0d expected %0.2f", what, h_a, h_b, h_c, got, exp);
    end
  endtask

  initial begin
    real s, a, b, c;
    s = real'(1 << HFRAC);
    for (int t = 0; t < 27 * 2; t++) begin
      @(negedge clk);
      h_a = 2'(((t % 27) % 3) - 1);
      h_b = 2'((((t % 27) / 3) % 3) - 1);
      h_c = 2'(((t % 27) / 9) - 1);
      in_valid = t[0];
      @(posedge clk);
      #1;
      checks++;
      if (ov != t[0]) begin failures++; $display("FAIL valid latency"); end
      a = h_a; b = h_b; c = h_c;
      chk(h0r, s * (a + b + c), "h0r");
      chk(h0i, 0.0, "h0i");
      chk(h1r, s * (a - 0.5 * b - 0.5 * c), "h1r");
      chk(h1i, s * (-$sqrt(3.0) / 2.0 * b + $sqrt(3.0) / 2.0 * c), "h1i");
      chk(h2r, s * (a - 0.5 * b - 0.5 * c), "h2r");
      chk(h2i, s * ($sqrt(3.0) / 2.0 * b - $sqrt(3.0) / 2.0 * c), "h2i");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
