// Test of comb5_code: all 243 combinations of ternary code samples, compared with
// the 5-point combination computed in double precision at the 2^HFRAC scale
// (tolerance one LSB), plus the one-cycle latency of out_valid.
module comb5_code_tb;
  localparam int OW = 16;
  localparam int HFRAC = 12;
  localparam real PI = 3.14159265358979323846;

  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic in_valid = 1'b0;
  logic signed [1:0] h_in [5];
  logic ov;
  logic signed [OW-1:0] o_re [5], o_im [5];

  comb5_code #(.OW(OW), .HFRAC(HFRAC)) dut (.clk, .in_valid, .h_in, .out_valid(ov), .o_re, .o_im);

  task automatic chk(input int got, input real exp, input string what);
    checks++;
    if (real'(got) - exp > 1.0 || exp - real'(got) > 1.0) begin
      failures++;
      $display("FAIL %s (code %0d %0d %0d %0d %0d): got %0d expected %0.2f", what,
               h_in[0], h_in[1], h_in[2], h_in[3], h_in[4], got, exp);
    end
  endtask

  initial begin
    real s, er, ei, ang;
    int v;
    s = real'(1 << HFRAC);
    for (int t = 0; t < 243 * 2; t++) begin
      @(negedge clk);
      v = t % 243;
      for (int m = 0; m < 5; m++) begin
        h_in[m] = 2'((v % 3) - 1);
        v = v / 3;
      end
      in_valid = t[0];
      @(posedge clk);
      #1;
      checks++;
      if (ov != t[0]) begin failures++; $display("FAIL valid latency"); end
      for (int k = 0; k < 5; k++) begin
        er = 0.0;
        ei = 0.0;
        for (int m = 0; m < 5; m++) begin
          ang = -2.0 * PI * real'(k * m) / 5.0;
          er += s * real'(h_in[m]) * $cos(ang);
          ei += s * real'(h_in[m]) * $sin(ang);
        end
        chk(int'(o_re[k]), er, $sformatf("h%0d re", k));
        chk(int'(o_im[k]), ei, $sformatf("h%0d im", k));
      end
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
