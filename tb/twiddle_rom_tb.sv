// Test of twiddle_rom at the default N = 49152: the quadrant edges and random
// angles of exp(-j*2*pi*k/N) and of the conjugate variant, compared with
// 32767*cos/sin computed in double precision (tolerance one LSB), read latency 1.
module twiddle_rom_tb;
  import acq_pkg::*;
  localparam int N = N_DEFAULT;
  localparam int TW = TW_DEFAULT;
  localparam real PI = 3.14159265358979323846;

  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic en = 1'b0;
  logic [$clog2(N)-1:0] k;
  logic signed [TW-1:0] fr, fi, cr, ci;

  twiddle_rom #(.N(N), .TW(TW), .CONJ(1'b0)) u_f (.clk, .en, .k, .w_re(fr), .w_im(fi));
  twiddle_rom #(.N(N), .TW(TW), .CONJ(1'b1)) u_c (.clk, .en, .k, .w_re(cr), .w_im(ci));

  task automatic chk(input int got, input real exp, input string what, input int kk);
    checks++;
    if (real'(got) - exp > 1.0 || exp - real'(got) > 1.0) begin
      failures++;
      $display("FAIL %s k=%0d: got %0d expected %0.2f", what, kk, got, exp);
    end
  endtask

  initial begin
    int kk;
    real amp, ang;
    amp = real'((1 << (TW - 1)) - 1);
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      if (t < 12) kk = (t / 3) * (N / 4) + (t % 3) - 1;   // around each quadrant boundary
      else kk = int'($urandom_range(N - 1));
      if (kk < 0) kk = N - 1;
      k  = $clog2(N)'(kk);
      en = 1'b1;
      @(posedge clk);
      #1;
      ang = 2.0 * PI * real'(kk) / real'(N);
      chk(fr, amp * $cos(ang), "fwd re", kk);
      chk(fi, -amp * $sin(ang), "fwd im", kk);
      chk(cr, amp * $cos(ang), "conj re", kk);
      chk(ci, amp * $sin(ang), "conj im", kk);
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
