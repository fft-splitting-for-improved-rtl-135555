// Test of recomb_unit with K = 3 sections and N = 192 (M = 64): K back-to-back
// frames of random inverse-FFT samples s_{i,n} are fed in; the expected outputs
// are computed in double precision as y_i = s_i * exp(+j*2*pi*i*n/N) and
//   y_{n+mM} = sum_i y_i * exp(+j*2*pi*i*m/K)
// (for K = 3: y_n = y0 + y1 + y2, y_{n+M} = y0 + y1*W + y2*W^*, ... with
// W = exp(+j2pi/3)), tolerance 3 LSB. Also checked: M outputs in order, 4 cycles
// after the matching last-pass input, done with the last one, and a second
// operation after a gap.
module recomb_unit_tb;
  localparam int K = 3;
  localparam int N = 192;
  localparam int M = N / K;
  localparam int GW = (K == 5) ? 3 : 2;
  localparam int DW = 16;
  localparam real PI = 3.14159265358979323846;

  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst_n = 1'b0;
  int checks = 0, failures = 0;

  logic in_valid = 1'b0, in_sop = 1'b0, in_eop = 1'b0;
  logic signed [DW-1:0] in_re, in_im;
  logic y_valid, done;
  logic [$clog2(M)-1:0] y_idx;
  logic signed [DW+GW-1:0] y_re [K], y_im [K];

  recomb_unit #(.N(N), .K(K), .DW(DW), .TW(16)) dut (.clk, .rst_n, .in_valid, .in_sop, .in_eop, .in_re, .in_im,
    .y_valid, .y_idx, .y_re, .y_im, .done);

  real sr [K][M];
  real si [K][M];
  int  n_out, n_done, last_in_cyc [M], bad_lat;
  longint cyc = 0;

  task automatic chk(input real got, input real exp, input string what);
    checks++;
    if (got - exp > 3.0 || exp - got > 3.0) begin
      failures++;
      $display("FAIL %s: got %0.1f expected %0.2f", what, got, exp);
    end
  endtask

  always @(posedge clk) begin
    cyc++;
    if (rst_n && y_valid) begin
      real yr [K], yi [K], er, ei, ang;
      int n;
      n = int'(y_idx);
      checks++;
      if (n != n_out) begin failures++; $display("FAIL order: index %0d expected %0d", n, n_out); end
      if (cyc - last_in_cyc[n] != 4) bad_lat++;
      for (int i = 0; i < K; i++) begin
        ang   = 2.0 * PI * real'(i * n) / real'(N);
        yr[i] = sr[i][n] * $cos(ang) - si[i][n] * $sin(ang);
        yi[i] = sr[i][n] * $sin(ang) + si[i][n] * $cos(ang);
      end
      for (int m = 0; m < K; m++) begin
        er = 0.0; ei = 0.0;
        for (int i = 0; i < K; i++) begin
          ang = 2.0 * PI * real'(i * m) / real'(K);
          er += yr[i] * $cos(ang) - yi[i] * $sin(ang);
          ei += yr[i] * $sin(ang) + yi[i] * $cos(ang);
        end
        chk(real'(y_re[m]), er, $sformatf("n=%0d section %0d re", n, m));
        chk(real'(y_im[m]), ei, $sformatf("n=%0d section %0d im", n, m));
      end
      n_out++;
    end
    if (rst_n && done) begin
      n_done++;
      checks++;
      if (!(y_valid && int'(y_idx) == M - 1)) begin failures++; $display("FAIL done not with last output"); end
    end
  end

  task automatic feed();
    for (int i = 0; i < K; i++) begin
      for (int n = 0; n < M; n++) begin
        @(negedge clk);
        in_valid = 1'b1;
        in_sop   = (n == 0);
        in_eop   = (n == M - 1);
        in_re    = DW'($urandom_range(20000)) - 16'sd10000;
        in_im    = DW'($urandom_range(20000)) - 16'sd10000;
        sr[i][n] = real'(in_re);
        si[i][n] = real'(in_im);
        if (i == K - 1) last_in_cyc[n] = int'(cyc) + 1;
      end
    end
    @(negedge clk);
    in_valid = 1'b0;
    in_sop   = 1'b0;
    in_eop   = 1'b0;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int op = 0; op < 2; op++) begin
      n_out = 0;
      feed();
      repeat (10) @(posedge clk);
      checks++;
      if (n_out != M) begin failures++; $display("FAIL %0d outputs", n_out); end
    end
    checks++;
    if (n_done != 2) begin failures++; $display("FAIL done count %0d", n_done); end
    checks++;
    if (bad_lat != 0) begin failures++; $display("FAIL latency wrong on %0d outputs", bad_lat); end
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
