// Full-size test of the split-FFT correlator: default parameters, N = 49152, three
// 16384-point FFT cores modelled behaviourally.
//
// Two acquisitions of a two-period signal against a zero-padded one-period code:
//   - 1 ms code sampled at 20.46 MHz (P = 20460 samples, 40920 of 49152 used),
//     data sign flip at the code boundary, the lower edge of the range;
//   - P = 24576 samples, the upper edge (24.576 MHz), with no zero padding.
// The code is random +/-1 (a stand-in for a real primary code). For each run the
// peak lag and magnitude in the first half of the output (the half kept by the
// method; the second half may hold a second peak) are checked, and 300 lags (the peak, its neighbours and
// random lags) are compared with the directly computed circular correlation.
// Timing: the FFT inputs are busy for 3 * 16384 = 49152 consecutive cycles per
// correlation, i.e. 75 % of the 65536 cycles of a single 65536-point FFT pass.
module split_fft_correlator_full_tb;
  import acq_pkg::*;

  localparam int K      = K_DEFAULT;
  localparam int N      = N_DEFAULT;
  localparam int M      = N / K;
  localparam int XW     = XW_DEFAULT;
  localparam int DW     = DW_DEFAULT;
  localparam int HFRAC  = HFRAC_DEFAULT;
  localparam int PSHIFT = 15;
  localparam int SF     = 7;
  localparam int SI     = 9;
  localparam real GAIN  = real'(N) * (2.0 ** (HFRAC - 2 * SF - PSHIFT - SI));
  localparam int NLAGS  = 300;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic start = 1'b0;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  logic busy, src_rd;
  logic [$clog2(M)-1:0] src_addr;
  logic signed [XW-1:0] src_x_re [K], src_x_im [K];
  logic signed [1:0]    src_h [K];
  logic fhi_v, fhi_s, fhi_e, fxi_v, fxi_s, fxi_e, fho_v, fho_s, fho_e, fxo_v, fxo_s, fxo_e;
  logic ii_v, ii_s, ii_e, io_v, io_s, io_e;
  logic signed [DW-1:0] fhi_re, fhi_im, fxi_re, fxi_im, fho_re, fho_im, fxo_re, fxo_im;
  logic signed [DW-1:0] ii_re, ii_im, io_re, io_im;
  logic y_valid, done;
  logic [$clog2(M)-1:0] y_idx;
  logic signed [DW+1:0] y_re [K], y_im [K];
  int sat_h, sat_x, sat_i, ovf_h, ovf_x, ovf_i;

  split_fft_correlator dut (
    .clk, .rst_n, .start, .busy, .src_rd, .src_addr, .src_x_re, .src_x_im, .src_h,
    .fft_h_in_valid(fhi_v), .fft_h_in_sop(fhi_s), .fft_h_in_eop(fhi_e),
    .fft_h_in_re(fhi_re), .fft_h_in_im(fhi_im),
    .fft_x_in_valid(fxi_v), .fft_x_in_sop(fxi_s), .fft_x_in_eop(fxi_e),
    .fft_x_in_re(fxi_re), .fft_x_in_im(fxi_im),
    .fft_h_out_valid(fho_v), .fft_h_out_sop(fho_s), .fft_h_out_eop(fho_e),
    .fft_h_out_re(fho_re), .fft_h_out_im(fho_im),
    .fft_x_out_valid(fxo_v), .fft_x_out_sop(fxo_s), .fft_x_out_eop(fxo_e),
    .fft_x_out_re(fxo_re), .fft_x_out_im(fxo_im),
    .ifft_in_valid(ii_v), .ifft_in_sop(ii_s), .ifft_in_eop(ii_e),
    .ifft_in_re(ii_re), .ifft_in_im(ii_im),
    .ifft_out_valid(io_v), .ifft_out_sop(io_s), .ifft_out_eop(io_e),
    .ifft_out_re(io_re), .ifft_out_im(io_im),
    .y_valid, .y_idx, .y_re, .y_im, .done
  );

  fft_stream_model #(.M(M), .DW(DW), .SCALE(SF), .INVERSE(1'b0)) u_fft_h (
    .clk, .in_valid(fhi_v && rst_n), .in_sop(fhi_s), .in_eop(fhi_e), .in_re(fhi_re), .in_im(fhi_im),
    .out_valid(fho_v), .out_sop(fho_s), .out_eop(fho_e), .out_re(fho_re), .out_im(fho_im),
    .sat_count(sat_h), .ovf_count(ovf_h));
  fft_stream_model #(.M(M), .DW(DW), .SCALE(SF), .INVERSE(1'b0)) u_fft_x (
    .clk, .in_valid(fxi_v && rst_n), .in_sop(fxi_s), .in_eop(fxi_e), .in_re(fxi_re), .in_im(fxi_im),
    .out_valid(fxo_v), .out_sop(fxo_s), .out_eop(fxo_e), .out_re(fxo_re), .out_im(fxo_im),
    .sat_count(sat_x), .ovf_count(ovf_x));
  fft_stream_model #(.M(M), .DW(DW), .SCALE(SI), .INVERSE(1'b1)) u_ifft (
    .clk, .in_valid(ii_v && rst_n), .in_sop(ii_s), .in_eop(ii_e), .in_re(ii_re), .in_im(ii_im),
    .out_valid(io_v), .out_sop(io_s), .out_eop(io_e), .out_re(io_re), .out_im(io_im),
    .sat_count(sat_i), .ovf_count(ovf_i));

  int xr [N], xi [N], hc [N];

  always @(posedge clk) begin
    if (src_rd) begin
      for (int s = 0; s < K; s++) begin
        src_x_re[s] <= XW'(xr[int'(src_addr) + s * M]);
        src_x_im[s] <= XW'(xi[int'(src_addr) + s * M]);
        src_h[s]    <= 2'(hc[int'(src_addr) + s * M]);
      end
    end
  end

  int got_re [N], got_im [N];
  int n_out;
  always @(posedge clk) begin
    if (rst_n && y_valid) begin
      for (int k = 0; k < K; k++) begin
        got_re[int'(y_idx) + k * M] = int'(y_re[k]);
        got_im[int'(y_idx) + k * M] = int'(y_im[k]);
      end
      n_out++;
    end
  end

  int fin_run, fin_max_run;
  always @(posedge clk) begin
    fin_run = fxi_v ? fin_run + 1 : 0;
    if (fin_run > fin_max_run) fin_max_run = fin_run;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic run_one(input int P, input int tau, input int amp);
    int  code [N];
    int  lags [NLAGS];
    real rr, ri, err, maxerr, full, tol, bm;
    int  best_m;
    longint best_mag, mag;
    for (int n = 0; n < P; n++) code[n] = ($urandom_range(1) != 0) ? 1 : -1;
    for (int n = 0; n < N; n++) begin
      hc[n] = (n < P) ? code[n] : 0;
      if (n < 2 * P) begin
        int d;
        d     = (n >= tau + P || n < tau) ? -1 : 1;
        xr[n] = amp * d * code[(n - tau + 2 * P) % P] + int'($urandom_range(64)) - 32;
        xi[n] = int'($urandom_range(64)) - 32;
      end else begin
        xr[n] = 0;
        xi[n] = 0;
      end
    end
    n_out       = 0;
    fin_max_run = 0;
    repeat (3) @(posedge clk);
    start <= 1'b1;
    @(posedge clk);
    start <= 1'b0;
    while (!done) @(posedge clk);
    @(posedge clk);
    check(n_out == M, $sformatf("%0d output cycles", n_out));
    check(fin_max_run == N, $sformatf("FFT input burst %0d cycles, expected %0d", fin_max_run, N));
    check(real'(fin_max_run) == 0.75 * 65536.0, "processing time is 75% of a 65536-point pass");
    best_mag = -1;
    best_m   = -1;
    for (int m = 0; m < N; m++) begin
      mag = longint'(got_re[m]) * got_re[m] + longint'(got_im[m]) * got_im[m];
      if (m < N / 2 && mag > best_mag) begin best_mag = mag; best_m = m; end
    end
    full = GAIN * real'(amp) * real'(P);
    bm   = $sqrt(real'(best_mag));
    check(best_m == tau, $sformatf("peak at lag %0d, expected %0d", best_m, tau));
    check(bm > 0.97 * full && bm < 1.03 * full, $sformatf("peak %0.1f, full-period value %0.1f", bm, full));
    lags[0] = tau;
    lags[1] = (tau + 1) % N;
    lags[2] = (tau + N - 1) % N;
    for (int l = 3; l < NLAGS; l++) lags[l] = int'($urandom_range(N - 1));
    tol    = 4.0 + 0.002 * full;
    maxerr = 0.0;
    foreach (lags[l]) begin
      int m;
      m  = lags[l];
      rr = 0.0;
      ri = 0.0;
      for (int n = 0; n < P; n++) begin
        rr += real'(xr[(n + m) % N] * hc[n]);
        ri += real'(xi[(n + m) % N] * hc[n]);
      end
      err = $sqrt((real'(got_re[m]) - GAIN * rr) ** 2 + (real'(got_im[m]) - GAIN * ri) ** 2);
      if (err > maxerr) maxerr = err;
      check(err <= tol, $sformatf("lag %0d: got (%0d,%0d) expected (%0.1f,%0.1f)", m,
            got_re[m], got_im[m], GAIN * rr, GAIN * ri));
    end
    $display("P=%0d tau=%0d: peak %0.1f at lag %0d (full-period value %0.1f), max error %0.2f (tol %0.1f)",
             P, tau, bm, best_m, full, maxerr, tol);
  endtask

  initial begin
    repeat (5) @(posedge clk);
    rst_n <= 1'b1;
    repeat (2) @(posedge clk);
    run_one(20460, 12345, 1500);
    run_one(24576, 20000, 1200);
    check(sat_h + sat_x + sat_i == 0, $sformatf("FFT model saturations %0d/%0d/%0d", sat_h, sat_x, sat_i));
    check(ovf_h + ovf_x + ovf_i == 0, "FFT model frame overflow");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
