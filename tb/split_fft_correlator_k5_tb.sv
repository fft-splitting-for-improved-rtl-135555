// End-to-end test of the 15-FFT configuration of the split-FFT correlator at a
// reduced size (K = 5 sections, N = 320, three 64-point FFT cores modelled
// behaviourally). Same runs and checks as the three-section test.
//
// Each run loads the section buffers with a zero-padded ternary code h (one code
// period of P samples) and a received signal x (two periods of the same code,
// delayed by tau, with a data sign flip at the period boundary, plus noise or a
// fully random signal), starts the correlator and compares every output lag with
// the circular correlation c_m = sum_n x_{(n+m) mod N} h_n computed directly here,
// scaled by the known gain of the datapath. It also checks the peak: the lag, and
// that despite the sign flip its magnitude is that of a full code period.
// Cycle checks: the FFT inputs are busy for exactly K*M consecutive cycles per
// run, 4 cycles after the first buffer read, and M outputs come out back to back.
// Mechanisms counted: pass-0 bypass, rotation in each later pass, memory writes
// and reads,
// output combination, sign-flip runs, zero-padded runs, back-to-back starts.
module split_fft_correlator_k5_tb;
  import acq_pkg::*;

  localparam int K      = 5;
  localparam int N      = 320;
  localparam int M      = N / K;
  localparam int GW     = (K == 5) ? 3 : 2;
  localparam int XW     = 12;
  localparam int DW     = 16;
  localparam int HFRAC  = 12;
  localparam int PSHIFT = 14;
  localparam int SF     = 4;   // forward FFT model scaling 2^-SF
  localparam int SI     = 0;   // inverse FFT model scaling 2^-SI
  localparam int AMP    = 1000;
  localparam real GAIN  = real'(N) * (2.0 ** (HFRAC - 2 * SF - PSHIFT - SI));
  localparam int NRUNS  = 5;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic start = 1'b0;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  // ---------------- DUT and FFT models ----------------
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
  logic signed [DW+GW-1:0] y_re [K], y_im [K];
  int sat_h, sat_x, sat_i, ovf_h, ovf_x, ovf_i;

  split_fft_correlator #(.N(N), .K(K), .XW(XW), .DW(DW), .HFRAC(HFRAC), .PROD_SHIFT(PSHIFT)) dut (
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

  // ---------------- section buffers (one-cycle read) ----------------
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

  // ---------------- output capture ----------------
  int  got_re [N], got_im [N];
  int  n_out;
  always @(posedge clk) begin
    if (rst_n && y_valid) begin
      for (int k = 0; k < K; k++) begin
        got_re[int'(y_idx) + k * M] = int'(y_re[k]);
        got_im[int'(y_idx) + k * M] = int'(y_im[k]);
      end
      n_out++;
    end
  end

  // ---------------- cycle and mechanism counters ----------------
  longint cyc = 0;
  longint first_rd_cyc, first_fin_cyc;
  int  fin_run, fin_max_run, y_run, y_max_run, fin_frames;
  int  cnt_pass [K], cnt_we [K-1], cnt_rd, cnt_comb;
  int  cnt_flip, cnt_pad, cnt_b2b;
  bit  seen_rd, seen_fin;

  always @(posedge clk) if (rst_n) begin
    cyc++;
    if (src_rd && !seen_rd) begin seen_rd = 1; first_rd_cyc = cyc; end
    if (fxi_v && !seen_fin) begin seen_fin = 1; first_fin_cyc = cyc; end
    fin_run = fxi_v ? fin_run + 1 : 0;
    if (fin_run > fin_max_run) fin_max_run = fin_run;
    y_run = y_valid ? y_run + 1 : 0;
    if (y_run > y_max_run) y_max_run = y_run;
    if (fxi_v && fxi_s) fin_frames++;
    if (dut.u_rot_x.out_tag.valid) begin
      cnt_pass[int'(dut.u_rot_x.out_tag.pass)]++;
    end
    for (int i = 0; i < K - 1; i++) if (dut.u_recomb.we[i]) cnt_we[i]++;
    if (dut.u_recomb.rd_en) cnt_rd++;
    if (y_valid) cnt_comb++;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // ---------------- one run ----------------
  // kind 0: code with sign flip and noise; kind 1: fully random complex signal.
  task automatic run_one(input int kind, input int P, input int tau, input int amp,
                         input bit flip, input bit b2b);
    real ref_re [N];
    real ref_im [N];
    int  code [N];
    real peak_ref, err, maxerr, tol;
    int  best_m;
    longint best_mag, mag;
    for (int n = 0; n < N; n++) code[n] = ($urandom_range(1) != 0) ? 1 : -1;
    for (int n = 0; n < N; n++) begin
      hc[n] = (n < P) ? code[n] : 0;
      if (kind == 0) begin
        if (n < 2 * P) begin
          int ci, d;
          ci = (n - tau + 2 * P) % P;
          d  = (flip && (n >= tau + P || n < tau)) ? -1 : 1;
          xr[n] = amp * d * code[ci] + int'($urandom_range(64)) - 32;
          xi[n] = int'($urandom_range(64)) - 32;
        end else begin
          xr[n] = 0;
          xi[n] = 0;
        end
      end else begin
        xr[n] = int'($urandom_range((1 << XW) - 1)) - (1 << (XW - 1));
        xi[n] = int'($urandom_range((1 << XW) - 1)) - (1 << (XW - 1));
      end
    end
    if (kind == 0 && flip) cnt_flip++;
    if (2 * P < N) cnt_pad++;
    for (int m = 0; m < N; m++) begin
      ref_re[m] = 0.0;
      ref_im[m] = 0.0;
      for (int n = 0; n < N; n++) begin
        ref_re[m] += real'(xr[(n + m) % N] * hc[n]);
        ref_im[m] += real'(xi[(n + m) % N] * hc[n]);
      end
    end
    // start
    n_out    = 0;
    seen_rd  = 0;
    seen_fin = 0;
    fin_max_run = 0;
    y_max_run = 0;
    if (!b2b) repeat (3) @(posedge clk);
    start <= 1'b1;
    @(posedge clk);
    start <= 1'b0;
    @(posedge clk);
    check(busy, "busy after start");
    // wait for done, then let the counters settle
    while (!done) @(posedge clk);
    @(posedge clk);
    check(n_out == M, $sformatf("run kind %0d: %0d output cycles, expected %0d", kind, n_out, M));
    check(fin_max_run == K * M, $sformatf("FFT input burst %0d cycles, expected %0d", fin_max_run, K * M));
    check(first_fin_cyc - first_rd_cyc == 4, $sformatf("read-to-FFT latency %0d", first_fin_cyc - first_rd_cyc));
    check(y_max_run == M, $sformatf("output burst %0d cycles, expected %0d", y_max_run, M));
    maxerr   = 0.0;
    peak_ref = 0.0;
    for (int m = 0; m < N; m++) begin
      real a;
      a = $sqrt(ref_re[m] * ref_re[m] + ref_im[m] * ref_im[m]) * GAIN;
      if (a > peak_ref) peak_ref = a;
    end
    tol = 4.0 + 0.002 * peak_ref;
    best_mag = -1;
    best_m   = -1;
    for (int m = 0; m < N; m++) begin
      err = $sqrt((real'(got_re[m]) - GAIN * ref_re[m]) ** 2 + (real'(got_im[m]) - GAIN * ref_im[m]) ** 2);
      if (err > maxerr) maxerr = err;
      check(err <= tol, $sformatf("lag %0d: got (%0d,%0d) expected (%0.1f,%0.1f)", m,
            got_re[m], got_im[m], GAIN * ref_re[m], GAIN * ref_im[m]));
      mag = longint'(got_re[m]) * got_re[m] + longint'(got_im[m]) * got_im[m];
      if (m < N / 2 && mag > best_mag) begin best_mag = mag; best_m = m; end
    end
    $display("run kind=%0d P=%0d tau=%0d flip=%0d: peak %0.1f, max error %0.2f (tol %0.1f), peak lag %0d",
             kind, P, tau, flip, peak_ref, maxerr, tol, best_m);
    if (kind == 0) begin
      real full;
      full = GAIN * real'(amp) * real'(P);
      check(best_m == tau, $sformatf("peak at lag %0d, expected %0d", best_m, tau));
      check($sqrt(real'(best_mag)) > 0.97 * full && $sqrt(real'(best_mag)) < 1.03 * full,
            $sformatf("peak magnitude %0.1f, full-period value %0.1f", $sqrt(real'(best_mag)), full));
    end
    if (b2b) cnt_b2b++;
  endtask

  initial begin
    repeat (5) @(posedge clk);
    rst_n <= 1'b1;
    repeat (2) @(posedge clk);
    run_one(0, N * 80 / 192, 17, AMP, 1'b1, 1'b0);             // sign flip, zero padding
    run_one(0, N / 2, N * 60 / 192, AMP, 1'b1, 1'b1);          // 2P = N, no padding, issued at once
    run_one(0, N * 70 / 192, 3, AMP * 6 / 5, 1'b0, 1'b0);      // no flip
    run_one(1, N * 80 / 192, 0, 0, 1'b0, 1'b0);                // random full-scale signal
    run_one(0, N * 90 / 192, N * 85 / 192, AMP * 4 / 5, 1'b1, 1'b1); // peak near the end of the first half
    check(sat_h + sat_x + sat_i == 0, $sformatf("FFT model saturations %0d/%0d/%0d", sat_h, sat_x, sat_i));
    check(ovf_h + ovf_x + ovf_i == 0, "FFT model frame overflow");
    check(fin_frames == K * NRUNS, $sformatf("%0d FFT input frames", fin_frames));
    $display("mechanisms: bypass=%0d rotated=%0d mem_wr=%0d mem_rd=%0d comb=%0d flip=%0d pad=%0d b2b=%0d",
             cnt_pass[0], cnt_pass.sum() - cnt_pass[0], cnt_we.sum(), cnt_rd, cnt_comb, cnt_flip, cnt_pad, cnt_b2b);
    check(cnt_pass[0] == NRUNS * M, "pass-0 bypass count");
    for (int i = 1; i < K; i++)
      check(cnt_pass[i] == NRUNS * M, $sformatf("pass-%0d rotation count %0d", i, cnt_pass[i]));
    for (int i = 0; i < K - 1; i++)
      check(cnt_we[i] == NRUNS * M, $sformatf("memory %0d write count %0d", i, cnt_we[i]));
    check(cnt_rd == NRUNS * M, "memory read count");
    check(cnt_comb == NRUNS * M, "output combination count");
    check(cnt_flip > 0, "a run with a data sign flip");
    check(cnt_pad > 0, "a run with zero padding");
    check(cnt_b2b > 0, "a run started right after the previous one");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
