// Split-FFT circular correlator for parallel code search acquisition of GNSS
// signals (9-FFT solution, time multiplexed; K = 5 gives the 15-FFT solution).
//
// The acquisition needs the N-point circular correlation of a received signal x_n
// that covers two code periods and a local code h_n that covers one period and is
// zero padded. With N = 49152 = 3 * 16384 each N-point FFT is split into three
// 16384-point FFTs: sections of the input are first combined
//   x_{0,n} = a+b+c,  x_{1,n} = a+b*W3+c*W3^*,  x_{2,n} = a+b*W3^*+c*W3
//   (a = x_n, b = x_{n+N/3}, c = x_{n+2N/3}, W3 = exp(-j2pi/3)),
// x_{i,n} is multiplied by exp(-j*2*pi*i*n/N), and the 16384-point FFT of it
// gives the output bins X_{3k+i}. Only three FFT cores are used: FFT* for the
// code, FFT for the signal, IFFT for the product, each used three times (pass
// i = 0, 1, 2). The IFFT output of pass i, multiplied by exp(+j*2*pi*i*n/N), is
// y_{i,n}; y_0 and y_1 are kept in two memories and, when y_2 arrives, the three
// are recombined into y_n, y_{n+N/3}, y_{n+2N/3}, the full correlation.
//
// With K = 5 (and N = 40960) the same structure splits the correlation into five
// 8192-point sections: five input combinations per branch (comb5_*), five passes,
// four memories and a five-point output combination. Any N with N/K a power of
// two and N a multiple of 4 can be used.
//
// The FFT cores are not part of this module: it drives and receives their
// streams (valid, start/end of frame, 16-bit real and imaginary parts, natural
// order, one sample per cycle). The FFT* and FFT cores must be configured alike so
// that their outputs arrive in the same cycles. The three sections of x and h are
// read in parallel from external buffers: src_rd/src_addr, data one cycle later.
//
// Timing: after start, the FFT inputs carry K*N/K = N samples back to back (4
// cycles after src_rd); the spectrum product reaches the IFFT 2 cycles after the
// FFT outputs; y_valid follows each last-pass IFFT sample by 4 cycles, for N/K
// consecutive cycles, and done marks the last one.
//
// Scaling: y = N * 2^(HFRAC-PROD_SHIFT) * sum_n x_{n+m} h_n, further divided by
// whatever scaling the FFT and IFFT cores apply. The block structure follows the
// source design; widths of the input samples, scalings, the code format
// (-1/0/+1) and the stream handshake are choices of this implementation.
module split_fft_correlator
  import acq_pkg::*;
#(
  parameter int unsigned N          = N_DEFAULT,
  parameter int unsigned K          = K_DEFAULT,
  parameter int unsigned XW         = XW_DEFAULT,
  parameter int unsigned DW         = DW_DEFAULT,
  parameter int unsigned TW         = TW_DEFAULT,
  parameter int unsigned HFRAC      = HFRAC_DEFAULT,
  parameter int unsigned PROD_SHIFT = 15,
  parameter int unsigned GW         = (K == 5) ? 3 : 2
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     start,
  output logic                     busy,

  // Section buffers: index n of the K sections, data one cycle after src_rd.
  output logic                     src_rd,
  output logic [$clog2(N/K)-1:0]   src_addr,
  input  logic signed [XW-1:0]     src_x_re [K],
  input  logic signed [XW-1:0]     src_x_im [K],
  input  logic signed [1:0]        src_h    [K],

  // To the FFT* core (local code) and the FFT core (signal).
  output logic                     fft_h_in_valid, fft_h_in_sop, fft_h_in_eop,
  output logic signed [DW-1:0]     fft_h_in_re, fft_h_in_im,
  output logic                     fft_x_in_valid, fft_x_in_sop, fft_x_in_eop,
  output logic signed [DW-1:0]     fft_x_in_re, fft_x_in_im,

  // From the FFT* and FFT cores.
  input  logic                     fft_h_out_valid, fft_h_out_sop, fft_h_out_eop,
  input  logic signed [DW-1:0]     fft_h_out_re, fft_h_out_im,
  input  logic                     fft_x_out_valid, fft_x_out_sop, fft_x_out_eop,
  input  logic signed [DW-1:0]     fft_x_out_re, fft_x_out_im,

  // To and from the IFFT core.
  output logic                     ifft_in_valid, ifft_in_sop, ifft_in_eop,
  output logic signed [DW-1:0]     ifft_in_re, ifft_in_im,
  input  logic                     ifft_out_valid, ifft_out_sop, ifft_out_eop,
  input  logic signed [DW-1:0]     ifft_out_re, ifft_out_im,

  // Correlation output: y_re/y_im[k] is y_{n+k*N/K} at n = y_idx.
  output logic                     y_valid,
  output logic [$clog2(N/K)-1:0]   y_idx,
  output logic signed [DW+GW-1:0]  y_re [K],
  output logic signed [DW+GW-1:0]  y_im [K],
  output logic                     done
);

  localparam int unsigned M  = N / K;
  localparam int unsigned KW = $clog2(N);
  localparam int unsigned CW = XW + GW;     // width of the signal combinations

  if (K != 3 && K != 5) begin : g_bad_k
    $error("split_fft_correlator: K must be 3 or 5");
  end

  // ---------------- sequencer ----------------
  tag_t tag_c0, tag_d1, tag_d2;

  acq_ctrl #(.M(M), .K(K)) u_ctrl (
    .clk  (clk),
    .rst_n(rst_n),
    .start(start),
    .busy (busy),
    .rd   (src_rd),
    .addr (src_addr),
    .tag  (tag_c0)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      tag_d1 <= TAG_IDLE;
      tag_d2 <= TAG_IDLE;
    end else begin
      tag_d1 <= tag_c0;
      tag_d2 <= tag_d1;
    end
  end

  // ---------------- section combinations (stage d1 -> d2) ----------------
  logic signed [DW-1:0] h_re [K], h_im [K];
  logic signed [CW-1:0] x_re [K], x_im [K];
  logic                 hc_valid, xc_valid;

  if (K == 3) begin : g_comb3
    comb3_code #(.OW(DW), .HFRAC(HFRAC)) u_comb_h (
      .clk      (clk),
      .in_valid (tag_d1.valid),
      .h_a      (src_h[0]),
      .h_b      (src_h[1]),
      .h_c      (src_h[2]),
      .out_valid(hc_valid),
      .h0_re    (h_re[0]), .h0_im(h_im[0]),
      .h1_re    (h_re[1]), .h1_im(h_im[1]),
      .h2_re    (h_re[2]), .h2_im(h_im[2])
    );

    comb3_cplx #(.IW(XW), .INVERSE(1'b0)) u_comb_x (
      .clk      (clk),
      .in_valid (tag_d1.valid),
      .a_re     (src_x_re[0]), .a_im(src_x_im[0]),
      .b_re     (src_x_re[1]), .b_im(src_x_im[1]),
      .c_re     (src_x_re[2]), .c_im(src_x_im[2]),
      .out_valid(xc_valid),
      .o0_re    (x_re[0]), .o0_im(x_im[0]),
      .o1_re    (x_re[1]), .o1_im(x_im[1]),
      .o2_re    (x_re[2]), .o2_im(x_im[2])
    );
  end else begin : g_comb5
    comb5_code #(.OW(DW), .HFRAC(HFRAC)) u_comb_h (
      .clk      (clk),
      .in_valid (tag_d1.valid),
      .h_in     (src_h),
      .out_valid(hc_valid),
      .o_re     (h_re),
      .o_im     (h_im)
    );

    comb5_cplx #(.IW(XW), .INVERSE(1'b0)) u_comb_x (
      .clk      (clk),
      .in_valid (tag_d1.valid),
      .in_re    (src_x_re),
      .in_im    (src_x_im),
      .out_valid(xc_valid),
      .o_re     (x_re),
      .o_im     (x_im)
    );
  end

  // Pass i selects combination i.
  logic signed [DW-1:0] hsel_re, hsel_im;
  logic signed [CW-1:0] xsel_re, xsel_im;

  always_comb begin
    hsel_re = h_re[0];
    hsel_im = h_im[0];
    xsel_re = x_re[0];
    xsel_im = x_im[0];
    for (int i = 1; i < K; i++) begin
      if (tag_d2.pass == pass_t'(i)) begin
        hsel_re = h_re[i];
        hsel_im = h_im[i];
        xsel_re = x_re[i];
        xsel_im = x_im[i];
      end
    end
  end

  // ---------------- exp(-j*2*pi*i*n/N), shared by both branches ----------------
  logic [KW-1:0]        k_d1;
  logic signed [TW-1:0] wf_re, wf_im;

  always_comb begin
    k_d1 = KW'(tag_d1.idx) * KW'(tag_d1.pass);
  end

  twiddle_rom #(.N(N), .TW(TW), .CONJ(1'b0)) u_rom_fwd (
    .clk (clk),
    .en  (tag_d1.valid),
    .k   (k_d1),
    .w_re(wf_re),
    .w_im(wf_im)
  );

  // ---------------- multipliers with bypass, then FFT inputs (d2 -> d4) ----------------
  tag_t th_tag, tx_tag;

  twiddle_mult #(.AW(DW), .TW(TW), .OW(DW)) u_rot_h (
    .clk    (clk),
    .rst_n  (rst_n),
    .in_tag (tag_d2),
    .in_re  (hsel_re),
    .in_im  (hsel_im),
    .w_re   (wf_re),
    .w_im   (wf_im),
    .out_tag(th_tag),
    .out_re (fft_h_in_re),
    .out_im (fft_h_in_im)
  );

  twiddle_mult #(.AW(CW), .TW(TW), .OW(DW)) u_rot_x (
    .clk    (clk),
    .rst_n  (rst_n),
    .in_tag (tag_d2),
    .in_re  (xsel_re),
    .in_im  (xsel_im),
    .w_re   (wf_re),
    .w_im   (wf_im),
    .out_tag(tx_tag),
    .out_re (fft_x_in_re),
    .out_im (fft_x_in_im)
  );

  always_comb begin
    fft_h_in_valid = th_tag.valid;
    fft_h_in_sop   = th_tag.valid && th_tag.sop;
    fft_h_in_eop   = th_tag.valid && th_tag.eop;
    fft_x_in_valid = tx_tag.valid;
    fft_x_in_sop   = tx_tag.valid && tx_tag.sop;
    fft_x_in_eop   = tx_tag.valid && tx_tag.eop;
  end

  // ---------------- spectrum product X_{Kk+i} * conj(H_{Kk+i}) ----------------
  logic [1:0] sop_pipe, eop_pipe;

  cmul #(.AW(DW), .BW(DW), .OW(DW), .SHIFT(PROD_SHIFT), .CONJ_B(1'b1)) u_prod (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_valid (fft_x_out_valid),
    .a_re     (fft_x_out_re),
    .a_im     (fft_x_out_im),
    .b_re     (fft_h_out_re),
    .b_im     (fft_h_out_im),
    .out_valid(ifft_in_valid),
    .p_re     (ifft_in_re),
    .p_im     (ifft_in_im)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      sop_pipe <= '0;
      eop_pipe <= '0;
    end else begin
      sop_pipe <= {sop_pipe[0], fft_x_out_valid && fft_x_out_sop};
      eop_pipe <= {eop_pipe[0], fft_x_out_valid && fft_x_out_eop};
    end
  end

  assign ifft_in_sop = sop_pipe[1];
  assign ifft_in_eop = eop_pipe[1];

  // ---------------- IFFT side ----------------
  recomb_unit #(.N(N), .K(K), .DW(DW), .TW(TW), .GW(GW)) u_recomb (
    .clk     (clk),
    .rst_n   (rst_n),
    .in_valid(ifft_out_valid),
    .in_sop  (ifft_out_sop),
    .in_eop  (ifft_out_eop),
    .in_re   (ifft_out_re),
    .in_im   (ifft_out_im),
    .y_valid (y_valid),
    .y_idx   (y_idx),
    .y_re    (y_re),
    .y_im    (y_im),
    .done    (done)
  );

  // The FFT* and FFT cores run in lockstep; the product needs both bins at once.
  always_ff @(posedge clk) begin
    if (rst_n) begin
      assert (fft_h_out_valid == fft_x_out_valid)
        else $error("split_fft_correlator: FFT* and FFT outputs not aligned");
      assert (!fft_x_out_valid || (fft_h_out_sop == fft_x_out_sop && fft_h_out_eop == fft_x_out_eop))
        else $error("split_fft_correlator: FFT* and FFT frames not aligned");
      assert (hc_valid == xc_valid);
    end
  end

endmodule
