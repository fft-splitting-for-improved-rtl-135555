// Inverse-FFT side of the correlator: de-rotation, pass memories and output
// combination.
//
// The inverse FFT delivers one M-point frame per pass (M = N/K). This unit counts
// the frames (the first frame after reset is pass 0) and the index n inside each
// frame, multiplies pass i = 1 .. K-1 by exp(+j*2*pi*i*n/N) (pass 0 is bypassed)
// to obtain y_{i,n}, writes y_{0,n} .. y_{K-2,n} into K-1 M-word memories, and
// while y_{K-1,n} arrives reads all memories at the same n and combines the K
// values with the conjugate K-point matrix; for K = 3
//   y_n        = y0 + y1 + y2
//   y_{n+N/3}  = y0 + y1*exp(+j2pi/3) + y2*exp(-j2pi/3)
//   y_{n+2N/3} = y0 + y1*exp(-j2pi/3) + y2*exp(+j2pi/3)
// and output k is section y_{n+kN/K} of the N-point circular correlation.
// The structure (multiplier with bypass, K-1 memories, combination) follows the
// source design; the frame counting and the pipeline alignment are this design's.
//
// Interface: in_valid/in_sop/in_eop/in_re/in_im, the IFFT output stream (DW bits,
// natural order); y_valid, y_idx and the K sections (DW+2 bits for K = 3, DW+3
// for K = 5); done pulses with the last output of an operation.
// Timing: the outputs of index n appear 4 cycles after y_{K-1,n}'s input sample.
module recomb_unit
  import acq_pkg::*;
#(
  parameter int unsigned N  = N_DEFAULT,
  parameter int unsigned K  = K_DEFAULT,
  parameter int unsigned DW = DW_DEFAULT,
  parameter int unsigned TW = TW_DEFAULT,
  parameter int unsigned GW = (K == 5) ? 3 : 2
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  in_valid,
  input  logic                  in_sop,
  input  logic                  in_eop,
  input  logic signed [DW-1:0]  in_re,
  input  logic signed [DW-1:0]  in_im,
  output logic                  y_valid,
  output logic [$clog2(N/K)-1:0] y_idx,
  output logic signed [DW+GW-1:0] y_re [K],
  output logic signed [DW+GW-1:0] y_im [K],
  output logic                  done
);

  localparam int unsigned M  = N / K;
  localparam pass_t       LAST = pass_t'(K - 1);

  if (K != 3 && K != 5) begin : g_bad_k
    $error("recomb_unit: K must be 3 or 5");
  end
  localparam int unsigned MW = $clog2(M);
  localparam int unsigned KW = $clog2(N);

  // ---- frame and index tracking (stage 0) ----
  pass_t         cur_pass;
  logic [MW-1:0] idx_cnt, idx0;
  tag_t          tag0;
  logic [KW-1:0] k0;

  always_comb begin
    idx0       = in_sop ? '0 : idx_cnt;
    tag0.valid = in_valid;
    tag0.sop   = in_sop;
    tag0.eop   = in_eop;
    tag0.pass  = cur_pass;
    tag0.idx   = IDX_W'(idx0);
    k0         = KW'(idx0) * KW'(cur_pass);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cur_pass <= PASS0;
      idx_cnt  <= '0;
    end else if (in_valid) begin
      if (in_eop) begin
        idx_cnt <= '0;
        cur_pass <= (cur_pass == LAST) ? PASS0 : pass_t'(cur_pass + 1'b1);
      end else begin
        idx_cnt <= idx0 + 1'b1;
      end
    end
  end

  // ---- exponential exp(+j*2*pi*k/N), aligned with stage 1 ----
  logic signed [TW-1:0] w_re, w_im;

  twiddle_rom #(.N(N), .TW(TW), .CONJ(1'b1)) u_rom (
    .clk (clk),
    .en  (in_valid),
    .k   (k0),
    .w_re(w_re),
    .w_im(w_im)
  );

  tag_t                 tag1, tag2;
  logic signed [DW-1:0] s1_re, s1_im;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      tag1 <= TAG_IDLE;
      tag2 <= TAG_IDLE;
    end else begin
      tag1 <= tag0;
      tag2 <= tag1;
    end
    s1_re <= in_re;
    s1_im <= in_im;
  end

  // ---- multiplier with bypass: y_{i,n} at stage 3 ----
  tag_t                 tag3;
  logic signed [DW-1:0] yi_re, yi_im;

  twiddle_mult #(.AW(DW), .TW(TW), .OW(DW)) u_rot (
    .clk    (clk),
    .rst_n  (rst_n),
    .in_tag (tag1),
    .in_re  (s1_re),
    .in_im  (s1_im),
    .w_re   (w_re),
    .w_im   (w_im),
    .out_tag(tag3),
    .out_re (yi_re),
    .out_im (yi_im)
  );

  // ---- pass memories: written at stage 3, read issued at stage 2 ----
  logic            rd_en;
  logic [K-2:0]    we;
  logic [MW-1:0]   raddr, waddr;
  logic [2*DW-1:0] wdata;
  logic [2*DW-1:0] mem_q [K-1];

  always_comb begin
    rd_en = tag2.valid && (tag2.pass == LAST);
    raddr = MW'(tag2.idx);
    waddr = MW'(tag3.idx);
    wdata = {yi_re, yi_im};
    for (int i = 0; i < K - 1; i++) begin
      we[i] = tag3.valid && (tag3.pass == pass_t'(i));
    end
  end

  for (genvar g = 0; g < K - 1; g++) begin : g_mem
    corr_mem #(.DEPTH(M), .W(2 * DW)) u_mem (
      .clk(clk), .we(we[g]), .waddr(waddr), .wdata(wdata),
      .re(rd_en), .raddr(raddr), .rdata(mem_q[g])
    );
  end

  // ---- output combination (conjugate matrix), stage 4 ----
  logic                 comb_in_valid, comb_out_valid;
  logic signed [DW-1:0] c_re [K], c_im [K];
  tag_t                 tag4;

  assign comb_in_valid = tag3.valid && (tag3.pass == LAST);

  always_comb begin
    for (int i = 0; i < K - 1; i++) begin
      c_re[i] = mem_q[i][2*DW-1:DW];
      c_im[i] = mem_q[i][DW-1:0];
    end
    c_re[K-1] = yi_re;
    c_im[K-1] = yi_im;
  end

  if (K == 3) begin : g_comb3
    comb3_cplx #(.IW(DW), .INVERSE(1'b1)) u_comb (
      .clk      (clk),
      .in_valid (comb_in_valid),
      .a_re     (c_re[0]), .a_im(c_im[0]),
      .b_re     (c_re[1]), .b_im(c_im[1]),
      .c_re     (c_re[2]), .c_im(c_im[2]),
      .out_valid(comb_out_valid),
      .o0_re    (y_re[0]), .o0_im(y_im[0]),
      .o1_re    (y_re[1]), .o1_im(y_im[1]),
      .o2_re    (y_re[2]), .o2_im(y_im[2])
    );
  end else begin : g_comb5
    comb5_cplx #(.IW(DW), .INVERSE(1'b1)) u_comb (
      .clk      (clk),
      .in_valid (comb_in_valid),
      .in_re    (c_re),
      .in_im    (c_im),
      .out_valid(comb_out_valid),
      .o_re     (y_re),
      .o_im     (y_im)
    );
  end

  always_ff @(posedge clk) begin
    if (!rst_n) tag4 <= TAG_IDLE;
    else        tag4 <= tag3;
  end

  always_comb begin
    y_valid = tag4.valid && (tag4.pass == LAST);
    y_idx   = MW'(tag4.idx);
    done    = y_valid && tag4.eop;
  end

  // A frame must start with sop at index 0 and end with eop at index M-1.
  always_ff @(posedge clk) begin
    if (rst_n && in_valid) begin
      assert (in_sop == (idx_cnt == '0))
        else $error("recomb_unit: start of frame not at index 0");
      assert (in_eop == (idx0 == MW'(M - 1)))
        else $error("recomb_unit: end of frame not at index M-1");
    end
    if (rst_n) begin
      assert (comb_out_valid == y_valid)
        else $error("recomb_unit: combination and tag pipelines out of step");
    end
  end

endmodule
