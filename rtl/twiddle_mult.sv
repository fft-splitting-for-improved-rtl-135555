// Exponential multiplier with bypass multiplexer.
//
// Samples of pass 1 and pass 2 are multiplied by the exponential w that arrives
// with them (exp(-/+j*2*pi*i*n/N)); samples of pass 0 need no rotation and take
// the bypass path, delayed by the same two cycles as the multiplier so that the
// stream order is kept. The output multiplexer is the one drawn in front of each
// FFT and behind the inverse FFT of the source design.
//
// Interface: in_tag (valid/sop/eop/pass/index), in_re/in_im (AW bits), w_re/w_im
// (TW bits, Q1.(TW-1)); out_tag, out_re/out_im (OW bits).
// Timing: two cycles, one sample per cycle.
module twiddle_mult
  import acq_pkg::*;
#(
  parameter int unsigned AW = DW_DEFAULT,
  parameter int unsigned TW = TW_DEFAULT,
  parameter int unsigned OW = DW_DEFAULT
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  tag_t                 in_tag,
  input  logic signed [AW-1:0] in_re, in_im,
  input  logic signed [TW-1:0] w_re, w_im,
  output tag_t                 out_tag,
  output logic signed [OW-1:0] out_re, out_im
);

  logic signed [OW-1:0] m_re, m_im;
  logic                 m_valid;

  cmul #(.AW(AW), .BW(TW), .OW(OW), .SHIFT(TW - 1), .CONJ_B(1'b0)) u_mul (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_valid (in_tag.valid),
    .a_re     (in_re),
    .a_im     (in_im),
    .b_re     (w_re),
    .b_im     (w_im),
    .out_valid(m_valid),
    .p_re     (m_re),
    .p_im     (m_im)
  );

  tag_t                 tag_d1, tag_d2;
  logic signed [OW-1:0] byp_re_d1, byp_im_d1, byp_re_d2, byp_im_d2;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      tag_d1 <= TAG_IDLE;
      tag_d2 <= TAG_IDLE;
    end else begin
      tag_d1 <= in_tag;
      tag_d2 <= tag_d1;
    end
    byp_re_d1 <= OW'(in_re);
    byp_im_d1 <= OW'(in_im);
    byp_re_d2 <= byp_re_d1;
    byp_im_d2 <= byp_im_d1;
  end

  always_comb begin
    out_tag = tag_d2;
    if (tag_d2.pass == PASS0) begin
      out_re = byp_re_d2;
      out_im = byp_im_d2;
    end else begin
      out_re = m_re;
      out_im = m_im;
    end
  end

  // The multiplier's own valid must track the tag pipeline.
  always_ff @(posedge clk) begin
    if (rst_n) begin
      assert (m_valid == tag_d2.valid)
        else $error("twiddle_mult: multiplier and tag pipelines out of step");
    end
  end

endmodule
