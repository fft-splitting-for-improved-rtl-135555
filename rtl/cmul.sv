// Pipelined complex multiplier with optional conjugate of the second operand.
//
// p = round((a * b) / 2^SHIFT), or a * conj(b) when CONJ_B = 1, saturated to OW
// bits. Four real products are formed in the first stage (the four 18-bit
// multipliers of two DSP blocks on the target FPGA family); the second stage adds
// them, rounds half up and saturates. It is used for the spectrum product
// X_{3k+i} * conj(H_{3k+i}) and inside the exponential multipliers.
//
// Interface: a (AW-bit), b (BW-bit) signed, in_valid; p (OW-bit), out_valid.
// rst_n (synchronous, active low) clears only the valid pipeline.
// Timing: two cycles from inputs to outputs, one result per cycle.
// Pipeline depth, rounding and saturation are choices of this implementation.
module cmul
  import acq_pkg::*;
#(
  parameter int unsigned AW     = DW_DEFAULT,
  parameter int unsigned BW     = DW_DEFAULT,
  parameter int unsigned OW     = DW_DEFAULT,
  parameter int unsigned SHIFT  = 15,
  parameter bit          CONJ_B = 1'b0
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic signed [AW-1:0] a_re, a_im,
  input  logic signed [BW-1:0] b_re, b_im,
  output logic                 out_valid,
  output logic signed [OW-1:0] p_re, p_im
);

  localparam int unsigned PW = AW + BW + 1;

  logic signed [AW+BW-1:0] rr, ii, ri, ir;
  logic                    v1;

  // Stage 1: the four real products.
  always_ff @(posedge clk) begin
    if (!rst_n) v1 <= 1'b0;
    else        v1 <= in_valid;
    rr <= a_re * b_re;
    ii <= a_im * b_im;
    ri <= a_re * b_im;
    ir <= a_im * b_re;
  end

  logic signed [PW-1:0] sum_re, sum_im, rnd_re, rnd_im;

  function automatic logic signed [OW-1:0] sat(input logic signed [PW-1:0] v);
    localparam logic signed [PW-1:0] MAXV = PW'((longint'(1) <<< (OW - 1)) - 1);
    localparam logic signed [PW-1:0] MINV = -PW'(longint'(1) <<< (OW - 1));
    if (v > MAXV)      return OW'(MAXV);
    else if (v < MINV) return OW'(MINV);
    else               return OW'(v);
  endfunction

  always_comb begin
    if (CONJ_B) begin
      sum_re = PW'(rr) + PW'(ii);
      sum_im = PW'(ir) - PW'(ri);
    end else begin
      sum_re = PW'(rr) - PW'(ii);
      sum_im = PW'(ir) + PW'(ri);
    end
    if (SHIFT == 0) begin
      rnd_re = sum_re;
      rnd_im = sum_im;
    end else begin
      rnd_re = (sum_re + (PW'(1) <<< (SHIFT - 1))) >>> SHIFT;
      rnd_im = (sum_im + (PW'(1) <<< (SHIFT - 1))) >>> SHIFT;
    end
  end

  // Stage 2: sum, round, saturate.
  always_ff @(posedge clk) begin
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= v1;
    p_re      <= sat(rnd_re);
    p_im      <= sat(rnd_im);
  end

endmodule
