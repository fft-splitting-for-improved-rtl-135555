// Three-section combination of complex samples (3-point DFT across sections).
//
// For sample n of the three sections a = x_n, b = x_{n+N/3}, c = x_{n+2N/3}:
//   o0 = a + b + c
//   o1 = a + b*exp(-j2pi/3) + c*exp(+j2pi/3)
//   o2 = a + b*exp(+j2pi/3) + c*exp(-j2pi/3)
// It is computed the way the source design recommends, from the sum s = b + c and
// difference d = b - c:  o1,o2 = a - s/2 -/+ j*(sqrt(3)/2)*d.  Only two real
// multiplications by the constant sqrt(3)/2 are needed (d_re and d_im); the 1/2 is
// a shift. With INVERSE = 1 the outputs o1 and o2 are exchanged, which gives the
// conjugate matrix used to recombine the three inverse-FFT passes into the
// sections y_n, y_{n+N/3}, y_{n+2N/3} of the correlation.
//
// Interface: inputs are IW-bit signed; outputs are IW+2 bits, which can hold the
// largest result (|o| < 3.74 * 2^(IW-1) per component), so nothing saturates.
// Timing: one register stage, result one cycle after the inputs, in_valid follows.
// The rounding (one final round-half-up from 16 extra fraction bits) and the
// 16-bit sqrt(3)/2 constant are choices of this implementation.
module comb3_cplx
  import acq_pkg::*;
#(
  parameter int unsigned IW      = XW_DEFAULT + 2,
  parameter bit          INVERSE = 1'b0
) (
  input  logic                 clk,
  input  logic                 in_valid,
  input  logic signed [IW-1:0] a_re, a_im,
  input  logic signed [IW-1:0] b_re, b_im,
  input  logic signed [IW-1:0] c_re, c_im,
  output logic                 out_valid,
  output logic signed [IW+1:0] o0_re, o0_im,
  output logic signed [IW+1:0] o1_re, o1_im,
  output logic signed [IW+1:0] o2_re, o2_im
);

  // Extended width: IW + 2 integer growth, 16 fraction bits, 2 guard bits.
  localparam int unsigned EW = IW + 20;

  logic signed [EW-1:0] a_re_e, a_im_e, s_re, s_im, d_re, d_im;
  logic signed [EW-1:0] half_s_re, half_s_im;   // s/2 in Q.16
  logic signed [EW-1:0] rot_re, rot_im;         // -j*sqrt(3)/2*d in Q.16
  logic signed [EW-1:0] v0_re, v0_im, v1_re, v1_im, v2_re, v2_im;

  function automatic logic signed [IW+1:0] rnd16(input logic signed [EW-1:0] v);
    logic signed [EW-1:0] t;
    t = (v + (EW'(1) <<< 15)) >>> 16;
    return t[IW+1:0];
  endfunction

  always_comb begin
    a_re_e    = EW'(a_re) <<< 16;
    a_im_e    = EW'(a_im) <<< 16;
    s_re      = EW'(b_re) + EW'(c_re);
    s_im      = EW'(b_im) + EW'(c_im);
    d_re      = EW'(b_re) - EW'(c_re);
    d_im      = EW'(b_im) - EW'(c_im);
    half_s_re = s_re <<< 15;
    half_s_im = s_im <<< 15;
    // -j * k * (d_re + j d_im) = k*d_im - j k*d_re, with k = sqrt(3)/2 in Q1.15 -> Q.16
    rot_re    = (d_im * EW'(SQRT3_2_Q15)) <<< 1;
    rot_im    = -((d_re * EW'(SQRT3_2_Q15)) <<< 1);
    v0_re     = (s_re <<< 16) + a_re_e;
    v0_im     = (s_im <<< 16) + a_im_e;
    v1_re     = a_re_e - half_s_re + rot_re;
    v1_im     = a_im_e - half_s_im + rot_im;
    v2_re     = a_re_e - half_s_re - rot_re;
    v2_im     = a_im_e - half_s_im - rot_im;
  end

  always_ff @(posedge clk) begin
    out_valid <= in_valid;
    o0_re     <= rnd16(v0_re);
    o0_im     <= rnd16(v0_im);
    if (INVERSE) begin
      o1_re <= rnd16(v2_re);
      o1_im <= rnd16(v2_im);
      o2_re <= rnd16(v1_re);
      o2_im <= rnd16(v1_im);
    end else begin
      o1_re <= rnd16(v1_re);
      o1_im <= rnd16(v1_im);
      o2_re <= rnd16(v2_re);
      o2_im <= rnd16(v2_im);
    end
  end

endmodule
