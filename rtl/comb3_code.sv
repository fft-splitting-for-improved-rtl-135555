// Three-section combination of the local code replica, without multipliers.
//
// The code samples h_n, h_{n+N/3}, h_{n+2N/3} are ternary: +1/-1 over the code and
// 0 in the zero padding. The module forms the same three combinations as
// comb3_cplx (h0 = a+b+c, h1/h2 = a - (b+c)/2 -/+ j*(sqrt(3)/2)*(b-c)), but
// because the inputs are real and take only three values, the sqrt(3)/2 product is
// a choice of sign and shift of one constant, and the 1/2 is a shift: only adders
// remain, as the source design proposes for the code branch.
//
// Interface: h_a/h_b/h_c are 2-bit signed (-1, 0, +1). The outputs are OW-bit
// signed fixed point where 1.0 is 2^HFRAC (default 4096), so |h| <= 3 * 2^HFRAC.
// Timing: one register stage. The fixed-point format and the rounding of the
// sqrt(3)/2 constant are choices of this implementation.
module comb3_code
  import acq_pkg::*;
#(
  parameter int unsigned OW    = DW_DEFAULT,
  parameter int unsigned HFRAC = HFRAC_DEFAULT
) (
  input  logic                 clk,
  input  logic                 in_valid,
  input  logic signed [1:0]    h_a, h_b, h_c,
  output logic                 out_valid,
  output logic signed [OW-1:0] h0_re, h0_im,
  output logic signed [OW-1:0] h1_re, h1_im,
  output logic signed [OW-1:0] h2_re, h2_im
);

  // sqrt(3)/2 at the output scale, rounded to an integer.
  localparam int K = int'((SQRT3_2_Q15 * (longint'(1) <<< HFRAC) + (longint'(1) <<< 14)) >>> 15);

  logic signed [3:0]    sum3, s, d, dbl_re;
  logic signed [OW-1:0] rot;     // imaginary part of -j*sqrt(3)/2*d
  logic signed [OW-1:0] re1;     // a - s/2 at the output scale

  always_comb begin
    s      = 4'(h_b) + 4'(h_c);
    d      = 4'(h_b) - 4'(h_c);
    sum3   = 4'(h_a) + s;
    dbl_re = (4'(h_a) <<< 1) - s;                  // 2a - s, in -4..4
    re1    = OW'(dbl_re) <<< (HFRAC - 1);
    unique case (d)
      4'sd2:   rot = -OW'(2 * K);
      4'sd1:   rot = -OW'(K);
      -4'sd1:  rot =  OW'(K);
      -4'sd2:  rot =  OW'(2 * K);
      default: rot = '0;
    endcase
  end

  always_ff @(posedge clk) begin
    out_valid <= in_valid;
    h0_re     <= OW'(sum3) <<< HFRAC;
    h0_im     <= '0;
    h1_re     <= re1;
    h1_im     <= rot;
    h2_re     <= re1;
    h2_im     <= -rot;
  end

endmodule
