// Five-section combination of complex samples (5-point DFT across sections).
//
// For sample n of the five sections a = x_n, b = x_{n+N/5}, c = x_{n+2N/5},
// d = x_{n+3N/5}, e = x_{n+4N/5} it forms o_k = sum_m x_m * exp(-j*2*pi*k*m/5),
// k = 0..4. Pairing the sections whose factors are conjugate (b with e, c with d)
// gives sums sa = b+e, sb = c+d and differences da = b-e, db = c-d, and
//   o0 = a + sa + sb
//   o1, o4 = a + (C1*sa + C2*sb) -/+ j*(S1*da + S2*db)
//   o2, o3 = a + (C2*sa + C1*sb) -/+ j*(S2*da - S1*db)
// with C1 = cos(2pi/5), C2 = cos(4pi/5), S1 = sin(2pi/5), S2 = sin(4pi/5): sixteen
// real multiplications by constants, as in the source design's reordering of
// the 5 x 5 matrix into the pattern of the 3-section case. With INVERSE = 1 the
// outputs are exchanged (1 <-> 4, 2 <-> 3), which gives the conjugate matrix used
// to recombine the five inverse-FFT passes.
//
// Interface: IW-bit signed inputs; IW+3-bit outputs (|o| <= 5 * 2^(IW-1)), no
// saturation needed. Timing: one register stage.
// Constants are Q1.15 and the result is rounded half up once from 15 fraction
// bits; both are choices of this implementation.
module comb5_cplx
  import acq_pkg::*;
#(
  parameter int unsigned IW      = XW_DEFAULT,
  parameter bit          INVERSE = 1'b0
) (
  input  logic                 clk,
  input  logic                 in_valid,
  input  logic signed [IW-1:0] in_re [5],
  input  logic signed [IW-1:0] in_im [5],
  output logic                 out_valid,
  output logic signed [IW+2:0] o_re  [5],
  output logic signed [IW+2:0] o_im  [5]
);

  localparam int unsigned EW = IW + 22;

  // Q1.15 constants: round(x * 32768).
  localparam logic signed [EW-1:0] C1 = EW'(10126);    //  cos(2pi/5)
  localparam logic signed [EW-1:0] C2 = -EW'(26510);   //  cos(4pi/5)
  localparam logic signed [EW-1:0] S1 = EW'(31164);    //  sin(2pi/5)
  localparam logic signed [EW-1:0] S2 = EW'(19261);    //  sin(4pi/5)

  function automatic logic signed [IW+2:0] rnd15(input logic signed [EW-1:0] v);
    logic signed [EW-1:0] t;
    t = (v + (EW'(1) <<< 14)) >>> 15;
    return t[IW+2:0];
  endfunction

  logic signed [EW-1:0] a_re, a_im, sa_re, sa_im, sb_re, sb_im, da_re, da_im, db_re, db_im;
  logic signed [EW-1:0] r1_re, r1_im, r2_re, r2_im, t1_re, t1_im, t2_re, t2_im;
  logic signed [EW-1:0] v_re [5], v_im [5];

  always_comb begin
    a_re  = EW'(in_re[0]) <<< 15;
    a_im  = EW'(in_im[0]) <<< 15;
    sa_re = EW'(in_re[1]) + EW'(in_re[4]);
    sa_im = EW'(in_im[1]) + EW'(in_im[4]);
    sb_re = EW'(in_re[2]) + EW'(in_re[3]);
    sb_im = EW'(in_im[2]) + EW'(in_im[3]);
    da_re = EW'(in_re[1]) - EW'(in_re[4]);
    da_im = EW'(in_im[1]) - EW'(in_im[4]);
    db_re = EW'(in_re[2]) - EW'(in_re[3]);
    db_im = EW'(in_im[2]) - EW'(in_im[3]);
    r1_re = C1 * sa_re + C2 * sb_re;
    r1_im = C1 * sa_im + C2 * sb_im;
    r2_re = C2 * sa_re + C1 * sb_re;
    r2_im = C2 * sa_im + C1 * sb_im;
    t1_re = S1 * da_re + S2 * db_re;
    t1_im = S1 * da_im + S2 * db_im;
    t2_re = S2 * da_re - S1 * db_re;
    t2_im = S2 * da_im - S1 * db_im;
    // -j*t = t_im - j*t_re
    v_re[0] = a_re + ((sa_re + sb_re) <<< 15);
    v_im[0] = a_im + ((sa_im + sb_im) <<< 15);
    v_re[1] = a_re + r1_re + t1_im;
    v_im[1] = a_im + r1_im - t1_re;
    v_re[4] = a_re + r1_re - t1_im;
    v_im[4] = a_im + r1_im + t1_re;
    v_re[2] = a_re + r2_re + t2_im;
    v_im[2] = a_im + r2_im - t2_re;
    v_re[3] = a_re + r2_re - t2_im;
    v_im[3] = a_im + r2_im + t2_re;
  end

  always_ff @(posedge clk) begin
    out_valid <= in_valid;
    for (int k = 0; k < 5; k++) begin
      // Output k takes the forward result k, or 5-k for the inverse matrix.
      o_re[k] <= rnd15(v_re[(INVERSE && k != 0) ? 5 - k : k]);
      o_im[k] <= rnd15(v_im[(INVERSE && k != 0) ? 5 - k : k]);
    end
  end

endmodule
