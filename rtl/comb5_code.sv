// Five-section combination of the local code replica (ternary samples).
//
// Same five combinations as comb5_cplx, for a real code whose samples are +1, -1
// or 0 (zero padding): h_k = sum_m h_m * exp(-j*2*pi*k*m/5). Because the inputs
// are real, only the real part of the cosine terms and the imaginary part of the
// sine terms exist, and h_4 = conj(h_1), h_3 = conj(h_2). The sums and differences
// of paired sections are small integers (-2..2), so each product by a constant is
// a shifted, signed copy of the constant; the arithmetic is written as products
// of a 3-bit value by a constant and reduces to adders.
//
// Interface: 2-bit signed inputs; OW-bit outputs with 1.0 = 2^HFRAC (default
// 4096, so |h| <= 5 * 4096 fits 16 bits). o_im[0] is always zero (h_0 is a real
// sum); it is kept so that the outputs line up with comb5_cplx's.
// Timing: one register stage.
// The fixed-point format is a choice of this implementation.
module comb5_code
  import acq_pkg::*;
#(
  parameter int unsigned OW    = DW_DEFAULT,
  parameter int unsigned HFRAC = HFRAC_DEFAULT
) (
  input  logic                 clk,
  input  logic                 in_valid,
  input  logic signed [1:0]    h_in  [5],
  output logic                 out_valid,
  output logic signed [OW-1:0] o_re  [5],
  output logic signed [OW-1:0] o_im  [5]
);

  localparam int unsigned EW = 24;

  localparam logic signed [EW-1:0] C1 = EW'(10126);
  localparam logic signed [EW-1:0] C2 = -EW'(26510);
  localparam logic signed [EW-1:0] S1 = EW'(31164);
  localparam logic signed [EW-1:0] S2 = EW'(19261);

  function automatic logic signed [OW-1:0] rnd(input logic signed [EW-1:0] v);
    logic signed [EW-1:0] t;
    t = (v + (EW'(1) <<< (14 - HFRAC))) >>> (15 - HFRAC);
    return t[OW-1:0];
  endfunction

  logic signed [EW-1:0] a, sa, sb, da, db, r1, r2, t1, t2;

  always_comb begin
    a  = EW'(h_in[0]) <<< 15;
    sa = EW'(h_in[1]) + EW'(h_in[4]);
    sb = EW'(h_in[2]) + EW'(h_in[3]);
    da = EW'(h_in[1]) - EW'(h_in[4]);
    db = EW'(h_in[2]) - EW'(h_in[3]);
    r1 = C1 * sa + C2 * sb;
    r2 = C2 * sa + C1 * sb;
    t1 = S1 * da + S2 * db;
    t2 = S2 * da - S1 * db;
  end

  always_ff @(posedge clk) begin
    out_valid <= in_valid;
    o_re[0]   <= rnd(a + ((sa + sb) <<< 15));
    o_im[0]   <= '0;
    o_re[1]   <= rnd(a + r1);
    o_im[1]   <= rnd(-t1);
    o_re[4]   <= rnd(a + r1);
    o_im[4]   <= rnd(t1);
    o_re[2]   <= rnd(a + r2);
    o_im[2]   <= rnd(-t2);
    o_re[3]   <= rnd(a + r2);
    o_im[3]   <= rnd(t2);
  end

endmodule
