// Complex exponential generator: exp(-j*2*pi*k/N), or exp(+j*2*pi*k/N) with CONJ = 1.
//
// The correlator multiplies pass i by exp(-j*2*pi*i*n/N) before the FFTs and by
// exp(+j*2*pi*i*n/N) after the inverse FFT. This module supplies that factor for
// an angle index k in 0..N-1 (the caller passes k = i*n). It keeps a quarter-wave
// table T[r] = round(A*sin(2*pi*r/N)), r = 0..N/4, A = 2^(TW-1)-1, computed when
// the design is elaborated, and derives cos and sin of any k by quadrant folding:
// with k = q*N/4 + r, cos = (T[N/4-r], -T[r], -T[N/4-r], T[r])[q] and
// sin = (T[r], T[N/4-r], -T[r], -T[N/4-r])[q]. N must be a multiple of 4.
//
// Interface: en, k in; w_re = cos, w_im = -sin (or +sin when CONJ), Q1.(TW-1).
// Timing: registered, one cycle from en/k to w_re/w_im. How the exponentials are
// produced is not given by the source design; the table is this design's choice.
module twiddle_rom
  import acq_pkg::*;
#(
  parameter int unsigned N    = N_DEFAULT,
  parameter int unsigned TW   = TW_DEFAULT,
  parameter bit          CONJ = 1'b0
) (
  input  logic                    clk,
  input  logic                    en,
  input  logic [$clog2(N)-1:0]    k,
  output logic signed [TW-1:0]    w_re,
  output logic signed [TW-1:0]    w_im
);

  localparam int unsigned Q  = N / 4;
  localparam int unsigned KW = $clog2(N);
  localparam int unsigned RW = $clog2(Q + 1);

  logic signed [TW-1:0] sin_tab [0:Q];

  initial begin
    for (int r = 0; r <= int'(Q); r++) begin
      sin_tab[r] = TW'($rtoi($floor(real'((1 << (TW - 1)) - 1)
                       * $sin(2.0 * 3.14159265358979323846 * real'(r) / real'(N)) + 0.5)));
    end
  end

  logic [1:0]     quad;
  logic [RW-1:0]  r_idx, rc_idx;
  logic [KW-1:0]  base;

  always_comb begin
    if (k >= KW'(3 * Q)) begin
      quad = 2'd3;
      base = KW'(3 * Q);
    end else if (k >= KW'(2 * Q)) begin
      quad = 2'd2;
      base = KW'(2 * Q);
    end else if (k >= KW'(Q)) begin
      quad = 2'd1;
      base = KW'(Q);
    end else begin
      quad = 2'd0;
      base = '0;
    end
    r_idx  = RW'(k - base);
    rc_idx = RW'(Q) - r_idx;
  end

  logic signed [TW-1:0] t_s, t_c;   // T[r] and T[Q-r]
  logic [1:0]           quad_q;

  always_ff @(posedge clk) begin
    if (en) begin
      t_s    <= sin_tab[r_idx];
      t_c    <= sin_tab[rc_idx];
      quad_q <= quad;
    end
  end

  logic signed [TW-1:0] cos_v, sin_v;

  always_comb begin
    unique case (quad_q)
      2'd0:    begin cos_v =  t_c; sin_v =  t_s; end
      2'd1:    begin cos_v = -t_s; sin_v =  t_c; end
      2'd2:    begin cos_v = -t_c; sin_v = -t_s; end
      default: begin cos_v =  t_s; sin_v = -t_c; end
    endcase
    w_re = cos_v;
    w_im = CONJ ? sin_v : -sin_v;
  end

endmodule
