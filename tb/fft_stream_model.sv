// Behavioural model of a streaming FFT / IFFT core (simulation only).
//
// Stands in for the FPGA vendor's streaming FFT core in the testbenches. It takes
// one complex sample per valid cycle, frames delimited by sop/eop, computes the
// M-point DFT (INVERSE = 0: exp(-j...), INVERSE = 1: exp(+j...), no 1/M) in double
// precision with an iterative radix-2 algorithm, divides by 2^SCALE, rounds to the
// nearest integer and saturates to DW bits. The frame is sent out in natural order
// starting the cycle after its eop, one sample per cycle; two output buffers let
// frames arrive back to back. The latency therefore depends only on M, so two
// models with the same M stay in lockstep. M must be a power of two.
// sat_count counts saturated output components, ovf_count frames that arrived
// while both output buffers were still full.
module fft_stream_model #(
  parameter int M       = 64,
  parameter int DW      = 16,
  parameter int SCALE   = 3,
  parameter bit INVERSE = 1'b0
) (
  input  logic                 clk,
  input  logic                 in_valid,
  input  logic                 in_sop,
  input  logic                 in_eop,
  input  logic signed [DW-1:0] in_re,
  input  logic signed [DW-1:0] in_im,
  output logic                 out_valid,
  output logic                 out_sop,
  output logic                 out_eop,
  output logic signed [DW-1:0] out_re,
  output logic signed [DW-1:0] out_im,
  output int                   sat_count,
  output int                   ovf_count
);

  localparam real PI = 3.14159265358979323846;

  real ibuf_re [M];
  real ibuf_im [M];
  int  obuf_re [2][M];
  int  obuf_im [2][M];
  bit  ready   [2];
  int  wr_sel, emit_sel, emit_idx, in_idx;
  bit  emitting;

  initial begin
    sat_count = 0;
    ovf_count = 0;
    ready[0]  = 0;
    ready[1]  = 0;
    wr_sel    = 0;
    emit_sel  = 0;
    emit_idx  = 0;
    in_idx    = 0;
    emitting  = 0;
    out_valid = 0;
    out_sop   = 0;
    out_eop   = 0;
    out_re    = '0;
    out_im    = '0;
    if ((M & (M - 1)) != 0) $fatal(1, "fft_stream_model: M must be a power of two");
  end

  function automatic int quant(input real v);
    real s;
    int  q;
    s = v / real'(longint'(1) << SCALE);
    q = $rtoi($floor(s + 0.5));
    if (q > (1 << (DW - 1)) - 1) begin
      sat_count++;
      q = (1 << (DW - 1)) - 1;
    end else if (q < -(1 << (DW - 1))) begin
      sat_count++;
      q = -(1 << (DW - 1));
    end
    return q;
  endfunction

  task automatic transform(input int sel);
    real re [M];
    real im [M];
    int  j, bits;
    bits = $clog2(M);
    for (int i = 0; i < M; i++) begin
      j = 0;
      for (int b = 0; b < bits; b++) if (i[b]) j |= 1 << (bits - 1 - b);
      re[j] = ibuf_re[i];
      im[j] = ibuf_im[i];
    end
    for (int len = 2; len <= M; len *= 2) begin
      for (int s = 0; s < M; s += len) begin
        for (int t = 0; t < len / 2; t++) begin
          real ang, wr, wi, ur, ui, vr, vi;
          ang = (INVERSE ? 2.0 : -2.0) * PI * real'(t) / real'(len);
          wr  = $cos(ang);
          wi  = $sin(ang);
          ur  = re[s + t];
          ui  = im[s + t];
          vr  = re[s + t + len / 2] * wr - im[s + t + len / 2] * wi;
          vi  = re[s + t + len / 2] * wi + im[s + t + len / 2] * wr;
          re[s + t]           = ur + vr;
          im[s + t]           = ui + vi;
          re[s + t + len / 2] = ur - vr;
          im[s + t + len / 2] = ui - vi;
        end
      end
    end
    for (int i = 0; i < M; i++) begin
      obuf_re[sel][i] = quant(re[i]);
      obuf_im[sel][i] = quant(im[i]);
    end
  endtask

  always @(posedge clk) begin
    // Output side.
    if (!emitting && ready[emit_sel]) begin
      emitting = 1;
      emit_idx = 0;
    end
    if (emitting) begin
      out_valid <= 1'b1;
      out_sop   <= (emit_idx == 0);
      out_eop   <= (emit_idx == M - 1);
      out_re    <= DW'(obuf_re[emit_sel][emit_idx]);
      out_im    <= DW'(obuf_im[emit_sel][emit_idx]);
      if (emit_idx == M - 1) begin
        emitting        = 0;
        ready[emit_sel] = 0;
        emit_sel        = 1 - emit_sel;
      end else begin
        emit_idx++;
      end
    end else begin
      out_valid <= 1'b0;
      out_sop   <= 1'b0;
      out_eop   <= 1'b0;
    end
    // Input side.
    if (in_valid) begin
      if (in_sop) in_idx = 0;
      if (in_idx < M) begin
        ibuf_re[in_idx] = real'(in_re);
        ibuf_im[in_idx] = real'(in_im);
      end
      in_idx++;
      if (in_eop) begin
        if (ready[wr_sel]) ovf_count++;
        transform(wr_sel);
        ready[wr_sel] = 1;
        wr_sel        = 1 - wr_sel;
        in_idx        = 0;
      end
    end
  end

endmodule
