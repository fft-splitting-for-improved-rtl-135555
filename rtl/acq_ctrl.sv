// Pass sequencer of the time-multiplexed correlator.
//
// One correlation is computed in K passes i = 0 .. K-1 that reuse the same FFT
// cores. On start the sequencer reads section index n = 0 .. M-1 once per pass,
// one index per clock and with no gap between passes, so an operation occupies
// the FFT inputs for exactly K*M cycles. Each read carries a tag with the
// pass, the index and start/end-of-frame markers that the rest of the datapath
// uses to select the combination output, the exponential and the frame limits.
//
// Interface: start (ignored while busy), busy; rd/addr to the section buffers;
// tag describing the sample being read. All outputs are registered: the tag and
// the read strobe appear together, the buffer data follows one cycle later.
// The pass order follows the source design; the counters are this design's own.
module acq_ctrl
  import acq_pkg::*;
#(
  parameter int unsigned M = M_DEFAULT,
  parameter int unsigned K = K_DEFAULT
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 start,
  output logic                 busy,
  output logic                 rd,
  output logic [$clog2(M)-1:0] addr,
  output tag_t                 tag
);

  localparam int unsigned MW = $clog2(M);

  logic [MW-1:0] n;
  pass_t         pass;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy <= 1'b0;
      n    <= '0;
      pass <= PASS0;
      rd   <= 1'b0;
      addr <= '0;
      tag  <= TAG_IDLE;
    end else begin
      rd  <= busy;
      tag <= TAG_IDLE;
      if (busy) begin
        addr      <= n;
        tag.valid <= 1'b1;
        tag.sop   <= (n == '0);
        tag.eop   <= (n == MW'(M - 1));
        tag.pass  <= pass;
        tag.idx   <= IDX_W'(n);
        if (n == MW'(M - 1)) begin
          n <= '0;
          if (pass == pass_t'(K - 1)) begin
            pass <= PASS0;
            busy <= 1'b0;
          end else begin
            pass <= pass_t'(pass + 1'b1);
          end
        end else begin
          n <= n + 1'b1;
        end
      end else if (start) begin
        busy <= 1'b1;
        n    <= '0;
        pass <= PASS0;
      end
    end
  end

endmodule
