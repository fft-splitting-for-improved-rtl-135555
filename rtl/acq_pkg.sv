// Shared constants and types of the split-FFT correlator.
//
// The correlator computes an N-point circular correlation with three M-point FFT
// cores (M = N/K) that are each used K times, once per "pass" i = 0 .. K-1.
// The main configuration splits N = 49152 into K = 3 sections of 16384 samples
// (9-FFT solution); the alternative splits N = 40960 into K = 5 sections of 8192
// samples (15-FFT solution). Every sample that travels down the datapath carries
// a tag_t: a valid strobe, start/end-of-frame markers, the pass it belongs to and
// its index n inside the M-point frame. The sizes and the 16-bit FFT interface
// follow the source design; the tag layout, the 12-bit input samples and the
// fixed-point scalings are choices of this implementation.
package acq_pkg;

  // Number of sections K, correlation length N and FFT length M = N/K of the
  // main configuration.
  localparam int unsigned K_DEFAULT  = 3;
  localparam int unsigned N_DEFAULT  = 49152;
  localparam int unsigned M_DEFAULT  = N_DEFAULT / K_DEFAULT;

  // Data widths: FFT interface, twiddle factors, input signal samples.
  localparam int unsigned DW_DEFAULT = 16;
  localparam int unsigned TW_DEFAULT = 16;
  localparam int unsigned XW_DEFAULT = 12;

  // Fixed-point position of 1.0 at the output of the code combination.
  localparam int unsigned HFRAC_DEFAULT = 12;

  // Width of the index field in a tag; large enough for any M up to 65536.
  localparam int unsigned IDX_W = 16;

  // sqrt(3)/2 in Q1.15: round(0.8660254 * 32768).
  localparam logic signed [16:0] SQRT3_2_Q15 = 17'sd28378;

  typedef enum logic [2:0] {
    PASS0 = 3'd0,
    PASS1 = 3'd1,
    PASS2 = 3'd2,
    PASS3 = 3'd3,
    PASS4 = 3'd4
  } pass_t;

  typedef struct packed {
    logic             valid;
    logic             sop;
    logic             eop;
    pass_t            pass;
    logic [IDX_W-1:0] idx;
  } tag_t;

  localparam tag_t TAG_IDLE = '{valid: 1'b0, sop: 1'b0, eop: 1'b0, pass: PASS0, idx: '0};

endpackage
