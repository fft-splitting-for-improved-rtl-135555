// Test of twiddle_mult: a random stream of tagged samples over the three passes
// with random exponentials. Pass-0 samples must come out unchanged (bypass),
// pass-1/2 samples must equal the bit-exact rounded product with w; the tag and
// the data must arrive together two cycles after the input.
module twiddle_mult_tb;
  import acq_pkg::*;
  localparam int AW = 14;
  localparam int TW = 16;
  localparam int OW = 16;

  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst_n = 1'b0;
  int checks = 0, failures = 0;

  tag_t in_tag, out_tag;
  logic signed [AW-1:0] in_re, in_im;
  logic signed [TW-1:0] w_re, w_im;
  logic signed [OW-1:0] out_re, out_im;

  twiddle_mult #(.AW(AW), .TW(TW), .OW(OW)) dut (.clk, .rst_n, .in_tag, .in_re, .in_im, .w_re, .w_im,
    .out_tag, .out_re, .out_im);

  function automatic longint rnd(input longint v);
    longint r;
    r = (v + (longint'(1) << (TW - 2))) >>> (TW - 1);
    if (r > 32767) r = 32767;
    if (r < -32768) r = -32768;
    return r;
  endfunction

  typedef struct { tag_t tag; longint re, im, wr, wi; } op_t;
  op_t hist [$];
  int n_byp = 0, n_rot = 0;

  initial begin
    op_t o;
    longint er, ei;
    in_tag = TAG_IDLE;
    repeat (4) @(posedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      in_tag.valid = ($urandom_range(3) != 0);
      in_tag.sop   = t[0];
      in_tag.eop   = t[1];
      in_tag.pass  = pass_t'($urandom_range(2));
      in_tag.idx   = IDX_W'(t);
      in_re = AW'($urandom); in_im = AW'($urandom);
      w_re  = TW'($urandom); w_im  = TW'($urandom);
      hist.push_back('{in_tag, in_re, in_im, w_re, w_im});
      if (hist.size() > 1) o = hist.pop_front();
      @(posedge clk);
      #1;
      if (t >= 1) begin
        checks++;
        if (out_tag != o.tag) begin failures++; $display("FAIL tag t=%0d", t); end
        if (o.tag.valid) begin
          if (o.tag.pass == PASS0) begin
            er = o.re; ei = o.im; n_byp++;
          end else begin
            er = rnd(o.re * o.wr - o.im * o.wi); ei = rnd(o.re * o.wi + o.im * o.wr); n_rot++;
          end
          checks++;
          if (longint'(out_re) != er || longint'(out_im) != ei) begin
            failures++;
            $display("FAIL data t=%0d pass=%0d: got (%0d,%0d) expected (%0d,%0d)", t, o.tag.pass, out_re, out_im, er, ei);
          end
        end
      end
    end
    checks++;
    if (n_byp == 0 || n_rot == 0) begin failures++; $display("FAIL: bypass or rotation never exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
