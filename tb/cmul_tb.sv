// Test of cmul: random and extreme 16-bit operands, plain and conjugated second
// operand, compared bit-exactly with an integer model of the rounding
// (round half up after the shift) and saturation; checks the two-cycle latency.
module cmul_tb;
  localparam int W = 16;
  localparam int SHIFT = 15;

  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic in_valid = 1'b0;
  logic rst_n = 1'b0;
  logic signed [W-1:0] a_re, a_im, b_re, b_im;
  logic v0, v1;
  logic signed [W-1:0] p0r, p0i, p1r, p1i;

  cmul #(.AW(W), .BW(W), .OW(W), .SHIFT(SHIFT), .CONJ_B(1'b0)) u0 (.clk, .rst_n, .in_valid, .a_re, .a_im,
    .b_re, .b_im, .out_valid(v0), .p_re(p0r), .p_im(p0i));
  cmul #(.AW(W), .BW(W), .OW(W), .SHIFT(SHIFT), .CONJ_B(1'b1)) u1 (.clk, .rst_n, .in_valid, .a_re, .a_im,
    .b_re, .b_im, .out_valid(v1), .p_re(p1r), .p_im(p1i));

  function automatic longint model(input longint v);
    longint r;
    r = (v + (longint'(1) << (SHIFT - 1))) >>> SHIFT;
    if (r > 32767) r = 32767;
    if (r < -32768) r = -32768;
    return r;
  endfunction

  typedef struct { longint ar, ai, br, bi; bit v; } op_t;
  op_t hist [$];

  initial begin
    op_t o;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      if (t < 4) begin
        a_re = (t[0]) ? -16'sd32768 : 16'sd32767;
        a_im = (t[1]) ? -16'sd32768 : 16'sd32767;
        b_re = -16'sd32768;
        b_im = (t[0]) ? 16'sd32767 : -16'sd32768;
      end else begin
        a_re = W'($urandom); a_im = W'($urandom); b_re = W'($urandom); b_im = W'($urandom);
      end
      in_valid = (t % 5) != 0;
      hist.push_back('{a_re, a_im, b_re, b_im, in_valid});
      if (hist.size() > 1) begin
        o = hist.pop_front();
      end
      @(posedge clk);
      #1;
      if (t >= 1) begin
        checks++;
        if (v0 != o.v || v1 != o.v) begin failures++; $display("FAIL valid latency t=%0d", t); end
        checks++;
        if (longint'(p0r) != model(o.ar * o.br - o.ai * o.bi) || longint'(p0i) != model(o.ar * o.bi + o.ai * o.br)) begin
          failures++;
          $display("FAIL a*b t=%0d: (%0d,%0d)", t, p0r, p0i);
        end
        checks++;
        if (longint'(p1r) != model(o.ar * o.br + o.ai * o.bi) || longint'(p1i) != model(o.ai * o.br - o.ar * o.bi)) begin
          failures++;
          $display("FAIL a*conj(b) t=%0d: (%0d,%0d)", t, p1r, p1i);
        end
      end
    end
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
