// Test of corr_mem at the default depth: fills all 16384 words with a pattern,
// reads them back in a random order while new writes go to other words, and checks
// every read one cycle after its request; reads with re low must hold rdata.
module corr_mem_tb;
  localparam int DEPTH = 16384;
  localparam int W = 32;
  localparam int AW = $clog2(DEPTH);

  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic we = 1'b0, re = 1'b0;
  logic [AW-1:0] waddr, raddr;
  logic [W-1:0] wdata, rdata;
  logic [W-1:0] model [DEPTH];

  corr_mem #(.DEPTH(DEPTH), .W(W)) dut (.clk, .we, .waddr, .wdata, .re, .raddr, .rdata);

  initial begin
    logic [W-1:0] exp_q, held;
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk);
      we = 1'b1; waddr = AW'(a); wdata = $urandom; model[a] = wdata;
    end
    for (int t = 0; t < 20000; t++) begin
      @(negedge clk);
      re    = 1'b1;
      raddr = AW'($urandom);
      we    = t[0];
      waddr = raddr ^ AW'(1 + $urandom_range(100));
      wdata = $urandom;
      exp_q = model[raddr];
      if (we) model[waddr] = wdata;
      @(posedge clk);
      #1;
      checks++;
      if (rdata !== exp_q) begin failures++; $display("FAIL read %0d: %h vs %h", raddr, rdata, exp_q); end
    end
    @(negedge clk);
    re = 1'b0; we = 1'b0;
    held = rdata;
    raddr = raddr + 1'b1;
    @(posedge clk);
    #1;
    checks++;
    if (rdata !== held) begin failures++; $display("FAIL rdata changed without re"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
