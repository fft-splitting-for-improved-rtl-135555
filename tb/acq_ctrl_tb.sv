// Test of acq_ctrl with M = 8, for K = 3 and K = 5 passes: after a start pulse
// the sequencer must issue K*M reads on consecutive cycles with addresses 0..M-1
// for pass 0 .. K-1, the tag
// matching the address, sop on index 0 and eop on index M-1; a start while busy
// must be ignored; busy must fall after the last read; two operations are run
// on each sequencer.
module acq_ctrl_tb;
  import acq_pkg::*;
  localparam int M = 8;

  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst_n = 1'b0, start = 1'b0, start5 = 1'b0;
  int checks = 0, failures = 0;

  logic busy, rd;
  logic [$clog2(M)-1:0] addr;
  tag_t tag;
  logic busy5, rd5;
  logic [$clog2(M)-1:0] addr5;
  tag_t tag5;

  acq_ctrl #(.M(M)) dut (.clk, .rst_n, .start, .busy, .rd, .addr, .tag);
  acq_ctrl #(.M(M), .K(5)) dut5 (.clk, .rst_n, .start(start5), .busy(busy5), .rd(rd5), .addr(addr5), .tag(tag5));

  // Outputs of the sequencer under test (sel5 picks the five-pass one).
  bit   sel5;
  logic b_s, rd_s;
  logic [$clog2(M)-1:0] addr_s;
  tag_t tag_s;
  assign b_s    = sel5 ? busy5 : busy;
  assign rd_s   = sel5 ? rd5 : rd;
  assign addr_s = sel5 ? addr5 : addr;
  assign tag_s  = sel5 ? tag5 : tag;

  task automatic chk(input bit c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic set_start(input logic v);
    if (sel5) start5 = v;
    else      start  = v;
  endtask

  task automatic one_op(input int K, input bit poke);
    sel5 = (K == 5);
    @(negedge clk);
    set_start(1'b1);
    @(negedge clk);
    set_start(1'b0);
    chk(b_s, "busy after start");
    chk(!rd_s, "no read in the start cycle");
    for (int p = 0; p < K; p++) begin
      for (int n = 0; n < M; n++) begin
        @(posedge clk);
        #1;
        if (poke && p == 1 && n == 2) set_start(1'b1);   // ignored while busy
        if (poke && p == 1 && n == 3) set_start(1'b0);
        chk(rd_s && tag_s.valid, $sformatf("read at pass %0d n %0d", p, n));
        chk(int'(addr_s) == n && int'(tag_s.idx) == n, $sformatf("address %0d expected %0d", addr_s, n));
        chk(int'(tag_s.pass) == p, $sformatf("pass %0d expected %0d", tag_s.pass, p));
        chk(tag_s.sop == (n == 0) && tag_s.eop == (n == M - 1), "frame markers");
      end
    end
    @(posedge clk);
    #1;
    chk(!rd_s && !tag_s.valid, "no read after K*M cycles");
    chk(!b_s, "b_s low after the operation");
    repeat (3) begin
      @(posedge clk);
      #1;
      chk(!rd_s, "idle");
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk);
    #1;
    chk(!busy && !rd, "idle after reset");
    one_op(3, 1'b1);
    one_op(3, 1'b0);
    one_op(5, 1'b1);
    one_op(5, 1'b0);
    chk(!busy && !busy5, "both idle at the end");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
