// tb_sync_fifo: self-checking testbench of the synchronous FIFO.
//
// Random push/pop (including pushes when full and pops when empty, which must
// be ignored) against a queue model; checks head data, full, empty and count.
module tb_sync_fifo;
  localparam int W = 16, D = 8;
  logic clk = 1'b0, rst_n = 1'b0;
  logic push, pop, full, empty;
  logic [W-1:0] wdata, rdata;
  logic [$clog2(D+1)-1:0] count;
  int checks = 0, failures = 0;
  logic [W-1:0] q [$];
  int nfull = 0, nempty = 0;

  sync_fifo #(.WIDTH(W), .DEPTH(D)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; if (failures < 20) $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    push = 0; pop = 0; wdata = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 5000; i++) begin
      @(negedge clk);
      // bias towards filling, then towards draining
      push  = ($urandom_range(0, 9) < ((i / 500) % 2 ? 3 : 7));
      pop   = ($urandom_range(0, 9) < ((i / 500) % 2 ? 7 : 3));
      wdata = W'($urandom);
      #1;
      check(count == q.size(), "count");
      check(full == (q.size() == D), "full");
      check(empty == (q.size() == 0), "empty");
      if (q.size() > 0) check(rdata == q[0], "head data");
      if (full) nfull++;
      if (empty) nempty++;
      @(posedge clk);
      if (pop && q.size() > 0) void'(q.pop_front());
      if (push && q.size() < D + (pop && count != 0 ? 1 : 0) && !full) q.push_back(wdata);
    end
    check(nfull > 0 && nempty > 0, "full and empty reached");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
