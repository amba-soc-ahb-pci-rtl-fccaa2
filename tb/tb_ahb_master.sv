// tb_ahb_master: self-checking testbench of the bridge's AHB master.
//
// Random reads and writes, random HGRANT and a slave with random wait states.
// A shadow memory kept from the accepted commands gives the expected read
// data and the final memory contents. A second phase with the grant held and
// a zero-wait slave checks that back-to-back commands run one per clock.
module tb_ahb_master;
  import tr_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic req_valid, req_ready, rsp_valid, rsp_write, rsp_err, hbusreq, hgrant;
  cmd_t req;
  logic [31:0] rsp_rdata;
  ahb_m2s_t m2s;
  ahb_s2m_t s2m;
  int max_wait, nacc, nwait;
  int checks = 0, failures = 0;

  ahb_master dut (.*);
  tb_ahb_mem u_mem (.clk, .rst_n, .max_wait, .hsel(1'b1), .m2s, .hready_in(s2m.hready),
                    .s2m, .nacc, .nwait);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [31:0] shadow [256];
  logic [31:0] expq [$];
  int naccepted;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // scoreboard
  always @(posedge clk) if (rst_n) begin
    if (req_valid && req_ready) begin
      naccepted++;
      if (req.write) shadow[req.addr[9:2]] = req.wdata;
      else expq.push_back(shadow[req.addr[9:2]]);
    end
    if (rsp_valid && !rsp_write) begin
      check(expq.size() > 0, "unexpected read response");
      if (expq.size() > 0) check(rsp_rdata == expq.pop_front(), "read data");
    end
    check(hbusreq == req_valid, "HBUSREQ");
  end

  task automatic new_cmd();
    req.write = $urandom_range(0, 1);
    req.addr  = {22'd0, 8'($urandom_range(0, 15)), 2'b00};
    req.wdata = $urandom;
    req.ctrl  = CTRL_RESET;
  endtask

  int t0;
  initial begin
    for (int i = 0; i < 256; i++) shadow[i] = 32'hA5000000 | i;
    req_valid = 0; hgrant = 1; max_wait = 2; naccepted = 0;
    new_cmd();
    repeat (3) @(posedge clk);
    rst_n = 1;
    // phase 1: random stalls
    for (int n = 0; n < 2000; ) begin
      @(negedge clk);
      if (req_valid && req_ready_q) begin n++; new_cmd(); req_valid = ($urandom_range(0, 3) != 0); end
      else if (!req_valid) begin new_cmd(); req_valid = ($urandom_range(0, 1) != 0); end
      hgrant = ($urandom_range(0, 5) != 0);
    end
    do @(negedge clk); while (req_valid && !req_ready_q);
    req_valid = 0; hgrant = 1;
    repeat (10) @(negedge clk);
    check(expq.size() == 0, "all reads answered");
    // phase 2: throughput
    max_wait = 0;
    repeat (4) @(negedge clk);
    t0 = naccepted;
    new_cmd(); req_valid = 1;
    repeat (100) begin @(negedge clk); new_cmd(); end
    req_valid = 0;
    check(naccepted - t0 == 100, "one command per clock");
    repeat (5) @(negedge clk);
    check(expq.size() == 0, "all reads answered (phase 2)");
    for (int i = 0; i < 16; i++) check(u_mem.mem[i] == shadow[i], "memory contents");
    $display("accepted=%0d slave transfers=%0d wait cycles=%0d", naccepted, nacc, nwait);
    check(nwait > 0, "wait states seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // acceptance seen at the last edge
  bit req_ready_q;
  always @(posedge clk) req_ready_q <= req_valid && req_ready;
endmodule
