// tb_tr_bridge: self-checking testbench of the test-ready AHB/PCI bridge.
//
// The bridge drives an AHB memory with random wait states.
//  1. Normal mode: random writes and reads pushed into the PCI write FIFO;
//     read data popped from the PCI read FIFO is checked against a shadow.
//  2. Functional test mode: address, write, read and control vectors from
//     the tester model; memory contents and the bus read data of every read
//     vector are checked, a control vector must change HSIZE/HPROT on the
//     bus, stalls must hold TACK low, and nothing may enter the PCI read
//     FIFO. TestRead must be high and StructTestMode low.
//  3. The same in structural mode with a zero-wait memory: StructTestMode
//     high and exactly one clock per vector.
//  4. Normal mode again after the exit.
module tb_tr_bridge;
  import tr_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic treq, tack, test_read, struct_test_mode;
  logic [2:0] cbe;
  logic [31:0] ad;
  htic_state_e htic_state;
  logic pci_wr_push, pci_wr_full, pci_rd_pop, pci_rd_empty;
  cmd_t pci_wr_cmd;
  logic [31:0] pci_rd_data;
  logic hbusreq, hgrant;
  ahb_m2s_t m2s;
  ahb_s2m_t s2m;
  int max_wait, nacc, nwait;
  int checks = 0, failures = 0;

  tr_bridge #(.FIFO_DEPTH(4)) dut (.*);
  tb_ahb_mem u_mem (.clk, .rst_n, .max_wait, .hsel(1'b1), .m2s, .hready_in(s2m.hready),
                    .s2m, .nacc, .nwait);
  tb_ate u_ate (.clk, .treq, .cbe, .ad, .tack);
  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; if (failures < 20) $display("FAIL %s at %0t", what, $time); end
  endtask

  logic [31:0] shadow [256];
  logic [31:0] busq [$];   // expected read data on the bus, in order
  bit          dp_rd;
  int          nbusrd = 0, nstall_tack = 0, nsize_seen = 0;

  // bus monitor: every completed read data phase must match the shadow
  always @(posedge clk) if (rst_n) begin
    if (s2m.hready) begin
      if (dp_rd) begin
        check(busq.size() > 0, "unexpected bus read");
        if (busq.size() > 0) check(s2m.hrdata == busq.pop_front(), "bus read data");
        nbusrd++;
      end
      dp_rd = m2s.htrans[1] && !m2s.hwrite;
      if (m2s.htrans[1]) begin
        if (m2s.hwrite) shadow[m2s.haddr[9:2]] = '1;  // placeholder, data checked at end
      end
    end
    if (test_read && htic_state inside {S_WRITEVEC, S_READVEC} && !tack) nstall_tack++;
    if (m2s.htrans[1] && m2s.hsize == 3'b001 && m2s.hprot == 4'b0001) nsize_seen++;
  end

  logic [31:0] model [256];
  logic [31:0] rdq [$];

  task automatic pci_phase(input int n);
    cmd_t c;
    int sent = 0, got = 0;
    while (got < n || sent < n) begin
      @(negedge clk);
      pci_wr_push = 0; pci_rd_pop = 0;
      if (sent < n && !pci_wr_full && $urandom_range(0, 1)) begin
        c.write = $urandom_range(0, 1);
        c.addr  = {22'd0, 8'($urandom_range(0, 31)), 2'b00};
        c.wdata = $urandom;
        c.ctrl  = CTRL_RESET;
        pci_wr_cmd = c; pci_wr_push = 1; sent++;
        if (c.write) begin model[c.addr[9:2]] = c.wdata; got++; end
        else begin rdq.push_back(model[c.addr[9:2]]); busq.push_back(model[c.addr[9:2]]); end
      end
      if (!pci_rd_empty && $urandom_range(0, 1)) begin
        check(rdq.size() > 0, "PCI read FIFO data expected");
        if (rdq.size() > 0) check(pci_rd_data == rdq.pop_front(), "PCI read data");
        pci_rd_pop = 1; got++;
      end
    end
    @(negedge clk); pci_wr_push = 0; pci_rd_pop = 0;
  endtask

  task automatic test_phase(input bit m, input int n);
    logic [31:0] a, d;
    a = {22'd0, 8'($urandom_range(32, 63)), 2'b00};
    u_ate.add(VEC_ADDR, a);
    for (int k = 0; k < n; k++) begin
      case ($urandom_range(0, 5))
        0: begin a = {22'd0, 8'($urandom_range(32, 63)), 2'b00}; u_ate.add(VEC_ADDR, a); end
        1, 2: begin d = $urandom; u_ate.add(VEC_WRITE, d); model[a[9:2]] = d; end
        3, 4: begin u_ate.add(VEC_READ, $urandom); busq.push_back(model[a[9:2]]); end
        default: u_ate.add(VEC_CONT, ($urandom_range(0, 1) ? 32'h0000_0211 : 32'h0000_0232));
      endcase
    end
    u_ate.enter(m, 3);
    #1;
    check(test_read && struct_test_mode == m, "mode outputs in test mode");
    check(htic_state == S_START, "START reached");
    u_ate.run();
    u_ate.leave();
    @(negedge clk);
    check(htic_state == S_IDLE && !test_read && !struct_test_mode, "back to normal");
  endtask

  int c0, v0;
  initial begin
    for (int i = 0; i < 256; i++) model[i] = 32'hA5000000 | i;
    pci_wr_push = 0; pci_rd_pop = 0; pci_wr_cmd = '0; hgrant = 1; max_wait = 2; dp_rd = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    pci_phase(300);
    check(busq.size() == 0, "normal reads done");
    test_phase(0, 600);
    repeat (4) @(negedge clk);
    check(busq.size() == 0, "functional test reads done");
    check(pci_rd_empty, "no test data in the PCI read FIFO");
    check(nstall_tack > 20, "TACK low while the bus stalls");
    check(nsize_seen > 0, "control vector changed HSIZE/HPROT");
    // structural mode, zero-wait slave: one clock per vector
    max_wait = 0;
    c0 = u_ate.cycles; v0 = u_ate.nvec;
    test_phase(1, 400);
    check(u_ate.cycles - c0 == u_ate.nvec - v0 + 1, "one clock per vector");
    $display("structural: vectors=%0d clocks=%0d", u_ate.nvec - v0, u_ate.cycles - c0);
    max_wait = 2;
    pci_phase(200);
    repeat (6) @(negedge clk);
    for (int i = 0; i < 64; i++) check(u_mem.mem[i] == model[i], "memory contents");
    for (int a = 0; a < 4; a++) for (int b = 0; b < 4; b++)
      check(u_ate.ntrans[a][b] > 0, "vector-type change exercised");
    $display("bus reads=%0d tack stalls=%0d", nbusrd, nstall_tack);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
