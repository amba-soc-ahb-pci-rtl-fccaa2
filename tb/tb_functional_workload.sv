// tb_functional_workload: functional-test workload through the whole SoC.
//
// Replays a vector stream with the transition mix of a published
// functional-verification pattern set. It has 7881 READ->ADDR (k), 9240
// READ->WRITE (m), 215 READ->CONT (n) and 139 WRITE->CONT (p) changes, plus
// 45567 other changes, for 63042 changes in all. It checks that each change
// costs exactly one clock, so the stream takes k+m+n+p+others = 63042 clocks
// after the first vector. It also prints what a controller with a shared,
// turnaround-bound test bus would need (3(k+m) + 4n + 2p + others); the
// published figure for that controller counts 11 more "other" clocks.
// The targets are the AHB cores with zero-wait slaves. Every write and read
// must produce one response strobe on the EBI, and the read data must match
// a shadow of the core memories.
module tb_functional_workload;
  import tr_pkg::*;
  localparam int K = 7881, M = 9240, N = 215, P = 139, OTHERS = 45567;
  localparam int TOTAL = K + M + N + P + OTHERS;

  logic clk = 1'b0, rst_n = 1'b0;
  logic treq, tack, test_read, struct_test_mode;
  logic [2:0] cbe;
  logic [31:0] ad;
  htic_state_e htic_state;
  logic pci_wr_full, pci_rd_empty;
  logic [31:0] pci_rd_data;
  logic hbusreq;
  logic [31:0] ebi_addr_o, ebi_data_o;
  logic ebi_data_oe, ebi_cs_n, ebi_we_n, ebi_oe_n;
  ahb_m2s_t ahb_bus;
  ahb_s2m_t ahb_bus_resp;
  logic [2:0] core_hsel, core_psel;
  ahb_s2m_t [2:0] core_s2m;
  apb_m2s_t apb_bus;
  logic [5:0][31:0] core_pi, core_po;
  logic [5:0] core_clk_en, core_scan_en;
  logic [5:0][31:0] core_scan_in;
  int nacc [3], nwait [3];
  int checks = 0, failures = 0;

  tr_soc_top dut (.clk, .rst_n, .treq, .cbe, .ad, .tack, .test_read, .struct_test_mode,
    .htic_state, .pci_wr_push(1'b0), .pci_wr_cmd('0), .pci_wr_full, .pci_rd_pop(1'b0),
    .pci_rd_data, .pci_rd_empty, .hbusreq, .hgrant(1'b1), .ebi_addr_o, .ebi_data_o,
    .ebi_data_oe, .ebi_data_i(32'h0), .ebi_cs_n, .ebi_we_n, .ebi_oe_n, .ahb_bus,
    .ahb_bus_resp, .core_hsel, .core_s2m, .apb_bus, .core_psel, .core_prdata('0),
    .func_pi('0), .core_pi, .core_clk_en, .core_scan_en, .core_scan_in,
    .core_scan_out('0), .core_po('0));
  tb_ate u_ate (.clk, .treq, .cbe, .ad, .tack);
  for (genvar i = 0; i < 3; i++) begin : g_mem
    tb_ahb_mem u_mem (.clk, .rst_n, .max_wait(0), .hsel(core_hsel[i]), .m2s(ahb_bus),
      .hready_in(ahb_bus_resp.hready), .s2m(core_s2m[i]), .nacc(nacc[i]), .nwait(nwait[i]));
  end
  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; if (failures < 20) $display("FAIL %s at %0t", what, $time); end
  endtask

  // vector stream builder with a memory shadow and expected read data
  logic [31:0] shadow [3][256];
  logic [31:0] rdq [$];
  logic [31:0] cur;
  int nrw = 0;
  task automatic a(); cur = {8'h40 + 8'($urandom_range(0, 2)), 16'h0, 6'($urandom), 2'b00};
    u_ate.add(VEC_ADDR, cur); endtask
  task automatic w(); logic [31:0] d = $urandom; u_ate.add(VEC_WRITE, d);
    shadow[cur[25:24]][cur[9:2]] = d; nrw++; endtask
  task automatic r(); u_ate.add(VEC_READ, 32'h0); rdq.push_back(shadow[cur[25:24]][cur[9:2]]);
    nrw++; endtask
  task automatic c(); u_ate.add(VEC_CONT, 32'h0000_0232); endtask

  // response monitor: reads checked in order, every strobe counted
  int nstrobe = 0;
  bit tr_q = 0;
  always @(posedge clk) begin
    tr_q <= test_read;
    if (rst_n && (test_read || tr_q) && !ebi_cs_n) nstrobe++;
  end
  bit rd_dp = 0;
  always @(posedge clk) if (rst_n && ahb_bus_resp.hready) begin
    if (rd_dp) begin
      check(rdq.size() > 0, "read expected");
      if (rdq.size() > 0) check(ahb_bus_resp.hrdata == rdq.pop_front(), "read data");
    end
    rd_dp = ahb_bus.htrans[1] && !ahb_bus.hwrite;
  end

  int others_used, c0;
  initial begin
    for (int j = 0; j < 3; j++) for (int i = 0; i < 256; i++) shadow[j][i] = 32'hA5000000 | i;
    // build the stream; "others" are every change not among k, m, n, p
    a();
    for (int i = 0; i < M; i++) begin r(); w(); end         // M x R->W, W->R between
    for (int i = 0; i < K; i++) begin r(); a(); end         // K x R->A, A->R and W->R
    for (int i = 0; i < N; i++) begin r(); c(); end         // N x R->C, C->R and A->R
    for (int i = 0; i < P; i++) begin w(); c(); end         // P x W->C, C->W
    // changes so far: the first A->R, 2x-1 inside each group of x pairs and
    // one change at each of the three junctions between groups, 2(k+m+n+p)
    others_used = 2 * (M + K + N + P) - (K + M + N + P);
    // after the last C: C->W, then W->W self changes fill the rest
    for (int i = 0; i < OTHERS - others_used; i++) w();
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    u_ate.enter(1'b0);
    c0 = u_ate.cycles;
    u_ate.run();
    u_ate.leave();
    repeat (4) @(negedge clk);
    $display("k=%0d m=%0d n=%0d p=%0d vectors=%0d clocks=%0d",
             u_ate.ntrans[VEC_READ][VEC_ADDR], u_ate.ntrans[VEC_READ][VEC_WRITE],
             u_ate.ntrans[VEC_READ][VEC_CONT], u_ate.ntrans[VEC_WRITE][VEC_CONT],
             u_ate.nvec, u_ate.cycles - c0);
    check(u_ate.ntrans[VEC_READ][VEC_ADDR] == K, "k READ->ADDR changes");
    check(u_ate.ntrans[VEC_READ][VEC_WRITE] == M, "m READ->WRITE changes");
    check(u_ate.ntrans[VEC_READ][VEC_CONT] == N, "n READ->CONT changes");
    check(u_ate.ntrans[VEC_WRITE][VEC_CONT] == P, "p WRITE->CONT changes");
    check(u_ate.nvec - 1 == TOTAL, "total vector changes");
    // START cycle + first vector + one clock per change
    check(u_ate.cycles - c0 == TOTAL + 2, "one clock per vector change");
    check(u_ate.stalls == 0, "no stalls with zero-wait slaves");
    check(nstrobe == nrw, "one EBI response per write or read");
    check(rdq.size() == 0, "all reads answered");
    $display("clocks for the changes: %0d; shared-bus controller estimate: %0d",
             u_ate.cycles - c0 - 2, 3 * (K + M) + 4 * N + 2 * P + OTHERS);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
