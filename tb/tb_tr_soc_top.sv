// tb_tr_soc_top: end-to-end testbench of the test-ready SoC, at the top's
// default parameters (32 scan chains per core).
//
// Environment: three AHB core register files with random wait states behind
// the AHB wrappers, three APB core register files behind the APB wrappers,
// six scan-core models (32 chains of L_CHAIN flip-flops), an external memory
// on the EBI, the PCI-side FIFO ports and a tester model on TREQ/TACK/CBE/AD.
// Every word the EBI drives out in test mode (strobe ebi_cs_n low) is checked
// in order against the expected response of the transfer that produced it.
//  1. Normal operation: PCI-side writes and reads to the EBI memory, an AHB
//     core and an APB core, read data checked at the PCI read FIFO.
//  2. Functional test: vectors to all six cores' own registers; every read
//     vector's data must come out on EBIDATABUS; wait states must stall TACK.
//  3. Structural test of each core: scan-in of a pattern, PI load, capture,
//     scan-out of the result while the next pattern is shifted in, all with
//     write vectors only; scan-out and PO words checked against a golden
//     copy of the chains; APB cores reached through the bridge bypass.
//  4. Normal operation again.
// It counts each mechanism (mode entries, START wait, the four vector types,
// the READ->WRITE/ADDR/CONT and WRITE->CONT changes, TACK stalls, bypass and
// normal APB accesses, PCI-path transfers, scan shifts, captures, exits) and
// fails if one never happened.
module tb_tr_soc_top;
  import tr_pkg::*;
  localparam int NC = 32, PI_W = 32, PO_W = 32, NCORE = 6, L_CHAIN = 6;

  logic clk = 1'b0, rst_n = 1'b0;
  logic treq, tack, test_read, struct_test_mode;
  logic [2:0] cbe;
  logic [31:0] ad;
  htic_state_e htic_state;
  logic pci_wr_push, pci_wr_full, pci_rd_pop, pci_rd_empty;
  cmd_t pci_wr_cmd;
  logic [31:0] pci_rd_data;
  logic hbusreq, hgrant;
  logic [31:0] ebi_addr_o, ebi_data_o, ebi_data_i;
  logic ebi_data_oe, ebi_cs_n, ebi_we_n, ebi_oe_n;
  ahb_m2s_t ahb_bus;
  ahb_s2m_t ahb_bus_resp;
  logic [2:0] core_hsel;
  ahb_s2m_t [2:0] core_s2m;
  apb_m2s_t apb_bus;
  logic [2:0] core_psel;
  logic [2:0][31:0] core_prdata;
  logic [NCORE-1:0][PI_W-1:0] func_pi, core_pi;
  logic [NCORE-1:0] core_clk_en, core_scan_en;
  logic [NCORE-1:0][NC-1:0] core_scan_in, core_scan_out;
  logic [NCORE-1:0][PO_W-1:0] core_po;
  int checks = 0, failures = 0;
  int max_wait;
  int nacc [3], nwait [3];

  tr_soc_top dut (.*);
  tb_ate u_ate (.clk, .treq, .cbe, .ad, .tack);

  for (genvar i = 0; i < 3; i++) begin : g_ahbcore
    tb_ahb_mem u_mem (.clk, .rst_n, .max_wait, .hsel(core_hsel[i]), .m2s(ahb_bus),
                      .hready_in(ahb_bus_resp.hready), .s2m(core_s2m[i]),
                      .nacc(nacc[i]), .nwait(nwait[i]));
  end
  for (genvar i = 0; i < NCORE; i++) begin : g_scan
    tb_scan_core #(.NC(NC), .L(L_CHAIN), .PI_W(PI_W), .PO_W(PO_W)) u_core (
      .clk, .clk_en(core_clk_en[i]), .scan_en(core_scan_en[i]), .scan_in(core_scan_in[i]),
      .scan_out(core_scan_out[i]), .pi(core_pi[i]), .po(core_po[i]));
  end

  // APB core register files
  logic [31:0] apb_regs [3][4];
  always_comb for (int j = 0; j < 3; j++) core_prdata[j] = apb_regs[j][apb_bus.paddr[3:2]];
  always @(posedge clk)
    for (int j = 0; j < 3; j++)
      if (core_psel[j] && apb_bus.penable && apb_bus.pwrite) apb_regs[j][apb_bus.paddr[3:2]] <= apb_bus.pwdata;

  // external memory on the EBI
  logic [31:0] xmem [64];
  always_comb ebi_data_i = xmem[ebi_addr_o[7:2]];
  always @(posedge clk) if (!test_read && !ebi_cs_n && !ebi_we_n) xmem[ebi_addr_o[7:2]] <= ebi_data_o;

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
    if (!cond) begin failures++; if (failures < 30) $display("FAIL %s at %0t", what, $time); end
  endtask

  // ---------------------------------------------------------------- model
  logic [31:0] model [logic [31:0]];   // word address -> value, all targets
  function automatic logic [31:0] rd_model(input logic [31:0] a);
    if (model.exists(a)) return model[a];
    return 32'h0;
  endfunction

  typedef struct { bit chk; logic [31:0] addr; logic [31:0] data; } resp_t;
  resp_t expq [$];
  int nresp = 0;

  // EBI test-response monitor
  resp_t e;
  bit test_read_q = 0;
  always @(posedge clk) test_read_q <= test_read;
  always @(posedge clk) if (rst_n && (test_read || test_read_q)) begin
    if (test_read) check(ebi_data_oe, "EBIDATABUS is an output in test mode");
    if (!ebi_cs_n) begin
      nresp++;
      check(expq.size() > 0, "unexpected test response");
      if (expq.size() > 0) begin
        e = expq.pop_front();
        check(ebi_addr_o == e.addr, "response address");
        if (e.chk) check(ebi_data_o == e.data, "response data");
      end
    end
  end

  // mechanism counters
  int n_stall = 0, n_byp = 0, n_apb_norm = 0, n_shift = 0, n_cap = 0, n_pci = 0, n_exit = 0;
  int n_func = 0, n_struct = 0;
  bit apb_setup_q;
  htic_state_e st_q;
  always @(posedge clk) if (rst_n) begin
    if (test_read && htic_state inside {S_WRITEVEC, S_READVEC} && !tack) n_stall++;
    if (apb_bus.penable && dut.u_apb.psel != 0) begin
      if (apb_setup_q) n_apb_norm++;
      else begin n_byp++; check(struct_test_mode, "bypass only in structural mode"); end
    end
    apb_setup_q = (dut.u_apb.psel != 0) && !apb_bus.penable;
    for (int i = 0; i < NCORE; i++)
      if (struct_test_mode && core_clk_en[i]) begin
        if (core_scan_en[i]) n_shift++; else n_cap++;
      end
    if (!test_read && ahb_bus.htrans[1] && ahb_bus_resp.hready) n_pci++;
    if (st_q != S_IDLE && htic_state == S_IDLE) n_exit++;
    if (st_q == S_IDLE && htic_state == S_START) begin
      if (struct_test_mode) n_struct++; else n_func++;
    end
    st_q = htic_state;
  end

  // ---------------------------------------------------------------- helpers
  function automatic logic [31:0] core_base(input int k);
    if (k < 3) return {8'h40 + 8'(k), 24'h0};
    return {8'h80, 12'h0, 4'(k - 3), 8'h0};
  endfunction

  // functional test: vectors for one vector queue; expected responses
  logic [31:0] cur_addr;
  task automatic v_addr(input logic [31:0] a);
    u_ate.add(VEC_ADDR, a); cur_addr = a;
  endtask
  task automatic expect_resp(input bit chk, input logic [31:0] exp);
    resp_t r;
    r.chk = chk; r.addr = cur_addr; r.data = exp;
    expq.push_back(r);
  endtask
  task automatic v_write(input logic [31:0] d, input bit chk = 0, input logic [31:0] exp = 0);
    u_ate.add(VEC_WRITE, d);
    expect_resp(chk, exp);
  endtask
  task automatic v_read(input logic [31:0] exp);
    u_ate.add(VEC_READ, $urandom);
    expect_resp(1'b1, exp);
  endtask
  task automatic v_cont(input logic [31:0] c);
    u_ate.add(VEC_CONT, c);
  endtask

  // golden scan chains
  logic [L_CHAIN-1:0] g [NCORE][NC];
  logic [PI_W-1:0]    g_pi [NCORE];
  function automatic logic [31:0] g_so(input int k);
    for (int c = 0; c < NC; c++) g_so[c] = g[k][c][L_CHAIN-1];
  endfunction
  function automatic logic [31:0] g_po(input int k);
    for (int b = 0; b < PO_W; b++) g_po[b] = (^g[k][b % NC]) ^ g_pi[k][b % PI_W];
  endfunction

  task automatic pci(input bit write, input logic [31:0] a, input logic [31:0] d);
    cmd_t c;
    c.write = write; c.addr = a; c.wdata = d; c.ctrl = CTRL_RESET;
    @(negedge clk);
    while (pci_wr_full) @(negedge clk);
    pci_wr_cmd = c; pci_wr_push = 1;
    @(negedge clk); pci_wr_push = 0;
    if (write) model[a] = d;
    else begin
      while (pci_rd_empty) @(negedge clk);
      check(pci_rd_data == rd_model(a), "PCI-path read data");
      pci_rd_pop = 1; @(negedge clk); pci_rd_pop = 0;
    end
  endtask

  task automatic normal_phase(input int n);
    logic [31:0] a;
    for (int i = 0; i < n; i++) begin
      case ($urandom_range(0, 2))
        0: a = {24'h0, 2'b00, 4'($urandom), 2'b00};          // EBI memory
        1: a = {8'h41, 16'h0, 2'b00, 4'($urandom), 2'b00};   // AHB core 1
        default: a = {8'h80, 12'h0, 4'h1, 4'h0, 2'($urandom), 2'b00};  // GPIO
      endcase
      if (a[31:24] == 8'h41) a[7:6] = 2'b00;
      pci($urandom_range(0, 1), a, $urandom);
    end
  endtask

  task automatic functional_phase(input int n);
    logic [31:0] a, d;
    int k;
    v_addr(core_base(0));
    for (int i = 0; i < n; i++) begin
      case ($urandom_range(0, 9))
        0, 1: begin
          k = $urandom_range(0, NCORE - 1);
          a = core_base(k) | {28'h0, 2'($urandom), 2'b00};
          v_addr(a);
        end
        2, 3, 4: begin
          d = $urandom; v_write(d);
          model[cur_addr] = d;
        end
        5, 6, 7: v_read(rd_model(cur_addr));
        default: v_cont($urandom_range(0, 1) ? 32'h0000_0232 : 32'h0000_0212);
      endcase
    end
    repeat (4) v_cont(32'h0000_0232);
    u_ate.enter(1'b0, 2);
    u_ate.run();
    u_ate.leave();
  endtask

  // one structural test of core k: scan in a pattern, load PI, capture,
  // then shift out while shifting in zeros
  task automatic structural_core(input int k);
    logic [31:0] base, d;
    base = core_base(k);
    v_addr(base | 32'h0);
    for (int s = 0; s < L_CHAIN; s++) begin
      d = $urandom;
      v_write(d, 1'b1, g_so(k));
      for (int c = 0; c < NC; c++) g[k][c] = {g[k][c][L_CHAIN-2:0], d[c]};
    end
    d = $urandom;
    v_addr(base | 32'h4);
    v_write(d);
    g_pi[k] = d;
    v_addr(base | 32'h8);
    v_write(32'h0, 1'b1, g_po(k));
    for (int c = 0; c < NC; c++)
      g[k][c] = {g[k][c][L_CHAIN-2:0], g[k][c][L_CHAIN-1]} ^ {L_CHAIN{g_pi[k][c % PI_W]}};
    v_cont(32'h0000_0232);
    v_addr(base | 32'h0);
    for (int s = 0; s < L_CHAIN; s++) begin
      d = $urandom;
      v_write(d, 1'b1, g_so(k));
      for (int c = 0; c < NC; c++) g[k][c] = {g[k][c][L_CHAIN-2:0], d[c]};
    end
  endtask

  int c0, v0, nv;
  initial begin
    for (int k = 0; k < NCORE; k++) begin
      g_pi[k] = '0;
      for (int c = 0; c < NC; c++) g[k][c] = '0;
    end
    for (int j = 0; j < 3; j++) for (int r = 0; r < 4; r++) begin
      apb_regs[j][r] = $urandom; model[{8'h80, 12'h0, 4'(j), 4'h0, 2'(r), 2'b00}] = apb_regs[j][r];
    end
    for (int i = 0; i < 64; i++) begin xmem[i] = $urandom; model[{24'h0, 6'(i), 2'b00}] = xmem[i]; end
    for (int j = 0; j < 3; j++) for (int i = 0; i < 256; i++)
      model[{8'h40 + 8'(j), 14'h0, 8'(i), 2'b00}] = 32'hA5000000 | i;
    pci_wr_push = 0; pci_rd_pop = 0; pci_wr_cmd = '0; hgrant = 1; max_wait = 2;
    func_pi = '0; st_q = S_IDLE; apb_setup_q = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;

    normal_phase(60);
    functional_phase(400);
    repeat (6) @(negedge clk);
    check(expq.size() == 0, "all functional responses seen");

    // structural test: zero-wait slaves, vectors at one per clock
    max_wait = 0;
    for (int k = 0; k < NCORE; k++) structural_core(k);
    c0 = u_ate.cycles; v0 = u_ate.nvec; nv = 0;
    u_ate.enter(1'b1);
    u_ate.run();
    u_ate.leave();
    check(u_ate.cycles - c0 == u_ate.nvec - v0 + 1, "one clock per vector in structural test");
    $display("structural test: %0d vectors in %0d clocks", u_ate.nvec - v0, u_ate.cycles - c0);
    repeat (4) @(negedge clk);
    check(expq.size() == 0, "all structural responses seen");

    max_wait = 2;
    normal_phase(30);
    repeat (4) @(negedge clk);

    $display("mechanisms: func=%0d struct=%0d start_wait=%0d stalls=%0d bypass=%0d apb_normal=%0d",
             n_func, n_struct, u_ate.start_waits, n_stall, n_byp, n_apb_norm);
    $display("  shifts=%0d captures=%0d pci=%0d exits=%0d responses=%0d",
             n_shift, n_cap, n_pci, n_exit, nresp);
    $display("  READ->WRITE(m)=%0d READ->ADDR(k)=%0d READ->CONT(n)=%0d WRITE->CONT(p)=%0d",
             u_ate.ntrans[VEC_READ][VEC_WRITE], u_ate.ntrans[VEC_READ][VEC_ADDR],
             u_ate.ntrans[VEC_READ][VEC_CONT], u_ate.ntrans[VEC_WRITE][VEC_CONT]);
    check(n_func > 0, "functional test mode entered");
    check(n_struct > 0, "structural test mode entered");
    check(u_ate.start_waits > 0, "START held until an address vector");
    check(n_stall > 0, "TACK stall");
    check(n_byp > 0, "APB bypass access");
    check(n_apb_norm > 0, "normal APB access");
    check(n_shift > 0 && n_cap > 0, "scan shift and capture");
    check(n_pci > 0, "PCI-path transfer");
    check(n_exit >= 2, "test mode exit");
    for (int a = 0; a < 4; a++) for (int b = 0; b < 4; b++)
      check(u_ate.ntrans[a][b] > 0, "vector-type change");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
