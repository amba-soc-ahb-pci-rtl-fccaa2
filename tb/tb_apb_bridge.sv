// tb_apb_bridge: self-checking testbench of the AHB-APB bridge and its bypass.
//
// A pipelined AHB master in the testbench issues random reads and writes to
// three APB register slaves. Every APB access is compared with the AHB
// transfer it came from (slave, address, direction, write data) and every
// read with the register model. Normal mode must show a setup cycle before
// each access and one wait state per transfer (two clocks each); bypass mode
// must show no setup cycle and no wait state (one clock each).
module tb_apb_bridge;
  import tr_pkg::*;
  localparam int NP = 3;
  logic clk = 1'b0, rst_n = 1'b0;
  logic bypass, hsel;
  ahb_m2s_t m2s;
  ahb_s2m_t s2m;
  apb_m2s_t apb;
  logic [NP-1:0] psel;
  logic [NP-1:0][31:0] prdata;
  int checks = 0, failures = 0;
  logic [31:0] regs [NP][4];

  apb_bridge #(.NP(NP)) dut (.clk, .rst_n, .bypass, .hsel, .m2s, .hready_in(s2m.hready),
                             .s2m, .apb, .psel, .prdata);
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

  // APB slaves
  always_comb for (int i = 0; i < NP; i++) prdata[i] = regs[i][apb.paddr[3:2]];
  always @(posedge clk)
    for (int i = 0; i < NP; i++)
      if (psel[i] && apb.penable && apb.pwrite) regs[i][apb.paddr[3:2]] <= apb.pwdata;

  typedef struct { bit write; logic [31:0] addr; logic [31:0] data; } xfer_t;
  xfer_t cur, dp;  // transfer in address phase, transfer in data phase
  bit    dp_v, cur_v;
  logic [31:0] shadow [NP][4];
  bit    setup_seen;
  int    ncyc, nxfer;

  task automatic new_xfer();
    cur.write = $urandom_range(0, 1);
    cur.addr  = {16'h8000, 4'd0, 4'($urandom_range(0, NP - 1)), 4'd0, 2'($urandom), 2'b00};
    cur.data  = $urandom;
    cur_v     = 1;
  endtask

  task automatic run(input bit byp, input int n);
    bypass = byp; ncyc = 0; nxfer = 0; dp_v = 0;
    new_xfer();
    while (nxfer < n || dp_v) begin
      @(negedge clk);
      hsel = cur_v; m2s.htrans = cur_v ? HT_NONSEQ : HT_IDLE;
      m2s.hwrite = cur.write; m2s.haddr = cur.addr;
      m2s.hwdata = dp.data;
      #1;
      if (psel != 0) begin
        check($onehot(psel), "one PSEL");
        check(dp_v, "APB access only for a transfer");
        check(psel[dp.addr[11:8]], "PSEL decode");
        check(apb.paddr == dp.addr && apb.pwrite == dp.write, "PADDR/PWRITE");
        if (dp.write) check(apb.pwdata == dp.data, "PWDATA");
        if (apb.penable) check(byp || setup_seen, "setup before access");
        if (!apb.penable) check(!byp, "no setup cycle in bypass");
      end
      if (dp_v && s2m.hready && !dp.write)
        check(s2m.hrdata == shadow[dp.addr[11:8]][dp.addr[3:2]], "read data");
      ncyc++;
      @(posedge clk);
      setup_seen = (psel != 0) && !apb.penable;
      if (s2m.hready) begin
        if (dp_v && dp.write) shadow[dp.addr[11:8]][dp.addr[3:2]] = dp.data;
        dp_v = cur_v && nxfer < n;
        dp   = cur;
        if (dp_v) nxfer++;
        if (nxfer < n) new_xfer(); else cur_v = 0;
      end
    end
    $display("bypass=%0d transfers=%0d clocks=%0d", byp, n, ncyc);
    // n transfers + 1 clock for the last data phase + pipeline fill
    if (byp) check(ncyc <= n + 2, "one clock per transfer in bypass");
    else     check(ncyc >= 2 * n && ncyc <= 2 * n + 2, "two clocks per transfer normally");
  endtask

  initial begin
    for (int i = 0; i < NP; i++) for (int j = 0; j < 4; j++) begin regs[i][j] = $urandom; shadow[i][j] = regs[i][j]; end
    hsel = 0; m2s = '0; bypass = 0; setup_seen = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    run(0, 500);
    run(1, 500);
    run(0, 200);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
