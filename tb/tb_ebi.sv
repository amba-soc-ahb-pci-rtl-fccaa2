// tb_ebi: self-checking testbench of the external bus interface.
//
// Normal mode: random AHB transfers to the EBI against an external
// asynchronous memory model; checks the pin sequence of each data phase and
// the read data. Test mode (TestRead high): random bus traffic with random
// HREADY and HRDATA from other slaves; checks that EBIDATABUS is always
// driven and that, one clock after every completed data phase, it carries
// that phase's HRDATA, EBIADDROUT its address and the strobe is low.
module tb_ebi;
  import tr_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic test_read, hsel;
  ahb_m2s_t m2s;
  ahb_s2m_t bus_s2m, s2m;
  logic [31:0] ebi_addr_o, ebi_data_o, ebi_data_i;
  logic ebi_data_oe, ebi_cs_n, ebi_we_n, ebi_oe_n;
  int checks = 0, failures = 0;
  logic [31:0] xmem [16];

  ebi dut (.*);
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

  // external asynchronous memory
  always_comb ebi_data_i = xmem[ebi_addr_o[5:2]];
  always @(posedge clk) if (!ebi_cs_n && !ebi_we_n && !test_read) xmem[ebi_addr_o[5:2]] <= ebi_data_o;

  // reference state
  bit          r_dp, r_wr;
  logic [31:0] r_addr;
  bit          t_dp;
  logic [31:0] t_addr, t_data, t_pend;
  bit          t_new;
  logic [31:0] shadow [16];
  int nresp = 0;

  initial begin
    for (int i = 0; i < 16; i++) begin xmem[i] = $urandom; shadow[i] = xmem[i]; end
    test_read = 0; hsel = 0; m2s = '0; bus_s2m = '{hrdata: 0, hready: 1, hresp: HR_OKAY};
    r_dp = 0; t_dp = 0; t_new = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 6000; i++) begin
      @(negedge clk);
      if (i == 3000) begin test_read = 1; t_new = 0; end
      m2s.htrans = ($urandom_range(0, 3) != 0) ? HT_NONSEQ : HT_IDLE;
      m2s.hwrite = $urandom_range(0, 1);
      m2s.haddr  = {26'd0, 4'($urandom), 2'b00};
      m2s.hwdata = $urandom;
      hsel       = (i < 3000) ? 1'b1 : ($urandom_range(0, 1) == 1);
      bus_s2m.hready = (i < 3000) ? 1'b1 : ($urandom_range(0, 3) != 0);
      bus_s2m.hrdata = $urandom;
      #1;
      if (i >= 3000 + 3) begin
        check(ebi_data_oe, "EBIDATABUS driven in test mode");
        check(ebi_cs_n == !t_new, "response strobe");
        if (t_new) begin
          check(ebi_data_o == t_data, "test response data");
          check(ebi_addr_o == t_addr, "test response address");
          nresp++;
        end
      end else if (i < 3000 && i > 2) begin
        check(ebi_cs_n == !r_dp, "chip select");
        check(s2m.hready, "zero wait");
        if (r_dp) begin
          check(ebi_addr_o == r_addr, "EBIADDROUT");
          check(ebi_we_n == !r_wr && ebi_oe_n == r_wr, "strobes");
          check(ebi_data_oe == r_wr, "data direction");
          if (r_wr) begin check(ebi_data_o == m2s.hwdata, "write data"); shadow[r_addr[5:2]] = m2s.hwdata; end
          else check(s2m.hrdata == shadow[r_addr[5:2]], "read data");
        end
      end
      @(posedge clk);
      t_new = test_read && t_dp && bus_s2m.hready;
      if (t_new) t_data = bus_s2m.hrdata;
      if (t_new) t_addr = t_pend;
      if (bus_s2m.hready) begin
        r_dp = hsel && m2s.htrans[1]; r_wr = m2s.hwrite; r_addr = m2s.haddr;
        t_dp = m2s.htrans[1]; t_pend = m2s.haddr;
      end
    end
    check(nresp > 500, "test responses seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
