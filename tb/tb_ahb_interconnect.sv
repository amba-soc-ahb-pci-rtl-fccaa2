// tb_ahb_interconnect: self-checking testbench of the AHB decoder and
// response multiplexer.
//
// Random addresses (mapped and unmapped) and random slave responses with
// random wait states: checks the one-hot HSEL of the address phase, that the
// response is taken from the slave selected in the data phase and held
// across wait states, and the default slave for unmapped addresses.
module tb_ahb_interconnect;
  import tr_pkg::*;
  localparam int NS = 5;
  localparam logic [NS*8-1:0] BASES = {8'h80, 8'h42, 8'h41, 8'h40, 8'h00};
  logic clk = 1'b0, rst_n = 1'b0;
  ahb_m2s_t m2s;
  logic [NS-1:0] hsel;
  ahb_s2m_t [NS-1:0] slv_s2m;
  ahb_s2m_t bus_s2m;
  int checks = 0, failures = 0;

  ahb_interconnect #(.NS(NS), .BASES(BASES)) dut (.*);
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

  int exp_sel, dp_sel;
  int ndefault = 0, nwait = 0;
  logic [7:0] top8;

  initial begin
    m2s = '0; m2s.haddr = 32'hFF00_0000; dp_sel = -1;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int i = 0; i < 5000; i++) begin
      @(negedge clk);
      case ($urandom_range(0, 5))
        0: top8 = 8'h00; 1: top8 = 8'h40; 2: top8 = 8'h41; 3: top8 = 8'h42; 4: top8 = 8'h80;
        default: top8 = 8'($urandom);
      endcase
      m2s.haddr = {top8, 24'($urandom)};
      m2s.htrans = HT_NONSEQ;
      for (int s = 0; s < NS; s++) begin
        slv_s2m[s].hrdata = $urandom;
        slv_s2m[s].hready = ($urandom_range(0, 3) != 0);
        slv_s2m[s].hresp  = hresp_e'($urandom_range(0, 1));
      end
      #1;
      exp_sel = -1;
      for (int s = 0; s < NS; s++) if (top8 == BASES[s*8 +: 8]) exp_sel = s;
      for (int s = 0; s < NS; s++) check(hsel[s] == (s == exp_sel), "HSEL decode");
      if (dp_sel >= 0) check(bus_s2m == slv_s2m[dp_sel], "response from data-phase slave");
      else begin
        check(bus_s2m.hready && bus_s2m.hrdata == 0 && bus_s2m.hresp == HR_OKAY, "default slave");
        ndefault++;
      end
      @(posedge clk);
      if (bus_s2m.hready) dp_sel = exp_sel; else nwait++;
    end
    check(ndefault > 100 && nwait > 100, "default slave and wait states seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
