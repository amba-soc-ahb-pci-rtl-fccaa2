// tb_tw_ahb: self-checking testbench of the AHB test wrapper.
//
// Structural mode: back-to-back AHB writes (one per clock) shift random
// scan-in words into a 32-chain core model, with PI loads and capture clocks
// in between. A golden copy of the chains, kept here, gives the scan-out bits
// expected on HRDATA in each shift write's data phase and the primary outputs
// expected in each capture's data phase. It also checks that the core clock
// is enabled only in those cycles. Functional mode: checks that HSEL, the
// core's response and the functional primary inputs pass straight through.
module tb_tw_ahb;
  import tr_pkg::*;
  localparam int NC = 32, L = 4, PI_W = 32, PO_W = 32;
  logic clk = 1'b0, rst_n = 1'b0;
  logic struct_mode, hsel, core_hsel;
  ahb_m2s_t m2s;
  ahb_s2m_t s2m, core_s2m;
  logic [PI_W-1:0] func_pi, core_pi;
  logic core_clk_en, core_scan_en;
  logic [NC-1:0] core_scan_in, core_scan_out;
  logic [PO_W-1:0] core_po;
  int checks = 0, failures = 0;

  tw_ahb #(.NC(NC), .PI_W(PI_W), .PO_W(PO_W)) dut (.clk, .rst_n, .struct_mode, .hsel, .m2s,
    .hready_in(1'b1), .s2m, .core_hsel, .core_s2m, .func_pi, .core_pi, .core_clk_en,
    .core_scan_en, .core_scan_in, .core_scan_out, .core_po);
  tb_scan_core #(.NC(NC), .L(L), .PI_W(PI_W), .PO_W(PO_W)) u_core (.clk, .clk_en(core_clk_en),
    .scan_en(core_scan_en), .scan_in(core_scan_in), .scan_out(core_scan_out), .pi(core_pi), .po(core_po));
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

  // golden core
  logic [L-1:0] g [NC];
  logic [PI_W-1:0] g_pi;
  function automatic logic [NC-1:0] g_so();
    for (int c = 0; c < NC; c++) g_so[c] = g[c][L-1];
  endfunction
  function automatic logic [PO_W-1:0] g_po();
    for (int b = 0; b < PO_W; b++) g_po[b] = (^g[b % NC]) ^ g_pi[b % PI_W];
  endfunction

  int nshift = 0, ncap = 0;
  logic [1:0]  dp_off;
  bit          dp_v;
  logic [31:0] dp_data;

  initial begin
    for (int c = 0; c < NC; c++) g[c] = '0;
    g_pi = '0; struct_mode = 1; hsel = 0; m2s = '0; func_pi = $urandom;
    core_s2m = '{hrdata: 32'hC0DE0000, hready: 1'b0, hresp: HR_OKAY};
    dp_v = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      // address phase of the next operation: mostly shifts
      hsel = 1; m2s.htrans = HT_NONSEQ; m2s.hwrite = 1;
      case ($urandom_range(0, 9))
        0: m2s.haddr = 32'h4000_0004;         // PI
        1: m2s.haddr = 32'h4000_0008;         // capture
        default: m2s.haddr = 32'h4000_0000;   // shift
      endcase
      m2s.hwdata = dp_data;
      func_pi = $urandom;
      #1;
      check(core_pi == g_pi, "PI register drives core PI");
      check(core_hsel == 1'b0, "core deselected in structural mode");
      if (dp_v) begin
        check(s2m.hready, "zero wait");
        check(core_clk_en == (dp_off != TW_PI), "core clock only on shift/capture");
        if (dp_off == TW_SHIFT) begin
          check(s2m.hrdata == g_so(), "scan-out on HRDATA during shift write");
          check(core_scan_en && core_scan_in == dp_data, "scan-in");
        end
        if (dp_off == TW_CAPTURE) begin
          check(s2m.hrdata == g_po(), "PO on HRDATA during capture");
          check(!core_scan_en, "capture with scan enable low");
        end
      end else check(!core_clk_en, "core clock held");
      @(posedge clk);
      if (dp_v) begin
        case (dp_off)
          TW_SHIFT: begin
            for (int c = 0; c < NC; c++) g[c] = {g[c][L-2:0], dp_data[c]};
            nshift++;
          end
          TW_PI: g_pi = dp_data;
          default: begin
            for (int c = 0; c < NC; c++) g[c] = {g[c][L-2:0], g[c][L-1]} ^ {L{g_pi[c % PI_W]}};
            ncap++;
          end
        endcase
      end
      dp_v = 1; dp_off = m2s.haddr[3:2]; dp_data = $urandom;
    end
    // functional mode: transparent
    @(negedge clk);
    struct_mode = 0; hsel = 0; m2s.htrans = HT_IDLE;
    for (int i = 0; i < 50; i++) begin
      @(negedge clk);
      hsel = $urandom_range(0, 1); m2s.htrans = HT_NONSEQ;
      func_pi = $urandom; core_s2m.hrdata = $urandom; core_s2m.hready = $urandom_range(0, 1);
      #1;
      check(core_hsel == hsel, "HSEL forwarded");
      if (i > 1) check(s2m == core_s2m, "core response forwarded");
      check(core_pi == func_pi, "functional PI");
      check(core_clk_en && !core_scan_en, "core runs freely");
    end
    check(nshift > 1000 && ncap > 100, "shifts and captures done");
    $display("shifts=%0d captures=%0d", nshift, ncap);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
