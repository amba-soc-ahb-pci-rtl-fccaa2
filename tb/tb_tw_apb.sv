// tb_tw_apb: self-checking testbench of the APB test wrapper.
//
// Structural mode: APB accesses, both single-cycle (as the bridge's bypass
// path makes them) and with a setup cycle, shift random scan-in words into a
// 32-chain core model, load the PI register and apply capture clocks. A
// golden copy of the chains gives the expected PRDATA (scan-out or primary
// outputs) in each access cycle; the core clock must be enabled only in
// shift and capture access cycles. Functional mode: PSEL, PRDATA and the
// functional primary inputs pass straight through.
module tb_tw_apb;
  import tr_pkg::*;
  localparam int NC = 32, L = 5, PI_W = 32, PO_W = 32;
  logic clk = 1'b0, rst_n = 1'b0;
  logic struct_mode, psel, core_psel;
  apb_m2s_t apb;
  logic [31:0] prdata, core_prdata;
  logic [PI_W-1:0] func_pi, core_pi;
  logic core_clk_en, core_scan_en;
  logic [NC-1:0] core_scan_in, core_scan_out;
  logic [PO_W-1:0] core_po;
  int checks = 0, failures = 0;

  tw_apb #(.NC(NC), .PI_W(PI_W), .PO_W(PO_W)) dut (.*);
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

  logic [L-1:0] g [NC];
  logic [PI_W-1:0] g_pi;
  function automatic logic [NC-1:0] g_so();
    for (int c = 0; c < NC; c++) g_so[c] = g[c][L-1];
  endfunction
  function automatic logic [PO_W-1:0] g_po();
    for (int b = 0; b < PO_W; b++) g_po[b] = (^g[b % NC]) ^ g_pi[b % PI_W];
  endfunction

  int nshift = 0, ncap = 0;
  logic [1:0] off;

  initial begin
    for (int c = 0; c < NC; c++) g[c] = '0;
    g_pi = '0; struct_mode = 1; psel = 0; apb = '0; func_pi = 0; core_prdata = 32'h5A5A5A5A;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      case ($urandom_range(0, 9))
        0: off = TW_PI;
        1: off = TW_CAPTURE;
        default: off = TW_SHIFT;
      endcase
      if ($urandom_range(0, 3) == 0) begin
        // setup cycle first
        @(negedge clk);
        psel = 1; apb.penable = 0; apb.pwrite = 1; apb.paddr = {28'h8000010, off, 2'b00};
        apb.pwdata = $urandom;
        #1 check(!core_clk_en, "no core clock in setup cycle");
      end
      @(negedge clk);
      psel = 1; apb.penable = 1; apb.pwrite = 1; apb.paddr = {28'h8000010, off, 2'b00};
      apb.pwdata = $urandom; func_pi = $urandom;
      #1;
      check(core_pi == g_pi, "PI register drives core PI");
      check(!core_psel, "core deselected");
      check(core_clk_en == (off != TW_PI), "core clock only on shift/capture");
      if (off == TW_SHIFT) check(prdata == g_so() && core_scan_en && core_scan_in == apb.pwdata, "shift");
      if (off == TW_CAPTURE) check(prdata == g_po() && !core_scan_en, "capture");
      @(posedge clk);
      case (off)
        TW_SHIFT: begin for (int c = 0; c < NC; c++) g[c] = {g[c][L-2:0], apb.pwdata[c]}; nshift++; end
        TW_PI: g_pi = apb.pwdata;
        default: begin
          for (int c = 0; c < NC; c++) g[c] = {g[c][L-2:0], g[c][L-1]} ^ {L{g_pi[c % PI_W]}};
          ncap++;
        end
      endcase
      if ($urandom_range(0, 4) == 0) begin
        @(negedge clk); psel = 0; apb.penable = 0;
        #1 check(!core_clk_en, "core clock held when idle");
      end
    end
    @(negedge clk); struct_mode = 0;
    for (int i = 0; i < 50; i++) begin
      @(negedge clk);
      psel = $urandom_range(0, 1); func_pi = $urandom; core_prdata = $urandom;
      #1;
      check(core_psel == psel && prdata == core_prdata && core_pi == func_pi, "transparent");
      check(core_clk_en && !core_scan_en, "core runs freely");
    end
    check(nshift > 1000 && ncap > 100, "shifts and captures done");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
