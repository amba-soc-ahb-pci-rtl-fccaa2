// tb_ahb_mem: behavioural AHB slave memory for testbenches.
//
// 256 words addressed by HADDR[9:2]. The address phase is taken when HSEL,
// HTRANS[1] and the bus HREADY are high. The data phase lasts 1 + n clocks,
// n drawn at random from 0..max_wait (0 gives zero-wait). A write stores
// HWDATA at the end of the data phase; a read returns the stored word.
// nacc counts completed transfers. It also asserts that a master keeps
// address and control stable while the bus HREADY is low.
module tb_ahb_mem
  import tr_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  input  int       max_wait,
  input  logic     hsel,
  input  ahb_m2s_t m2s,
  input  logic     hready_in,
  output ahb_s2m_t s2m,
  output int       nacc,
  output int       nwait
);
  logic [31:0] mem [256];
  bit          dp;
  bit          dp_write;
  logic [7:0]  dp_idx;
  int          wait_left;

  initial begin
    for (int i = 0; i < 256; i++) mem[i] = 32'hA5000000 | i;
    dp = 0; nacc = 0; nwait = 0; wait_left = 0;
  end

  always_comb begin
    s2m.hready = !(dp && wait_left > 0);
    s2m.hresp  = HR_OKAY;
    s2m.hrdata = (dp && !dp_write) ? mem[dp_idx] : 32'h0;
  end

  always_ff @(posedge clk) begin
    if (dp && wait_left > 0) begin
      wait_left <= wait_left - 1;
      nwait <= nwait + 1;
    end else begin
      if (dp) begin
        nacc <= nacc + 1;
        if (dp_write) mem[dp_idx] <= m2s.hwdata;
      end
      if (hready_in) begin
        dp        <= rst_n && hsel && m2s.htrans[1];
        dp_write  <= m2s.hwrite;
        dp_idx    <= m2s.haddr[9:2];
        wait_left <= $urandom_range(0, max_wait);
      end
    end
  end

  // address and control held during wait states
  ahb_m2s_t prev;
  bit       prev_stall;
  always_ff @(posedge clk) begin
    prev       <= m2s;
    prev_stall <= rst_n && !hready_in && m2s.htrans[1];
  end
  always @(posedge clk)
    if (prev_stall)
      assert (m2s.haddr == prev.haddr && m2s.hwrite == prev.hwrite && m2s.htrans == prev.htrans)
        else $error("address phase changed while HREADY low");
endmodule
