// ebi: external bus interface, reused as the test response output port.
//
// Normal operation: an AHB slave that maps each transfer to a single-cycle
// access of an external asynchronous memory. In the AHB data phase it drives
// EBIADDROUT with the address, chip select and, for a write, write enable and
// EBIDATABUS (output enable high) with HWDATA; for a read it returns the
// EBIDATABUS input as HRDATA. It never inserts wait states.
//
// Test mode (test_read high): EBIDATABUS turns into a dedicated output. Every
// completed AHB data phase on the bus (whichever slave answered) is captured
// from the shared HRDATA: the read data of a read vector, or whatever the
// addressed test wrapper returns during a write (its scan-out bits). In the
// next cycle the captured word is on EBIDATABUS, the address of that transfer
// on EBIADDROUT, and ebi_cs_n is low for one cycle as a strobe telling the
// tester the word is new. So a read vector's response appears two clocks
// after the cycle in which the read vector was on AD and accepted. The pins
// stay in this mode for one clock after TestRead falls when a last response
// is still to be shown, so the response to the final vector is not lost.
// The direction control by TestRead follows the original scheme; the strobe, the
// address echo and the memory timing are this design's own. Accesses to the
// EBI's own address range in test mode complete with read data zero.
// The tri-state pins are split into input, output and output enable.
module ebi
  import tr_pkg::*;
(
  input  logic          clk,
  input  logic          rst_n,
  input  logic          test_read,
  // AHB slave port
  input  logic          hsel,
  input  ahb_m2s_t      m2s,
  input  ahb_s2m_t      bus_s2m,   // shared HREADY and HRDATA of the bus
  output ahb_s2m_t      s2m,       // this slave's own response
  // external pins
  output logic [AW-1:0] ebi_addr_o,
  output logic [DW-1:0] ebi_data_o,
  output logic          ebi_data_oe,
  input  logic [DW-1:0] ebi_data_i,
  output logic          ebi_cs_n,
  output logic          ebi_we_n,
  output logic          ebi_oe_n
);

  // own data phase
  logic          dp_sel, dp_write;
  logic [AW-1:0] dp_addr;
  // bus data phase monitor (test mode)
  logic          bus_dp;
  logic [AW-1:0] bus_addr;
  logic [DW-1:0] resp_q;
  logic [AW-1:0] resp_addr_q;
  logic          resp_new_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dp_sel   <= 1'b0;
      dp_write <= 1'b0;
      dp_addr  <= '0;
      bus_dp   <= 1'b0;
      bus_addr <= '0;
    end else if (bus_s2m.hready) begin
      dp_sel   <= hsel && m2s.htrans[1];
      dp_write <= m2s.hwrite;
      dp_addr  <= m2s.haddr;
      bus_dp   <= test_read && m2s.htrans[1];
      bus_addr <= m2s.haddr;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      resp_q      <= '0;
      resp_addr_q <= '0;
      resp_new_q  <= 1'b0;
    end else begin
      resp_new_q <= test_read && bus_dp && bus_s2m.hready;
      if (test_read && bus_dp && bus_s2m.hready) begin
        resp_q      <= bus_s2m.hrdata;
        resp_addr_q <= bus_addr;
      end
    end
  end

  always_comb begin
    s2m.hready = 1'b1;
    s2m.hresp  = HR_OKAY;
    s2m.hrdata = (dp_sel && !dp_write && !test_read) ? ebi_data_i : '0;
    if (test_read || resp_new_q) begin
      ebi_addr_o  = resp_addr_q;
      ebi_data_o  = resp_q;
      ebi_data_oe = 1'b1;
      ebi_cs_n    = !resp_new_q;
      ebi_we_n    = 1'b1;
      ebi_oe_n    = 1'b1;
    end else begin
      ebi_addr_o  = dp_addr;
      ebi_data_o  = m2s.hwdata;
      ebi_data_oe = dp_sel && dp_write;
      ebi_cs_n    = !dp_sel;
      ebi_we_n    = !(dp_sel && dp_write);
      ebi_oe_n    = !(dp_sel && !dp_write);
    end
  end

endmodule
