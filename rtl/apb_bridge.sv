// apb_bridge: AHB-APB bridge with a bypass multiplexer for structural test.
//
// The bridge is an AHB slave and the only APB master. PADDR[11:8] selects
// one of NP APB slaves (PSEL is one-hot).
//
// Normal path: the AHB address phase is registered, then the APB transfer
// takes two clocks: a setup cycle (PSEL high, PENABLE low, HREADY low) and an
// access cycle (PSEL and PENABLE high, HREADY high, PRDATA returned as
// HRDATA). PWDATA is the HWDATA of the AHB data phase, which the master holds
// during the wait state.
// Bypass path (bypass high, the StructTestMode signal): the multiplexer skips
// the setup cycle. The access cycle is driven directly in the single AHB data
// phase, with no wait state, so test-wrapper writes on the APB run at one
// per clock like those on the AHB. That the bridge has a bypass multiplexer
// for structural test comes from the original scheme; its exact cycle behaviour is
// this design's own. The bridge never answers ERROR.
module apb_bridge
  import tr_pkg::*;
#(
  parameter int unsigned NP = 3
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          bypass,
  // AHB slave port
  input  logic          hsel,
  input  ahb_m2s_t      m2s,
  input  logic          hready_in,
  output ahb_s2m_t      s2m,
  // APB master port
  output apb_m2s_t      apb,
  output logic [NP-1:0] psel,
  input  logic [NP-1:0][DW-1:0] prdata
);
  typedef enum logic [1:0] {B_IDLE, B_SETUP, B_ACCESS, B_BYPASS} bstate_e;

  bstate_e       st_q;
  logic [AW-1:0] addr_q;
  logic          write_q;
  logic          take;
  logic [DW-1:0] rdata;
  logic [3:0]    slot;

  // a new transfer may start when the bus is ready and the bridge is not in
  // the middle of its own two-cycle transfer
  assign take = hsel && m2s.htrans[1] && hready_in;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st_q    <= B_IDLE;
      addr_q  <= '0;
      write_q <= 1'b0;
    end else begin
      unique case (st_q)
        B_SETUP: st_q <= B_ACCESS;
        default: begin
          // B_IDLE, B_ACCESS and B_BYPASS end with HREADY high
          if (take) begin
            st_q    <= bypass ? B_BYPASS : B_SETUP;
            addr_q  <= m2s.haddr;
            write_q <= m2s.hwrite;
          end else begin
            st_q <= B_IDLE;
          end
        end
      endcase
    end
  end

  assign slot = addr_q[11:8];

  always_comb begin
    apb.paddr   = addr_q;
    apb.pwrite  = write_q;
    apb.pwdata  = m2s.hwdata;
    apb.penable = (st_q == B_ACCESS) || (st_q == B_BYPASS);
    psel        = '0;
    rdata       = '0;
    for (int i = 0; i < NP; i++) begin
      if (slot == 4'(i)) begin
        psel[i] = (st_q != B_IDLE);
        rdata   = prdata[i];
      end
    end
    s2m.hready = (st_q != B_SETUP);
    s2m.hresp  = HR_OKAY;
    s2m.hrdata = rdata;
  end

endmodule
