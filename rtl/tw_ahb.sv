// tw_ahb: test wrapper of a core that sits on the AHB.
//
// Outside structural test mode the wrapper is transparent on the bus: HSEL
// is forwarded to the core (core_hsel) and the core's own response
// (core_s2m) is returned. In structural test mode (struct_mode, the
// StructTestMode signal of the bridge) the wrapper answers the transfers
// itself with zero wait states: the address phase is registered and the
// transfer acts on the tw_core registers (HADDR[3:2]) in the data phase,
// where the write data is valid. A shift write therefore returns the scan-out
// bits on HRDATA in the same data phase, where the EBI picks them up, so
// scan-in and scan-out need only write transfers. Core-side ports are those
// of tw_core.
module tw_ahb
  import tr_pkg::*;
#(
  parameter int unsigned NC   = 32,
  parameter int unsigned PI_W = 32,
  parameter int unsigned PO_W = 32
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            struct_mode,
  // AHB slave port
  input  logic            hsel,
  input  ahb_m2s_t        m2s,
  input  logic            hready_in,
  output ahb_s2m_t        s2m,
  // the core's own AHB slave port
  output logic            core_hsel,
  input  ahb_s2m_t        core_s2m,
  // core test side
  input  logic [PI_W-1:0] func_pi,
  output logic [PI_W-1:0] core_pi,
  output logic            core_clk_en,
  output logic            core_scan_en,
  output logic [NC-1:0]   core_scan_in,
  input  logic [NC-1:0]   core_scan_out,
  input  logic [PO_W-1:0] core_po
);
  logic       own_dp, dp_write;
  logic [1:0] dp_off;
  logic [DW-1:0] rdata;

  assign core_hsel = hsel && !struct_mode;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      own_dp   <= 1'b0;
      dp_write <= 1'b0;
      dp_off   <= '0;
    end else if (hready_in) begin
      own_dp   <= hsel && struct_mode && m2s.htrans[1];
      dp_write <= m2s.hwrite;
      dp_off   <= m2s.haddr[3:2];
    end
  end

  tw_core #(.NC(NC), .PI_W(PI_W), .PO_W(PO_W)) u_core (
    .clk, .rst_n, .struct_mode,
    .strobe(own_dp), .write(dp_write), .offset(dp_off),
    .wdata(m2s.hwdata), .rdata,
    .func_pi, .core_pi, .core_clk_en, .core_scan_en, .core_scan_in,
    .core_scan_out, .core_po
  );

  always_comb begin
    if (own_dp) s2m = '{hrdata: rdata, hready: 1'b1, hresp: HR_OKAY};
    else        s2m = core_s2m;
  end

endmodule
