// tw_apb: test wrapper of a core that sits on the APB.
//
// Outside structural test mode PSEL goes on to the core (core_psel) and the
// core's PRDATA is returned. In structural test mode the wrapper answers
// itself: an access phase (PSEL and PENABLE high) is the tw_core strobe, with
// PADDR[3:2] as register offset and PWDATA as write data; PRDATA is the
// tw_core read data, combinational in that same cycle. With the AHB-APB
// bridge in bypass, each AHB write to the wrapper is therefore one APB access
// in the AHB data phase. Core-side ports are those of tw_core.
module tw_apb
  import tr_pkg::*;
#(
  parameter int unsigned NC   = 32,
  parameter int unsigned PI_W = 32,
  parameter int unsigned PO_W = 32
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            struct_mode,
  // APB slave port
  input  logic            psel,
  input  apb_m2s_t        apb,
  output logic [DW-1:0]   prdata,
  // the core's own APB slave port
  output logic            core_psel,
  input  logic [DW-1:0]   core_prdata,
  // core test side
  input  logic [PI_W-1:0] func_pi,
  output logic [PI_W-1:0] core_pi,
  output logic            core_clk_en,
  output logic            core_scan_en,
  output logic [NC-1:0]   core_scan_in,
  input  logic [NC-1:0]   core_scan_out,
  input  logic [PO_W-1:0] core_po
);
  logic [DW-1:0] rdata;

  assign core_psel = psel && !struct_mode;

  tw_core #(.NC(NC), .PI_W(PI_W), .PO_W(PO_W)) u_core (
    .clk, .rst_n, .struct_mode,
    .strobe(psel && apb.penable), .write(apb.pwrite), .offset(apb.paddr[3:2]),
    .wdata(apb.pwdata), .rdata,
    .func_pi, .core_pi, .core_clk_en, .core_scan_en, .core_scan_in,
    .core_scan_out, .core_po
  );

  assign prdata = struct_mode ? rdata : core_prdata;

endmodule
