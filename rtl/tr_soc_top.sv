// tr_soc_top: AMBA SoC whose AHB/PCI bridge doubles as its test access port.
//
// The TR-bridge (tr_bridge) is the one AHB master modelled here. In normal
// operation it carries PCI-side commands from its PCI write FIFO; in test
// mode its HTIC lets an external tester drive the AHB directly through the
// AD bus (test vectors in) while the EBI drives EBIDATABUS as the test
// response output, so input and output never share a bus and need no
// turnaround. The AHB slaves are the EBI, the test wrappers of three AHB
// cores (the Leon3 processor, the SDRAM controller and the Ethernet MAC of the
// example system) and the AHB-APB bridge, behind which the wrappers of three
// APB cores (UART, GPIO, RTC) sit. StructTestMode switches the wrappers to
// structural (scan) test and the AHB-APB bridge to its bypass path.
//
// The cores themselves, the processor's own master port, the bus arbiter
// and the PCI target/initiator side of the bridge are outside this RTL: their
// connections are ports. Core i of the arrays is AHB core i for i < 3 and
// APB core i-3 otherwise. Addresses: HADDR[31:24] = 0x00 EBI, 0x40..0x42 AHB
// cores, 0x80 APB (PADDR[11:8] = 0 UART, 1 GPIO, 2 RTC); wrapper registers at
// offsets 0x0 shift, 0x4 PI, 0x8 capture. The structure follows the original scheme;
// the address map and register offsets are this design's own. One clock
// (TCLK, which is also HCLK in test mode) drives everything.
module tr_soc_top
  import tr_pkg::*;
#(
  parameter int unsigned NC         = 32,  // scan chains per core
  parameter int unsigned PI_W       = 32,
  parameter int unsigned PO_W       = 32,
  parameter int unsigned FIFO_DEPTH = 8,
  parameter int unsigned NCORE      = NUM_AHB_CORES + NUM_APB_CORES
) (
  input  logic          clk,
  input  logic          rst_n,
  // external test interface
  input  logic          treq,
  input  logic [2:0]    cbe,
  input  logic [DW-1:0] ad,
  output logic          tack,
  output logic          test_read,
  output logic          struct_test_mode,
  output htic_state_e   htic_state,
  // PCI target side of the bridge FIFOs
  input  logic          pci_wr_push,
  input  cmd_t          pci_wr_cmd,
  output logic          pci_wr_full,
  input  logic          pci_rd_pop,
  output logic [DW-1:0] pci_rd_data,
  output logic          pci_rd_empty,
  // arbiter
  output logic          hbusreq,
  input  logic          hgrant,
  // EBI pins (EBIADDROUT, EBIDATABUS split into in/out/enable)
  output logic [AW-1:0] ebi_addr_o,
  output logic [DW-1:0] ebi_data_o,
  output logic          ebi_data_oe,
  input  logic [DW-1:0] ebi_data_i,
  output logic          ebi_cs_n,
  output logic          ebi_we_n,
  output logic          ebi_oe_n,
  // AHB cores' own slave ports
  output ahb_m2s_t      ahb_bus,
  output ahb_s2m_t      ahb_bus_resp,
  output logic [NUM_AHB_CORES-1:0]            core_hsel,
  input  ahb_s2m_t [NUM_AHB_CORES-1:0]        core_s2m,
  // APB cores' own slave ports
  output apb_m2s_t      apb_bus,
  output logic [NUM_APB_CORES-1:0]            core_psel,
  input  logic [NUM_APB_CORES-1:0][DW-1:0]    core_prdata,
  // core test side, through the wrappers
  input  logic [NCORE-1:0][PI_W-1:0] func_pi,
  output logic [NCORE-1:0][PI_W-1:0] core_pi,
  output logic [NCORE-1:0]           core_clk_en,
  output logic [NCORE-1:0]           core_scan_en,
  output logic [NCORE-1:0][NC-1:0]   core_scan_in,
  input  logic [NCORE-1:0][NC-1:0]   core_scan_out,
  input  logic [NCORE-1:0][PO_W-1:0] core_po
);
  localparam int unsigned NS = NUM_AHB_SLV;
  // slave index: 0 EBI, 1..NUM_AHB_CORES cores, NS-1 APB bridge
  localparam logic [NS*8-1:0] BASES = {SLV_APB, SLV_CORE0 + 8'd2, SLV_CORE0 + 8'd1,
                                       SLV_CORE0, SLV_EBI};

  ahb_m2s_t          m2s;
  ahb_s2m_t          bus_s2m;
  logic [NS-1:0]     hsel;
  ahb_s2m_t [NS-1:0] slv_s2m;
  logic [NUM_APB_CORES-1:0]          psel;
  logic [NUM_APB_CORES-1:0][DW-1:0]  prdata;

  assign ahb_bus      = m2s;
  assign ahb_bus_resp = bus_s2m;

  tr_bridge #(.FIFO_DEPTH(FIFO_DEPTH)) u_bridge (
    .clk, .rst_n,
    .treq, .cbe, .ad, .tack, .test_read, .struct_test_mode, .htic_state,
    .pci_wr_push, .pci_wr_cmd, .pci_wr_full,
    .pci_rd_pop, .pci_rd_data, .pci_rd_empty,
    .hbusreq, .hgrant, .m2s, .s2m(bus_s2m)
  );

  ahb_interconnect #(.NS(NS), .BASES(BASES)) u_ahb (
    .clk, .rst_n, .m2s, .hsel, .slv_s2m, .bus_s2m
  );

  ebi u_ebi (
    .clk, .rst_n, .test_read,
    .hsel(hsel[0]), .m2s, .bus_s2m, .s2m(slv_s2m[0]),
    .ebi_addr_o, .ebi_data_o, .ebi_data_oe, .ebi_data_i,
    .ebi_cs_n, .ebi_we_n, .ebi_oe_n
  );

  for (genvar i = 0; i < NUM_AHB_CORES; i++) begin : g_ahb_tw
    tw_ahb #(.NC(NC), .PI_W(PI_W), .PO_W(PO_W)) u_tw (
      .clk, .rst_n, .struct_mode(struct_test_mode),
      .hsel(hsel[1+i]), .m2s, .hready_in(bus_s2m.hready), .s2m(slv_s2m[1+i]),
      .core_hsel(core_hsel[i]), .core_s2m(core_s2m[i]),
      .func_pi(func_pi[i]), .core_pi(core_pi[i]), .core_clk_en(core_clk_en[i]),
      .core_scan_en(core_scan_en[i]), .core_scan_in(core_scan_in[i]),
      .core_scan_out(core_scan_out[i]), .core_po(core_po[i])
    );
  end

  apb_bridge #(.NP(NUM_APB_CORES)) u_apb (
    .clk, .rst_n, .bypass(struct_test_mode),
    .hsel(hsel[NS-1]), .m2s, .hready_in(bus_s2m.hready), .s2m(slv_s2m[NS-1]),
    .apb(apb_bus), .psel, .prdata
  );

  for (genvar j = 0; j < NUM_APB_CORES; j++) begin : g_apb_tw
    localparam int unsigned K = NUM_AHB_CORES + j;
    tw_apb #(.NC(NC), .PI_W(PI_W), .PO_W(PO_W)) u_tw (
      .clk, .rst_n, .struct_mode(struct_test_mode),
      .psel(psel[j]), .apb(apb_bus), .prdata(prdata[j]),
      .core_psel(core_psel[j]), .core_prdata(core_prdata[j]),
      .func_pi(func_pi[K]), .core_pi(core_pi[K]), .core_clk_en(core_clk_en[K]),
      .core_scan_en(core_scan_en[K]), .core_scan_in(core_scan_in[K]),
      .core_scan_out(core_scan_out[K]), .core_po(core_po[K])
    );
  end

endmodule
