// tr_bridge: test-ready (TR) AHB/PCI bridge, the AHB-master half of an
// AHB-PCI bridge with a hybrid test interface controller (HTIC) added.
//
// Normal operation (TREQ low): commands written by the PCI target into the
// PCI write FIFO are carried onto the AHB by the AHB master, and read data
// returns through the PCI read FIFO. A read is only issued when the read
// FIFO has room for it (two free words, as at most one read is in flight).
//
// Test mode: the HTIC, made of the test controller (htic_ctrl) and a 2:1
// multiplexer in front of the AHB master, connects the AD bus directly to
// the AHB master, past the PCI target and the PCI write FIFO. The multiplexer
// select is the controller's test_mode, which also leaves the bridge as
// TestRead towards the EBI; StructTestMode goes to the test wrappers. Read
// data in test mode goes out through the EBI and is not written to the PCI
// read FIFO. That structure follows the original scheme; the FIFO depth and the PCI
// target-side handshake (push/pop ports standing for the PCI target, which is
// outside this RTL) are this design's own.
module tr_bridge
  import tr_pkg::*;
#(
  parameter int unsigned FIFO_DEPTH = 8
) (
  input  logic          clk,
  input  logic          rst_n,
  // external test interface (CBE[2:0] and AD shared with PCI)
  input  logic          treq,
  input  logic [2:0]    cbe,
  input  logic [DW-1:0] ad,
  output logic          tack,
  output logic          test_read,
  output logic          struct_test_mode,
  output htic_state_e   htic_state,
  // PCI target side of the PCI write and read FIFOs
  input  logic          pci_wr_push,
  input  cmd_t          pci_wr_cmd,
  output logic          pci_wr_full,
  input  logic          pci_rd_pop,
  output logic [DW-1:0] pci_rd_data,
  output logic          pci_rd_empty,
  // AHB
  output logic          hbusreq,
  input  logic          hgrant,
  output ahb_m2s_t      m2s,
  input  ahb_s2m_t      s2m
);
  localparam int unsigned CW = $clog2(FIFO_DEPTH + 1);

  logic          test_mode;
  logic          t_valid, t_ready;
  cmd_t          t_cmd;
  logic          wf_empty, wf_pop;
  cmd_t          wf_head;
  logic [CW-1:0] wf_count, rf_count;
  logic          rf_full, rf_room;
  logic          n_valid;
  logic          m_valid, m_ready;
  cmd_t          m_cmd;
  logic          rsp_valid, rsp_write, rsp_err;
  logic          dp_from_pci;
  logic [DW-1:0] rsp_rdata;

  htic_ctrl u_ctrl (
    .clk, .rst_n, .treq, .cbe, .ad, .tack,
    .test_mode, .struct_test_mode,
    .cmd_valid(t_valid), .cmd(t_cmd), .cmd_ready(t_ready),
    .state(htic_state)
  );

  assign test_read = test_mode;

  sync_fifo #(.WIDTH($bits(cmd_t)), .DEPTH(FIFO_DEPTH)) u_pci_wfifo (
    .clk, .rst_n,
    .push(pci_wr_push), .wdata(pci_wr_cmd), .pop(wf_pop), .rdata(wf_head),
    .full(pci_wr_full), .empty(wf_empty), .count(wf_count)
  );

  assign rf_room = (32'(rf_count) + 32'd2 <= FIFO_DEPTH);
  assign n_valid = !wf_empty && (wf_head.write || rf_room);

  // HTIC multiplexer: 1 = test controller, 0 = PCI write FIFO
  always_comb begin
    if (test_mode) begin
      m_valid = t_valid;
      m_cmd   = t_cmd;
    end else begin
      m_valid = n_valid;
      m_cmd   = wf_head;
    end
  end
  assign t_ready = test_mode && m_ready;
  assign wf_pop  = !test_mode && n_valid && m_ready;

  ahb_master u_master (
    .clk, .rst_n,
    .req_valid(m_valid), .req(m_cmd), .req_ready(m_ready),
    .rsp_valid, .rsp_write, .rsp_rdata, .rsp_err,
    .hbusreq, .hgrant, .m2s, .s2m
  );

  // source of the transfer now in its data phase, so that a test read still
  // completing after test mode has ended does not reach the PCI read FIFO
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)       dp_from_pci <= 1'b0;
    else if (m_ready) dp_from_pci <= !test_mode && m_valid;
  end

  sync_fifo #(.WIDTH(DW), .DEPTH(FIFO_DEPTH)) u_pci_rfifo (
    .clk, .rst_n,
    .push(rsp_valid && !rsp_write && dp_from_pci), .wdata(rsp_rdata),
    .pop(pci_rd_pop), .rdata(pci_rd_data),
    .full(rf_full), .empty(pci_rd_empty), .count(rf_count)
  );

endmodule
