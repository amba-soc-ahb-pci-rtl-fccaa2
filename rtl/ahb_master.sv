// ahb_master: AHB (AMBA 2.0) bus master of the AHB/PCI bridge.
//
// In normal operation it carries commands from the PCI target side onto the
// AHB; in test mode the same block carries the test controller's commands,
// which is the reuse the bridge is built around. The original scheme gives only this
// function; the pipeline below is this design's own.
//
// A command (req, valid with req_valid) is placed in the AHB address phase
// in the same cycle, with HTRANS taken from the command's control field and
// HBURST = INCR. It is accepted (req_ready high) when the master owns the
// address bus (HGRANT was high at the last rising edge with HREADY high) and
// HREADY is high. The write data is registered on acceptance and driven on HWDATA
// during the following data phase, so back-to-back commands run one per
// clock while the slaves give zero-wait responses. When the data phase ends
// (HREADY high) rsp_valid pulses with the read data and rsp_err flags an
// ERROR response; commands are not cancelled after an error. HBUSREQ is
// raised while a command is waiting.
module ahb_master
  import tr_pkg::*;
(
  input  logic          clk,
  input  logic          rst_n,
  // command side
  input  logic          req_valid,
  input  cmd_t          req,
  output logic          req_ready,
  output logic          rsp_valid,
  output logic          rsp_write,
  output logic [DW-1:0] rsp_rdata,
  output logic          rsp_err,
  // AHB
  output logic          hbusreq,
  input  logic          hgrant,
  output ahb_m2s_t      m2s,
  input  ahb_s2m_t      s2m
);

  logic          issue;
  logic          owner_q;
  logic          dp_valid;
  logic          dp_write;
  logic [DW-1:0] dp_wdata;

  // AHB ownership: the address bus belongs to this master in the cycle after
  // a rising edge at which HGRANT and HREADY were both high.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)          owner_q <= 1'b0;
    else if (s2m.hready) owner_q <= hgrant;
  end

  assign issue     = req_valid && owner_q && req.ctrl.htrans[1];
  assign req_ready = owner_q && s2m.hready;
  assign hbusreq   = req_valid;

  always_comb begin
    m2s.haddr     = req.addr;
    m2s.htrans    = (req_valid && owner_q) ? req.ctrl.htrans : HT_IDLE;
    m2s.hwrite    = req.write;
    m2s.hsize     = req.ctrl.hsize;
    m2s.hburst    = 3'b001;  // INCR
    m2s.hprot     = req.ctrl.hprot;
    m2s.hmastlock = req.ctrl.hlock;
    m2s.hwdata    = dp_wdata;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dp_valid <= 1'b0;
      dp_write <= 1'b0;
      dp_wdata <= '0;
    end else if (s2m.hready) begin
      dp_valid <= issue;
      if (issue) begin
        dp_write <= req.write;
        dp_wdata <= req.wdata;
      end
    end
  end

  assign rsp_valid = dp_valid && s2m.hready;
  assign rsp_write = dp_write;
  assign rsp_rdata = s2m.hrdata;
  assign rsp_err   = (s2m.hresp == HR_ERROR);

endmodule
