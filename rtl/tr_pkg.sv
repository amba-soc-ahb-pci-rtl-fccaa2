// tr_pkg: types and constants shared by the test-ready AHB/PCI bridge SoC.
//
// Holds the AMBA 2.0 AHB and APB signal bundles as packed structs, the
// test-vector type encoding carried on CBE[1:0] (as in the original scheme:
// 11 address, 10 write, 01 read, 00 control), the HTIC controller states of
// its state diagram, the command word passed from either the PCI write FIFO
// or the test controller to the AHB master, and the address map of the
// example SoC. The field layout of a control vector and the address map are
// this design's own choices; the vector encoding and the state names follow
// the original scheme.
package tr_pkg;

  localparam int unsigned AW = 32;  // AHB address width (HADDR[31:0])
  localparam int unsigned DW = 32;  // AHB data width and AD / EBIDATABUS width

  typedef enum logic [1:0] {
    HT_IDLE   = 2'b00,
    HT_BUSY   = 2'b01,
    HT_NONSEQ = 2'b10,
    HT_SEQ    = 2'b11
  } htrans_e;

  typedef enum logic [1:0] {
    HR_OKAY  = 2'b00,
    HR_ERROR = 2'b01,
    HR_RETRY = 2'b10,
    HR_SPLIT = 2'b11
  } hresp_e;

  // Type of the test vector announced on CBE[1:0] for the following cycle.
  typedef enum logic [1:0] {
    VEC_CONT  = 2'b00,
    VEC_READ  = 2'b01,
    VEC_WRITE = 2'b10,
    VEC_ADDR  = 2'b11
  } vec_e;

  // States of the hybrid test interface controller.
  typedef enum logic [2:0] {
    S_IDLE     = 3'd0,
    S_START    = 3'd1,
    S_ADDRVEC  = 3'd2,
    S_WRITEVEC = 3'd3,
    S_READVEC  = 3'd4,
    S_CONTVEC  = 3'd5
  } htic_state_e;

  // AHB control values that a control vector sets.
  typedef struct packed {
    logic [2:0] hsize;
    logic [3:0] hprot;
    htrans_e    htrans;
    logic       hlock;
  } ahb_ctrl_t;

  localparam ahb_ctrl_t CTRL_RESET = '{hsize: 3'b010, hprot: 4'b0011,
                                       htrans: HT_NONSEQ, hlock: 1'b0};

  // Control vector layout on AD[31:0]: [2:0] HSIZE, [7:4] HPROT,
  // [9:8] HTRANS, [12] HLOCK. Other bits are ignored.
  function automatic ahb_ctrl_t decode_ctrl(input logic [DW-1:0] v);
    ahb_ctrl_t c;
    c.hsize  = v[2:0];
    c.hprot  = v[7:4];
    c.htrans = htrans_e'(v[9:8]);
    c.hlock  = v[12];
    return c;
  endfunction

  // One bus command for the AHB master.
  typedef struct packed {
    logic          write;
    logic [AW-1:0] addr;
    logic [DW-1:0] wdata;
    ahb_ctrl_t     ctrl;
  } cmd_t;

  // AHB master-to-slave bundle (also what every slave sees).
  typedef struct packed {
    logic [AW-1:0] haddr;
    htrans_e       htrans;
    logic          hwrite;
    logic [2:0]    hsize;
    logic [2:0]    hburst;
    logic [3:0]    hprot;
    logic          hmastlock;
    logic [DW-1:0] hwdata;
  } ahb_m2s_t;

  // AHB slave-to-master bundle.
  typedef struct packed {
    logic [DW-1:0] hrdata;
    logic          hready;
    hresp_e        hresp;
  } ahb_s2m_t;

  // APB bundle from the AHB-APB bridge (PSEL is one bit per slave, apart).
  typedef struct packed {
    logic [AW-1:0] paddr;
    logic          penable;
    logic          pwrite;
    logic [DW-1:0] pwdata;
  } apb_m2s_t;

  // Address map of the example SoC: HADDR[31:24] selects the AHB slave,
  // PADDR[11:8] the APB slave behind the AHB-APB bridge.
  localparam int unsigned NUM_AHB_CORES = 3;  // Leon3, SDRAM controller, Ethernet MAC
  localparam int unsigned NUM_APB_CORES = 3;  // UART, GPIO, RTC
  localparam int unsigned NUM_AHB_SLV   = NUM_AHB_CORES + 2;  // + EBI + APB bridge

  localparam logic [7:0] SLV_EBI  = 8'h00;
  localparam logic [7:0] SLV_CORE0 = 8'h40;  // AHB core i at 8'h40 + i
  localparam logic [7:0] SLV_APB  = 8'h80;

  // Register offsets (HADDR[3:2] / PADDR[3:2]) of a test wrapper in
  // structural test mode.
  localparam logic [1:0] TW_SHIFT   = 2'd0;  // write: one scan shift, read: scan-out
  localparam logic [1:0] TW_PI      = 2'd1;  // primary-input register
  localparam logic [1:0] TW_CAPTURE = 2'd2;  // write: one capture clock, data phase returns PO

endpackage
