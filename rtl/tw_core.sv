// tw_core: bus-independent part of a core test wrapper (test harness).
//
// While struct_mode (StructTestMode) is low the wrapper is transparent: the
// core's primary inputs come from its functional sources, its clock enable is
// held high and scan enable low. While struct_mode is high the core's primary
// inputs come from the wrapper's PI register, and its clock is only enabled
// for the cycles that the tester asks for through register writes:
//   offset 0 (shift):   scan enable high for one core clock; the write data
//                       bits are the scan-in bits of chains 0..NC-1. The read
//                       data of that same cycle is the chains' scan-out bits,
//                       so scan-out is observed during the write itself.
//   offset 1 (PI):      loads the PI register.
//   offset 2 (capture): scan enable low for one core clock (capture); the read
//                       data of that cycle is the core's primary outputs.
// A strobe marks the one cycle in which an access is carried out (AHB data
// phase or APB access phase). rdata is combinational. As in the original
// scheme, the wrapper registers only the primary inputs; scan data goes
// straight between the bus and the chains. Register offsets, widths and the
// clock-enable style are this design's own.
module tw_core
  import tr_pkg::*;
#(
  parameter int unsigned NC   = 32,  // scan chains per core
  parameter int unsigned PI_W = 32,
  parameter int unsigned PO_W = 32
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            struct_mode,
  input  logic            strobe,
  input  logic            write,
  input  logic [1:0]      offset,
  input  logic [DW-1:0]   wdata,
  output logic [DW-1:0]   rdata,
  // core side
  input  logic [PI_W-1:0] func_pi,
  output logic [PI_W-1:0] core_pi,
  output logic            core_clk_en,
  output logic            core_scan_en,
  output logic [NC-1:0]   core_scan_in,
  input  logic [NC-1:0]   core_scan_out,
  input  logic [PO_W-1:0] core_po
);
  logic [PI_W-1:0] pi_q;
  logic            do_shift, do_capture;

  assign do_shift   = struct_mode && strobe && write && (offset == TW_SHIFT);
  assign do_capture = struct_mode && strobe && write && (offset == TW_CAPTURE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) pi_q <= '0;
    else if (struct_mode && strobe && write && offset == TW_PI) pi_q <= wdata[PI_W-1:0];
  end

  assign core_pi      = struct_mode ? pi_q : func_pi;
  assign core_clk_en  = !struct_mode || do_shift || do_capture;
  assign core_scan_en = do_shift;
  assign core_scan_in = wdata[NC-1:0];

  always_comb begin
    rdata = '0;
    unique case (offset)
      TW_SHIFT:   rdata[NC-1:0]   = core_scan_out;
      TW_PI:      rdata[PI_W-1:0] = pi_q;
      TW_CAPTURE: rdata[PO_W-1:0] = core_po;
      default:    rdata = '0;
    endcase
  end

endmodule
