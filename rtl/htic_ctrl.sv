// htic_ctrl: Test Controller of the hybrid test interface controller (HTIC).
//
// It turns the external test interface (TREQ, TACK, CBE[2:0], AD[31:0], all
// sampled on the test clock) into AHB commands for the bridge's AHB master.
// Following the original scheme's state diagram, the controller waits in IDLE until
// TREQ rises, latches CBE[2] as the mode (0 functional, 1 structural) and
// enters START. START only moves on to ADDRVEC when CBE[1:0] announces an
// address vector, so no read or write can precede the first address. The
// four vector states ADDRVEC, WRITEVEC, READVEC and CONTVEC form a complete
// graph: CBE[1:0] in one cycle names the type of the vector on AD in the next
// cycle (11 address, 10 write, 01 read, 00 control), so every change of
// vector type costs one clock and no turnaround cycle.
//
// In each vector state:
//   ADDRVEC  - AD is latched as the target address.
//   WRITEVEC - an AHB write of AD to the latched address is issued.
//   READVEC  - an AHB read of the latched address is issued; the data is
//              taken out through the EBI, not through this block.
//   CONTVEC  - AD sets HSIZE/HPROT/HTRANS/HLOCK for later transfers
//              (layout in tr_pkg::decode_ctrl, this design's choice).
// TACK is low in IDLE, high in START (mode entered) and, in WRITEVEC and
// READVEC, high only when the AHB master accepts the transfer; while TACK is
// low the access is incomplete, the state holds and the ATE must hold AD and
// CBE. When TREQ falls, ADDRVEC returns to IDLE, and the other vector states
// first go to ADDRVEC (the original scheme shows this for WRITEVEC; for READVEC,
// CONTVEC and START it is this design's choice). The address is not
// incremented between transfers (not stated in the original scheme).
//
// test_mode (the TestRead signal and the bridge multiplexer select) is high
// in every state except IDLE; struct_test_mode is test_mode with CBE[2] = 1.
module htic_ctrl
  import tr_pkg::*;
(
  input  logic          clk,
  input  logic          rst_n,
  // external test interface
  input  logic          treq,
  input  logic [2:0]    cbe,
  input  logic [DW-1:0] ad,
  output logic          tack,
  // mode outputs
  output logic          test_mode,
  output logic          struct_test_mode,
  // command to the AHB master
  output logic          cmd_valid,
  output cmd_t          cmd,
  input  logic          cmd_ready,
  // observation
  output htic_state_e   state
);

  htic_state_e   state_q, state_d;
  logic          mode_q;
  logic [AW-1:0] addr_q;
  ahb_ctrl_t     ctrl_q;
  logic          advance;
  vec_e          vtype;

  assign vtype = vec_e'(cbe[1:0]);
  assign state = state_q;

  always_comb begin
    cmd_valid  = (state_q == S_WRITEVEC) || (state_q == S_READVEC);
    cmd.write  = (state_q == S_WRITEVEC);
    cmd.addr   = addr_q;
    cmd.wdata  = ad;
    cmd.ctrl   = ctrl_q;
  end

  always_comb begin
    unique case (state_q)
      S_IDLE:                tack = 1'b0;
      S_WRITEVEC, S_READVEC: tack = cmd_ready;
      default:               tack = 1'b1;
    endcase
  end

  assign advance = (state_q == S_IDLE) || tack;

  function automatic htic_state_e vec_state(input vec_e v);
    unique case (v)
      VEC_ADDR:  return S_ADDRVEC;
      VEC_WRITE: return S_WRITEVEC;
      VEC_READ:  return S_READVEC;
      default:   return S_CONTVEC;
    endcase
  endfunction

  always_comb begin
    state_d = state_q;
    unique case (state_q)
      S_IDLE:    if (treq) state_d = S_START;
      S_START:   if (!treq) state_d = S_IDLE;
                 else if (vtype == VEC_ADDR) state_d = S_ADDRVEC;
      S_ADDRVEC: state_d = treq ? vec_state(vtype) : S_IDLE;
      default:   state_d = treq ? vec_state(vtype) : S_ADDRVEC;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= S_IDLE;
      mode_q  <= 1'b0;
      addr_q  <= '0;
      ctrl_q  <= CTRL_RESET;
    end else if (advance) begin
      state_q <= state_d;
      if (state_q == S_IDLE && treq) mode_q <= cbe[2];
      if (state_q == S_ADDRVEC && treq) addr_q <= ad;
      if (state_q == S_CONTVEC && treq) ctrl_q <= decode_ctrl(ad);
    end
  end

  assign test_mode        = (state_q != S_IDLE);
  assign struct_test_mode = test_mode && mode_q;

endmodule
