// tb_htic_ctrl: self-checking testbench of the HTIC test controller.
//
// Drives random TREQ / CBE[2:0] / AD sequences and a randomly stalling
// command-ready, and compares TACK, the mode outputs, the state and the
// issued command with a reference model of the vector protocol written here
// from the specified state transitions and TACK rules of the controller. It also measures
// that a change between any two vector types takes exactly one clock when the
// bus does not stall, and that START ignores everything but an address.
module tb_htic_ctrl;
  import tr_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic treq;
  logic [2:0] cbe;
  logic [31:0] ad;
  logic tack, test_mode, struct_test_mode, cmd_valid, cmd_ready;
  cmd_t cmd;
  htic_state_e state;

  int checks = 0, failures = 0;
  int n_trans[6][6];

  htic_ctrl dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference model
  int m_state;  // 0 IDLE 1 START 2 ADDR 3 WRITE 4 READ 5 CONT
  bit m_mode;
  logic [31:0] m_addr;
  logic [31:0] m_ctrl_raw;

  function automatic int vstate(input logic [1:0] v);
    case (v)
      2'b11: return 2;
      2'b10: return 3;
      2'b01: return 4;
      default: return 5;
    endcase
  endfunction

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t (state %0d)", what, $time, m_state);
    end
  endtask

  bit exp_tack;
  int next;

  initial begin
    treq = 0; cbe = 0; ad = 0; cmd_ready = 1;
    m_state = 0; m_mode = 0; m_addr = 0;
    m_ctrl_raw = {19'd0, 1'b0, 2'b00, 2'b10, 4'b0011, 1'b0, 3'b010};
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 12000; cyc++) begin
      @(negedge clk);
      // stimulus: mostly stay in test mode
      if (m_state == 0) treq = ($urandom_range(0, 3) != 0);
      else              treq = ($urandom_range(0, 40) != 0);
      cbe       = 3'($urandom);
      ad        = $urandom;
      cmd_ready = ($urandom_range(0, 4) != 0);
      #3;
      // expected outputs
      exp_tack = (m_state == 0) ? 1'b0 : (m_state == 3 || m_state == 4) ? cmd_ready : 1'b1;
      check(tack == exp_tack, "TACK");
      check(int'(state) == m_state, "state");
      check(test_mode == (m_state != 0), "TestRead/test_mode");
      check(struct_test_mode == (m_state != 0 && m_mode), "StructTestMode");
      check(cmd_valid == (m_state == 3 || m_state == 4), "cmd_valid");
      if (m_state == 3 || m_state == 4) begin
        check(cmd.write == (m_state == 3), "cmd.write");
        check(cmd.addr == m_addr, "cmd.addr");
        if (m_state == 3) check(cmd.wdata == ad, "cmd.wdata");
        check(cmd.ctrl.hsize == m_ctrl_raw[2:0] && cmd.ctrl.hprot == m_ctrl_raw[7:4] &&
              cmd.ctrl.htrans == htrans_e'(m_ctrl_raw[9:8]) && cmd.ctrl.hlock == m_ctrl_raw[12],
              "cmd.ctrl");
      end
      // model update at the coming edge
      next = m_state;
      case (m_state)
        0: if (treq) begin next = 1; m_mode = cbe[2]; end
        1: if (!treq) next = 0; else if (cbe[1:0] == 2'b11) next = 2;
        2: begin next = treq ? vstate(cbe[1:0]) : 0; if (treq) m_addr = ad; end
        default: if (exp_tack) begin
          next = treq ? vstate(cbe[1:0]) : 2;
          if (m_state == 5 && treq) m_ctrl_raw = ad;
        end
      endcase
      if (m_state == 2 && treq == 1'b0) next = 0;
      if (exp_tack && m_state >= 2 && next >= 2) n_trans[m_state][next]++;
      m_state = next;
    end
    // every directed edge among the four vector states was taken in one clock
    for (int a = 2; a < 6; a++)
      for (int b = 2; b < 6; b++)
        check(n_trans[a][b] > 0, "vector-state edge exercised");
    $display("READ->WRITE %0d READ->ADDR %0d READ->CONT %0d WRITE->CONT %0d",
             n_trans[4][3], n_trans[4][2], n_trans[4][5], n_trans[3][5]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
