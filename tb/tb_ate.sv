// tb_ate: behavioural model of the automatic test equipment side of the
// bridge's external test interface, for testbenches.
//
// Vectors are queued with add(type, data). enter(mode) raises TREQ with
// CBE[2] = mode (0 functional, 1 structural) and waits for START. run()
// then applies the queue: in each cycle AD carries the current vector and
// CBE[1:0] announces the type of the next one (an address first, from
// START). A vector is consumed at a clock edge where TACK was high; while
// TACK is low AD and CBE are held. After the last vector an address type is
// announced, and leave() drops TREQ in ADDRVEC to return to IDLE.
// Counters: cycles and stalls spent in run(), and ntrans[a][b], the number
// of one-clock changes from vector type a to vector type b.
module tb_ate
  import tr_pkg::*;
(
  input  logic        clk,
  output logic        treq,
  output logic [2:0]  cbe,
  output logic [31:0] ad,
  input  logic        tack
);
  typedef struct { vec_e t; logic [31:0] d; } vec_t;
  vec_t q[$];
  bit   mode;
  int   cycles = 0, stalls = 0, nvec = 0, start_waits = 0;
  int   ntrans[4][4];

  initial begin treq = 0; cbe = 0; ad = 0; end

  task automatic add(input vec_e t, input logic [31:0] d);
    q.push_back('{t: t, d: d});
  endtask

  task automatic enter(input bit m, input int hold_in_start = 0);
    bit t;
    mode = m;
    @(negedge clk); treq = 1; cbe = {m, 2'b00}; ad = '0;
    @(posedge clk);  // IDLE -> START
    // optionally stay in START with non-address types announced
    repeat (hold_in_start) begin
      @(negedge clk); cbe = {m, 2'($urandom_range(0, 2))}; ad = $urandom;
      @(posedge clk); start_waits++;
    end
  endtask

  task automatic run();
    int i = -1;  // -1: in START
    bit t;
    while (i < q.size()) begin
      @(negedge clk);
      ad  = (i >= 0) ? q[i].d : 32'h0;
      cbe = {mode, (i + 1 < q.size()) ? 2'(q[i + 1].t) : 2'(VEC_ADDR)};
      #4 t = tack;
      @(posedge clk);
      cycles++;
      if (t) begin
        if (i >= 0 && i + 1 < q.size()) ntrans[q[i].t][q[i + 1].t]++;
        if (i >= 0) nvec++;
        i++;
      end else stalls++;
    end
    q.delete();
  endtask

  // now in ADDRVEC: drop TREQ to exit
  task automatic leave();
    @(negedge clk); treq = 0; ad = 32'h0;
    @(posedge clk);
  endtask
endmodule
