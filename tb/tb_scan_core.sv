// tb_scan_core: behavioural scan-testable core for testbenches.
//
// NC scan chains of L flip-flops each, clocked when clk_en is high. With
// scan_en high each chain shifts toward its output (scan_out[c] is the last
// flip-flop) and takes scan_in[c] at its first flip-flop. With scan_en low a
// capture loads every chain with (chain rotated by one) xor pi[c mod PI_W].
// Primary output bit b is the xor of chain b mod NC and pi[b mod PI_W].
module tb_scan_core #(
  parameter int NC = 32,
  parameter int L = 4,
  parameter int PI_W = 32,
  parameter int PO_W = 32
) (
  input  logic            clk,
  input  logic            clk_en,
  input  logic            scan_en,
  input  logic [NC-1:0]   scan_in,
  output logic [NC-1:0]   scan_out,
  input  logic [PI_W-1:0] pi,
  output logic [PO_W-1:0] po
);
  logic [L-1:0] ch [NC];
  initial for (int c = 0; c < NC; c++) ch[c] = '0;
  always_ff @(posedge clk)
    if (clk_en)
      for (int c = 0; c < NC; c++)
        if (scan_en) ch[c] <= {ch[c][L-2:0], scan_in[c]};
        else         ch[c] <= {ch[c][L-2:0], ch[c][L-1]} ^ {L{pi[c % PI_W]}};
  always_comb begin
    for (int c = 0; c < NC; c++) scan_out[c] = ch[c][L-1];
    for (int b = 0; b < PO_W; b++) po[b] = (^ch[b % NC]) ^ pi[b % PI_W];
  end
endmodule
