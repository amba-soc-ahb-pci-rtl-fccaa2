// ahb_interconnect: AHB address decoder and slave-to-master multiplexer.
//
// The decoder compares HADDR[31:24] with one base byte per slave and raises
// that slave's HSEL in the address phase. The selection is registered when
// HREADY is high, and in the data phase the selected slave's HRDATA, HREADY
// and HRESP are returned to the master and to every slave as the shared bus
// response. An address that matches no slave goes to a built-in default
// slave that answers OKAY with zero wait and read data zero. The original scheme only
// names the decoder; the 16 MB-granule map (tr_pkg) is this design's own.
module ahb_interconnect
  import tr_pkg::*;
#(
  parameter int unsigned         NS    = 5,
  parameter logic [NS*8-1:0]     BASES = {8'h80, 8'h42, 8'h41, 8'h40, 8'h00}
) (
  input  logic              clk,
  input  logic              rst_n,
  input  ahb_m2s_t          m2s,
  output logic [NS-1:0]     hsel,
  input  ahb_s2m_t [NS-1:0] slv_s2m,
  output ahb_s2m_t          bus_s2m
);
  logic [NS-1:0] hsel_dp_q;

  always_comb begin
    for (int i = 0; i < NS; i++)
      hsel[i] = (m2s.haddr[31:24] == BASES[i*8 +: 8]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                hsel_dp_q <= '0;
    else if (bus_s2m.hready)   hsel_dp_q <= hsel;
  end

  always_comb begin
    bus_s2m = '{hrdata: '0, hready: 1'b1, hresp: HR_OKAY};
    for (int i = 0; i < NS; i++)
      if (hsel_dp_q[i]) bus_s2m = slv_s2m[i];
  end

endmodule
