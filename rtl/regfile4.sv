// regfile4: register file of NREGS packed registers (four 32-bit registers by
// default, as the document gives for the transform's source and destination
// register files).
//
// Every lane of every register has its own write enable, so one write can
// update a whole register, a single lane (an hadd result) or one lane of every
// register (a transposed transform result). Writes take effect at the rising
// clock edge; the NRD read ports are combinational, so a value written at an
// edge is readable in the following cycle. Reset is asynchronous, active low,
// and clears all registers (a choice of this design).
module regfile4
  import asip_pkg::*;
#(
  parameter int unsigned LANE_W = 8,
  parameter int unsigned NRD    = 3,
  localparam int unsigned AW    = $clog2(NREGS)
) (
  input  logic                                        clk,
  input  logic                                        rst_n,
  input  logic [NREGS-1:0][0:LANES-1]                 we,
  input  logic [NREGS-1:0][0:LANES-1][LANE_W-1:0]     wdata,
  input  logic [NRD-1:0][AW-1:0]                      raddr,
  output logic [NRD-1:0][0:LANES-1][LANE_W-1:0]       rdata
);
  logic [NREGS-1:0][0:LANES-1][LANE_W-1:0] regs;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      regs <= '0;
    end else begin
      for (int r = 0; r < NREGS; r++)
        for (int k = 0; k < LANES; k++)
          if (we[r][k]) regs[r][k] <= wdata[r][k];
    end
  end

  always_comb
    for (int p = 0; p < NRD; p++) rdata[p] = regs[raddr[p]];
endmodule
