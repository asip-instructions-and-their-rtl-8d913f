// sw_logic_fb: Switching Logic 2 / Switching Logic 3 of the packed ALU.
//
// A 1-to-2 demultiplexer behind adder 0 (Switching Logic 2) or adder 3
// (Switching Logic 3). With fb_sel low the adder's sum goes to the ALU output
// lane; with fb_sel high it is sent back up to Switching Logic 1, which feeds
// the two partial sums of a horizontal add into a second adder. The output
// that is not selected is held at zero. Purely combinational.
module sw_logic_fb #(
  parameter int unsigned W = 11
) (
  input  logic [W-1:0] sum,
  input  logic         fb_sel,
  output logic [W-1:0] out,
  output logic [W-1:0] fb
);
  always_comb begin
    out = fb_sel ? '0  : sum;
    fb  = fb_sel ? sum : '0;
  end
endmodule
