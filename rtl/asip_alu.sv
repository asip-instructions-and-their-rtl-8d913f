// asip_alu: packed four-lane ALU with the horizontal-add (hadd) instructions
// and one butterfly stage of the 4x4 integer transform of H.264/AVC.
//
// Structure (after the ALU drawing of the document): Switching Logic 1 feeds
// four lane adders; the sums of adders 0 and 3 pass through Switching Logic 2
// and 3, 1-to-2 demultiplexers that either put them on the output or feed them
// back to Switching Logic 1. All the instructions run through the same four
// adders:
//   ALU_PADD / ALU_PSUB  lane-wise add / subtract of src_a and src_b (wraps);
//   ALU_HADD             res = sat8( sum over k of mask1[k] * (mask2[k] ? 2 : 1) * a_k ),
//                        covering hadd(src) (mask1=1111, mask2=0000),
//                        hadd(src:mask) (mask1=1111) and hadd(src:mask1.mask2).
//                        Adders 0 and 3 form the pair sums, adder 1 adds them.
//                        The saturated 8-bit result is returned in every lane;
//                        the write-back picks the lane it lands in.
//   ALU_FT1/FT2, ALU_IT1/IT2  first/second stage of the 1-D forward/inverse
//                        transform; results wrap modulo 2^LANE_W per lane.
// The hadd lanes are unsigned; transform and packed-add lanes are two's
// complement. sat is high when an hadd sum exceeded the 8-bit range.
// The saturation width (8 bits, as the document gives it) and the three guard
// bits of the adders are this design's reading; purely combinational.
module asip_alu
  import asip_pkg::*;
#(
  parameter int unsigned LANE_W = 8,
  parameter int unsigned SAT_W  = 8
) (
  input  alu_op_e                      op,
  input  logic [0:LANES-1]             mask1,
  input  logic [0:LANES-1]             mask2,
  input  logic [0:LANES-1][LANE_W-1:0] src_a,
  input  logic [0:LANES-1][LANE_W-1:0] src_b,
  output logic [0:LANES-1][LANE_W-1:0] res,
  output logic                         sat
);
  localparam int unsigned ADD_W = LANE_W + 3;
  localparam logic [ADD_W-1:0] SAT_MAX = ADD_W'((1 << SAT_W) - 1);

  logic [ADD_W-1:0] a0, b0, a1, b1, a2, b2, a3, b3;
  logic             sub0, sub1, sub2, sub3;
  logic [ADD_W-1:0] y0, y1, y2, y3;
  logic [ADD_W-1:0] out0, out3, fb0, fb3;
  logic             fb_sel;

  assign fb_sel = (op == ALU_HADD);

  sw_logic1 #(.LANE_W(LANE_W), .ADD_W(ADD_W)) u_sw1 (
    .op, .mask1, .mask2, .src_a, .src_b, .fb0, .fb3,
    .a0, .b0, .a1, .b1, .a2, .b2, .a3, .b3, .sub0, .sub1, .sub2, .sub3
  );

  lane_adder #(.W(ADD_W)) u_add0 (.a(a0), .b(b0), .sub(sub0), .y(y0));
  lane_adder #(.W(ADD_W)) u_add1 (.a(a1), .b(b1), .sub(sub1), .y(y1));
  lane_adder #(.W(ADD_W)) u_add2 (.a(a2), .b(b2), .sub(sub2), .y(y2));
  lane_adder #(.W(ADD_W)) u_add3 (.a(a3), .b(b3), .sub(sub3), .y(y3));

  sw_logic_fb #(.W(ADD_W)) u_sw2 (.sum(y0), .fb_sel, .out(out0), .fb(fb0));
  sw_logic_fb #(.W(ADD_W)) u_sw3 (.sum(y3), .fb_sel, .out(out3), .fb(fb3));

  logic [LANE_W-1:0] hsat;

  always_comb begin
    sat  = (y1 > SAT_MAX);
    hsat = LANE_W'(sat ? SAT_MAX : y1);
    if (fb_sel) begin
      for (int k = 0; k < LANES; k++) res[k] = hsat;
    end else begin
      sat    = 1'b0;
      res[0] = out0[LANE_W-1:0];
      res[1] = y1[LANE_W-1:0];
      res[2] = y2[LANE_W-1:0];
      res[3] = out3[LANE_W-1:0];
    end
  end
endmodule
