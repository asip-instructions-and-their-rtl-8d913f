// sw_logic1: Switching Logic 1 of the packed ALU.
//
// Sits in front of the four lane adders and decides, for the operation in
// progress, which value goes to each adder input and whether the adder adds or
// subtracts:
//   ALU_PADD/PSUB  adder k gets lane k of src_a and lane k of src_b;
//   ALU_HADD       adder 0 gets lanes 0 and 1, adder 3 lanes 2 and 3 of src_a,
//                  each zeroed if its mask1 bit is 0 and doubled if its mask2
//                  bit is 1; adder 1 gets the two partial sums fed back through
//                  Switching Logic 2 and 3 (fb0, fb3); adder 2 is idle;
//   ALU_FT1/FT2/IT1/IT2  the butterfly stage of the 4-point forward or inverse
//                  integer transform, with the multiply-by-2 and divide-by-2 of
//                  the flow graph done as one-bit shifts selected here.
// Lanes are widened to the adder width: zero-extended for hadd (pixels are
// unsigned), sign-extended for every other operation. The divide-by-2 of the
// inverse transform is an arithmetic right shift, as in H.264.
// Each adder's operands come from a block of their own, so the feedback path
// adder 0/3 -> Switching Logic 2/3 -> adder 1 is not a combinational loop.
// The document says only that Switching Logic 1-3 consist of eight 2x1
// multiplexers and two 1x2 demultiplexers; the routing table above is this
// design's reading of the hadd drawings and the transform flow graphs.
// Purely combinational.
module sw_logic1
  import asip_pkg::*;
#(
  parameter int unsigned LANE_W = 8,
  parameter int unsigned ADD_W  = LANE_W + 3
) (
  input  alu_op_e                          op,
  input  logic [0:LANES-1]                 mask1,
  input  logic [0:LANES-1]                 mask2,
  input  logic [0:LANES-1][LANE_W-1:0]     src_a,
  input  logic [0:LANES-1][LANE_W-1:0]     src_b,
  input  logic [ADD_W-1:0]                 fb0,   // from Switching Logic 2
  input  logic [ADD_W-1:0]                 fb3,   // from Switching Logic 3
  output logic [ADD_W-1:0]                 a0, b0, a1, b1, a2, b2, a3, b3,
  output logic                             sub0, sub1, sub2, sub3
);

  // Sign-extended lanes of src_a / src_b, and their doubled and halved forms.
  logic [0:LANES-1][ADD_W-1:0] xa, xb, xa2, xah;
  // hadd operands: zero-extended, masked by mask1, doubled by mask2.
  logic [0:LANES-1][ADD_W-1:0] hm;

  always_comb begin
    for (int k = 0; k < LANES; k++) begin
      xa[k]  = ADD_W'($signed(src_a[k]));
      xb[k]  = ADD_W'($signed(src_b[k]));
      xa2[k] = xa[k] << 1;
      xah[k] = ADD_W'($signed(src_a[k]) >>> 1);
      if (!mask1[k])     hm[k] = '0;
      else if (mask2[k]) hm[k] = ADD_W'(src_a[k]) << 1;
      else               hm[k] = ADD_W'(src_a[k]);
    end
  end

  // Adder 0
  always_comb begin
    unique case (op)
      ALU_HADD: begin a0 = hm[0]; b0 = hm[1]; sub0 = 1'b0; end  // a0 + a1
      ALU_FT1:  begin a0 = xa[0]; b0 = xa[3]; sub0 = 1'b0; end  // x0 + x3
      ALU_FT2:  begin a0 = xa[0]; b0 = xa[1]; sub0 = 1'b0; end  // s0 + s1
      ALU_IT1:  begin a0 = xa[0]; b0 = xa[2]; sub0 = 1'b0; end  // X0 + X2
      ALU_IT2:  begin a0 = xa[0]; b0 = xa[3]; sub0 = 1'b0; end  // e0 + e3
      ALU_PSUB: begin a0 = xa[0]; b0 = xb[0]; sub0 = 1'b1; end
      default:  begin a0 = xa[0]; b0 = xb[0]; sub0 = 1'b0; end
    endcase
  end

  // Adder 1: takes the fed-back partial sums for hadd
  always_comb begin
    unique case (op)
      ALU_HADD: begin a1 = fb0;    b1 = fb3;    sub1 = 1'b0; end  // (a0+a1)+(a2+a3)
      ALU_FT1:  begin a1 = xa[1];  b1 = xa[2];  sub1 = 1'b0; end  // x1 + x2
      ALU_FT2:  begin a1 = xa2[3]; b1 = xa[2];  sub1 = 1'b0; end  // 2*s3 + s2
      ALU_IT1:  begin a1 = xa[0];  b1 = xa[2];  sub1 = 1'b1; end  // X0 - X2
      ALU_IT2:  begin a1 = xa[1];  b1 = xa[2];  sub1 = 1'b0; end  // e1 + e2
      ALU_PSUB: begin a1 = xa[1];  b1 = xb[1];  sub1 = 1'b1; end
      default:  begin a1 = xa[1];  b1 = xb[1];  sub1 = 1'b0; end
    endcase
  end

  // Adder 2: idle during hadd
  always_comb begin
    unique case (op)
      ALU_HADD: begin a2 = '0;     b2 = '0;     sub2 = 1'b0; end
      ALU_FT1:  begin a2 = xa[1];  b2 = xa[2];  sub2 = 1'b1; end  // x1 - x2
      ALU_FT2:  begin a2 = xa[0];  b2 = xa[1];  sub2 = 1'b1; end  // s0 - s1
      ALU_IT1:  begin a2 = xah[1]; b2 = xa[3];  sub2 = 1'b1; end  // X1/2 - X3
      ALU_IT2:  begin a2 = xa[1];  b2 = xa[2];  sub2 = 1'b1; end  // e1 - e2
      ALU_PSUB: begin a2 = xa[2];  b2 = xb[2];  sub2 = 1'b1; end
      default:  begin a2 = xa[2];  b2 = xb[2];  sub2 = 1'b0; end
    endcase
  end

  // Adder 3
  always_comb begin
    unique case (op)
      ALU_HADD: begin a3 = hm[2];  b3 = hm[3];  sub3 = 1'b0; end  // a2 + a3
      ALU_FT1:  begin a3 = xa[0];  b3 = xa[3];  sub3 = 1'b1; end  // x0 - x3
      ALU_FT2:  begin a3 = xa[3];  b3 = xa2[2]; sub3 = 1'b1; end  // s3 - 2*s2
      ALU_IT1:  begin a3 = xa[1];  b3 = xah[3]; sub3 = 1'b0; end  // X1 + X3/2
      ALU_IT2:  begin a3 = xa[0];  b3 = xa[3];  sub3 = 1'b1; end  // e0 - e3
      ALU_PSUB: begin a3 = xa[3];  b3 = xb[3];  sub3 = 1'b1; end
      default:  begin a3 = xa[3];  b3 = xb[3];  sub3 = 1'b0; end
    endcase
  end

endmodule
