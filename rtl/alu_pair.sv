// alu_pair: the two chained packed ALUs that execute one instruction per cycle.
//
// fTRAN and iTRAN are two consecutive ALU operations: the first ALU performs
// the first butterfly stage of the 4-point transform and hands its four lanes
// straight to the second ALU, which performs the second stage. Together they
// are the two 32-bit adders the transform needs, and an instruction finishes
// in one pass (one clock cycle in the execution unit). Packed add/subtract and
// the hadd instructions use the first ALU alone; the second then repeats a
// packed add of its input with zero, and its result is not used.
//   fTRAN: X0 = x0+x1+x2+x3, X1 = 2(x0-x3)+(x1-x2),
//          X2 = (x0+x3)-(x1+x2), X3 = (x0-x3)-2(x1-x2)
//   iTRAN: e0 = X0+X2, e1 = X0-X2, e2 = (X1>>1)-X3, e3 = X1+(X3>>1);
//          x0 = e0+e3, x1 = e1+e2, x2 = e1-e2, x3 = e0-e3
// Lane k of src holds x_k (or X_k); lane k of res holds X_k (or x_k).
// The lane order of the results is this design's choice. Purely combinational.
module alu_pair
  import asip_pkg::*;
#(
  parameter int unsigned LANE_W = 8
) (
  input  opcode_e                      op,
  input  logic [0:LANES-1]             mask1,
  input  logic [0:LANES-1]             mask2,
  input  logic [0:LANES-1][LANE_W-1:0] src_a,
  input  logic [0:LANES-1][LANE_W-1:0] src_b,
  output logic [0:LANES-1][LANE_W-1:0] res,
  output logic                         sat
);
  alu_op_e op0, op1;
  logic [0:LANES-1][LANE_W-1:0] mid, res1;
  logic                         sat1;

  always_comb begin
    op1 = ALU_PADD;
    unique case (op)
      OP_PSUB4: op0 = ALU_PSUB;
      OP_HADD:  op0 = ALU_HADD;
      OP_FTRAN: begin op0 = ALU_FT1; op1 = ALU_FT2; end
      OP_ITRAN: begin op0 = ALU_IT1; op1 = ALU_IT2; end
      default:  op0 = ALU_PADD;
    endcase
  end

  asip_alu #(.LANE_W(LANE_W)) u_alu0 (
    .op(op0), .mask1, .mask2, .src_a, .src_b, .res(mid), .sat
  );

  asip_alu #(.LANE_W(LANE_W)) u_alu1 (
    .op(op1), .mask1, .mask2, .src_a(mid), .src_b('0), .res(res1), .sat(sat1)
  );

  assign res = (op == OP_FTRAN || op == OP_ITRAN) ? res1 : mid;
endmodule
