// asip_pkg: types and constants shared by the H.264/AVC ASIP execution unit.
//
// A 32-bit register holds four packed lanes. Lane 0 is the most significant
// byte (a0 in the hadd drawings, p0 of the "p" register in the deblocking
// example), lane 3 the least significant. Packed arrays are declared [0:3] so
// that index 0 is the leftmost (most significant) element; the 4-bit masks of
// the hadd instructions use the same order, mask[0] belonging to lane 0.
//
// The opcodes, the instruction fields and their encodings are this design's
// own: the host processor's instruction format is not part of the design.
package asip_pkg;

  localparam int unsigned LANES = 4;   // packed data per register
  localparam int unsigned NREGS = 4;   // registers per register file

  // Operation of one ALU pass (one trip through the four lane adders).
  typedef enum logic [2:0] {
    ALU_PADD = 3'd0,  // lane-wise a + b (existing packed add)
    ALU_PSUB = 3'd1,  // lane-wise a - b (existing packed subtract)
    ALU_HADD = 3'd2,  // horizontal add of the lanes of a, masked/shifted
    ALU_FT1  = 3'd3,  // forward transform, first butterfly stage
    ALU_FT2  = 3'd4,  // forward transform, second butterfly stage
    ALU_IT1  = 3'd5,  // inverse transform, first butterfly stage
    ALU_IT2  = 3'd6   // inverse transform, second butterfly stage
  } alu_op_e;

  // Instructions executed by the execution unit.
  typedef enum logic [2:0] {
    OP_NOP   = 3'd0,
    OP_PADD4 = 3'd1,  // dst = src1 + src2, per lane
    OP_PSUB4 = 3'd2,  // dst = src1 - src2, per lane
    OP_HADD  = 3'd3,  // dst.lane = hadd(src1 : mask1.mask2)
    OP_FTRAN = 3'd4,  // dst = fTRAN(src1), 1-D forward 4-point transform
    OP_ITRAN = 3'd5   // dst = iTRAN(src1), 1-D inverse 4-point transform
  } opcode_e;

  // Decoded instruction. hadd(src) is mask1 = 4'b1111, mask2 = 4'b0000;
  // hadd(src:mask) is mask1 = 4'b1111, mask2 = mask.
  typedef struct packed {
    opcode_e    op;
    logic       src_rf;     // register file the sources are read from
    logic [1:0] src1;
    logic [1:0] src2;
    logic       dst_rf;     // register file the result is written to
    logic [1:0] dst;        // destination register; lane index if transpose
    logic [1:0] dst_lane;   // lane that receives an hadd result
    logic       transpose;  // word results: write lane k into lane dst of register k
    logic [0:3] mask1;      // hadd: lanes taking part in the sum
    logic [0:3] mask2;      // hadd: lanes doubled (shifted left one bit)
  } instr_t;

endpackage
