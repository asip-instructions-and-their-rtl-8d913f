// asip_h264_eu: execution unit for the H.264/AVC ASIP instructions.
//
// Two register files of four packed registers (RF0 and RF1) surround the
// chained ALU pair. Each cycle one decoded instruction may be issued: its
// sources are read from register file instr.src_rf, executed by alu_pair in
// the same cycle, and written at the next rising clock edge into register file
// instr.dst_rf. fTRAN/iTRAN therefore take one cycle, as do hadd and the
// packed add/subtract.
//
// Write-back modes:
//   word       (PADD4, PSUB4, FTRAN, ITRAN, transpose = 0) dst <= result;
//   lane       (HADD) only lane dst_lane of register dst is written with the
//              saturated 8-bit sum; the other lanes keep their value;
//   transposed (word ops with transpose = 1) lane k of the result goes to lane
//              dst of register k. A row transform read from one register file
//              and written transposed into the other leaves the columns ready
//              for the column pass, so a 2-D 4x4 transform is four row
//              instructions and four column instructions.
// The document gives the two four-register files, the one-cycle fTRAN/iTRAN
// and the hadd results landing in one lane; the instruction fields, the
// transposed write and the host port are this design's own.
//
// The host processor, which is not part of this design, loads and reads the
// register files through the host port: host_we writes a whole register at the
// next edge, host_rdata reads one combinationally. A host write and an
// instruction must not write the same register file in the same cycle
// (asserted). res_o/sat_o hold the result of the last issued instruction,
// valid one cycle after issue, with res_valid_o.
module asip_h264_eu
  import asip_pkg::*;
#(
  parameter int unsigned LANE_W = 8
) (
  input  logic                         clk,
  input  logic                         rst_n,
  // instruction issue
  input  logic                         instr_valid,
  input  instr_t                       instr,
  // host access to the register files
  input  logic                         host_we,
  input  logic                         host_wrf,
  input  logic [1:0]                   host_waddr,
  input  logic [0:LANES-1][LANE_W-1:0] host_wdata,
  input  logic                         host_rrf,
  input  logic [1:0]                   host_raddr,
  output logic [0:LANES-1][LANE_W-1:0] host_rdata,
  // last result
  output logic                         res_valid_o,
  output logic [0:LANES-1][LANE_W-1:0] res_o,
  output logic                         sat_o
);
  typedef logic [0:LANES-1][LANE_W-1:0] word_t;

  word_t [1:0][2:0]            rdata;     // [rf][port]
  logic  [1:0][2:0][1:0]       raddr;
  logic  [1:0][NREGS-1:0][0:LANES-1] we;
  word_t [1:0][NREGS-1:0]      wdata;

  word_t src_a, src_b, res;
  logic  sat;
  logic  issue;

  assign issue = instr_valid && (instr.op != OP_NOP);

  for (genvar f = 0; f < 2; f++) begin : g_rf
    assign raddr[f][0] = instr.src1;
    assign raddr[f][1] = instr.src2;
    assign raddr[f][2] = host_raddr;
    regfile4 #(.LANE_W(LANE_W), .NRD(3)) u_rf (
      .clk, .rst_n, .we(we[f]), .wdata(wdata[f]), .raddr(raddr[f]), .rdata(rdata[f])
    );
  end

  assign src_a      = rdata[instr.src_rf][0];
  assign src_b      = rdata[instr.src_rf][1];
  assign host_rdata = rdata[host_rrf][2];

  alu_pair #(.LANE_W(LANE_W)) u_alu (
    .op(instr.op), .mask1(instr.mask1), .mask2(instr.mask2),
    .src_a, .src_b, .res, .sat
  );

  // Write-back: lane enables and data per register file
  always_comb begin
    we    = '0;
    wdata = '0;
    if (issue) begin
      if (instr.op == OP_HADD) begin
        we[instr.dst_rf][instr.dst][instr.dst_lane] = 1'b1;
        wdata[instr.dst_rf][instr.dst]              = res;
      end else if (instr.transpose) begin
        for (int r = 0; r < NREGS; r++) begin
          we[instr.dst_rf][r][instr.dst] = 1'b1;
          for (int k = 0; k < LANES; k++) wdata[instr.dst_rf][r][k] = res[r];
        end
      end else begin
        we[instr.dst_rf][instr.dst] = '1;
        wdata[instr.dst_rf][instr.dst] = res;
      end
    end
    if (host_we) begin
      we[host_wrf][host_waddr]    = '1;
      wdata[host_wrf][host_waddr] = host_wdata;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      res_valid_o <= 1'b0;
      res_o       <= '0;
      sat_o       <= 1'b0;
    end else begin
      res_valid_o <= issue;
      if (issue) begin
        res_o <= res;
        sat_o <= sat;
      end
    end
  end

  // The host and an instruction never write the same register file together.
  a_no_wr_clash: assert property (@(posedge clk) disable iff (!rst_n)
      !(host_we && issue && host_wrf == instr.dst_rf))
    else $error("host write and instruction write to the same register file");

  // Only defined opcodes are issued.
  a_legal_op: assert property (@(posedge clk) disable iff (!rst_n)
      instr_valid |-> instr.op inside {OP_NOP, OP_PADD4, OP_PSUB4, OP_HADD, OP_FTRAN, OP_ITRAN})
    else $error("undefined opcode issued");
endmodule
