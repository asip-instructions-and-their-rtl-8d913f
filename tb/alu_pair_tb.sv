// alu_pair_tb: checks the chained ALU pair. fTRAN and iTRAN of random lanes are
// compared with the matrix form of the forward transform and the H.264 inverse
// transform, both for the 8-bit lanes (results modulo 256) and for a 16-bit
// lane instance, where residuals in [-255, 255] give exact coefficients.
// hadd and packed add/subtract through the pair are checked too.
module alu_pair_tb;
  import asip_pkg::*;
  import asip_ref_pkg::*;

  opcode_e op;
  logic [0:3] mask1, mask2;
  logic [0:3][7:0]  a8, b8, r8;
  logic [0:3][15:0] a16, b16, r16;
  logic sat8, sat16;
  int checks = 0, failures = 0;

  alu_pair #(.LANE_W(8))  dut8  (.op, .mask1, .mask2, .src_a(a8),  .src_b(b8),  .res(r8),  .sat(sat8));
  alu_pair #(.LANE_W(16)) dut16 (.op, .mask1, .mask2, .src_a(a16), .src_b(b16), .res(r16), .sat(sat16));

  task automatic check(int got, int exp, string what);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s op=%s got=%0d exp=%0d", what, op.name(), got, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 2000; i++) begin
      int x[4];
      for (int k = 0; k < 4; k++) begin
        a8[k]  = 8'($urandom);
        b8[k]  = 8'($urandom);
        x[k]   = $urandom_range(0, 510) - 255;
        a16[k] = 16'(x[k]);
        b16[k] = 16'($urandom);
      end
      mask1 = 4'($urandom); mask2 = 4'($urandom);
      unique case (i % 5)
        0: op = OP_FTRAN;
        1: op = OP_ITRAN;
        2: op = OP_HADD;
        3: op = OP_PADD4;
        default: op = OP_PSUB4;
      endcase
      #1;
      for (int k = 0; k < 4; k++) begin
        unique case (op)
          OP_FTRAN: begin
            check(int'(r8[k]),  ftran(a8[0], a8[1], a8[2], a8[3], k, 8), "ftran8");
            check(int'(r16[k]), ftran(a16[0], a16[1], a16[2], a16[3], k, 16), "ftran16");
          end
          OP_ITRAN: begin
            check(int'(r8[k]),  itran(a8[0], a8[1], a8[2], a8[3], k, 8), "itran8");
            check(int'(r16[k]), itran(a16[0], a16[1], a16[2], a16[3], k, 16), "itran16");
          end
          OP_HADD:  check(int'(r8[k]), hadd(a8[0], a8[1], a8[2], a8[3], mask1, mask2), "hadd8");
          OP_PADD4: check(int'(r8[k]), wrap(int'(a8[k]) + int'(b8[k]), 8), "padd8");
          default:  check(int'(r8[k]), wrap(int'(a8[k]) - int'(b8[k]), 8), "psub8");
        endcase
      end
    end
    // a worked row: x = (5, -3, 7, 1) -> X = (10, -2, 2, 24)
    op = OP_FTRAN;
    a16 = {16'd5, -16'sd3, 16'd7, 16'd1};
    #1;
    check(int'($signed(r16[0])), 10, "row X0");
    check(int'($signed(r16[1])), -2, "row X1");
    check(int'($signed(r16[2])), 2, "row X2");
    check(int'($signed(r16[3])), 24, "row X3");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
