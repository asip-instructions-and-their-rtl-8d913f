// asip_alu_tb: checks the packed ALU for every operation against reference
// arithmetic: packed add/subtract per lane, the three hadd forms (including
// the two mask examples hadd(src:1010) and hadd(src:0111.1001) and sums that
// saturate at 255, with the sat flag), and each transform butterfly stage.
module asip_alu_tb;
  import asip_pkg::*;
  import asip_ref_pkg::*;
  localparam int LW = 8;

  alu_op_e op;
  logic [0:3] mask1, mask2;
  logic [0:3][LW-1:0] src_a, src_b, res;
  logic sat;
  int checks = 0, failures = 0, n_sat = 0;

  asip_alu #(.LANE_W(LW)) dut (.*);

  task automatic check(int got, int exp, string what);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s op=%s got=%0d exp=%0d", what, op.name(), got, exp);
    end
  endtask

  task automatic run_hadd(logic [0:3] m1, logic [0:3] m2);
    int e, raw;
    op = ALU_HADD; mask1 = m1; mask2 = m2;
    #1;
    e = hadd(int'(src_a[0]), int'(src_a[1]), int'(src_a[2]), int'(src_a[3]), m1, m2);
    raw = 0;
    for (int k = 0; k < 4; k++) if (m1[k]) raw += (m2[k] ? 2 : 1) * int'(src_a[k]);
    for (int k = 0; k < 4; k++) check(int'(res[k]), e, "hadd");
    check(int'(sat), int'(raw > 255), "sat");
    if (sat) n_sat++;
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // the drawn examples with small pixels: no saturation
    src_a = {8'd10, 8'd20, 8'd30, 8'd40};
    src_b = '0;
    run_hadd(4'b1111, 4'b0000);  check(int'(res[3]), 100, "hadd(src)");
    run_hadd(4'b1111, 4'b1010);  check(int'(res[3]), 140, "hadd(src:1010)");
    run_hadd(4'b0111, 4'b1001);  check(int'(res[3]), 130, "hadd(src:0111.1001)");
    src_a = {8'd200, 8'd100, 8'd1, 8'd1};
    run_hadd(4'b1111, 4'b0000);  check(int'(res[0]), 255, "hadd saturates");

    for (int i = 0; i < 3000; i++) begin
      int x[4], y[4];
      src_a = 32'($urandom);
      src_b = 32'($urandom);
      if (i % 3 == 0) for (int k = 0; k < 4; k++) src_a[k] = src_a[k] >> 2;  // small pixels
      unique case (i % 7)
        0: run_hadd(4'($urandom), 4'($urandom));
        default: begin
          op = (i % 7 == 2) ? ALU_PADD : alu_op_e'(i % 7);
          mask1 = 4'($urandom); mask2 = 4'($urandom);
          #1;
          for (int k = 0; k < 4; k++) begin
            x[k] = sext(int'(src_a[k]), LW);
            y[k] = sext(int'(src_b[k]), LW);
          end
          check(int'(sat), 0, "sat idle");
          unique case (op)
            ALU_PADD: for (int k = 0; k < 4; k++) check(int'(res[k]), wrap(x[k] + y[k], LW), "padd");
            ALU_PSUB: for (int k = 0; k < 4; k++) check(int'(res[k]), wrap(x[k] - y[k], LW), "psub");
            ALU_FT1: begin
              check(int'(res[0]), wrap(x[0] + x[3], LW), "ft1");
              check(int'(res[1]), wrap(x[1] + x[2], LW), "ft1");
              check(int'(res[2]), wrap(x[1] - x[2], LW), "ft1");
              check(int'(res[3]), wrap(x[0] - x[3], LW), "ft1");
            end
            ALU_FT2: begin
              check(int'(res[0]), wrap(x[0] + x[1], LW), "ft2");
              check(int'(res[1]), wrap(2 * x[3] + x[2], LW), "ft2");
              check(int'(res[2]), wrap(x[0] - x[1], LW), "ft2");
              check(int'(res[3]), wrap(x[3] - 2 * x[2], LW), "ft2");
            end
            ALU_IT1: begin
              check(int'(res[0]), wrap(x[0] + x[2], LW), "it1");
              check(int'(res[1]), wrap(x[0] - x[2], LW), "it1");
              check(int'(res[2]), wrap((x[1] >>> 1) - x[3], LW), "it1");
              check(int'(res[3]), wrap(x[1] + (x[3] >>> 1), LW), "it1");
            end
            ALU_IT2: begin
              check(int'(res[0]), wrap(x[0] + x[3], LW), "it2");
              check(int'(res[1]), wrap(x[1] + x[2], LW), "it2");
              check(int'(res[2]), wrap(x[1] - x[2], LW), "it2");
              check(int'(res[3]), wrap(x[0] - x[3], LW), "it2");
            end
            default: ;
          endcase
        end
      endcase
    end
    checks++;
    if (n_sat == 0) begin failures++; $display("FAIL saturation never exercised"); end
    $display("saturated hadd results: %0d", n_sat);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
