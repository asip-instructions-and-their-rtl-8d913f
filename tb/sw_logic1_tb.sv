// sw_logic1_tb: drives Switching Logic 1 with random lanes for every ALU
// operation and checks what each lane adder would compute from the routed
// operands (a + b or a - b, modulo 2^11) against the operation's definition.
module sw_logic1_tb;
  import asip_pkg::*;
  import asip_ref_pkg::*;
  localparam int LW = 8, AW = 11;

  alu_op_e op;
  logic [0:3] mask1, mask2;
  logic [0:3][LW-1:0] src_a, src_b;
  logic [AW-1:0] fb0, fb3;
  logic [AW-1:0] a0, b0, a1, b1, a2, b2, a3, b3;
  logic sub0, sub1, sub2, sub3;
  int checks = 0, failures = 0;

  sw_logic1 #(.LANE_W(LW), .ADD_W(AW)) dut (.*);

  function automatic int add(logic [AW-1:0] a, logic [AW-1:0] b, logic s);
    return wrap(s ? int'(a) - int'(b) : int'(a) + int'(b), AW);
  endfunction

  function automatic int hm(int v, logic m1, logic m2);
    return m1 ? (m2 ? 2 * v : v) : 0;
  endfunction

  task automatic check(int got, int exp, string what);
    checks++;
    if (got != wrap(exp, AW)) begin
      failures++;
      if (failures < 10) $display("FAIL %s op=%s got=%0d exp=%0d", what, op.name(), got, wrap(exp, AW));
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
    for (int i = 0; i < 700; i++) begin
      int x[4], u[4], y[4];
      op    = alu_op_e'(i % 7);
      src_a = 32'($urandom);
      src_b = 32'($urandom);
      mask1 = 4'($urandom);
      mask2 = 4'($urandom);
      fb0   = AW'($urandom);
      fb3   = AW'($urandom);
      #1;
      for (int k = 0; k < 4; k++) begin
        x[k] = sext(int'(src_a[k]), LW);
        y[k] = sext(int'(src_b[k]), LW);
        u[k] = int'(src_a[k]);
      end
      unique case (op)
        ALU_PADD, ALU_PSUB: begin
          int s;
          s = (op == ALU_PSUB) ? -1 : 1;
          check(add(a0, b0, sub0), x[0] + s * y[0], "add0");
          check(add(a1, b1, sub1), x[1] + s * y[1], "add1");
          check(add(a2, b2, sub2), x[2] + s * y[2], "add2");
          check(add(a3, b3, sub3), x[3] + s * y[3], "add3");
        end
        ALU_HADD: begin
          check(add(a0, b0, sub0), hm(u[0], mask1[0], mask2[0]) + hm(u[1], mask1[1], mask2[1]), "add0");
          check(add(a3, b3, sub3), hm(u[2], mask1[2], mask2[2]) + hm(u[3], mask1[3], mask2[3]), "add3");
          check(add(a1, b1, sub1), int'(fb0) + int'(fb3), "add1");
          check(add(a2, b2, sub2), 0, "add2");
        end
        ALU_FT1: begin
          check(add(a0, b0, sub0), x[0] + x[3], "add0");
          check(add(a1, b1, sub1), x[1] + x[2], "add1");
          check(add(a2, b2, sub2), x[1] - x[2], "add2");
          check(add(a3, b3, sub3), x[0] - x[3], "add3");
        end
        ALU_FT2: begin
          check(add(a0, b0, sub0), x[0] + x[1], "add0");
          check(add(a1, b1, sub1), 2 * x[3] + x[2], "add1");
          check(add(a2, b2, sub2), x[0] - x[1], "add2");
          check(add(a3, b3, sub3), x[3] - 2 * x[2], "add3");
        end
        ALU_IT1: begin
          check(add(a0, b0, sub0), x[0] + x[2], "add0");
          check(add(a1, b1, sub1), x[0] - x[2], "add1");
          check(add(a2, b2, sub2), (x[1] >>> 1) - x[3], "add2");
          check(add(a3, b3, sub3), x[1] + (x[3] >>> 1), "add3");
        end
        ALU_IT2: begin
          check(add(a0, b0, sub0), x[0] + x[3], "add0");
          check(add(a1, b1, sub1), x[1] + x[2], "add1");
          check(add(a2, b2, sub2), x[1] - x[2], "add2");
          check(add(a3, b3, sub3), x[0] - x[3], "add3");
        end
        default: ;
      endcase
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
