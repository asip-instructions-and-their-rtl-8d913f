// lane_adder_tb: random add/subtract checks of one lane adder (11 bits wide)
// against integer arithmetic modulo 2^11.
module lane_adder_tb;
  localparam int W = 11;
  logic [W-1:0] a, b, y;
  logic         sub;
  int checks = 0, failures = 0;

  lane_adder #(.W(W)) dut (.a, .b, .sub, .y);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 2000; i++) begin
      int exp;
      a   = W'($urandom);
      b   = W'($urandom);
      sub = (i % 2 == 1);
      #1;
      exp = sub ? (int'(a) - int'(b)) : (int'(a) + int'(b));
      exp = exp & ((1 << W) - 1);
      checks++;
      if (int'(y) != exp) begin
        failures++;
        if (failures < 10) $display("FAIL a=%0d b=%0d sub=%0b y=%0d exp=%0d", a, b, sub, y, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
