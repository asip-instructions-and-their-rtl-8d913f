// sw_logic_fb_tb: checks the 1-to-2 demultiplexer of Switching Logic 2/3:
// the sum appears on exactly the selected output, the other output is zero.
module sw_logic_fb_tb;
  localparam int W = 11;
  logic [W-1:0] sum, out, fb;
  logic         fb_sel;
  int checks = 0, failures = 0;

  sw_logic_fb #(.W(W)) dut (.sum, .fb_sel, .out, .fb);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 500; i++) begin
      sum    = W'($urandom_range(1, (1 << W) - 1));
      fb_sel = 1'($urandom);
      #1;
      checks++;
      if (fb_sel ? (fb != sum || out != 0) : (out != sum || fb != 0)) begin
        failures++;
        if (failures < 10) $display("FAIL sel=%0b sum=%0d out=%0d fb=%0d", fb_sel, sum, out, fb);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
