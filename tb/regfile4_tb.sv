// regfile4_tb: random per-lane writes into the four-register file, compared
// each cycle with a software copy through all three read ports; also checks
// that reset clears the registers and that a write is visible the next cycle.
module regfile4_tb;
  import asip_pkg::*;
  localparam int LW = 8;

  logic clk = 0, rst_n = 0;
  logic [3:0][0:3]        we;
  logic [3:0][0:3][LW-1:0] wdata;
  logic [2:0][1:0]        raddr;
  logic [2:0][0:3][LW-1:0] rdata;
  logic [3:0][0:3][LW-1:0] model;
  int checks = 0, failures = 0, cycles = 0;

  regfile4 #(.LANE_W(LW), .NRD(3)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = '0; wdata = '0; raddr = '0; model = '0;
    repeat (2) @(posedge clk);
    #1;
    for (int p = 0; p < 3; p++) begin
      raddr[p] = 2'(p + 1);
      #1;
      checks++;
      if (rdata[p] != '0) begin failures++; $display("FAIL reset value"); end
    end
    rst_n = 1;
    for (int i = 0; i < 1000; i++) begin
      @(negedge clk);
      we    = 16'($urandom);
      wdata = 128'({$urandom, $urandom, $urandom, $urandom});
      for (int p = 0; p < 3; p++) raddr[p] = 2'($urandom);
      #1;
      for (int p = 0; p < 3; p++) begin
        checks++;
        if (rdata[p] != model[raddr[p]]) begin
          failures++;
          if (failures < 10) $display("FAIL port %0d reg %0d got %h exp %h", p, raddr[p], rdata[p], model[raddr[p]]);
        end
      end
      @(posedge clk);
      for (int r = 0; r < 4; r++)
        for (int k = 0; k < 4; k++)
          if (we[r][k]) model[r][k] = wdata[r][k];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
