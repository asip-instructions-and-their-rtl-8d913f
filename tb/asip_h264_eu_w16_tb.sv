// asip_h264_eu_w16_tb: the H.264 4x4 residual transform workload on an
// execution unit built with 16-bit lanes (LANE_W = 16, 64-bit registers).
// Residuals in [-255, 255] are transformed in two dimensions with four row
// and four column fTRAN instructions, and coefficient blocks in
// [-2048, 2047] with iTRAN; the results are compared with exact integer
// arithmetic (no wrap-around occurs at this width), and each 2-D transform
// is checked to take eight cycles.
module asip_h264_eu_w16_tb;
  import asip_pkg::*;
  localparam int LW = 16;
  typedef logic [0:3][LW-1:0] word_t;

  logic   clk = 0, rst_n = 0;
  logic   instr_valid;
  instr_t instr;
  logic   host_we, host_wrf, host_rrf;
  logic [1:0] host_waddr, host_raddr;
  word_t  host_wdata, host_rdata, res_o;
  logic   res_valid_o, sat_o;
  int checks = 0, failures = 0, cycle = 0;

  asip_h264_eu #(.LANE_W(LW)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(int got, int exp, string what);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s got=%0d exp=%0d", what, got, exp);
    end
  endtask

  // exact 1-D transforms on integers
  function automatic void fwd(input int x[4], output int y[4]);
    y[0] = x[0] + x[1] + x[2] + x[3];
    y[1] = 2 * x[0] + x[1] - x[2] - 2 * x[3];
    y[2] = x[0] - x[1] - x[2] + x[3];
    y[3] = x[0] - 2 * x[1] + 2 * x[2] - x[3];
  endfunction

  function automatic void inv(input int c[4], output int y[4]);
    int e0, e1, e2, e3;
    e0 = c[0] + c[2];
    e1 = c[0] - c[2];
    e2 = (c[1] >>> 1) - c[3];
    e3 = c[1] + (c[3] >>> 1);
    y = '{e0 + e3, e1 + e2, e1 - e2, e0 - e3};
  endfunction

  task automatic run_block(int blk[4][4], bit is_inv);
    int tmp[4][4], out[4][4], v[4], w[4];
    word_t d;
    int t0;
    for (int r = 0; r < 4; r++) begin
      for (int c = 0; c < 4; c++) d[c] = LW'(blk[r][c]);
      @(negedge clk);
      host_we = 1; host_wrf = 0; host_waddr = 2'(r); host_wdata = d;
    end
    @(negedge clk);
    host_we = 0;
    for (int r = 0; r < 4; r++) begin
      v = blk[r];
      if (is_inv) inv(v, w); else fwd(v, w);
      tmp[r] = w;
    end
    for (int c = 0; c < 4; c++) begin
      for (int r = 0; r < 4; r++) v[r] = tmp[r][c];
      if (is_inv) inv(v, w); else fwd(v, w);
      for (int r = 0; r < 4; r++) out[r][c] = w[r];
    end
    t0 = cycle;
    for (int i = 0; i < 8; i++) begin
      instr = '0;
      instr.op        = is_inv ? OP_ITRAN : OP_FTRAN;
      instr.src_rf    = (i >= 4);
      instr.dst_rf    = (i < 4);
      instr.src1      = 2'(i % 4);
      instr.dst       = 2'(i % 4);
      instr.transpose = 1'b1;
      instr_valid     = 1;
      @(negedge clk);
    end
    instr_valid = 0;
    check(cycle - t0, 8, "eight instructions in eight cycles");
    for (int r = 0; r < 4; r++) begin
      host_rrf = 0; host_raddr = 2'(r);
      #1;
      for (int c = 0; c < 4; c++)
        check(int'($signed(host_rdata[c])), out[r][c], is_inv ? "2-D iTRAN" : "2-D fTRAN");
    end
  endtask

  initial begin
    int blk[4][4];
    instr_valid = 0; instr = '0;
    host_we = 0; host_wrf = 0; host_waddr = 0; host_wdata = '0; host_rrf = 0; host_raddr = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 200; t++) begin
      for (int r = 0; r < 4; r++) for (int c = 0; c < 4; c++) blk[r][c] = $urandom_range(0, 510) - 255;
      run_block(blk, 0);
      for (int r = 0; r < 4; r++) for (int c = 0; c < 4; c++) blk[r][c] = $urandom_range(0, 4095) - 2048;
      run_block(blk, 1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
