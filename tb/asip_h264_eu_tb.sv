// asip_h264_eu_tb: end-to-end test of the execution unit at its default sizes
// (four registers per file, 8-bit lanes).
//   - 2-D forward 4x4 integer transform: four fTRAN row instructions from RF0
//     written transposed into RF1, then four fTRAN column instructions from RF1
//     written transposed back into RF0; compared with C*X*C^T modulo 256 and
//     timed (eight instructions, one per cycle).
//   - 2-D inverse transform the same way with iTRAN.
//   - hadd uses from the deblocking filter (p2+p1+p0, p2+2p1+2p0, 2p1+p0),
//     4x4 intra prediction (A+2B+C) and CAVLC (counting non-zero flags),
//     each result written into one lane with the other lanes left alone.
//   - a saturating hadd, packed add and subtract, host loads and reads.
// Every mechanism is counted and a mechanism never exercised is a failure.
module asip_h264_eu_tb;
  import asip_pkg::*;
  import asip_ref_pkg::*;
  localparam int LW = 8;
  typedef logic [0:3][LW-1:0] word_t;

  logic   clk = 0, rst_n = 0;
  logic   instr_valid;
  instr_t instr;
  logic   host_we, host_wrf, host_rrf;
  logic [1:0] host_waddr, host_raddr;
  word_t  host_wdata, host_rdata, res_o;
  logic   res_valid_o, sat_o;

  int checks = 0, failures = 0, cycle = 0;
  int n_ftran = 0, n_itran = 0, n_hadd_a = 0, n_hadd_b = 0, n_hadd_c = 0, n_sat = 0;
  int n_lane_wr = 0, n_transpose = 0, n_word_wr = 0, n_padd = 0, n_psub = 0, n_host_wr = 0;

  asip_h264_eu dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  initial begin
    #1000000;
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

  task automatic host_write(logic rf, logic [1:0] r, word_t d);
    @(negedge clk);
    host_we = 1; host_wrf = rf; host_waddr = r; host_wdata = d;
    @(negedge clk);
    host_we = 0;
    n_host_wr++;
  endtask


  task automatic read_reg(logic rf, logic [1:0] r, output word_t d);
    host_rrf = rf; host_raddr = r;
    #1;
    d = host_rdata;
  endtask

  function automatic instr_t mk(opcode_e op, logic srf, logic [1:0] s1, logic [1:0] s2,
                                logic drf, logic [1:0] d, logic tr = 0,
                                logic [1:0] lane = 0, logic [3:0] m1 = 4'b1111, logic [3:0] m2 = 4'b0000);
    instr_t i;
    i.op = op; i.src_rf = srf; i.src1 = s1; i.src2 = s2; i.dst_rf = drf; i.dst = d;
    i.transpose = tr; i.dst_lane = lane; i.mask1 = m1; i.mask2 = m2;
    return i;
  endfunction

  // issue one instruction in the next cycle and count what it exercises
  task automatic issue(instr_t i);
    @(negedge clk);
    instr = i; instr_valid = 1;
    case (i.op)
      OP_FTRAN: n_ftran++;
      OP_ITRAN: n_itran++;
      OP_PADD4: n_padd++;
      OP_PSUB4: n_psub++;
      OP_HADD: begin
        n_lane_wr++;
        if (i.mask1 == 4'b1111 && i.mask2 == 4'b0000) n_hadd_a++;
        else if (i.mask1 == 4'b1111) n_hadd_b++;
        else n_hadd_c++;
      end
      default: ;
    endcase
    if (i.op inside {OP_FTRAN, OP_ITRAN, OP_PADD4, OP_PSUB4}) begin
      if (i.transpose) n_transpose++; else n_word_wr++;
    end
  endtask

  task automatic idle();
    @(negedge clk);
    instr_valid = 0; instr = '0;
  endtask

  // 2-D transform of blk (rows) with fTRAN (inv=0) or iTRAN (inv=1), timed
  task automatic transform_2d(int blk[4][4], bit inv);
    int tmp[4][4], ref_out[4][4];
    word_t d;
    int t0, nvalid;
    for (int r = 0; r < 4; r++) begin
      for (int c = 0; c < 4; c++) d[c] = LW'(blk[r][c]);
      host_write(0, 2'(r), d);
    end
    // reference: rows, then columns
    for (int r = 0; r < 4; r++)
      for (int c = 0; c < 4; c++)
        tmp[r][c] = inv ? itran(blk[r][0], blk[r][1], blk[r][2], blk[r][3], c, LW)
                        : ftran(blk[r][0], blk[r][1], blk[r][2], blk[r][3], c, LW);
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++)
        ref_out[r][c] = inv ? itran(tmp[0][c], tmp[1][c], tmp[2][c], tmp[3][c], r, LW)
                            : ftran(tmp[0][c], tmp[1][c], tmp[2][c], tmp[3][c], r, LW);
    // eight back-to-back instructions
    t0 = cycle;
    nvalid = 0;
    fork
      begin
        for (int r = 0; r < 4; r++) issue(mk(inv ? OP_ITRAN : OP_FTRAN, 0, 2'(r), 0, 1, 2'(r), 1));
        for (int c = 0; c < 4; c++) issue(mk(inv ? OP_ITRAN : OP_FTRAN, 1, 2'(c), 0, 0, 2'(c), 1));
        idle();
      end
      begin
        repeat (9) begin @(posedge clk); #1; if (res_valid_o) nvalid++; end
      end
    join
    // eight results in eight consecutive cycles: one instruction per cycle
    check(nvalid, 8, inv ? "iTRAN results in 8 cycles" : "fTRAN results in 8 cycles");
    check(cycle - t0, 9, "2-D transform cycle count");
    for (int r = 0; r < 4; r++) begin
      read_reg(0, 2'(r), d);
      for (int c = 0; c < 4; c++) check(int'(d[c]), ref_out[r][c], inv ? "2-D iTRAN" : "2-D fTRAN");
    end
  endtask

  // hadd of reg with masks into lane of RF1 register 3, checking the other lanes stay
  task automatic hadd_case(word_t v, logic [3:0] m1, logic [3:0] m2, logic [1:0] lane, int exp, string what);
    word_t prev_w, post_w;
    host_write(0, 2'd2, v);
    read_reg(1, 2'd3, prev_w);
    issue(mk(OP_HADD, 0, 2'd2, 0, 1, 2'd3, 0, lane, m1, m2));
    idle();
    if (sat_o) n_sat++;
    read_reg(1, 2'd3, post_w);
    check(int'(post_w[lane]), exp, what);
    check(int'(res_o[0]), exp, {what, " (res_o)"});
    for (int k = 0; k < 4; k++) if (k != lane) check(int'(post_w[k]), int'(prev_w[k]), "other lanes kept");
  endtask

  initial begin
    int blk[4][4];
    word_t a, b, d;
    instr_valid = 0; instr = '0;
    host_we = 0; host_wrf = 0; host_waddr = 0; host_wdata = '0; host_rrf = 0; host_raddr = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    host_write(1, 2'd3, {8'h11, 8'h22, 8'h33, 8'h44});  // marker in the hadd target

    // 2-D forward transforms: a residual block of small values and random blocks
    blk = '{'{5, 11, 8, 10}, '{9, 8, 4, 12}, '{1, 10, 11, 4}, '{19, 6, 15, 7}};
    transform_2d(blk, 0);
    for (int t = 0; t < 4; t++) begin
      for (int r = 0; r < 4; r++) for (int c = 0; c < 4; c++) blk[r][c] = $urandom_range(0, 255);
      transform_2d(blk, 0);
      for (int r = 0; r < 4; r++) for (int c = 0; c < 4; c++) blk[r][c] = $urandom_range(0, 255);
      transform_2d(blk, 1);
    end

    // deblocking filter sums; p register = {p0, p1, p2, p3}
    hadd_case({8'd40, 8'd30, 8'd20, 8'd10}, 4'b1110, 4'b0000, 2'd3, 90,  "eq(1) p2+p1+p0");
    hadd_case({8'd40, 8'd30, 8'd20, 8'd10}, 4'b1111, 4'b1100, 2'd1, 170, "eq(2)-form 2p0+2p1+p2+p3");
    hadd_case({8'd40, 8'd30, 8'd20, 8'd10}, 4'b1110, 4'b1100, 2'd2, 160, "eq(2) p2+2p1+2p0");
    hadd_case({8'd40, 8'd30, 8'd20, 8'd10}, 4'b1100, 4'b0100, 2'd0, 100, "eq(4) 2p1+p0");
    // intra prediction: {A, B, C, D} -> A + 2B + C
    hadd_case({8'd50, 8'd60, 8'd70, 8'd80}, 4'b1110, 4'b0100, 2'd3, 240, "intra A+2B+C");
    // CAVLC: count of non-zero flags post_w a packed compare
    hadd_case({8'd1, 8'd0, 8'd1, 8'd1}, 4'b1111, 4'b0000, 2'd2, 3, "CAVLC count");
    // saturation
    hadd_case({8'd200, 8'd100, 8'd90, 8'd10}, 4'b1111, 4'b0000, 2'd0, 255, "hadd saturates");
    // random hadds against the reference
    for (int i = 0; i < 50; i++) begin
      logic [3:0] m1, m2;
      a = 32'($urandom);
      m1 = 4'($urandom); m2 = 4'($urandom);
      hadd_case(a, m1, m2, 2'($urandom), hadd(a[0], a[1], a[2], a[3], m1, m2), "random hadd");
    end

    // packed add / subtract, word write-back
    a = 32'($urandom); b = 32'($urandom);
    host_write(0, 2'd0, a);
    host_write(0, 2'd1, b);
    issue(mk(OP_PADD4, 0, 2'd0, 2'd1, 1, 2'd0));
    issue(mk(OP_PSUB4, 0, 2'd0, 2'd1, 1, 2'd1));
    idle();
    read_reg(1, 2'd0, d);
    for (int k = 0; k < 4; k++) check(int'(d[k]), wrap(int'(a[k]) + int'(b[k]), LW), "PADD4");
    read_reg(1, 2'd1, d);
    for (int k = 0; k < 4; k++) check(int'(d[k]), wrap(int'(a[k]) - int'(b[k]), LW), "PSUB4");
    // a 1-D fTRAN with a plain (not transposed) write
    issue(mk(OP_FTRAN, 0, 2'd0, 0, 1, 2'd2));
    idle();
    read_reg(1, 2'd2, d);
    for (int k = 0; k < 4; k++) check(int'(d[k]), ftran(a[0], a[1], a[2], a[3], k, LW), "1-D fTRAN word write");

    // every mechanism must have happened
    begin
      int counts[12];
      string names[12];
      counts = '{n_ftran, n_itran, n_hadd_a, n_hadd_b, n_hadd_c, n_sat,
                         n_lane_wr, n_transpose, n_word_wr, n_padd, n_psub, n_host_wr};
      names = '{"fTRAN", "iTRAN", "hadd(src)", "hadd(src:mask)", "hadd(src:mask1.mask2)",
                           "saturation", "lane write", "transposed write", "word write",
                           "PADD4", "PSUB4", "host write"};
      for (int i = 0; i < 12; i++) begin
        $display("mechanism %-22s %0d", names[i], counts[i]);
        checks++;
        if (counts[i] == 0) begin failures++; $display("FAIL mechanism %s never exercised", names[i]); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
