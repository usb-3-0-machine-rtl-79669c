// tb_mem_to_fx3: checks the FX3 port driver against the line-format checker.
//
// A behavioural FIFO (registered output, one pclk after adp_rd) holds the
// collector's stream: per line the start code pair, DWORDS pixel words, the
// end code pair and zero padding to an even word count, packed two words per
// 64-bit entry (first word in the low half). Each frame has ACTIVE active
// lines and BLANK blanking lines (V=1 codes, dropped). Between lines an even
// number of extra zero words is inserted, and the FIFO randomly reports empty
// to starve the port. fx3_checker verifies every transmitted word, including
// the headers and the white-balance correction with gains from the previous
// frame. This testbench also checks frame_no, blank_lines, starve_cycles,
// the number of V falls, and that adp_rd never occurs while the FIFO is empty.
//
// The header words and code framing follow the described FX3 format;
// dropping blanking lines is this design's choice.
module tb_mem_to_fx3;
  import cam_pkg::*;
  localparam int DWORDS = 24, ACTIVE = 10, BLANK = 3, NFRAMES = 4;
  localparam int PS = 4, PC = 40, LS = 2, LC = 6;
  logic pclk = 0, rst = 0;
  logic [63:0] q = '0;
  logic emp, rd, fpclk, h, v, gv;
  logic [31:0] dq, fno, blanks, starve;
  logic [15:0] kr, kg, kb;
  logic [63:0] mem [$];
  bit gap = 0;
  int checks = 0, failures = 0, vfalls = 0;
  logic v_d = 0;

  always #5 pclk = ~pclk;

  mem_to_fx3 #(.WB_PIX_START(PS), .WB_PIX_CNT(PC), .WB_LINE_START(LS), .WB_LINE_CNT(LC)) dut (
    .pclk, .rst, .wb_enable(1'b1), .fifo_q(q), .adp_emp(emp), .adp_rd(rd),
    .o_fx3_pclk(fpclk), .o_fx3_dq(dq), .o_fx3_h(h), .o_fx3_v(v), .frame_no(fno),
    .k_r(kr), .k_g(kg), .k_b(kb), .gains_valid(gv), .blank_lines(blanks), .starve_cycles(starve));

  fx3_checker #(.DWORDS(DWORDS), .ACTIVE(ACTIVE), .PIX_START(PS), .PIX_CNT(PC),
                .LINE_START(LS), .LINE_CNT(LC)) u_chk (
    .pclk, .dq, .h, .v, .k_r(kr), .k_g(kg), .k_b(kb), .gains_valid(gv));

  assign emp = (mem.size() == 0) || gap;

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  always @(posedge pclk) begin
    if (rd) begin
      chk(!emp, "read while empty");
      if (mem.size() != 0) q <= mem.pop_front();
    end
    gap <= ($urandom % 16) == 0;
    if (v_d && !v) vfalls++;
    v_d <= v;
  end

  function automatic logic [9:0] pix_val(input int r, input int c);
    int base;
    if (r % 2 == 0) base = (c % 2 == 0) ? 400 : 150;
    else            base = (c % 2 == 0) ? 250 : 420;
    return 10'(base + ((c * 7 + r * 13) % 64));
  endfunction

  logic [31:0] words [$];
  task automatic push_word(input logic [31:0] w);
    words.push_back(w);
    if (words.size() == 2) begin
      mem.push_back({words[1], words[0]});
      words.delete();
    end
  endtask

  task automatic push_line(input bit blank, input int row);
    int n;
    n = 0;
    push_word(32'h0000_03FF); push_word({6'b0, sync_word4(blank, 1'b0), 16'h0});
    for (int i = 0; i < DWORDS; i++)
      push_word(blank ? {6'b0, 10'h040, 6'b0, 10'h040}
                      : {6'b0, pix_val(row, 2 * i + 1), 6'b0, pix_val(row, 2 * i)});
    push_word(32'h0000_03FF); push_word({6'b0, sync_word4(blank, 1'b1), 16'h0});
    n = 4 + DWORDS;
    push_word('0); push_word('0); n += 2;
    if (n % 2) push_word('0);
    repeat (2 * ($urandom % 3)) push_word('0);
  endtask

  initial begin
    #1 rst = 1; #20 rst = 0;
    repeat (3) @(posedge pclk);
    // leading zero words before the first line, as after a collector restart
    repeat (4) push_word('0);
    for (int f = 0; f < NFRAMES; f++) begin
      for (int r = 0; r < ACTIVE; r++) push_line(0, r);
      for (int b = 0; b < BLANK; b++) push_line(1, 0);
      while (mem.size() > 8) @(posedge pclk);
    end
    while (mem.size() != 0) @(posedge pclk);
    repeat (400) @(posedge pclk);
    chk(u_chk.frames == NFRAMES, $sformatf("%0d frames", u_chk.frames));
    chk(u_chk.lines == NFRAMES * ACTIVE, $sformatf("%0d lines", u_chk.lines));
    chk(fno == NFRAMES, $sformatf("frame_no %0d", fno));
    chk(blanks == NFRAMES * BLANK, $sformatf("blank_lines %0d", blanks));
    chk(vfalls == NFRAMES, $sformatf("%0d V falls", vfalls));
    chk(u_chk.wb_updates == NFRAMES, $sformatf("%0d gain updates", u_chk.wb_updates));
    chk(u_chk.corrected > 0, "white balance changed pixels");
    chk(starve > 0, "port starved at least once");
    chk(!h, "H low at end");
    $display("frames=%0d lines=%0d corrected=%0d starve=%0d", u_chk.frames, u_chk.lines, u_chk.corrected, starve);
    $display("TB_RESULT checks=%0d failures=%0d", checks + u_chk.checks, failures + u_chk.failures);
    $finish;
  end

  initial begin
    #2000000;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks + u_chk.checks, failures + u_chk.failures + 1);
    $finish;
  end
endmodule
