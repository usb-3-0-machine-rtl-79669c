// tb_lvds_comp: checks sync-code detection, sync, line framing and slip requests.
//
// Two lanes receive identical word streams: 10 idle words, SAV, 8 pixel
// words, EAV, repeated, alternating active (V=0) and blanking (V=1) lines.
// Checked: no slip request while codes arrive, sync after the first SAV/EAV
// pair, line_start high for exactly the 16 words from SAV to EAV of every line
// after sync, with those words on imx_out0x/imx_out1x in order, line_v equal
// to the line's V bit; then with codes removed, a slip request every
// SLIP_TIMEOUT words and sync lost.
//
// Sync codes and the SAV-then-EAV rule follow the described detector; the
// bit-slip search and the four-word delay are this design's choices.
module tb_lvds_comp;
  import cam_pkg::*;
  localparam int TO = 32;
  logic clk = 0, rst = 0;
  logic [9:0] in0 = '0, in1 = '0;
  logic [1:0] align, sync;
  logic       ls, lv, slip;
  logic [9:0] o0, o1;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  lvds_comp #(.SLIP_TIMEOUT(TO)) dut (
    .rx_outclk(clk), .rst, .imx_out0(in0), .imx_out1(in1), .rx_channel_data_align(align),
    .sync, .line_start(ls), .line_v(lv), .imx_out0x(o0), .imx_out1x(o1), .slip_event(slip));

  // expected framed words, pushed when the line is sent (after sync)
  logic [9:0] exp_q [$];
  logic       exp_v [$];
  bit         codes_on = 1;
  int         slips = 0, framed = 0, lines_sent = 0;

  task automatic send(input logic [9:0] w, input bit framed_word);
    @(negedge clk);
    in0 = w; in1 = w;
    if (framed_word) exp_q.push_back(w);
  endtask

  task automatic line(input int idx, input bit v, input bit expect_framed);
    for (int k = 0; k < 10; k++) send(10'h000, 0);
    if (expect_framed) exp_v.push_back(v);
    send(10'h3FF, expect_framed); send(10'h000, expect_framed); send(10'h000, expect_framed);
    send(sync_word4(v, 1'b0), expect_framed);
    for (int k = 0; k < 8; k++) send(10'(16 + idx * 8 + k), expect_framed);
    send(10'h3FF, expect_framed); send(10'h000, expect_framed); send(10'h000, expect_framed);
    send(sync_word4(v, 1'b1), expect_framed);
    lines_sent++;
  endtask

  // monitor
  logic ls_q = 0;
  always @(posedge clk) begin
    #1;
    if (slip) slips++;
    if (ls) begin
      checks++;
      framed++;
      if (exp_q.size() == 0) begin failures++; $display("unexpected framed word %h", o0); end
      else begin
        logic [9:0] e;
        e = exp_q.pop_front();
        if (o0 != e || o1 != e) begin failures++; $display("framed %h/%h expected %h", o0, o1, e); end
      end
      if (!ls_q) begin
        checks++;
        if (exp_v.size() == 0 || lv != exp_v.pop_front()) begin failures++; $display("line_v wrong"); end
      end
    end
    ls_q = ls;
  end

  initial begin
    #1 rst = 1; #20 rst = 0;
    line(0, 0, 0);                     // first SAV/EAV: gives sync, not framed
    repeat (3) send(10'h000, 0);
    checks++;
    if (sync != 2'b11) begin failures++; $display("no sync after SAV+EAV"); end
    for (int i = 1; i < 7; i++) line(i, i % 2, 1);
    repeat (8) send(10'h000, 0);
    checks += 3;
    if (slips != 0) begin failures++; $display("slip while codes present"); end
    if (exp_q.size() != 0) begin failures++; $display("%0d framed words missing", exp_q.size()); end
    if (framed != 6 * 16) begin failures++; $display("framed %0d words", framed); end
    // no codes: expect a slip request every TO words
    repeat (3 * TO + 2) send(10'h155, 0);
    checks += 2;
    if (slips != 3) begin failures++; $display("slips=%0d, expected 3", slips); end
    if (sync != 2'b00) begin failures++; $display("sync kept without codes"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
