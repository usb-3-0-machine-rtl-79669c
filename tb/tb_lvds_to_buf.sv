// tb_lvds_to_buf: checks the channel-pair write control and its FIFO.
//
// Lines (line_data_start high for a run of words) are offered before sync,
// before the first V rising edge, and after it. Only lines after sync_all and
// the V rising edge may be stored; each stored line must read back as its
// words packed {6'b0, lane1, 6'b0, lane0} followed by 8 zero words. A drop of
// sync_all must stop capture until sync and a new V rising edge return.
module tb_lvds_to_buf;
  logic rst = 0, wclk = 0, rclk = 0;
  logic rd_req = 0, V = 1, ls = 0, sync_all = 0;
  logic [9:0] d0 = '0, d1 = '0;
  logic ep, ovf;
  logic [31:0] q;
  logic [9:0] used;
  int checks = 0, failures = 0;
  logic [31:0] model [$];

  always #10 wclk = ~wclk;
  always #3  rclk = ~rclk;

  lvds_to_buf #(.DEPTH(512), .SEP_WORDS(8)) dut (
    .rst, .rx_outclk(wclk), .mem_rd_clk(rclk), .rd_req, .V, .line_data_start(ls),
    .sync_all, .imx_out0(d0), .imx_out1(d1), .mem_ep(ep), .imx_buf_out(q),
    .mem_used(used), .overflow(ovf));

  task automatic line(input int n, input int base, input bit stored);
    for (int k = 0; k < n; k++) begin
      @(negedge wclk);
      ls = 1; d0 = 10'(base + 2 * k); d1 = 10'(base + 2 * k + 1);
      if (stored) model.push_back({6'b0, d1, 6'b0, d0});
    end
    @(negedge wclk) ls = 0; d0 = 10'h3AA; d1 = 10'h3AA;
    if (stored) repeat (8) model.push_back(32'h0);
    repeat (20) @(negedge wclk);
  endtask

  task automatic vpulse();
    @(negedge wclk) V = 0;
    repeat (4) @(negedge wclk);
    V = 1;
    repeat (4) @(negedge wclk);
  endtask

  task automatic drain_and_check();
    repeat (6) @(negedge rclk);
    while (!ep) begin
      @(negedge rclk) rd_req = 1;
      @(negedge rclk) rd_req = 0;
      checks++;
      if (model.size() == 0 || q != model.pop_front()) begin
        failures++; $display("read %h", q);
      end
    end
    checks++;
    if (model.size() != 0) begin failures++; $display("%0d words not stored", model.size()); end
  endtask

  initial begin
    #1 rst = 1; #30 rst = 0;
    line(5, 16, 0);           // no sync yet
    sync_all = 1;
    repeat (4) @(negedge wclk);
    line(5, 40, 0);           // synced, but no V edge yet
    vpulse();
    line(6, 100, 1);
    line(1, 200, 1);
    line(12, 300, 1);
    drain_and_check();
    sync_all = 0;
    repeat (4) @(negedge wclk);
    line(4, 500, 0);          // sync lost
    sync_all = 1;
    repeat (4) @(negedge wclk);
    line(4, 600, 0);          // waits for V again
    vpulse();
    line(3, 700, 1);
    drain_and_check();
    checks++;
    if (ovf) begin failures++; $display("overflow flagged"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #200000;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
