// tb_dp_fifo: checks the dual-clock FIFO against a queue model.
//
// Write clock 7 units, read clock 5 units; random write and read requests.
// Every word read must equal the model's oldest word, in order. The test
// first fills the FIFO to check wr_full, wr_used and a dropped write flagged
// on wr_overflow, then drains it to check rd_empty, then runs random traffic.
//
// The FIFO's function follows the described dual-port buffers; its depth,
// read timing and overflow flag are this design's choices.
module tb_dp_fifo;
  localparam int D = 16;
  logic rst = 0, wclk = 0, rclk = 0;
  logic wr_req = 0, rd_req = 0;
  logic [31:0] data = '0, q;
  logic wr_full, wr_ovf, rd_empty;
  logic [4:0] wr_used, rd_used;
  int checks = 0, failures = 0, nread = 0;
  logic [31:0] model [$];
  bit rd_pend = 0;

  always #7 wclk = ~wclk;
  always #5 rclk = ~rclk;

  dp_fifo #(.WIDTH(32), .DEPTH(D)) dut (
    .rst, .wr_clk(wclk), .wr_req, .data, .wr_full, .wr_used, .wr_overflow(wr_ovf),
    .rd_clk(rclk), .rd_req, .q, .rd_empty, .rd_used);

  // write side model update
  always @(posedge wclk) if (wr_req && !wr_full) model.push_back(data);

  // read side check: data one cycle after an accepted read
  always @(posedge rclk) begin
    if (rd_pend) begin
      checks++;
      nread++;
      if (model.size() == 0 || q != model.pop_front()) begin
        failures++; $display("read mismatch %h", q);
      end
    end
    rd_pend = rd_req && !rd_empty;
  end

  initial begin
    #1 rst = 1; #20 rst = 0;
    // fill
    for (int k = 0; k < D + 1; k++) begin
      @(negedge wclk) wr_req = 1; data = 32'hA000_0000 + k;
    end
    @(negedge wclk) wr_req = 0;
    checks += 3;
    if (!wr_full) begin failures++; $display("not full"); end
    if (wr_used != 5'(D)) begin failures++; $display("wr_used %0d", wr_used); end
    if (model.size() != D) begin failures++; $display("model %0d", model.size()); end
    // drain
    repeat (6) @(negedge rclk);
    for (int k = 0; k < D + 2; k++) begin @(negedge rclk) rd_req = 1; end
    @(negedge rclk) rd_req = 0;
    repeat (2) @(negedge rclk);
    checks += 2;
    if (!rd_empty) begin failures++; $display("not empty"); end
    if (nread != D) begin failures++; $display("read %0d", nread); end
    checks++;
    if (ovf_seen != 1) begin failures++; $display("overflow flagged %0d times", ovf_seen); end
    // random traffic
    fork
      repeat (2000) begin @(negedge wclk) wr_req = ($urandom % 3) != 0; data = $urandom; end
      repeat (2600) begin @(negedge rclk) rd_req = ($urandom % 2) != 0; end
    join
    wr_req = 0;
    repeat (40) begin @(negedge rclk) rd_req = 1; end
    rd_req = 0;
    repeat (3) @(negedge rclk);
    checks++;
    if (model.size() != 0) begin failures++; $display("%0d words left", model.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int ovf_seen = 0;
  always @(negedge wclk) if (wr_ovf) ovf_seen++;

  initial begin
    #200000;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
