// tb_adp_fifo: checks the 32-bit-in, 64-bit-out adaptive FIFO.
//
// Random 32-bit words are written on one clock and 64-bit words read on
// another; each 64-bit word must be two consecutive writes, the earlier one in
// the low half. Also checked: adp_usedw counts 32-bit words including a held
// half, adp_full rises before a write could be lost, adp_emp after draining.
//
// The 32-bit in, 64-bit out structure follows the described adaptive FIFO;
// the half order and the early full flag are this design's choices.
module tb_adp_fifo;
  localparam int D = 32;
  logic rst = 0, wclk = 0, rclk = 0;
  logic wr = 0, rd = 0;
  logic [31:0] din = '0;
  logic [63:0] q;
  logic full, emp;
  logic [5:0] usedw;
  int checks = 0, failures = 0;
  logic [31:0] model [$];
  bit pend = 0;

  always #4 wclk = ~wclk;
  always #6 rclk = ~rclk;

  adp_fifo #(.DEPTH(D)) dut (
    .rst, .wr_clk(wclk), .adp_wr(wr), .adp_data_in(din), .adp_full(full), .adp_usedw(usedw),
    .rd_clk(rclk), .adp_rd(rd), .q, .adp_emp(emp));

  always @(posedge wclk) if (wr) model.push_back(din);

  always @(posedge rclk) begin
    if (pend) begin
      logic [31:0] lo, hi;
      checks++;
      lo = model.pop_front();
      hi = model.pop_front();
      if (q != {hi, lo}) begin failures++; $display("read %h expected %h", q, {hi, lo}); end
    end
    pend = rd && !emp;
  end

  initial begin
    #1 rst = 1; #20 rst = 0;
    // three writes: one pair stored, one half held
    for (int k = 0; k < 3; k++) begin @(negedge wclk) wr = 1; din = 32'h100 + k; end
    @(negedge wclk) wr = 0;
    checks++;
    if (usedw != 6'd3) begin failures++; $display("usedw %0d, expected 3", usedw); end
    // fill until full
    while (!full) begin @(negedge wclk) wr = 1; din = $urandom; end
    @(negedge wclk) wr = 0;
    checks++;
    if (usedw < 6'(D - 3)) begin failures++; $display("full at usedw %0d", usedw); end
    // drain completely (the held half stays)
    repeat (4) @(negedge rclk);
    while (!emp) begin @(negedge rclk) rd = 1; end
    @(negedge rclk) rd = 0;
    // random traffic, writer obeys full
    fork
      repeat (3000) begin @(negedge wclk) wr = !full && ($urandom % 2); din = $urandom; end
      repeat (2000) begin @(negedge rclk) rd = ($urandom % 3) != 0; end
    join
    wr = 0;
    if (model.size() % 2) begin @(negedge wclk) wr = 1; din = 32'hFFFF_0000; @(negedge wclk) wr = 0; end
    repeat (6) @(negedge rclk);
    while (!emp) begin @(negedge rclk) rd = 1; end
    @(negedge rclk) rd = 0;
    repeat (3) @(negedge rclk);
    checks++;
    if (model.size() != 0) begin failures++; $display("%0d words left", model.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #400000;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
