// tb_lvds_deser: checks the 2-lane DDR deserializer.
//
// Both lanes carry an incrementing 10-bit count, MSB first; lane 1 lags lane 0
// by 3 bits. For each of the ten slip positions the testbench records whether
// 16 successive output words form a +1 sequence, then requests one bit slip on
// both lanes. Exactly one position must work per lane, the two positions must
// be 3 bits apart, and rx_outclk must run at 1/5 of the bit clock. Then each
// lane is slipped on its own to its aligned position and 200 further words
// per lane must continue the count.
//
// Deserialization factor 10 and bit slip follow the described receiver; the
// slip timing is this design's choice.
module tb_lvds_deser;
  logic clk = 0, rst = 0;
  logic [1:0]  rx_in = '0, align = '0;
  logic        outclk;
  logic [19:0] rx_out;
  int checks = 0, failures = 0;

  lvds_deser #(.CHANNELS(2), .FACTOR(10)) dut (
    .rx_inclock(clk), .rx_data_reset(rst), .rx_in, .rx_channel_data_align(align),
    .rx_outclk(outclk), .rx_out);

  // serial source: one bit per 4 time units, clock edges mid-bit
  logic [63:0] h1 = '0;
  initial begin
    int n;
    logic [9:0] w;
    n = 0;
    forever begin
      w = 10'(n);
      for (int b = 9; b >= 0; b--) begin
        h1 = {h1[62:0], w[b]};
        rx_in[0] = w[b];
        rx_in[1] = h1[3];
        #2 clk = ~clk;
        #2;
      end
      n++;
    end
  end

  function automatic bit is_seq(input logic [9:0] a [16]);
    for (int k = 0; k < 15; k++) if (10'(a[k] + 1) != a[k+1]) return 0;
    return 1;
  endfunction

  initial begin
    logic [9:0] s0 [16], s1 [16];
    int good0 = -1, good1 = -1, n0 = 0, n1 = 0;
    time t0, t1;
    #1 rst = 1; #20 rst = 0;
    repeat (4) @(posedge outclk);
    @(posedge outclk) t0 = $time;
    @(posedge outclk) t1 = $time;
    checks++;
    if (t1 - t0 != 40) begin failures++; $display("rx_outclk period %0t", t1 - t0); end
    for (int s = 0; s < 10; s++) begin
      repeat (4) @(posedge outclk);
      for (int k = 0; k < 16; k++) begin
        @(posedge outclk);
        s0[k] = rx_out[9:0];
        s1[k] = rx_out[19:10];
      end
      if (is_seq(s0)) begin good0 = s; n0++; end
      if (is_seq(s1)) begin good1 = s; n1++; end
      @(posedge outclk) align = 2'b11;
      repeat (2) @(posedge outclk);
      align = 2'b00;
    end
    checks += 3;
    if (n0 != 1) begin failures++; $display("lane0 aligned at %0d positions", n0); end
    if (n1 != 1) begin failures++; $display("lane1 aligned at %0d positions", n1); end
    if (((good1 - good0 + 10) % 10) != 3 && ((good1 - good0 + 10) % 10) != 7) begin
      failures++; $display("slip positions %0d %0d", good0, good1);
    end
    // after ten slips both lanes are back at position 0; now slip each lane
    // on its own to its aligned position and check a long run of words
    for (int s = 0; s < 10; s++) begin
      @(posedge outclk) align = {1'(s < good1), 1'(s < good0)};
      repeat (2) @(posedge outclk);
      align = 2'b00;
      repeat (2) @(posedge outclk);
    end
    repeat (4) @(posedge outclk);
    @(posedge outclk) s0[0] = rx_out[9:0]; s1[0] = rx_out[19:10];
    for (int k = 0; k < 200; k++) begin
      @(posedge outclk);
      checks += 2;
      if (rx_out[9:0] != 10'(s0[0] + 1)) begin
        failures++; $display("lane0 word %h after %h", rx_out[9:0], s0[0]);
      end
      if (rx_out[19:10] != 10'(s1[0] + 1)) begin
        failures++; $display("lane1 word %h after %h", rx_out[19:10], s1[0]);
      end
      s0[0] = rx_out[9:0]; s1[0] = rx_out[19:10];
    end
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
