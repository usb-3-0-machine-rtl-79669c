// tb_white_balance: checks the gray-world white balance block.
//
// Frames of 8 lines x 16 pixels (two per beat) with random colour-biased
// pixels are fed in. The testbench sums the window (pixels 2..13, lines
// 1..4) per Bayer colour itself, derives the expected gains with
// K = Num*SumRGB*1024 / (3*Sum), SumRGB = sum of the three integer averages,
// and compares them when gains_valid pulses. Every output pair is compared
// with the input corrected by the gains in force (rounded, clipped to 10
// bits), one clock after the input. One frame runs with enable low and must
// pass pixels unchanged. Saturated inputs check the clipping. In one case the
// gains are computed while the next frame is already running; they must only
// be applied from the frame after it.
//
// The gray-world formulas and the Bayer order follow the described
// algorithm; the fixed-point format is this design's choice.
module tb_white_balance;
  localparam int PS = 2, PC = 12, LS = 1, LC = 4, W = 16, H = 8;
  logic clk = 0, rst = 0;
  logic en = 1, fs = 0, fe = 0, lst = 0, iv = 0;
  logic [9:0] p0 = '0, p1 = '0, o0, o1;
  logic ov, gv;
  logic [15:0] kr, kg, kb;
  int checks = 0, failures = 0;
  longint kuse[3] = '{1024, 1024, 1024};
  longint kexp[3], knext[3] = '{1024, 1024, 1024};
  logic [9:0] e0_q [$], e1_q [$];
  int gupd = 0;

  always #5 clk = ~clk;

  white_balance #(.PIX_START(PS), .PIX_CNT(PC), .LINE_START(LS), .LINE_CNT(LC)) dut (
    .clk, .rst, .enable(en), .frame_start(fs), .frame_end(fe), .line_start(lst),
    .in_valid(iv), .pix0(p0), .pix1(p1), .out_valid(ov), .out0(o0), .out1(o1),
    .k_r(kr), .k_g(kg), .k_b(kb), .gains_valid(gv));

  function automatic int colour(input int r, input int c);   // 0 R, 1 G, 2 B
    if (r % 2 == 0) return (c % 2 == 0) ? 1 : 2;
    return (c % 2 == 0) ? 0 : 1;
  endfunction

  function automatic logic [9:0] corr(input logic [9:0] p, input longint k);
    longint t;
    t = (longint'(p) * k + 512) >>> 10;
    return (t > 1023) ? 10'h3FF : 10'(t);
  endfunction

  always @(posedge clk) begin
    if (ov) begin
      logic [9:0] a, b;
      checks++;
      a = e0_q.pop_front(); b = e1_q.pop_front();
      if (o0 != a || o1 != b) begin failures++; $display("out %h %h expected %h %h", o0, o1, a, b); end
    end
    if (gv) begin
      gupd++;
      checks++;
      for (int x = 0; x < 3; x++) knext[x] = kexp[x];
      if (kr != 16'(kexp[0]) || kg != 16'(kexp[1]) || kb != 16'(kexp[2])) begin
        failures++; $display("gains %0d %0d %0d expected %0d %0d %0d", kr, kg, kb, kexp[0], kexp[1], kexp[2]);
      end
    end
  end

  // gap: idle clocks after each line; tail: idle clocks after frame_end
  task automatic frame(input bit enable, input bit saturate, input int gap = 0, input int tail = 400);
    longint sum[3], num[3], ave[3], srgb;
    for (int x = 0; x < 3; x++) begin sum[x] = 0; num[x] = 0; end
    @(negedge clk) en = enable; fs = 1;
    for (int x = 0; x < 3; x++) kuse[x] = knext[x];
    @(negedge clk) fs = 0;
    for (int r = 0; r < H; r++) begin
      @(negedge clk) lst = 1;
      @(negedge clk) lst = 0;
      for (int c = 0; c < W; c += 2) begin
        logic [9:0] v [2];
        for (int k = 0; k < 2; k++) begin
          int col = colour(r, c + k);
          v[k] = saturate ? 10'd1000 : 10'((col == 0 ? 300 : col == 1 ? 500 : 150) + $urandom % 100);
          if (r >= LS && r < LS + LC && c + k >= PS && c + k < PS + PC) begin
            sum[col] += v[k]; num[col]++;
          end
        end
        p0 = v[0]; p1 = v[1]; iv = 1;
        e0_q.push_back(enable ? corr(v[0], kuse[colour(r, c)]) : v[0]);
        e1_q.push_back(enable ? corr(v[1], kuse[colour(r, c + 1)]) : v[1]);
        @(negedge clk);
        iv = 0;
      end
      repeat (gap) @(negedge clk);
    end
    for (int x = 0; x < 3; x++) ave[x] = sum[x] / num[x];
    srgb = ave[0] + ave[1] + ave[2];
    for (int x = 0; x < 3; x++) begin
      kexp[x] = ((num[x] * srgb) << 10) / (3 * sum[x]);
      if (kexp[x] > 65535) kexp[x] = 65535;
    end
    @(negedge clk) fe = 1;
    @(negedge clk) fe = 0;
    repeat (tail) @(negedge clk);
  endtask

  initial begin
    #1 rst = 1; #20 rst = 0;
    frame(1, 0);      // unity gains
    frame(1, 0);      // corrected with gains of frame 0
    frame(0, 0);      // bypass
    frame(1, 1);      // corrected, saturating inputs (gains stay finite)
    frame(1, 0);
    frame(1, 0, 0, 2);    // next frame starts before these gains are ready
    frame(1, 0, 60);      // gains arrive mid-frame and must wait for the next one
    frame(1, 0);
    checks++;
    if (gupd != 8) begin failures++; $display("%0d gain updates", gupd); end
    checks++;
    if (e0_q.size() != 0) begin failures++; $display("outputs missing"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
