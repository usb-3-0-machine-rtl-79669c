// fx3_checker: testbench monitor for the FX3 video port (not synthesizable).
//
// Samples o_fx3_dq on rising pclk edges where H and V are high and checks each
// line against the expected format: two header words (C00C5555h and the frame
// number on a frame's first line, zeros otherwise), start code 000003FFh /
// 02000000h, DWORDS pixel words, end code 000003FFh / 02740000h (10-bit values; for
// 12-bit pixels the codes are shifted left by two bits). Pixels are
// recomputed from the stimulus formula and corrected with the gains the
// checker itself derives, with the gray-world formulas, from the previous
// frame's raw pixels inside the statistics window; gains reported by a
// gains_valid pulse are used from the next frame on. Each gains_valid pulse is
// compared with those gains. A frame ends after ACTIVE lines.
//
// The line format it checks follows the described FX3 format; dropping
// blanking lines and the gain timing are this design's choices.
module fx3_checker #(
  parameter int PIX_W      = 10,     // pixel width: 10 or 12
  parameter int DWORDS     = 100,
  parameter int ACTIVE     = 12,
  parameter int PIX_START  = 4,
  parameter int PIX_CNT    = 192,
  parameter int LINE_START = 2,
  parameter int LINE_CNT   = 8,
  parameter bit VERBOSE    = 0
) (
  input  logic        pclk,
  input  logic [31:0] dq,
  input  logic        h,
  input  logic        v,
  input  logic [15:0] k_r,
  input  logic [15:0] k_g,
  input  logic [15:0] k_b,
  input  logic        gains_valid
);
  int checks = 0, failures = 0;
  int frames = 0, lines = 0, frame_hdrs = 0, zero_hdrs = 0, wb_updates = 0, corrected = 0;
  int pos = 0, row = 0;
  longint sum[3], num[3];
  longint kexp[3], kuse[3], knext[3];
  bit     kpend = 0;

  function automatic logic [11:0] pix_val(input int r, input int c);
    int base;
    if (r % 2 == 0) base = (c % 2 == 0) ? 400 : 150;
    else            base = (c % 2 == 0) ? 250 : 420;
    return 12'(base + ((c * 7 + r * 13) % 64)) << (PIX_W - 10);
  endfunction

  // 0 = R, 1 = G, 2 = B
  function automatic int colour(input int r, input int c);
    if (r % 2 == 0) return (c % 2 == 0) ? 1 : 2;
    return (c % 2 == 0) ? 0 : 1;
  endfunction

  function automatic logic [11:0] corr(input logic [11:0] p, input longint k);
    longint t = (longint'(p) * k + 512) >>> 10;
    return (t > (1 << PIX_W) - 1) ? 12'((1 << PIX_W) - 1) : 12'(t);
  endfunction

  task automatic expect32(input logic [31:0] got, input logic [31:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("FX3 mismatch %s frame %0d row %0d pos %0d: got %h expected %h",
                                  what, frames, row, pos, got, exp);
    end
  endtask

  task automatic frame_done();
    longint ave[3], srgb;
    for (int x = 0; x < 3; x++) ave[x] = (num[x] != 0) ? sum[x] / num[x] : 0;
    srgb = ave[0] + ave[1] + ave[2];
    for (int x = 0; x < 3; x++) begin
      if (num[x] != 0 && sum[x] != 0) kexp[x] = ((num[x] * srgb) << 10) / (3 * sum[x]);
      else kexp[x] = kuse[x];
      if (kexp[x] > 65535) kexp[x] = 65535;
    end
    kpend = 1;
    for (int x = 0; x < 3; x++) begin sum[x] = 0; num[x] = 0; end
  endtask

  initial for (int x = 0; x < 3; x++) begin sum[x] = 0; num[x] = 0; kuse[x] = 1024; kexp[x] = 1024; knext[x] = 1024; end

  always @(posedge pclk) begin
    if (gains_valid) begin
      wb_updates++;
      checks++;
      if (!kpend || k_r != 16'(kexp[0]) || k_g != 16'(kexp[1]) || k_b != 16'(kexp[2])) begin
        failures++;
        $display("gain mismatch: got %0d %0d %0d expected %0d %0d %0d (pending %0d)",
                 k_r, k_g, k_b, kexp[0], kexp[1], kexp[2], kpend);
      end
      for (int x = 0; x < 3; x++) knext[x] = kexp[x];
      kpend = 0;
    end
    if (h && !v) begin
      checks++; failures++;
      $display("H high outside V");
    end
    if (h && v) begin
      if (pos == 0) begin
        if (row == 0) for (int x = 0; x < 3; x++) kuse[x] = knext[x];
        expect32(dq, (row == 0) ? 32'hC00C_5555 : 32'h0, "header0");
        if (row == 0) frame_hdrs++; else zero_hdrs++;
      end else if (pos == 1) expect32(dq, (row == 0) ? 32'(frames) : 32'h0, "header1");
      else if (pos == 2) expect32(dq, 32'((1 << PIX_W) - 1), "sav0");
      else if (pos == 3) expect32(dq, 32'h0200_0000 << (PIX_W - 10), "sav1");
      else if (pos < 4 + DWORDS) begin
        logic [11:0] e0, e1, r0, r1;
        int c;
        c  = 2 * (pos - 4);
        r0 = pix_val(row, c);
        r1 = pix_val(row, c + 1);
        e0 = corr(r0, kuse[colour(row, c)]);
        e1 = corr(r1, kuse[colour(row, c + 1)]);
        if (e0 != r0 || e1 != r1) corrected++;
        expect32(dq, {4'b0, e1, 4'b0, e0}, "pixel");
        for (int k = 0; k < 2; k++)
          if (row >= LINE_START && row < LINE_START + LINE_CNT &&
              c + k >= PIX_START && c + k < PIX_START + PIX_CNT) begin
            sum[colour(row, c + k)] += (k == 0) ? r0 : r1;
            num[colour(row, c + k)] += 1;
          end
      end
      else if (pos == 4 + DWORDS) expect32(dq, 32'((1 << PIX_W) - 1), "eav0");
      else expect32(dq, 32'h0274_0000 << (PIX_W - 10), "eav1");
      if (pos == 5 + DWORDS) begin
        pos = 0;
        lines++;
        row++;
        if (row == ACTIVE) begin
          if (VERBOSE) $display("frame %0d done at %0t", frames, $time);
          frame_done();
          frames++;
          row = 0;
        end
      end else pos++;
    end
  end
endmodule
