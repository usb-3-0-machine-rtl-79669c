// sensor_model: behavioural model of the image sensor's LVDS output (not synthesizable).
//
// Drives NLANES DDR lanes and their bit clock. One bit period is BIT units;
// data change on bit boundaries and the clock edges sit in the middle of each
// bit. Words are sent MSB first. Both lanes of pair p are delayed by
// (3p+1) mod PIX_W bits, so every receiver has to find its word boundary by bit
// slip and the pairs do not start their words at the same time.
// Line timing follows the sync inputs (slave mode): every falling edge of XHS
// starts a line HBLANK words later; the line index restarts on a falling edge
// of XVS coinciding with XHS. Lines 0..VBLANK-1 and lines from
// VBLANK+ACTIVE on are blanking lines (V=1); the others are active lines.
// A line is SAV (all-ones, 0, 0, status; codes are the 10-bit codes shifted left for 12-bit words), WORDS pixel words per lane, EAV.
// Outside lines the lanes send 000h. Pixel value at active row r, column c =
// word*NLANES + lane, pix_val(r, c), a Bayer-dependent pattern
// that never uses 000h or 3FFh.
//
// Sync codes, lane count and slave-mode timing follow the described sensor;
// the pixel pattern and skews are this testbench's choices.
module sensor_model #(
  parameter int PIX_W  = 10,     // word width: 10 or 12
  parameter int NLANES = 10,
  parameter int WORDS  = 8,     // pixel words per lane per line
  parameter int HBLANK = 4,
  parameter int VBLANK = 2,
  parameter int ACTIVE = 6,
  parameter int BIT    = 4      // time units per bit, multiple of 4
) (
  input  logic              xhs,
  input  logic              xvs,
  output logic              clk_out,
  output logic [NLANES-1:0] lanes
);
  int skew [NLANES];
  int frame;
  int line;
  bit in_frame;

  function automatic logic [3:0] prot(input logic v, input logic h);
    case ({v, h})
      2'b00: return 4'b0000;
      2'b01: return 4'b1101;
      2'b10: return 4'b1011;
      default: return 4'b0110;
    endcase
  endfunction

  function automatic logic [11:0] code4(input logic v, input logic h);
    return 12'({2'b10, v, h, prot(v, h), 2'b00}) << (PIX_W - 10);
  endfunction

  // Bayer: even row/even col Gb, even/odd B, odd/even R, odd/odd Gr
  function automatic logic [11:0] pix_val(input int r, input int c);
    int base;
    if (r % 2 == 0) base = (c % 2 == 0) ? 400 : 150;
    else            base = (c % 2 == 0) ? 250 : 420;
    return 12'(base + ((c * 7 + r * 13) % 64)) << (PIX_W - 10);
  endfunction

  logic [11:0] cur [NLANES];
  logic [63:0] hist [NLANES];

  // word source: called once per word time
  int  pos;          // -1: idle, else word index within the line sequence
  int  wait_cnt;
  logic xhs_q, xvs_seen;
  task automatic next_words();
    logic v;
    if (pos < 0 && wait_cnt > 0) begin
      wait_cnt--;
      if (wait_cnt == 0) pos = 0;
    end
    v = (line < VBLANK) || (line >= VBLANK + ACTIVE);
    for (int l = 0; l < NLANES; l++) begin
      if (pos < 0)                  cur[l] = 12'h000;
      else if (pos == 0)            cur[l] = 12'((1 << PIX_W) - 1);
      else if (pos < 3)             cur[l] = 12'h000;
      else if (pos == 3)            cur[l] = code4(v, 1'b0);
      else if (pos < 4 + WORDS)     cur[l] = v ? 12'(10'h040) << (PIX_W - 10) : pix_val(line - VBLANK, (pos - 4) * NLANES + l);
      else if (pos == 4 + WORDS)    cur[l] = 12'((1 << PIX_W) - 1);
      else if (pos < 7 + WORDS)     cur[l] = 12'h000;
      else                          cur[l] = code4(v, 1'b1);
    end
    if (pos >= 0) pos = (pos == 7 + WORDS) ? -1 : pos + 1;
  endtask

  initial begin
    for (int l = 0; l < NLANES; l++) begin skew[l] = ((l / 2) * 3 + 1) % PIX_W; hist[l] = '0; end
    frame = -1; line = 0; pos = -1; wait_cnt = 0; xhs_q = 1'b1; in_frame = 0;
    clk_out = 1'b0; lanes = '0;
    forever begin
      // word boundary: sample sync, pick the next words
      if (xhs_q && !xhs) begin
        if (!xvs) begin frame++; line = 0; in_frame = 1; end
        else line++;
        wait_cnt = HBLANK;
      end
      xhs_q = xhs;
      next_words();
      for (int b = PIX_W - 1; b >= 0; b--) begin
        for (int l = 0; l < NLANES; l++) begin
          hist[l] = {hist[l][62:0], cur[l][b]};
          lanes[l] = hist[l][skew[l]];
        end
        #(BIT / 2) clk_out = ~clk_out;
        #(BIT / 2);
      end
    end
  end
endmodule
