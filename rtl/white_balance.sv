// white_balance: gray-world white balance on the Bayer pixel stream.
//
// Statistics: inside a window of LINE_CNT lines from line LINE_START and
// PIX_CNT pixels from pixel PIX_START (both counted from 0 at the first
// active line of the frame and the first pixel after the start code), pixels
// are summed per colour. The Bayer pattern is Gb at even line/even pixel, B at
// even line/odd pixel, R at odd line/even pixel and Gr at odd line/odd pixel;
// Gb and Gr both count as green.
// Gains: on frame_end a sequential divider computes
//   Ave_x = Sum_x / Num_x,  SumRGB = Ave_r + Ave_g + Ave_b,
//   K_x   = Num_x * SumRGB / (3 * Sum_x)       (= mean of averages / Ave_x)
// as unsigned fixed point with GAIN_FRAC fraction bits, and loads all three
// gains at once (gains_valid pulses). A colour with no pixels or a zero sum
// keeps its gain. Gains start at 1.0.
// Correction: gains computed after a frame take effect at the next
// frame_start. With enable set, each pixel is multiplied by its colour's gain,
// rounded and clipped to PIX_W bits. Pixels arrive two per beat (pix0 first);
// the corrected pair leaves one clock later (out_valid). line_start must pulse
// before the first beat of every line and frame_start before the first line.
//
// The three steps, the formulas, the Bayer order and the window (pixels
// 124..4219, lines 18..2177 for the 4096x2160 readout) follow the described
// algorithm; the fixed-point format and divider are this design's choices.
module white_balance #(
  parameter int unsigned PIX_W      = 10,     // pixel width: 10 or 12
  parameter int unsigned PIX_START  = 124,
  parameter int unsigned PIX_CNT    = 4096,
  parameter int unsigned LINE_START = 18,
  parameter int unsigned LINE_CNT   = 2160,
  parameter int unsigned GAIN_FRAC  = 10,
  parameter int unsigned GAIN_W     = 16
) (
  input  logic               clk,
  input  logic               rst,
  input  logic               enable,
  input  logic               frame_start,
  input  logic               frame_end,
  input  logic               line_start,
  input  logic               in_valid,
  input  logic [PIX_W-1:0]   pix0,
  input  logic [PIX_W-1:0]   pix1,
  output logic               out_valid,
  output logic [PIX_W-1:0]   out0,
  output logic [PIX_W-1:0]   out1,
  output logic [GAIN_W-1:0]  k_r,
  output logic [GAIN_W-1:0]  k_g,
  output logic [GAIN_W-1:0]  k_b,
  output logic               gains_valid
);
  localparam int unsigned SW = 26 + PIX_W;   // sums: up to 2^26 pixels
  localparam int unsigned NW = 26;   // pixel counts
  localparam int unsigned DW = 48;   // divider width
  localparam logic [GAIN_W-1:0] ONE = GAIN_W'(1 << GAIN_FRAC);

  typedef enum logic [1:0] {C_R, C_G, C_B} col_t;

  logic [15:0] line_num;
  logic [15:0] pixel_num;
  logic        line_seen;     // a line has started in this frame

  function automatic col_t colour(input logic lodd, input logic podd);
    if (!lodd) return podd ? C_B : C_G;
    else       return podd ? C_G : C_R;
  endfunction

  function automatic logic in_win(input logic [15:0] ln, input logic [15:0] pn);
    return (32'(ln) >= LINE_START) && (32'(ln) < LINE_START + LINE_CNT) &&
           (32'(pn) >= PIX_START)  && (32'(pn) < PIX_START + PIX_CNT);
  endfunction

  // ---------------- statistics ----------------
  logic [SW-1:0] sum_r, sum_g, sum_b;
  logic [NW-1:0] num_r, num_g, num_b;
  logic [SW-1:0] add_r, add_g, add_b;
  logic [1:0]    inc_r, inc_g, inc_b;
  col_t          c0, c1;
  logic          w0, w1;

  always_comb begin
    c0 = colour(line_num[0], pixel_num[0]);
    c1 = colour(line_num[0], ~pixel_num[0]);
    w0 = in_valid && in_win(line_num, pixel_num);
    w1 = in_valid && in_win(line_num, pixel_num + 16'd1);
    add_r = '0; add_g = '0; add_b = '0; inc_r = '0; inc_g = '0; inc_b = '0;
    if (w0) unique case (c0)
      C_R: begin add_r += SW'(pix0); inc_r += 2'd1; end
      C_G: begin add_g += SW'(pix0); inc_g += 2'd1; end
      default: begin add_b += SW'(pix0); inc_b += 2'd1; end
    endcase
    if (w1) unique case (c1)
      C_R: begin add_r += SW'(pix1); inc_r += 2'd1; end
      C_G: begin add_g += SW'(pix1); inc_g += 2'd1; end
      default: begin add_b += SW'(pix1); inc_b += 2'd1; end
    endcase
  end

  typedef enum logic [3:0] {G_IDLE, G_AR, G_AG, G_AB, G_KR, G_KG, G_KB, G_LOAD} gst_t;
  gst_t gst;

  // snapshot of the finished frame for the gain computation (a frame that
  // ends while the previous computation still runs is not used)
  logic [SW-1:0] s_r, s_g, s_b;
  logic [NW-1:0] n_r, n_g, n_b;

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      line_num <= '0; pixel_num <= '0; line_seen <= 1'b0;
      sum_r <= '0; sum_g <= '0; sum_b <= '0; num_r <= '0; num_g <= '0; num_b <= '0;
      s_r <= '0; s_g <= '0; s_b <= '0; n_r <= '0; n_g <= '0; n_b <= '0;
    end else begin
      if (frame_start) begin
        line_num <= '0; pixel_num <= '0; line_seen <= 1'b0;
        sum_r <= '0; sum_g <= '0; sum_b <= '0; num_r <= '0; num_g <= '0; num_b <= '0;
      end else if (line_start) begin
        pixel_num <= '0;
        if (line_seen) line_num <= line_num + 1'b1;
        line_seen <= 1'b1;
      end else if (in_valid) begin
        pixel_num <= pixel_num + 16'd2;
        sum_r <= sum_r + add_r; sum_g <= sum_g + add_g; sum_b <= sum_b + add_b;
        num_r <= num_r + NW'(inc_r); num_g <= num_g + NW'(inc_g); num_b <= num_b + NW'(inc_b);
      end
      if (frame_end && gst == G_IDLE) begin
        s_r <= sum_r; s_g <= sum_g; s_b <= sum_b;
        n_r <= num_r; n_g <= num_g; n_b <= num_b;
      end
    end
  end

  // ---------------- gain computation ----------------
  logic          d_start, d_busy, d_done, d_issued;
  logic [DW-1:0] d_num, d_den, d_q;
  logic [DW-1:0] ave_r, ave_g, ave_b, kq_r, kq_g, kq_b;
  logic [DW-1:0] sum_rgb;

  assign sum_rgb = ave_r + ave_g + ave_b;

  seq_div #(.W(DW)) u_div (
    .clk, .rst, .start(d_start), .dividend(d_num), .divisor(d_den),
    .busy(d_busy), .done(d_done), .quotient(d_q)
  );

  always_comb begin
    d_num = '0; d_den = '0;
    unique case (gst)
      G_AR: begin d_num = DW'(s_r); d_den = DW'(n_r); end
      G_AG: begin d_num = DW'(s_g); d_den = DW'(n_g); end
      G_AB: begin d_num = DW'(s_b); d_den = DW'(n_b); end
      G_KR: begin d_num = (DW'(n_r) * sum_rgb) << GAIN_FRAC; d_den = DW'(s_r) * 3; end
      G_KG: begin d_num = (DW'(n_g) * sum_rgb) << GAIN_FRAC; d_den = DW'(s_g) * 3; end
      G_KB: begin d_num = (DW'(n_b) * sum_rgb) << GAIN_FRAC; d_den = DW'(s_b) * 3; end
      default: ;
    endcase
    d_start = (gst inside {G_AR, G_AG, G_AB, G_KR, G_KG, G_KB}) && !d_issued;
  end

  function automatic logic [GAIN_W-1:0] sat_gain(input logic [DW-1:0] q, input logic ok,
                                                 input logic [GAIN_W-1:0] old);
    if (!ok) return old;
    return (q > DW'({GAIN_W{1'b1}})) ? '1 : GAIN_W'(q);
  endfunction

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      gst <= G_IDLE; d_issued <= 1'b0;
      ave_r <= '0; ave_g <= '0; ave_b <= '0; kq_r <= '0; kq_g <= '0; kq_b <= '0;
      k_r <= ONE; k_g <= ONE; k_b <= ONE; gains_valid <= 1'b0;
    end else begin
      gains_valid <= 1'b0;
      if (d_start) d_issued <= 1'b1;
      if (gst == G_IDLE) begin
        if (frame_end) gst <= G_AR;
      end else if (gst == G_LOAD) begin
        k_r <= sat_gain(kq_r, (n_r != '0) && (s_r != '0), k_r);
        k_g <= sat_gain(kq_g, (n_g != '0) && (s_g != '0), k_g);
        k_b <= sat_gain(kq_b, (n_b != '0) && (s_b != '0), k_b);
        gains_valid <= 1'b1;
        gst <= G_IDLE;
      end else if (d_done) begin
        d_issued <= 1'b0;
        unique case (gst)
          G_AR: begin ave_r <= (n_r != '0) ? d_q : '0; gst <= G_AG; end
          G_AG: begin ave_g <= (n_g != '0) ? d_q : '0; gst <= G_AB; end
          G_AB: begin ave_b <= (n_b != '0) ? d_q : '0; gst <= G_KR; end
          G_KR: begin kq_r <= d_q; gst <= G_KG; end
          G_KG: begin kq_g <= d_q; gst <= G_KB; end
          default: begin kq_b <= d_q; gst <= G_LOAD; end
        endcase
      end
    end
  end

  // ---------------- correction ----------------
  function automatic logic [PIX_W-1:0] apply(input logic [PIX_W-1:0] p, input logic [GAIN_W-1:0] k);
    logic [GAIN_W+PIX_W-1:0] prod;
    prod = (GAIN_W+PIX_W)'(p) * k + (GAIN_W+PIX_W)'(1 << (GAIN_FRAC - 1));
    prod = prod >> GAIN_FRAC;
    return (prod > (GAIN_W+PIX_W)'((1 << PIX_W) - 1)) ? '1 : prod[PIX_W-1:0];
  endfunction

  function automatic logic [GAIN_W-1:0] gain_of(input col_t c, input logic [GAIN_W-1:0] kr,
                                                input logic [GAIN_W-1:0] kg,
                                                input logic [GAIN_W-1:0] kb);
    unique case (c)
      C_R:     return kr;
      C_G:     return kg;
      default: return kb;
    endcase
  endfunction

  // gains in use: the latest computed gains, taken over at each frame start so
  // that a whole frame is corrected with one set
  logic [GAIN_W-1:0] a_r, a_g, a_b;

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      a_r <= ONE; a_g <= ONE; a_b <= ONE;
    end else if (frame_start) begin
      a_r <= k_r; a_g <= k_g; a_b <= k_b;
    end
  end

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      out_valid <= 1'b0; out0 <= '0; out1 <= '0;
    end else begin
      out_valid <= in_valid;
      out0 <= enable ? apply(pix0, gain_of(c0, a_r, a_g, a_b)) : pix0;
      out1 <= enable ? apply(pix1, gain_of(c1, a_r, a_g, a_b)) : pix1;
    end
  end
endmodule
