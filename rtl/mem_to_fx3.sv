// mem_to_fx3: drives the FX3 GPIF II parallel video port from the adaptive FIFO.
//
// The FIFO delivers 64-bit entries; a four-word queue splits them into 32-bit
// words (low half first) and keeps one word per pclk flowing. The word stream
// is parsed per line: a line starts with the start code pair {000h,3FFh},
// {status,000h} and ends with the same pair carrying an end-code status.
// For an active line (status V=0) the port sends, with o_fx3_h and o_fx3_v
// high:
//   two header words - C00C5555h and the frame number on the first line of
//   a frame, two zero words on every other line -
//   the start code pair, the pixel words (two PIX_W-bit pixels in 16-bit lanes,
//   white-balanced), and the end code pair.
// Lines marked as blanking (V=1) are read and dropped; the first blanking line
// after active lines ends the frame: o_fx3_v falls, the frame number
// increments, and the white-balance block computes new gains. o_fx3_h is low
// while no word is sent (between lines, or when the FIFO runs dry), and the
// FX3 only samples data while both H and V are high. Outputs are registered;
// o_fx3_pclk is pclk forwarded.
//
// Header words, code framing and the H/V capture rule follow the described
// FX3 format; dropping blanking lines and letting H fall on an empty FIFO are
// this design's choices.
module mem_to_fx3
  import cam_pkg::*;
#(
  parameter int unsigned PIX_W         = 10,    // sensor word width: 10 or 12
  parameter int unsigned WB_PIX_START  = 124,
  parameter int unsigned WB_PIX_CNT    = 4096,
  parameter int unsigned WB_LINE_START = 18,
  parameter int unsigned WB_LINE_CNT   = 2160
) (
  input  logic          pclk,
  input  logic          rst,
  input  logic          wb_enable,
  // adaptive FIFO read side
  input  logic [63:0]   fifo_q,
  input  logic          adp_emp,
  output logic          adp_rd,
  // GPIF II
  output logic          o_fx3_pclk,
  output logic [31:0]   o_fx3_dq,
  output logic          o_fx3_h,
  output logic          o_fx3_v,
  // status
  output logic [31:0]   frame_no,
  output logic [15:0]   k_r,
  output logic [15:0]   k_g,
  output logic [15:0]   k_b,
  output logic          gains_valid,
  output logic [31:0]   blank_lines,     // blanking lines dropped
  output logic [31:0]   starve_cycles    // cycles a line waited for FIFO data
);
  localparam logic [31:0] CODE0 = 32'((1 << PIX_W) - 1);

  assign o_fx3_pclk = pclk;

  // ---------------- word queue ----------------
  logic [31:0] wq [4];
  logic [2:0]  cnt;
  logic        pend;
  logic        pop;
  logic [2:0]  cnt_pop;
  logic [31:0] word;
  logic        wvalid;

  assign word    = wq[0];
  assign wvalid  = (cnt != '0);
  assign cnt_pop = cnt - {2'b0, pop};
  assign adp_rd  = !pend && !adp_emp && (cnt_pop <= 3'd2);

  always_ff @(posedge pclk or posedge rst) begin
    if (rst) begin
      cnt <= '0; pend <= 1'b0;
      for (int k = 0; k < 4; k++) wq[k] <= '0;
    end else begin
      logic [31:0] nq [4];
      for (int k = 0; k < 4; k++) nq[k] = wq[k];
      if (pop) for (int k = 0; k < 3; k++) nq[k] = wq[k+1];
      if (pend) begin
        nq[cnt_pop[1:0]]        = fifo_q[31:0];
        nq[cnt_pop[1:0] + 2'd1] = fifo_q[63:32];
      end
      for (int k = 0; k < 4; k++) wq[k] <= nq[k];
      cnt  <= cnt_pop + (pend ? 3'd2 : 3'd0);
      pend <= adp_rd;
    end
  end

  // ---------------- line parser ----------------
  typedef enum logic [3:0] {HUNT, STAT, HDR0, HDR1, SAV0, SAV1, DATA, EAV1, SKIP, SKIP1} pst_t;
  pst_t st;
  logic [PIX_W-1:0] status;
  logic       in_frame;     // a line of the current frame has been sent
  logic       v_flag;       // frame active (drives o_fx3_v)

  // word presented to the output stage this cycle
  logic        s_valid, s_data;
  logic [31:0] s_word;
  logic        wb_frame_start, wb_frame_end, wb_line_start;

  always_comb begin
    pop = 1'b0; s_valid = 1'b0; s_data = 1'b0; s_word = '0;
    unique case (st)
      HUNT, STAT, SKIP, SKIP1: pop = wvalid;
      HDR0: begin s_valid = 1'b1; s_word = in_frame ? '0 : FRAME_MARK; end
      HDR1: begin s_valid = 1'b1; s_word = in_frame ? '0 : frame_no;   end
      SAV0: begin s_valid = 1'b1; s_word = CODE0; end
      SAV1: begin s_valid = 1'b1; s_word = {16'(status), 16'h0000}; end
      DATA, EAV1: begin
        pop     = wvalid;
        s_valid = wvalid;
        s_word  = word;
        s_data  = wvalid && (st == DATA) && (word != CODE0);
      end
      default: ;
    endcase
  end

  always_ff @(posedge pclk or posedge rst) begin
    if (rst) begin
      st <= HUNT; status <= '0; in_frame <= 1'b0; v_flag <= 1'b0; frame_no <= '0;
      wb_frame_start <= 1'b0; wb_frame_end <= 1'b0; wb_line_start <= 1'b0;
      blank_lines <= '0; starve_cycles <= '0;
    end else begin
      wb_frame_start <= 1'b0; wb_frame_end <= 1'b0; wb_line_start <= 1'b0;
      if ((st == DATA || st == EAV1) && !wvalid) starve_cycles <= starve_cycles + 1'b1;
      unique case (st)
        HUNT: if (wvalid && word == CODE0) st <= STAT;
        STAT: if (wvalid) begin
          status <= word[16 +: PIX_W];
          if (!is_code_word4(PIX_W_MAX'(word[16 +: PIX_W]), PIX_W) || word[16 + PIX_W - 4])
            st <= HUNT;                                            // not a start code (H=1)
          else if (word[16 + PIX_W - 3]) begin                     // V=1: blanking line
            blank_lines <= blank_lines + 1'b1;
            v_flag <= 1'b0;
            if (in_frame) begin
              in_frame     <= 1'b0;
              frame_no     <= frame_no + 1'b1;
              wb_frame_end <= 1'b1;
            end
            st <= SKIP;
          end else begin
            if (!in_frame) wb_frame_start <= 1'b1;
            v_flag <= 1'b1;
            st <= HDR0;
          end
        end
        HDR0: st <= HDR1;
        HDR1: begin st <= SAV0; wb_line_start <= 1'b1; in_frame <= 1'b1; end
        SAV0: st <= SAV1;
        SAV1: st <= DATA;
        DATA: if (wvalid && word == CODE0) st <= EAV1;
        EAV1: if (wvalid) st <= HUNT;
        SKIP: if (wvalid && word == CODE0) st <= SKIP1;
        SKIP1: if (wvalid) st <= HUNT;
        default: st <= HUNT;
      endcase
    end
  end

  // ---------------- white balance and output stage ----------------
  logic       wb_valid;
  logic [PIX_W-1:0] wb0, wb1;
  logic       d_data;
  logic [31:0] d_word;
  logic       d_valid;

  white_balance #(
    .PIX_W(PIX_W),
    .PIX_START(WB_PIX_START), .PIX_CNT(WB_PIX_CNT),
    .LINE_START(WB_LINE_START), .LINE_CNT(WB_LINE_CNT)
  ) u_wb (
    .clk(pclk), .rst, .enable(wb_enable),
    .frame_start(wb_frame_start), .frame_end(wb_frame_end), .line_start(wb_line_start),
    .in_valid(s_data), .pix0(s_word[PIX_W-1:0]), .pix1(s_word[16 +: PIX_W]),
    .out_valid(wb_valid), .out0(wb0), .out1(wb1),
    .k_r, .k_g, .k_b, .gains_valid
  );

  always_ff @(posedge pclk or posedge rst) begin
    if (rst) begin
      d_valid <= 1'b0; d_data <= 1'b0; d_word <= '0; o_fx3_v <= 1'b0;
    end else begin
      o_fx3_v <= v_flag;
      d_valid <= s_valid;
      d_data  <= s_data;
      d_word  <= s_word;
    end
  end

  always_comb begin
    o_fx3_h  = d_valid;
    o_fx3_dq = d_data ? {16'(wb1), 16'(wb0)} : d_word;
  end
endmodule
