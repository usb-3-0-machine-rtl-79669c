// mem_collect: merges the channel FIFOs into one stream in sensor column order.
//
// The sensor sends neighbouring columns on neighbouring lanes, so one word
// from each channel FIFO, taken in FIFO order, gives the pixels of a line in
// order. Per line, in the mem_rd_clk domain:
//   WAIT   wait until every active FIFO holds data;
//   HUNT   read each active FIFO, discarding separator zeros, until it shows
//          the first sync-code word (all ones in both lanes: 3FFh, or
//          FFFh for PIX_W = 12);
//   CODE   read the remaining three code words of every active FIFO, keeping
//          the status word of the first one;
//   SAV    write one start code as two words: {000h,3FFh}, {status,000h}
//          (FFFh for PIX_W = 12)
//          (16-bit lanes, low lane first in time);
//   DATA   round-robin: read a word from each active FIFO and write it, until
//          the first active FIFO shows a code word (the EAV); the other FIFOs'
//          code words of that round are read and dropped;
//   CODE   as above, then EAV: one end code in the same two-word form;
//   SEP    write SEP_WORDS zero words (one more if the line so far has an odd
//          word count, so a line fills whole 64-bit words downstream).
// Each transfer takes two cycles: rd_req, then the write of the word that the
// FIFO returns. A read is only issued while the adaptive FIFO is not full, so
// a full adaptive FIFO stalls the collector (stall_cycles counts those).
// Words that break the pattern (a lane missing its code) are dropped and
// counted in err_count.
//
// The SAV-scan, single-SAV/EAV write and zero separation follow the described
// collection process; the two-word code layout follows the captured write
// traces; the parity padding and error counting are this design's choices.
module mem_collect #(
  parameter int unsigned PIX_W     = 10,  // sensor word width: 10 or 12
  parameter int unsigned NBUF      = 5,   // channel FIFOs (two lanes each)
  parameter int unsigned SEP_WORDS = 2    // 32-bit zero words after each line
) (
  input  logic                 clk,            // mem_rd_clk
  input  logic                 rst,
  input  logic [NBUF-1:0]      active,         // FIFOs in use, lowest first
  input  logic [NBUF-1:0]      mem_ep,
  input  logic [31:0]          buf_data [NBUF],
  output logic [NBUF-1:0]      rd_req,
  input  logic                 adp_full,
  output logic                 adp_wr,
  output logic [31:0]          adp_data_in,
  output logic [15:0]          line_count,     // lines written (wraps)
  output logic [15:0]          err_count,
  output logic [31:0]          stall_cycles
);
  localparam int unsigned IW = (NBUF > 1) ? $clog2(NBUF) : 1;
  localparam logic [15:0] ONES   = 16'((1 << PIX_W) - 1);   // first code word
  localparam logic [31:0] CODE_W = {ONES, ONES};

  typedef enum logic [3:0] {WAIT, HUNT, HUNT_CHK, CODE, CODE_CHK, WR_CODE0, WR_CODE1,
                            DATA, DATA_CHK, SEP} cst_t;
  cst_t st;

  logic [IW-1:0] idx;
  logic [1:0]    code_rd;     // code words read per FIFO in CODE (0..2)
  logic          is_eav;      // CODE belongs to the end code
  logic          eav_round;   // DATA round that carries the EAV
  logic [PIX_W-1:0] status;
  logic          parity;      // odd number of words written in this line
  logic [$clog2(SEP_WORDS+2)-1:0] sep_cnt;

  logic [IW-1:0] first_idx, last_idx, next_idx;
  logic          idx_last;
  always_comb begin
    first_idx = '0;
    last_idx  = '0;
    for (int k = NBUF - 1; k >= 0; k--) if (active[k]) first_idx = IW'(k);
    for (int k = 0; k < NBUF; k++)      if (active[k]) last_idx  = IW'(k);
    next_idx = first_idx;
    for (int k = NBUF - 1; k >= 0; k--) if (active[k] && IW'(k) > idx) next_idx = IW'(k);
    idx_last = (idx == last_idx);
  end

  logic all_ready;
  assign all_ready = ((~mem_ep & active) == active) && (active != '0);

  logic [31:0] rd_word;
  assign rd_word = buf_data[idx];

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      st <= WAIT; idx <= '0; code_rd <= '0; is_eav <= 1'b0; eav_round <= 1'b0;
      status <= '0; parity <= 1'b0; sep_cnt <= '0; rd_req <= '0; adp_wr <= 1'b0;
      adp_data_in <= '0; line_count <= '0; err_count <= '0; stall_cycles <= '0;
    end else begin
      rd_req <= '0;
      adp_wr <= 1'b0;
      unique case (st)
        WAIT: if (all_ready) begin idx <= first_idx; st <= HUNT; end
        HUNT: if (!mem_ep[idx]) begin rd_req[idx] <= 1'b1; st <= HUNT_CHK; end
        HUNT_CHK: begin
          st <= HUNT;
          if (rd_word == CODE_W) begin
            if (idx_last) begin idx <= first_idx; code_rd <= '0; is_eav <= 1'b0; st <= CODE; end
            else idx <= next_idx;
          end
        end
        CODE: if (!mem_ep[idx]) begin rd_req[idx] <= 1'b1; st <= CODE_CHK; end
        CODE_CHK: begin
          st <= CODE;
          if (code_rd == 2'd2 && idx == first_idx) status <= rd_word[PIX_W-1:0];
          if ((code_rd != 2'd2 && rd_word != '0) ||
              (code_rd == 2'd2 && rd_word[PIX_W-1:0] != rd_word[16 +: PIX_W])) err_count <= err_count + 1'b1;
          idx <= next_idx;
          if (idx_last) begin
            if (code_rd == 2'd2) st <= WR_CODE0;
            else code_rd <= code_rd + 1'b1;
          end
        end
        WR_CODE0: if (!adp_full) begin
          adp_wr <= 1'b1; adp_data_in <= {16'h0000, ONES};
          st <= WR_CODE1;
        end
        WR_CODE1: if (!adp_full) begin
          adp_wr <= 1'b1; adp_data_in <= {16'(status), 16'h0000};
          if (is_eav) begin
            sep_cnt <= '0; st <= SEP;
          end else begin
            parity <= 1'b0; idx <= first_idx; eav_round <= 1'b0; st <= DATA;
          end
        end
        DATA: if (adp_full) stall_cycles <= stall_cycles + 1'b1;
              else if (!mem_ep[idx]) begin rd_req[idx] <= 1'b1; st <= DATA_CHK; end
        DATA_CHK: begin
          st  <= DATA;
          idx <= next_idx;
          if (rd_word == CODE_W && (idx == first_idx || eav_round)) begin
            eav_round <= 1'b1;
          end else if (eav_round) begin
            err_count <= err_count + 1'b1;          // lane without its end code
          end else begin
            adp_wr <= 1'b1; adp_data_in <= rd_word; parity <= ~parity;
          end
          if (idx_last && (eav_round || (rd_word == CODE_W && idx == first_idx))) begin
            code_rd <= '0; is_eav <= 1'b1; st <= CODE;
          end
        end
        SEP: if (sep_cnt == ($bits(sep_cnt))'(SEP_WORDS + (parity ? 1 : 0))) begin
               line_count <= line_count + 1'b1; st <= WAIT;
             end else if (!adp_full) begin
               adp_wr <= 1'b1; adp_data_in <= '0; sep_cnt <= sep_cnt + 1'b1;
             end
        default: st <= WAIT;
      endcase
    end
  end
endmodule
