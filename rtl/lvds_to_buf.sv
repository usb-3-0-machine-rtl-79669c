// lvds_to_buf: writes one receiver's lines (two lanes) into its channel FIFO.
//
// Write control, in the rx_outclk domain:
//   INIT     wait until every active lane is synchronised (sync_all);
//   WAIT_V0  wait for V (sensor vertical sync, XVS) low ...
//   WAIT_V1  ... and its rising edge, so capture starts on a frame boundary;
//   WAIT_LN  wait for line_data_start;
//   WRITE    write one word per cycle while line_data_start is high: the two
//            PIX_W-bit lane words zero-extended into 16-bit lanes,
//            {6'b0, lane1, 6'b0, lane0} for 10 bits, {4'b0, ...} for 12;
//   SEP      write SEP_WORDS zero words to separate lines, then return to
//            WAIT_LN, or to INIT if sync_all has dropped.
// V is synchronised into rx_outclk with two flip-flops. The FIFO read side
// (mem_rd_clk, rd_req, imx_buf_out, mem_ep) belongs to the collector; a read
// word appears on imx_buf_out one mem_rd_clk cycle after rd_req.
//
// The steps, the lane packing (10- and 12-bit forms) and the zero separator follow the described
// write process; returning to WAIT_LN after each line (instead of waiting for a
// new V edge) and the FIFO depth are this design's choices.
module lvds_to_buf
  import cam_pkg::*;
#(
  parameter int unsigned PIX_W     = 10,   // sensor word width: 10 or 12
  parameter int unsigned DEPTH     = 512,  // 32-bit words
  parameter int unsigned SEP_WORDS = 8     // zero words after each line
) (
  input  logic                     rst,
  input  logic                     rx_outclk,
  input  logic                     mem_rd_clk,
  input  logic                     rd_req,
  input  logic                     V,                // XVS
  input  logic                     line_data_start,
  input  logic                     sync_all,
  input  logic [PIX_W-1:0]         imx_out0,
  input  logic [PIX_W-1:0]         imx_out1,
  output logic                     mem_ep,
  output logic [31:0]              imx_buf_out,
  output logic [$clog2(DEPTH):0]   mem_used,         // read-side fill level
  output logic                     overflow          // a write was dropped (sticky)
);
  typedef enum logic [2:0] {INIT, WAIT_V0, WAIT_V1, WAIT_LN, WRITE, SEP} wst_t;
  wst_t st;

  logic v_s1, v_s2;
  logic [$clog2(SEP_WORDS+1)-1:0] sep_cnt;
  logic        wr_req;
  logic [31:0] wr_data;
  logic        wr_full, wr_ovf;
  logic [$clog2(DEPTH):0] wr_used;

  always_ff @(posedge rx_outclk or posedge rst) begin
    if (rst) begin
      st <= INIT; v_s1 <= 1'b0; v_s2 <= 1'b0; sep_cnt <= '0;
      wr_req <= 1'b0; wr_data <= '0; overflow <= 1'b0;
    end else begin
      v_s1 <= V;
      v_s2 <= v_s1;
      wr_req <= 1'b0;
      if (wr_ovf) overflow <= 1'b1;
      unique case (st)
        INIT:    if (sync_all) st <= WAIT_V0;
        WAIT_V0: if (!v_s2) st <= WAIT_V1;
        WAIT_V1: if (v_s2)  st <= WAIT_LN;
        WAIT_LN: if (!sync_all) st <= INIT;
                 else if (line_data_start) begin
                   st      <= WRITE;
                   wr_req  <= 1'b1;
                   wr_data <= {16'(imx_out1), 16'(imx_out0)};
                 end
        WRITE:   if (line_data_start) begin
                   wr_req  <= 1'b1;
                   wr_data <= {16'(imx_out1), 16'(imx_out0)};
                 end else begin
                   st      <= SEP;
                   sep_cnt <= '0;
                 end
        SEP:     if (sep_cnt == ($bits(sep_cnt))'(SEP_WORDS)) st <= sync_all ? WAIT_LN : INIT;
                 else begin
                   sep_cnt <= sep_cnt + 1'b1;
                   wr_req  <= 1'b1;
                   wr_data <= '0;
                 end
        default: st <= INIT;
      endcase
    end
  end

  dp_fifo #(.WIDTH(32), .DEPTH(DEPTH)) u_fifo (
    .rst, .wr_clk(rx_outclk), .wr_req, .data(wr_data), .wr_full, .wr_used,
    .wr_overflow(wr_ovf), .rd_clk(mem_rd_clk), .rd_req, .q(imx_buf_out),
    .rd_empty(mem_ep), .rd_used(mem_used)
  );
endmodule
