// usb3_camera_top: FPGA bridge between a multi-lane sub-LVDS image sensor and
// the 32-bit GPIF II video port of a USB 3.0 controller (Cypress FX3).
//
// Datapath (sensor lanes -> deserializers -> sync detection ->
// channel FIFOs -> collector -> adaptive FIFO -> FX3 port):
//   * NLANES sensor lanes (DOA, DOB, ...) arrive as DDR bit streams on
//     rx_inclock. Lanes are grouped in pairs; each pair has a 2-lane
//     deserializer (lvds_deser), a sync-code detector that also aligns the word
//     boundary by bit slip (lvds_comp), and a write controller with its own
//     dual-clock FIFO (lvds_to_buf).
//   * mem_collect reads the pair FIFOs round-robin on mem_rd_clk, so pixels come
//     out in column order, and writes each line with one SAV and one EAV into
//     the adaptive FIFO (adp_fifo, 32-bit in, 64-bit out).
//   * mem_to_fx3 reads the adaptive FIFO on pclk, white-balances the pixels,
//     prefixes each line with a frame header or two zero words, and drives
//     o_fx3_dq/o_fx3_h/o_fx3_v.
//   * sensor_sync_gen drives XHS/XVS to the sensor (slave mode) from inck;
//     i2c_master gives register access to the sensor.
// Clocks: rx_inclock (lane bit clock, DDR), the word clock derived from it by
// the first deserializer (shared by all pairs), mem_rd_clk, pclk, inck and
// ctl_clk are independent; the PLLs that make them are outside this module.
// rst is asynchronous and resets every domain.
// Data words carry 10-bit (default) or 12-bit pixels in 16-bit lanes, set by
// PIX_W to match the sensor's readout mode.
//
// The chain of blocks, the pairing of lanes per FIFO, the slave-mode sync and
// the FX3 line format follow the described camera; sharing one word clock
// between all pairs and bringing the clocks in as ports are this design's
// choices.
module usb3_camera_top
  import cam_pkg::*;
#(
  parameter int unsigned PIX_W         = 10,     // sensor word width: 10 or 12 (readout mode)
  parameter int unsigned NLANES        = 10,     // sensor data lanes in use
  parameter int unsigned BUF_DEPTH     = 512,    // per-pair FIFO, 32-bit words
  parameter int unsigned ADP_DEPTH     = 512,    // adaptive FIFO, 32-bit words
  parameter int unsigned SLIP_TIMEOUT  = 1024,   // words without a sync code before a bit slip
  parameter int unsigned WB_PIX_START  = 124,
  parameter int unsigned WB_PIX_CNT    = 4096,
  parameter int unsigned WB_LINE_START = 18,
  parameter int unsigned WB_LINE_CNT   = 2160,
  parameter int unsigned I2C_DIV       = 125
) (
  input  logic                 rst,
  // sensor lanes
  input  logic                 rx_inclock,
  input  logic [NLANES-1:0]    rx_in,
  // sensor sync (slave mode)
  input  logic                 inck,
  input  logic                 sensor_en,
  input  logic [15:0]          hmax,
  input  logic [15:0]          vmax,
  output logic                 o_sensor_xhs,
  output logic                 o_sensor_xvs,
  // collection and output clocks
  input  logic                 mem_rd_clk,
  input  logic                 pclk,
  input  logic [NLANES/2-1:0]  buf_active,
  input  logic                 wb_enable,
  // FX3 GPIF II
  output logic                 o_fx3_pclk,
  output logic [31:0]          o_fx3_dq,
  output logic                 o_fx3_h,
  output logic                 o_fx3_v,
  // sensor register access
  input  logic                 ctl_clk,
  input  logic                 i2c_cmd_valid,
  output logic                 i2c_cmd_ready,
  input  logic                 i2c_cmd_read,
  input  logic [6:0]           i2c_cmd_dev,
  input  logic [15:0]          i2c_cmd_addr,
  input  logic [7:0]           i2c_cmd_wdata,
  output logic [7:0]           i2c_rdata,
  output logic                 i2c_done,
  output logic                 i2c_nack,
  output logic                 i2c_scl_oe,
  output logic                 i2c_sda_oe,
  input  logic                 i2c_sda_i,
  // status
  output logic                 rx_outclk,
  output logic [NLANES-1:0]    lane_sync,
  output logic                 sync_all,
  output logic [NLANES/2-1:0]  buf_overflow,
  output logic [NLANES/2-1:0]  slip_event,
  output logic [15:0]          lines_collected,
  output logic [15:0]          collect_errors,
  output logic [31:0]          collect_stalls,
  output logic [31:0]          frame_no,
  output logic [15:0]          k_r,
  output logic [15:0]          k_g,
  output logic [15:0]          k_b,
  output logic                 gains_valid,
  output logic [31:0]          blank_lines,
  output logic [31:0]          fx3_starve
);
  localparam int unsigned NP = NLANES / 2;

  logic [NP-1:0]         pair_clk;
  logic [2*PIX_W-1:0]    rx_word   [NP];
  logic [1:0]            align     [NP];
  logic [NP-1:0]         line_start;
  logic [PIX_W-1:0]      d0 [NP];
  logic [PIX_W-1:0]      d1 [NP];
  logic [NP-1:0]         mem_ep;
  logic [NP-1:0]         rd_req;
  logic [31:0]           buf_out [NP];

  assign rx_outclk = pair_clk[0];

  // sync_all: every lane of every active pair is synchronised
  always_comb begin
    sync_all = (buf_active != '0);
    for (int p = 0; p < NP; p++)
      if (buf_active[p] && !(lane_sync[2*p] && lane_sync[2*p+1])) sync_all = 1'b0;
  end

  for (genvar p = 0; p < NP; p++) begin : g_pair
    logic line_v_unused;

    lvds_deser #(.CHANNELS(2), .FACTOR(PIX_W)) u_deser (
      .rx_inclock, .rx_data_reset(rst), .rx_in(rx_in[2*p +: 2]),
      .rx_channel_data_align(align[p]), .rx_outclk(pair_clk[p]), .rx_out(rx_word[p])
    );

    lvds_comp #(.PIX_W(PIX_W), .SLIP_TIMEOUT(SLIP_TIMEOUT)) u_comp (
      .rx_outclk, .rst,
      .imx_out0(rx_word[p][PIX_W-1:0]), .imx_out1(rx_word[p][2*PIX_W-1:PIX_W]),
      .rx_channel_data_align(align[p]), .sync(lane_sync[2*p +: 2]),
      .line_start(line_start[p]), .line_v(line_v_unused),
      .imx_out0x(d0[p]), .imx_out1x(d1[p]), .slip_event(slip_event[p])
    );

    lvds_to_buf #(.PIX_W(PIX_W), .DEPTH(BUF_DEPTH)) u_buf (
      .rst, .rx_outclk, .mem_rd_clk, .rd_req(rd_req[p]), .V(o_sensor_xvs),
      .line_data_start(line_start[p]), .sync_all, .imx_out0(d0[p]), .imx_out1(d1[p]),
      .mem_ep(mem_ep[p]), .imx_buf_out(buf_out[p]), .mem_used(),
      .overflow(buf_overflow[p])
    );
  end

  logic        adp_full, adp_wr, adp_rd, adp_emp;
  logic [31:0] adp_data_in;
  logic [63:0] adp_q;

  mem_collect #(.PIX_W(PIX_W), .NBUF(NP)) u_collect (
    .clk(mem_rd_clk), .rst, .active(buf_active), .mem_ep, .buf_data(buf_out),
    .rd_req, .adp_full, .adp_wr, .adp_data_in, .line_count(lines_collected),
    .err_count(collect_errors), .stall_cycles(collect_stalls)
  );

  adp_fifo #(.DEPTH(ADP_DEPTH)) u_adp (
    .rst, .wr_clk(mem_rd_clk), .adp_wr, .adp_data_in, .adp_full, .adp_usedw(),
    .rd_clk(pclk), .adp_rd, .q(adp_q), .adp_emp
  );

  mem_to_fx3 #(
    .PIX_W(PIX_W),
    .WB_PIX_START(WB_PIX_START), .WB_PIX_CNT(WB_PIX_CNT),
    .WB_LINE_START(WB_LINE_START), .WB_LINE_CNT(WB_LINE_CNT)
  ) u_fx3 (
    .pclk, .rst, .wb_enable, .fifo_q(adp_q), .adp_emp, .adp_rd,
    .o_fx3_pclk, .o_fx3_dq, .o_fx3_h, .o_fx3_v, .frame_no, .k_r, .k_g, .k_b,
    .gains_valid, .blank_lines, .starve_cycles(fx3_starve)
  );

  sensor_sync_gen u_sync (
    .inck, .rst, .enable(sensor_en), .hmax, .vmax, .xhs(o_sensor_xhs),
    .xvs(o_sensor_xvs), .line_cnt(), .frame_tick()
  );

  i2c_master #(.CLK_DIV(I2C_DIV)) u_i2c (
    .clk(ctl_clk), .rst, .cmd_valid(i2c_cmd_valid), .cmd_ready(i2c_cmd_ready),
    .cmd_read(i2c_cmd_read), .cmd_dev(i2c_cmd_dev), .cmd_addr(i2c_cmd_addr),
    .cmd_wdata(i2c_cmd_wdata), .rdata(i2c_rdata), .done(i2c_done), .nack(i2c_nack),
    .scl_oe(i2c_scl_oe), .sda_oe(i2c_sda_oe), .sda_i(i2c_sda_i)
  );
endmodule
