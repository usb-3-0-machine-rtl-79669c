// tb_usb3_camera_4lane: the camera bridge in a reduced-lane readout mode.
//
// The sensor model drives only four lanes (two pairs), as in the sensor's
// 4-lane binning readout; the other six lane inputs stay idle and their
// pairs are masked off with buf_active = 00011. The bridge must synchronize
// the two active pairs, ignore the idle ones for sync_all, collect the
// columns from two FIFOs only and deliver 4 frames that fx3_checker verifies
// word for word (50 words per lane, 200 columns, 12 active lines).
//
// The lane count of this mode follows the described sensor readout modes;
// the sizes are reduced and are this testbench's choices.
module tb_usb3_camera_4lane;
  localparam int NLANES = 10, SLANES = 4, WORDS = 50, VBLANK = 2, ACTIVE = 12, VTOTAL = 16;
  localparam int NFRAMES = 4;

  logic rst = 1'b0;
  logic inck = 0, mem_rd_clk = 0, pclk = 0, ctl_clk = 0;
  always #5  inck = ~inck;
  always #3  mem_rd_clk = ~mem_rd_clk;
  always #10 pclk = ~pclk;
  always #2  ctl_clk = ~ctl_clk;

  logic              rx_inclock;
  logic [NLANES-1:0] rx_in;
  logic              xhs, xvs;
  logic              fx3_pclk, fx3_h, fx3_v;
  logic [31:0]       fx3_dq;
  logic              i2c_valid = 0, i2c_ready, i2c_read = 0, i2c_done, i2c_nack;
  logic [15:0]       i2c_addr = '0;
  logic [7:0]        i2c_wdata = '0, i2c_rdata;
  logic              scl_oe, sda_oe, slv_oe, scl, sda;
  logic              rx_outclk, sync_all, gains_valid;
  logic [NLANES-1:0] lane_sync;
  logic [4:0]        buf_ovf, slip_ev;
  logic [15:0]       lines_col, col_err, k_r, k_g, k_b;
  logic [31:0]       col_stall, frame_no, blank_lines, starve;

  assign scl = !scl_oe;
  assign sda = !(sda_oe || slv_oe);

  logic [SLANES-1:0] s_lanes;
  assign rx_in = {(NLANES - SLANES)'(0), s_lanes};

  sensor_model #(.NLANES(SLANES), .WORDS(WORDS), .HBLANK(4), .VBLANK(VBLANK),
                 .ACTIVE(ACTIVE), .BIT(4)) u_sensor (
    .xhs, .xvs, .clk_out(rx_inclock), .lanes(s_lanes));

  usb3_camera_top #(
    .NLANES(NLANES), .BUF_DEPTH(128), .ADP_DEPTH(64), .SLIP_TIMEOUT(120),
    .WB_PIX_START(4), .WB_PIX_CNT(192), .WB_LINE_START(2), .WB_LINE_CNT(8), .I2C_DIV(4)
  ) dut (
    .rst, .rx_inclock, .rx_in, .inck, .sensor_en(1'b1), .hmax(16'd300), .vmax(16'(VTOTAL)),
    .o_sensor_xhs(xhs), .o_sensor_xvs(xvs), .mem_rd_clk, .pclk, .buf_active(5'b00011),
    .wb_enable(1'b1), .o_fx3_pclk(fx3_pclk), .o_fx3_dq(fx3_dq), .o_fx3_h(fx3_h),
    .o_fx3_v(fx3_v), .ctl_clk, .i2c_cmd_valid(i2c_valid), .i2c_cmd_ready(i2c_ready),
    .i2c_cmd_read(i2c_read), .i2c_cmd_dev(7'h1A), .i2c_cmd_addr(i2c_addr),
    .i2c_cmd_wdata(i2c_wdata), .i2c_rdata, .i2c_done, .i2c_nack, .i2c_scl_oe(scl_oe),
    .i2c_sda_oe(sda_oe), .i2c_sda_i(sda), .rx_outclk, .lane_sync, .sync_all,
    .buf_overflow(buf_ovf), .slip_event(slip_ev), .lines_collected(lines_col),
    .collect_errors(col_err), .collect_stalls(col_stall), .frame_no, .k_r, .k_g, .k_b,
    .gains_valid, .blank_lines, .fx3_starve(starve));

  i2c_slave_model #(.ADDR(7'h1A)) u_slave (.scl, .sda, .sda_oe(slv_oe));

  fx3_checker #(.DWORDS(SLANES * WORDS / 2), .ACTIVE(ACTIVE), .PIX_START(4), .PIX_CNT(192),
                .LINE_START(2), .LINE_CNT(8)) u_chk (
    .pclk(fx3_pclk), .dq(fx3_dq), .h(fx3_h), .v(fx3_v), .k_r, .k_g, .k_b, .gains_valid);

  int checks = 0, failures = 0;
  int slips = 0;
  always @(posedge rx_outclk) if (slip_ev != '0) slips++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #1 rst = 1'b1;
    #100 rst = 1'b0;
    wait (u_chk.frames == NFRAMES);
    #2000;
    check(u_chk.lines == NFRAMES * ACTIVE, "line count");
    check(frame_no == 32'(NFRAMES), "frame number");
    check(col_err == 0, "collector errors");
    check(buf_ovf == '0, "no channel FIFO overflow");
    check(sync_all && lane_sync[SLANES-1:0] == '1, "active lanes in sync");
    check(lane_sync[NLANES-1:SLANES] == '0, "idle lanes not in sync");
    check(slips > 0, "bit slip happened");
    check(u_chk.frame_hdrs == NFRAMES, "frame headers");
    check(u_chk.wb_updates >= NFRAMES - 1, "gain updates");
    check(u_chk.corrected > 0, "white balance changed pixels");
    $display("slips=%0d stalls=%0d starve=%0d", slips, col_stall, starve);
    checks   += u_chk.checks;
    failures += u_chk.failures;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #3_000_000;
    failures++;
    $display("watchdog: frames=%0d lines=%0d sync=%b collected=%0d err=%0d blank=%0d", u_chk.frames, u_chk.lines, lane_sync, lines_col, col_err, blank_lines);
    $display("TB_RESULT checks=%0d failures=%0d", checks + u_chk.checks, failures + u_chk.failures);
    $finish;
  end
endmodule
