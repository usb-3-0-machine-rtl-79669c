// tb_usb3_camera_full: the camera bridge at its default parameters, full frames.
//
// The sensor model sends the 4K2K 10-bit readout on 10 lanes: 425 pixel
// words per lane (4250 columns, covering the 124 + 4096 columns of the
// white-balance window), 17 blanking and 2182 active lines, 2199 lines per
// frame as generated by the design (hmax 2300 INCK of 10 ns). pclk is 100 MHz.
// Two complete frames are checked word for word by fx3_checker: the first
// with unity gains, the second with the gains computed from the first.
//
// Line and frame sizes follow the described 4K2K readout (mode 4); the
// pixel pattern and clock rates are this testbench's choices.
module tb_usb3_camera_full;
  localparam int NLANES = 10, WORDS = 425, VBLANK = 17, ACTIVE = 2182, VTOTAL = 2199;
  localparam int NFRAMES = 2;

  logic rst = 1'b0;
  logic inck = 0, mem_rd_clk = 0, pclk = 0, ctl_clk = 0;
  always #5 inck = ~inck;
  always #2 mem_rd_clk = ~mem_rd_clk;
  always #5 pclk = ~pclk;
  always #5 ctl_clk = ~ctl_clk;

  logic              rx_inclock;
  logic [NLANES-1:0] rx_in;
  logic              xhs, xvs;
  logic              fx3_pclk, fx3_h, fx3_v;
  logic [31:0]       fx3_dq;
  logic              rx_outclk, sync_all, gains_valid, i2c_ready, i2c_done, i2c_nack;
  logic              scl_oe, sda_oe;
  logic [7:0]        i2c_rdata;
  logic [NLANES-1:0] lane_sync;
  logic [4:0]        buf_ovf, slip_ev;
  logic [15:0]       lines_col, col_err, k_r, k_g, k_b;
  logic [31:0]       col_stall, frame_no, blank_lines, starve;

  sensor_model #(.NLANES(NLANES), .WORDS(WORDS), .HBLANK(8), .VBLANK(VBLANK),
                 .ACTIVE(ACTIVE), .BIT(4)) u_sensor (
    .xhs, .xvs, .clk_out(rx_inclock), .lanes(rx_in));

  usb3_camera_top dut (
    .rst, .rx_inclock, .rx_in, .inck, .sensor_en(1'b1), .hmax(16'd2300), .vmax(16'(VTOTAL)),
    .o_sensor_xhs(xhs), .o_sensor_xvs(xvs), .mem_rd_clk, .pclk, .buf_active(5'b11111),
    .wb_enable(1'b1), .o_fx3_pclk(fx3_pclk), .o_fx3_dq(fx3_dq), .o_fx3_h(fx3_h),
    .o_fx3_v(fx3_v), .ctl_clk, .i2c_cmd_valid(1'b0), .i2c_cmd_ready(i2c_ready),
    .i2c_cmd_read(1'b0), .i2c_cmd_dev(7'h1A), .i2c_cmd_addr(16'h0),
    .i2c_cmd_wdata(8'h0), .i2c_rdata, .i2c_done, .i2c_nack, .i2c_scl_oe(scl_oe),
    .i2c_sda_oe(sda_oe), .i2c_sda_i(1'b1), .rx_outclk, .lane_sync, .sync_all,
    .buf_overflow(buf_ovf), .slip_event(slip_ev), .lines_collected(lines_col),
    .collect_errors(col_err), .collect_stalls(col_stall), .frame_no, .k_r, .k_g, .k_b,
    .gains_valid, .blank_lines, .fx3_starve(starve));

  fx3_checker #(.DWORDS(NLANES * WORDS / 2), .ACTIVE(ACTIVE), .PIX_START(124), .PIX_CNT(4096),
                .LINE_START(18), .LINE_CNT(2160), .VERBOSE(1)) u_chk (
    .pclk(fx3_pclk), .dq(fx3_dq), .h(fx3_h), .v(fx3_v), .k_r, .k_g, .k_b, .gains_valid);

  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #1 rst = 1'b1;
    #100 rst = 1'b0;
    wait (u_chk.frames == NFRAMES);
    #1000;
    check(u_chk.lines == NFRAMES * ACTIVE, "line count");
    check(col_err == 0, "collector errors");
    check(buf_ovf == '0, "no channel FIFO overflow");
    check(u_chk.wb_updates >= 1, "gains computed");
    check(u_chk.corrected > 0, "white balance applied");
    $display("gains k_r=%0d k_g=%0d k_b=%0d (1024 = 1.0), stalls=%0d", k_r, k_g, k_b, col_stall);
    checks   += u_chk.checks;
    failures += u_chk.failures;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #200_000_000;
    failures++;
    $display("watchdog: frames=%0d lines=%0d sync=%b", u_chk.frames, u_chk.lines, lane_sync);
    $display("TB_RESULT checks=%0d failures=%0d", checks + u_chk.checks, failures + u_chk.failures);
    $finish;
  end
endmodule
