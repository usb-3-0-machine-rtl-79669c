// tb_sensor_sync_gen: checks the XHS/XVS generator.
//
// Measures, in INCK cycles, the distance between XHS falling edges (must be
// hmax), the XHS low width (XHS_W), the distance between XVS falling edges
// (hmax*vmax), the XVS low width (XVS_W) and that every XVS fall coincides
// with an XHS fall. frame_tick must pulse once per frame. The test runs two
// settings (a change of hmax/vmax at run time) and checks that both outputs
// stay high while enable is low.
//
// Falling-edge sync in slave mode follows the described sensor timing; the
// pulse widths are this design's choice.
module tb_sensor_sync_gen;
  localparam int XW = 5, VWD = 7;
  logic inck = 0, rst = 0, en = 0;
  logic [15:0] hmax = 40, vmax = 6;
  logic xhs, xvs, ft;
  logic [15:0] lc;
  int checks = 0, failures = 0;
  longint cyc = 0, last_h = -1, last_v = -1, h_fall = 0, v_fall = 0;
  int nh = 0, nv = 0, nft = 0;
  logic xhs_d = 1, xvs_d = 1;
  bit measure = 0;

  always #5 inck = ~inck;

  sensor_sync_gen #(.XHS_W(XW), .XVS_W(VWD)) dut (
    .inck, .rst, .enable(en), .hmax, .vmax, .xhs, .xvs, .line_cnt(lc), .frame_tick(ft));

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at cycle %0d", msg, cyc); end
  endtask

  always @(posedge inck) begin
    cyc++;
    if (measure) begin
      if (xhs_d && !xhs) begin
        if (last_h >= 0) chk(cyc - last_h == hmax, $sformatf("XHS period %0d", cyc - last_h));
        last_h = cyc; h_fall = cyc; nh++;
      end
      if (!xhs_d && xhs) chk(cyc - h_fall == XW, "XHS width");
      if (xvs_d && !xvs) begin
        if (last_v >= 0) chk(cyc - last_v == longint'(hmax) * vmax, $sformatf("XVS period %0d", cyc - last_v));
        chk(xhs_d && !xhs, "XVS fall without XHS fall");
        last_v = cyc; v_fall = cyc; nv++;
      end
      if (!xvs_d && xvs) chk(cyc - v_fall == VWD, "XVS width");
      if (ft) nft++;
    end
    xhs_d = xhs; xvs_d = xvs;
  end

  task automatic run_setting(input int h, input int v, input int frames);
    hmax = 16'(h); vmax = 16'(v);
    last_h = -1; last_v = -1; nh = 0; nv = 0; nft = 0;
    @(negedge inck) en = 1;
    measure = 1;
    repeat (h * v * frames) @(negedge inck);
    measure = 0;
    chk(nv == frames, $sformatf("%0d frames seen", nv));
    chk(nh == v * frames, $sformatf("%0d lines seen", nh));
    chk(nft == frames, $sformatf("%0d frame ticks", nft));
    @(negedge inck) en = 0;
    repeat (3) @(negedge inck);
  endtask

  initial begin
    #1 rst = 1; #20 rst = 0;
    repeat (20) @(negedge inck);
    chk(xhs && xvs, "outputs low while disabled");
    run_setting(40, 6, 4);
    for (int i = 0; i < 50; i++) begin
      @(negedge inck);
      chk(xhs && xvs, "outputs low while disabled");
    end
    run_setting(23, 11, 3);
    run_setting(546, 3, 2);      // document line length, short frame
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2000000;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
