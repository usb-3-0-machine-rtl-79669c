// sensor_sync_gen: horizontal and vertical sync for the sensor in slave mode.
//
// Runs on the sensor input clock (INCK). A line lasts hmax INCK cycles and a
// frame vmax lines. XHS goes low for XHS_W cycles at the start of every line;
// XVS goes low together with the first line's XHS and stays low for XVS_W
// cycles. The sensor acts on the falling edges. hmax and vmax are inputs, so
// the frame timing can be changed at run time (a new value takes effect at
// the next line end). Outputs are registered one INCK cycle after the counter
// state they decode. While enable is low both outputs stay high and the
// counters hold at zero.
//
// Sync from the FPGA in slave mode, falling-edge timing and the per-mode
// minimum periods (546 INCK per line and 2199 lines per frame for the 4K2K
// 10-bit mode) follow the described design; the pulse widths are this
// design's choice.
module sensor_sync_gen #(
  parameter int unsigned HW     = 16,
  parameter int unsigned VW     = 16,
  parameter int unsigned XHS_W  = 8,    // INCK cycles
  parameter int unsigned XVS_W  = 8     // INCK cycles
) (
  input  logic          inck,
  input  logic          rst,
  input  logic          enable,
  input  logic [HW-1:0] hmax,        // INCK cycles per line (>= 2)
  input  logic [VW-1:0] vmax,        // lines per frame (>= 1)
  output logic          xhs,         // active low
  output logic          xvs,         // active low
  output logic [VW-1:0] line_cnt,
  output logic          frame_tick   // one cycle at each frame start
);
  logic [HW-1:0] hcnt;

  always_ff @(posedge inck or posedge rst) begin
    if (rst) begin
      hcnt <= '0; line_cnt <= '0; xhs <= 1'b1; xvs <= 1'b1; frame_tick <= 1'b0;
    end else if (!enable) begin
      hcnt <= '0; line_cnt <= '0; xhs <= 1'b1; xvs <= 1'b1; frame_tick <= 1'b0;
    end else begin
      if (hcnt >= hmax - 1'b1) begin
        hcnt <= '0;
        line_cnt <= (line_cnt >= vmax - 1'b1) ? '0 : line_cnt + 1'b1;
      end else begin
        hcnt <= hcnt + 1'b1;
      end
      xhs        <= !(32'(hcnt) < XHS_W);
      xvs        <= !((line_cnt == '0) && (32'(hcnt) < XVS_W));
      frame_tick <= (line_cnt == '0) && (hcnt == '0);
    end
  end
endmodule
