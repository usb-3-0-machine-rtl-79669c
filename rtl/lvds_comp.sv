// lvds_comp: sync-code detection and word alignment for one receiver (2 lanes).
//
// Each lane's last four words are compared with the sync-code pattern
// (3FFh, 000h, 000h, status word with valid protection bits; for PIX_W = 12
// the same codes shifted left by two bits, FFFh, 000h, 000h, status). While a lane has
// seen no valid code for SLIP_TIMEOUT words, it raises rx_channel_data_align
// for three cycles, so the deserializer slips one bit, and starts counting
// again; SLIP_TIMEOUT must exceed the longest gap between two sync codes. A lane becomes synchronised (sync[i]) when
// a start code (SAV) is followed by an end code (EAV); it loses sync when the
// timeout expires again.
//
// Data leave delayed by four words (imx_out0x/imx_out1x) so that line_start,
// which goes high when lane 0 completes a SAV while synchronised, covers the
// whole line from the first SAV word to the last EAV word. line_v holds the
// V bit (1 = blanking line) of the current line's SAV. line_start is dropped
// instead of set when the lanes disagree (lane 1's last four words are not the
// same code). All outputs are registered in the rx_outclk domain.
//
// Code values and the SAV-then-EAV rule follow the described design; the
// timeout-driven slip search and the delay of four words are this design's
// own choices.
module lvds_comp
  import cam_pkg::*;
#(
  parameter int unsigned PIX_W        = 10,    // sensor word width: 10 or 12
  parameter int unsigned SLIP_TIMEOUT = 1024   // words without a code before a slip
) (
  input  logic                rx_outclk,
  input  logic                rst,
  input  logic [PIX_W-1:0]    imx_out0,
  input  logic [PIX_W-1:0]    imx_out1,
  output logic [1:0]          rx_channel_data_align,
  output logic [1:0]          sync,
  output logic                line_start,
  output logic                line_v,
  output logic [PIX_W-1:0]    imx_out0x,
  output logic [PIX_W-1:0]    imx_out1x,
  output logic                slip_event      // one cycle per bit slip requested (any lane)
);
  localparam int unsigned TW = $clog2(SLIP_TIMEOUT + 1);

  logic [PIX_W-1:0] w0 [4];   // lane 0, w0[3] oldest
  logic [PIX_W-1:0] w1 [4];

  // code recognised at the oldest position of a lane's window
  function automatic logic code_at(input logic [PIX_W-1:0] a, input logic [PIX_W-1:0] b,
                                   input logic [PIX_W-1:0] c, input logic [PIX_W-1:0] d);
    return (a == '1) && (b == '0) && (c == '0) && is_code_word4(PIX_W_MAX'(d), PIX_W);
  endfunction

  logic [1:0] code_ok;
  logic [1:0] c_h;
  logic [1:0] c_v;
  always_comb begin
    code_ok[0] = code_at(w0[3], w0[2], w0[1], w0[0]);
    code_ok[1] = code_at(w1[3], w1[2], w1[1], w1[0]);
    c_h        = {code_h(PIX_W_MAX'(w1[0]), PIX_W), code_h(PIX_W_MAX'(w0[0]), PIX_W)};
    c_v        = {code_v(PIX_W_MAX'(w1[0]), PIX_W), code_v(PIX_W_MAX'(w0[0]), PIX_W)};
  end

  // per-lane alignment search and sync state
  logic [TW-1:0] idle   [2];
  logic [1:0]    hold   [2];   // cycles left with align high
  logic [1:0]    sav_seen;
  logic [1:0]    slip_pulse;
  for (genvar i = 0; i < 2; i++) begin : g_align
    always_ff @(posedge rx_outclk or posedge rst) begin
      if (rst) begin
        idle[i]     <= '0;
        hold[i]     <= '0;
        sav_seen[i] <= 1'b0;
        sync[i]     <= 1'b0;
        rx_channel_data_align[i] <= 1'b0;
        slip_pulse[i] <= 1'b0;
      end else begin
        slip_pulse[i] <= 1'b0;
        if (hold[i] != '0) hold[i] <= hold[i] - 1'b1;
        else rx_channel_data_align[i] <= 1'b0;
        if (code_ok[i]) begin
          idle[i] <= '0;
          if (!c_h[i])          sav_seen[i] <= 1'b1;
          else if (sav_seen[i])    sync[i]     <= 1'b1;
        end else if (idle[i] == TW'(SLIP_TIMEOUT - 1)) begin
          // no code for SLIP_TIMEOUT words: slip one bit and search again
          idle[i]       <= '0;
          hold[i]       <= 2'd2;
          rx_channel_data_align[i] <= 1'b1;
          slip_pulse[i] <= 1'b1;
          sync[i]       <= 1'b0;
          sav_seen[i]   <= 1'b0;
        end else begin
          idle[i] <= idle[i] + 1'b1;
        end
      end
    end
  end
  assign slip_event = |slip_pulse;

  // word windows, line framing and delayed data
  logic [2:0] tail;      // countdown that keeps the EAV's last three words inside the line
  always_ff @(posedge rx_outclk or posedge rst) begin
    if (rst) begin
      for (int k = 0; k < 4; k++) begin w0[k] <= '0; w1[k] <= '0; end
      line_start <= 1'b0;
      line_v     <= 1'b0;
      tail       <= '0;
      imx_out0x  <= '0;
      imx_out1x  <= '0;
    end else begin
      w0[0] <= imx_out0;  w1[0] <= imx_out1;
      for (int k = 1; k < 4; k++) begin w0[k] <= w0[k-1]; w1[k] <= w1[k-1]; end
      imx_out0x <= w0[3];
      imx_out1x <= w1[3];
      if (tail != '0) begin
        tail <= tail - 1'b1;
        if (tail == 3'd1) line_start <= 1'b0;
      end else if (code_ok[0] && !c_h[0] && sync[0]) begin
        // SAV on lane 0: open the line if lane 1 agrees
        line_start <= code_ok[1] && (w1[0] == w0[0]);
        line_v     <= c_v[0];
      end else if (code_ok[0] && c_h[0] && line_start) begin
        tail <= 3'd4;
      end
    end
  end
endmodule
