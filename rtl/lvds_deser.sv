// lvds_deser: soft DDR deserializer for sensor LVDS lanes (one receiver = 2 lanes).
//
// Each lane carries one bit per edge of rx_inclock (double data rate, clock
// edges centred in the data eye). Every rising edge shifts in two bits per
// lane: the one captured on the preceding falling edge, then the one on the
// rising edge. After FACTOR/2 rising edges a FACTOR-bit word is taken from a
// 2*FACTOR-bit history at a per-lane offset, so the word boundary can move by
// single bits. A rising edge on rx_channel_data_align[i] moves lane i's
// boundary by one bit (bit slip, modulo FACTOR); rx_data_reset clears all offsets.
// The first bit received is the word's MSB.
//
// rx_outclk is rx_inclock divided by FACTOR/2. rx_out changes together with
// the falling edge of rx_outclk, so it is stable around every rising edge. Latency from the last
// bit of a word to rx_out is about one rx_outclk period.
//
// The two-lane grouping, factor 10 and the align/reset controls follow the
// described receiver; the capture scheme, bit order and clock phase are this
// design's choice.
module lvds_deser #(
  parameter int unsigned CHANNELS = 2,
  parameter int unsigned FACTOR   = 10   // even; 10 for 10-bit readout
) (
  input  logic                         rx_inclock,
  input  logic                         rx_data_reset,          // async, active high
  input  logic [CHANNELS-1:0]          rx_in,
  input  logic [CHANNELS-1:0]          rx_channel_data_align,  // from rx_outclk domain
  output logic                         rx_outclk,
  output logic [CHANNELS*FACTOR-1:0]   rx_out                  // lane i in [i*FACTOR +: FACTOR]
);
  localparam int unsigned HALF = FACTOR / 2;
  localparam int unsigned CW   = $clog2(HALF);
  localparam int unsigned SW   = $clog2(FACTOR);

  logic [CW-1:0]            cnt;
  logic [CHANNELS-1:0]      neg_q;
  logic [2*FACTOR-1:0]      hist   [CHANNELS];
  logic [SW-1:0]            slip   [CHANNELS];
  logic [CHANNELS-1:0]      al_s1, al_s2, al_s3;

  // falling-edge capture
  always_ff @(negedge rx_inclock or posedge rx_data_reset)
    if (rx_data_reset) neg_q <= '0;
    else               neg_q <= rx_in;

  // word counter and divided clock
  always_ff @(posedge rx_inclock or posedge rx_data_reset) begin
    if (rx_data_reset) begin
      cnt       <= '0;
      rx_outclk <= 1'b0;
    end else begin
      cnt       <= (cnt == CW'(HALF - 1)) ? '0 : cnt + 1'b1;
      // high while cnt (after update) is in [HALF/2, HALF-1]
      rx_outclk <= ((cnt == CW'(HALF - 1)) ? 0 : int'(cnt) + 1) >= int'(HALF / 2);
    end
  end

  for (genvar i = 0; i < CHANNELS; i++) begin : g_lane
    logic [2*FACTOR-1:0] hist_n;
    assign hist_n = {hist[i][2*FACTOR-3:0], neg_q[i], rx_in[i]};

    always_ff @(posedge rx_inclock or posedge rx_data_reset) begin
      if (rx_data_reset) begin
        hist[i] <= '0;
        slip[i] <= '0;
        al_s1[i] <= 1'b0; al_s2[i] <= 1'b0; al_s3[i] <= 1'b0;
        rx_out[i*FACTOR +: FACTOR] <= '0;
      end else begin
        hist[i]  <= hist_n;
        al_s1[i] <= rx_channel_data_align[i];
        al_s2[i] <= al_s1[i];
        al_s3[i] <= al_s2[i];
        if (al_s2[i] && !al_s3[i])
          slip[i] <= (slip[i] == SW'(FACTOR - 1)) ? '0 : slip[i] + 1'b1;
        if (cnt == CW'(HALF - 1))
          rx_out[i*FACTOR +: FACTOR] <= hist_n[($clog2(2*FACTOR))'(slip[i]) +: FACTOR];
      end
    end
  end
endmodule
