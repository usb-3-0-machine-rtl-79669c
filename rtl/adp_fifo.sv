// adp_fifo: adaptive FIFO between the collector (32-bit writes, mem_rd_clk)
// and the FX3 port logic (64-bit reads, pclk).
//
// Two consecutive 32-bit writes form one 64-bit entry, the first write in the
// low half; the pair is stored in a dual-clock FIFO of DEPTH/2 entries once
// its second half arrives. adp_usedw counts 32-bit words on the write side,
// including a held first half. adp_full is raised one entry early so that a
// held half can always be completed. Read timing is that of dp_fifo: data on
// q one pclk cycle after adp_rd while not empty.
//
// Widths (32 in, 64 out), independent clocks and the full/empty/used-words
// status follow the described adaptive FIFO; the depth of 512 words follows
// the 9-bit used-words count seen in the captured traces.
module adp_fifo #(
  parameter int unsigned DEPTH = 512     // in 32-bit words, power of two
) (
  input  logic                      rst,
  input  logic                      wr_clk,
  input  logic                      adp_wr,
  input  logic [31:0]               adp_data_in,
  output logic                      adp_full,
  output logic [$clog2(DEPTH):0]    adp_usedw,
  input  logic                      rd_clk,
  input  logic                      adp_rd,
  output logic [63:0]               q,
  output logic                      adp_emp
);
  localparam int unsigned E  = DEPTH / 2;
  localparam int unsigned EW = $clog2(E);

  logic        half;
  logic [31:0] low;
  logic        pair_wr;
  logic        wr_full, ovf;
  logic [EW:0] wr_used, rd_used;

  always_ff @(posedge wr_clk or posedge rst) begin
    if (rst) begin
      half <= 1'b0; low <= '0;
    end else if (adp_wr) begin
      half <= ~half;
      if (!half) low <= adp_data_in;
    end
  end
  assign pair_wr   = adp_wr && half;
  assign adp_full  = (wr_used >= (EW+1)'(E - 1));
  assign adp_usedw = {wr_used, half};

  dp_fifo #(.WIDTH(64), .DEPTH(E)) u_fifo (
    .rst, .wr_clk, .wr_req(pair_wr), .data({adp_data_in, low}), .wr_full,
    .wr_used, .wr_overflow(ovf), .rd_clk, .rd_req(adp_rd), .q,
    .rd_empty(adp_emp), .rd_used
  );
endmodule
