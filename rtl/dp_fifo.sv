// dp_fifo: dual-clock FIFO built on a simple dual-port memory.
//
// The write side (wr_clk) and read side (rd_clk) are independent. Pointers are
// one bit wider than the address and cross domains as Gray code through two
// flip-flops, so full and empty are exact in their own domain and pessimistic
// by the synchroniser delay for the other side. A read with rd_req while not
// empty presents the word on q one rd_clk cycle later (registered memory
// read). wr_used counts stored words as seen from the write side; a write while
// full is dropped and flagged on wr_overflow for one cycle.
//
// The document uses vendor dual-port memories as FIFOs between clock
// domains; this generic version and its Gray-code pointers are this design's.
module dp_fifo #(
  parameter int unsigned WIDTH = 32,
  parameter int unsigned DEPTH = 512     // power of two
) (
  input  logic                       rst,        // async, both domains
  input  logic                       wr_clk,
  input  logic                       wr_req,
  input  logic [WIDTH-1:0]           data,
  output logic                       wr_full,
  output logic [$clog2(DEPTH):0]     wr_used,
  output logic                       wr_overflow,
  input  logic                       rd_clk,
  input  logic                       rd_req,
  output logic [WIDTH-1:0]           q,
  output logic                       rd_empty,
  output logic [$clog2(DEPTH):0]     rd_used
);
  localparam int unsigned AW = $clog2(DEPTH);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW:0] wbin, rbin, wgray, rgray;
  logic [AW:0] rgray_w1, rgray_w2, wgray_r1, wgray_r2;

  function automatic logic [AW:0] g2b(input logic [AW:0] g);
    logic [AW:0] b;
    b[AW] = g[AW];
    for (int k = AW - 1; k >= 0; k--) b[k] = b[k+1] ^ g[k];
    return b;
  endfunction

  // write side
  logic [AW:0] rbin_w;
  assign rbin_w      = g2b(rgray_w2);
  assign wr_used     = wbin - rbin_w;
  assign wr_full     = (wr_used == (AW+1)'(DEPTH));

  always_ff @(posedge wr_clk) begin
    if (wr_req && !wr_full) mem[wbin[AW-1:0]] <= data;
  end

  always_ff @(posedge wr_clk or posedge rst) begin
    if (rst) begin
      wbin <= '0; wgray <= '0; rgray_w1 <= '0; rgray_w2 <= '0; wr_overflow <= 1'b0;
    end else begin
      rgray_w1    <= rgray;
      rgray_w2    <= rgray_w1;
      wr_overflow <= wr_req && wr_full;
      if (wr_req && !wr_full) begin
        wbin  <= wbin + 1'b1;
        wgray <= (wbin + 1'b1) ^ ((wbin + 1'b1) >> 1);
      end
    end
  end

  // read side
  logic [AW:0] wbin_r;
  assign wbin_r   = g2b(wgray_r2);
  assign rd_used  = wbin_r - rbin;
  assign rd_empty = (rd_used == '0);

  always_ff @(posedge rd_clk) begin
    if (rd_req && !rd_empty) q <= mem[rbin[AW-1:0]];
  end

  always_ff @(posedge rd_clk or posedge rst) begin
    if (rst) begin
      rbin <= '0; rgray <= '0; wgray_r1 <= '0; wgray_r2 <= '0;
    end else begin
      wgray_r1 <= wgray;
      wgray_r2 <= wgray_r1;
      if (rd_req && !rd_empty) begin
        rbin  <= rbin + 1'b1;
        rgray <= (rbin + 1'b1) ^ ((rbin + 1'b1) >> 1);
      end
    end
  end
endmodule
