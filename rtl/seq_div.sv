// seq_div: unsigned restoring divider, one quotient bit per clock.
//
// start loads dividend and divisor; done pulses W+1 cycles later with the
// quotient (remainder dropped). A zero divisor yields an all-ones quotient.
// Used by the white-balance block at frame end, where time is plentiful.
//
// The divider is this design's choice; the described algorithm only states
// the divisions.
module seq_div #(
  parameter int unsigned W = 48
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          start,
  input  logic [W-1:0]  dividend,
  input  logic [W-1:0]  divisor,
  output logic          busy,
  output logic          done,
  output logic [W-1:0]  quotient
);
  logic [W-1:0]          rem;
  logic [W-1:0]          dvs;
  logic [$clog2(W+1)-1:0] n;
  logic [W:0]            trial;

  assign trial = {rem, quotient[W-1]} - {1'b0, dvs};

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      rem <= '0; dvs <= '0; n <= '0; busy <= 1'b0; done <= 1'b0; quotient <= '0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        rem <= '0; dvs <= divisor; quotient <= dividend; n <= '0; busy <= 1'b1;
      end else if (busy) begin
        // shift {rem, quotient} left, subtract when it fits
        if (!trial[W]) begin
          rem      <= trial[W-1:0];
          quotient <= {quotient[W-2:0], 1'b1};
        end else begin
          rem      <= {rem[W-2:0], quotient[W-1]};
          quotient <= {quotient[W-2:0], 1'b0};
        end
        n <= n + 1'b1;
        if (n == ($bits(n))'(W - 1)) begin busy <= 1'b0; done <= 1'b1; end
      end
    end
  end
endmodule
