// i2c_slave_model: behavioural I2C register device for testbenches (not synthesizable).
//
// Answers device address ADDR with 16-bit register addresses and 8-bit
// registers held in an associative array (unwritten registers read as
// 8'h5A). Write: dev+W, addr hi, addr lo, data. Read: dev+W, addr hi, addr lo,
// repeated start, dev+R, then one data byte. sda_oe = 1 pulls SDA low.
//
// The open-drain bus follows the described control path; the register
// protocol is this design's choice.
module i2c_slave_model #(
  parameter logic [6:0] ADDR = 7'h1A
) (
  input  logic scl,
  input  logic sda,
  output logic sda_oe
);
  logic [7:0]  regs [logic [15:0]];
  logic [7:0]  sh, txb;
  logic [15:0] ra;
  int          bitcnt, nbyte;
  bit          active, ack_phase, tx, selected;
  int          writes, reads;

  initial begin
    sda_oe = 1'b0; active = 0; ack_phase = 0; tx = 0; bitcnt = 0; nbyte = 0;
    selected = 0; writes = 0; reads = 0; sh = '0; txb = '0; ra = '0;
  end

  always @(negedge sda) if (scl) begin
    active = 1; bitcnt = 0; nbyte = 0; tx = 0; ack_phase = 0; sda_oe = 1'b0;
  end
  always @(posedge sda) if (scl) begin
    active = 0; sda_oe = 1'b0;
  end

  always @(posedge scl) if (active && !ack_phase) begin
    if (!tx) sh = {sh[6:0], sda};
    bitcnt++;
  end

  always @(negedge scl) if (active) begin
    if (ack_phase) begin
      ack_phase = 0;
      sda_oe    = 1'b0;
      if (tx && bitcnt == 0) sda_oe = !txb[7];     // first bit of the read byte
      else if (tx) tx = 0;                         // master NACK after the byte
    end else if (bitcnt == 8) begin
      bitcnt = 0;
      if (tx) begin
        sda_oe = 1'b0; ack_phase = 1; reads++; bitcnt = 1;   // master answers
      end else begin
        if (nbyte == 0) selected = (sh[7:1] == ADDR);
        if (selected) begin
          sda_oe = 1'b1;
          if (nbyte == 0 && sh[0]) begin
            tx  = 1;
            txb = regs.exists(ra) ? regs[ra] : 8'h5A;
          end
          else if (nbyte == 1) ra[15:8] = sh;
          else if (nbyte == 2) ra[7:0]  = sh;
          else if (nbyte == 3) begin regs[ra] = sh; writes++; end
        end
        ack_phase = 1;
        nbyte++;
      end
    end else if (tx) begin
      sda_oe = !txb[7 - bitcnt];
    end
  end
endmodule
