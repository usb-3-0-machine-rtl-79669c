// i2c_master: register access to the image sensor over I2C.
//
// One command reads or writes one 8-bit register at a 16-bit address:
//   write: S, dev+W, A, addr[15:8], A, addr[7:0], A, data, A, P
//   read:  S, dev+W, A, addr[15:8], A, addr[7:0], A, Sr, dev+R, A, data, NACK, P
// Each bit takes four quarter periods of CLK_DIV clock cycles: data changes in
// the first quarter with SCL low, SCL is high for the second and third, the
// receiver samples SDA at the start of the third, SCL falls in the fourth.
// SCL and SDA are open drain: *_oe = 1 pulls the line low, 0 releases it to
// the pull-up. cmd_ready is high in idle; cmd_valid starts a command; done
// pulses when it ends, with rdata valid for a read and nack set when any
// acknowledge was missing (the transfer then stops at once).
//
// The open-drain I2C control path to the sensor follows the described design;
// the 16-bit register address, 7-bit device address and timing are this
// design's choices (Sony sensors use 16-bit register addresses).
module i2c_master #(
  parameter int unsigned CLK_DIV = 125     // system clocks per quarter SCL period
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        cmd_valid,
  output logic        cmd_ready,
  input  logic        cmd_read,
  input  logic [6:0]  cmd_dev,
  input  logic [15:0] cmd_addr,
  input  logic [7:0]  cmd_wdata,
  output logic [7:0]  rdata,
  output logic        done,
  output logic        nack,
  output logic        scl_oe,
  output logic        sda_oe,
  input  logic        sda_i
);
  typedef enum logic [2:0] {IDLE, START, TX, RX, ACK, RESTART, STOP} ist_t;
  ist_t st;

  logic [$clog2(CLK_DIV)-1:0] div;
  logic [1:0]  q;           // quarter within the bit
  logic        tick;        // last clock of a quarter
  logic [2:0]  bitn;
  logic [7:0]  sh;
  logic [2:0]  step;        // byte index in the command
  logic        rd, m_ack;   // m_ack: this ACK phase is driven by the master
  logic [6:0]  dev;
  logic [15:0] addr;
  logic [7:0]  wdata;

  assign tick      = (div == ($bits(div))'(CLK_DIV - 1));
  assign cmd_ready = (st == IDLE);

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      st <= IDLE; div <= '0; q <= '0; bitn <= '0; sh <= '0; step <= '0; rd <= 1'b0;
      m_ack <= 1'b0; dev <= '0; addr <= '0; wdata <= '0; rdata <= '0; done <= 1'b0;
      nack <= 1'b0; scl_oe <= 1'b0; sda_oe <= 1'b0;
    end else begin
      done <= 1'b0;
      if (st == IDLE) begin
        div <= '0; q <= '0; scl_oe <= 1'b0; sda_oe <= 1'b0;
        if (cmd_valid) begin
          rd <= cmd_read; dev <= cmd_dev; addr <= cmd_addr; wdata <= cmd_wdata;
          nack <= 1'b0; step <= '0; st <= START;
        end
      end else begin
        div <= tick ? '0 : div + 1'b1;
        if (tick) q <= q + 1'b1;
        unique case (st)
          START, RESTART: if (tick) unique case (q)
            2'd0: begin scl_oe <= (st == RESTART); sda_oe <= 1'b0; end
            2'd1: scl_oe <= 1'b0;
            2'd2: sda_oe <= 1'b1;                 // SDA falls while SCL high
            default: begin
              scl_oe <= 1'b1;
              sh     <= (st == RESTART) ? {dev, 1'b1} : {dev, 1'b0};
              bitn   <= '0;
              st     <= TX;
            end
          endcase
          TX, RX: if (tick) unique case (q)
            2'd0: begin scl_oe <= 1'b1; sda_oe <= (st == TX) ? !sh[7] : 1'b0; end
            2'd1: scl_oe <= 1'b0;
            2'd2: if (st == RX) sh <= {sh[6:0], sda_i};
            default: begin
              scl_oe <= 1'b1;
              bitn   <= bitn + 1'b1;
              if (st == TX) sh <= {sh[6:0], 1'b0};
              if (bitn == 3'd7) begin
                m_ack <= (st == RX);
                st    <= ACK;
              end
            end
          endcase
          ACK: if (tick) unique case (q)
            2'd0: begin scl_oe <= 1'b1; sda_oe <= 1'b0; end   // master sends NACK after the last read byte
            2'd1: scl_oe <= 1'b0;
            2'd2: if (!m_ack && sda_i) nack <= 1'b1;
            default: begin
              scl_oe <= 1'b1;
              bitn   <= '0;
              step   <= step + 1'b1;
              if (m_ack) rdata <= sh;
              if (nack || m_ack) st <= STOP;
              else unique case (step)
                3'd0:    begin sh <= addr[15:8]; st <= TX; end
                3'd1:    begin sh <= addr[7:0];  st <= TX; end
                3'd2:    if (rd) st <= RESTART; else begin sh <= wdata; st <= TX; end
                3'd3:    if (rd) begin sh <= '0; st <= RX; end else st <= STOP;
                default: st <= STOP;
              endcase
            end
          endcase
          STOP: if (tick) unique case (q)
            2'd0: begin scl_oe <= 1'b1; sda_oe <= 1'b1; end
            2'd1: scl_oe <= 1'b0;
            2'd2: sda_oe <= 1'b0;                 // SDA rises while SCL high
            default: begin done <= 1'b1; st <= IDLE; end
          endcase
          default: st <= IDLE;
        endcase
      end
    end
  end
endmodule
