// tb_i2c_master: checks the I2C register master against a behavioural slave.
//
// Writes random values to random 16-bit register addresses and reads them
// back; reads an unwritten register; addresses a missing device and expects
// nack. A bus monitor checks that SDA only changes while SCL is low except
// for start and stop conditions, counts starts/stops, and checks that every
// SCL high phase of a data bit lasts 2*CLK_DIV clocks (SCL period 4*CLK_DIV). cmd_ready
// must be low while a command runs, and done must pulse exactly once per
// command.
//
// Open-drain I2C follows the described control path; the 16-bit register
// address protocol is this design's choice.
module tb_i2c_master;
  localparam int DIV = 6;
  logic clk = 0, rst = 0;
  logic valid = 0, ready, rd = 0, done, nack;
  logic [6:0] dev = 7'h1A;
  logic [15:0] addr = '0;
  logic [7:0] wdata = '0, rdata;
  logic scl_oe, sda_oe, slv_oe;
  wire scl = !scl_oe;
  wire sda = !(sda_oe || slv_oe);
  int checks = 0, failures = 0;
  int starts = 0, stops = 0, dones = 0;
  logic scl_d = 1, sda_d = 1;
  bit in_start = 0;    // SCL high phase holding a start (longer by design)
  longint cyc = 0, scl_rise = 0;
  logic [7:0] shadow [logic [15:0]];

  always #5 clk = ~clk;

  i2c_master #(.CLK_DIV(DIV)) dut (
    .clk, .rst, .cmd_valid(valid), .cmd_ready(ready), .cmd_read(rd), .cmd_dev(dev),
    .cmd_addr(addr), .cmd_wdata(wdata), .rdata, .done, .nack, .scl_oe, .sda_oe, .sda_i(sda));

  i2c_slave_model #(.ADDR(7'h1A)) u_slave (.scl, .sda, .sda_oe(slv_oe));

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", msg, $time); end
  endtask

  always @(posedge clk) begin
    cyc++;
    if (scl_d && scl && sda_d != sda) begin
      if (sda) stops++; else begin starts++; in_start = 1; end
    end
    if (!scl_d && scl) begin scl_rise = cyc; in_start = 0; end
    if (scl_d && !scl && !in_start) chk(cyc - scl_rise == 2 * DIV, $sformatf("SCL high for %0d clocks", cyc - scl_rise));
    if (done) dones++;
    scl_d = scl; sda_d = sda;
  end

  task automatic cmd(input bit r, input logic [6:0] d, input logic [15:0] a, input logic [7:0] w);
    int d0;
    d0 = dones;
    @(posedge clk);
    while (!ready) @(posedge clk);
    rd <= r; dev <= d; addr <= a; wdata <= w; valid <= 1'b1;
    @(posedge clk);
    valid <= 1'b0;
    @(posedge clk);
    chk(!ready, "ready low while busy");
    while (!done) @(posedge clk);
    @(posedge clk);
    chk(dones == d0 + 1, "one done per command");
  endtask

  initial begin
    int s0, p0;
    #1 rst = 1; #20 rst = 0;
    repeat (5) @(posedge clk);
    chk(ready && !scl_oe && !sda_oe, "idle bus released");
    for (int i = 0; i < 12; i++) begin
      logic [15:0] a;
      logic [7:0] v;
      a = 16'($urandom); v = 8'($urandom);
      s0 = starts; p0 = stops;
      cmd(0, 7'h1A, a, v);
      shadow[a] = v;
      chk(!nack, "write acknowledged");
      chk(u_slave.regs.exists(a) && u_slave.regs[a] == v, "slave register written");
      chk(starts == s0 + 1 && stops == p0 + 1, "write: one start, one stop");
    end
    foreach (shadow[a]) begin
      s0 = starts; p0 = stops;
      cmd(1, 7'h1A, a, 8'h00);
      chk(!nack && rdata == shadow[a], $sformatf("read %h got %h want %h", a, rdata, shadow[a]));
      chk(starts == s0 + 2 && stops == p0 + 1, "read: start, repeated start, stop");
    end
    cmd(1, 7'h1A, 16'hFFFF ^ 16'h0F0F, 8'h00);
    chk(!nack && rdata == (shadow.exists(16'hF0F0) ? shadow[16'hF0F0] : 8'h5A), "read of unwritten register");
    s0 = starts; p0 = stops;
    cmd(0, 7'h33, 16'h1234, 8'h77);
    chk(nack, "missing device gives nack");
    chk(!u_slave.regs.exists(16'h1234), "missing device writes nothing");
    chk(stops == p0 + 1, "stop after nack");
    cmd(1, 7'h1A, 16'h1234, 8'h00);
    chk(!nack && rdata == 8'h5A, "bus usable after nack");
    repeat (4 * DIV) @(posedge clk);
    chk(scl && sda, "bus released at end");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #5000000;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
