// tb_mem_collect: checks the multi-FIFO collector.
//
// Five channel-FIFO models (one-cycle read latency) are loaded with lines in
// the form written by the pair write controllers: separator zeros, the four
// SAV words, N pixel words, the four EAV words, separator zeros. The adaptive
// FIFO input is a queue whose full flag toggles at random; a write may come
// at most one cycle after full was raised (the FIFO keeps a one-entry margin). Each line must come
// out as {000003FFh, status<<16}, the pixel words in FIFO order round by round,
// {000003FFh, eav<<16}, and 2 or 3 zero words so the count is even. Lines of
// odd and even length, an active (200h) and a blanking (2ACh) line, and a run
// with only three FIFOs active are used; stalls must be counted.
//
// Single SAV/EAV per line and zero separators follow the described collector;
// the stall on a full FIFO is this design's choice.
module tb_mem_collect;
  localparam int NB = 5;
  logic clk = 0, rst = 0;
  logic [NB-1:0] active = '1, ep, rd_req;
  logic [31:0]   bdata [NB];
  logic          full = 0, wr;
  logic [31:0]   din;
  logic [15:0]   lcount, errs;
  logic [31:0]   stalls;
  int checks = 0, failures = 0;

  logic [31:0] fq [NB][$];
  logic [1:0]  full_h = '0;     // full as seen at the last two edges
  logic [31:0] exp_q [$];

  always #5 clk = ~clk;

  mem_collect #(.NBUF(NB), .SEP_WORDS(2)) dut (
    .clk, .rst, .active, .mem_ep(ep), .buf_data(bdata), .rd_req, .adp_full(full),
    .adp_wr(wr), .adp_data_in(din), .line_count(lcount), .err_count(errs),
    .stall_cycles(stalls));

  always_comb for (int k = 0; k < NB; k++) ep[k] = (fq[k].size() == 0);

  always @(posedge clk) begin
    for (int k = 0; k < NB; k++)
      if (rd_req[k]) begin
        if (fq[k].size() == 0) begin checks++; failures++; $display("read from empty FIFO %0d", k); end
        else bdata[k] <= fq[k].pop_front();
      end
    if (wr) begin
      checks++;
      // a write may follow a full flag by at most one cycle (one-entry margin)
      if (full_h[0] && full_h[1]) begin failures++; $display("write after full"); end
      if (exp_q.size() == 0 || din != exp_q.pop_front()) begin
        failures++; $display("collected %h", din);
      end
    end
    full_h = {full_h[0], full};
    full <= ($urandom % 4) == 0;
  end

  task automatic load_line(input int n, input logic [9:0] sav, input logic [9:0] eav,
                           input logic [NB-1:0] act, input int base);
    int cnt = 0;
    for (int k = 0; k < NB; k++) if (act[k]) begin
      repeat (3) fq[k].push_back(32'h0);
      fq[k].push_back(32'h03FF_03FF); fq[k].push_back(0); fq[k].push_back(0);
      fq[k].push_back({6'b0, sav, 6'b0, sav});
      for (int w = 0; w < n; w++) fq[k].push_back(32'(base + w * 16 + k));
      fq[k].push_back(32'h03FF_03FF); fq[k].push_back(0); fq[k].push_back(0);
      fq[k].push_back({6'b0, eav, 6'b0, eav});
      repeat (8) fq[k].push_back(32'h0);
    end
    exp_q.push_back(32'h0000_03FF); exp_q.push_back({6'b0, sav, 16'h0});
    for (int w = 0; w < n; w++)
      for (int k = 0; k < NB; k++) if (act[k]) begin exp_q.push_back(32'(base + w * 16 + k)); cnt++; end
    exp_q.push_back(32'h0000_03FF); exp_q.push_back({6'b0, eav, 16'h0});
    repeat (2 + (cnt % 2)) exp_q.push_back(32'h0);
  endtask

  task automatic wait_done(input int lines);
    int t = 0;
    while (lcount != 16'(lines) && t < 20000) begin @(posedge clk); t++; end
    repeat (5) @(posedge clk);
    checks++;
    if (exp_q.size() != 0 || lcount != 16'(lines)) begin
      failures++; $display("after %0d lines: %0d words missing", lines, exp_q.size());
    end
  endtask

  initial begin
    #1 rst = 1; #20 rst = 0;
    load_line(7, 10'h200, 10'h274, '1, 32'h1000);
    wait_done(1);
    load_line(4, 10'h2AC, 10'h2D8, '1, 32'h2000);
    load_line(9, 10'h200, 10'h274, '1, 32'h3000);
    wait_done(3);
    @(negedge clk) active = 5'b00111;
    load_line(5, 10'h200, 10'h274, 5'b00111, 32'h4000);
    wait_done(4);
    checks += 2;
    if (errs != 0) begin failures++; $display("err_count %0d", errs); end
    if (stalls == 0) begin failures++; $display("no stall counted"); end
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
