// Self-checking testbench of crema_ctrl.
//
// Runs many random runs (base addresses, line counts, latencies 1..32,
// write cycles and stalls) and records, clock by clock, every read issued
// and every write raised. The reference is computed independently: reads at
// consecutive addresses on consecutive clocks straight after start; the k-th
// valid line written exactly when k mod (cycles + stalls) < cycles, exactly
// latency + 1 clocks after its read, to consecutive addresses; clr with
// start; done exactly N + latency + 4 clocks after start.
module tb_crema_ctrl;
  import crema_pkg::*;

  logic          clk = 1'b0;
  logic          rst_n = 1'b0;
  logic          start = 1'b0;
  logic [AW-1:0] rd_base = '0;
  logic [AW:0]   rd_count = '0;
  logic [AW-1:0] wr_base = '0;
  logic [5:0]    latency = 6'd1;
  logic [AW:0]   wr_cycles = '0;
  logic [AW:0]   wr_stalls = '0;
  logic          busy, done, clr, rd_en, wr_valid;
  logic [AW-1:0] rd_addr, wr_addr;
  int            checks = 0, failures = 0;
  int            cyc = 0;

  crema_ctrl dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  int rd_cyc[$], rd_adr[$], wr_cyc[$], wr_adr[$];
  int done_cyc;

  always @(posedge clk) begin
    if (rd_en)    begin rd_cyc.push_back(cyc); rd_adr.push_back(int'(rd_addr)); end
    if (wr_valid) begin wr_cyc.push_back(cyc); wr_adr.push_back(int'(wr_addr)); end
    if (done) done_cyc = cyc;
  end

  task automatic run(int base, int n, int lat, int wc, int ws, int wb);
    int t0, k, nw;
    rd_cyc.delete(); rd_adr.delete(); wr_cyc.delete(); wr_adr.delete();
    rd_base = AW'(base); rd_count = (AW+1)'(n); latency = 6'(lat);
    wr_cycles = (AW+1)'(wc); wr_stalls = (AW+1)'(ws); wr_base = AW'(wb);
    start = 1'b1;
    #1;
    check("clr with start", int'(clr), 1);
    t0 = cyc;
    @(posedge clk); #1;
    start = 1'b0;
    check("busy", int'(busy), 1);
    wait (done);
    @(posedge clk); #1;
    check("idle after done", int'(busy), 0);
    // reads
    check("read count", rd_cyc.size(), n);
    for (int i = 0; i < rd_cyc.size(); i++) begin
      check("read clock", rd_cyc[i], t0 + 1 + i);
      check("read addr", rd_adr[i], (base + i) % DEPTH);
    end
    // writes
    nw = 0;
    for (k = 0; k < n; k++) if ((k % (wc + ws)) < wc) nw++;
    check("write count", wr_cyc.size(), nw);
    k = 0;
    for (int i = 0; i < n && k < wr_cyc.size(); i++) begin
      if ((i % (wc + ws)) < wc) begin
        check("write clock", wr_cyc[k], t0 + 1 + i + lat + 1);
        check("write addr", wr_adr[k], (wb + k) % DEPTH);
        k++;
      end
    end
    check("done clock", done_cyc, t0 + n + lat + 4);
    repeat ($urandom_range(0, 3)) @(posedge clk);
    #1;
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk); #1;
    run(0, 80, 5, 1, 0, 0);       // stream: every result written
    run(10, 80, 7, 1, 79, 200);   // one write then 79 stalls
    run(3, 20, 32, 2, 3, 17);     // longest latency
    for (int n = 0; n < 60; n++)
      run($urandom_range(0, 255), $urandom_range(1, 256), $urandom_range(1, 32),
          $urandom_range(1, 6), $urandom_range(0, 6), $urandom_range(0, 255));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
