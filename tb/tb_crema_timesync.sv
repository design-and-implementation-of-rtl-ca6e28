// Time-synchronisation workload on the whole crema accelerator.
//
// Cyclic-prefix correlation for 80 candidate offsets, as an OFDM receiver
// does it: x (80 samples) stays in place while the delayed copy slides by one
// sample per correlation. The correlation context both accumulates
// sum_i (x_i * conj(d_i)) >> 12 with loop-back adders and writes a copy of d
// shifted by one line (through a feed-through PE) together with x into the
// other local memory; the next run reads that memory (ping-pong), so the
// samples are never reloaded. Between runs the host only reads the result
// and writes the one new sample that enters the end of the delayed copy.
// After the 80 correlations the host stores the 80 complex results, four per
// line, and a second context computes their square moduli (a^2 + b^2); the
// host then finds the peak, which must sit at the offset built into the
// test signal (a repeated segment, like a cyclic prefix).
//
// Checked: every correlation value, every square modulus, the peak offset,
// and every run's clock count (lines + latency + 4). All sizes are the
// accelerator's defaults.
//
// A second, application-specific instance receives the same host traffic.
// It is built with multipliers only in row 0 (the only place these contexts
// multiply), 8 instead of 32, and every value read back from it must equal
// the full instance's.
module tb_crema_timesync;
  import crema_pkg::*;

  logic          clk = 1'b0;
  logic          rst_n = 1'b0;
  logic          reg_we = 1'b0;
  logic [4:0]    reg_addr = '0;
  logic [DW-1:0] reg_wdata = '0;
  logic [DW-1:0] reg_rdata;
  logic          dma_we = 1'b0, dma_re = 1'b0, dma_mem = 1'b0;
  logic [LANEW-1:0] dma_bank = '0;
  logic [AW-1:0] dma_addr = '0;
  logic [DW-1:0] dma_wdata = '0;
  logic [DW-1:0] dma_rdata;
  logic          irq;
  int            checks = 0, failures = 0;

  crema dut (.*);

  logic [DW-1:0] lite_rdata;
  logic          lite_irq;

  crema #(.MUL_EN(32'h0000_00FF)) lite (
    .clk       (clk),
    .rst_n     (rst_n),
    .reg_we    (reg_we),
    .reg_addr  (reg_addr),
    .reg_wdata (reg_wdata),
    .reg_rdata (),
    .dma_we    (dma_we),
    .dma_re    (dma_re),
    .dma_mem   (dma_mem),
    .dma_bank  (dma_bank),
    .dma_addr  (dma_addr),
    .dma_wdata (dma_wdata),
    .dma_rdata (lite_rdata),
    .irq       (lite_irq)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, logic [DW-1:0] got, logic [DW-1:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, $signed(got), $signed(exp));
    end
  endtask

  task automatic wr(reg_e a, logic [DW-1:0] d);
    reg_we = 1'b1; reg_addr = a; reg_wdata = d;
    @(posedge clk); #1;
    reg_we = 1'b0;
  endtask

  task automatic pe(int r, int c, int slot, pe_op_e op, pe_src_e a, pe_src_e b);
    cfg_word_t w;
    w = '{pe: PEW'(r*COLS + c), slot: CTXW'(slot), ctx: '{op: op, src_a: a, src_b: b}};
    wr(REG_CFG_PE, DW'(w));
  endtask

  task automatic buf_lane(int which, int pat, int lane, int sel, bit en);
    iobuf_cfg_t w;
    w = '{pat: PATW'(pat), lane: LANEW'(lane), sel: LANEW'(sel), en: en};
    wr(which ? REG_CFG_OBUF : REG_CFG_IBUF, DW'(w));
  endtask

  task automatic dma_write(int m, int bank, int addr, logic [DW-1:0] d);
    dma_we = 1'b1; dma_mem = m[0]; dma_bank = LANEW'(bank); dma_addr = AW'(addr); dma_wdata = d;
    @(posedge clk); #1;
    dma_we = 1'b0;
  endtask

  task automatic dma_read(int m, int bank, int addr, output logic [DW-1:0] d);
    dma_re = 1'b1; dma_mem = m[0]; dma_bank = LANEW'(bank); dma_addr = AW'(addr);
    @(posedge clk); #1;
    dma_re = 1'b0;
    d = dma_rdata;
    check("reduced instance", lite_rdata, dma_rdata);
  endtask

  int run_clocks;   // clocks spent inside runs

  task automatic run(int ctx, int ipat, int opat, int dir, int rd_base, int n, int wr_base, int lat);
    int t0, t1;
    wr(REG_CTX, DW'(ctx));
    wr(REG_IBUF_PAT, DW'(ipat));
    wr(REG_OBUF_PAT, DW'(opat));
    wr(REG_DIR, DW'(dir));
    wr(REG_RD_BASE, DW'(rd_base));
    wr(REG_RD_COUNT, DW'(n));
    wr(REG_WR_BASE, DW'(wr_base));
    wr(REG_LATENCY, DW'(lat));
    wr(REG_WR_CYC, 32'd1);
    wr(REG_WR_STALL, 32'd0);
    wr(REG_CTRL, 32'd1);
    t0 = $time / 10;
    while (!irq) @(posedge clk);
    t1 = $time / 10;
    check("reduced instance irq", DW'(lite_irq), 32'd1);
    #1;
    check("clocks start to irq", DW'(t1 - t0), DW'(n + lat + 4));
    run_clocks += t1 - t0;
  endtask

  localparam int D   = 16;      // lag between a sample and its delayed copy
  localparam int N   = 80;      // samples per correlation, and correlations
  localparam int OFS = 37;      // offset at which the test signal repeats
  localparam int SL  = N + D + N;

  logic signed [DW-1:0] sr [SL], si [SL];
  logic signed [DW-1:0] cr [N], ci [N], pr, pi;
  logic [DW-1:0]        got, sm [N], best;
  int                   best_k, src, t_start;

  initial begin
    // Test signal: random samples; the block starting at D + OFS repeats the
    // first N samples, so the correlation peaks at offset OFS.
    for (int j = 0; j < SL; j++) begin
      sr[j] = $signed(32'($urandom_range(0, 1023))) - 32'sd512;
      si[j] = $signed(32'($urandom_range(0, 1023))) - 32'sd512;
    end
    for (int j = 0; j < N; j++) begin
      sr[D + OFS + j] = sr[j];
      si[D + OFS + j] = si[j];
    end
    for (int k = 0; k < N; k++) begin
      cr[k] = 0; ci[k] = 0;
      for (int i = 0; i < N; i++) begin
        cr[k] += (sr[i]*sr[i+D+k] + si[i]*si[i+D+k]) >>> 12;
        ci[k] += (sr[i]*si[i+D+k] - si[i]*sr[i+D+k]) >>> 12;
      end
    end

    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk); #1;

    // context 0: immediates; 1: correlation with recycling; 2: square modulus x4
    for (int r = 0; r < ROWS; r++)
      for (int c = 0; c < COLS; c++) pe(r, c, 0, OP_LDIMM, SRC_ZERO, SRC_VERT);
    for (int c = 0; c < 4; c++) pe(0, c, 1, OP_MUL, SRC_UP_A, SRC_UP_B);
    pe(1, 1, 1, OP_ADD, SRC_UL_A, SRC_UP_A);
    pe(1, 3, 1, OP_SUB, SRC_UL_A, SRC_UP_A);
    pe(2, 1, 1, OP_SHR, SRC_UP_A, SRC_ZERO);
    pe(2, 3, 1, OP_SHR, SRC_UP_A, SRC_ZERO);
    pe(3, 1, 1, OP_ADD, SRC_UP_A, SRC_LOOP_A);
    pe(3, 3, 1, OP_ADD, SRC_UP_A, SRC_LOOP_A);
    pe(0, 4, 1, OP_URF, SRC_UP_A, SRC_UP_B);
    for (int r = 1; r < ROWS; r++) pe(r, 4, 1, OP_DELAY, SRC_UP_A, SRC_UP_B);
    for (int r = 0; r < ROWS; r++) pe(r, 5, 1, OP_DELAY, SRC_UP_A, SRC_UP_B);
    for (int j = 0; j < 4; j++) begin
      pe(0, 2*j,   2, OP_MUL, SRC_UP_A, SRC_UP_B);
      pe(0, 2*j+1, 2, OP_MUL, SRC_UP_A, SRC_UP_B);
      pe(1, 2*j,   2, OP_ADD, SRC_UP_A, SRC_UR_A);
      pe(2, 2*j,   2, OP_DELAY, SRC_UP_A, SRC_ZERO);
      pe(3, 2*j,   2, OP_DELAY, SRC_UP_A, SRC_ZERO);
    end

    // Patterns. Memory layout of a correlation run (source and destination
    // alike): banks 0,1 x; banks 2,3 delayed copy; banks 6,7 running sum.
    begin
      int imap [LANES] = '{0, 2, 1, 3, 0, 3, 1, 2, 2, 3, 0, 1, 0, 0, 0, 0};
      int omap [LANES] = '{10, 11, 8, 9, -1, -1, 2, 6, -1, -1, -1, -1, -1, -1, -1, -1};
      for (int l = 0; l < LANES; l++) begin
        buf_lane(0, 1, l, imap[l], 1'b1);
        buf_lane(1, 1, l, (omap[l] < 0) ? 0 : omap[l], omap[l] >= 0);
        // square modulus: column 2j gets bank 2j twice, column 2j+1 bank 2j+1
        buf_lane(0, 2, l, 2*(l/4) + ((l%4) >= 2), 1'b1);
        // square modulus results of columns 0,2,4,6 to banks 0..3
        buf_lane(1, 2, l, 4*l, l < 4);
        buf_lane(1, 0, l, 0, 1'b0);
      end
    end

    for (int b = 0; b < LANES; b++) dma_write(0, b, 255, 32'd12);
    for (int i = 0; i < N; i++) begin
      dma_write(0, 0, i, sr[i]);
      dma_write(0, 1, i, si[i]);
      dma_write(0, 2, i, sr[i+D]);
      dma_write(0, 3, i, si[i+D]);
    end

    run_clocks = 0;
    run(0, 0, 0, 0, 255, 1, 0, 1);

    // ---- 80 correlations, ping-pong ----
    t_start = $time / 10;
    src = 0;
    for (int k = 0; k < N; k++) begin
      run(1, 1, 1, src, 0, N, 0, 5);
      dma_read(1 - src, 6, N-1, got); check("correlation real", got, cr[k]);
      dma_read(1 - src, 7, N-1, got); check("correlation imag", got, ci[k]);
      if (k == 0) begin
        dma_read(1 - src, 2, 0, got); check("recycled copy shifted", got, sr[D+1]);
      end
      // the new last sample of the delayed copy
      if (k < N-1) begin
        dma_write(1 - src, 2, N-1, sr[N+D+k]);
        dma_write(1 - src, 3, N-1, si[N+D+k]);
      end
      src = 1 - src;
    end
    $display("80 correlations: %0d clocks in runs, %0d clocks with host transfers (%0d per correlation run)",
             run_clocks - 6, $time / 10 - t_start, N + 5 + 4);

    // ---- square modulus, four results per line ----
    for (int k = 0; k < N; k++) begin
      dma_write(src, 2*(k%4),   100 + k/4, cr[k]);
      dma_write(src, 2*(k%4)+1, 100 + k/4, ci[k]);
    end
    run(2, 2, 2, src, 100, N/4, 100, 5);
    best = 0; best_k = -1;
    for (int k = 0; k < N; k++) begin
      dma_read(1 - src, k%4, 100 + k/4, got);
      sm[k] = cr[k]*cr[k] + ci[k]*ci[k];
      check("square modulus", got, sm[k]);
      if (got > best) begin best = got; best_k = k; end
    end
    check("peak offset", DW'(best_k), DW'(OFS));
    $display("square modulus of 80 values: %0d clocks; peak at offset %0d", N/4 + 5 + 4, best_k);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
