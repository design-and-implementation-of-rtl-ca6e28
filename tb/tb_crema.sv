// End-to-end testbench of the crema accelerator at its full size.
//
// Acts as the host: injects PE contexts and I/O buffer patterns through the
// register port, fills local memory 1 through the DMA port, starts runs and
// waits for irq, then reads results back and compares them with references
// computed here. The runs are OFDM receiver kernels mapped onto the array:
//   imm   load the shift amount 12 into every PE (vertical lines);
//   corr  cyclic-prefix correlation: x_i * conj(x_{i+16}) summed over 80
//         samples with loop-back accumulators, >> 12 after each product; the
//         delayed samples also pass through an unregistered feed-through
//         path so that they land one line earlier in the destination memory;
//   corr2 the same context on the other memory (ping-pong): the correlation
//         at the next lag, from the recycled, shifted samples;
//   sqmod square modulus of the correlation results;
//   cmul  80-point complex multiplication with a correction factor, then a
//         separate context shifting the products right by 12;
//   reord delay-chain reordering of one bank into two parallel columns with
//         write cycles and write stalls.
// Every run's clock count from start to irq is checked against
// lines + latency + 4. Each mechanism (configuration injection, context
// switch, immediate load, loop accumulation, feed-through, ping-pong swap,
// I/O pattern switch, write stall, irq) is counted; one that never happened
// counts as a failure.
module tb_crema;
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

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, logic [DW-1:0] got, logic [DW-1:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0d (%h) expected %0d (%h)", what, $signed(got), got, $signed(exp), exp);
    end
  endtask

  // ---------------- mechanism counters ----------------
  int n_cfg = 0, n_ctx_switch = 0, n_imm = 0, n_loop = 0, n_urf = 0, n_pingpong = 0;
  int n_pat_switch = 0, n_stall = 0, n_irq = 0;
  logic [CTXW-1:0] last_ctx = '0;
  logic            last_dir = 1'b0;

  always @(posedge clk) begin
    if (irq) n_irq++;
    if (dut.u_ctrl.dvalid && !(dut.u_ctrl.phase < dut.u_ctrl.wr_cycles)) n_stall++;
    // watched inside the array: a PE loading its immediate from a valid line,
    // an accumulator reading its own output, a feed-through PE during a run
    if (dut.u_array.imm_we && dut.u_array.g_row[2].g_col[1].u_pe.ctx.op == OP_LDIMM) n_imm++;
    if (dut.busy && dut.u_array.g_row[3].g_col[1].u_pe.ctx.src_b == SRC_LOOP_A) n_loop++;
    if (dut.busy && dut.u_array.g_row[0].g_col[4].u_pe.ctx.op == OP_URF) n_urf++;
  end

  // ---------------- host helpers ----------------
  task automatic wr(reg_e a, logic [DW-1:0] d);
    reg_we = 1'b1; reg_addr = a; reg_wdata = d;
    @(posedge clk); #1;
    reg_we = 1'b0;
    if (a == REG_CFG_PE) n_cfg++;
    if (a == REG_CTX && CTXW'(d) != last_ctx) begin n_ctx_switch++; last_ctx = CTXW'(d); end
    if (a == REG_DIR && d[0] != last_dir) begin n_pingpong++; last_dir = d[0]; end
    if (a == REG_IBUF_PAT || a == REG_OBUF_PAT) n_pat_switch++;
  endtask

  task automatic pe(int r, int c, int slot, pe_op_e op, pe_src_e a, pe_src_e b);
    cfg_word_t w;
    w = '{pe: PEW'(r*COLS + c), slot: CTXW'(slot), ctx: '{op: op, src_a: a, src_b: b}};
    wr(REG_CFG_PE, DW'(w));
  endtask

  // one output lane of one pattern of one buffer (0 input, 1 output)
  task automatic buf_lane(int which, int pat, int lane, int sel, bit en);
    iobuf_cfg_t w;
    w = '{pat: PATW'(pat), lane: LANEW'(lane), sel: LANEW'(sel), en: en};
    wr(which ? REG_CFG_OBUF : REG_CFG_IBUF, DW'(w));
  endtask

  // output pattern: bank b written from lane map[b], or not written if -1
  task automatic obuf_pat(int pat, int map[LANES]);
    for (int b = 0; b < LANES; b++) buf_lane(1, pat, b, (map[b] < 0) ? 0 : map[b], map[b] >= 0);
  endtask

  task automatic ibuf_pat(int pat, int map[LANES]);
    for (int l = 0; l < LANES; l++) buf_lane(0, pat, l, map[l], 1'b1);
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
  endtask

  // Start a run and wait for irq; check the clock count.
  task automatic run(string name, int ctx, int ipat, int opat, int dir, int rd_base, int n,
                     int wr_base, int lat, int wc, int ws);
    int t0, t1;
    wr(REG_CTX, DW'(ctx));
    wr(REG_IBUF_PAT, DW'(ipat));
    wr(REG_OBUF_PAT, DW'(opat));
    wr(REG_DIR, DW'(dir));
    wr(REG_RD_BASE, DW'(rd_base));
    wr(REG_RD_COUNT, DW'(n));
    wr(REG_WR_BASE, DW'(wr_base));
    wr(REG_LATENCY, DW'(lat));
    wr(REG_WR_CYC, DW'(wc));
    wr(REG_WR_STALL, DW'(ws));
    wr(REG_CTRL, 32'd1);
    t0 = $time / 10;                 // the clock edge that took start
    while (!irq) @(posedge clk);
    t1 = $time / 10;
    #1;
    check({name, " clocks start to irq"}, DW'(t1 - t0), DW'(n + lat + 4));
    reg_addr = REG_CTRL;
    #1;
    check({name, " status"}, reg_rdata, 32'd2);
    $display("%s: %0d lines in %0d clocks", name, n, t1 - t0);
  endtask

  // ---------------- test data ----------------
  localparam int D = 16;           // cyclic prefix length, the correlation lag
  localparam int NC = 80;          // samples per correlation

  logic signed [DW-1:0] xr [NC + D + 1], xi [NC + D + 1];
  logic signed [DW-1:0] ar [NC], ai [NC], er [NC], ei [NC];
  logic signed [DW-1:0] pr, pi, accr, acci, corr_re [NC], corr_im [NC];
  logic [DW-1:0]        got;
  int                   map [LANES];

  function automatic logic signed [DW-1:0] sample();
    return $signed(32'($urandom_range(0, 8191))) - 32'sd4096;
  endfunction

  initial begin
    for (int i = 0; i < NC + D + 1; i++) begin xr[i] = sample(); xi[i] = sample(); end
    for (int i = 0; i < NC; i++) begin
      ar[i] = sample(); ai[i] = sample(); er[i] = sample(); ei[i] = sample();
    end
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk); #1;

    // ======== contexts ========
    // 0: immediate load
    for (int r = 0; r < ROWS; r++)
      for (int c = 0; c < COLS; c++) pe(r, c, 0, OP_LDIMM, SRC_ZERO, SRC_VERT);
    // 1: correlation. Lanes: 0,1 (xr, xrD) 2,3 (xi, xiD) 4,5 (xr, xiD) 6,7 (xi, xrD)
    //    8,9 (xrD, xiD) 10,11 (xr, xi)
    for (int c = 0; c < 4; c++) pe(0, c, 1, OP_MUL, SRC_UP_A, SRC_UP_B);
    pe(1, 1, 1, OP_ADD, SRC_UL_A, SRC_UP_A);       // xr*xrD + xi*xiD
    pe(1, 3, 1, OP_SUB, SRC_UL_A, SRC_UP_A);       // xr*xiD - xi*xrD
    pe(2, 1, 1, OP_SHR, SRC_UP_A, SRC_ZERO);
    pe(2, 3, 1, OP_SHR, SRC_UP_A, SRC_ZERO);
    pe(3, 1, 1, OP_ADD, SRC_UP_A, SRC_LOOP_A);     // accumulate
    pe(3, 3, 1, OP_ADD, SRC_UP_A, SRC_LOOP_A);
    pe(0, 4, 1, OP_URF, SRC_UP_A, SRC_UP_B);       // delayed samples, one stage short
    for (int r = 1; r < ROWS; r++) pe(r, 4, 1, OP_DELAY, SRC_UP_A, SRC_UP_B);
    for (int r = 0; r < ROWS; r++) pe(r, 5, 1, OP_DELAY, SRC_UP_A, SRC_UP_B);
    // 2: complex multiplication, two per line, four columns each.
    //    Lanes of columns 4k..4k+3: (ar,er) (ai,ei) (ar,ei) (ai,er)
    for (int c = 0; c < COLS; c++) pe(0, c, 2, OP_MUL, SRC_UP_A, SRC_UP_B);
    for (int k = 0; k < 2; k++) begin
      pe(1, 4*k+1, 2, OP_SUB, SRC_UL_A, SRC_UP_A);
      pe(1, 4*k+3, 2, OP_ADD, SRC_UL_A, SRC_UP_A);
      for (int r = 2; r < ROWS; r++) begin
        pe(r, 4*k+1, 2, OP_DELAY, SRC_UP_A, SRC_ZERO);
        pe(r, 4*k+3, 2, OP_DELAY, SRC_UP_A, SRC_ZERO);
      end
    end
    // 3: shift context: delay, >>, delay, delay in every column
    for (int c = 0; c < COLS; c++) begin
      pe(0, c, 3, OP_DELAY, SRC_UP_A, SRC_ZERO);
      pe(1, c, 3, OP_SHR,   SRC_UP_A, SRC_ZERO);
      pe(2, c, 3, OP_DELAY, SRC_UP_A, SRC_ZERO);
      pe(3, c, 3, OP_DELAY, SRC_UP_A, SRC_ZERO);
    end
    // 4: square modulus: lanes 0,1 (re, re) 2,3 (im, im)
    pe(0, 0, 4, OP_MUL, SRC_UP_A, SRC_UP_B);
    pe(0, 1, 4, OP_MUL, SRC_UP_A, SRC_UP_B);
    pe(1, 0, 4, OP_ADD, SRC_UP_A, SRC_UR_A);
    pe(2, 0, 4, OP_DELAY, SRC_UP_A, SRC_ZERO);
    pe(3, 0, 4, OP_DELAY, SRC_UP_A, SRC_ZERO);
    // 5: reordering: path A down column 0 (4 stages), path B along row 0
    //    to column 2 and down (6 stages)
    for (int r = 0; r < ROWS; r++) pe(r, 0, 5, OP_DELAY, SRC_UP_A, SRC_ZERO);
    pe(0, 1, 5, OP_DELAY, SRC_LEFT_A, SRC_ZERO);
    pe(0, 2, 5, OP_DELAY, SRC_LEFT_A, SRC_ZERO);
    for (int r = 1; r < ROWS; r++) pe(r, 2, 5, OP_DELAY, SRC_UP_A, SRC_ZERO);
    repeat (ROWS + COLS) @(posedge clk);

    // ======== I/O buffer patterns ========
    // input 0: identity (reset value). input 1: correlation
    map = '{0, 2, 1, 3, 0, 3, 1, 2, 2, 3, 0, 1, 0, 0, 0, 0};
    ibuf_pat(1, map);
    // input 2: correlation from the recycled layout (x in banks 2,3, xD in 4,5)
    map = '{2, 4, 3, 5, 2, 5, 3, 4, 4, 5, 2, 3, 0, 0, 0, 0};
    ibuf_pat(2, map);
    // input 3: complex multiplication, pairs in banks 8..11 and 12..15 as (ar, er, ei, ai)
    map = '{8, 9, 11, 10, 8, 10, 11, 9, 12, 13, 15, 14, 12, 14, 15, 13};
    ibuf_pat(3, map);
    // input 4: shift, banks 8..11 to lanes 0,2,4,6
    map = '{8, 0, 9, 0, 10, 0, 11, 0, 0, 0, 0, 0, 0, 0, 0, 0};
    ibuf_pat(4, map);
    // input 5: square modulus of banks 0,1
    map = '{0, 0, 1, 1, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0};
    ibuf_pat(5, map);
    // input 6: reordering from bank 6
    map = '{6, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0};
    ibuf_pat(6, map);
    // output 0: nothing written
    map = '{-1, -1, -1, -1, -1, -1, -1, -1, -1, -1, -1, -1, -1, -1, -1, -1};
    obuf_pat(0, map);
    // output 1: correlation: corr re/im to banks 0,1, x to 2,3, shifted xD to 4,5
    map = '{2, 6, 10, 11, 8, 9, -1, -1, -1, -1, -1, -1, -1, -1, -1, -1};
    obuf_pat(1, map);
    // output 2: complex multiplication results to banks 8..11
    map = '{-1, -1, -1, -1, -1, -1, -1, -1, 2, 6, 10, 14, -1, -1, -1, -1};
    obuf_pat(2, map);
    // output 3: shifted results to banks 12..15
    map = '{-1, -1, -1, -1, -1, -1, -1, -1, -1, -1, -1, -1, 0, 2, 4, 6};
    obuf_pat(3, map);
    // output 4: square modulus to bank 6
    map = '{-1, -1, -1, -1, -1, -1, 0, -1, -1, -1, -1, -1, -1, -1, -1, -1};
    obuf_pat(4, map);
    // output 5: reordered pairs to banks 0,1
    map = '{0, 4, -1, -1, -1, -1, -1, -1, -1, -1, -1, -1, -1, -1, -1, -1};
    obuf_pat(5, map);

    // ======== data into local memory 1 ========
    for (int i = 0; i < NC; i++) begin
      dma_write(0, 0, i, xr[i]);
      dma_write(0, 1, i, xi[i]);
      dma_write(0, 2, i, xr[i+D]);
      dma_write(0, 3, i, xi[i+D]);
    end
    for (int i = 0; i < NC/2; i++)
      for (int k = 0; k < 2; k++) begin
        dma_write(0, 8+4*k, 100+i, ar[2*i+k]);
        dma_write(0, 9+4*k, 100+i, er[2*i+k]);
        dma_write(0, 10+4*k, 100+i, ei[2*i+k]);
        dma_write(0, 11+4*k, 100+i, ai[2*i+k]);
      end
    for (int i = 0; i < 8; i++) dma_write(0, 6, 200+i, DW'(1000 + i));
    for (int b = 0; b < LANES; b++) dma_write(0, b, 255, 32'd12);

    // ======== imm: load the shift amount ========
    run("imm", 0, 0, 0, 0, 255, 1, 0, 1, 0, 0);
    check("immediate register", dut.u_array.g_row[2].g_col[1].u_pe.u_core.imm_q, 32'd12);

    // ======== corr ========
    run("corr", 1, 1, 1, 0, 0, NC, 0, 5, 1, 0);
    accr = 0; acci = 0;
    for (int i = 0; i < NC; i++) begin
      accr += (xr[i]*xr[i+D] + xi[i]*xi[i+D]) >>> 12;
      acci += (xr[i]*xi[i+D] - xi[i]*xr[i+D]) >>> 12;
    end
    dma_read(1, 0, NC-1, got); check("corr real", got, accr);
    dma_read(1, 1, NC-1, got); check("corr imag", got, acci);
    for (int i = 0; i < NC; i++) begin
      dma_read(1, 4, i, got); check("recycled xD real", got, (i < NC-1) ? xr[i+D+1] : 0);
      dma_read(1, 5, i, got); check("recycled xD imag", got, (i < NC-1) ? xi[i+D+1] : 0);
      dma_read(1, 2, i, got); check("recycled x real", got, xr[i]);
    end

    // ======== corr2: next lag, from memory 2 ========
    run("corr2", 1, 2, 1, 1, 0, NC, 0, 5, 1, 0);
    accr = 0; acci = 0;
    for (int i = 0; i < NC; i++) begin
      pr = (i < NC-1) ? xr[i+D+1] : 0;
      pi = (i < NC-1) ? xi[i+D+1] : 0;
      accr += (xr[i]*pr + xi[i]*pi) >>> 12;
      acci += (xr[i]*pi - xi[i]*pr) >>> 12;
      corr_re[i] = accr;
      corr_im[i] = acci;
    end
    dma_read(0, 0, NC-1, got); check("corr2 real", got, accr);
    dma_read(0, 1, NC-1, got); check("corr2 imag", got, acci);

    // ======== sqmod of the running correlation ========
    run("sqmod", 4, 5, 4, 0, 0, NC, 0, 5, 1, 0);
    for (int i = 0; i < NC; i++) begin
      dma_read(1, 6, i, got);
      check("square modulus", got, corr_re[i]*corr_re[i] + corr_im[i]*corr_im[i]);
    end

    // ======== cmul, then shift in a second context ========
    run("cmul", 2, 3, 2, 0, 100, NC/2, 100, 5, 1, 0);
    run("shift", 3, 4, 3, 1, 100, NC/2, 100, 5, 1, 0);
    for (int i = 0; i < NC/2; i++)
      for (int k = 0; k < 2; k++) begin
        pr = (ar[2*i+k]*er[2*i+k] - ai[2*i+k]*ei[2*i+k]) >>> 12;
        pi = (ar[2*i+k]*ei[2*i+k] + ai[2*i+k]*er[2*i+k]) >>> 12;
        dma_read(0, 12+2*k, 100+i, got); check("cmul real", got, pr);
        dma_read(0, 13+2*k, 100+i, got); check("cmul imag", got, pi);
      end

    // ======== reord: two writes, two stalls ========
    run("reord", 5, 6, 5, 0, 200, 8, 200, 7, 2, 2);
    // lines (x2, x0) (x3, x1) (x6, x4) (x7, x5)
    for (int j = 0; j < 4; j++) begin
      int base;
      base = (j < 2) ? j : j + 2;
      dma_read(1, 0, 200+j, got); check("reorder left", got, DW'(1000 + base + 2));
      dma_read(1, 1, 200+j, got); check("reorder right", got, DW'(1000 + base));
    end
    dma_read(1, 0, 204, got);

    // ======== mechanisms ========
    $display("mechanisms: cfg=%0d ctx_switch=%0d imm=%0d loop=%0d urf=%0d pingpong=%0d pat_switch=%0d stall=%0d irq=%0d",
             n_cfg, n_ctx_switch, n_imm, n_loop, n_urf, n_pingpong, n_pat_switch, n_stall, n_irq);
    check("mechanism cfg", DW'(n_cfg > 0), 1);
    check("mechanism context switch", DW'(n_ctx_switch > 0), 1);
    check("mechanism immediate load", DW'(n_imm > 0), 1);
    check("mechanism loop", DW'(n_loop > 0), 1);
    check("mechanism feed-through", DW'(n_urf > 0), 1);
    check("mechanism ping-pong", DW'(n_pingpong > 0), 1);
    check("mechanism pattern switch", DW'(n_pat_switch > 0), 1);
    check("mechanism write stall", DW'(n_stall > 0), 1);
    check("mechanism irq", DW'(n_irq == 7), 1);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
