// Channel estimation and equalisation on the whole crema accelerator: the
// complete chain from four received pilots to 48 equalised data
// subcarriers, with all eight contexts of a PE and seven input patterns.
//   0  load the shift amount 12 into every PE;
//   1  pilot channel response HLS = RP * ITP >> 12 (received pilot times the
//      inverse of the transmitted one), two per line, shift in the context;
//   2  linear interpolation between neighbouring pilots, run once for the
//      real and once for the imaginary parts: H = HLS_s + ((HLS_s+1 -
//      HLS_s) * mu) >> 12 with mu = m/16 (Q12), three groups of 16 per line;
//      in the second run two spare columns carry the real results along so
//      that real and imaginary parts land side by side;
//   3  Newton-Raphson, first half: Y = ((a^2 + b^2) >> 12) * X0 with a fixed
//      initial guess X0 = 1.0 (Q12) on a horizontal broadcast line; the
//      broadcast runs three lines ahead of the columns, so the run reads
//      three extra lines holding X0 and writes 16, then stalls for 3;
//   4  Newton-Raphson, second half: R = X0 * (2 - (Y >> 12)) ~ 1/|H|^2;
//   5  Z = F * conj(H) for each received subcarrier F, two per line;
//   6  per column (Z >> 12) * (R >> 12);
//   7  a final shift by 12 in every column.
// Between runs the host moves the values that change layout (pilot results
// into the interpolation lines, X0 and the constant 2, Z next to R), as it
// does through main memory in the original flow. Every value and every
// run's clock count (lines + latency + 4) is checked against integer
// arithmetic done here; the sizes are the accelerator's defaults.
// The stages, their order and the operations in each mapping follow the
// published channel-estimation mapping; the memory and lane layouts, the
// single Newton-Raphson iteration from a fixed guess, and shifting before
// adding in the interpolation are this testbench's own choices.
module tb_crema_chest;
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
    repeat (60000) @(posedge clk);
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
  endtask

  int run_clocks;   // clocks spent inside runs

  task automatic run(int ctx, int ipat, int opat, int dir, int rd_base, int n, int wr_base, int lat,
                     int wc = 1, int ws = 0);
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
    t0 = $time / 10;
    while (!irq) @(posedge clk);
    t1 = $time / 10;
    #1;
    check("clocks start to irq", DW'(t1 - t0), DW'(n + lat + 4));
    run_clocks += t1 - t0;
  endtask

  localparam int NSC = 48;     // data subcarriers
  localparam int X0  = 4096;   // initial guess, 1.0 in Q12

  logic signed [DW-1:0] rpr [4], rpi [4], itr [4], iti [4], hr [4], hi [4];
  logic signed [DW-1:0] a [NSC], b [NSC], xr [NSC], xi [NSC];
  logic signed [DW-1:0] y [NSC], r [NSC], zr [NSC], zi [NSC], er [NSC], ei [NSC];
  logic [DW-1:0]        got;
  int                   hls_bank [4] = '{0, 2, 6, 10};

  task automatic set_lane(int which, int pat, int lane, int sel);
    buf_lane(which, pat, lane, (sel < 0) ? 0 : sel, sel >= 0);
  endtask

  function automatic logic signed [DW-1:0] sample();
    return $signed(32'($urandom_range(0, 8191))) - 32'sd4096;
  endfunction

  initial begin
    // pilots: BPSK transmitted (inverse +-1.0), received with a random gain
    for (int p = 0; p < 4; p++) begin
      itr[p] = $urandom_range(0, 1) ? 32'sd4096 : -32'sd4096;
      iti[p] = 0;
      rpr[p] = sample();
      rpi[p] = sample();
      hr[p]  = (rpr[p]*itr[p] - rpi[p]*iti[p]) >>> 12;
      hi[p]  = (rpr[p]*iti[p] + rpi[p]*itr[p]) >>> 12;
    end
    for (int k = 0; k < NSC; k++) begin
      a[k]  = hr[k/16] + (((hr[k/16+1] - hr[k/16]) * (256 * (k%16))) >>> 12);
      b[k]  = hi[k/16] + (((hi[k/16+1] - hi[k/16]) * (256 * (k%16))) >>> 12);
      xr[k] = sample();
      xi[k] = sample();
      y[k]  = ((a[k]*a[k] + b[k]*b[k]) >>> 12) * X0;
      r[k]  = X0 * (32'sd8192 - (y[k] >>> 12));
      zr[k] = xr[k]*a[k] + xi[k]*b[k];
      zi[k] = xi[k]*a[k] - xr[k]*b[k];
      er[k] = ((zr[k] >>> 12) * (r[k] >>> 12)) >>> 12;
      ei[k] = ((zi[k] >>> 12) * (r[k] >>> 12)) >>> 12;
    end

    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk); #1;

    // ---------------- contexts ----------------
    for (int rr = 0; rr < ROWS; rr++)
      for (int c = 0; c < COLS; c++) pe(rr, c, 0, OP_LDIMM, SRC_ZERO, SRC_VERT);
    // 1 and 5: complex products on four columns each, lanes
    //    (p,q) (pi,qi) (pr,qi) (pi,qr) for columns 4k..4k+3
    for (int c = 0; c < COLS; c++) begin
      pe(0, c, 1, OP_MUL, SRC_UP_A, SRC_UP_B);
      pe(0, c, 5, OP_MUL, SRC_UP_A, SRC_UP_B);
    end
    for (int k = 0; k < 2; k++) begin
      pe(1, 4*k+1, 1, OP_SUB, SRC_UL_A, SRC_UP_A);     // pr*qr - pi*qi
      pe(1, 4*k+3, 1, OP_ADD, SRC_UL_A, SRC_UP_A);     // pr*qi + pi*qr
      pe(2, 4*k+1, 1, OP_SHR, SRC_UP_A, SRC_ZERO);
      pe(2, 4*k+3, 1, OP_SHR, SRC_UP_A, SRC_ZERO);
      pe(3, 4*k+1, 1, OP_DELAY, SRC_UP_A, SRC_ZERO);
      pe(3, 4*k+3, 1, OP_DELAY, SRC_UP_A, SRC_ZERO);
      pe(1, 4*k+1, 5, OP_ADD, SRC_UL_A, SRC_UP_A);     // xr*a + xi*b
      pe(1, 4*k+3, 5, OP_SUB, SRC_UL_A, SRC_UP_A);     // xi*a - xr*b
      for (int rr = 2; rr < ROWS; rr++) begin
        pe(rr, 4*k+1, 5, OP_DELAY, SRC_UP_A, SRC_ZERO);
        pe(rr, 4*k+3, 5, OP_DELAY, SRC_UP_A, SRC_ZERO);
      end
    end
    for (int s = 0; s < 3; s++) begin
      // 2: lanes 4s, 4s+1 = (HLS_s+1, HLS_s), lane 4s+2 = mu
      pe(0, 2*s,   2, OP_SUB,   SRC_UP_A, SRC_UP_B);   // difference; HLS_s on OUT2
      pe(0, 2*s+1, 2, OP_DELAY, SRC_UP_A, SRC_ZERO);
      pe(1, 2*s,   2, OP_DELAY, SRC_UP_B, SRC_ZERO);
      pe(1, 2*s+1, 2, OP_MUL,   SRC_UP_A, SRC_UL_A);
      pe(2, 2*s,   2, OP_DELAY, SRC_UP_A, SRC_ZERO);
      pe(2, 2*s+1, 2, OP_SHR,   SRC_UP_A, SRC_ZERO);
      pe(3, 2*s+1, 2, OP_ADD,   SRC_UP_A, SRC_UL_A);
      // 3: squares in columns 2s+2, 2s+3; sum, shift, times X0
      pe(0, 2*s+2, 3, OP_MUL, SRC_UP_A, SRC_UP_B);
      pe(0, 2*s+3, 3, OP_MUL, SRC_UP_A, SRC_UP_B);
      pe(1, 2*s+3, 3, OP_ADD, SRC_UL_A, SRC_UP_A);
      pe(2, 2*s+3, 3, OP_SHR, SRC_UP_A, SRC_ZERO);
      pe(3, 2*s+3, 3, OP_MUL, SRC_UP_A, SRC_HOR0);
      // 4: (X0, 2) down column 2s+2, Y down column 2s+3
      pe(0, 2*s+2, 4, OP_DELAY, SRC_UP_A, SRC_UP_B);
      pe(0, 2*s+3, 4, OP_DELAY, SRC_UP_A, SRC_ZERO);
      pe(1, 2*s+2, 4, OP_DELAY, SRC_UP_A, SRC_UP_B);
      pe(1, 2*s+3, 4, OP_SHR,   SRC_UP_A, SRC_ZERO);
      pe(2, 2*s+2, 4, OP_DELAY, SRC_UP_A, SRC_ZERO);
      pe(2, 2*s+3, 4, OP_SUB,   SRC_UL_B, SRC_UP_A);
      pe(3, 2*s+2, 4, OP_MUL,   SRC_UP_A, SRC_UR_A);
    end
    // 2: spare columns 6 and 7 carry three real results down
    for (int rr = 0; rr < ROWS; rr++) begin
      pe(rr, 6, 2, OP_DELAY, SRC_UP_A, SRC_ZERO);
      pe(rr, 7, 2, OP_DELAY, SRC_UP_A, SRC_UP_B);
    end
    // 6 and 7 in columns 0..5
    for (int c = 0; c < 6; c++) begin
      pe(0, c, 6, OP_DELAY, SRC_UP_A, SRC_UP_B);   // (Z, R)
      pe(1, c, 6, OP_SHR,   SRC_UP_A, SRC_UP_B);   // Z >> 12, R passes on OUT2
      pe(2, c, 6, OP_SHR,   SRC_UP_B, SRC_UP_A);   // R >> 12, Z >> 12 on OUT2
      pe(3, c, 6, OP_MUL,   SRC_UP_A, SRC_UP_B);
      pe(0, c, 7, OP_DELAY, SRC_UP_A, SRC_ZERO);
      pe(1, c, 7, OP_SHR,   SRC_UP_A, SRC_ZERO);
      pe(2, c, 7, OP_DELAY, SRC_UP_A, SRC_ZERO);
      pe(3, c, 7, OP_DELAY, SRC_UP_A, SRC_ZERO);
    end

    // ---------------- patterns ----------------
    // input:  0 identity, 1 pilots / 5 subcarriers (product k in banks
    //         8k.. as (p_r, p_i, q_r, q_i)), 2 interpolation, 3 and 4
    //         Newton-Raphson, 6 (Z, R) pairs.
    // output: 0 none, 1 products to banks 0..3, 2 interpolated real parts to
    //         banks 13..15, 3 interpolated (real, imag) to banks 4s+2, 4s+3,
    //         4 Y to banks 3, 7, 11, 5 R to banks 1, 5, 9, 6 columns 0..5 to
    //         banks 0, 2, .., 10.
    for (int l = 0; l < LANES; l++) begin
      int q;
      q = l % 8;
      set_lane(1, 0, l, -1);
      set_lane(0, 1, l, 8*(l/8) + ((q == 0 || q == 4) ? 0 : (q == 2 || q == 6) ? 1 :
                                   (q == 1 || q == 7) ? 2 : 3));
      set_lane(0, 5, l, 8*(l/8) + ((q == 0 || q == 7) ? 0 : (q == 2 || q == 4) ? 1 :
                                   (q == 1 || q == 5) ? 2 : 3));
      set_lane(0, 2, l, (l >= 12) ? l + 1 - (l == 12 ? 0 : 1) :
                        (l%4 == 0) ? hls_bank[l/4 + 1] : (l%4 == 1) ? hls_bank[l/4] :
                        (l%4 == 2) ? 1 : 0);
      set_lane(0, 3, l, (l < 4) ? 0 : (l % 4 < 2) ? 4*(l/4 - 1) + 2 : 4*(l/4 - 1) + 3);
      set_lane(0, 4, l, (l < 4) ? 0 : (l % 4 == 0) ? 0 : (l % 4 == 1) ? 1 : 4*(l/4 - 1) + 3);
      set_lane(0, 6, l, (l%4 == 3) ? l - 2 : l);
      set_lane(1, 1, l, (l < 4) ? 4*l + 2 : -1);
      set_lane(1, 2, l, (l >= 13) ? 4*(l - 13) + 2 : -1);
      set_lane(1, 3, l, (l < 12 && l%4 == 2) ? ((l == 2) ? 12 : (l == 6) ? 14 : 15) :
                        (l < 12 && l%4 == 3) ? l - 1 : -1);
      set_lane(1, 4, l, (l%4 == 3 && l < 12) ? 4*(l/4) + 6 : -1);
      set_lane(1, 5, l, (l%4 == 1 && l < 12) ? 4*(l/4) + 4 : -1);
      set_lane(1, 6, l, (l%2 == 0 && l < 12) ? l : -1);
    end

    for (int bk = 0; bk < LANES; bk++) dma_write(0, bk, 255, 32'd12);
    run_clocks = 0;
    run(0, 0, 0, 0, 255, 1, 0, 1);

    // ---------------- 1: pilots ----------------
    for (int p = 0; p < 4; p++) begin
      dma_write(0, 8*(p%2) + 0, 200 + p/2, rpr[p]);
      dma_write(0, 8*(p%2) + 1, 200 + p/2, rpi[p]);
      dma_write(0, 8*(p%2) + 2, 200 + p/2, itr[p]);
      dma_write(0, 8*(p%2) + 3, 200 + p/2, iti[p]);
    end
    run(1, 1, 1, 0, 200, 2, 200, 5);
    for (int p = 0; p < 4; p++) begin
      dma_read(1, 2*(p%2),     200 + p/2, got); check("pilot response real", got, hr[p]);
      dma_read(1, 2*(p%2) + 1, 200 + p/2, got); check("pilot response imag", got, hi[p]);
    end

    // ---------------- 2: linear interpolation, real then imaginary ----------------
    for (int m = 0; m < 16; m++) begin
      dma_write(0, 1, m, DW'(256 * m));
      for (int p = 0; p < 4; p++) dma_write(0, hls_bank[p], m, hr[p]);
    end
    run(2, 2, 2, 0, 0, 16, 0, 5);
    for (int k = 0; k < NSC; k++) begin
      dma_read(1, 13 + k/16, k%16, got); check("interpolated real", got, a[k]);
      dma_write(0, 13 + k/16, k%16, got);
    end
    for (int m = 0; m < 16; m++)
      for (int p = 0; p < 4; p++) dma_write(0, hls_bank[p], m, hi[p]);
    run(2, 2, 3, 0, 0, 16, 0, 5);
    for (int k = 0; k < NSC; k++) begin
      dma_read(1, 4*(k/16) + 2, k%16, got); check("channel estimate real", got, a[k]);
      dma_read(1, 4*(k/16) + 3, k%16, got); check("channel estimate imag", got, b[k]);
    end

    // ---------------- 3, 4: Newton-Raphson ----------------
    for (int l = 0; l < 19; l++) dma_write(1, 0, l, X0);
    run(3, 3, 4, 1, 0, 19, 0, 5, 16, 3);
    for (int k = 0; k < NSC; k++) begin
      dma_read(0, 4*(k/16) + 3, k%16, got); check("Newton-Raphson Y", got, y[k]);
    end
    for (int l = 0; l < 16; l++) begin
      dma_write(0, 0, l, X0);
      dma_write(0, 1, l, 32'd8192);
    end
    run(4, 4, 5, 0, 0, 16, 0, 5);
    for (int k = 0; k < NSC; k++) begin
      dma_read(1, 4*(k/16) + 1, k%16, got); check("reciprocal", got, r[k]);
    end

    // ---------------- 5: F * conj(H) ----------------
    for (int k = 0; k < NSC; k++) begin
      dma_write(0, 8*(k%2) + 0, 100 + k/2, xr[k]);
      dma_write(0, 8*(k%2) + 1, 100 + k/2, xi[k]);
      dma_write(0, 8*(k%2) + 2, 100 + k/2, a[k]);
      dma_write(0, 8*(k%2) + 3, 100 + k/2, b[k]);
    end
    run(5, 5, 1, 0, 100, NSC/2, 100, 5);
    for (int k = 0; k < NSC; k++) begin
      dma_read(1, 2*(k%2),     100 + k/2, got); check("Z real", got, zr[k]);
      dma_write(1, 4*(k/16),     k%16, got);
      dma_read(1, 2*(k%2) + 1, 100 + k/2, got); check("Z imag", got, zi[k]);
      dma_write(1, 4*(k/16) + 2, k%16, got);
    end

    // ---------------- 6, 7: multiply by the reciprocal, final shift ----------------
    run(6, 6, 6, 1, 0, 16, 0, 5);
    run(7, 0, 6, 0, 0, 16, 0, 5);
    for (int k = 0; k < NSC; k++) begin
      dma_read(1, 4*(k/16),     k%16, got); check("equalised real", got, er[k]);
      dma_read(1, 4*(k/16) + 2, k%16, got); check("equalised imag", got, ei[k]);
    end
    $display("channel estimation and equalisation: %0d clocks in eight runs", run_clocks - 6);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
