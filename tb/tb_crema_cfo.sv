// Frequency-offset estimation and correction workload on the whole crema
// accelerator, with its four contexts:
//   0  load the shift amount 12 into every PE;
//   1  160-point multiplication of the short preamble by the complex
//      conjugate of its delayed copy, two products per line on four columns
//      each: (ar*br + ai*bi, ai*br - ar*bi) >> 12;
//   2  80-point complex multiplication of a received symbol by the
//      correction factor, without the shift;
//   3  a separate shift context (>> 12) run on the products from the other
//      local memory (ping-pong).
// Between contexts 1 and 2 the host works out the correction factor; here
// the testbench writes a random factor in its place, since
// that step runs in processor software. Every product and every run's clock
// count (lines + latency + 4) is checked; the sizes are the accelerator's
// defaults.
module tb_crema_cfo;
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
    #1;
    check("clocks start to irq", DW'(t1 - t0), DW'(n + lat + 4));
    run_clocks += t1 - t0;
  endtask

  localparam int NP = 160;     // preamble products
  localparam int NS = 80;      // symbol samples

  logic signed [DW-1:0] ar [NP], ai [NP], br [NP], bi [NP], pr, pi;
  logic [DW-1:0]        got;

  function automatic logic signed [DW-1:0] sample();
    return $signed(32'($urandom_range(0, 8191))) - 32'sd4096;
  endfunction

  initial begin
    for (int i = 0; i < NP; i++) begin
      ar[i] = sample(); ai[i] = sample(); br[i] = sample(); bi[i] = sample();
    end
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk); #1;

    for (int r = 0; r < ROWS; r++)
      for (int c = 0; c < COLS; c++) pe(r, c, 0, OP_LDIMM, SRC_ZERO, SRC_VERT);
    // contexts 1 and 2: lanes of columns 4k..4k+3 carry (ar,br) (ai,bi) (ar,bi) (ai,br)
    for (int c = 0; c < COLS; c++) begin
      pe(0, c, 1, OP_MUL, SRC_UP_A, SRC_UP_B);
      pe(0, c, 2, OP_MUL, SRC_UP_A, SRC_UP_B);
    end
    for (int k = 0; k < 2; k++) begin
      pe(1, 4*k+1, 1, OP_ADD, SRC_UL_A, SRC_UP_A);   // ar*br + ai*bi
      pe(1, 4*k+3, 1, OP_SUB, SRC_UP_A, SRC_UL_A);   // ai*br - ar*bi
      pe(2, 4*k+1, 1, OP_SHR, SRC_UP_A, SRC_ZERO);
      pe(2, 4*k+3, 1, OP_SHR, SRC_UP_A, SRC_ZERO);
      pe(3, 4*k+1, 1, OP_DELAY, SRC_UP_A, SRC_ZERO);
      pe(3, 4*k+3, 1, OP_DELAY, SRC_UP_A, SRC_ZERO);
      pe(1, 4*k+1, 2, OP_SUB, SRC_UL_A, SRC_UP_A);   // ar*br - ai*bi
      pe(1, 4*k+3, 2, OP_ADD, SRC_UL_A, SRC_UP_A);   // ar*bi + ai*br
      for (int r = 2; r < ROWS; r++) begin
        pe(r, 4*k+1, 2, OP_DELAY, SRC_UP_A, SRC_ZERO);
        pe(r, 4*k+3, 2, OP_DELAY, SRC_UP_A, SRC_ZERO);
      end
    end
    for (int c = 0; c < COLS; c++) begin
      pe(0, c, 3, OP_DELAY, SRC_UP_A, SRC_ZERO);
      pe(1, c, 3, OP_SHR,   SRC_UP_A, SRC_ZERO);
      pe(2, c, 3, OP_DELAY, SRC_UP_A, SRC_ZERO);
      pe(3, c, 3, OP_DELAY, SRC_UP_A, SRC_ZERO);
    end

    // Patterns. Memory: a pair per line, banks 8..11 and 12..15 = (ar, br, bi, ai).
    // Input 1: the four-lane duplication; output 1: products to banks 0..3;
    // input 2: banks 0..3 to lanes 0,2,4,6; output 2: shifted to banks 4..7.
    begin
      int i1 [LANES] = '{8, 9, 11, 10, 8, 10, 11, 9, 12, 13, 15, 14, 12, 14, 15, 13};
      int o1 [LANES] = '{2, 6, 10, 14, -1, -1, -1, -1, -1, -1, -1, -1, -1, -1, -1, -1};
      int i2 [LANES] = '{0, 0, 1, 0, 2, 0, 3, 0, 0, 0, 0, 0, 0, 0, 0, 0};
      int o2 [LANES] = '{-1, -1, -1, -1, 0, 2, 4, 6, -1, -1, -1, -1, -1, -1, -1, -1};
      for (int l = 0; l < LANES; l++) begin
        buf_lane(0, 1, l, i1[l], 1'b1);
        buf_lane(1, 1, l, (o1[l] < 0) ? 0 : o1[l], o1[l] >= 0);
        buf_lane(0, 2, l, i2[l], 1'b1);
        buf_lane(1, 2, l, (o2[l] < 0) ? 0 : o2[l], o2[l] >= 0);
        buf_lane(1, 0, l, 0, 1'b0);
      end
    end

    for (int b = 0; b < LANES; b++) dma_write(0, b, 255, 32'd12);
    for (int i = 0; i < NP; i++) begin
      dma_write(0, 8 + 4*(i%2), i/2, ar[i]);
      dma_write(0, 9 + 4*(i%2), i/2, br[i]);
      dma_write(0, 10 + 4*(i%2), i/2, bi[i]);
      dma_write(0, 11 + 4*(i%2), i/2, ai[i]);
    end
    run_clocks = 0;
    run(0, 0, 0, 0, 255, 1, 0, 1);

    // ---- 160-point multiplication by the conjugate ----
    run(1, 1, 1, 0, 0, NP/2, 0, 5);
    for (int i = 0; i < NP; i++) begin
      pr = (ar[i]*br[i] + ai[i]*bi[i]) >>> 12;
      pi = (ai[i]*br[i] - ar[i]*bi[i]) >>> 12;
      dma_read(1, 2*(i%2),   i/2, got); check("conjugate product real", got, pr);
      dma_read(1, 2*(i%2)+1, i/2, got); check("conjugate product imag", got, pi);
    end
    $display("160-point conjugate multiplication: %0d clocks", NP/2 + 5 + 4);

    // ---- correction: 80-point complex multiplication, then shift ----
    // new symbol and correction factor replace the preamble in memory 1
    for (int i = 0; i < NS; i++) begin
      ar[i] = sample(); ai[i] = sample(); br[i] = sample(); bi[i] = sample();
      dma_write(0, 8 + 4*(i%2), 100 + i/2, ar[i]);
      dma_write(0, 9 + 4*(i%2), 100 + i/2, br[i]);
      dma_write(0, 10 + 4*(i%2), 100 + i/2, bi[i]);
      dma_write(0, 11 + 4*(i%2), 100 + i/2, ai[i]);
    end
    run(2, 1, 1, 0, 100, NS/2, 100, 5);
    run(3, 2, 2, 1, 100, NS/2, 100, 5);
    for (int i = 0; i < NS; i++) begin
      pr = (ar[i]*br[i] - ai[i]*bi[i]) >>> 12;
      pi = (ar[i]*bi[i] + ai[i]*br[i]) >>> 12;
      dma_read(0, 4 + 2*(i%2), 100 + i/2, got); check("corrected real", got, pr);
      dma_read(0, 5 + 2*(i%2), 100 + i/2, got); check("corrected imag", got, pi);
    end
    $display("80-point complex multiplication and shift: %0d clocks in two runs", 2*(NS/2 + 5 + 4));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
