// CREMA: a run-time reconfigurable coarse-grain array accelerator for a
// 32-bit RISC host. This is the top of the design.
//
// Structure: a 4 x 8 array of 32-bit PEs sits between two 16-bank x 256-word
// local memories. A run streams lines out of one memory, through the input
// I/O buffer, down the PE array and through the output I/O buffer into the
// other memory, one line per clock. The two memories swap roles (ping-pong)
// under the DIR register, so the results of one run can feed the next
// without passing through the host. A control unit sequences each run.
//
// Host side (the host processor and its DMA device are outside this design):
//   reg_*  a 5-bit-indexed, 32-bit register port (see crema_pkg::reg_e).
//          Writes take effect on the clock edge; reg_rdata is combinational.
//          Configuration words for the PEs and I/O buffer patterns are
//          written through it one 32-bit word at a time.
//   dma_*  a word port into either local memory (dma_mem 0 = memory 1,
//          1 = memory 2); read data one clock after dma_re. Use it while idle.
//   irq    one-clock pulse when a run has finished and its results are in
//          the destination memory.
//
// A typical sequence: inject PE contexts (REG_CFG_PE) and I/O buffer
// patterns; fill memory 1 by DMA; select context and patterns; set the run
// registers; write REG_CTRL bit 0; wait for irq; read memory 2 by DMA or
// switch DIR and the context and run again. For a mapping whose deepest path
// passes P registered PE stages, set REG_LATENCY to P + 1.
//
// Following the published CREMA description: the array size, the two local
// memories and their ping-pong use, the I/O buffers, the per-PE context
// memories with one-cycle switching, pipelined configuration delivery and the
// control unit with write cycles, stalls and a 1..32 latency. This design's
// own choices: the register map, the DMA port, the configuration formats and
// the operation and source encodings.
module crema
  import crema_pkg::*;
#(
  // per-PE function units, bit r*COLS + c (see crema_pe_array)
  parameter logic [ROWS*COLS-1:0] ADD_EN   = '1,
  parameter logic [ROWS*COLS-1:0] MUL_EN   = '1,
  parameter logic [ROWS*COLS-1:0] SHIFT_EN = '1,
  parameter logic [ROWS*COLS-1:0] LUT_EN   = '1,
  parameter logic [ROWS*COLS-1:0] IMM_EN   = '1
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // register port
  input  logic                  reg_we,
  input  logic [4:0]            reg_addr,
  input  logic [DW-1:0]         reg_wdata,
  output logic [DW-1:0]         reg_rdata,
  // DMA word port
  input  logic                  dma_we,
  input  logic                  dma_re,
  input  logic                  dma_mem,
  input  logic [LANEW-1:0]      dma_bank,
  input  logic [AW-1:0]         dma_addr,
  input  logic [DW-1:0]         dma_wdata,
  output logic [DW-1:0]         dma_rdata,
  // completion
  output logic                  irq
);

  // ---------------- registers ----------------
  logic [CTXW-1:0] ctx_sel;
  logic [PATW-1:0] ibuf_pat, obuf_pat;
  logic [AW-1:0]   rd_base, wr_base;
  logic [AW:0]     rd_count, wr_cycles, wr_stalls;
  logic [5:0]      latency;
  logic            dir, done_sticky;
  logic            start, cfg_pe_we, cfg_ib_we, cfg_ob_we;
  logic            busy, done, clr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ctx_sel   <= '0;
      ibuf_pat  <= '0;
      obuf_pat  <= '0;
      rd_base   <= '0;
      rd_count  <= '0;
      wr_base   <= '0;
      latency   <= 6'd1;
      wr_cycles <= (AW+1)'(1);
      wr_stalls <= '0;
      dir       <= 1'b0;
    end else if (reg_we) begin
      unique case (reg_addr)
        REG_CTX:      ctx_sel   <= reg_wdata[CTXW-1:0];
        REG_IBUF_PAT: ibuf_pat  <= reg_wdata[PATW-1:0];
        REG_OBUF_PAT: obuf_pat  <= reg_wdata[PATW-1:0];
        REG_RD_BASE:  rd_base   <= reg_wdata[AW-1:0];
        REG_RD_COUNT: rd_count  <= reg_wdata[AW:0];
        REG_WR_BASE:  wr_base   <= reg_wdata[AW-1:0];
        REG_LATENCY:  latency   <= reg_wdata[5:0];
        REG_WR_CYC:   wr_cycles <= reg_wdata[AW:0];
        REG_WR_STALL: wr_stalls <= reg_wdata[AW:0];
        REG_DIR:      dir       <= reg_wdata[0];
        default: ;
      endcase
    end
  end

  assign start     = reg_we && reg_addr == REG_CTRL && reg_wdata[0];
  assign cfg_pe_we = reg_we && reg_addr == REG_CFG_PE;
  assign cfg_ib_we = reg_we && reg_addr == REG_CFG_IBUF;
  assign cfg_ob_we = reg_we && reg_addr == REG_CFG_OBUF;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     done_sticky <= 1'b0;
    else if (start) done_sticky <= 1'b0;
    else if (done)  done_sticky <= 1'b1;
  end

  always_comb begin
    reg_rdata = '0;
    unique case (reg_addr)
      REG_CTRL:     reg_rdata = DW'({done_sticky, busy});
      REG_CTX:      reg_rdata = DW'(ctx_sel);
      REG_IBUF_PAT: reg_rdata = DW'(ibuf_pat);
      REG_OBUF_PAT: reg_rdata = DW'(obuf_pat);
      REG_RD_BASE:  reg_rdata = DW'(rd_base);
      REG_RD_COUNT: reg_rdata = DW'(rd_count);
      REG_WR_BASE:  reg_rdata = DW'(wr_base);
      REG_LATENCY:  reg_rdata = DW'(latency);
      REG_WR_CYC:   reg_rdata = DW'(wr_cycles);
      REG_WR_STALL: reg_rdata = DW'(wr_stalls);
      REG_DIR:      reg_rdata = DW'(dir);
      default:      reg_rdata = '0;
    endcase
  end

  assign irq = done;

  // ---------------- control unit ----------------
  logic            rd_en, wr_valid;
  logic [AW-1:0]   rd_addr, wr_addr;

  crema_ctrl u_ctrl (
    .clk       (clk),
    .rst_n     (rst_n),
    .start     (start),
    .rd_base   (rd_base),
    .rd_count  (rd_count),
    .wr_base   (wr_base),
    .latency   (latency),
    .wr_cycles (wr_cycles),
    .wr_stalls (wr_stalls),
    .busy      (busy),
    .done      (done),
    .clr       (clr),
    .rd_en     (rd_en),
    .rd_addr   (rd_addr),
    .wr_valid  (wr_valid),
    .wr_addr   (wr_addr)
  );

  // ---------------- local memories (ping-pong) ----------------
  logic [LANES-1:0][DW-1:0] lm_rd_data [2];
  logic [DW-1:0]            lm_dma_rdata [2];
  logic [LANES-1:0]         ob_valid;
  logic [AW-1:0]            ob_addr;
  logic [LANES-1:0][DW-1:0] ob_data;
  logic                     dma_mem_q;

  for (genvar m = 0; m < 2; m++) begin : g_lm
    // memory m is the source when dir == m, the destination otherwise
    logic is_src;
    assign is_src = (dir == 1'(m));

    crema_local_mem u_lm (
      .clk       (clk),
      .rd_en     (rd_en && is_src),
      .rd_addr   (rd_addr),
      .rd_data   (lm_rd_data[m]),
      .wr_en     (is_src ? '0 : ob_valid),
      .wr_addr   (ob_addr),
      .wr_data   (ob_data),
      .dma_we    (dma_we && dma_mem == 1'(m)),
      .dma_re    (dma_re && dma_mem == 1'(m)),
      .dma_bank  (dma_bank),
      .dma_addr  (dma_addr),
      .dma_wdata (dma_wdata),
      .dma_rdata (lm_dma_rdata[m])
    );
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      dma_mem_q <= 1'b0;
    else if (dma_re) dma_mem_q <= dma_mem;
  end

  assign dma_rdata = lm_dma_rdata[dma_mem_q];

  // ---------------- input I/O buffer ----------------
  logic                     rd_valid_q;
  logic [LANES-1:0]         ib_valid;
  logic [LANES-1:0][DW-1:0] ib_data;
  logic [AW-1:0]            ib_addr_unused;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) rd_valid_q <= 1'b0;
    else        rd_valid_q <= rd_en;
  end

  crema_io_buffer u_ibuf (
    .clk       (clk),
    .rst_n     (rst_n),
    .cfg_we    (cfg_ib_we),
    .cfg       (iobuf_cfg_t'(reg_wdata[$bits(iobuf_cfg_t)-1:0])),
    .pat_sel   (ibuf_pat),
    .in_valid  (rd_valid_q),
    .in_addr   (rd_addr),
    .in_data   (lm_rd_data[dir]),
    .out_valid (ib_valid),
    .out_addr  (ib_addr_unused),
    .out_data  (ib_data)
  );

  // ---------------- PE array ----------------
  logic [LANES-1:0][DW-1:0] pe_out;

  crema_pe_array #(
    .ADD_EN  (ADD_EN),
    .MUL_EN  (MUL_EN),
    .SHIFT_EN(SHIFT_EN),
    .LUT_EN  (LUT_EN),
    .IMM_EN  (IMM_EN)
  ) u_array (
    .clk       (clk),
    .rst_n     (rst_n),
    .clr       (clr),
    .imm_we    (|ib_valid),
    .ctx_sel   (ctx_sel),
    .cfg_valid (cfg_pe_we),
    .cfg_word  (cfg_word_t'(reg_wdata[$bits(cfg_word_t)-1:0])),
    .in_lanes  (ib_data),
    .out_lanes (pe_out)
  );

  // ---------------- output I/O buffer ----------------
  crema_io_buffer u_obuf (
    .clk       (clk),
    .rst_n     (rst_n),
    .cfg_we    (cfg_ob_we),
    .cfg       (iobuf_cfg_t'(reg_wdata[$bits(iobuf_cfg_t)-1:0])),
    .pat_sel   (obuf_pat),
    .in_valid  (wr_valid),
    .in_addr   (wr_addr),
    .in_data   (pe_out),
    .out_valid (ob_valid),
    .out_addr  (ob_addr),
    .out_data  (ob_data)
  );

  // ---------------- protocol rules ----------------
  // A run is started only while the array is idle, and the DMA port is not
  // used while a run is in flight.
  a_start_idle: assert property (@(posedge clk) disable iff (!rst_n) !(start && busy))
    else $error("crema: start while busy");
  a_dma_idle: assert property (@(posedge clk) disable iff (!rst_n) !((dma_we || dma_re) && busy))
    else $error("crema: DMA access while busy");

endmodule
