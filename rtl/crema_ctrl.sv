// CREMA control unit: a read state machine and a write state machine working
// in parallel, joined by a delay chain.
//
// The read machine, once started, issues rd_count line reads from the source
// local memory at consecutive addresses from rd_base, one per clock. Each
// issued read pushes a 1 into a MAX_LAT-long delay chain. The write machine
// looks at the chain tap selected by latency (1..32): every clock that tap is
// 1 the pipeline is delivering a valid line. Those valid clocks are grouped
// into periods of wr_cycles writes followed by wr_stalls stalls; a write
// raises wr_valid with the next write address (from wr_base, incremented per
// write), a stall writes nothing. So wr_cycles = 1, wr_stalls = 0 writes every
// result; wr_cycles = 1, wr_stalls = 3 keeps one result in four, and so on.
// wr_valid/wr_addr go on to the output I/O buffer, which adds one clock
// before the destination memory is written.
//
// start (one clock, while idle) also raises clr for one clock, which clears
// the operand registers of every PE so that accumulation loops begin at zero.
// busy stays high from start until done; done is a one-clock pulse raised two
// clocks after the last write left this unit, by which time it has reached
// the memory.
//
// Timing: done rises N + latency + 4 clocks after the clock of start for a
// run of N lines; reads run in the N clocks right after start.
// The two machines, write cycles and stalls, and a latency of one to
// thirty-two made with a delay chain follow the published description; the
// run parameters, the period order (writes before stalls) and the done
// timing are this design's choices.
module crema_ctrl
  import crema_pkg::*;
#(
  parameter int L = MAX_LAT
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 start,
  input  logic [AW-1:0]        rd_base,
  input  logic [AW:0]          rd_count,
  input  logic [AW-1:0]        wr_base,
  input  logic [5:0]           latency,
  input  logic [AW:0]          wr_cycles,
  input  logic [AW:0]          wr_stalls,
  output logic                 busy,
  output logic                 done,
  output logic                 clr,
  output logic                 rd_en,
  output logic [AW-1:0]        rd_addr,
  output logic                 wr_valid,
  output logic [AW-1:0]        wr_addr
);

  typedef enum logic [1:0] {S_IDLE, S_READ, S_DRAIN, S_FLUSH} rd_state_e;

  rd_state_e     state;
  logic [AW:0]   rd_left;
  logic [L-1:0]  chain;
  logic [L-1:0]  tap_mask;
  logic [5:0]    lat;
  logic          dvalid;
  logic [AW:0]   phase;
  logic          flush_cnt;

  // Latency is clamped to 1..L.
  always_comb begin
    lat = latency;
    if (lat == 6'd0)             lat = 6'd1;
    if (int'(lat) > L)           lat = 6'(L);
  end

  always_comb begin
    for (int i = 0; i < L; i++) tap_mask[i] = (i < int'(lat));
  end

  assign dvalid = chain[$clog2(L)'(lat - 6'd1)];
  assign clr    = start && state == S_IDLE;
  assign rd_en  = state == S_READ;
  assign busy   = state != S_IDLE;

  // Read state machine.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      rd_left   <= '0;
      rd_addr   <= '0;
      flush_cnt <= 1'b0;
      done      <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          rd_addr <= rd_base;
          rd_left <= rd_count;
          state   <= (rd_count == '0) ? S_DRAIN : S_READ;
        end
        S_READ: begin
          rd_addr <= rd_addr + 1'b1;
          rd_left <= rd_left - 1'b1;
          if (rd_left == (AW+1)'(1)) state <= S_DRAIN;
        end
        S_DRAIN: if ((chain & tap_mask) == '0) begin
          flush_cnt <= 1'b0;
          state     <= S_FLUSH;
        end
        S_FLUSH: begin
          flush_cnt <= 1'b1;
          if (flush_cnt) begin
            done  <= 1'b1;
            state <= S_IDLE;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // Delay chain.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     chain <= '0;
    else if (clr)   chain <= '0;
    else            chain <= {chain[L-2:0], rd_en};
  end

  // Write state machine: write cycles, then write stalls, over valid clocks.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase    <= '0;
      wr_addr  <= '0;
      wr_valid <= 1'b0;
    end else if (clr) begin
      phase    <= '0;
      wr_addr  <= wr_base;
      wr_valid <= 1'b0;
    end else begin
      wr_valid <= 1'b0;
      if (wr_valid) wr_addr <= wr_addr + 1'b1;
      if (dvalid) begin
        wr_valid <= phase < wr_cycles;
        if (phase + 1'b1 >= wr_cycles + wr_stalls) phase <= '0;
        else                                       phase <= phase + 1'b1;
      end
    end
  end

endmodule
