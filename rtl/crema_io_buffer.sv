// CREMA I/O buffer: a registered 16-to-16 lane crossbar with stored patterns.
//
// Two of these sit between the local memories and the PE array. The input
// buffer takes a line read from the source memory and hands each PE input
// lane the memory bank its pattern names; the output buffer takes the 16
// outputs of the bottom PE row and hands each memory bank of the destination
// memory the PE output its pattern names, together with that bank's write
// enable. One pattern is active at a time; the rest are kept so a new
// mapping only needs a pattern switch, not a reload.
//
// Per output lane, a pattern stores a source lane (sel) and an enable (en).
// Each clock: out_data[i] <= in_data[sel[i]] and out_valid[i] <= in_valid &
// en[i]; a lane that is not valid outputs zero, so a PE fed from an idle
// buffer sees zeros (accumulators then hold their sum). in_addr travels
// alongside and comes out as out_addr in the same clock as the data.
//
// Interface: cfg_we writes one lane of one pattern (iobuf_cfg_t); pat_sel
// selects the active pattern. After reset every pattern is the identity with
// all lanes enabled. Latency is one clock.
//
// The buffers' place, lane count and width and their make-up of registers and
// multiplexers follow the published description; the pattern store, its
// format and the zeroing of idle lanes are this design's choices.
module crema_io_buffer
  import crema_pkg::*;
#(
  parameter int N  = LANES,
  parameter int NP = NPAT
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      cfg_we,
  input  iobuf_cfg_t                cfg,
  input  logic [$clog2(NP)-1:0]     pat_sel,
  input  logic                      in_valid,
  input  logic [AW-1:0]             in_addr,
  input  logic [N-1:0][DW-1:0]      in_data,
  output logic [N-1:0]              out_valid,
  output logic [AW-1:0]             out_addr,
  output logic [N-1:0][DW-1:0]      out_data
);

  logic [$clog2(N)-1:0] sel_q [NP][N];
  logic                 en_q  [NP][N];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int p = 0; p < NP; p++)
        for (int i = 0; i < N; i++) begin
          sel_q[p][i] <= ($clog2(N))'(i);
          en_q[p][i]  <= 1'b1;
        end
    end else if (cfg_we) begin
      sel_q[cfg.pat][cfg.lane] <= cfg.sel;
      en_q[cfg.pat][cfg.lane]  <= cfg.en;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= '0;
      out_data  <= '0;
      out_addr  <= '0;
    end else begin
      out_addr <= in_addr;
      for (int i = 0; i < N; i++) begin
        out_valid[i] <= in_valid && en_q[pat_sel][i];
        out_data[i]  <= (in_valid && en_q[pat_sel][i]) ? in_data[sel_q[pat_sel][i]] : '0;
      end
    end
  end

endmodule
