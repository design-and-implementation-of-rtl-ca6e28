// The CREMA PE array: ROWS x COLS processing elements and their interconnect.
//
// Data flows from top to bottom. Row 0 takes its operands from the 16 lanes of
// the input I/O buffer (column c sees lanes 2c and 2c+1 as "up"); the two
// outputs of every bottom-row PE form the 16 lanes handed to the output I/O
// buffer (lane 2c = OUT1, lane 2c+1 = OUT2 of column c).
//
// Each operand of each PE can take one of 15 sources:
//   local       up, up-left, up-right and left neighbours (OUT1 or OUT2 of
//               each) and the PE's own two outputs fed back (loops, used for
//               accumulation);
//   interleaved the PE two rows up in the same column (row 1: the input
//               buffer; row 0: zero);
//   global      a vertical line per column carrying input buffer lane 2c to
//               every row (used to load immediate values), and two
//               horizontal lines broadcasting input buffer lanes 0 and 1 to
//               every PE.
// Neighbours outside the array read as zero. There is no wrap-around.
//
// Configuration words enter at PE (0, 0), run right along row 0 and down
// every column, one register per PE. ctx_sel, clr and imm_we reach every PE
// at once.
//
// The grid size, the categories of connection and the count of 15 follow the
// published CREMA description; which neighbour each of the 15 names and the
// use of only the bottom row as output are this design's choices.
//
// Mapping adaptiveness: ADD_EN, MUL_EN, SHIFT_EN, LUT_EN and IMM_EN hold one
// bit per PE (bit r*C + c) saying whether that PE gets the unit. The default
// builds every unit everywhere; an instance made for a fixed set of kernels
// clears the bits its contexts never use, as the published template does
// at design time. An operation whose unit is absent gives zero.
module crema_pe_array
  import crema_pkg::*;
#(
  parameter int             R        = ROWS,
  parameter int             C        = COLS,
  parameter logic [R*C-1:0] ADD_EN   = '1,
  parameter logic [R*C-1:0] MUL_EN   = '1,
  parameter logic [R*C-1:0] SHIFT_EN = '1,
  parameter logic [R*C-1:0] LUT_EN   = '1,
  parameter logic [R*C-1:0] IMM_EN   = '1
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       clr,
  input  logic                       imm_we,
  input  logic [CTXW-1:0]            ctx_sel,
  input  logic                       cfg_valid,
  input  cfg_word_t                  cfg_word,
  input  logic [2*C-1:0][DW-1:0]     in_lanes,
  output logic [2*C-1:0][DW-1:0]     out_lanes
);

  logic          cv_r [R][C];
  logic          cv_d [R][C];
  cfg_word_t     cw_r [R][C];
  cfg_word_t     cw_d [R][C];

  for (genvar r = 0; r < R; r++) begin : g_row
    for (genvar c = 0; c < C; c++) begin : g_col
      logic [NSRC-1:0][DW-1:0] cand;
      logic [DW-1:0]           o1, o2;   // this PE's OUT1 and OUT2
      logic                    cv_in;
      cfg_word_t               cw_in;

      always_comb begin
        cand = '0;
        // local: up
        cand[SRC_UP_A] = (r == 0) ? in_lanes[2*c]   : g_row[(r == 0) ? 0 : r-1].g_col[c].o1;
        cand[SRC_UP_B] = (r == 0) ? in_lanes[2*c+1] : g_row[(r == 0) ? 0 : r-1].g_col[c].o2;
        // local: up-left
        if (c > 0) begin
          cand[SRC_UL_A] = (r == 0) ? in_lanes[(c > 0) ? 2*c-2 : 0] : g_row[(r == 0) ? 0 : r-1].g_col[(c > 0) ? c-1 : 0].o1;
          cand[SRC_UL_B] = (r == 0) ? in_lanes[(c > 0) ? 2*c-1 : 0] : g_row[(r == 0) ? 0 : r-1].g_col[(c > 0) ? c-1 : 0].o2;
          cand[SRC_LEFT_A] = g_row[r].g_col[(c > 0) ? c-1 : 0].o1;
          cand[SRC_LEFT_B] = g_row[r].g_col[(c > 0) ? c-1 : 0].o2;
        end
        // local: up-right
        if (c < C-1) begin
          cand[SRC_UR_A] = (r == 0) ? in_lanes[(c < C-1) ? 2*c+2 : 0] : g_row[(r == 0) ? 0 : r-1].g_col[(c < C-1) ? c+1 : c].o1;
          cand[SRC_UR_B] = (r == 0) ? in_lanes[(c < C-1) ? 2*c+3 : 0] : g_row[(r == 0) ? 0 : r-1].g_col[(c < C-1) ? c+1 : c].o2;
        end
        // interleaved: two rows up
        if (r == 1) begin
          cand[SRC_IL_A] = in_lanes[2*c];
          cand[SRC_IL_B] = in_lanes[2*c+1];
        end else if (r >= 2) begin
          cand[SRC_IL_A] = g_row[(r >= 2) ? r-2 : 0].g_col[c].o1;
          cand[SRC_IL_B] = g_row[(r >= 2) ? r-2 : 0].g_col[c].o2;
        end
        // global
        cand[SRC_VERT] = in_lanes[2*c];
        cand[SRC_HOR0] = in_lanes[0];
        cand[SRC_HOR1] = in_lanes[1];
      end

      if (r == 0 && c == 0) begin : g_cfg_entry
        assign cv_in = cfg_valid;
        assign cw_in = cfg_word;
      end else if (r == 0) begin : g_cfg_row0
        assign cv_in = cv_r[0][c-1];
        assign cw_in = cw_r[0][c-1];
      end else begin : g_cfg_col
        assign cv_in = cv_d[r-1][c];
        assign cw_in = cw_d[r-1][c];
      end

      crema_pe #(
        .PE_ID   (r*C + c),
        .FU_ADD  (ADD_EN[r*C + c]),
        .FU_MUL  (MUL_EN[r*C + c]),
        .FU_SHIFT(SHIFT_EN[r*C + c]),
        .FU_LUT  (LUT_EN[r*C + c]),
        .FU_IMM  (IMM_EN[r*C + c])
      ) u_pe (
        .clk             (clk),
        .rst_n           (rst_n),
        .clr             (clr),
        .imm_we          (imm_we),
        .ctx_sel         (ctx_sel),
        .cfg_valid_in    (cv_in),
        .cfg_in          (cw_in),
        .cfg_valid_right (cv_r[r][c]),
        .cfg_right       (cw_r[r][c]),
        .cfg_valid_down  (cv_d[r][c]),
        .cfg_down        (cw_d[r][c]),
        .cand            (cand),
        .out1            (o1),
        .out2            (o2)
      );
    end
  end

  for (genvar c = 0; c < C; c++) begin : g_out
    assign out_lanes[2*c]   = g_row[R-1].g_col[c].o1;
    assign out_lanes[2*c+1] = g_row[R-1].g_col[c].o2;
  end

endmodule
