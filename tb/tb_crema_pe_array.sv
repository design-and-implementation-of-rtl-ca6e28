// Self-checking testbench of crema_pe_array.
//
// Configures four contexts through the pipelined configuration network and
// streams random operand lines through each, comparing every output lane
// with a reference computed from the input history:
//   context 0  every PE loads its immediate register from its column's
//              vertical line (value 12, the fixed-point shift);
//   context 1  two complex multiplications per line, four columns each: four
//              products (row 0), real = ac - bd and imag = ad + bc using the
//              up-left connection (row 1), >> 12 (row 2), delay (row 3);
//   context 2  a product per column accumulated by a loop-back adder in
//              row 3, started from zero by clr;
//   context 3  unregistered feed-through in row 0, a horizontal broadcast in
//              row 1 and an interleaved connection in row 2.
// The input buffer's duplication of lanes is emulated by the testbench.
// A second array built without multipliers in row 0 of the odd columns
// (MUL_EN) receives the same words and lines; in context 2 its odd columns
// must accumulate zero while the even ones match the full array.
module tb_crema_pe_array;
  import crema_pkg::*;

  logic                     clk = 1'b0;
  logic                     rst_n = 1'b0;
  logic                     clr = 1'b0;
  logic                     imm_we = 1'b1;
  logic [CTXW-1:0]          ctx_sel = '0;
  logic                     cfg_valid = 1'b0;
  cfg_word_t                cfg_word = '0;
  logic [LANES-1:0][DW-1:0] in_lanes = '0;
  logic [LANES-1:0][DW-1:0] out_lanes;
  int                       checks = 0, failures = 0;

  crema_pe_array dut (.*);

  localparam logic [ROWS*COLS-1:0] LITE_MUL = ~(ROWS*COLS)'(8'hAA);
  logic [LANES-1:0][DW-1:0] lite_lanes;

  crema_pe_array #(.MUL_EN(LITE_MUL)) lite (
    .clk       (clk),
    .rst_n     (rst_n),
    .clr       (clr),
    .imm_we    (imm_we),
    .ctx_sel   (ctx_sel),
    .cfg_valid (cfg_valid),
    .cfg_word  (cfg_word),
    .in_lanes  (in_lanes),
    .out_lanes (lite_lanes)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, logic [DW-1:0] got, logic [DW-1:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  task automatic cfg(int r, int c, int slot, pe_op_e op, pe_src_e a, pe_src_e b);
    cfg_valid = 1'b1;
    cfg_word = '{pe: PEW'(r*COLS + c), slot: CTXW'(slot), ctx: '{op: op, src_a: a, src_b: b}};
    @(posedge clk); #1;
    cfg_valid = 1'b0;
  endtask


  function automatic logic [DW-1:0] rnd_sample();
    return DW'($signed(32'($urandom_range(0, 16383))) - 32'sd8192);
  endfunction

  logic [LANES-1:0][DW-1:0] hist [$];
  logic signed [DW-1:0]     ar, ai, br, bi, re, im;
  logic [DW-1:0]            acc [COLS];

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk); #1;

    // ---------------- configuration ----------------
    for (int r = 0; r < ROWS; r++)
      for (int c = 0; c < COLS; c++) begin
        cfg(r, c, 0, OP_LDIMM, SRC_ZERO, SRC_VERT);
        // context 1: complex multiply
        if (r == 0)
          cfg(r, c, 1, OP_MUL, SRC_UP_A, SRC_UP_B);
        else if (r == 1 && c % 4 == 1) cfg(r, c, 1, OP_SUB, SRC_UL_A, SRC_UP_A);
        else if (r == 1 && c % 4 == 3) cfg(r, c, 1, OP_ADD, SRC_UL_A, SRC_UP_A);
        else if (r == 2 && c % 2 == 1) cfg(r, c, 1, OP_SHR, SRC_UP_A, SRC_ZERO);
        else if (r == 3 && c % 2 == 1) cfg(r, c, 1, OP_DELAY, SRC_UP_A, SRC_ZERO);
        // context 2: multiply-accumulate
        if (r == 0)      cfg(r, c, 2, OP_MUL, SRC_UP_A, SRC_UP_B);
        else if (r < 3)  cfg(r, c, 2, OP_DELAY, SRC_UP_A, SRC_ZERO);
        else             cfg(r, c, 2, OP_ADD, SRC_UP_A, SRC_LOOP_A);
        // context 3: feed-through, horizontal, interleaved
        if (r == 0)      cfg(r, c, 3, OP_URF, SRC_UP_A, SRC_UP_B);
        else if (r == 1) cfg(r, c, 3, OP_ADD, SRC_UP_A, SRC_HOR1);
        else if (r == 2) cfg(r, c, 3, OP_DELAY, SRC_UP_A, SRC_IL_A);
        else             cfg(r, c, 3, OP_DELAY, SRC_UP_A, SRC_UP_B);
      end
    repeat (ROWS + COLS + 1) @(posedge clk);

    // ---------------- context 0: load immediates ----------------
    ctx_sel = 0;
    @(posedge clk); #1;
    for (int l = 0; l < LANES; l++) in_lanes[l] = 32'd12;
    @(posedge clk); #1;

    // ---------------- context 1: complex multiply ----------------
    // The new context takes effect one clock after ctx_sel changes.
    ctx_sel = 1;
    @(posedge clk); #1;
    hist.delete();
    for (int t = 0; t < 200; t++) begin
      for (int k = 0; k < 2; k++) begin
        ar = rnd_sample(); ai = rnd_sample(); br = rnd_sample(); bi = rnd_sample();
        // lanes of columns 4k..4k+3: (ar,br) (ai,bi) (ar,bi) (ai,br)
        in_lanes[8*k+0] = ar; in_lanes[8*k+1] = br;
        in_lanes[8*k+2] = ai; in_lanes[8*k+3] = bi;
        in_lanes[8*k+4] = ar; in_lanes[8*k+5] = bi;
        in_lanes[8*k+6] = ai; in_lanes[8*k+7] = br;
      end
      hist.push_back(in_lanes);
      @(posedge clk); #1;
      if (t >= 5) begin
        for (int k = 0; k < 2; k++) begin
          ar = hist[t-3][8*k+0]; br = hist[t-3][8*k+1];
          ai = hist[t-3][8*k+2]; bi = hist[t-3][8*k+3];
          re = (ar*br - ai*bi) >>> 12;
          im = (ar*bi + ai*br) >>> 12;
          check("cmul real", out_lanes[8*k+2], re);
          check("cmul imag", out_lanes[8*k+6], im);
        end
      end
    end

    // ---------------- context 2: multiply-accumulate ----------------
    ctx_sel = 2;
    in_lanes = '0;
    @(posedge clk); #1;
    clr = 1'b1;
    @(posedge clk); #1;
    clr = 1'b0;
    for (int c = 0; c < COLS; c++) acc[c] = '0;
    for (int t = 0; t < 80; t++) begin
      for (int l = 0; l < LANES; l++) in_lanes[l] = rnd_sample();
      for (int c = 0; c < COLS; c++) acc[c] += in_lanes[2*c] * in_lanes[2*c+1];
      @(posedge clk); #1;
    end
    in_lanes = '0;
    repeat (6) @(posedge clk);
    #1;
    for (int c = 0; c < COLS; c++) begin
      check("accumulate", out_lanes[2*c], acc[c]);
      check("accumulate, reduced array", lite_lanes[2*c], (c % 2) ? '0 : acc[c]);
    end

    // ---------------- context 3: URF, horizontal, interleaved ----------------
    ctx_sel = 3;
    @(posedge clk); #1;
    hist.delete();
    for (int t = 0; t < 100; t++) begin
      for (int l = 0; l < LANES; l++) in_lanes[l] = $urandom;
      hist.push_back(in_lanes);
      @(posedge clk); #1;
      if (t >= 5) begin
        for (int c = 0; c < COLS; c++) begin
          check("urf+hor", out_lanes[2*c], hist[t-2][2*c] + hist[t-2][1]);
          check("interleaved", out_lanes[2*c+1], hist[t-1][2*c]);
        end
      end
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
