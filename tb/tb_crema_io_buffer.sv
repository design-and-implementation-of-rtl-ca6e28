// Self-checking testbench of crema_io_buffer.
//
// Checks the identity patterns after reset, then programs random lane
// selects and enables into random patterns (kept in a reference copy),
// switches between patterns and checks every output lane one clock after
// the input: selected data when valid and enabled, zero otherwise, with the
// address sideband carried along.
module tb_crema_io_buffer;
  import crema_pkg::*;

  logic                     clk = 1'b0;
  logic                     rst_n = 1'b0;
  logic                     cfg_we = 1'b0;
  iobuf_cfg_t               cfg = '0;
  logic [PATW-1:0]          pat_sel = '0;
  logic                     in_valid = 1'b0;
  logic [AW-1:0]            in_addr = '0;
  logic [LANES-1:0][DW-1:0] in_data = '0;
  logic [LANES-1:0]         out_valid;
  logic [AW-1:0]            out_addr;
  logic [LANES-1:0][DW-1:0] out_data;
  int                       checks = 0, failures = 0;
  logic [LANEW-1:0]         msel [NPAT][LANES];
  logic                     men  [NPAT][LANES];

  crema_io_buffer dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
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

  task automatic drive_and_check();
    logic [LANES-1:0][DW-1:0] d;
    logic v;
    v = ($urandom_range(0, 3) != 0);
    for (int i = 0; i < LANES; i++) d[i] = $urandom;
    in_valid = v;
    in_data  = d;
    in_addr  = AW'($urandom);
    @(posedge clk); #1;
    check("addr", 32'(out_addr), 32'(in_addr));
    for (int i = 0; i < LANES; i++) begin
      check("valid", 32'(out_valid[i]), 32'(v && men[pat_sel][i]));
      check("data", out_data[i], (v && men[pat_sel][i]) ? d[msel[pat_sel][i]] : '0);
    end
  endtask

  initial begin
    for (int p = 0; p < NPAT; p++)
      for (int i = 0; i < LANES; i++) begin
        msel[p][i] = LANEW'(i);
        men[p][i] = 1'b1;
      end
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk); #1;
    for (int n = 0; n < 20; n++) drive_and_check();

    for (int n = 0; n < 300; n++) begin
      cfg_we = 1'b1;
      cfg = iobuf_cfg_t'($urandom);
      msel[cfg.pat][cfg.lane] = cfg.sel;
      men[cfg.pat][cfg.lane]  = cfg.en;
      @(posedge clk); #1;
      cfg_we = 1'b0;
      pat_sel = PATW'($urandom);
      drive_and_check();
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
