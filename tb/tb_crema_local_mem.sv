// Self-checking testbench of crema_local_mem.
//
// Fills the memory through the DMA word port, reads it back through the line
// port (all 16 banks of a line in one clock, data one clock after rd_en),
// writes lines with partial bank enables and checks that only the enabled
// banks change, and reads single words back through the DMA port. A
// reference array in the testbench holds the expected contents.
module tb_crema_local_mem;
  import crema_pkg::*;

  logic                        clk = 1'b0;
  logic                        rd_en = 1'b0;
  logic [AW-1:0]               rd_addr = '0;
  logic [LANES-1:0][DW-1:0]    rd_data;
  logic [LANES-1:0]            wr_en = '0;
  logic [AW-1:0]               wr_addr = '0;
  logic [LANES-1:0][DW-1:0]    wr_data = '0;
  logic                        dma_we = 1'b0, dma_re = 1'b0;
  logic [LANEW-1:0]            dma_bank = '0;
  logic [AW-1:0]               dma_addr = '0;
  logic [DW-1:0]               dma_wdata = '0;
  logic [DW-1:0]               dma_rdata;
  int                          checks = 0, failures = 0;
  logic [DW-1:0]               model [LANES][DEPTH];

  crema_local_mem dut (.*);

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

  initial begin
    @(posedge clk); #1;
    // DMA fill
    for (int b = 0; b < LANES; b++)
      for (int a = 0; a < DEPTH; a++) begin
        dma_we = 1'b1; dma_bank = LANEW'(b); dma_addr = AW'(a);
        dma_wdata = $urandom;
        model[b][a] = dma_wdata;
        @(posedge clk); #1;
      end
    dma_we = 1'b0;

    // Line reads of every line
    for (int a = 0; a < DEPTH; a++) begin
      rd_en = 1'b1; rd_addr = AW'(a);
      @(posedge clk); #1;
      for (int b = 0; b < LANES; b++) check("line read", rd_data[b], model[b][a]);
    end
    rd_en = 1'b0;

    // Line writes with random bank enables
    for (int n = 0; n < 200; n++) begin
      wr_en = LANES'($urandom);
      wr_addr = AW'($urandom);
      for (int b = 0; b < LANES; b++) begin
        wr_data[b] = $urandom;
        if (wr_en[b]) model[b][wr_addr] = wr_data[b];
      end
      @(posedge clk); #1;
    end
    wr_en = '0;

    // DMA word reads
    for (int n = 0; n < 500; n++) begin
      dma_re = 1'b1;
      dma_bank = LANEW'($urandom);
      dma_addr = AW'($urandom);
      @(posedge clk); #1;
      check("dma read", dma_rdata, model[dma_bank][dma_addr]);
    end
    dma_re = 1'b0;

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
