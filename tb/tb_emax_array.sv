// tb_emax_array: self-checking test of the PE matrix (4 x 4) driven the way
// the controller drives it. A 3-point sum y[i] = a[i-1] + a[i] + a[i+1]
// (32-bit add3) is mapped as: row 0 streams a[] from the LMM of PE (0,0)
// onto the row data path and loads the three neighbours from the LMM_FIFOs
// of columns 0..2; row 1 adds them; row 2 stores the sum. The LMM contents
// are written and read back through the DMA view. The instructions are then
// shifted twice along the ring (the store row wraps from physical row 3 to
// physical row 0) and the same kernel runs again on new data placed in the
// LMM that logical row 0 now occupies. Checked: every sum, that nothing else
// is stored, and that the instruction view follows the shift.
module tb_emax_array;
  import emax_pkg::*;

  localparam int ROWS = 4, COLS = 4, PRE = FIFO_DEPTH + 2, N = 50;
  logic clk = 0, rst_n = 0;
  logic cfg_clear = 0, cfg_we = 0, rot = 0, exec = 0, eag_clear = 0;
  logic [1:0] cfg_row, cfg_col, sel_row, sel_col;
  pe_cfg_t cfg_wdata, sel_cfg;
  logic [CW:0] g;
  logic [CW-1:0] count;
  logic dma_en = 0, dma_we = 0;
  logic [LAW-1:0] dma_addr;
  word_t dma_wdata, dma_rdata;
  logic [31:0] a [N+2];
  int checks = 0, failures = 0;

  emax_array #(.ROWS(ROWS), .COLS(COLS), .PRE(PRE)) dut (
    .clk, .rst_n, .cfg_clear, .cfg_we, .cfg_row, .cfg_col, .cfg_wdata, .rot,
    .exec, .g, .count, .eag_clear, .sel_row, .sel_col, .sel_cfg,
    .dma_en, .dma_we, .dma_addr, .dma_wdata, .dma_rdata);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic pe_cfg_t blank();
    pe_cfg_t c;
    c = '0;
    c.xs = RSW'(NREG); c.ys = RSW'(NREG); c.zs = RSW'(NREG); c.ys2 = RSW'(NREG);
    c.stride = LAW'(1);
    return c;
  endfunction

  task automatic put(input int r, input int c, input pe_cfg_t v);
    @(negedge clk);
    cfg_we = 1; cfg_row = 2'(r); cfg_col = 2'(c); cfg_wdata = v;
    @(negedge clk);
    cfg_we = 0;
  endtask

  task automatic dma_wr(input int r, input int c, input int adr, input word_t v);
    @(negedge clk);
    sel_row = 2'(r); sel_col = 2'(c); dma_en = 1; dma_we = 1;
    dma_addr = LAW'(adr); dma_wdata = v;
    @(negedge clk);
    dma_en = 0; dma_we = 0;
  endtask

  task automatic dma_rd(input int r, input int c, input int adr, output word_t v);
    @(negedge clk);
    sel_row = 2'(r); sel_col = 2'(c); dma_en = 1; dma_we = 0; dma_addr = LAW'(adr);
    @(negedge clk);
    dma_en = 0;
    v = dma_rdata;
  endtask

  task automatic run();
    @(negedge clk); eag_clear = 1;
    @(negedge clk); eag_clear = 0; exec = 1; g = '0;
    repeat (PRE + ROWS + N + 1) begin
      @(negedge clk);
      g = g + 1'b1;
    end
    exec = 0;
  endtask

  task automatic fill_and_check(input int lrow0, input int srow);
    word_t v;
    for (int i = 0; i < N + 2; i++) begin
      a[i] = $urandom;
      dma_wr(lrow0, 0, i, {32'd0, a[i]});
    end
    for (int i = 0; i < N + 4; i++) dma_wr(srow, 0, i, 64'h5a5a);
    run();
    for (int i = 0; i < N; i++) begin
      dma_rd(srow, 0, i, v);
      checks++;
      if (v !== {32'd0, a[i] + a[i+1] + a[i+2]}) begin
        failures++;
        $display("FAIL sum %0d got %h exp %h", i, v, a[i] + a[i+1] + a[i+2]);
      end
    end
    dma_rd(srow, 0, N, v);
    checks++;
    if (v !== 64'h5a5a) begin failures++; $display("FAIL store past count"); end
  endtask

  initial begin
    pe_cfg_t c;
    cfg_row = '0; cfg_col = '0; cfg_wdata = '0; sel_row = '0; sel_col = '0;
    g = '0; count = CW'(N); dma_addr = '0; dma_wdata = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk); cfg_clear = 1;
    @(negedge clk); cfg_clear = 0;
    c = blank();
    c.lmm_rd = 1; c.bus_drv = 1; c.lead = CW'(2); c.base = '0;
    c.ld_en = 1; c.ld_dst = 4'd0; c.ld_tap = TAPW'(2); c.mw = MW_W;
    put(0, 0, c);
    c = blank(); c.fifo_bus = 1; c.ld_en = 1; c.mw = MW_W;
    c.ld_dst = 4'd1; c.ld_tap = TAPW'(1); put(0, 1, c);
    c.ld_dst = 4'd2; c.ld_tap = TAPW'(0); put(0, 2, c);
    c = blank();
    c.ex1_op = EX1_ADD3; c.xs = RSW'(0); c.ys = RSW'(1); c.zs = RSW'(2);
    c.alu_en = 1; c.alu_dst = 4'd5;
    put(1, 0, c);
    c = blank(); c.ex1_op = EX1_NOP; c.xs = RSW'(5); c.st_en = 1;
    put(2, 0, c);
    fill_and_check(0, 2);
    // shift the instructions two rows down the ring
    repeat (2) begin
      @(negedge clk); rot = 1;
      @(negedge clk); rot = 0;
    end
    sel_row = 2'd2; sel_col = 2'd0; #1;
    checks++;
    if (!(sel_cfg.lmm_rd && sel_cfg.bus_drv)) begin failures++; $display("FAIL shift view"); end
    sel_row = 2'd0; sel_col = 2'd0; #1;
    checks++;
    if (!sel_cfg.st_en) begin failures++; $display("FAIL ring wrap view"); end
    fill_and_check(2, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
