// tb_emax_ctrl: self-checking test of the activation controller and DMA.
// The PE array is replaced by a model here: a table of instructions that
// rotates one row per `rot` pulse, and one word memory per PE written and
// read through the DMA signals with the LMM's one-cycle read latency. The
// DDR3 is the behavioural model with random grant wait states.
// Three activations with dist = 1 are run. Checked: the words each prefetch
// brings (PF_FIRST only for the first activation, PF_EVERY each time, from
// ddr_addr + k*ddr_step), the drained words, the execution length
// PRE + ROWS + count + 1, the number of shifts, the statistics outputs and
// the end of the run (`done`, `busy`).
module tb_emax_ctrl;
  import emax_pkg::*;

  localparam int ROWS = 4, COLS = 2, PRE = FIFO_DEPTH + 2, NACT = 3, CNT = 6;
  logic clk = 0, rst_n = 0, start = 0, busy, done;
  logic [15:0] n_act;
  logic [1:0] dist_rows, sel_row;
  logic [0:0] sel_col;
  logic [CW-1:0] count;
  logic rot, exec, eag_clear, dma_en, dma_we;
  logic [CW:0] g;
  pe_cfg_t sel_cfg;
  logic [LAW-1:0] dma_addr;
  word_t dma_wdata, dma_rdata;
  logic ddr_req, ddr_we, ddr_gnt, ddr_rvalid;
  logic [31:0] ddr_addr;
  word_t ddr_wdata, ddr_rdata;
  logic [31:0] stat_pf_words, stat_dr_words, stat_pf_skip, stat_exec_cycles;
  logic [15:0] stat_act;
  pe_cfg_t tab [ROWS][COLS];
  int      lrow [ROWS];
  word_t   lmm [ROWS][COLS][16];
  int      wr_cnt [ROWS][COLS];
  int checks = 0, failures = 0, n_rot = 0, k = 0, ex_len = 0;

  emax_ctrl #(.ROWS(ROWS), .COLS(COLS), .PRE(PRE)) dut (
    .clk, .rst_n, .start, .n_act, .dist_rows, .count, .busy, .done,
    .rot, .exec, .g, .eag_clear, .sel_row, .sel_col, .sel_cfg,
    .dma_en, .dma_we, .dma_addr, .dma_wdata, .dma_rdata,
    .ddr_req, .ddr_we, .ddr_addr, .ddr_wdata, .ddr_gnt, .ddr_rvalid, .ddr_rdata,
    .stat_pf_words, .stat_dr_words, .stat_pf_skip, .stat_exec_cycles, .stat_act);

  ddr3_model #(.WORDS(4096), .LAT(2)) u_ddr (
    .clk, .req(ddr_req), .we(ddr_we), .addr(ddr_addr), .wdata(ddr_wdata),
    .gnt(ddr_gnt), .rvalid(ddr_rvalid), .rdata(ddr_rdata));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // array model
  assign sel_cfg = tab[sel_row][sel_col];
  always @(posedge clk) begin
    if (dma_en) begin
      if (dma_we) begin
        lmm[sel_row][sel_col][dma_addr[3:0]] <= dma_wdata;
        wr_cnt[sel_row][sel_col]++;
      end
      else        dma_rdata <= lmm[sel_row][sel_col][dma_addr[3:0]];
    end
    if (rot) begin
      pe_cfg_t t [ROWS][COLS];
      int      l [ROWS];
      t = tab; l = lrow;
      for (int r = 0; r < ROWS; r++) begin
        tab[r] <= t[(r + ROWS - 1) % ROWS];
        lrow[r] <= l[(r + ROWS - 1) % ROWS];
      end
      n_rot++;
    end
  end

  function automatic int phys(input int lr);
    for (int r = 0; r < ROWS; r++) if (lrow[r] == lr) return r;
    return -1;
  endfunction

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (activation %0d)", what, k); end
  endtask

  // at every execution: check the prefetched LMMs, write results for drain
  initial begin
    forever begin
      @(posedge clk);
      if (eag_clear) begin
        int r;
        r = phys(0);
        if (k == 0)
          for (int i = 0; i < 5; i++)
            chk(lmm[r][0][i] == u_ddr.mem[100 + i], "PF_FIRST stream");
        else
          chk(wr_cnt[r][0] == 0, "PF_FIRST stream not reloaded");
        for (int rr = 0; rr < ROWS; rr++) for (int cc = 0; cc < COLS; cc++) wr_cnt[rr][cc] = 0;
        r = phys(1);
        for (int i = 0; i < 3; i++)
          chk(lmm[r][1][i] == u_ddr.mem[200 + 7 * k + i], "PF_EVERY stream");
        r = phys(2);
        for (int i = 0; i < 4; i++) lmm[r][0][i] = word_t'(1000 * (k + 1) + i);
        ex_len = 0;
        while (!exec) @(posedge clk);
        while (exec) begin
          chk(g == (CW+1)'(ex_len), "g counts execution cycles");
          ex_len++;
          @(posedge clk);
        end
        chk(ex_len == PRE + ROWS + CNT + 1, "execution length");
        while (stat_act != 16'(k + 1) && busy) @(posedge clk);
        for (int i = 0; i < 4; i++)
          chk(u_ddr.mem[1000 + 4 * k + i] == word_t'(1000 * (k + 1) + i), "drained word");
        k++;
      end
    end
  end

  initial begin
    pe_cfg_t c;
    for (int i = 0; i < 4096; i++) u_ddr.mem[i] = {$urandom, $urandom};
    for (int r = 0; r < ROWS; r++) begin
      lrow[r] = r;
      for (int cc = 0; cc < COLS; cc++) wr_cnt[r][cc] = 0;
      for (int cc = 0; cc < COLS; cc++) tab[r][cc] = '0;
    end
    c = '0; c.pf = PF_FIRST; c.ddr_addr = 100; c.ddr_step = 10; c.dlen = CW'(5);
    tab[0][0] = c;
    c = '0; c.pf = PF_EVERY; c.ddr_addr = 200; c.ddr_step = 7; c.dlen = CW'(3);
    tab[1][1] = c;
    c = '0; c.drain = 1; c.ddr_addr = 1000; c.ddr_step = 4; c.dlen = CW'(4);
    tab[2][0] = c;
    n_act = 16'(NACT); dist_rows = 2'd1; count = CW'(CNT);
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    chk(busy, "busy after start");
    while (!done) @(negedge clk);
    @(negedge clk);
    chk(!busy, "idle after done");
    chk(k == NACT, "activations seen");
    chk(n_rot == NACT - 1, "shift pulses");
    chk(stat_pf_words == 32'(5 + 3 * NACT), "prefetched words");
    chk(stat_pf_skip == 32'(NACT - 1), "prefetches saved");
    chk(stat_dr_words == 32'(4 * NACT), "drained words");
    chk(stat_act == 16'(NACT), "activation count");
    chk(stat_exec_cycles == 32'(NACT * (PRE + ROWS + CNT + 1)), "execution cycles");
    chk(u_ddr.waits > 0, "DDR3 wait states seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
