// tb_emax_pe: self-checking test of one processing element.
// The LMM is filled through the DMA port, then the PE is stepped through the
// local iteration numbers lt = -PRE .. count+1 as the array would do:
//   1. LMM stream with a lead of `lead` words, load from FIFO tap k: the load
//      of iteration i must be element i + lead - k (checked for every tap),
//      together with an EX1 add of a slot and the RGI constant;
//   2. store of a slot value through the EAG with stride 3, read back by DMA;
//   3. FIFO fed from the row data path instead of the own LMM;
//   4. signed byte loads and EX2 shift.
// Nothing may be written outside 0 <= lt < count.
module tb_emax_pe;
  import emax_pkg::*;

  localparam int PRE = FIFO_DEPTH + 2;
  logic clk = 0, rst_n = 0, eag_clear = 0;
  pe_cfg_t cfg;
  logic [CW-1:0] count;
  logic signed [CW+1:0] lt;
  word_t regs_in [NREG];
  word_t bus_in, lmm_q, alu_val, ld_val, dma_wdata, dma_rdata;
  logic alu_we, ld_we, dma_en = 0, dma_we = 0;
  logic [RSW-2:0] alu_dst, ld_dst;
  logic [LAW-1:0] dma_addr;
  word_t D [LMM_WORDS];
  word_t V [64];
  int checks = 0, failures = 0;

  emax_pe dut (.clk, .rst_n, .cfg, .count, .lt, .eag_clear, .regs_in, .bus_in, .lmm_q,
               .alu_we, .alu_dst, .alu_val, .ld_we, .ld_dst, .ld_val,
               .dma_en, .dma_we, .dma_addr, .dma_wdata, .dma_rdata);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s lt=%0d ld=%h alu=%h", what, lt, ld_val, alu_val);
    end
  endtask

  task automatic dma_fill();
    for (int a = 0; a < 400; a++) begin
      @(negedge clk);
      dma_en = 1; dma_we = 1; dma_addr = LAW'(a); dma_wdata = D[a];
    end
    @(negedge clk);
    dma_en = 0; dma_we = 0;
  endtask

  task automatic dma_read(input int a, output word_t v);
    @(negedge clk);
    dma_en = 1; dma_we = 0; dma_addr = LAW'(a);
    @(negedge clk);
    dma_en = 0;
    v = dma_rdata;
  endtask

  function automatic pe_cfg_t blank();
    pe_cfg_t c;
    c = '0;
    c.xs = RSW'(NREG); c.ys = RSW'(NREG); c.zs = RSW'(NREG); c.ys2 = RSW'(NREG);
    return c;
  endfunction

  initial begin
    word_t v;
    int lead, tap;
    lt = {1'b1, {(CW+1){1'b0}}};
    for (int s = 0; s < NREG; s++) regs_in[s] = '0;
    bus_in = '0;
    for (int a = 0; a < LMM_WORDS; a++) D[a] = {$urandom, $urandom};
    cfg = blank();
    count = CW'(40);
    repeat (3) @(negedge clk);
    rst_n = 1;
    dma_fill();
    // 1. own LMM stream, every tap
    for (lead = 0; lead < FIFO_DEPTH; lead += 3) begin
      for (tap = 0; tap <= lead; tap++) begin
        cfg = blank();
        cfg.lmm_rd = 1; cfg.lead = CW'(lead); cfg.base = LAW'(5); cfg.stride = LAW'(1);
        cfg.ld_en = 1; cfg.ld_dst = 4'd3; cfg.ld_tap = TAPW'(tap); cfg.mw = MW_D;
        cfg.ex1_op = EX1_ADD; cfg.xs = RSW'(2); cfg.ys = RSW'(NREG); cfg.rgi = 64'd1000;
        cfg.alu_en = 1; cfg.alu_dst = 4'd7;
        @(negedge clk); eag_clear = 1;
        @(negedge clk); eag_clear = 0;
        for (int t = -PRE; t < int'(count) + 2; t++) begin
          lt = (CW+2)'(t);
          regs_in[2] = word_t'($urandom);
          #1;
          if (t >= 0 && t < int'(count)) begin
            chk(ld_we && ld_dst == 4'd3 && ld_val == D[5 + t + lead - tap], "stream load");
            chk(alu_we && alu_dst == 4'd7 &&
                alu_val == {32'd0, regs_in[2][31:0] + 32'd1000}, "alu add");
          end else begin
            chk(!ld_we && !alu_we, "idle outside the iterations");
          end
          @(negedge clk);
        end
        lt = {1'b1, {(CW+1){1'b0}}};
      end
    end
    // 2. store with stride 3
    for (int i = 0; i < 64; i++) V[i] = {$urandom, $urandom};
    cfg = blank();
    cfg.st_en = 1; cfg.base = LAW'(200); cfg.stride = LAW'(3);
    cfg.ex1_op = EX1_NOP; cfg.xs = RSW'(1);
    @(negedge clk); eag_clear = 1;
    @(negedge clk); eag_clear = 0;
    for (int t = -PRE; t < int'(count) + 2; t++) begin
      lt = (CW+2)'(t);
      regs_in[1] = (t >= 0 && t < 64) ? V[t] : 64'hdead;
      @(negedge clk);
    end
    lt = {1'b1, {(CW+1){1'b0}}};
    for (int i = 0; i < int'(count); i++) begin
      dma_read(200 + 3 * i, v);
      chk(v == V[i], "stored value");
    end
    dma_read(200 + 3 * int'(count), v);
    chk(v == D[200 + 3 * int'(count)], "no store past count");
    // 3. FIFO fed by the row data path
    cfg = blank();
    cfg.fifo_bus = 1; cfg.ld_en = 1; cfg.ld_dst = 4'd9; cfg.ld_tap = TAPW'(2); cfg.mw = MW_D;
    for (int t = -PRE; t < int'(count) + 2; t++) begin
      lt = (CW+2)'(t);
      bus_in = V[(t + PRE) % 64];
      #1;
      if (t >= 0 && t < int'(count))
        chk(ld_we && ld_val == V[(t + PRE - 2) % 64], "row data path load");
      @(negedge clk);
    end
    lt = {1'b1, {(CW+1){1'b0}}};
    // 4. signed byte load, EX2 OR with shift
    cfg = blank();
    cfg.lmm_rd = 1; cfg.lead = '0; cfg.base = '0; cfg.stride = LAW'(1);
    cfg.ld_en = 1; cfg.ld_tap = '0; cfg.mw = MW_B; cfg.ld_dst = 4'd0;
    cfg.ex1_op = EX1_NOP; cfg.xs = RSW'(4); cfg.ex2_op = EX2_OR; cfg.ys2 = RSW'(NREG);
    cfg.rgi = 64'h0000_0000_0001_0001; cfg.sh = 4'd2; cfg.alu_en = 1;
    @(negedge clk); eag_clear = 1;
    @(negedge clk); eag_clear = 0;
    for (int t = -PRE; t < int'(count); t++) begin
      lt = (CW+2)'(t);
      regs_in[4] = {32'd0, 16'h8000, 16'h0100};
      #1;
      if (t >= 0) begin
        chk(ld_val == word_t'($signed(D[t][7:0])), "signed byte load");
        chk(alu_val == {32'd0, 16'he000, 16'h0040}, "ex2 or and shift");
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
