// emax_pe: one processing element (PE) of the EMAX array.
//
// A PE holds a local memory (LMM), an effective address generator (EAG), an
// LMM_FIFO and two arithmetic units, EX1 followed by EX2. It executes the one
// instruction it is given (`cfg`) for `count` iterations, one per cycle:
//   - EX1 takes X/Y/Z from the register slots arriving from the row above
//     (`regs_in`) or the RGI constant; EX2 combines the EX1 result with a slot
//     or the RGI constant and shifts it; the result is offered for slot
//     `alu_dst` of the row's outgoing registers.
//   - A load picks a word from the LMM_FIFO at tap `ld_tap`, narrows it to
//     the load width and offers it for slot `ld_dst`.
//   - The LMM is streamed by the EAG (`lmm_rd`) from `base`, running `lead`
//     words ahead of the iteration, so that the FIFO holds the X-neighbours;
//     the FIFO is fed by its own LMM or by the row's common data path
//     (`bus_in`, driven by the PE whose `bus_drv` is set).
//   - A store (`st_en`) writes the ALU result to the own LMM via the EAG.
// Timing is set by `lt`, the signed local iteration number of this row,
// given by the array: the row computes iteration lt when 0 <= lt < count.
// The LMM stream reads element j = lt + lead + 1 in cycle lt, for
// 0 <= j < count + lead, so element i + lead - k sits at FIFO tap k during
// iteration i. `eag_clear` restarts the EAG before execution.
// Between executions the single LMM port belongs to the DMA (`dma_*`);
// the DMA has the port whenever `dma_en` is high.
// The units and the load/store, FIFO and data-path split are the document's;
// the slot-based operand routing and this exact timing are this design's.
module emax_pe
  import emax_pkg::*;
(
  input  logic                  clk,
  input  logic                  rst_n,
  input  pe_cfg_t               cfg,
  input  logic [CW-1:0]         count,
  input  logic signed [CW+1:0]  lt,
  input  logic                  eag_clear,
  input  word_t                 regs_in [NREG],
  input  word_t                 bus_in,
  output word_t                 lmm_q,
  output logic                  alu_we,
  output logic [RSW-2:0]        alu_dst,
  output word_t                 alu_val,
  output logic                  ld_we,
  output logic [RSW-2:0]        ld_dst,
  output word_t                 ld_val,
  input  logic                  dma_en,
  input  logic                  dma_we,
  input  logic [LAW-1:0]        dma_addr,
  input  word_t                 dma_wdata,
  output word_t                 dma_rdata
);
  logic signed [CW+1:0] jn, cnt_s, lead_s;
  logic   active, rd_now;
  word_t  xo, yo, zo, y2, ex1_res, fifo_din, fifo_q;
  logic   lmm_en, lmm_we, eag_step;
  logic [LAW-1:0] lmm_addr, eag_addr;
  word_t  lmm_wdata;

  always_comb begin
    cnt_s  = $signed({2'b00, count});
    lead_s = $signed({2'b00, cfg.lead});
    jn     = lt + lead_s + 1;
    active = (lt >= 0) && (lt < cnt_s);
    rd_now = cfg.lmm_rd && (jn >= 0) && (jn < cnt_s + lead_s);
  end

  // operands and arithmetic
  always_comb begin
    // slot index NREG selects the RGI constant
    xo = cfg.xs[RSW-1]  ? cfg.rgi : regs_in[cfg.xs[RSW-2:0]];
    yo = cfg.ys[RSW-1]  ? cfg.rgi : regs_in[cfg.ys[RSW-2:0]];
    zo = cfg.zs[RSW-1]  ? cfg.rgi : regs_in[cfg.zs[RSW-2:0]];
    y2 = cfg.ys2[RSW-1] ? cfg.rgi : regs_in[cfg.ys2[RSW-2:0]];
  end

  emax_ex1 u_ex1 (.op(cfg.ex1_op), .x(xo), .y(yo), .z(zo),
                  .xf(cfg.xf), .yf(cfg.yf), .zf(cfg.zf), .res(ex1_res));
  emax_ex2 u_ex2 (.op(cfg.ex2_op), .x(ex1_res), .y(y2), .sh(cfg.sh), .res(alu_val));

  assign alu_we  = active && cfg.alu_en;
  assign alu_dst = cfg.alu_dst;

  // address generation, LMM port sharing
  assign eag_step = rd_now || (active && cfg.st_en);

  emax_eag u_eag (.clk, .rst_n, .clear(eag_clear), .step(eag_step),
                  .base(cfg.base), .stride(cfg.stride), .count(count + cfg.lead),
                  .addr(eag_addr), .busy());

  always_comb begin
    if (dma_en) begin
      lmm_en    = 1'b1;
      lmm_we    = dma_we;
      lmm_addr  = dma_addr;
      lmm_wdata = dma_wdata;
    end else begin
      lmm_en    = eag_step;
      lmm_we    = active && cfg.st_en;
      lmm_addr  = eag_addr;
      lmm_wdata = alu_val;
    end
  end

  emax_lmm #(.WORDS(LMM_WORDS), .DW(DW)) u_lmm (
    .clk, .en(lmm_en), .we(lmm_we), .addr(lmm_addr), .wdata(lmm_wdata), .rdata(lmm_q));

  assign dma_rdata = lmm_q;

  // LMM_FIFO and load
  assign fifo_din = cfg.fifo_bus ? bus_in : lmm_q;

  emax_lmm_fifo #(.DEPTH(FIFO_DEPTH), .DW(DW)) u_fifo (
    .clk, .shift(1'b1), .din(fifo_din), .tap(cfg.ld_tap), .dout(fifo_q));

  always_comb begin
    unique case (cfg.mw)
      MW_B:    ld_val = word_t'($signed(fifo_q[7:0]));
      MW_UB:   ld_val = {56'd0, fifo_q[7:0]};
      MW_H:    ld_val = word_t'($signed(fifo_q[15:0]));
      MW_UH:   ld_val = {48'd0, fifo_q[15:0]};
      MW_W:    ld_val = {32'd0, fifo_q[31:0]};
      default: ld_val = fifo_q;
    endcase
  end

  assign ld_we  = active && cfg.ld_en;
  assign ld_dst = cfg.ld_dst;
endmodule
