// emax_top: the EMAX accelerator, a ring-connected array of processing
// elements with distributed single-port local memories, and its activation
// controller.
//
// The host clears the instructions (`cfg_clear`, which also undoes earlier
// shifts), writes one instruction per PE through the instruction port
// (`cfg_*`, physical position), places the input streams in the
// accelerator's DDR3 and pulses `start` with the number of activations
// `n_act`, the instruction shift `dist_rows` between activations and the
// iteration `count` of every instruction. For every activation the
// controller prefetches the requested streams from DDR3 into the LMMs, runs
// the array for `count` iterations (one result per cycle once the pipeline
// is full) and writes the stored results back to DDR3; it then shifts the
// instructions `dist_rows` rows along the ring so that streams already in LMMs
// are reused. `done` pulses at the end. The DDR3 itself and the host link
// are outside: `ddr_*` is a word-wide request/grant port with read data
// returned by `ddr_rvalid`. The `stat_*` outputs count the words moved
// between DDR3 and the LMMs, the prefetches saved by reuse, the execution
// cycles and the activations.
// ROWS = 88 and COLS = 4 give 352 PEs, the PE count quoted for EMAX; the
// size of the instruction word and of the DDR3 port are this design's.
module emax_top
  import emax_pkg::*;
#(
  parameter int unsigned ROWS = 88,
  parameter int unsigned COLS = 4,
  localparam int unsigned RW  = $clog2(ROWS),
  localparam int unsigned CLW = (COLS > 1) ? $clog2(COLS) : 1
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            cfg_clear,
  input  logic            cfg_we,
  input  logic [RW-1:0]   cfg_row,
  input  logic [CLW-1:0]  cfg_col,
  input  pe_cfg_t         cfg_wdata,
  input  logic            start,
  input  logic [15:0]     n_act,
  input  logic [RW-1:0]   dist_rows,
  input  logic [CW-1:0]   count,
  output logic            busy,
  output logic            done,
  output logic            ddr_req,
  output logic            ddr_we,
  output logic [31:0]     ddr_addr,
  output word_t           ddr_wdata,
  input  logic            ddr_gnt,
  input  logic            ddr_rvalid,
  input  word_t           ddr_rdata,
  output logic [31:0]     stat_pf_words,
  output logic [31:0]     stat_dr_words,
  output logic [31:0]     stat_pf_skip,
  output logic [31:0]     stat_exec_cycles,
  output logic [15:0]     stat_act
);
  localparam int unsigned PRE = FIFO_DEPTH + 2;

  logic           rot, exec, eag_clear, dma_en, dma_we;
  logic [CW:0]    g;
  logic [RW-1:0]  sel_row;
  logic [CLW-1:0] sel_col;
  pe_cfg_t        sel_cfg;
  logic [LAW-1:0] dma_addr;
  word_t          dma_wdata, dma_rdata;

  emax_ctrl #(.ROWS(ROWS), .COLS(COLS), .PRE(PRE)) u_ctrl (
    .clk, .rst_n, .start, .n_act, .dist_rows, .count, .busy, .done,
    .rot, .exec, .g, .eag_clear, .sel_row, .sel_col, .sel_cfg,
    .dma_en, .dma_we, .dma_addr, .dma_wdata, .dma_rdata,
    .ddr_req, .ddr_we, .ddr_addr, .ddr_wdata, .ddr_gnt, .ddr_rvalid, .ddr_rdata,
    .stat_pf_words, .stat_dr_words, .stat_pf_skip, .stat_exec_cycles, .stat_act);

  emax_array #(.ROWS(ROWS), .COLS(COLS), .PRE(PRE)) u_array (
    .clk, .rst_n, .cfg_clear, .cfg_we, .cfg_row, .cfg_col, .cfg_wdata, .rot,
    .exec, .g, .count, .eag_clear, .sel_row, .sel_col, .sel_cfg,
    .dma_en, .dma_we, .dma_addr, .dma_wdata, .dma_rdata);
endmodule
