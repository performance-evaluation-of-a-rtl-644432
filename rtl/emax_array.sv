// emax_array: the ROWS x COLS matrix of EMAX processing elements.
//
// Each row of PEs is one pipeline stage. A bundle of NREG register slots
// flows from row to row, one row per cycle; the PEs of a row read their
// operands from the bundle arriving from the row above, and the row's
// outgoing bundle is the incoming one with the slots written by its PEs
// (ALU results and loads, later columns winning) replaced. The bottom row
// feeds the top row, closing a ring.
//
// Instructions are held per physical PE together with the logical row they
// belong to. `rot` shifts every instruction one row down the ring (bottom to
// top); the controller pulses it `dist` times between two activations, so
// that the instructions move while the LMM contents stay, and streams loaded
// for one activation are reused by the next. The PE row that carries logical
// row 0 starts from an empty bundle (all slots zero).
//
// In a row, the PE with `bus_drv` set puts its LMM read data on the row's
// common data path, which feeds the LMM_FIFO of every PE in the row that
// selects it (`fifo_bus`).
//
// Timing: during execution (`exec`), with global cycle `g`, the row carrying
// logical row L works on iteration g - PRE - L. PRE leaves room for the
// LMM streams to run ahead of the first iteration.
// Host/controller side: `cfg_clear` empties every PE's instruction and
// undoes the shifts; `cfg_we` writes the instruction of PE
// (cfg_row, cfg_col) and marks that row as logical row cfg_row; `sel_row`,
// `sel_col` select the PE whose instruction is shown on `sel_cfg` and whose
// LMM port the DMA uses (`dma_*`).
// Rows, columns, ring, row data path and dist shift follow the document;
// the slot bundle, the shift-register form of the dist shift and PRE are
// this design's.
module emax_array
  import emax_pkg::*;
#(
  parameter int unsigned ROWS = 88,
  parameter int unsigned COLS = 4,
  parameter int unsigned PRE  = FIFO_DEPTH + 2,
  localparam int unsigned RW  = $clog2(ROWS),
  localparam int unsigned CLW = (COLS > 1) ? $clog2(COLS) : 1
) (
  input  logic            clk,
  input  logic            rst_n,
  // instruction port
  input  logic            cfg_clear,
  input  logic            cfg_we,
  input  logic [RW-1:0]   cfg_row,
  input  logic [CLW-1:0]  cfg_col,
  input  pe_cfg_t         cfg_wdata,
  input  logic            rot,
  // execution
  input  logic            exec,
  input  logic [CW:0]     g,
  input  logic [CW-1:0]   count,
  input  logic            eag_clear,
  // controller view of one PE
  input  logic [RW-1:0]   sel_row,
  input  logic [CLW-1:0]  sel_col,
  output pe_cfg_t         sel_cfg,
  input  logic            dma_en,
  input  logic            dma_we,
  input  logic [LAW-1:0]  dma_addr,
  input  word_t           dma_wdata,
  output word_t           dma_rdata
);
  pe_cfg_t        cfg_q  [ROWS][COLS];
  logic [RW-1:0]  lrow_q [ROWS];
  word_t          rq     [ROWS][NREG];
  word_t          rin    [ROWS][NREG];
  word_t          bus    [ROWS];
  word_t          lmm_q  [ROWS][COLS];
  word_t          dma_q  [ROWS][COLS];
  logic           alu_we [ROWS][COLS];
  logic [RSW-2:0] alu_dst[ROWS][COLS];
  word_t          alu_val[ROWS][COLS];
  logic           ld_we  [ROWS][COLS];
  logic [RSW-2:0] ld_dst [ROWS][COLS];
  word_t          ld_val [ROWS][COLS];
  logic signed [CW+1:0] lt [ROWS];

  // instruction storage and dist shift
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int r = 0; r < ROWS; r++) begin
        lrow_q[r] <= RW'(r);
        for (int c = 0; c < COLS; c++) cfg_q[r][c] <= '0;
      end
    end else if (cfg_clear) begin
      for (int r = 0; r < ROWS; r++) begin
        lrow_q[r] <= RW'(r);
        for (int c = 0; c < COLS; c++) cfg_q[r][c] <= '0;
      end
    end else if (rot) begin
      for (int r = 0; r < ROWS; r++) begin
        lrow_q[r] <= lrow_q[(r + ROWS - 1) % ROWS];
        for (int c = 0; c < COLS; c++) cfg_q[r][c] <= cfg_q[(r + ROWS - 1) % ROWS][c];
      end
    end else if (cfg_we) begin
      lrow_q[cfg_row]         <= cfg_row;
      cfg_q[cfg_row][cfg_col] <= cfg_wdata;
    end
  end

  // per-row timing, incoming bundle and row data path
  always_comb begin
    for (int r = 0; r < ROWS; r++) begin
      if (exec)
        lt[r] = $signed({1'b0, g}) - $signed((CW+2)'(PRE)) - $signed({{(CW+2-RW){1'b0}}, lrow_q[r]});
      else
        lt[r] = {1'b1, {(CW+1){1'b0}}};
      for (int s = 0; s < NREG; s++)
        rin[r][s] = (lrow_q[r] == '0) ? '0 : rq[(r + ROWS - 1) % ROWS][s];
      bus[r] = '0;
      for (int c = 0; c < COLS; c++)
        if (cfg_q[r][c].bus_drv) bus[r] = bus[r] | lmm_q[r][c];
    end
  end

  // the PEs
  for (genvar r = 0; r < ROWS; r++) begin : g_row
    for (genvar c = 0; c < COLS; c++) begin : g_col
      logic sel;
      assign sel = dma_en && (sel_row == RW'(r)) && (sel_col == CLW'(c));
      emax_pe u_pe (
        .clk, .rst_n,
        .cfg(cfg_q[r][c]), .count, .lt(lt[r]), .eag_clear,
        .regs_in(rin[r]), .bus_in(bus[r]), .lmm_q(lmm_q[r][c]),
        .alu_we(alu_we[r][c]), .alu_dst(alu_dst[r][c]), .alu_val(alu_val[r][c]),
        .ld_we(ld_we[r][c]), .ld_dst(ld_dst[r][c]), .ld_val(ld_val[r][c]),
        .dma_en(sel), .dma_we, .dma_addr, .dma_wdata, .dma_rdata(dma_q[r][c]));
    end
  end

  // outgoing bundle registers
  always_ff @(posedge clk) begin
    for (int r = 0; r < ROWS; r++) begin
      for (int s = 0; s < NREG; s++) begin
        rq[r][s] <= rin[r][s];
        for (int c = 0; c < COLS; c++) begin
          if (ld_we[r][c]  && ld_dst[r][c]  == (RSW-1)'(s)) rq[r][s] <= ld_val[r][c];
          if (alu_we[r][c] && alu_dst[r][c] == (RSW-1)'(s)) rq[r][s] <= alu_val[r][c];
        end
      end
    end
  end

  assign sel_cfg   = cfg_q[sel_row][sel_col];
  assign dma_rdata = dma_q[sel_row][sel_col];
endmodule
