// emax_ctrl: activation controller and DMA engine of EMAX.
//
// One `start` runs `n_act` activations of the array. Each activation goes
// through the states of the execution sequence:
//   1. prefetch (DDR3 -> LMM): every PE whose instruction asks for it gets
//      `dlen` words from DDR3 address ddr_addr + k*ddr_step into LMM words
//      0..dlen-1 (k = activation number). PF_FIRST PEs are loaded only for
//      k = 0: their streams are reused by later activations.
//   2. execute: the array runs `count` iterations; the global cycle counter
//      `g` runs from 0 to PRE + ROWS + count, after an EAG clear.
//   3. drain (LMM -> DDR3): every PE with `drain` set sends LMM words
//      0..dlen-1 to DDR3 address ddr_addr + k*ddr_step.
//   4. between activations, `rot` is pulsed `dist_rows` times so that the
//      instructions move `dist_rows` rows down the ring.
// The PEs are visited in row-major order through the array's `sel_row`/
// `sel_col` view. The DMA moves one word at a time over a simple DDR3 port:
// a request is held until `ddr_gnt`; read data returns later with
// `ddr_rvalid`. One read is outstanding at most.
// The statistics outputs count words moved, prefetches saved by reuse,
// execution cycles and activations; `done` pulses when all activations end.
// The state sequence follows the document's execution sequence (its host
// transfers are outside this block); the scan order, one-word DMA and the
// DDR3 handshake are this design's.
module emax_ctrl
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
  input  logic            start,
  input  logic [15:0]     n_act,
  input  logic [RW-1:0]   dist_rows,
  input  logic [CW-1:0]   count,
  output logic            busy,
  output logic            done,
  // array
  output logic            rot,
  output logic            exec,
  output logic [CW:0]     g,
  output logic            eag_clear,
  output logic [RW-1:0]   sel_row,
  output logic [CLW-1:0]  sel_col,
  input  pe_cfg_t         sel_cfg,
  output logic            dma_en,
  output logic            dma_we,
  output logic [LAW-1:0]  dma_addr,
  output word_t           dma_wdata,
  input  word_t           dma_rdata,
  // DDR3 port
  output logic            ddr_req,
  output logic            ddr_we,
  output logic [31:0]     ddr_addr,
  output word_t           ddr_wdata,
  input  logic            ddr_gnt,
  input  logic            ddr_rvalid,
  input  word_t           ddr_rdata,
  // statistics
  output logic [31:0]     stat_pf_words,
  output logic [31:0]     stat_dr_words,
  output logic [31:0]     stat_pf_skip,
  output logic [31:0]     stat_exec_cycles,
  output logic [15:0]     stat_act
);
  typedef enum logic [3:0] {
    S_IDLE, S_PF_SCAN, S_PF_RD, S_PF_WAIT, S_EX_INIT, S_EXEC,
    S_DR_SCAN, S_DR_LMM, S_DR_WR, S_NEXT, S_ROT
  } state_e;

  state_e         st;
  logic [15:0]    k;
  logic [CW-1:0]  widx;
  logic [RW-1:0]  rc;
  logic [31:0]    dbase;
  logic           last_pe, pf_need, pf_skip, dr_need;

  assign dbase   = sel_cfg.ddr_addr + 32'(k) * sel_cfg.ddr_step;
  assign last_pe = (sel_row == RW'(ROWS - 1)) && (sel_col == CLW'(COLS - 1));
  assign pf_need = (sel_cfg.dlen != '0) &&
                   ((sel_cfg.pf == PF_EVERY) || (sel_cfg.pf == PF_FIRST && k == '0));
  assign pf_skip = (sel_cfg.dlen != '0) && (sel_cfg.pf == PF_FIRST) && (k != '0);
  assign dr_need = (sel_cfg.dlen != '0) && sel_cfg.drain;

  // next PE in row-major order
  logic [RW-1:0]  nx_row;
  logic [CLW-1:0] nx_col;
  always_comb begin
    nx_row = sel_row;
    nx_col = sel_col + 1'b1;
    if (sel_col == CLW'(COLS - 1)) begin
      nx_col = '0;
      nx_row = (sel_row == RW'(ROWS - 1)) ? '0 : sel_row + 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= S_IDLE;
      k <= '0; widx <= '0; rc <= '0; g <= '0;
      sel_row <= '0; sel_col <= '0;
      done <= 1'b0;
      stat_pf_words <= '0; stat_dr_words <= '0; stat_pf_skip <= '0;
      stat_exec_cycles <= '0; stat_act <= '0;
    end else begin
      done <= 1'b0;
      unique case (st)
        S_IDLE: if (start) begin
          k <= '0; sel_row <= '0; sel_col <= '0; widx <= '0;
          stat_pf_words <= '0; stat_dr_words <= '0; stat_pf_skip <= '0;
          stat_exec_cycles <= '0; stat_act <= '0;
          st <= (n_act == '0) ? S_IDLE : S_PF_SCAN;
          done <= (n_act == '0);
        end
        S_PF_SCAN: begin
          widx <= '0;
          if (pf_need) st <= S_PF_RD;
          else begin
            if (pf_skip) stat_pf_skip <= stat_pf_skip + 1;
            sel_row <= nx_row; sel_col <= nx_col;
            if (last_pe) st <= S_EX_INIT;
          end
        end
        S_PF_RD: if (ddr_gnt) st <= S_PF_WAIT;
        S_PF_WAIT: if (ddr_rvalid) begin
          stat_pf_words <= stat_pf_words + 1;
          widx <= widx + 1'b1;
          if (widx + 1'b1 == sel_cfg.dlen) begin
            sel_row <= nx_row; sel_col <= nx_col;
            st <= last_pe ? S_EX_INIT : S_PF_SCAN;
          end else begin
            st <= S_PF_RD;
          end
        end
        S_EX_INIT: begin
          g  <= '0;
          st <= S_EXEC;
        end
        S_EXEC: begin
          stat_exec_cycles <= stat_exec_cycles + 1;
          g <= g + 1'b1;
          if (g == (CW+1)'(PRE + ROWS) + (CW+1)'(count)) st <= S_DR_SCAN;
        end
        S_DR_SCAN: begin
          widx <= '0;
          if (dr_need) st <= S_DR_LMM;
          else begin
            sel_row <= nx_row; sel_col <= nx_col;
            if (last_pe) st <= S_NEXT;
          end
        end
        S_DR_LMM: st <= S_DR_WR;
        S_DR_WR: if (ddr_gnt) begin
          stat_dr_words <= stat_dr_words + 1;
          widx <= widx + 1'b1;
          if (widx + 1'b1 == sel_cfg.dlen) begin
            sel_row <= nx_row; sel_col <= nx_col;
            st <= last_pe ? S_NEXT : S_DR_SCAN;
          end else begin
            st <= S_DR_LMM;
          end
        end
        S_NEXT: begin
          stat_act <= stat_act + 1'b1;
          k  <= k + 1'b1;
          rc <= dist_rows;
          if (k + 1'b1 == n_act) begin
            st   <= S_IDLE;
            done <= 1'b1;
          end else begin
            st <= S_ROT;
          end
        end
        S_ROT: begin
          if (rc == '0) st <= S_PF_SCAN;
          else rc <= rc - 1'b1;
        end
        default: st <= S_IDLE;
      endcase
    end
  end

  always_comb begin
    busy      = (st != S_IDLE);
    exec      = (st == S_EXEC);
    eag_clear = (st == S_EX_INIT);
    rot       = (st == S_ROT) && (rc != '0);
    dma_en    = (st == S_PF_WAIT && ddr_rvalid) || (st == S_DR_LMM);
    dma_we    = (st == S_PF_WAIT);
    dma_addr  = LAW'(widx);
    dma_wdata = ddr_rdata;
    ddr_req   = (st == S_PF_RD) || (st == S_DR_WR);
    ddr_we    = (st == S_DR_WR);
    ddr_addr  = dbase + 32'(widx);
    ddr_wdata = dma_rdata;
  end

  // a DDR3 request is held until it is granted
  property p_req_hold;
    @(posedge clk) disable iff (!rst_n) (ddr_req && !ddr_gnt) |=> ddr_req;
  endproperty
  a_req_hold: assert property (p_req_hold);
endmodule
