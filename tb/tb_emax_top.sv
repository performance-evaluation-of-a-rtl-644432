// tb_emax_top: end-to-end test of the EMAX accelerator at its default size
// (88 x 4 PEs), running a 7-point 3D Jacobi stencil (degree 1) on an X row of
// 320 points with the basic mapping:
//   row 0: load Y-1 (col 0), load Z-1 (col 2)
//   row 1: X stream in col 0, shared on the row data path; x-1, x, x+1 are
//          loaded from the LMM_FIFOs of cols 0, 1, 2
//   row 2: load Y+1 (col 0), load Z+1 (col 2), fmul C0 * A (col 1)
//   rows 3..8: fma3 acc + C1 * neighbour, one neighbour per row
//   row 9: store, drained to DDR3
// One start runs NY activations along Y with dist = 1: the Y-1 and centre
// streams of each activation after the first are the LMMs already loaded,
// so only three new streams are prefetched per activation.
// Checked: every result word against a reference computed here in double
// precision in the same order of operations; the words prefetched, drained
// and saved; the execution cycles of an activation (PRE + ROWS + count + 1,
// one result per cycle); the number of instruction shifts; and that each
// mechanism (prefetch, reuse, shift, row data path, store/drain, DDR3 wait)
// happened.
module tb_emax_top;
  import emax_pkg::*;

  localparam int ROWS = 88, COLS = 4, PRE = FIFO_DEPTH + 2;
  localparam int NX = 320, NY = 4, XP = NX + 2, YP = NY + 2;
  localparam int OUT = 16384;
  localparam real C0 = 0.25, C1 = 0.125;

  logic clk = 0, rst_n = 0;
  logic cfg_clear = 0, cfg_we = 0, start = 0, busy, done;
  logic [6:0] cfg_row;
  logic [1:0] cfg_col;
  pe_cfg_t cfg_wdata;
  logic [15:0] n_act;
  logic [6:0] dist_rows;
  logic [CW-1:0] count;
  logic ddr_req, ddr_we, ddr_gnt, ddr_rvalid;
  logic [31:0] ddr_addr;
  word_t ddr_wdata, ddr_rdata;
  logic [31:0] stat_pf_words, stat_dr_words, stat_pf_skip, stat_exec_cycles;
  logic [15:0] stat_act;
  int checks = 0, failures = 0;
  int n_rot = 0, n_bus = 0;

  emax_top dut (.clk, .rst_n, .cfg_clear, .cfg_we, .cfg_row, .cfg_col, .cfg_wdata,
                .start, .n_act, .dist_rows, .count, .busy, .done,
                .ddr_req, .ddr_we, .ddr_addr, .ddr_wdata, .ddr_gnt, .ddr_rvalid, .ddr_rdata,
                .stat_pf_words, .stat_dr_words, .stat_pf_skip, .stat_exec_cycles, .stat_act);

  ddr3_model #(.WORDS(32768), .LAT(2)) u_ddr (
    .clk, .req(ddr_req), .we(ddr_we), .addr(ddr_addr), .wdata(ddr_wdata),
    .gnt(ddr_gnt), .rvalid(ddr_rvalid), .rdata(ddr_rdata));

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // mechanism monitors
  always @(posedge clk) begin
    if (dut.u_array.rot) n_rot++;
  end

  function automatic int ia(input int x, input int y, input int z);
    return (z * YP + y) * XP + x;
  endfunction

  function automatic pe_cfg_t blank();
    pe_cfg_t c;
    c = '0;
    c.xs = RSW'(NREG); c.ys = RSW'(NREG); c.zs = RSW'(NREG); c.ys2 = RSW'(NREG);
    c.stride = LAW'(1);
    return c;
  endfunction

  task automatic put(input int r, input int c, input pe_cfg_t v);
    @(negedge clk);
    cfg_we = 1; cfg_row = 7'(r); cfg_col = 2'(c); cfg_wdata = v;
    @(negedge clk);
    cfg_we = 0;
  endtask

  // a load of a stream that starts at the halo word
  function automatic pe_cfg_t ld_stream(input int dst, input int ddr, input int step,
                                        input pf_mode_e pf);
    pe_cfg_t c;
    c = blank();
    c.lmm_rd = 1; c.base = LAW'(1); c.lead = '0;
    c.ld_en = 1; c.ld_dst = 4'(dst); c.ld_tap = '0; c.mw = MW_D;
    c.pf = pf; c.ddr_addr = 32'(ddr); c.ddr_step = 32'(step); c.dlen = CW'(XP);
    return c;
  endfunction

  function automatic pe_cfg_t fma(input int nb);
    pe_cfg_t c;
    c = blank();
    c.ex1_op = EX1_FMA3; c.xs = RSW'(7); c.ys = RSW'(nb); c.zs = RSW'(NREG);
    c.rgi = $realtobits(C1); c.alu_en = 1; c.alu_dst = 4'd7;
    return c;
  endfunction

  real A [XP*YP*3];

  initial begin
    pe_cfg_t c;
    int z;
    real acc;
    word_t got;
    logic [31:0] pf0;
    z = 1;
    for (int i = 0; i < XP * YP * 3; i++) begin
      A[i] = (real'($urandom_range(0, 1000000)) / 1000.0) - 500.0;
      u_ddr.mem[i] = $realtobits(A[i]);
    end
    cfg_wdata = '0; cfg_row = '0; cfg_col = '0; n_act = '0; dist_rows = '0; count = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk); cfg_clear = 1;
    @(negedge clk); cfg_clear = 0;
    // row 0
    put(0, 0, ld_stream(0, ia(0, 0, z), XP, PF_FIRST));
    put(0, 2, ld_stream(1, ia(0, 1, z - 1), XP, PF_EVERY));
    // row 1: X stream and its neighbours
    c = blank();
    c.lmm_rd = 1; c.bus_drv = 1; c.base = '0; c.lead = CW'(2);
    c.ld_en = 1; c.ld_dst = 4'd2; c.ld_tap = TAPW'(2); c.mw = MW_D;
    c.pf = PF_FIRST; c.ddr_addr = 32'(ia(0, 1, z)); c.ddr_step = 32'(XP); c.dlen = CW'(XP);
    put(1, 0, c);
    c = blank();
    c.fifo_bus = 1; c.ld_en = 1; c.ld_dst = 4'd3; c.ld_tap = TAPW'(1); c.mw = MW_D;
    put(1, 1, c);
    c.ld_dst = 4'd4; c.ld_tap = TAPW'(0);
    put(1, 2, c);
    // row 2
    put(2, 0, ld_stream(5, ia(0, 2, z), XP, PF_EVERY));
    put(2, 2, ld_stream(6, ia(0, 1, z + 1), XP, PF_EVERY));
    c = blank();
    c.ex1_op = EX1_FMUL; c.xs = RSW'(3); c.ys = RSW'(NREG); c.rgi = $realtobits(C0);
    c.alu_en = 1; c.alu_dst = 4'd7;
    put(2, 1, c);
    // rows 3..8
    put(3, 0, fma(0)); put(4, 0, fma(1)); put(5, 0, fma(2));
    put(6, 0, fma(4)); put(7, 0, fma(5)); put(8, 0, fma(6));
    // row 9: store and drain
    c = blank();
    c.ex1_op = EX1_NOP; c.xs = RSW'(7); c.st_en = 1; c.base = '0;
    c.drain = 1; c.ddr_addr = 32'(OUT); c.ddr_step = 32'(NX); c.dlen = CW'(NX);
    put(9, 0, c);
    // run
    @(negedge clk);
    n_act = 16'(NY); dist_rows = 7'd1; count = CW'(NX); start = 1;
    @(negedge clk); start = 0;
    fork
      begin
        forever begin
          @(negedge clk);
          if (dut.u_array.exec && dut.u_array.bus[1] != '0) n_bus++;
        end
      end
      wait (done);
    join_any
    disable fork;
    @(negedge clk);
    // results
    for (int k = 0; k < NY; k++) begin
      int y;
      y = 1 + k;
      for (int x = 1; x <= NX; x++) begin
        acc = C0 * A[ia(x, y, z)];
        acc = acc + C1 * A[ia(x, y - 1, z)];
        acc = acc + C1 * A[ia(x, y, z - 1)];
        acc = acc + C1 * A[ia(x - 1, y, z)];
        acc = acc + C1 * A[ia(x + 1, y, z)];
        acc = acc + C1 * A[ia(x, y + 1, z)];
        acc = acc + C1 * A[ia(x, y, z + 1)];
        got = u_ddr.mem[OUT + k * NX + (x - 1)];
        checks++;
        if (got !== $realtobits(acc)) begin
          failures++;
          if (failures < 10)
            $display("FAIL y=%0d x=%0d got %f exp %f", y, x, $bitstoreal(got), acc);
        end
      end
    end
    pf0 = 32'((5 + 3 * (NY - 1)) * XP);
    checks++; if (stat_pf_words != pf0) begin failures++; $display("FAIL pf words %0d exp %0d", stat_pf_words, pf0); end
    checks++; if (stat_pf_skip != 32'(2 * (NY - 1))) begin failures++; $display("FAIL pf skip %0d", stat_pf_skip); end
    checks++; if (stat_dr_words != 32'(NY * NX)) begin failures++; $display("FAIL drain words %0d", stat_dr_words); end
    checks++; if (stat_act != 16'(NY)) begin failures++; $display("FAIL activations %0d", stat_act); end
    checks++; if (stat_exec_cycles != 32'(NY * (PRE + ROWS + NX + 1))) begin failures++; $display("FAIL exec cycles %0d", stat_exec_cycles); end
    checks++; if (n_rot != NY - 1) begin failures++; $display("FAIL shifts %0d", n_rot); end
    // every mechanism must have happened
    checks++; if (stat_pf_words == 0) begin failures++; $display("FAIL no prefetch"); end
    checks++; if (stat_pf_skip == 0) begin failures++; $display("FAIL no LMM reuse"); end
    checks++; if (n_rot == 0) begin failures++; $display("FAIL no dist shift"); end
    checks++; if (n_bus == 0) begin failures++; $display("FAIL row data path unused"); end
    checks++; if (u_ddr.waits == 0) begin failures++; $display("FAIL no DDR3 wait state"); end
    $display("mechanisms: prefetch words=%0d reused streams=%0d shifts=%0d bus cycles=%0d drain words=%0d ddr waits=%0d",
             stat_pf_words, stat_pf_skip, n_rot, n_bus, stat_dr_words, u_ddr.waits);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
