// tb_emax_lmm_fifo: self-checking test of the LMM_FIFO window: a counting
// stream is shifted in, sometimes with pauses, and every tap must show the
// word that arrived that many shifts ago (tap 0 is the word arriving now).
module tb_emax_lmm_fifo;
  localparam int DEPTH = 8;
  logic clk = 0, shift = 0;
  logic [63:0] din, dout;
  logic [2:0]  tap;
  logic [63:0] hist [$];
  int checks = 0, failures = 0;

  emax_lmm_fifo #(.DEPTH(DEPTH), .DW(64)) dut (.clk, .shift, .din, .tap, .dout);

  always #20 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 1000; n++) begin
      @(negedge clk);
      din = {$urandom, $urandom};
      for (int t = 0; t < DEPTH; t++) begin
        tap = 3'(t);
        #1;
        if (t == 0) begin
          checks++;
          if (dout !== din) begin failures++; $display("FAIL tap0"); end
        end else if (hist.size() >= t) begin
          checks++;
          if (dout !== hist[t-1]) begin
            failures++;
            $display("FAIL tap %0d got %h exp %h", t, dout, hist[t-1]);
          end
        end
      end
      shift = ($urandom_range(0, 4) != 0);
      if (shift) hist.push_front(din);
      if (hist.size() > DEPTH) void'(hist.pop_back());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
