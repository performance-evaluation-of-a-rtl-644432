// tb_emax_lmm: self-checking test of the single-port local memory at its
// full 8 KB size: random writes and reads against a shadow array, read data
// one cycle after the address, and read data held while the port is idle.
module tb_emax_lmm;
  logic clk = 0, en = 0, we = 0;
  logic [9:0]  addr;
  logic [63:0] wdata, rdata, last;
  logic [63:0] shadow [1024];
  int checks = 0, failures = 0;

  emax_lmm #(.WORDS(1024), .DW(64)) dut (.clk, .en, .we, .addr, .wdata, .rdata);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // fill every word
    for (int a = 0; a < 1024; a++) begin
      @(negedge clk);
      en = 1; we = 1; addr = 10'(a); wdata = {$urandom, $urandom};
      shadow[a] = wdata;
    end
    for (int n = 0; n < 5000; n++) begin
      @(negedge clk);
      en = 1; addr = 10'($urandom); we = ($urandom_range(0, 2) == 0);
      wdata = {$urandom, $urandom};
      if (we) shadow[addr] = wdata;
      else begin
        last = shadow[addr];
        @(negedge clk);
        en = ($urandom_range(0, 1) == 1); we = 0; addr = 10'($urandom);
        checks++;
        if (rdata !== last) begin
          failures++;
          $display("FAIL read got %h exp %h", rdata, last);
        end
        if (!en) begin
          @(negedge clk);
          checks++;
          if (rdata !== last) begin
            failures++;
            $display("FAIL hold got %h exp %h", rdata, last);
          end
        end else begin
          last = shadow[addr];
          @(negedge clk);
          en = 0;
          checks++;
          if (rdata !== last) begin
            failures++;
            $display("FAIL back-to-back got %h exp %h", rdata, last);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
