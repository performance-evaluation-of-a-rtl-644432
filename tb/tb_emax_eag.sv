// tb_emax_eag: self-checking test of the effective address generator:
// after a clear the address is the base, every step adds the stride (wrapping
// in the address width), steps without `step` hold it, and `busy` falls after
// `count` accesses.
module tb_emax_eag;
  import emax_pkg::*;

  logic clk = 0, rst_n = 0, clear = 0, step = 0, busy;
  logic [LAW-1:0] base, stride, addr, exp_addr;
  logic [CW-1:0]  count;
  int checks = 0, failures = 0, done_steps;

  emax_eag dut (.clk, .rst_n, .clear, .step, .base, .stride, .count, .addr, .busy);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s addr=%0d exp=%0d busy=%0b", what, addr, exp_addr, busy);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 20; t++) begin
      base   = LAW'($urandom);
      stride = (t % 2) ? LAW'($urandom_range(1, 8)) : LAW'(1);
      count  = CW'($urandom_range(1, 40));
      @(negedge clk); clear = 1;
      @(negedge clk); clear = 0;
      exp_addr = base; done_steps = 0;
      chk(addr == exp_addr, "after clear");
      chk(busy == 1'b1, "busy after clear");
      while (done_steps < int'(count) + 3) begin
        step = ($urandom_range(0, 3) != 0);
        @(negedge clk);
        if (step) begin
          exp_addr = exp_addr + stride;
          done_steps++;
        end
        chk(addr == exp_addr, "address");
        chk(busy == (done_steps < int'(count)), "busy");
      end
      step = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
