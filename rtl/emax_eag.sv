// emax_eag: effective address generator of an EMAX processing element.
//
// A load or store instruction walks a stream along the X axis: it starts at
// a base word address (the RGI of the memory operation) and moves by a fixed
// stride after each access, `count` times. `clear` loads the base and zeroes
// the access counter; `step` advances the address by `stride` and counts one
// access. `addr` is the address of the current access, `busy` is high while
// fewer than `count` accesses have been made. Addresses wrap inside the LMM.
// One cycle per step; registers reset to zero.
module emax_eag
  import emax_pkg::*;
#(
  parameter int unsigned AW = LAW
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          clear,
  input  logic          step,
  input  logic [AW-1:0] base,
  input  logic [AW-1:0] stride,
  input  logic [CW-1:0] count,
  output logic [AW-1:0] addr,
  output logic          busy
);
  logic [CW-1:0] done_cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      addr     <= '0;
      done_cnt <= '0;
    end else if (clear) begin
      addr     <= base;
      done_cnt <= '0;
    end else if (step) begin
      addr     <= addr + stride;
      done_cnt <= done_cnt + 1'b1;
    end
  end

  assign busy = (done_cnt < count);
endmodule
