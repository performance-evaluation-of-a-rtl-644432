// emax_lmm: the local memory (LMM) of an EMAX processing element.
//
// A single-port synchronous RAM of WORDS words of DW bits, 8 KB at the
// default size (1024 x 64 bit). One access per cycle: with `en` high a write
// (`we`) stores `wdata` at `addr`, otherwise the word at `addr` appears on
// `rdata` in the next cycle. `rdata` holds its value while no read is made.
// The PE shares this single port between its own loads and stores during
// execution and the DMA between executions.
module emax_lmm #(
  parameter int unsigned WORDS = 1024,
  parameter int unsigned DW    = 64,
  localparam int unsigned AW   = $clog2(WORDS)
) (
  input  logic          clk,
  input  logic          en,
  input  logic          we,
  input  logic [AW-1:0] addr,
  input  logic [DW-1:0] wdata,
  output logic [DW-1:0] rdata
);
  logic [DW-1:0] mem [WORDS];

  always_ff @(posedge clk) begin
    if (en) begin
      if (we) mem[addr] <= wdata;
      else    rdata     <= mem[addr];
    end
  end
endmodule
