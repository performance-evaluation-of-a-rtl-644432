// emax_lmm_fifo: the LMM_FIFO of an EMAX processing element.
//
// It keeps the most recent DEPTH words read from an LMM of the same row
// (the PE's own, or another one through the row's common data path), so that
// loads of X-neighbours, A[x-1], A[x], A[x+1], ..., are served from one LMM
// stream without further LMM reads. Tap 0 is the word arriving now (`din`),
// tap k the word that arrived k shifts earlier. With `shift` high the window
// moves by one word at the clock edge. The load of a PE whose element lies
// k words behind the head of the stream reads tap k.
module emax_lmm_fifo #(
  parameter int unsigned DEPTH = 8,
  parameter int unsigned DW    = 64,
  localparam int unsigned TW   = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          shift,
  input  logic [DW-1:0] din,
  input  logic [TW-1:0] tap,
  output logic [DW-1:0] dout
);
  logic [DW-1:0] q [DEPTH-1];

  always_ff @(posedge clk) begin
    if (shift) begin
      q[0] <= din;
      for (int i = 1; i < DEPTH - 1; i++) q[i] <= q[i-1];
    end
  end

  always_comb begin
    if (tap == '0) dout = din;
    else           dout = q[tap - 1'b1];
  end
endmodule
