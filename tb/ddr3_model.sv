// ddr3_model: behavioural stand-in for the accelerator's DDR3 SDRAM, as a
// word-addressed memory behind the controller's request/grant port.
// A request is granted in a random cycle (about three in four cycles), so
// the controller sees wait states; read data follows a grant by LAT cycles
// with `rvalid`. Words are 64 bits; addresses index words modulo WORDS.
// `waits` counts cycles in which a request was held without a grant.
// Not synthesizable: it stands for a bought-in DRAM.
module ddr3_model #(
  parameter int unsigned WORDS = 65536,
  parameter int unsigned LAT   = 2
) (
  input  logic        clk,
  input  logic        req,
  input  logic        we,
  input  logic [31:0] addr,
  input  logic [63:0] wdata,
  output logic        gnt,
  output logic        rvalid,
  output logic [63:0] rdata
);
  logic [63:0] mem [WORDS];
  logic [LAT-1:0]    vpipe = '0;
  logic [63:0]       dpipe [LAT];
  int unsigned waits = 0;

  always_ff @(posedge clk) gnt <= ($urandom_range(0, 3) != 0);

  always_ff @(posedge clk) begin
    vpipe <= {vpipe[LAT-2:0], req && gnt && !we};
    dpipe[0] <= mem[addr % WORDS];
    for (int i = 1; i < LAT; i++) dpipe[i] <= dpipe[i-1];
    if (req && gnt && we) mem[addr % WORDS] <= wdata;
    if (req && !gnt) waits <= waits + 1;
  end

  assign rvalid = vpipe[LAT-1];
  assign rdata  = dpipe[LAT-1];
endmodule
