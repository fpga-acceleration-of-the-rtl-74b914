// frame_mem: frame memory with one write port and NRD read ports.
//
// Writes take effect at the clock edge when we is high.  Each read port
// returns the word at its address one clock after the address is presented
// (registered read, as in FPGA block RAM).  It holds the image pyramid, the
// per-level velocities and the records that the partial-iterative mode keeps
// between passes.  The original work names only "ram" and on-chip memory; the
// port arrangement is this design's choice.
module frame_mem #(
  parameter int unsigned DW    = 8,
  parameter int unsigned DEPTH = 1024,
  parameter int unsigned NRD   = 1,
  localparam int unsigned AW   = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [DW-1:0] wdata,
  input  logic [AW-1:0] raddr [NRD],
  output logic [DW-1:0] rdata [NRD]
);

  logic [DW-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    for (int i = 0; i < NRD; i++) rdata[i] <= mem[raddr[i]];
  end

endmodule
