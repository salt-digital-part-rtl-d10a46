// ram_inst: one small RAM instance of the event memory, one row of RAM_W 12-bit words wide.
//
// Simple dual-port memory written as an array: one write port and one registered read
// port on the same clock. rdata shows the row addressed by raddr one clock after re.
// The memory is not reset; the memory controller never reads a row it has not written.
module ram_inst #(
  parameter int unsigned DW    = 48,
  parameter int unsigned DEPTH = 16,
  parameter int unsigned AW    = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [DW-1:0] wdata,
  input  logic          re,
  input  logic [AW-1:0] raddr,
  output logic [DW-1:0] rdata
);
  logic [DW-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    if (re) rdata <= mem[raddr];
  end
endmodule
