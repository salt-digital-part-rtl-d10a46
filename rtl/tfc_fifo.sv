// tfc_fifo: programmable-latency delay line for TFC commands (the TFC FIFO), also used,
// one bit wide, as the independent delay of the calibration command.
//
// A circular buffer of DEPTH entries is written every clock; the output reads the entry
// written len clocks earlier and is registered, so dout(t+1) = din(t - len): the latency is
// len + 1 clocks, for len = 0 .. DEPTH-1. Until len entries have been written since reset
// the output is zero, so no stale command leaves the delay. The TFC FIFO with an 8-bit
// length register follows the design description; the circular-buffer implementation is
// this design's choice.
module tfc_fifo #(
  parameter int unsigned W     = 8,
  parameter int unsigned DEPTH = 256,
  parameter int unsigned LW    = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [LW-1:0] len,
  input  logic [W-1:0]  din,
  output logic [W-1:0]  dout
);
  logic [W-1:0]  mem [DEPTH];
  logic [LW-1:0] wp;
  logic [LW:0]   filled;

  always_ff @(posedge clk) mem[wp] <= din;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp     <= '0;
      filled <= '0;
      dout   <= '0;
    end else begin
      wp <= wp + 1'b1;
      if (filled != (LW+1)'(DEPTH)) filled <= filled + 1'b1;
      if (len == '0)                    dout <= din;
      else if (filled >= (LW+1)'(len))  dout <= mem[wp - len];
      else                              dout <= '0;
    end
  end
endmodule
