// reset_sync: asynchronous reset assertion with synchronous removal.
//
// Two flip-flops clocked by clk, both cleared asynchronously by rst_n, with a constant 1 at
// the first D input. rst_n may fall at any time and clears rst_sync_n at once; after rst_n
// rises, rst_sync_n follows on the second rising clock edge, so the relation between the
// clock and rst_n may be undefined. Every other flip-flop of the clock domain is reset
// asynchronously by rst_sync_n. This is the circuit of the design description; one instance
// is used per clock domain.
module reset_sync (
  input  logic clk,
  input  logic rst_n,
  output logic rst_sync_n
);
  logic stage1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      stage1     <= 1'b0;
      rst_sync_n <= 1'b0;
    end else begin
      stage1     <= 1'b1;
      rst_sync_n <= stage1;
    end
  end
endmodule
