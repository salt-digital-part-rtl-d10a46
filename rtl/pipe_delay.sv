// pipe_delay: fixed delay of N clocks (a shift register of N stages, reset to zero), used
// to keep the TFC command, the BXID, the raw samples and the common-mode values in step
// with the DSP pipeline. N = 0 is a plain wire.
module pipe_delay #(
  parameter int unsigned W = 8,
  parameter int unsigned N = 1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] din,
  output logic [W-1:0] dout
);
  if (N == 0) begin : g_wire
    assign dout = din;
  end else begin : g_sr
    logic [W-1:0] sr [N];
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        for (int i = 0; i < N; i++) sr[i] <= '0;
      end else begin
        sr[0] <= din;
        for (int i = 1; i < N; i++) sr[i] <= sr[i-1];
      end
    end
    assign dout = sr[N-1];
  end
endmodule
