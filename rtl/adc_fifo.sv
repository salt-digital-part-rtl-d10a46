// adc_fifo: three-entry asynchronous FIFO carrying one ADC sample set per clock from the
// ADC clock domain (adc_clk, a DLL-shifted copy of main_clk) into main_clk.
//
// Both clocks have the same frequency and only their phase differs, so the FIFO never
// needs full or empty flags: the write pointer advances on every adc_clk edge and the read
// pointer on every main_clk edge, each running around the three entries. After reset the
// reader starts one entry behind the writer, which leaves one clock period of margin on each
// side of any phase. Pointers are one-hot rings, so no multi-bit value ever crosses a clock
// boundary. The depth of 3 follows the design description; the pointer scheme and the
// start-up distance are this design's choices.
// Interface: din is sampled on adc_clk; dout changes on main_clk. Latency from a write to
// the word being visible at dout is one to two main_clk cycles depending on the phase.
module adc_fifo #(
  parameter int unsigned W = 128 * 6
) (
  input  logic         adc_clk,
  input  logic         adc_rst_n,
  input  logic [W-1:0] din,
  input  logic         main_clk,
  input  logic         main_rst_n,
  output logic [W-1:0] dout
);
  localparam int DEPTH = 3;

  logic [W-1:0]       mem [DEPTH];
  logic [DEPTH-1:0]   wsel;  // one-hot write pointer
  logic [DEPTH-1:0]   rsel;  // one-hot read pointer

  always_ff @(posedge adc_clk or negedge adc_rst_n) begin
    if (!adc_rst_n) wsel <= 3'b001;
    else            wsel <= {wsel[DEPTH-2:0], wsel[DEPTH-1]};
  end

  always_ff @(posedge adc_clk) begin
    for (int i = 0; i < DEPTH; i++)
      if (wsel[i]) mem[i] <= din;
  end

  // Reader starts on the entry the writer fills first and lags it from then on.
  always_ff @(posedge main_clk or negedge main_rst_n) begin
    if (!main_rst_n) rsel <= 3'b001;
    else             rsel <= {rsel[DEPTH-2:0], rsel[DEPTH-1]};
  end

  always_ff @(posedge main_clk or negedge main_rst_n) begin
    if (!main_rst_n) dout <= '0;
    else begin
      dout <= '0;
      for (int i = 0; i < DEPTH; i++)
        if (rsel[i]) dout <= mem[i];
    end
  end
endmodule
