// deserializer: receives the TFC command stream, one DDR bit stream at data_clk, and cuts
// it into one 8-bit TFC word per main_clk cycle.
//
// Two phase-sync blocks sample the line, one on each edge of data_clk; the falling-edge
// sample is taken over by the next rising edge, so every data_clk cycle adds two bits (the
// rising-edge bit, then the falling-edge bit that followed it) to a 16-bit history. Four data_clk cycles carry one byte; the first bit of a
// byte can sit at any of the eight positions of the history, chosen by deser_cfg[2:0]
// (0 = the two newest bits end the byte). The byte is taken in the data_clk cycle that
// follows each main_clk edge and held for a whole main_clk cycle, and is registered into
// main_clk as tfc_cmd_deser. Two edge samplers and the choice of the first bit position in
// deser_cfg follow the design description; the history window, the framing on main_clk and
// the bit order (first bit received = bit 7) are this design's choices.
module deserializer (
  input  logic       data_clk,
  input  logic       data_rst_n,
  input  logic       ddr_in,
  input  logic [2:0] first_bit,
  input  logic       main_clk,
  input  logic       main_rst_n,
  output logic [7:0] tfc_cmd_deser
);
  logic        ph0, ph1;  // phase sync 0 (rising edge), phase sync 1 (falling edge)
  logic [15:0] hist;
  logic [7:0]  hold;
  logic        tog, tog_d;

  always_ff @(posedge data_clk or negedge data_rst_n)
    if (!data_rst_n) ph0 <= 1'b0; else ph0 <= ddr_in;

  always_ff @(negedge data_clk or negedge data_rst_n)
    if (!data_rst_n) ph1 <= 1'b0; else ph1 <= ddr_in;

  always_ff @(posedge main_clk or negedge main_rst_n)
    if (!main_rst_n) tog <= 1'b0; else tog <= ~tog;

  always_ff @(posedge data_clk or negedge data_rst_n) begin
    if (!data_rst_n) begin
      hist  <= '0;
      hold  <= '0;
      tog_d <= 1'b0;
    end else begin
      hist  <= {hist[13:0], ph0, ph1};
      tog_d <= tog;
      if (tog != tog_d) hold <= hist[7 + int'(first_bit) -: 8];
    end
  end

  always_ff @(posedge main_clk or negedge main_rst_n)
    if (!main_rst_n) tfc_cmd_deser <= '0; else tfc_cmd_deser <= hold;
endmodule
