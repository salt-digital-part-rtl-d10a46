// serializer: sends each e-link's byte of a frame as four pairs of bits at data_clk.
//
// data_clk is four times main_clk and phase-locked to it. A toggle flag flips on every
// main_clk edge; data_clk sees the flip one data_clk cycle later and loads the frame, which
// main_clk holds stable for the whole main_clk cycle, into a shift register per e-link.
// The shift register then gives two bits per data_clk cycle, most significant first:
// dout_rise is meant for the rising-edge half of the DDR output and dout_fall for the
// falling-edge half, so each e-link carries 8 bits per main_clk cycle at 2x data_clk.
// The DDR driver that merges the two halves onto the pad is a custom cell and not part of
// this module. The 4x clock and the e-link count follow the design description; the load
// scheme and bit order are this design's choices.
module serializer
  import salt_pkg::*;
(
  input  logic                    main_clk,
  input  logic                    main_rst_n,
  input  logic [N_ELINK-1:0][7:0] frame,
  input  logic                    data_clk,
  input  logic                    data_rst_n,
  output logic [N_ELINK-1:0]      dout_rise,
  output logic [N_ELINK-1:0]      dout_fall,
  output logic                    load      // high in the data_clk cycle a new frame starts
);
  logic                    tog;
  logic                    tog_d;
  logic [N_ELINK-1:0][7:0] sh;

  always_ff @(posedge main_clk or negedge main_rst_n) begin
    if (!main_rst_n) tog <= 1'b0;
    else             tog <= ~tog;
  end

  assign load = (tog != tog_d);

  always_ff @(posedge data_clk or negedge data_rst_n) begin
    if (!data_rst_n) begin
      tog_d     <= 1'b0;
      sh        <= '0;
      dout_rise <= '0;
      dout_fall <= '0;
    end else begin
      tog_d <= tog;
      for (int e = 0; e < N_ELINK; e++) begin
        logic [7:0] cur;
        cur          = load ? frame[e] : sh[e];
        dout_rise[e] <= cur[7];
        dout_fall[e] <= cur[6];
        sh[e]        <= {cur[5:0], 2'b00};
      end
    end
  end
endmodule
