// test_pulse: calibration test pulse generator, digital part.
//
// The calibration command, already delayed by its own programmable delay (calib_tfc,
// main_clk domain), is moved into the calib_clk domain by two flip-flops; calib_clk is a
// DLL phase of main_clk, so the phase of the pulse can be tuned. A rising edge of the
// synchronised command starts a pulse that stays high for cal_len calib_clk cycles
// (1..31; 0 is taken as 1). cal_inv inverts the pulse. For each channel a multiplexer
// selects the pulse when cal_ena[i] is set and the idle level (cal_inv) otherwise, and a
// flip-flop drives cal_strobe[i], so the channel mask of the test pulse is independent of
// the DSP masking. Latency from calib_tfc to cal_strobe is four calib_clk edges.
// The two synchroniser flip-flops, the 1..31-clock length, the inversion, the per-channel
// multiplexer with cal_ena and the output flip-flops follow the design description; the
// edge-triggered start and the treatment of cal_len = 0 are this design's choices.
module test_pulse
  import salt_pkg::*;
(
  input  logic           calib_clk,
  input  logic           calib_rst_n,
  input  logic           calib_tfc,
  input  logic [4:0]     cal_len,
  input  logic           cal_inv,
  input  logic [NCH-1:0] cal_ena,
  output logic [NCH-1:0] cal_strobe
);
  logic       s1, s2, s2_d;
  logic [4:0] left;
  logic       pulse;
  logic       cal_pulse;

  always_ff @(posedge calib_clk or negedge calib_rst_n) begin
    if (!calib_rst_n) begin
      s1   <= 1'b0;
      s2   <= 1'b0;
      s2_d <= 1'b0;
      left <= '0;
    end else begin
      s1   <= calib_tfc;
      s2   <= s1;
      s2_d <= s2;
      if (s2 && !s2_d)   left <= (cal_len == 0) ? 5'd1 : cal_len;
      else if (left != 0) left <= left - 5'd1;
    end
  end

  assign pulse     = (left != 0);
  assign cal_pulse = pulse ^ cal_inv;

  always_ff @(posedge calib_clk or negedge calib_rst_n) begin
    if (!calib_rst_n) cal_strobe <= '0;
    else
      for (int i = 0; i < NCH; i++)
        cal_strobe[i] <= cal_ena[i] ? cal_pulse : cal_inv;
  end
endmodule
