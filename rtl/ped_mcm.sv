// ped_mcm: pedestal subtraction and mean common mode (MCM) subtraction for all channels of
// one bunch crossing.
//
// Stage 1 subtracts a per-channel pedestal from every 6-bit ADC sample, giving a signed
// 7-bit value. Stage 2 adds up the values of the unmasked channels whose magnitude is at
// most mcm_thr (the channels that see no signal) and counts them. Stage 3 divides the sum
// by the count to get the common-mode mean (zero when no channel qualifies), subtracts it
// from every channel and clamps the result into the 5-bit unsigned range the zero
// suppression takes. The mean and the channel count are output for NZS packets.
// The design description names this block only (pedestal and MCM) and fixes its 5-bit
// unsigned output; the threshold rule, the clamping and the three-stage pipeline are this
// design's choices. A new sample set is accepted every clock; latency is L_MCM = 3.
module ped_mcm
  import salt_pkg::*;
(
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic [NCH-1:0][ADC_W-1:0] adc,
  input  logic [NCH-1:0][ADC_W-1:0] pedestal,
  input  logic [NCH-1:0]            ch_mask,
  input  logic [ADC_W-1:0]          mcm_thr,
  output logic [NCH-1:0][ZS_W-1:0]  dout,
  output logic signed [ADC_W:0]     mcm_value,
  output logic [7:0]                mcm_channels
);
  typedef logic signed [ADC_W:0] sval_t;

  sval_t                  s1 [NCH];
  logic [NCH-1:0]         mask1;   // configuration taken along with its sample set
  logic [ADC_W-1:0]       thr1;
  sval_t                  s2 [NCH];
  logic signed [MCM_SUM_W-1:0] sum2;
  logic [7:0]             cnt2;

  // Stage 1: pedestal subtraction
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NCH; i++) s1[i] <= '0;
      mask1 <= '0;
      thr1  <= '0;
    end else begin
      for (int i = 0; i < NCH; i++)
        s1[i] <= $signed({1'b0, adc[i]}) - $signed({1'b0, pedestal[i]});
      mask1 <= ch_mask;
      thr1  <= mcm_thr;
    end
  end

  // Stage 2: sum and count of the quiet channels
  logic signed [MCM_SUM_W-1:0] sum_c;
  logic [7:0]                  cnt_c;
  always_comb begin
    sum_c = '0;
    cnt_c = '0;
    for (int i = 0; i < NCH; i++) begin
      logic [ADC_W:0] mag;
      mag = s1[i][ADC_W] ? -s1[i] : s1[i];
      if (!mask1[i] && mag <= {1'b0, thr1}) begin
        sum_c = sum_c + MCM_SUM_W'(s1[i]);
        cnt_c = cnt_c + 8'd1;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NCH; i++) s2[i] <= '0;
      sum2 <= '0;
      cnt2 <= '0;
    end else begin
      for (int i = 0; i < NCH; i++) s2[i] <= s1[i];
      sum2 <= sum_c;
      cnt2 <= cnt_c;
    end
  end

  // Stage 3: mean, subtraction and clamping to 0..31
  logic signed [MCM_SUM_W-1:0] mean_c;
  always_comb begin
    if (cnt2 == 0) mean_c = '0;
    else           mean_c = sum2 / $signed({{(MCM_SUM_W-8){1'b0}}, cnt2});
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dout         <= '0;
      mcm_value    <= '0;
      mcm_channels <= '0;
    end else begin
      for (int i = 0; i < NCH; i++) begin
        logic signed [ADC_W+1:0] v;
        v = $signed({s2[i][ADC_W], s2[i]}) - $signed(mean_c[ADC_W+1:0]);
        if (v < 0)                      dout[i] <= '0;
        else if (v > (2**ZS_W) - 1)     dout[i] <= '1;
        else                            dout[i] <= v[ZS_W-1:0];
      end
      mcm_value    <= mean_c[ADC_W:0];
      mcm_channels <= cnt2;
    end
  end
endmodule
