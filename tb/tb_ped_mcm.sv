// tb_ped_mcm: streams random sample sets (one per clock) through ped_mcm and compares every
// output, three clocks later, with a reference computed here: pedestal subtraction, mean
// over the unmasked channels with |value| <= threshold (integer division truncating
// towards zero), subtraction and clamping to 0..31.
module tb_ped_mcm;
  import salt_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [NCH-1:0][ADC_W-1:0] adc, ped;
  logic [NCH-1:0]            mask;
  logic [ADC_W-1:0]          thr;
  logic [NCH-1:0][ZS_W-1:0]  dout;
  logic signed [ADC_W:0]     mcm_value;
  logic [7:0]                mcm_channels;

  ped_mcm dut (.clk(clk), .rst_n(rst_n), .adc(adc), .pedestal(ped), .ch_mask(mask),
               .mcm_thr(thr), .dout(dout), .mcm_value(mcm_value), .mcm_channels(mcm_channels));

  typedef struct {
    logic [NCH-1:0][ZS_W-1:0] v;
    int mean;
    int cnt;
  } exp_t;
  exp_t q[$];

  function automatic exp_t model();
    exp_t e;
    int d[NCH];
    int sum = 0;
    e.cnt = 0;
    for (int i = 0; i < NCH; i++) begin
      d[i] = int'(adc[i]) - int'(ped[i]);
      if (!mask[i] && (d[i] < 0 ? -d[i] : d[i]) <= int'(thr)) begin
        sum += d[i];
        e.cnt++;
      end
    end
    e.mean = (e.cnt == 0) ? 0 : sum / e.cnt;
    for (int i = 0; i < NCH; i++) begin
      int v = d[i] - e.mean;
      e.v[i] = ZS_W'((v < 0) ? 0 : (v > 31) ? 31 : v);
    end
    return e;
  endfunction

  task automatic check(bit c, string m);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", m); end
  endtask

  initial begin
    #100000 failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int common;
    adc = '0; ped = '0; mask = '0; thr = 6'd8;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < NCH; i++) ped[i] = 6'(10 + $urandom_range(0, 20));
    for (int t = 0; t < 200; t++) begin
      @(negedge clk);
      if (q.size() == 3) begin
        exp_t e;
        e = q.pop_front();
        check(dout == e.v, $sformatf("t=%0d values", t));
        check(int'(mcm_value) == e.mean, $sformatf("t=%0d mean %0d/%0d", t, mcm_value, e.mean));
        check(int'(mcm_channels) == e.cnt, $sformatf("t=%0d count %0d/%0d", t, mcm_channels, e.cnt));
      end
      common = $urandom_range(0, 12) - 6;
      for (int i = 0; i < NCH; i++) begin
        int a;
        a = int'(ped[i]) + common + $urandom_range(0, 4) - 2;
        if ($urandom_range(0, 15) == 0) a += $urandom_range(5, 30);   // a signal
        adc[i] = ADC_W'((a < 0) ? 0 : (a > 63) ? 63 : a);
      end
      mask = (t % 4 == 0) ? {NCH{1'b0}} : {$urandom, $urandom, $urandom, $urandom};
      if (t % 50 == 49) mask = '1;                 // no quiet channel: mean 0
      thr = (t % 3 == 0) ? 6'd63 : 6'd6;
      q.push_back(model());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
