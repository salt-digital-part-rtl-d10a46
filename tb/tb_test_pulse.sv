// tb_test_pulse: sends calibration commands with different pulse lengths, polarities and
// channel enables, and checks that every enabled strobe carries a pulse of exactly cal_len
// calib_clk cycles (1 for cal_len = 0) of the chosen polarity, starting a fixed number of
// cycles after the command, and that disabled strobes stay at the idle level.
module tb_test_pulse;
  import salt_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, calib_tfc = 0, cal_inv = 0;
  logic [4:0] cal_len;
  logic [NCH-1:0] cal_ena, cal_strobe;
  always #5 clk = ~clk;

  test_pulse dut (.calib_clk(clk), .calib_rst_n(rst_n), .calib_tfc(calib_tfc),
                  .cal_len(cal_len), .cal_inv(cal_inv), .cal_ena(cal_ena),
                  .cal_strobe(cal_strobe));

  task automatic check(bit c, string m);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", m); end
  endtask

  initial begin
    #1000000 failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    cal_len = 5'd3; cal_ena = '0;
    @(negedge clk); rst_n = 1;
    for (int r = 0; r < 40; r++) begin
      int first, width, exp_w;
      cal_len = 5'(r % 32);
      cal_inv = r[0];
      cal_ena = {$urandom, $urandom, $urandom, $urandom};
      exp_w   = (cal_len == 0) ? 1 : int'(cal_len);
      repeat (3) @(negedge clk);
      calib_tfc = 1;
      @(negedge clk);
      calib_tfc = 0;
      first = -1; width = 0;
      for (int t = 1; t < 40; t++) begin
        logic [NCH-1:0] act;
        act = cal_inv ? ~cal_strobe : cal_strobe;
        check((act & ~cal_ena) == '0, "disabled channels idle");
        if (act != '0) begin
          check(act == cal_ena, "all enabled channels pulse together");
          if (first < 0) first = t;
          width++;
        end
        @(negedge clk);
      end
      check(first == 4, $sformatf("pulse start %0d", first));
      check(width == exp_w, $sformatf("len %0d width %0d", cal_len, width));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
