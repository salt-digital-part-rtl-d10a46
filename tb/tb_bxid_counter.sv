// tb_bxid_counter: checks that the BXID counts one per clock, wraps from 4095 to 0, restarts
// from 0 after BXReset, and keeps counting correctly when one of its three copies is upset.
module tb_bxid_counter;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, bxreset = 0, seu;
  logic [11:0] bxid;
  always #5 clk = ~clk;

  bxid_counter dut (.clk(clk), .rst_n(rst_n), .bxreset(bxreset), .bxid(bxid), .seu(seu));

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
    int exp_v, n_wrap;
    n_wrap = 0;
    @(negedge clk); rst_n = 1;
    exp_v = 0;
    for (int t = 0; t < 6000; t++) begin
      check(int'(bxid) == exp_v, $sformatf("t=%0d bxid %0d/%0d", t, bxid, exp_v));
      bxreset = (t == 1234 || t == 5800);
      if (t % 777 == 500) begin
        force dut.u_tmr.copy1 = 12'hA5A;
        #1 release dut.u_tmr.copy1;
        #1 check(seu && int'(bxid) == exp_v, "upset hidden and flagged");
      end
      @(negedge clk);
      if (bxreset) exp_v = 0;
      else begin
        if (exp_v == 4095) n_wrap++;
        exp_v = (exp_v + 1) % 4096;
      end
    end
    check(n_wrap > 0, "counter wrapped");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
