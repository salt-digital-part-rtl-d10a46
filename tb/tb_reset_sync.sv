// tb_reset_sync: checks that reset_sync asserts its output at once when rst_n falls, in the
// middle of a clock period, and releases it only on the second rising clock edge after
// rst_n rises.
module tb_reset_sync;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, rs;
  always #5 clk = ~clk;

  reset_sync dut (.clk(clk), .rst_n(rst_n), .rst_sync_n(rs));

  task automatic check(bit c, string m);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", m); end
  endtask

  initial begin
    #1000 failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    #2 check(rs == 0, "held in reset");
    rst_n = 1;                        // released between edges
    @(posedge clk); #1 check(rs == 0, "still low after first edge");
    @(posedge clk); #1 check(rs == 1, "high after second edge");
    repeat (3) @(posedge clk);
    #2 rst_n = 0;                     // asynchronous assertion
    #0.5 check(rs == 0, "asserted without a clock edge");
    #1 rst_n = 1;
    @(posedge clk); #1 check(rs == 0, "low one edge after release");
    @(posedge clk); #1 check(rs == 1, "released on second edge");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
