// tb_tfc_fifo: streams random TFC words through the programmable delay for several
// lengths (0, 1, small, large, 255) and checks dout(t) = din(t - len - 1) once the delay has
// filled, and zero before that.
module tb_tfc_fifo;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [7:0] len, din, dout;

  tfc_fifo #(.W(8), .DEPTH(256)) dut (.clk(clk), .rst_n(rst_n), .len(len), .din(din), .dout(dout));

  task automatic check(bit c, string m);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", m); end
  endtask

  initial begin
    #1000000 failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int lens [5] = '{0, 1, 7, 100, 255};
  initial begin
    foreach (lens[i]) begin
      logic [7:0] hist[$];
      len = 8'(lens[i]); din = 0; rst_n = 0;
      @(negedge clk); @(negedge clk); rst_n = 1;
      for (int t = 0; t < 600; t++) begin
        din = 8'($urandom) | 8'h01;
        hist.push_front(din);                 // hist[k] = din of k clocks ago
        @(negedge clk);
        if (t >= lens[i]) check(dout == hist[lens[i]], $sformatf("len %0d t %0d", lens[i], t));
        else              check(dout == 0, $sformatf("len %0d t %0d not filled", lens[i], t));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
