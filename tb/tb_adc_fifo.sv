// tb_adc_fifo: writes a numbered sample every adc_clk cycle with adc_clk shifted against
// main_clk by several phases, and checks that every sample comes out once, in order, with a
// constant latency.
module tb_adc_fifo;
  int checks = 0, failures = 0;
  logic main_clk = 0, adc_clk = 0, rst_n = 0;
  logic [15:0] din = 0, dout;
  real phase;

  adc_fifo #(.W(16)) dut (
    .adc_clk(adc_clk), .adc_rst_n(rst_n), .din(din),
    .main_clk(main_clk), .main_rst_n(rst_n), .dout(dout));

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
    foreach (phase_list[p]) begin
      phase = phase_list[p];
      rst_n = 0; din = 0;
      #50;
      fork
        begin : clkgen
          forever begin
            #(phase) adc_clk = 1; #(25.0 - phase) main_clk = 1;
            #(phase) adc_clk = 0; #(25.0 - phase) main_clk = 0;
          end
        end
        begin
          logic [15:0] last;
          int seen;
          #(1.0) rst_n = 1;
          seen = 0;
          last = 0;
          repeat (60) begin
            @(posedge adc_clk); din <= din + 1;
          end
          disable clkgen;
        end
        begin
          logic [15:0] prev;
          @(posedge rst_n);
          repeat (6) @(posedge main_clk);
          #1 prev = dout;
          repeat (40) begin
            @(posedge main_clk); #1;
            check(dout == prev + 1, $sformatf("phase %0.1f: %0d after %0d", phase, dout, prev));
            prev = dout;
          end
        end
      join
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  real phase_list [4] = '{3.0, 10.0, 17.0, 23.0};
endmodule
