// tb_serializer: presents a new random frame every main_clk cycle and rebuilds each
// e-link's bytes from the rise/fall bit pairs at data_clk (4 x main_clk), checking every
// byte of every frame, in order, with a fixed latency.
module tb_serializer;
  import salt_pkg::*;
  int checks = 0, failures = 0;
  logic main_clk = 0, data_clk = 0, rst_n = 0;
  always #1.5625 data_clk = ~data_clk;
  always #6.25   main_clk = ~main_clk;

  logic [N_ELINK-1:0][7:0] frame;
  logic [N_ELINK-1:0]      dout_rise, dout_fall;
  logic                    load;

  serializer dut (.main_clk(main_clk), .main_rst_n(rst_n), .frame(frame),
                  .data_clk(data_clk), .data_rst_n(rst_n), .dout_rise(dout_rise),
                  .dout_fall(dout_fall), .load(load));

  logic [N_ELINK-1:0][7:0] sent[$];

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
    frame = '0;
    #20 rst_n = 1;
    repeat (200) begin
      @(posedge main_clk);
      frame <= {$urandom, $urandom};
      #0.1 sent.push_back(frame);
    end
  end

  // receiver: load is high in the data_clk cycle before a frame's first bit pair
  logic [N_ELINK-1:0][7:0] got_q[$];
  initial begin
    logic [N_ELINK-1:0][7:0] got;
    int off;
    @(posedge rst_n);
    while (got_q.size() < 150) begin
      @(negedge data_clk);
      if (load) begin
        for (int k = 0; k < 4; k++) begin
          @(posedge data_clk); #0.1;
          for (int e = 0; e < N_ELINK; e++) begin
            got[e][7 - 2*k] = dout_rise[e];
            got[e][6 - 2*k] = dout_fall[e];
          end
        end
        got_q.push_back(got);
      end
    end
    // fixed latency: frame k of the source is received frame k + off
    off = -1;
    for (int o = 0; o < 4; o++) if (got_q[o] == sent[0] && got_q[o+1] == sent[1]) off = o;
    check(off >= 0, "first frame found");
    if (off >= 0)
      for (int k = 0; k + off < got_q.size(); k++)
        check(got_q[k + off] == sent[k], $sformatf("frame %0d %h/%h", k, got_q[k + off], sent[k]));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
