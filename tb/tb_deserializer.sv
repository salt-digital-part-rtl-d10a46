// tb_deserializer: sends random TFC bytes as a DDR bit stream (two bits per data_clk cycle,
// most significant first) starting at each of the eight possible bit offsets against
// main_clk. For every offset it tries all eight first-bit settings and checks that exactly
// one of them recovers the byte sequence (at a fixed latency), and that the eight offsets
// need eight different settings, which is the "choice of first bit position" step of the
// link start-up.
module tb_deserializer;
  int checks = 0, failures = 0;
  logic main_clk = 0, data_clk = 0, rst_n = 0, ddr_in = 0;
  logic [2:0] first_bit;
  logic [7:0] tfc;
  int ph = 0;

  initial forever begin
    data_clk = 1;
    if (ph == 0) main_clk = 1;
    if (ph == 2) main_clk = 0;
    #1.5625 data_clk = 0;
    #1.5625 ph = (ph + 1) % 4;
  end

  deserializer dut (.data_clk(data_clk), .data_rst_n(rst_n), .ddr_in(ddr_in),
                    .first_bit(first_bit), .main_clk(main_clk), .main_rst_n(rst_n),
                    .tfc_cmd_deser(tfc));

  task automatic check(bit c, string m);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", m); end
  endtask

  initial begin
    #1000000 failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [7:0] bytes [64];
  logic [7:0] got   [64];

  // one run: reset, stream the bytes with the given bit offset, collect 64 outputs
  task automatic run(input int offset, input int fb);
    rst_n = 0; ddr_in = 0; first_bit = 3'(fb);
    @(posedge main_clk); @(posedge main_clk);
    #0.5 rst_n = 1;
    fork
      begin
        @(posedge main_clk);
        #(0.78 + 1.5625 * offset);   // bit n is centred on the n-th clock edge after this
        for (int k = 0; k < 64; k++)
          for (int b = 7; b >= 0; b--) begin
            ddr_in = bytes[k][b];
            #1.5625;
          end
      end
      begin
        for (int k = 0; k < 64; k++) begin
          @(posedge main_clk); #0.1;
          got[k] = tfc;
        end
      end
    join
  endtask

  function automatic bit seq_found();
    for (int lat = 0; lat < 6; lat++) begin
      bit ok = 1;
      for (int k = 2; k < 50; k++) if (got[k + lat] != bytes[k]) ok = 0;
      if (ok) return 1;
    end
    return 0;
  endfunction

  initial begin
    int used [8];
    foreach (bytes[k]) bytes[k] = 8'($urandom);
    foreach (used[i]) used[i] = 0;
    for (int off = 0; off < 8; off++) begin
      int n_ok, which;
      n_ok = 0; which = -1;
      for (int fb = 0; fb < 8; fb++) begin
        run(off, fb);
        if (seq_found()) begin n_ok++; which = fb; end
      end
      check(n_ok == 1, $sformatf("offset %0d: %0d settings work", off, n_ok));
      if (which >= 0) used[which]++;
    end
    foreach (used[i]) check(used[i] == 1, $sformatf("setting %0d used once", i));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
