// tb_zs: streams random sample sets through zs, one per clock, with hit densities from
// empty to every channel, and checks five clocks later the hit count and every one of the
// first min(count, 63) hits against a list built here channel by channel.
module tb_zs;
  import salt_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [NCH-1:0][ZS_W-1:0] din;
  logic [NCH-1:0]           mask;
  logic [ZS_W-1:0]          thr;
  word_t [MAX_HITS-1:0]     hits;
  logic [7:0]               nhits;

  zs dut (.clk(clk), .rst_n(rst_n), .din(din), .ch_mask(mask), .zs_thr(thr),
          .hits(hits), .nhits(nhits));

  typedef struct { word_t h[$]; } exp_t;
  exp_t q[$];

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
    din = '0; mask = '0; thr = 5'd10;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 300; t++) begin
      exp_t e;
      int dens;
      e.h.delete();
      @(negedge clk);
      if (q.size() == L_ZS) begin
        exp_t x;
        x = q.pop_front();
        check(int'(nhits) == x.h.size(), $sformatf("t=%0d count %0d/%0d", t, nhits, x.h.size()));
        for (int k = 0; k < MAX_HITS && k < x.h.size(); k++)
          check(hits[k] == x.h[k], $sformatf("t=%0d hit %0d %h/%h", t, k, hits[k], x.h[k]));
      end
      dens = (t % 10 == 0) ? 100 : (t % 10 == 1) ? 0 : $urandom_range(0, 70);
      thr  = 5'($urandom_range(3, 12));
      mask = (t % 2) ? {$urandom, $urandom, $urandom, $urandom} & {4{$urandom}} : '0;
      for (int i = 0; i < NCH; i++)
        din[i] = ($urandom_range(0, 99) < dens) ? 5'($urandom_range(thr + 1, 31))
                                                : 5'($urandom_range(0, thr));
      for (int i = 0; i < NCH; i++)
        if (!mask[i] && din[i] > thr) e.h.push_back({7'(i), din[i]});
      q.push_back(e);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
