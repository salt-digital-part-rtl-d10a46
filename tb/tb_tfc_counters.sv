// tb_tfc_counters: sends random TFC commands and checks every command counter against a
// count kept here, the snapshot registers after each Snapshot command, the clearing by
// FEReset, and that an upset in one copy of a counter is corrected and counted by the
// SEU counter, as is a correction reported on seu_in.
module tb_tfc_counters;
  import salt_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  tfc_cmd_t cmd;
  logic [N_TFC-1:0][15:0] count, snapshot;
  logic [15:0] seu_count;
  logic        seu_in = 0;

  tfc_counters #(.CW(16)) dut (.clk(clk), .rst_n(rst_n), .cmd(cmd), .count(count),
                               .snapshot(snapshot), .seu_in(seu_in), .seu_count(seu_count));

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
    int cnt [N_TFC], snap [N_TFC], n_seu, n_snap, n_fer;
    logic [7:0] b;
    foreach (cnt[i]) begin cnt[i] = 0; snap[i] = 0; end
    n_seu = 0; n_snap = 0; n_fer = 0;
    cmd = '0;
    @(negedge clk); rst_n = 1;
    for (int t = 0; t < 3000; t++) begin
      b = 8'($urandom) & 8'($urandom);
      if (t % 300 != 7) b[5] = 0;          // FEReset now and then
      cmd = tfc_cmd_t'(b);
      if (t % 400 == 100) begin
        force dut.g_cnt[3].u_cnt.copy2 = 16'hBEEF;
        #1 release dut.g_cnt[3].u_cnt.copy2;
        n_seu++;
      end
      seu_in = (t % 400 == 250);            // a correction reported from outside
      if (seu_in) n_seu++;
      @(negedge clk);
      seu_in = 0;
      if (b[7]) begin foreach (cnt[i]) snap[i] = cnt[i]; n_snap++; end
      if (b[5]) begin foreach (cnt[i]) cnt[i] = 0; n_fer++; end
      for (int i = 0; i < N_TFC; i++) if (b[i]) cnt[i] = (cnt[i] + 1) % 65536;
      for (int i = 0; i < N_TFC; i++) begin
        check(int'(count[i]) == cnt[i], $sformatf("t=%0d counter %0d %0d/%0d", t, i, count[i], cnt[i]));
        check(int'(snapshot[i]) == snap[i], $sformatf("t=%0d snapshot %0d", t, i));
      end
      check(int'(seu_count) == n_seu, $sformatf("t=%0d seu count %0d/%0d", t, seu_count, n_seu));
    end
    check(n_snap > 0 && n_fer > 0 && n_seu > 0, "snapshot, FEReset and upsets exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
