// tb_converter: feeds the converter from a model output buffer holding random packets and
// decodes its frames back into 12-bit words with the frame size in force (3..6 e-links,
// changed during the run). Checks that the words come out in order, that Idle words appear
// only between packets, that a packet is never cut, that a sync request gives a frame of
// BXID and pattern and restarts on a word boundary, and that each frame size is used.
module tb_converter;
  import salt_pkg::*;
  int checks = 0, failures = 0, n_idle = 0, n_sync = 0, n_pkt = 0;
  int used_nel [7];
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [2:0]              n_elinks;
  logic                    sync;
  logic                    flush = 0;
  logic [11:0]             bxid;
  logic [35:0]             sync_pattern;
  word_t [3:0]             peek;
  logic [7:0]              count;
  logic [2:0]              pop;
  logic [N_ELINK-1:0][7:0] frame;
  logic                    idle_sent, sync_sent;

  converter dut (.*);

  word_t src_q[$];     // model output buffer
  word_t exp_q[$];     // words sent and not yet decoded
  logic  bits_q[$];    // decoded bit stream not yet cut into words
  int    rem;          // words left of the packet being decoded
  logic [11:0] wcnt;

  task automatic check(bit c, string m);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", m); end
  endtask

  task automatic add_packet();
    int n, kind;
    word_t h;
    kind = $urandom_range(0, 9);
    if (kind < 6) begin
      n = $urandom_range(0, 20);
      h = mk_header(4'($urandom), 1'b0, 6'(n));
    end else if (kind == 6) begin
      n = MAX_PKT - 1;
      h = mk_header(4'($urandom), 1'b1, LEN_NZS);
    end else begin
      n = 0;
      h = mk_header(4'($urandom), 1'b1, LEN_HDRONLY);
    end
    src_q.push_back(h);
    for (int k = 0; k < n; k++) begin src_q.push_back(wcnt); wcnt++; end
  endtask

  initial begin
    #1000000 failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int nel, cur_nel;
    logic [47:0] exp_sync;
    bit was_sync;
    n_elinks = 3'd6; sync = 0; bxid = 0; sync_pattern = 36'h5A5A5A5A5; wcnt = 0; rem = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 3000; t++) begin
      // model buffer gets data at a random rate, a little below the link rate on average
      if ($urandom_range(0, 6) == 0) add_packet();
      cur_nel  = 3 + (t / 400) % 4;
      n_elinks = 3'(cur_nel);
      sync     = (t % 500 == 250);
      bxid     = 12'($urandom);
      count    = 8'((src_q.size() > 128) ? 128 : src_q.size());
      for (int m = 0; m < 4; m++) peek[m] = (m < src_q.size()) ? src_q[m] : 12'h000;
      exp_sync = {bxid, sync_pattern};
      was_sync = sync;
      #1;
      check(int'(pop) <= int'(count), "pop within count");
      for (int k = 0; k < pop; k++) exp_q.push_back(src_q.pop_front());
      if (sync) src_q.delete();        // the output buffer is emptied with a Sync
      @(posedge clk); #1;
      used_nel[cur_nel]++;
      if (was_sync) begin
        check(sync_sent, "sync flagged");
        for (int e = 0; e < cur_nel; e++)
          check(frame[e] == exp_sync[47 - 8*e -: 8], $sformatf("sync byte %0d", e));
        bits_q.delete();
        exp_q.delete();
        rem = 0;
        n_sync++;
        continue;
      end
      for (int e = 0; e < cur_nel; e++)
        for (int b = 7; b >= 0; b--) bits_q.push_back(frame[e][b]);
      while (bits_q.size() >= 12) begin
        word_t w;
        for (int b = 11; b >= 0; b--) w[b] = bits_q.pop_front();
        if (rem == 0 && w == IDLE_WORD) begin
          n_idle++;
          continue;
        end
        check(exp_q.size() > 0 && w == exp_q[0],
              $sformatf("t=%0d word %h expected %h", t, w, exp_q.size() ? exp_q[0] : 12'hfff));
        if (exp_q.size() > 0) void'(exp_q.pop_front());
        if (rem == 0) begin rem = pkt_words(w) - 1; n_pkt++; end
        else rem--;
      end
    end
    check(n_idle > 0, "idle words sent");
    check(n_sync > 0, "sync frames sent");
    check(n_pkt > 50, "packets sent");
    for (int n = 3; n <= 6; n++) check(used_nel[n] > 0, $sformatf("%0d e-links used", n));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
