// tb_salt_digital: end-to-end test of the SALT digital part at its full size (128 channels,
// default memory sizes, 6 e-links).
//
// The bench drives ADC samples (pedestal + common mode + noise + hits) every bunch crossing
// and sends TFC commands as a DDR stream, then decodes the converter frames back into
// 12-bit words and compares every packet with a reference computed here from the same
// samples: pedestal and common-mode subtraction, zero suppression, packet type and header.
// It also rebuilds the e-link bytes from the serial outputs and checks them against the
// frames. The run goes through the link start-up (choice of the first bit position, then
// the TFC latency measured with an NZS marker and set in the TFC FIFO), then a main run with
// random commands and occupancy: NZS, HeaderOnly, BxVeto, BusyEvent (> 63 hits), memory
// full (BufferFull), Idle fill, Sync, FEReset, BXReset, Snapshot, Calib test pulses, a
// switch from 6 to 3 e-links and a single-event upset in the configuration. At the end the
// serializer's link set-up sources (fixed pattern, TFC loop-back, counter) are selected in
// turn and checked. Each of these is counted and must happen at least once.
module tb_salt_digital;
  import salt_pkg::*;

  int checks = 0, failures = 0;
  task automatic check(bit c, string m);
    checks++;
    if (!c) begin
      failures++;
      if (failures < 20) $display("FAIL @%0t: %s", $time, m);
    end
  endtask

  // ---------------- clocks: data_clk = 4 x main_clk, phase-locked ----------------
  logic main_clk = 0, data_clk = 0, adc_clk = 0, calib_clk = 0, rst_n = 0;
  int ph = 0;
  initial forever begin
    data_clk = 1;
    if (ph == 0) main_clk = 1;
    if (ph == 2) main_clk = 0;
    #3.125 data_clk = 0;
    #3.125 ph = (ph + 1) % 4;
  end
  always @(main_clk) adc_clk   <= #12.5 main_clk;   // ADC phase from the DLL
  always @(main_clk) calib_clk <= #3.0 main_clk;    // calibration phase from the DLL

  // ---------------- DUT ----------------
  logic [NCH-1:0][ADC_W-1:0] adc_data;
  logic                      tfc_in;
  logic                      cfg_we;
  salt_cfg_t                 cfg_wdata, cfg;
  logic [N_ELINK-1:0]        dout_rise, dout_fall;
  logic [NCH-1:0]            cal_strobe;
  logic [N_ELINK-1:0][7:0]   frame;
  logic [7:0]                tfc_cmd_deser;
  logic [11:0]               bxid;
  logic [N_TFC-1:0][15:0]    tfc_count, tfc_snapshot;
  logic [15:0]               seu_count;
  logic                      pkt_wr, mem_overflow, idle_sent, sync_sent;
  pkt_kind_e                 pkt_kind;

  salt_digital dut (.*);

  // ---------------- stimulus logs ----------------
  localparam int NBX = 4000;
  localparam int ADV = 12;                 // TFC bytes are sent ADV crossings early
  logic [NCH-1:0][ADC_W-1:0] adc_log [NBX + 64];
  logic [7:0]                tfc_log [NBX + 64];  // command for crossing k
  int n;                                    // current main_clk cycle = crossing index

  // ---------------- TFC serial driver: byte for crossing n + ADV in cycle n ----------------
  logic [7:0] tfc_tx;
  initial begin
    tfc_in = 0;
    forever begin
      @(posedge main_clk);
      #1.5625;
      for (int b = 7; b >= 0; b--) begin
        tfc_in = tfc_tx[b];
        if (b != 0) #3.125;
      end
    end
  end

  // ---------------- counters of mechanisms ----------------
  int n_kind [7];
  int n_ser_mode [4];
  int n_idle = 0, n_sync = 0, n_bf_seen = 0, n_cal_pulse = 0, n_pkt_ok = 0;
  int n_nel_frames [7];

  // ---------------- reference model ----------------
  function automatic void ref_packet(input int k, input logic [11:0] bx, output word_t w[$]);
    int d [NCH];
    int sum, cnt, mean, nh;
    word_t hits[$];
    tfc_cmd_t c;
    c = tfc_cmd_t'(tfc_log[k]);
    w.delete();
    sum = 0; cnt = 0;
    for (int i = 0; i < NCH; i++) begin
      d[i] = int'(adc_log[k][i]) - int'(cfg.pedestal[i]);
      if (!cfg.ch_mask[i] && (d[i] < 0 ? -d[i] : d[i]) <= int'(cfg.mcm_thr)) begin
        sum += d[i]; cnt++;
      end
    end
    mean = (cnt == 0) ? 0 : sum / cnt;
    for (int i = 0; i < NCH; i++) begin
      int v = d[i] - mean;
      v = (v < 0) ? 0 : (v > 31) ? 31 : v;
      if (!cfg.ch_mask[i] && v > int'(cfg.zs_thr)) hits.push_back({7'(i), 5'(v)});
    end
    nh = hits.size();
    if (c.bxveto)          w.push_back(mk_header(bx[3:0], 1, LEN_BXVETO));
    else if (c.headeronly) w.push_back(mk_header(bx[3:0], 1, LEN_HDRONLY));
    else if (c.nzs) begin
      w.push_back(mk_header(bx[3:0], 1, LEN_NZS));
      w.push_back(12'(mean));
      w.push_back(12'(cnt));
      for (int i = NCH - 1; i > 0; i -= 2) w.push_back({adc_log[k][i], adc_log[k][i-1]});
    end else if (nh > 63)  w.push_back(mk_header(bx[3:0], 1, LEN_BUSY));
    else begin
      w.push_back(mk_header(bx[3:0], 0, 6'(nh)));
      foreach (hits[j]) w.push_back(hits[j]);
    end
  endfunction

  // BXID of each crossing, anchored by a BXReset: bx[k+1] = reset(k) ? 0 : bx[k] + 1
  logic [11:0] bx_of [NBX + 64];
  int          bx_known_from;

  // ---------------- packet checker on the converter frames ----------------
  bit    lost;          // ignore words until the next Sync frame
  int    next_bx;       // crossing whose packet comes next
  int    rem;           // words left in the packet being checked
  word_t cur[$];
  int    cur_i;
  logic  bits_q[$];
  int    sync_q[$];     // crossings that carried Synch, in order
  int    nel_now;
  bit    checking;

  task automatic take_word(input word_t w);
    if (lost) return;
    if (rem == 0) begin
      if (w == IDLE_WORD) begin n_idle++; return; end
      if (next_bx < bx_known_from) begin  // before the BXID is known, skip the packet
        rem = pkt_words(w) - 1; next_bx++; return;
      end
      ref_packet(next_bx, bx_of[next_bx], cur);
      if (w[6] && (w[5:0] == LEN_BUFFULL || w[5:0] == LEN_BUFFULLN)) begin
        check(cur.size() > 1, $sformatf("BufferFull only for data packets (bx %0d)", next_bx));
        check(w == mk_header(bx_of[next_bx][3:0], 1,
                             (cur[0][5:0] == LEN_NZS && cur[0][6]) ? LEN_BUFFULLN : LEN_BUFFULL),
              $sformatf("BufferFull header bx %0d: %h", next_bx, w));
        n_bf_seen++;
        rem = 0; next_bx++;
        return;
      end
      check(w == cur[0], $sformatf("header bx %0d: %h expected %h", next_bx, w, cur[0]));
      if (w != cur[0]) begin lost = 1; return; end
      rem   = cur.size() - 1;
      cur_i = 1;
      next_bx++;
      if (rem == 0) n_pkt_ok++;
    end else begin
      check(w == cur[cur_i], $sformatf("bx %0d word %0d: %h expected %h", next_bx - 1, cur_i, w, cur[cur_i]));
      cur_i++;
      rem--;
      if (rem == 0) n_pkt_ok++;
    end
  endtask

  // frames, with the e-link count in force when they were made
  logic [N_ELINK-1:0][7:0] frame_log[$];
  initial begin
    lost = 1; next_bx = 0; rem = 0; checking = 0;
    forever begin
      @(negedge main_clk);
      nel_now = int'(cfg.n_elinks);
      @(posedge main_clk); #0.2;
      frame_log.push_back(frame);
      if (!checking) continue;
      if (sync_sent) begin
        int k;
        n_sync++;
        bits_q.delete();
        rem = 0;
        k = (sync_q.size() > 0) ? sync_q.pop_front() : -1;
        check(k >= 0, "Sync frame after a Synch command");
        if (k >= 0 && k >= bx_known_from)
          check({frame[0], frame[1][7:4]} == bx_of[k], $sformatf("Sync BXID %h expected %h",
                {frame[0], frame[1][7:4]}, bx_of[k]));
        for (int e = 0; e < nel_now; e++)
          check(frame[e] == {bx_of[k], cfg.sync_pattern}[47 - 8*e -: 8] || k < bx_known_from,
                "Sync frame contents");
        next_bx = k;   // the Synch crossing's own packet is the first after the Sync
        lost = 0;
        continue;
      end
      n_nel_frames[nel_now]++;
      for (int e = 0; e < nel_now; e++)
        for (int b = 7; b >= 0; b--) bits_q.push_back(frame[e][b]);
      while (bits_q.size() >= 12) begin
        word_t w;
        for (int b = 11; b >= 0; b--) w[b] = bits_q.pop_front();
        take_word(w);
      end
    end
  end

  // serial outputs: two bits per e-link per data_clk cycle
  logic [1:0] pair_log [N_ELINK][$];
  initial forever begin
    @(posedge data_clk); #0.1;
    for (int e = 0; e < N_ELINK; e++) pair_log[e].push_back({dout_rise[e], dout_fall[e]});
  end

  // calibration pulses on channel 5 (enabled)
  logic cal_prev = 0;
  always @(posedge calib_clk) begin
    if (cal_strobe[5] && !cal_prev && checking) n_cal_pulse++;
    cal_prev <= cal_strobe[5];
  end

  // ---------------- helpers ----------------
  task automatic write_cfg();
    @(negedge main_clk); cfg_we = 1;
    @(negedge main_clk); cfg_we = 0;
  endtask

  int occupancy;   // percent of channels hit
  int common;
  function automatic void make_adc(int k);
    for (int i = 0; i < NCH; i++) begin
      int a = int'(cfg_wdata.pedestal[i]) + common + $urandom_range(0, 4) - 2;
      if ($urandom_range(0, 99) < occupancy) a += $urandom_range(10, 40);
      adc_log[k][i] = ADC_W'((a < 0) ? 0 : (a > 63) ? 63 : a);
    end
  endfunction

  // ---------------- main sequence ----------------
  int tfc_len0, fb_found, delta, t_fereset;
  int tally [N_TFC], snap_tally [N_TFC];

  initial begin
    #50000000 failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge main_clk) begin
    #1;
    adc_data <= adc_log[n];
    tfc_tx   <= tfc_log[n + ADV];
  end

  initial begin
    foreach (adc_log[k]) adc_log[k] = '0;
    foreach (tfc_log[k]) tfc_log[k] = '0;
    foreach (n_kind[i]) n_kind[i] = 0;
    foreach (n_nel_frames[i]) n_nel_frames[i] = 0;
    bx_known_from = NBX + 64;
    occupancy = 3; common = 0; n = 0;
    cfg_we = 0;
    cfg_wdata = '0;
    for (int i = 0; i < NCH; i++) cfg_wdata.pedestal[i] = ADC_W'($urandom_range(8, 20));
    cfg_wdata.ch_mask      = '0;
    cfg_wdata.ch_mask[17]  = 1'b1;
    cfg_wdata.ch_mask[90]  = 1'b1;
    cfg_wdata.mcm_thr      = 6'd6;
    cfg_wdata.zs_thr       = 5'd6;
    cfg_wdata.tfc_fifo_len = 8'd20;
    cfg_wdata.deser_cfg    = 8'd0;
    cfg_wdata.cal_delay    = 8'd5;
    cfg_wdata.cal_len      = 5'd4;
    cfg_wdata.cal_inv      = 1'b0;
    cfg_wdata.cal_ena      = {$urandom, $urandom, $urandom, $urandom} | (128'd1 << 5);
    cfg_wdata.n_elinks     = 3'd6;
    cfg_wdata.sync_pattern = 36'hC3A5_96F0_F;
    tfc_tx = 0;
    adc_data = '0;
    repeat (3) @(posedge main_clk);
    rst_n = 1;
    write_cfg();

    // clock cycle counter; the sequence below advances with it
    fork
      forever begin @(posedge main_clk); n++; end
    join_none

    // ---- step 1: choice of the first bit position: constant 0x01 pattern ----
    for (int k = 0; k < 400; k++) tfc_log[k] = 8'h01;
    fb_found = -1;
    for (int fb = 0; fb < 8 && fb_found < 0; fb++) begin
      cfg_wdata.deser_cfg = 8'(fb);
      write_cfg();
      repeat (6) @(negedge main_clk);
      if (tfc_cmd_deser == 8'h01) fb_found = fb;
    end
    check(fb_found >= 0, "first bit position found");
    // stop the pattern, empty everything: FEReset then Synch
    for (int k = n + ADV + 2; k < NBX + 64; k++) tfc_log[k] = 8'h00;
    tfc_log[n + ADV + 5] = 8'h20;   // FEReset
    tfc_log[n + ADV + 8] = 8'h10;   // Synch
    sync_q.push_back(n + ADV + 8);
    repeat (80) @(negedge main_clk);
    sync_q.delete();

    // ---- step 2: TFC latency: NZS marker against a unique sample set ----
    begin
      int k0, found;
      k0 = n + ADV + 10;
      for (int k = n; k < n + 120; k++) begin common = $urandom_range(0, 6) - 3; make_adc(k); end
      tfc_log[k0] = 8'h01;
      found = -1;
      checking = 0;
      // watch packets as they are written into the memory
      for (int t = 0; t < 100 && found < 0; t++) begin
        @(posedge main_clk); #0.3;
        if (pkt_wr && pkt_kind == PK_NZS) begin
          for (int j = k0 - 40; j < k0 + 40; j++) begin
            logic [NCH-1:0][ADC_W-1:0] r;
            for (int c = 0; c < NCH / 2; c++)
              {r[NCH - 1 - 2*c], r[NCH - 2 - 2*c]} = dut.u_pck.words[3 + c];
            if (r == adc_log[j]) found = j;
          end
        end
      end
      check(found >= 0, "NZS marker found");
      delta = found - k0;
      $display("TFC latency step: marker at %0d found sample %0d", k0, found);
      tfc_len0 = int'(cfg_wdata.tfc_fifo_len);
      cfg_wdata.tfc_fifo_len = 8'(tfc_len0 - delta);
      write_cfg();
      repeat (40) @(negedge main_clk);
    end

    // ---- step 3: main run ----
    begin
      int k_start, k_end, k_reset;
      int n_calib_sent;
      k_start = n + ADV + 300;   // everything sent before is flushed by the Synch below
      k_end   = k_start + 2600;
      // commands
      for (int k = n + ADV + 1; k < k_end + 200; k++) tfc_log[k] = 8'h00;
      k_reset = k_start - 30;
      tfc_log[k_reset] = 8'h02;              // BXReset: BXIDs known from here
      tfc_log[k_start - 20] = 8'h20;         // FEReset
      tfc_log[k_start] = 8'h10;              // Synch
      n_calib_sent = 0;
      for (int k = k_start + 1; k < k_end; k++) begin
        automatic int r = $urandom_range(0, 999);
        automatic logic [7:0] c = 8'h00;
        if (r < 15)       c = 8'h01;         // NZS
        else if (r < 30)  c = 8'h04;         // HeaderOnly
        else if (r < 45)  c = 8'h08;         // BxVeto
        else if (r < 50)  c = 8'h80;         // Snapshot
        else if (r < 52)  c = 8'h02;         // BXReset
        if (k % 200 == 77) begin c = 8'h40; n_calib_sent++; end  // Calib
        tfc_log[k] = c;
      end
      // a Synch every 700 crossings, and a mode switch to 3 e-links with the third one
      for (int s = 1; s < 4; s++) begin
        tfc_log[k_start + 700 * s] = 8'h10;
      end
      // BXID model
      bx_known_from = k_reset + 1;
      bx_of[k_reset + 1] = 12'd0;
      for (int k = k_reset + 1; k < k_end + 100; k++)
        bx_of[k + 1] = tfc_log[k][1] ? 12'd0 : bx_of[k] + 12'd1;
      foreach (tally[i]) begin tally[i] = 0; snap_tally[i] = 0; end

      // sample sets: quiet, busy bursts (memory fills), very busy crossings (> 63 hits)
      while (n + ADV < k_end + 100) begin
        automatic int k = n + ADV;             // prepare a little ahead of use
        if (k < NBX + 64) begin
          occupancy = ((k - k_start) % 700 > 100 && (k - k_start) % 700 < 175) ? 28 :
                      ($urandom_range(0, 60) == 0) ? 70 : 1;
          common = $urandom_range(0, 8) - 4;
          make_adc(k);
        end
        if (k == k_start) begin sync_q.delete(); sync_q.push_back(k_start); checking = 1; end
        if (k > k_start && tfc_log[k][4]) sync_q.push_back(k);
        if (k == k_start + 2100 - 10) begin             // switch to 3 e-links before a Synch
          cfg_wdata.n_elinks = 3'd3;
          write_cfg();
          continue;
        end
        if (k == k_start + 1000) begin                  // upset one copy of the configuration
          force dut.u_cfg.copy1 = ~cfg_wdata;
          @(negedge main_clk);
          check(cfg == cfg_wdata, "configuration vote hides an upset");
          release dut.u_cfg.copy1;
          @(negedge main_clk);
          check(dut.u_cfg.copy1 == cfg_wdata, "configuration copy repaired");
          continue;
        end
        @(negedge main_clk);
      end
      // TFC counters: tally commands after the last FEReset (k_start - 20)
      for (int k = k_start - 20; k < k_end + 100; k++) begin
        for (int i = 0; i < N_TFC; i++) if (tfc_log[k][i]) tally[i]++;
        if (tfc_log[k][7]) snap_tally = tally;
      end
      // the last Snapshot copies the counts from before its own increment
      begin
        int last_snap;
        last_snap = -1;
        for (int k = k_start - 20; k < k_end + 100; k++)
          if (tfc_log[k][7]) last_snap = k;
        foreach (snap_tally[i]) snap_tally[i] = 0;
        for (int k = k_start - 20; k < last_snap; k++)
          for (int i = 0; i < N_TFC; i++) if (tfc_log[k][i]) snap_tally[i]++;
      end
      repeat (400) @(negedge main_clk);
      for (int i = 0; i < N_TFC; i++) begin
        check(int'(tfc_count[i]) == tally[i], $sformatf("TFC counter %0d: %0d expected %0d", i, tfc_count[i], tally[i]));
        check(int'(tfc_snapshot[i]) == snap_tally[i], $sformatf("snapshot %0d: %0d expected %0d", i, tfc_snapshot[i], snap_tally[i]));
      end

      // ---- link set-up sources of the serializer: pattern, TFC loop-back, counter ----
      checking = 0;
      cfg_wdata.ser_pattern = 8'h5C;
      cfg_wdata.ser_mode    = SER_PATTERN;
      write_cfg();
      repeat (2) @(negedge main_clk);
      for (int m = 0; m < 20; m++) begin
        @(negedge main_clk);
        for (int e = 0; e < N_ELINK; e++) check(frame[e] == 8'h5C, "pattern source");
        n_ser_mode[SER_PATTERN]++;
      end
      for (int j = 0; j < 60 && n + ADV + j < NBX + 64; j++)
        tfc_log[n + ADV + j] = 8'($urandom_range(0, 255)) & 8'b0101_1101;  // no FEReset/Synch/BXReset
      cfg_wdata.ser_mode = SER_LOOPBACK;
      write_cfg();
      repeat (2) @(negedge main_clk);
      for (int m = 0; m < 20; m++) begin
        @(negedge main_clk);
        for (int e = 0; e < N_ELINK; e++) check(frame[e] == tfc_cmd_deser, "loop-back source");
        if (frame[0] != 0) n_ser_mode[SER_LOOPBACK]++;
      end
      cfg_wdata.ser_mode = SER_COUNTER;
      write_cfg();
      repeat (2) @(negedge main_clk);
      begin
        logic [7:0] prev;
        prev = frame[0];
        for (int m = 0; m < 20; m++) begin
          @(negedge main_clk);
          for (int e = 0; e < N_ELINK; e++) check(frame[e] == prev + 8'd1, "counter source");
          prev = frame[0];
          n_ser_mode[SER_COUNTER]++;
        end
      end
      cfg_wdata.ser_mode = SER_DATA;
      write_cfg();
      check(n_cal_pulse == n_calib_sent + 0, $sformatf("calibration pulses %0d of %0d", n_cal_pulse, n_calib_sent));
    end

    // ---- serial outputs against the frames ----
    begin
      int off;
      off = -1;
      for (int o = 0; o < 12 && off < 0; o++) begin
        automatic bit ok = 1;
        for (int m = 100; m < 200; m++)
          for (int q = 0; q < 4; q++)
            if (pair_log[0][4*m + o + q] != frame_log[m][0][7 - 2*q -: 2]) ok = 0;
        if (ok) off = o;
      end
      check(off >= 0, "serial stream aligned to frames");
      if (off >= 0)
        for (int m = 100; 4*m + off + 3 < pair_log[0].size() && m < frame_log.size(); m++)
          for (int e = 0; e < N_ELINK; e++) begin
            logic [7:0] b;
            for (int q = 0; q < 4; q++) b[7 - 2*q -: 2] = pair_log[e][4*m + off + q];
            check(b == frame_log[m][e], $sformatf("serial byte frame %0d link %0d", m, e));
          end
    end

    // ---- every mechanism happened ----
    $display("packets checked %0d, idle words %0d, sync frames %0d, BufferFull %0d",
             n_pkt_ok, n_idle, n_sync, n_bf_seen);
    $display("written: normal %0d nzs %0d hdronly %0d bxveto %0d busy %0d buffull %0d buffulln %0d",
             n_kind[0], n_kind[1], n_kind[2], n_kind[3], n_kind[4], n_kind[5], n_kind[6]);
    $display("frames with 6 e-links %0d, with 3 e-links %0d, calib pulses %0d",
             n_nel_frames[6], n_nel_frames[3], n_cal_pulse);
    $display("serializer test sources: pattern %0d, loop-back %0d, counter %0d frames",
             n_ser_mode[1], n_ser_mode[2], n_ser_mode[3]);
    check(n_pkt_ok > 500, "packets checked");
    check(n_idle > 0, "Idle words");
    check(n_sync >= 3, "Sync frames");
    check(n_bf_seen > 0, "BufferFull packets received");
    for (int i = 0; i < 5; i++) check(n_kind[i] > 0, $sformatf("packet kind %0d written", i));
    check(n_kind[5] + n_kind[6] > 0, "memory full reached");
    check(n_nel_frames[6] > 0 && n_nel_frames[3] > 0, "both e-link modes used");
    check(n_cal_pulse > 0, "calibration pulses");
    check(seu_count > 0, "configuration upset counted");
    for (int i = 1; i < 4; i++) check(n_ser_mode[i] > 0, $sformatf("serializer source %0d used", i));
    check(!mem_overflow, "no memory overflow");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge main_clk) if (pkt_wr && checking) n_kind[int'(pkt_kind)]++;
endmodule
