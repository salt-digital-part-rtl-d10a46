// tb_pck: drives pck with random commands, hit lists, raw samples and memory space, one
// bunch crossing per clock, and compares each packet, one clock later, with a packet built
// here from the header format, the type priority and the NZS layout.
module tb_pck;
  import salt_pkg::*;
  int checks = 0, failures = 0;
  int seen [7];
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  tfc_cmd_t                  cmd;
  logic [11:0]               bxid;
  word_t [MAX_HITS-1:0]      hits;
  logic [7:0]                nhits;
  logic [NCH-1:0][ADC_W-1:0] raw;
  logic signed [ADC_W:0]     mcm_value;
  logic [7:0]                mcm_channels;
  logic [11:0]               free_words;
  word_t [MAX_PKT-1:0]       words;
  logic [6:0]                nwords;
  logic                      wr;
  pkt_kind_e                 kind;

  pck dut (.*);

  typedef struct { word_t w[$]; pkt_kind_e k; } exp_t;
  exp_t exp_q;
  bit   have;

  function automatic word_t hdr(logic [3:0] b, logic f, logic [5:0] l);
    logic p = ^{b, f, l};
    return {b, p, f, l};
  endfunction

  function automatic exp_t model();
    exp_t e;
    int need;
    e.w.delete();
    if (cmd.bxveto)            begin e.k = PK_BXVETO;  need = 1; end
    else if (cmd.headeronly)   begin e.k = PK_HDRONLY; need = 1; end
    else if (cmd.nzs)          begin e.k = PK_NZS;     need = 67; end
    else if (nhits > 63)       begin e.k = PK_BUSY;    need = 1; end
    else                       begin e.k = PK_NORMAL;  need = 1 + nhits; end
    if (need > 1 && need >= free_words) e.k = (e.k == PK_NZS) ? PK_BUFFULLN : PK_BUFFULL;
    case (e.k)
      PK_BXVETO:   e.w.push_back(hdr(bxid[3:0], 1, 6'b01_0001));
      PK_HDRONLY:  e.w.push_back(hdr(bxid[3:0], 1, 6'b01_0010));
      PK_BUSY:     e.w.push_back(hdr(bxid[3:0], 1, 6'b01_0011));
      PK_BUFFULL:  e.w.push_back(hdr(bxid[3:0], 1, 6'b01_0100));
      PK_BUFFULLN: e.w.push_back(hdr(bxid[3:0], 1, 6'b01_0101));
      PK_NZS: begin
        e.w.push_back(hdr(bxid[3:0], 1, 6'b00_0110));
        e.w.push_back(12'(int'(mcm_value)));
        e.w.push_back(12'(mcm_channels));
        for (int c = 127; c > 0; c -= 2) e.w.push_back({raw[c], raw[c-1]});
      end
      default: begin
        e.w.push_back(hdr(bxid[3:0], 0, nhits[5:0]));
        for (int k = 0; k < nhits; k++) e.w.push_back(hits[k]);
      end
    endcase
    return e;
  endfunction

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
    cmd = '0; bxid = 0; hits = '0; nhits = 0; raw = '0; mcm_value = 0; mcm_channels = 0;
    free_words = 2048; have = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 400; t++) begin
      @(negedge clk);
      if (have) begin
        check(wr, "one packet per clock");
        check(kind == exp_q.k, $sformatf("t=%0d kind %s/%s", t, kind.name(), exp_q.k.name()));
        check(int'(nwords) == exp_q.w.size(), $sformatf("t=%0d length", t));
        for (int k = 0; k < exp_q.w.size(); k++)
          check(words[k] == exp_q.w[k], $sformatf("t=%0d word %0d %h/%h", t, k, words[k], exp_q.w[k]));
        seen[int'(kind)]++;
      end
      cmd = '0;
      case ($urandom_range(0, 9))
        0: cmd.bxveto = 1;
        1: cmd.headeronly = 1;
        2: cmd.nzs = 1;
        3: begin cmd.nzs = 1; cmd.headeronly = 1; end
        default: ;
      endcase
      bxid  = 12'($urandom);
      nhits = ($urandom_range(0, 5) == 0) ? 8'($urandom_range(64, 128)) : 8'($urandom_range(0, 63));
      for (int k = 0; k < MAX_HITS; k++) hits[k] = 12'($urandom);
      for (int c = 0; c < NCH; c++) raw[c] = 6'($urandom);
      mcm_value    = 7'($urandom_range(0, 20)) - 7'sd10;
      mcm_channels = 8'($urandom_range(0, 128));
      free_words   = ($urandom_range(0, 4) == 0) ? 12'($urandom_range(0, 80)) : 12'd2000;
      exp_q = model();
      have  = 1;
    end
    foreach (seen[i]) check(seen[i] > 0, $sformatf("packet kind %0d produced", i));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
