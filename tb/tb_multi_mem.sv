// tb_multi_mem: writes packets of random length (1..67 words) into multi_mem, reads rows
// out at random, and checks that the words come out in the order they went in, that
// free_words always equals the capacity less the words held, that a write that does not
// fit is dropped with overflow set, and that flush empties the memory.
module tb_multi_mem;
  import salt_pkg::*;
  localparam int RAM_W = 4, N_INST = 32, RAM_DEPTH = 16;
  localparam int CAPW = RAM_W * N_INST * RAM_DEPTH;
  int checks = 0, failures = 0, n_over = 0, n_flush = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic                flush, wr, rd_en, rd_valid, empty, overflow;
  word_t [MAX_PKT-1:0] words;
  logic [6:0]          nwords;
  word_t [RAM_W-1:0]   rd_data;
  logic [11:0]         free_words;

  multi_mem #(.RAM_W(RAM_W), .N_INST(N_INST), .RAM_DEPTH(RAM_DEPTH)) dut (.*);

  word_t model_q[$];    // words accepted and not yet read out
  int    held;          // words inside the memory (rows and remainder)
  int    pend_rd;
  logic [11:0] cnt;

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
    flush = 0; wr = 0; rd_en = 0; words = '0; nwords = 0; held = 0; pend_rd = 0; cnt = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 3000; t++) begin
      bit fits;
      @(negedge clk);
      // check the row read in the previous clock
      if (pend_rd) begin
        check(rd_valid, "row follows read");
        for (int m = 0; m < RAM_W; m++) begin
          word_t w;
          w = model_q.pop_front();
          check(rd_data[m] == w, $sformatf("t=%0d word %h/%h", t, rd_data[m], w));
        end
      end
      check(int'(free_words) == CAPW - held, $sformatf("t=%0d free %0d/%0d", t, free_words, CAPW - held));
      check(empty == (held < RAM_W), "empty flag");
      // new stimulus
      flush  = (t % 700 == 699);
      wr     = ($urandom_range(0, 3) != 0);
      nwords = 7'($urandom_range(1, MAX_PKT));
      for (int k = 0; k < MAX_PKT; k++) begin words[k] = cnt; cnt++; end
      // read slowly in the first third so the memory fills up
      rd_en  = !empty && !flush && (t < 1000 ? ($urandom_range(0, 9) == 0) : ($urandom_range(0, 1) == 0));
      if (flush) begin
        model_q.delete();
        held = 0;
        n_flush++;
      end
      fits = (nwords <= CAPW - held);
      if (rd_en) held -= RAM_W;
      if (wr && fits) begin
        for (int k = 0; k < nwords; k++) model_q.push_back(words[k]);
        held += nwords;
      end
      pend_rd = rd_en;
      @(posedge clk); #1;
      check(overflow == (wr && !fits), $sformatf("t=%0d overflow flag", t));
      if (overflow) n_over++;
    end
    check(n_over > 0, "memory filled up at least once");
    check(n_flush > 0, "flush exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
