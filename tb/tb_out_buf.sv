// tb_out_buf: feeds out_buf from a model memory that answers each row request one clock
// later, removes 0..4 words per clock at random, and checks that peek always shows the
// oldest words in order, that count is right, that the buffer never requests a row it has
// no room for, and that flush empties it.
module tb_out_buf;
  import salt_pkg::*;
  localparam int RAM_W = 4, CAP = 128;
  int checks = 0, failures = 0, n_full = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic              flush, mem_empty, mem_rd_en, mem_rd_valid;
  word_t [RAM_W-1:0] mem_rd_data;
  word_t [3:0]       peek;
  logic [7:0]        count;
  logic [2:0]        pop;

  out_buf #(.RAM_W(RAM_W), .CAP(CAP)) dut (.*);

  word_t mem_q[$];     // rows waiting in the model memory, flattened
  word_t buf_q[$];     // words the buffer should hold
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
    flush = 0; mem_rd_valid = 0; mem_rd_data = '0; pop = 0; cnt = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 4000; t++) begin
      int room;
      // memory gets new rows
      if ($urandom_range(0, 2) != 0)
        repeat (RAM_W) begin mem_q.push_back(cnt); cnt++; end
      mem_empty = (mem_q.size() == 0);
      flush = (t % 900 == 899);
      #1;
      check(int'(count) == buf_q.size(), $sformatf("t=%0d count %0d/%0d", t, count, buf_q.size()));
      for (int m = 0; m < 4 && m < buf_q.size(); m++)
        check(peek[m] == buf_q[m], $sformatf("t=%0d peek %0d", t, m));
      if (count > CAP - 2 * RAM_W) n_full++;
      // consumer: slow in the first part so the buffer fills
      room = (buf_q.size() < 4) ? buf_q.size() : 4;
      pop  = flush ? 3'd0 : 3'((t < 1500) ? $urandom_range(0, 1) : $urandom_range(0, room));
      if (pop > room) pop = 3'(room);
      #1;
      check(!(mem_rd_en && mem_empty), "no request to an empty memory");
      @(posedge clk);
      for (int k = 0; k < pop; k++) void'(buf_q.pop_front());
      if (mem_rd_valid && !flush)
        for (int m = 0; m < RAM_W; m++) buf_q.push_back(mem_rd_data[m]);
      if (flush) buf_q.delete();
      check(buf_q.size() <= CAP, "never over capacity");
      // model memory answers the request one clock later
      mem_rd_valid <= mem_rd_en;
      if (mem_rd_en) for (int m = 0; m < RAM_W; m++) mem_rd_data[m] <= mem_q.pop_front();
      @(negedge clk);
    end
    check(n_full > 0, "buffer filled up");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
