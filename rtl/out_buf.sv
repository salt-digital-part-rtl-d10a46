// out_buf: output circular buffer between the event memory and the 12/8 converter.
//
// It fetches one memory row (RAM_W words) per clock whenever the memory holds a row and the
// buffer has room for it counting the row still in flight, and hands words to the
// converter: peek shows the four oldest words, count how many words are held, and the
// converter removes 0..4 words per clock with pop. Because the buffer (CAP words) is
// larger than the longest packet, the converter can check that a whole packet is present
// before it starts to send it, so a packet is never cut by fill words. flush empties it.
// The output circular buffer follows the design description; its size and the fetch rule
// are this design's choices.
module out_buf
  import salt_pkg::*;
#(
  parameter int unsigned RAM_W = 4,
  parameter int unsigned CAP   = 128
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              flush,
  input  logic              mem_empty,
  output logic              mem_rd_en,
  input  logic              mem_rd_valid,
  input  word_t [RAM_W-1:0] mem_rd_data,
  output word_t [3:0]       peek,
  output logic [7:0]        count,
  input  logic [2:0]        pop
);
  localparam int PW = $clog2(CAP);

  initial assert (CAP >= MAX_PKT + 2 * RAM_W) else $fatal(1, "out_buf too small");

  word_t          buf_q [CAP];
  logic [PW-1:0]  head, tail;
  logic           pend;

  assign mem_rd_en = !flush && !mem_empty &&
                     (int'(count) + (pend ? RAM_W : 0) + RAM_W <= CAP);

  always_comb
    for (int m = 0; m < 4; m++) peek[m] = buf_q[PW'(head + PW'(m))];

  always_ff @(posedge clk) begin
    if (mem_rd_valid && !flush)
      for (int m = 0; m < RAM_W; m++) buf_q[PW'(tail + PW'(m))] <= mem_rd_data[m];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      head  <= '0;
      tail  <= '0;
      count <= '0;
      pend  <= 1'b0;
    end else if (flush) begin
      head  <= '0;
      tail  <= '0;
      count <= '0;
      pend  <= 1'b0;
    end else begin
      head  <= head + PW'(pop);
      tail  <= tail + (mem_rd_valid ? PW'(RAM_W) : '0);
      count <= count - 8'(pop) + (mem_rd_valid ? 8'(RAM_W) : 8'd0);
      pend  <= mem_rd_en;
    end
  end

  a_pop_ok: assert property (@(posedge clk) disable iff (!rst_n) 8'(pop) <= count)
    else $error("out_buf underflow");
endmodule
