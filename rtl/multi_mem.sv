// multi_mem: event memory built from many small RAM instances behind an input buffer.
//
// Packets arrive as up to MAX_PKT 12-bit words per clock. The memory is organised in rows
// of RAM_W words; consecutive rows sit in consecutive RAM instances (row r lives in
// instance r mod N_INST at address r / N_INST), so up to N_INST rows can be written in one
// clock, one per instance. Incoming words are appended to the few words left over from
// the previous clock in the input circular buffer (at most RAM_W - 1 words); every full row
// goes straight into the RAM and only the remainder stays in the buffer. The rows form a
// circular FIFO: out_buf reads one row per clock (rd_en), and the row appears on rd_data
// one clock later with rd_valid. free_words tells the packet builder how many more words
// fit. flush (Sync or FEReset) empties the buffer and the RAM; a packet written in the same
// clock is stored after the flush. A write that does not fit is dropped and sets overflow
// for one clock (the packet builder's reserve prevents this in normal operation).
// Rows of 4 or 8 elements, many RAM instances and an input buffer of RAM_W - 1 words
// follow the design description; the number of instances and their depth are this
// design's choice (2048 words in total by default).
module multi_mem
  import salt_pkg::*;
#(
  parameter int unsigned RAM_W     = 4,
  parameter int unsigned N_INST    = 32,
  parameter int unsigned RAM_DEPTH = 16
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     flush,
  input  logic                     wr,
  input  word_t [MAX_PKT-1:0]      words,
  input  logic [6:0]               nwords,
  input  logic                     rd_en,
  output logic                     rd_valid,
  output word_t [RAM_W-1:0]        rd_data,
  output logic                     empty,
  output logic [11:0]              free_words,
  output logic                     overflow
);
  localparam int ROWS   = N_INST * RAM_DEPTH;
  localparam int RW     = $clog2(ROWS);
  localparam int IW     = $clog2(N_INST);
  localparam int AW     = $clog2(RAM_DEPTH);
  localparam int CMAX   = MAX_PKT + RAM_W - 1;         // words after appending
  localparam int MAXROW = CMAX / RAM_W;                 // rows written per clock at most

  initial assert (MAXROW <= N_INST) else $fatal(1, "N_INST too small for one packet");

  logic [RW-1:0]   wp_row, rp_row;
  logic [RW:0]     rows_used;
  word_t [RAM_W-2:0] res;          // input circular buffer (remainder words)
  logic [$clog2(RAM_W)-1:0] res_n;

  // ---------------- append new words to the remainder ----------------
  word_t [CMAX-1:0] cw;
  logic [7:0]       tot;
  logic [7:0]       nrow;
  logic [7:0]       nw_eff;
  logic [$clog2(RAM_W)-1:0] base_n;
  logic [RW:0]      used_base;
  logic             fits;

  always_comb begin
    base_n    = flush ? '0 : res_n;
    used_base = flush ? '0 : rows_used;
    tot       = 8'(base_n) + 8'(nwords);
    fits      = (12'(tot) <= 12'((ROWS - int'(used_base)) * RAM_W));
    nw_eff    = (wr && fits) ? 8'(nwords) : 8'd0;
    tot       = 8'(base_n) + nw_eff;
    nrow      = tot / 8'(RAM_W);
    cw        = '0;
    for (int k = 0; k < CMAX; k++) begin
      if (k < int'(base_n))                  cw[k] = res[k];
      else if (k - int'(base_n) < MAX_PKT)   cw[k] = words[k - int'(base_n)];
    end
  end

  // ---------------- RAM instances ----------------
  logic [RW-1:0] wbase;
  assign wbase = flush ? '0 : wp_row;

  logic [IW-1:0] rd_inst_q;
  word_t [N_INST-1:0][RAM_W-1:0] rdata;

  for (genvar i = 0; i < N_INST; i++) begin : g_ram
    logic [IW-1:0]     j;       // row index within this clock's write
    logic [RW-1:0]     row;
    word_t [RAM_W-1:0] wrow;
    always_comb begin
      j    = IW'(i) - wbase[IW-1:0];
      row  = wbase + RW'(j);
      wrow = '0;
      for (int m = 0; m < RAM_W; m++)
        if (int'(j) * RAM_W + m < CMAX) wrow[m] = cw[int'(j) * RAM_W + m];
    end
    ram_inst #(.DW(RAM_W * WORD_W), .DEPTH(RAM_DEPTH)) u_ram (
      .clk  (clk),
      .we   (8'(j) < nrow),
      .waddr(row[RW-1:IW]),
      .wdata(wrow),
      .re   (rd_en && rp_row[IW-1:0] == IW'(i)),
      .raddr(rp_row[RW-1:IW]),
      .rdata(rdata[i])
    );
  end

  assign rd_data = rdata[rd_inst_q];

  // ---------------- pointers and remainder ----------------
  logic do_rd;
  assign empty = (rows_used == 0);
  assign do_rd = rd_en && !empty && !flush;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp_row    <= '0;
      rp_row    <= '0;
      rows_used <= '0;
      res       <= '0;
      res_n     <= '0;
      rd_valid  <= 1'b0;
      rd_inst_q <= '0;
      overflow  <= 1'b0;
    end else begin
      wp_row    <= wbase + RW'(nrow);
      rp_row    <= (flush ? '0 : rp_row) + RW'(do_rd);
      rows_used <= used_base + (RW+1)'(nrow) - (RW+1)'(do_rd);
      res_n     <= tot[$clog2(RAM_W)-1:0];
      for (int m = 0; m < RAM_W - 1; m++)
        res[m] <= (int'(nrow) * RAM_W + m < CMAX) ? cw[int'(nrow) * RAM_W + m] : '0;
      rd_valid  <= do_rd;
      rd_inst_q <= rp_row[IW-1:0];
      overflow  <= wr && !fits;
    end
  end

  assign free_words = 12'((ROWS - int'(rows_used)) * RAM_W) - 12'(res_n);

  // Reads are only requested while rows are stored
  a_no_empty_read: assert property (@(posedge clk) disable iff (!rst_n) !(rd_en && empty && !flush))
    else $error("read of empty memory");
endmodule
