// converter: 12/8 converter. Cuts the stream of 12-bit packet words into one frame of
// 3 to 6 bytes per clock, one byte per active e-link, and makes the Idle and Sync packets.
//
// The number of active e-links (n_elinks, 3..6) sets the frame to 24, 32, 40 or 48 bits, so
// word and frame boundaries do not line up; the bits of a word left over after a frame are
// kept (acc, up to 11 bits) and sent first in the next frame. Each clock the converter
// takes as many whole words as the frame needs (1..4). It follows packet boundaries by
// reading each header's length: inside a packet it takes the next word from out_buf; at a
// boundary it starts the next packet only if the whole packet is already in out_buf, and
// otherwise sends an Idle word ("not enough data"). A sync request replaces the frame with
// a Sync frame, BXID[11:0] followed by sync_pattern bits up to the frame size, and drops
// the kept bits, so the frame after a Sync starts on a word boundary. flush (FEReset, which
// empties out_buf without a Sync) ends the packet being sent; the receiver finds the packet
// boundaries again at the next Sync.
// Bits go out most significant first; e-link 0 carries the first byte of a frame.
// The 12-bit base element, 3..6 e-links, Idle and Sync creation in this block, and the
// Sync layout follow the design description; the whole-packet start rule, bit order and
// e-link order are this design's choices. Frame is registered: one clock latency.
module converter
  import salt_pkg::*;
(
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic [2:0]              n_elinks,
  input  logic                    sync,
  input  logic                    flush,
  input  logic [11:0]             bxid,
  input  logic [35:0]             sync_pattern,
  input  word_t [3:0]             peek,
  input  logic [7:0]              count,
  output logic [2:0]              pop,
  output logic [N_ELINK-1:0][7:0] frame,
  output logic                    idle_sent,
  output logic                    sync_sent
);
  logic [11:0] acc;       // kept bits, left-aligned
  logic [3:0]  acc_n;
  logic [6:0]  rem;       // words still to send of the current packet

  logic [2:0]  nel;
  logic [5:0]  nbits;
  logic [59:0] stream;
  logic [2:0]  k;
  logic [6:0]  rem_c;
  logic        idle_c;
  word_t [3:0] w;

  always_comb begin
    int need;
    int p;
    nel   = (n_elinks < 3) ? 3'd3 : (n_elinks > 6) ? 3'd6 : n_elinks;
    nbits = 6'(8 * int'(nel));
    need  = int'(nbits) - int'(acc_n);
    k     = 3'((need + 11) / 12);
    p     = 0;
    rem_c = rem;
    idle_c = 1'b0;
    for (int m = 0; m < 4; m++) begin
      w[m] = '0;
      if (m < int'(k)) begin
        if (rem_c != 0) begin
          w[m]  = peek[p];
          p     = p + 1;
          rem_c = rem_c - 7'd1;
        end else if (int'(count) > p && int'(count) - p >= int'(pkt_words(peek[p]))) begin
          w[m]  = peek[p];
          rem_c = 7'(pkt_words(peek[p]) - 1);
          p     = p + 1;
        end else begin
          w[m]   = IDLE_WORD;
          idle_c = 1'b1;
        end
      end
    end
    pop    = sync ? 3'd0 : 3'(p);
    stream = {acc, 48'b0};
    for (int m = 0; m < 4; m++)
      if (m < int'(k)) stream = stream | ({w[m], 48'b0} >> (int'(acc_n) + 12 * m));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc       <= '0;
      acc_n     <= '0;
      rem       <= '0;
      frame     <= '0;
      idle_sent <= 1'b0;
      sync_sent <= 1'b0;
    end else if (sync) begin
      logic [47:0] s;
      s = {bxid, sync_pattern};
      for (int e = 0; e < N_ELINK; e++)
        frame[e] <= (e < int'(nel)) ? s[47 - 8*e -: 8] : 8'h00;
      acc       <= '0;
      acc_n     <= '0;
      rem       <= '0;
      idle_sent <= 1'b0;
      sync_sent <= 1'b1;
    end else begin
      logic [59:0] rest;
      for (int e = 0; e < N_ELINK; e++)
        frame[e] <= (e < int'(nel)) ? stream[59 - 8*e -: 8] : 8'h00;
      rest      = stream << nbits;
      acc       <= rest[59:48];
      acc_n     <= 4'(int'(acc_n) + 12 * int'(k) - int'(nbits));
      rem       <= flush ? 7'd0 : rem_c;
      idle_sent <= idle_c;
      sync_sent <= 1'b0;
    end
  end
endmodule
