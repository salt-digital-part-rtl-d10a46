// pck: packet builder. Turns the zero-suppressed hits, the raw samples and the TFC command
// of one bunch crossing into one packet of 12-bit words for the memory.
//
// Every bunch crossing produces exactly one packet. The choice, in priority order:
//   BxVeto command          -> BxVeto header only
//   HeaderOnly command      -> HeaderOnly header only
//   NZS command             -> NZS header, mcm_value, mcm_channels, 64 words of raw samples
//   more than 63 hits       -> BusyEvent header only
//   otherwise               -> Normal header (length = number of hits) and the hits
// A packet with data that does not fit in the free memory space (one word is always kept
// back) is replaced by a BufferFull header, or BufferFullN when an NZS packet was refused.
// Headers carry BXID[3:0] and even parity. NZS raw words hold two 6-bit samples each, the
// highest channels first: {ch127, ch126}, ..., {ch1, ch0}; mcm_value is sign-extended and
// mcm_channels zero-extended to 12 bits.
// The packet types, their header codes and the 63-hit limit follow the design description;
// the priority order, the one-word reserve and the NZS word layout are this design's
// choices. Output is registered: words/nwords/wr appear one clock (L_PKG) after the inputs.
module pck
  import salt_pkg::*;
(
  input  logic                      clk,
  input  logic                      rst_n,
  input  tfc_cmd_t                  cmd,
  input  logic [11:0]               bxid,
  input  word_t [MAX_HITS-1:0]      hits,
  input  logic [7:0]                nhits,
  input  logic [NCH-1:0][ADC_W-1:0] raw,
  input  logic signed [ADC_W:0]     mcm_value,
  input  logic [7:0]                mcm_channels,
  input  logic [11:0]               free_words,
  output word_t [MAX_PKT-1:0]       words,
  output logic [6:0]                nwords,
  output logic                      wr,
  output pkt_kind_e                 kind
);
  word_t [MAX_PKT-1:0] w_c;
  logic [6:0]          n_c;
  pkt_kind_e           k_c;

  always_comb begin
    logic [6:0] need;
    w_c  = '0;
    n_c  = 7'd1;
    k_c  = PK_NORMAL;
    need = 7'd1;
    if (cmd.bxveto) begin
      k_c = PK_BXVETO;
    end else if (cmd.headeronly) begin
      k_c = PK_HDRONLY;
    end else if (cmd.nzs) begin
      k_c  = PK_NZS;
      need = 7'(MAX_PKT);
    end else if (nhits > 8'(MAX_HITS)) begin
      k_c = PK_BUSY;
    end else begin
      k_c  = PK_NORMAL;
      need = 7'd1 + nhits[6:0];
    end
    if (need > 7'd1 && 12'(need) >= free_words)
      k_c = (k_c == PK_NZS) ? PK_BUFFULLN : PK_BUFFULL;

    unique case (k_c)
      PK_BXVETO:   w_c[0] = mk_header(bxid[3:0], 1'b1, LEN_BXVETO);
      PK_HDRONLY:  w_c[0] = mk_header(bxid[3:0], 1'b1, LEN_HDRONLY);
      PK_BUSY:     w_c[0] = mk_header(bxid[3:0], 1'b1, LEN_BUSY);
      PK_BUFFULL:  w_c[0] = mk_header(bxid[3:0], 1'b1, LEN_BUFFULL);
      PK_BUFFULLN: w_c[0] = mk_header(bxid[3:0], 1'b1, LEN_BUFFULLN);
      PK_NZS: begin
        w_c[0] = mk_header(bxid[3:0], 1'b1, LEN_NZS);
        w_c[1] = word_t'(signed'(mcm_value));
        w_c[2] = word_t'(mcm_channels);
        for (int k = 0; k < NCH / 2; k++)
          w_c[3 + k] = {raw[NCH - 1 - 2*k], raw[NCH - 2 - 2*k]};
        n_c = 7'(MAX_PKT);
      end
      default: begin  // PK_NORMAL
        w_c[0] = mk_header(bxid[3:0], 1'b0, nhits[5:0]);
        for (int k = 0; k < MAX_HITS; k++)
          if (k < int'(nhits)) w_c[1 + k] = hits[k];
        n_c = 7'd1 + nhits[6:0];
      end
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      words  <= '0;
      nwords <= '0;
      wr     <= 1'b0;
      kind   <= PK_NORMAL;
    end else begin
      words  <= w_c;
      nwords <= n_c;
      wr     <= 1'b1;
      kind   <= k_c;
    end
  end
endmodule
