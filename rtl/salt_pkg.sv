// salt_pkg: constants, types and helper functions shared by the SALT digital part.
//
// The chip reads 128 channels with 6-bit ADCs at every 40 MHz bunch crossing (BX). The
// readout is built from 12-bit words: a hit is a 7-bit channel number followed by a
// 5-bit value, and every packet starts with a 12-bit header
// {BXID[3:0], parity, flag, length[5:0]}. The flag is 0 for a normal packet, where the
// length field is the number of hits, and 1 for the special packets, where the length field
// holds a type code. The header codes, the 5-bit ZS input, the 63-hit limit and the
// ZS latency of 5 follow the design description. The parity rule (even parity over the
// 12-bit header word) is this design's reading: it is the rule that reproduces the
// printed Idle word. The TFC bit assignment, the NZS word layout and the latencies of
// the other pipeline stages are this design's own choices.
package salt_pkg;

  localparam int NCH       = 128;  // channels
  localparam int ADC_W     = 6;    // ADC sample width
  localparam int ZS_W      = 5;    // value width after pedestal and common-mode subtraction
  localparam int CH_W      = 7;    // channel number width in a hit
  localparam int WORD_W    = 12;   // packet base element
  localparam int MAX_HITS  = 63;   // hits that fit a normal packet
  localparam int NZS_DATA  = 2 + NCH * ADC_W / WORD_W; // mcm_value, mcm_channels, raw values
  localparam int MAX_PKT   = 1 + NZS_DATA;             // longest packet in words (67)
  localparam int N_ELINK   = 6;    // output e-links
  localparam int MCM_SUM_W = 14;   // signed sum of 128 7-bit values

  // Pipeline latencies in main_clk cycles
  localparam int L_MCM = 3;        // ped_mcm
  localparam int L_ZS  = 5;        // zs (given by the design description)
  localparam int L_PKG = 1;        // pck

  typedef logic [WORD_W-1:0] word_t;
  typedef logic [ADC_W-1:0]  adc_t;
  typedef logic [ZS_W-1:0]   zs_val_t;

  // One bit per TFC command (8-bit TFC word)
  typedef struct packed {
    logic snapshot;    // [7] copy TFC counters to snapshot registers
    logic calib;       // [6] calibration pulse to the front end
    logic fereset;     // [5] empty buffers and reset TFC counters
    logic synch;       // [4] empty buffers and send a Sync frame
    logic bxveto;      // [3] send BxVeto header only
    logic headeronly;  // [2] send HeaderOnly header only
    logic bxreset;     // [1] reset BXID counter
    logic nzs;         // [0] send non-zero-suppressed packet
  } tfc_cmd_t;

  localparam int N_TFC = 8;

  // Length-field codes of the special (flag = 1) packets
  localparam logic [5:0] LEN_IDLE     = 6'b11_0000;
  localparam logic [5:0] LEN_BXVETO   = 6'b01_0001;
  localparam logic [5:0] LEN_HDRONLY  = 6'b01_0010;
  localparam logic [5:0] LEN_BUSY     = 6'b01_0011;
  localparam logic [5:0] LEN_BUFFULL  = 6'b01_0100;
  localparam logic [5:0] LEN_BUFFULLN = 6'b01_0101;
  localparam logic [5:0] LEN_NZS      = 6'b00_0110;

  typedef enum logic [2:0] {
    PK_NORMAL, PK_NZS, PK_HDRONLY, PK_BXVETO, PK_BUSY, PK_BUFFULL, PK_BUFFULLN
  } pkt_kind_e;

  // 12-bit header with even parity over the whole word
  function automatic word_t mk_header(input logic [3:0] bxid, input logic flag,
                                      input logic [5:0] len);
    logic p;
    p = ^{bxid, flag, len};
    return {bxid, p, flag, len};
  endfunction

  localparam word_t IDLE_WORD = {4'b0000, 1'b1, 1'b1, LEN_IDLE};

  // Number of words (header included) of the packet that starts with header h
  function automatic int unsigned pkt_words(input word_t h);
    if (!h[6])              return 1 + int'(h[5:0]);
    else if (h[5:0] == LEN_NZS) return MAX_PKT;
    else                    return 1;
  endfunction

  // Configuration of the digital part
  // Serializer source: packets, or the link set-up sources
  typedef enum logic [1:0] {SER_DATA, SER_PATTERN, SER_LOOPBACK, SER_COUNTER} ser_mode_e;

  typedef struct packed {
    logic [NCH-1:0][ADC_W-1:0] pedestal;   // per-channel pedestal
    logic [NCH-1:0]            ch_mask;    // 1 = channel masked in MCM and ZS
    logic [ADC_W-1:0]          mcm_thr;    // |value| <= mcm_thr takes part in the MCM mean
    logic [ZS_W-1:0]           zs_thr;     // value > zs_thr is a hit
    logic [7:0]                tfc_fifo_len; // TFC FIFO latency
    logic [7:0]                deser_cfg;  // [2:0] first bit position of a TFC byte
    logic [7:0]                cal_delay;  // calibration command delay
    logic [4:0]                cal_len;    // test pulse length, 1..31 clocks
    logic                      cal_inv;    // test pulse polarity
    logic [NCH-1:0]            cal_ena;    // per-channel test pulse enable
    logic [2:0]                n_elinks;   // active e-links, 3..6
    logic [35:0]               sync_pattern; // Sync frame filler after the BXID
    ser_mode_e                 ser_mode;   // what the serializer sends
    logic [7:0]                ser_pattern; // byte sent on every e-link in SER_PATTERN
  } salt_cfg_t;

endpackage
