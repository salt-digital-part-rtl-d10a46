// salt_digital: digital part of the SALT 128-channel readout chip.
//
// Every 40 MHz bunch crossing (main_clk) the 128 6-bit ADC samples cross from adc_clk into
// main_clk through adc_fifo, lose their pedestals and common mode in ped_mcm, are
// zero-suppressed in zs and become one packet of 12-bit words in pck. The packet is stored
// in multi_mem, fetched by out_buf, cut into 3..6 bytes per clock by converter and sent on
// the e-links by serializer at data_clk (4 x main_clk, DDR).
// TFC commands arrive as a DDR stream on tfc_in, are framed by deserializer, delayed by
// the programmable TFC FIFO (tfc_fifo_len, which absorbs the front-end latency) and then
// follow the data through the pipeline in pipe_delay stages: after the FIFO they drive
// the BXID counter and the TFC counters; after L_MCM + L_ZS clocks NZS, HeaderOnly and
// BxVeto steer pck; after L_PKG more clocks Synch and FEReset empty the memories and Synch
// makes the converter send a Sync frame. For link set-up the serializer can instead send a
// fixed pattern, the received TFC byte or a counter (cfg.ser_mode). Calib takes its own delay (cal_delay) into the
// test pulse generator in the calib_clk domain. The configuration is held in one
// triplicated register loaded by cfg_we; every clock domain has its own reset
// synchroniser. The analogue front end, ADCs, DLL, PLL, SLVS pads and the register
// interface (I2C) are outside this module: their digital signals are ports.
// The block chain and clocking follow the design description; the port list, the
// configuration record and the pipeline latencies are this design's choices.
module salt_digital
  import salt_pkg::*;
(
  input  logic                      main_clk,
  input  logic                      adc_clk,
  input  logic                      calib_clk,
  input  logic                      data_clk,
  input  logic                      rst_n,
  // ADC samples, adc_clk domain
  input  logic [NCH-1:0][ADC_W-1:0] adc_data,
  // TFC DDR input, data_clk domain (after the SLVS receiver)
  input  logic                      tfc_in,
  // configuration write, main_clk domain
  input  logic                      cfg_we,
  input  salt_cfg_t                 cfg_wdata,
  output salt_cfg_t                 cfg,
  // e-link outputs, data_clk domain (to the DDR SLVS drivers)
  output logic [N_ELINK-1:0]        dout_rise,
  output logic [N_ELINK-1:0]        dout_fall,
  // test pulse strobes to the front end, calib_clk domain
  output logic [NCH-1:0]            cal_strobe,
  // status, main_clk domain
  output logic [N_ELINK-1:0][7:0]   frame,
  output logic [7:0]                tfc_cmd_deser,
  output logic [11:0]               bxid,
  output logic [N_TFC-1:0][15:0]    tfc_count,
  output logic [N_TFC-1:0][15:0]    tfc_snapshot,
  output logic [15:0]               seu_count,
  output logic                      pkt_wr,
  output pkt_kind_e                 pkt_kind,
  output logic                      mem_overflow,
  output logic                      idle_sent,
  output logic                      sync_sent
);
  // ---------------- resets ----------------
  logic main_rst_n, adc_rst_n, calib_rst_n, data_rst_n;
  reset_sync u_rst_main  (.clk(main_clk),  .rst_n(rst_n), .rst_sync_n(main_rst_n));
  reset_sync u_rst_adc   (.clk(adc_clk),   .rst_n(rst_n), .rst_sync_n(adc_rst_n));
  reset_sync u_rst_calib (.clk(calib_clk), .rst_n(rst_n), .rst_sync_n(calib_rst_n));
  reset_sync u_rst_data  (.clk(data_clk),  .rst_n(rst_n), .rst_sync_n(data_rst_n));

  // ---------------- configuration ----------------
  logic cfg_seu;
  tmr_reg #(.W($bits(salt_cfg_t))) u_cfg (
    .clk(main_clk), .rst_n(main_rst_n), .load(cfg_we), .d(cfg_wdata), .q(cfg),
    .mismatch(cfg_seu));

  // ---------------- TFC path ----------------
  tfc_cmd_t tfc_cmd;          // after the TFC FIFO
  deserializer u_deser (
    .data_clk(data_clk), .data_rst_n(data_rst_n), .ddr_in(tfc_in),
    .first_bit(cfg.deser_cfg[2:0]), .main_clk(main_clk), .main_rst_n(main_rst_n),
    .tfc_cmd_deser(tfc_cmd_deser));

  tfc_fifo #(.W(8), .DEPTH(256)) u_tfc_fifo (
    .clk(main_clk), .rst_n(main_rst_n), .len(cfg.tfc_fifo_len),
    .din(tfc_cmd_deser), .dout(tfc_cmd));

  logic bxid_seu;
  bxid_counter u_bxid (
    .clk(main_clk), .rst_n(main_rst_n), .bxreset(tfc_cmd.bxreset), .bxid(bxid),
    .seu(bxid_seu));

  tfc_counters #(.CW(16)) u_tfc_cnt (
    .clk(main_clk), .rst_n(main_rst_n), .cmd(tfc_cmd), .count(tfc_count),
    .snapshot(tfc_snapshot), .seu_in(cfg_seu | bxid_seu), .seu_count(seu_count));

  // ---------------- test pulse ----------------
  logic calib_tfc;
  tfc_fifo #(.W(1), .DEPTH(256)) u_cal_delay (
    .clk(main_clk), .rst_n(main_rst_n), .len(cfg.cal_delay),
    .din(tfc_cmd_deser[6]), .dout(calib_tfc));

  test_pulse u_tp (
    .calib_clk(calib_clk), .calib_rst_n(calib_rst_n), .calib_tfc(calib_tfc),
    .cal_len(cfg.cal_len), .cal_inv(cfg.cal_inv), .cal_ena(cfg.cal_ena),
    .cal_strobe(cal_strobe));

  // ---------------- DSP ----------------
  logic [NCH-1:0][ADC_W-1:0] adc_m;
  adc_fifo #(.W(NCH * ADC_W)) u_adc_fifo (
    .adc_clk(adc_clk), .adc_rst_n(adc_rst_n), .din(adc_data),
    .main_clk(main_clk), .main_rst_n(main_rst_n), .dout(adc_m));

  logic [NCH-1:0][ZS_W-1:0] v_mcm;
  logic signed [ADC_W:0]    mcm_value;
  logic [7:0]               mcm_channels;
  ped_mcm u_ped_mcm (
    .clk(main_clk), .rst_n(main_rst_n), .adc(adc_m), .pedestal(cfg.pedestal),
    .ch_mask(cfg.ch_mask), .mcm_thr(cfg.mcm_thr), .dout(v_mcm),
    .mcm_value(mcm_value), .mcm_channels(mcm_channels));

  word_t [MAX_HITS-1:0] hits;
  logic [7:0]           nhits;
  zs u_zs (
    .clk(main_clk), .rst_n(main_rst_n), .din(v_mcm), .ch_mask(cfg.ch_mask),
    .zs_thr(cfg.zs_thr), .hits(hits), .nhits(nhits));

  // Raw samples, common mode and TFC/BXID brought in step with the ZS output
  logic [NCH-1:0][ADC_W-1:0] raw_d;
  pipe_delay #(.W(NCH * ADC_W), .N(L_MCM + L_ZS)) u_raw_dly (
    .clk(main_clk), .rst_n(main_rst_n), .din(adc_m), .dout(raw_d));

  logic [ADC_W+8:0] mcm_d;
  pipe_delay #(.W(ADC_W + 9), .N(L_ZS)) u_mcm_dly (
    .clk(main_clk), .rst_n(main_rst_n), .din({mcm_value, mcm_channels}), .dout(mcm_d));

  tfc_cmd_t    cmd_pck;
  logic [11:0] bxid_pck;
  pipe_delay #(.W(20), .N(L_MCM + L_ZS)) u_tfc_dly1 (
    .clk(main_clk), .rst_n(main_rst_n), .din({tfc_cmd, bxid}), .dout({cmd_pck, bxid_pck}));

  tfc_cmd_t    cmd_mem;
  logic [11:0] bxid_mem;
  pipe_delay #(.W(20), .N(L_PKG)) u_tfc_dly2 (
    .clk(main_clk), .rst_n(main_rst_n), .din({cmd_pck, bxid_pck}), .dout({cmd_mem, bxid_mem}));

  // ---------------- back end ----------------
  localparam int RAM_W   = 4;
  localparam int MEM_CAP = 32 * 16 * RAM_W;      // multi_mem capacity in words
  word_t [MAX_PKT-1:0] pk_words;
  logic [6:0]          pk_n;
  logic [11:0]         free_words, pck_free;
  logic                flush;
  // space left for the packet pck is building now: the packet being written this clock
  // (one crossing earlier) is not yet counted in free_words, and a flush this clock empties
  // the memory first
  always_comb begin
    automatic logic [11:0] base = flush ? 12'(MEM_CAP) : free_words;
    pck_free = (base > 12'(pk_n)) ? base - 12'(pk_n) : '0;
  end
  pck u_pck (
    .clk(main_clk), .rst_n(main_rst_n), .cmd(cmd_pck), .bxid(bxid_pck), .hits(hits),
    .nhits(nhits), .raw(raw_d), .mcm_value(mcm_d[ADC_W+8:8]), .mcm_channels(mcm_d[7:0]),
    .free_words(pck_free), .words(pk_words), .nwords(pk_n), .wr(pkt_wr),
    .kind(pkt_kind));

  logic              mem_rd_en, mem_rd_valid, mem_empty;
  word_t [RAM_W-1:0] mem_rd_data;
  assign flush = cmd_mem.synch | cmd_mem.fereset;

  multi_mem #(.RAM_W(RAM_W), .N_INST(32), .RAM_DEPTH(16)) u_mem (
    .clk(main_clk), .rst_n(main_rst_n), .flush(flush), .wr(pkt_wr), .words(pk_words),
    .nwords(pk_n), .rd_en(mem_rd_en), .rd_valid(mem_rd_valid), .rd_data(mem_rd_data),
    .empty(mem_empty), .free_words(free_words), .overflow(mem_overflow));

  word_t [3:0] peek;
  logic [7:0]  ob_count;
  logic [2:0]  pop;
  out_buf #(.RAM_W(RAM_W), .CAP(128)) u_out_buf (
    .clk(main_clk), .rst_n(main_rst_n), .flush(flush), .mem_empty(mem_empty),
    .mem_rd_en(mem_rd_en), .mem_rd_valid(mem_rd_valid), .mem_rd_data(mem_rd_data),
    .peek(peek), .count(ob_count), .pop(pop));

  logic [N_ELINK-1:0][7:0] conv_frame;
  converter u_conv (
    .clk(main_clk), .rst_n(main_rst_n), .n_elinks(cfg.n_elinks), .sync(cmd_mem.synch), .flush(flush),
    .bxid(bxid_mem), .sync_pattern(cfg.sync_pattern), .peek(peek), .count(ob_count),
    .pop(pop), .frame(conv_frame), .idle_sent(idle_sent), .sync_sent(sync_sent));

  // serializer source: packet data, or one of the link test sources used when the
  // e-links are brought up (fixed pattern, TFC byte sent back, free-running counter)
  logic [7:0] ser_cnt;
  always_ff @(posedge main_clk or negedge main_rst_n)
    if (!main_rst_n) ser_cnt <= '0;
    else             ser_cnt <= ser_cnt + 8'd1;

  always_comb
    unique case (cfg.ser_mode)
      SER_PATTERN:  frame = {N_ELINK{cfg.ser_pattern}};
      SER_LOOPBACK: frame = {N_ELINK{tfc_cmd_deser}};
      SER_COUNTER:  frame = {N_ELINK{ser_cnt}};
      default:      frame = conv_frame;
    endcase

  logic ser_load;
  serializer u_ser (
    .main_clk(main_clk), .main_rst_n(main_rst_n), .frame(frame), .data_clk(data_clk),
    .data_rst_n(data_rst_n), .dout_rise(dout_rise), .dout_fall(dout_fall),
    .load(ser_load));

  logic unused;
  assign unused = ser_load ^ ^cmd_mem[7:5] ^ ^cmd_mem[3:0];
endmodule
