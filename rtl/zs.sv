// zs: zero suppression of one bunch crossing, all channels in parallel.
//
// A channel is a hit when it is not masked and its 5-bit value is above zs_thr. A hit is
// the 12-bit word {channel number (7 bits), value (5 bits)}. The hits are then packed
// towards slot 0 by a tree of zs_merge crossbars: groups of four channels are compacted
// first, then pairs of groups are merged, each merge placing the second group's hits right
// after the n1 hits of the first (slot n1 + j). The tree is cut into five register stages,
// so the latency is constant, L_ZS = 5 clocks, whatever the hit pattern:
//   1: threshold and 4-channel compaction   2: 8-channel merge
//   3: merges up to 32 channels             4: merges up to 64 channels
//   5: the final merge, kept to MAX_HITS = 63 slots, and the full hit count.
// nhits counts all hits (0..128); the packet builder turns more than 63 into a BusyEvent.
// The hit format, the 5-bit input, the latency of 5, the 63-hit limit and the two-level
// 4+4 compaction network follow the design description; how the tree is split into
// register stages above 8 channels is this design's choice. One sample set per clock.
module zs
  import salt_pkg::*;
(
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic [NCH-1:0][ZS_W-1:0] din,
  input  logic [NCH-1:0]           ch_mask,
  input  logic [ZS_W-1:0]          zs_thr,
  output word_t [MAX_HITS-1:0]     hits,
  output logic [7:0]               nhits
);
  localparam int G4 = NCH / 4;

  // ---------------- stage 1: threshold and groups of 4 ----------------
  word_t [NCH-1:0] w0;
  logic  [NCH-1:0] h0;
  always_comb begin
    for (int i = 0; i < NCH; i++) begin
      h0[i] = !ch_mask[i] && (din[i] > zs_thr);
      w0[i] = h0[i] ? {CH_W'(i), din[i]} : '0;
    end
  end

  word_t [G4-1:0][3:0] c4_d;
  logic  [G4-1:0][2:0] n4_d;
  word_t [G4-1:0][3:0] c4_q;
  logic  [G4-1:0][2:0] n4_q;

  for (genvar g = 0; g < G4; g++) begin : g_c4
    word_t [1:0] p0, p1;
    logic  [1:0] m0, m1;
    zs_merge #(.N(1), .DW(WORD_W)) u_m0 (
      .a(w0[4*g]),   .na(h0[4*g]),   .b(w0[4*g+1]), .nb(h0[4*g+1]), .y(p0), .ny(m0));
    zs_merge #(.N(1), .DW(WORD_W)) u_m1 (
      .a(w0[4*g+2]), .na(h0[4*g+2]), .b(w0[4*g+3]), .nb(h0[4*g+3]), .y(p1), .ny(m1));
    zs_merge #(.N(2), .DW(WORD_W)) u_m2 (
      .a(p0), .na(m0), .b(p1), .nb(m1), .y(c4_d[g]), .ny(n4_d[g]));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin c4_q <= '0; n4_q <= '0; end
    else        begin c4_q <= c4_d; n4_q <= n4_d; end
  end

  // ---------------- stage 2: groups of 8 ----------------
  localparam int G8 = NCH / 8;
  word_t [G8-1:0][7:0] c8_d, c8_q;
  logic  [G8-1:0][3:0] n8_d, n8_q;
  for (genvar g = 0; g < G8; g++) begin : g_c8
    zs_merge #(.N(4), .DW(WORD_W)) u_m (
      .a(c4_q[2*g]), .na(n4_q[2*g]), .b(c4_q[2*g+1]), .nb(n4_q[2*g+1]),
      .y(c8_d[g]), .ny(n8_d[g]));
  end
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin c8_q <= '0; n8_q <= '0; end
    else        begin c8_q <= c8_d; n8_q <= n8_d; end
  end

  // ---------------- stage 3: groups of 16 then 32 ----------------
  localparam int G16 = NCH / 16;
  localparam int G32 = NCH / 32;
  word_t [G16-1:0][15:0] c16;
  logic  [G16-1:0][4:0]  n16;
  word_t [G32-1:0][31:0] c32_d, c32_q;
  logic  [G32-1:0][5:0]  n32_d, n32_q;
  for (genvar g = 0; g < G16; g++) begin : g_c16
    zs_merge #(.N(8), .DW(WORD_W)) u_m (
      .a(c8_q[2*g]), .na(n8_q[2*g]), .b(c8_q[2*g+1]), .nb(n8_q[2*g+1]),
      .y(c16[g]), .ny(n16[g]));
  end
  for (genvar g = 0; g < G32; g++) begin : g_c32
    zs_merge #(.N(16), .DW(WORD_W)) u_m (
      .a(c16[2*g]), .na(n16[2*g]), .b(c16[2*g+1]), .nb(n16[2*g+1]),
      .y(c32_d[g]), .ny(n32_d[g]));
  end
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin c32_q <= '0; n32_q <= '0; end
    else        begin c32_q <= c32_d; n32_q <= n32_d; end
  end

  // ---------------- stage 4: groups of 64 ----------------
  localparam int G64 = NCH / 64;
  word_t [G64-1:0][63:0] c64_d, c64_q;
  logic  [G64-1:0][6:0]  n64_d, n64_q;
  for (genvar g = 0; g < G64; g++) begin : g_c64
    zs_merge #(.N(32), .DW(WORD_W)) u_m (
      .a(c32_q[2*g]), .na(n32_q[2*g]), .b(c32_q[2*g+1]), .nb(n32_q[2*g+1]),
      .y(c64_d[g]), .ny(n64_d[g]));
  end
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin c64_q <= '0; n64_q <= '0; end
    else        begin c64_q <= c64_d; n64_q <= n64_d; end
  end

  // ---------------- stage 5: all channels, first 63 slots ----------------
  word_t [127:0] c128;
  logic  [7:0]   n128;
  zs_merge #(.N(64), .DW(WORD_W)) u_m128 (
    .a(c64_q[0]), .na(n64_q[0]), .b(c64_q[1]), .nb(n64_q[1]), .y(c128), .ny(n128));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin hits <= '0; nhits <= '0; end
    else begin
      hits  <= c128[MAX_HITS-1:0];
      nhits <= n128;
    end
  end
endmodule
