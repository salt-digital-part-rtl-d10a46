// tfc_counters: one counter per TFC command and a snapshot register for each, all
// triplicated, plus an SEU counter.
//
// Every clock each counter whose command bit is set in cmd counts up by one (16 bits,
// wrapping). A Snapshot command copies all counter values, as they were before this
// clock's increments, into the snapshot registers. FEReset clears the counters (the
// FEReset counter itself then counts the FEReset just seen, so it reads 1). Every register
// is a self-correcting tmr_reg; seu_count counts the clocks in which any of them had to
// correct a copy, or in which seu_in reports a correction in another triplicated register
// of the chip (configuration, BXID), and is itself triplicated ("corrected by +1": its copies are loaded with
// the voted value plus one when it counts).
// One counter and one snapshot per command, reset by FEReset, and the triplication follow
// the design description; the 16-bit width and the snapshot/increment ordering are this
// design's choices. The outputs are read through the register interface of the chip.
module tfc_counters
  import salt_pkg::*;
#(
  parameter int unsigned CW = 16
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  tfc_cmd_t                cmd,
  output logic [N_TFC-1:0][CW-1:0] count,
  output logic [N_TFC-1:0][CW-1:0] snapshot,
  input  logic                    seu_in,     // correction elsewhere this clock
  output logic [15:0]             seu_count
);
  logic [N_TFC-1:0] cmd_bits;
  logic [2*N_TFC-1:0] mm;
  logic seu_mm;

  assign cmd_bits = cmd;

  for (genvar i = 0; i < N_TFC; i++) begin : g_cnt
    logic [CW-1:0] base;
    assign base = cmd.fereset ? '0 : count[i];
    tmr_reg #(.W(CW)) u_cnt (
      .clk(clk), .rst_n(rst_n), .load(1'b1),
      .d(base + CW'(cmd_bits[i])), .q(count[i]), .mismatch(mm[i]));
    tmr_reg #(.W(CW)) u_snap (
      .clk(clk), .rst_n(rst_n), .load(cmd.snapshot),
      .d(count[i]), .q(snapshot[i]), .mismatch(mm[N_TFC + i]));
  end

  tmr_reg #(.W(16)) u_seu (
    .clk(clk), .rst_n(rst_n), .load(1'b1),
    .d(seu_count + 16'(|mm | seu_in)), .q(seu_count), .mismatch(seu_mm));

  // The SEU counter's own disagreement is corrected by the vote and not counted
  logic unused;
  assign unused = seu_mm;
endmodule
