// bxid_counter: 12-bit bunch crossing identifier, triplicated and self-correcting.
//
// Counts main_clk cycles (one per bunch crossing) and wraps from 4095 to 0. A BXReset
// command seen in one clock makes bxid read 0 in the next clock; counting resumes from
// there. The three
// copies are loaded with voted value + 1 every clock, which removes a single upset.
// seu is high in a cycle in which the copies disagree. The 12-bit width (Sync packets
// carry BXID[11:0]), the BXReset command and triplication follow the design description;
// the reset value and wrap-around are this design's choices.
module bxid_counter (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        bxreset,
  output logic [11:0] bxid,
  output logic        seu
);
  tmr_reg #(.W(12)) u_tmr (
    .clk     (clk),
    .rst_n   (rst_n),
    .load    (1'b1),
    .d       (bxreset ? 12'd0 : bxid + 12'd1),
    .q       (bxid),
    .mismatch(seu)
  );
endmodule
