// tmr_reg: triplicated, self-correcting register.
//
// Three copies hold the same value; the output is their bitwise majority. On every clock
// each copy is loaded with d when load is high and otherwise with the voted value, so a
// single-event upset in one copy is removed on the next clock edge. mismatch is high while
// the copies disagree; it lets a block count the corrections it made (its SEU counter).
// Triplication with self-correction follows the design description; the voting and the
// mismatch output are this design's implementation.
module tmr_reg #(
  parameter int unsigned     W         = 8,
  parameter logic [W-1:0]    RESET_VAL = '0
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         load,
  input  logic [W-1:0] d,
  output logic [W-1:0] q,
  output logic         mismatch
);
  logic [W-1:0] copy0, copy1, copy2;

  assign q        = (copy0 & copy1) | (copy1 & copy2) | (copy0 & copy2);
  assign mismatch = (copy0 != copy1) || (copy1 != copy2);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      copy0 <= RESET_VAL;
      copy1 <= RESET_VAL;
      copy2 <= RESET_VAL;
    end else begin
      copy0 <= load ? d : q;
      copy1 <= load ? d : q;
      copy2 <= load ? d : q;
    end
  end
endmodule
