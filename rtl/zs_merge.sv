// zs_merge: joins two compacted hit lists into one.
//
// List a holds na valid hits in its lowest slots and list b holds nb. The output holds the
// hits of a followed by those of b: slot i takes a[i] when i < na and b[i - na] otherwise,
// so every output slot is a small multiplexer over the slots of a and b that can land on
// it, which is the crossbar of the zero-suppression compaction network. Unused output slots
// are zero. Purely combinational.
module zs_merge #(
  parameter int unsigned N  = 4,   // slots per input list
  parameter int unsigned DW = 12,  // bits per slot
  parameter int unsigned CW = $clog2(N + 1)  // width of a hit count
) (
  input  logic [N-1:0][DW-1:0]   a,
  input  logic [CW-1:0]          na,
  input  logic [N-1:0][DW-1:0]   b,
  input  logic [CW-1:0]          nb,
  output logic [2*N-1:0][DW-1:0] y,
  output logic [CW:0]            ny
);
  always_comb begin
    ny = {1'b0, na} + {1'b0, nb};
    for (int i = 0; i < 2 * N; i++) begin
      y[i] = '0;
      if (i < int'(na)) y[i] = a[i];
      else if (i - int'(na) < int'(nb)) y[i] = b[i - int'(na)];
    end
  end
endmodule
