// mat_bus: the wired-AND data lines and wired-OR invalidate line of the MAT
// bus, modelled as logic.
//
// Every node drives its word, or all ones when it is not transmitting; the
// bus carries the AND of all drivers, which is what open-collector lines
// pulled up to one would carry. The invalidate line is the OR of the nodes'
// invalidate outputs. Purely combinational.
// From the document: a wired-OR/AND bus. This design's own: which polarity
// is used for data (AND) and for invalidate (OR).
module mat_bus #(
  parameter int unsigned W     = 32,
  parameter int unsigned N     = 15
) (
  input  logic [W-1:0] drive [N],
  input  logic [N-1:0] inval,
  output logic [W-1:0] bus,
  output logic         inval_bus
);

  always_comb begin
    bus = '1;
    for (int i = 0; i < N; i++) bus &= drive[i];
    inval_bus = |inval;
  end

endmodule
