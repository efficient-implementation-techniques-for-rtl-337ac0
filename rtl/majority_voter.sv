// majority_voter: bit-by-bit 2-out-of-3 majority voter of a triple modular
// redundant (TMR) channel set.
//
// Each output bit is the majority of the three input bits. The voter also
// reports, per channel, whether that channel's word differs from the voted
// word in any bit (the channel that a masked fault came from), and whether
// the three words did not all agree. It is purely combinational; the caller
// registers the result. Taking the majority bit by bit is as in the document
// ("bit-by-bit majority voter"); the per-channel disagreement flags are this
// design's own addition, used to report which channel was masked.
module majority_voter #(
  parameter int unsigned W = 32  // word width (24-bit address + 8-bit data)
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic [W-1:0] c,
  output logic [W-1:0] maj,       // voted word
  output logic [2:0]   disagree,  // channel i differs from the voted word
  output logic         mismatch   // not all three words are equal
);

  always_comb begin
    maj         = (a & b) | (a & c) | (b & c);
    disagree[0] = (a != maj);
    disagree[1] = (b != maj);
    disagree[2] = (c != maj);
    mismatch    = |disagree;
  end

endmodule
