// comparator: 32-bit equality test, the cell behind one matchline.
//
// eq is 1 when the two words are identical and en is set, 0 otherwise.
// Purely combinational. In the compressor one comparator sits on every
// dictionary word: a is the search word broadcast to all of them, b the
// stored word, and en the word's valid bit, so an empty word never
// matches. The equal/unequal function is the design's; the enable input
// is this implementation's way of ignoring empty words.
module comparator #(
  parameter int unsigned WIDTH = xmatch_pkg::TUPLE_W
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             en,
  output logic             eq
);

  always_comb eq = en && (a == b);

endmodule
