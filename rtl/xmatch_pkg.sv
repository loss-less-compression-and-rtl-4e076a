// xmatch_pkg: sizes shared by the dictionary compressor and
// decompressor.
//
// A tuple is one 32-bit word (four bytes), the unit the compressor takes
// in every clock. The dictionary holds 64 tuples, the largest of the three
// dictionary lengths (16, 32, 64) the design allows and the one its block
// diagram uses. A match location therefore takes log2(64) = 6 bits.
package xmatch_pkg;

  localparam int unsigned TUPLE_W   = 32;  // bits per tuple (four bytes)
  localparam int unsigned DICT_SIZE = 64;  // dictionary entries

endpackage
