// dict_array: the compressor's dictionary, DEPTH words of WIDTH bits.
//
// It stores the tuples that found no match. Every word is brought out at
// once (words, valid) because the search compares the input against all
// entries in the same clock. A store (wr_en) writes wr_data at wr_ptr,
// sets that word's valid bit and advances wr_ptr; after the last word the
// pointer wraps to 0, so a full dictionary replaces its oldest entry.
// Reset (synchronous, active high) clears the valid bits and the pointer;
// the words themselves need no reset because an invalid word never
// matches.
//
// The 64 x 32 size is the design's; the fill order, the round-robin
// replacement and the valid bits are this implementation's choices.
// Timing: a store is visible on words/valid in the next clock.
module dict_array #(
  parameter int unsigned WIDTH = xmatch_pkg::TUPLE_W,
  parameter int unsigned DEPTH = xmatch_pkg::DICT_SIZE,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic                        clk,
  input  logic                        rst,
  input  logic                        wr_en,
  input  logic [WIDTH-1:0]            wr_data,
  output logic [DEPTH-1:0][WIDTH-1:0] words,
  output logic [DEPTH-1:0]            valid
);

  logic [AW-1:0] wr_ptr;  // location the next store goes to

  always_ff @(posedge clk) begin
    if (wr_en) words[wr_ptr] <= wr_data;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      valid  <= '0;
      wr_ptr <= '0;
    end else if (wr_en) begin
      valid[wr_ptr] <= 1'b1;
      wr_ptr        <= (wr_ptr == AW'(DEPTH - 1)) ? '0 : wr_ptr + 1'b1;
    end
  end

endmodule
