// xmatch_decompressor: restores the tuples from the compressor's codes.
//
// Decompression is the compressor run in reverse. Each clock in which
// valid_in is high one code arrives: a match (match_hit = 1) names a
// dictionary location, and the tuple is read from there; a literal
// (match_hit = 0) is the tuple itself, which is passed out and written
// into the local dictionary. The local dictionary is the same dict_array
// the compressor uses, filled in the same order by the same literals, so
// both sides hold the same word at every location at every point of the
// stream.
//
// Interface: clk, rst (synchronous, active high; must be applied together
// with the compressor's), valid_in/match_hit/addr_in/data_in in;
// valid_out/data_out out. Timing: one code per clock, the tuple one clock
// after its code.
//
// Only the function is the design's ("the reverse of compression"); the
// code format follows the compressor's outputs, and the rest is this
// implementation's choice. An assertion flags a match on an empty
// location, which a stream from the compressor never produces.
module xmatch_decompressor #(
  parameter int unsigned WIDTH = xmatch_pkg::TUPLE_W,
  parameter int unsigned DEPTH = xmatch_pkg::DICT_SIZE,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             valid_in,
  input  logic             match_hit,
  input  logic [AW-1:0]    addr_in,
  input  logic [WIDTH-1:0] data_in,
  output logic             valid_out,
  output logic [WIDTH-1:0] data_out
);

  logic [DEPTH-1:0][WIDTH-1:0] words;
  logic [DEPTH-1:0]            valid;
  logic                        store;

  always_comb store = valid_in && !match_hit;

  dict_array #(.WIDTH(WIDTH), .DEPTH(DEPTH)) u_array (
    .clk    (clk),
    .rst    (rst),
    .wr_en  (store),
    .wr_data(data_in),
    .words  (words),
    .valid  (valid)
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      valid_out <= 1'b0;
      data_out  <= '0;
    end else begin
      valid_out <= valid_in;
      if (valid_in) data_out <= match_hit ? words[addr_in] : data_in;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst && valid_in && match_hit)
      assert (valid[addr_in])
        else $error("xmatch_decompressor: match to empty location %0d", addr_in);
  end

endmodule
