// xmatch_compressor: a single 32-bit dictionary compressor.
//
// Every clock in which start is high it takes one four-byte tuple on data
// and searches all DEPTH dictionary words for it at once: a comparator on
// each word drives one matchline, and the cam_comparator encodes the
// matchlines. A full match leaves as (match_hit = 1, addr_out = location);
// a miss leaves as (match_hit = 0, data_out = tuple), and the tuple is
// written into the dictionary array so that later copies of it match.
// Since only unmatched tuples are stored, no two valid words are equal and
// at most one matchline is ever set.
//
// Interface: clk, rst (synchronous, active high, empties the dictionary),
// start/data in; addr_out, match_hit, data_out, out_valid out.
// Timing: one tuple per clock, outputs one clock after the tuple. A tuple
// that repeats the one just before it matches, because the store and the
// search of the next tuple are one clock apart.
//
// The block structure (array, comparator, CAM comparator), the 64 x 32
// dictionary and the full-match output are the design's. Partial matches
// are not coded. The fill and replacement order of the dictionary, the
// out_valid flag and the reset are this implementation's choices.
module xmatch_compressor #(
  parameter int unsigned WIDTH = xmatch_pkg::TUPLE_W,
  parameter int unsigned DEPTH = xmatch_pkg::DICT_SIZE,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             start,
  input  logic [WIDTH-1:0] data,
  output logic [AW-1:0]    addr_out,
  output logic             match_hit,
  output logic [WIDTH-1:0] data_out,
  output logic             out_valid
);

  logic [DEPTH-1:0][WIDTH-1:0] words;
  logic [DEPTH-1:0]            valid;
  logic [DEPTH-1:0]            matchlines;
  logic                        store;

  dict_array #(.WIDTH(WIDTH), .DEPTH(DEPTH)) u_array (
    .clk    (clk),
    .rst    (rst),
    .wr_en  (store),
    .wr_data(data),
    .words  (words),
    .valid  (valid)
  );

  for (genvar i = 0; i < DEPTH; i++) begin : g_cmp
    comparator #(.WIDTH(WIDTH)) u_cmp (
      .a (data),
      .b (words[i]),
      .en(valid[i]),
      .eq(matchlines[i])
    );
  end

  cam_comparator #(.WIDTH(WIDTH), .DEPTH(DEPTH)) u_cam (
    .clk       (clk),
    .rst       (rst),
    .start     (start),
    .data      (data),
    .matchlines(matchlines),
    .store     (store),
    .addr_out  (addr_out),
    .match_hit (match_hit),
    .data_out  (data_out),
    .out_valid (out_valid)
  );

endmodule
