// lossless_codec_top: the 32-bit lossless compression system.
//
// It holds one dictionary compressor and one decompressor side by side,
// each with its own pins, so that the codes can be stored or sent between
// them. The compressor pins are those of the system's block diagram (CLK,
// RST, DATA, START, ADDR OUT, MATCH HIT, DATA OUT) plus out_valid. The
// decompressor takes a code (dec_valid_in, dec_match_hit, dec_addr_in,
// dec_data_in) and returns the tuple on dec_data_out one clock later.
// Feeding the compressor's outputs into the decompressor's inputs, in the
// same order and after a common reset, reproduces the input stream.
//
// Both halves take one tuple or code per clock. rst is synchronous and
// active high. Placing the two halves side by side, rather than joined
// inside, is this implementation's choice.
module lossless_codec_top #(
  parameter int unsigned WIDTH = xmatch_pkg::TUPLE_W,
  parameter int unsigned DEPTH = xmatch_pkg::DICT_SIZE,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             rst,
  // compressor
  input  logic             start,
  input  logic [WIDTH-1:0] data,
  output logic [AW-1:0]    addr_out,
  output logic             match_hit,
  output logic [WIDTH-1:0] data_out,
  output logic             out_valid,
  // decompressor
  input  logic             dec_valid_in,
  input  logic             dec_match_hit,
  input  logic [AW-1:0]    dec_addr_in,
  input  logic [WIDTH-1:0] dec_data_in,
  output logic             dec_valid_out,
  output logic [WIDTH-1:0] dec_data_out
);

  xmatch_compressor #(.WIDTH(WIDTH), .DEPTH(DEPTH)) u_compressor (
    .clk      (clk),
    .rst      (rst),
    .start    (start),
    .data     (data),
    .addr_out (addr_out),
    .match_hit(match_hit),
    .data_out (data_out),
    .out_valid(out_valid)
  );

  xmatch_decompressor #(.WIDTH(WIDTH), .DEPTH(DEPTH)) u_decompressor (
    .clk      (clk),
    .rst      (rst),
    .valid_in (dec_valid_in),
    .match_hit(dec_match_hit),
    .addr_in  (dec_addr_in),
    .data_in  (dec_data_in),
    .valid_out(dec_valid_out),
    .data_out (dec_data_out)
  );

endmodule
