// cam_comparator: decides, for each incoming tuple, between a match code
// and a literal.
//
// It takes the search word (data, valid when start is high) and the
// matchlines that the comparators produce against every dictionary word.
// A match_encoder turns the matchlines into a hit flag and a match
// location. On a full match the next clock shows match_hit = 1 and the
// location on addr_out. On a miss it shows match_hit = 0 and the tuple
// itself on data_out, and in the same clock as the search it raises store
// so that the dictionary keeps the unmatched tuple. out_valid marks the
// clocks in which the outputs hold a code.
//
// The hit/location/literal behaviour is the design's. The registered
// outputs (one clock after start), data_out = 0 on a hit, the out_valid
// flag and the synchronous active-high reset are this implementation's
// choices. One tuple is accepted every clock.
module cam_comparator #(
  parameter int unsigned WIDTH = xmatch_pkg::TUPLE_W,
  parameter int unsigned DEPTH = xmatch_pkg::DICT_SIZE,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             start,
  input  logic [WIDTH-1:0] data,
  input  logic [DEPTH-1:0] matchlines,
  output logic             store,
  output logic [AW-1:0]    addr_out,
  output logic             match_hit,
  output logic [WIDTH-1:0] data_out,
  output logic             out_valid
);

  logic          hit;
  logic [AW-1:0] location;

  match_encoder #(.DEPTH(DEPTH)) u_encoder (
    .matchlines(matchlines),
    .hit       (hit),
    .location  (location)
  );

  always_comb store = start && !hit;

  always_ff @(posedge clk) begin
    if (rst) begin
      out_valid <= 1'b0;
      match_hit <= 1'b0;
      addr_out  <= '0;
      data_out  <= '0;
    end else begin
      out_valid <= start;
      if (start) begin
        match_hit <= hit;
        addr_out  <= hit ? location : '0;
        data_out  <= hit ? '0 : data;
      end
    end
  end

endmodule
