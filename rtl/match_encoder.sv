// match_encoder: turns DEPTH matchlines into a binary match location.
//
// hit is the OR of all matchlines; location is the index of the set
// matchline, log2(DEPTH) bits wide. As in a CAM where only one stored word
// can equal the search word, the encoder assumes at most one matchline is
// set: each location bit is the OR of the matchlines whose index has that
// bit set. An assertion flags more than one set matchline. Purely
// combinational. The encoder's function and output width are the
// design's; the OR structure is this implementation's.
module match_encoder #(
  parameter int unsigned DEPTH = xmatch_pkg::DICT_SIZE,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic [DEPTH-1:0] matchlines,
  output logic             hit,
  output logic [AW-1:0]    location
);

  always_comb begin
    hit      = |matchlines;
    location = '0;
    for (int unsigned i = 0; i < DEPTH; i++) begin
      if (matchlines[i]) location = location | AW'(i);
    end
  end

  always_comb begin
    assert ($onehot0(matchlines))
      else $error("match_encoder: more than one matchline set: %h", matchlines);
  end

endmodule
