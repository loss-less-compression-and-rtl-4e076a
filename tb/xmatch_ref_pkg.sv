// xmatch_ref_pkg: a behavioural reference model of the dictionary coder,
// used by the testbenches to work out the expected codes.
//
// The model keeps the dictionary as a plain list searched one entry at a
// time: a tuple found in it gives a match code with its location, a tuple
// not found is stored at the next location, wrapping to 0 after the last
// one. Decoding reads a location or stores a literal the same way.
package xmatch_ref_pkg;

  class xmatch_model;
    int unsigned  depth;
    logic [31:0]  dict[];
    bit           used[];
    int unsigned  ptr;
    int unsigned  replaced;   // stores that overwrote a used entry

    function new(int unsigned depth_i);
      depth = depth_i;
      dict  = new[depth];
      used  = new[depth];
      clear();
    endfunction

    function void clear();
      foreach (used[i]) used[i] = 0;
      ptr      = 0;
      replaced = 0;
    endfunction

    // Returns 1 and the location on a match; stores the tuple on a miss.
    function bit encode(logic [31:0] t, output int unsigned loc);
      for (int unsigned i = 0; i < depth; i++) begin
        if (used[i] && dict[i] == t) begin
          loc = i;
          return 1;
        end
      end
      loc = 0;
      store(t);
      return 0;
    endfunction

    function logic [31:0] decode(bit hit, int unsigned loc, logic [31:0] lit);
      if (hit) return dict[loc];
      store(lit);
      return lit;
    endfunction

    function void store(logic [31:0] t);
      if (used[ptr]) replaced++;
      dict[ptr] = t;
      used[ptr] = 1;
      ptr = (ptr + 1) % depth;
    endfunction
  endclass

endpackage
