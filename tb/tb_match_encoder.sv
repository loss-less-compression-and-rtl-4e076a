// tb_match_encoder: drives every single set matchline and the empty case,
// and checks hit and the binary location.
module tb_match_encoder;
  localparam int DEPTH = 64;
  logic [DEPTH-1:0] ml;
  logic             hit;
  logic [5:0]       loc;
  int checks = 0, failures = 0;

  match_encoder #(.DEPTH(DEPTH)) dut (.matchlines(ml), .hit(hit), .location(loc));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ml = '0;
    #1;
    checks++;
    if (hit !== 1'b0) begin failures++; $display("FAIL hit with no matchline"); end
    for (int i = 0; i < DEPTH; i++) begin
      ml = '0;
      ml[i] = 1'b1;
      #1;
      checks++;
      if (hit !== 1'b1 || loc !== 6'(i)) begin
        failures++;
        $display("FAIL line %0d: hit=%0d loc=%0d", i, hit, loc);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
