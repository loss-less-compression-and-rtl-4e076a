// codec_size_checker: runs one compression system of a given dictionary
// size in loopback on a shared input stream and checks it against the
// reference model.
//
// The parent drives start/data and rst. Each code is checked one clock
// after its tuple, each restored tuple two clocks after it. The counters
// checks, failures and hits are read by the parent.
module codec_size_checker #(
  parameter int DEPTH = 64
) (
  input logic        clk,
  input logic        rst,
  input logic        start,
  input logic [31:0] data
);
  import xmatch_ref_pkg::*;
  localparam int AW = $clog2(DEPTH);

  logic [AW-1:0] addr_out;
  logic          match_hit, out_valid, dec_valid_out;
  logic [31:0]   data_out, dec_data_out;
  int checks = 0, failures = 0, hits = 0, replaced = 0;

  lossless_codec_top #(.WIDTH(32), .DEPTH(DEPTH)) dut (
    .clk(clk), .rst(rst),
    .start(start), .data(data),
    .addr_out(addr_out), .match_hit(match_hit), .data_out(data_out),
    .out_valid(out_valid),
    .dec_valid_in(out_valid), .dec_match_hit(match_hit),
    .dec_addr_in(addr_out), .dec_data_in(data_out),
    .dec_valid_out(dec_valid_out), .dec_data_out(dec_data_out));

  xmatch_model m = new(DEPTH);
  bit          ev1 = 0, ev2 = 0, eh1 = 0;
  int unsigned el1 = 0;
  logic [31:0] et1 = '0, et2 = '0;

  // Sample the inputs at the edge that registers them, then check the
  // outputs that edge produced.
  always @(posedge clk) begin
    automatic bit          h = 0;
    automatic int unsigned loc = 0;
    if (rst) begin
      m.clear();
      ev1 = 0; ev2 = 0;
    end else begin
      ev2 = ev1; et2 = et1;
      if (start) begin
        h = m.encode(data, loc);
        if (h) hits++;
      end
      ev1 = start; eh1 = h; el1 = loc; et1 = data;
      replaced = m.replaced;
      #1;
      checks++;
      if (out_valid !== ev1 ||
          (ev1 && (match_hit !== eh1 || (eh1 && addr_out !== AW'(el1)) ||
                   (!eh1 && data_out !== et1)))) begin
        failures++;
        $display("FAIL depth %0d code hit=%0d addr=%0d exp valid=%0d hit=%0d addr=%0d",
                 DEPTH, match_hit, addr_out, ev1, eh1, el1);
      end
      checks++;
      if (dec_valid_out !== ev2 || (ev2 && dec_data_out !== et2)) begin
        failures++;
        $display("FAIL depth %0d restored %h exp %h", DEPTH, dec_data_out, et2);
      end
    end
  end
endmodule
