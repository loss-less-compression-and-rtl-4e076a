// tb_lossless_codec_top: end-to-end test of the compression system at its
// default size (32-bit tuples, 64-entry dictionaries).
//
// The compressor's code outputs are wired back into the decompressor's
// code inputs, so every tuple goes through compression and decompression.
// Each code is checked against the reference model one clock after its
// tuple, and each restored tuple against the original two clocks after it.
// The test counts the mechanisms the design has and fails if one never
// happened: a full match, a miss that stores a literal, a match to the
// tuple stored in the clock just before, replacement of an entry once the
// dictionary is full, an idle clock (start low), and a reset in the middle
// of a stream. It also checks the rate: one code per tuple, in the clock
// after it.
module tb_lossless_codec_top;
  import xmatch_ref_pkg::*;
  localparam int DEPTH = 64;
  logic        clk = 0, rst, start;
  logic [31:0] data;
  logic [5:0]  addr_out;
  logic        match_hit, out_valid;
  logic [31:0] data_out;
  logic        dec_valid_out;
  logic [31:0] dec_data_out;
  int checks = 0, failures = 0;
  int n_hit = 0, n_miss = 0, n_b2b = 0, n_idle = 0, n_reset = 0;
  int n_codes = 0, n_tuples = 0;

  lossless_codec_top dut (
    .clk(clk), .rst(rst),
    .start(start), .data(data),
    .addr_out(addr_out), .match_hit(match_hit), .data_out(data_out),
    .out_valid(out_valid),
    .dec_valid_in(out_valid), .dec_match_hit(match_hit),
    .dec_addr_in(addr_out), .dec_data_in(data_out),
    .dec_valid_out(dec_valid_out), .dec_data_out(dec_data_out));

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  xmatch_model m;
  logic [31:0] hist[$];
  // expected values, index 1 = one clock after the tuple, 2 = two clocks
  bit          ev1, ev2;
  bit          eh1;
  int unsigned el1;
  logic [31:0] ed1, ed2;
  int unsigned replaced_total = 0;

  task automatic check_outputs();
    checks++;
    if (out_valid !== ev1) begin
      failures++;
      $display("FAIL out_valid=%0d exp=%0d at %0t", out_valid, ev1, $time);
    end else if (ev1) begin
      n_codes++;
      checks++;
      if (match_hit !== eh1 || (eh1 && addr_out !== 6'(el1)) ||
          (!eh1 && data_out !== ed1)) begin
        failures++;
        $display("FAIL code hit=%0d addr=%0d data=%h exp hit=%0d addr=%0d data=%h",
                 match_hit, addr_out, data_out, eh1, el1, ed1);
      end
    end
    checks++;
    if (dec_valid_out !== ev2 || (ev2 && dec_data_out !== ed2)) begin
      failures++;
      $display("FAIL restored valid=%0d data=%h exp %0d %h",
               dec_valid_out, dec_data_out, ev2, ed2);
    end
  endtask

  task automatic step(bit s, logic [31:0] t);
    bit          h = 0;
    int unsigned loc = 0;
    start = s; data = t;
    if (s) begin
      n_tuples++;
      h = m.encode(t, loc);
      if (h) n_hit++; else n_miss++;
      if (h && hist.size() > 0 && hist[$] == t && last_was_miss) n_b2b++;
      last_was_miss = !h;
      hist.push_back(t);
      if (hist.size() > 90) void'(hist.pop_front());
    end else begin
      n_idle++;
    end
    // the decompressor shows the previous tuple, the compressor this one
    ev2 = ev1; ed2 = ed1_or_tuple;
    ev1 = s; eh1 = h; el1 = loc; ed1 = h ? 32'h0 : t;
    ed1_or_tuple = t;
    @(posedge clk); #1;
    check_outputs();
  endtask

  logic [31:0] ed1_or_tuple;
  bit          last_was_miss;

  task automatic run(int n);
    for (int i = 0; i < n; i++) begin
      int r = $urandom_range(0, 19);
      logic [31:0] t;
      if (hist.size() > 0 && r < 4)       t = hist[$];
      else if (hist.size() > 0 && r < 11) t = hist[$urandom_range(0, hist.size() - 1)];
      else                                t = $urandom;
      step(r != 19, t);
    end
    step(0, 32'h0);
    step(0, 32'h0);
  endtask

  initial begin
    m = new(DEPTH);
    rst = 1; start = 0; data = '0;
    ev1 = 0; ev2 = 0; eh1 = 0; el1 = 0; ed1 = '0; ed2 = '0;
    ed1_or_tuple = '0; last_was_miss = 0;
    repeat (2) @(posedge clk); #1;
    rst = 0;
    run(2000);
    // reset in the middle of operation: both dictionaries empty again
    rst = 1;
    @(posedge clk); #1;
    rst = 0;
    n_reset++;
    replaced_total += m.replaced;
    m.clear();  // history kept: old tuples must now miss
    ev1 = 0; ev2 = 0;
    run(500);
    replaced_total += m.replaced;

    checks++;
    if (n_codes != n_tuples) begin
      failures++;
      $display("FAIL rate: %0d tuples gave %0d codes", n_tuples, n_codes);
    end
    $display("mechanisms: hit=%0d miss=%0d back_to_back=%0d replaced=%0d idle=%0d reset=%0d",
             n_hit, n_miss, n_b2b, replaced_total, n_idle, n_reset);
    if (n_hit == 0)          begin failures++; $display("FAIL no full match"); end
    if (n_miss == 0)         begin failures++; $display("FAIL no miss"); end
    if (n_b2b == 0)          begin failures++; $display("FAIL no back-to-back match"); end
    if (replaced_total == 0) begin failures++; $display("FAIL no replacement"); end
    if (n_idle == 0)         begin failures++; $display("FAIL no idle clock"); end
    if (n_reset == 0)        begin failures++; $display("FAIL no reset"); end
    checks += 6;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
