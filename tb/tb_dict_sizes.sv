// tb_dict_sizes: runs the three dictionary lengths the scheme allows, 16,
// 32 and 64 tuples, side by side on the same input stream in loopback.
//
// Each size is checked code by code against the reference model of that
// size (codec_size_checker). The stream draws half its tuples from a
// vocabulary of 40 and the rest at random, so the 16- and 32-entry
// dictionaries keep replacing entries while the 64-entry one can hold the
// whole vocabulary; the number of matches for each size is printed to show
// the compression each length buys.
module tb_dict_sizes;
  logic        clk = 0, rst, start;
  logic [31:0] data;
  logic [31:0] vocab[40];
  int checks, failures;

  codec_size_checker #(.DEPTH(16)) c16 (.clk(clk), .rst(rst), .start(start), .data(data));
  codec_size_checker #(.DEPTH(32)) c32 (.clk(clk), .rst(rst), .start(start), .data(data));
  codec_size_checker #(.DEPTH(64)) c64 (.clk(clk), .rst(rst), .start(start), .data(data));

  always #5 clk = ~clk;

  task automatic report();
    checks   = c16.checks + c32.checks + c64.checks;
    failures += c16.failures + c32.failures + c64.failures;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
  endtask

  initial begin
    failures = 0;
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    report();
    $finish;
  end

  initial begin
    foreach (vocab[i]) vocab[i] = $urandom;
    rst = 1; start = 0; data = '0;
    repeat (2) @(posedge clk); #2;
    rst = 0;
    for (int i = 0; i < 4000; i++) begin
      start = ($urandom_range(0, 9) != 0);
      data  = ($urandom_range(0, 1) == 1) ? vocab[$urandom_range(0, 39)] : $urandom;
      @(posedge clk); #2;
    end
    start = 0;
    repeat (3) @(posedge clk); #2;
    $display("matches: 16 entries %0d, 32 entries %0d, 64 entries %0d",
             c16.hits, c32.hits, c64.hits);
    checks = 0;
    if (c16.replaced == 0 || c32.replaced == 0) begin
      failures++;
      $display("FAIL small dictionaries never replaced an entry");
    end
    if (!(c16.hits < c64.hits)) begin
      failures++;
      $display("FAIL 64 entries gave no more matches than 16");
    end
    report();
    $finish;
  end
endmodule
