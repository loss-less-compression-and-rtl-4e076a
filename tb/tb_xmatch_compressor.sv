// tb_xmatch_compressor: streams tuples into the compressor, one per clock
// with some idle clocks, and checks each code against the reference model
// exactly one clock after its tuple. The stream mixes repeats of recent
// tuples (matches), back-to-back repeats, and fresh tuples (misses) enough
// to fill the 64-entry dictionary several times over, so entries are
// replaced. A reset in the middle must empty the dictionary.
module tb_xmatch_compressor;
  import xmatch_ref_pkg::*;
  localparam int DEPTH = 64;
  logic        clk = 0, rst, start;
  logic [31:0] data;
  logic [5:0]  addr_out;
  logic        match_hit, out_valid;
  logic [31:0] data_out;
  int checks = 0, failures = 0;
  int hits = 0, misses = 0;

  xmatch_compressor #(.WIDTH(32), .DEPTH(DEPTH)) dut (
    .clk(clk), .rst(rst), .start(start), .data(data), .addr_out(addr_out),
    .match_hit(match_hit), .data_out(data_out), .out_valid(out_valid));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  xmatch_model m;
  logic [31:0] hist[$];
  bit          exp_valid;
  bit          exp_hit;
  int unsigned exp_loc;
  logic [31:0] exp_data;

  task automatic check_out();
    checks++;
    if (out_valid !== exp_valid) begin
      failures++;
      $display("FAIL out_valid=%0d exp=%0d", out_valid, exp_valid);
    end else if (exp_valid) begin
      checks++;
      if (match_hit !== exp_hit ||
          (exp_hit && addr_out !== 6'(exp_loc)) ||
          (!exp_hit && data_out !== exp_data)) begin
        failures++;
        $display("FAIL code hit=%0d addr=%0d data=%h exp hit=%0d addr=%0d data=%h",
                 match_hit, addr_out, data_out, exp_hit, exp_loc, exp_data);
      end
    end
  endtask

  function automatic logic [31:0] next_tuple();
    int r = $urandom_range(0, 9);
    if (hist.size() > 0 && r < 2) return hist[$];
    if (hist.size() > 0 && r < 6) return hist[$urandom_range(0, hist.size() - 1)];
    return $urandom;
  endfunction

  task automatic run(int n);
    for (int i = 0; i < n; i++) begin
      bit s = ($urandom_range(0, 7) != 0);
      logic [31:0] t = next_tuple();
      start = s; data = t;
      exp_valid = s;
      if (s) begin
        int unsigned loc;
        exp_hit  = m.encode(t, loc);
        exp_loc  = loc;
        exp_data = t;
        if (exp_hit) hits++; else misses++;
        hist.push_back(t);
        if (hist.size() > 80) void'(hist.pop_front());
      end
      @(posedge clk); #1;
      check_out();
    end
    start = 0;
    exp_valid = 0;
    @(posedge clk); #1;
    check_out();
  endtask

  initial begin
    m = new(DEPTH);
    rst = 1; start = 0; data = '0; exp_valid = 0;
    repeat (2) @(posedge clk); #1;
    rst = 0;
    run(1500);
    rst = 1;
    @(posedge clk); #1;
    rst = 0;
    m.clear();  // history kept: old tuples must now miss
    run(300);
    checks++;
    if (hits < 100 || misses < 2 * DEPTH || m.replaced == 0) begin
      failures++;
      $display("FAIL coverage: hits=%0d misses=%0d replaced=%0d", hits, misses, m.replaced);
    end
    $display("hits=%0d misses=%0d", hits, misses);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
