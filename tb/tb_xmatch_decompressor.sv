// tb_xmatch_decompressor: builds a code stream with the reference model
// (matches and literals, enough literals to wrap the dictionary), feeds it
// one code per clock with idle clocks between, and checks each restored
// tuple one clock after its code.
module tb_xmatch_decompressor;
  import xmatch_ref_pkg::*;
  localparam int DEPTH = 64;
  logic        clk = 0, rst, valid_in, match_hit, valid_out;
  logic [5:0]  addr_in;
  logic [31:0] data_in, data_out;
  int checks = 0, failures = 0;
  int hits = 0;

  xmatch_decompressor #(.WIDTH(32), .DEPTH(DEPTH)) dut (
    .clk(clk), .rst(rst), .valid_in(valid_in), .match_hit(match_hit),
    .addr_in(addr_in), .data_in(data_in), .valid_out(valid_out),
    .data_out(data_out));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  xmatch_model enc;
  logic [31:0] hist[$];
  bit          exp_valid;
  logic [31:0] exp_data;

  task automatic check_out();
    checks++;
    if (valid_out !== exp_valid || (exp_valid && data_out !== exp_data)) begin
      failures++;
      $display("FAIL valid_out=%0d data_out=%h exp %0d %h",
               valid_out, data_out, exp_valid, exp_data);
    end
  endtask

  initial begin
    enc = new(DEPTH);
    rst = 1; valid_in = 0; match_hit = 0; addr_in = '0; data_in = '0;
    exp_valid = 0;
    repeat (2) @(posedge clk); #1;
    rst = 0;
    for (int i = 0; i < 2000; i++) begin
      automatic bit s = ($urandom_range(0, 5) != 0);
      automatic logic [31:0] t;
      automatic int unsigned loc;
      automatic bit h;
      if (hist.size() > 0 && $urandom_range(0, 1) == 1)
        t = hist[$urandom_range(0, hist.size() - 1)];
      else
        t = $urandom;
      valid_in = s;
      if (s) begin
        h = enc.encode(t, loc);
        match_hit = h;
        addr_in   = 6'(loc);
        data_in   = h ? $urandom : t;  // a hit's literal field is ignored
        if (h) hits++;
        hist.push_back(t);
        if (hist.size() > 70) void'(hist.pop_front());
      end else begin
        match_hit = 1'($urandom); addr_in = 6'($urandom); data_in = $urandom;
      end
      exp_valid = s;
      exp_data  = t;
      @(posedge clk); #1;
      check_out();
    end
    valid_in = 0;
    exp_valid = 0;
    @(posedge clk); #1;
    check_out();
    checks++;
    if (hits < 100 || enc.replaced == 0) begin
      failures++;
      $display("FAIL coverage hits=%0d replaced=%0d", hits, enc.replaced);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
