// tb_cam_comparator: drives matchlines and tuples directly and checks the
// same-clock store request and the registered code one clock later.
module tb_cam_comparator;
  localparam int DEPTH = 64;
  logic             clk = 0, rst, start;
  logic [31:0]      data;
  logic [DEPTH-1:0] ml;
  logic             store, match_hit, out_valid;
  logic [5:0]       addr_out;
  logic [31:0]      data_out;
  int checks = 0, failures = 0;

  cam_comparator #(.WIDTH(32), .DEPTH(DEPTH)) dut (
    .clk(clk), .rst(rst), .start(start), .data(data), .matchlines(ml),
    .store(store), .addr_out(addr_out), .match_hit(match_hit),
    .data_out(data_out), .out_valid(out_valid));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // One tuple: hit_loc < 0 means no matchline set.
  task automatic one(logic s, logic [31:0] d, int hit_loc);
    logic exp_store;
    start = s; data = d; ml = '0;
    if (hit_loc >= 0) ml[hit_loc] = 1'b1;
    #1;
    exp_store = s && (hit_loc < 0);
    checks++;
    if (store !== exp_store) begin
      failures++;
      $display("FAIL store=%0d exp=%0d", store, exp_store);
    end
    @(posedge clk); #1;
    checks++;
    if (out_valid !== s) begin
      failures++;
      $display("FAIL out_valid=%0d exp=%0d", out_valid, s);
    end
    if (s) begin
      checks++;
      if (hit_loc >= 0) begin
        if (match_hit !== 1'b1 || addr_out !== 6'(hit_loc)) begin
          failures++;
          $display("FAIL hit: match_hit=%0d addr=%0d exp %0d", match_hit, addr_out, hit_loc);
        end
      end else if (match_hit !== 1'b0 || data_out !== d) begin
        failures++;
        $display("FAIL miss: match_hit=%0d data_out=%h exp %h", match_hit, data_out, d);
      end
    end
  endtask

  initial begin
    rst = 1; start = 0; data = '0; ml = '0;
    repeat (2) @(posedge clk); #1;
    checks++;
    if (out_valid !== 1'b0 || match_hit !== 1'b0) begin failures++; $display("FAIL reset"); end
    rst = 0;
    for (int i = 0; i < 300; i++) begin
      automatic int r = $urandom_range(0, 3);
      one(r != 0, $urandom, (r == 1) ? -1 : $urandom_range(0, DEPTH - 1));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
