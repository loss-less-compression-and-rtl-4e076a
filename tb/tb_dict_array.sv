// tb_dict_array: fills the 64-word dictionary, checks every word and valid
// bit, overwrites past the end to check the wrap to location 0, checks
// that a clock without a store changes nothing, and that reset empties it.
module tb_dict_array;
  localparam int DEPTH = 64;
  logic                        clk = 0, rst, wr_en;
  logic [31:0]                 wr_data;
  logic [DEPTH-1:0][31:0]      words;
  logic [DEPTH-1:0]            valid;
  logic [31:0]                 ref_w[DEPTH];
  logic                        ref_v[DEPTH];
  int unsigned                 ref_p;
  int checks = 0, failures = 0;

  dict_array #(.WIDTH(32), .DEPTH(DEPTH)) dut (
    .clk(clk), .rst(rst), .wr_en(wr_en), .wr_data(wr_data),
    .words(words), .valid(valid));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic compare();
    for (int i = 0; i < DEPTH; i++) begin
      checks++;
      if (valid[i] !== ref_v[i] || (ref_v[i] && words[i] !== ref_w[i])) begin
        failures++;
        $display("FAIL word %0d: valid=%0d data=%h exp valid=%0d data=%h",
                 i, valid[i], words[i], ref_v[i], ref_w[i]);
      end
    end
  endtask

  task automatic write(logic [31:0] d);
    wr_en = 1; wr_data = d;
    @(posedge clk); #1;
    wr_en = 0;
    ref_w[ref_p] = d; ref_v[ref_p] = 1; ref_p = (ref_p + 1) % DEPTH;
  endtask

  initial begin
    rst = 1; wr_en = 0; wr_data = '0;
    foreach (ref_v[i]) ref_v[i] = 0;
    ref_p = 0;
    repeat (2) @(posedge clk); #1;
    rst = 0;
    compare();
    for (int i = 0; i < DEPTH + 10; i++) begin
      write($urandom);
      if (i % 7 == 0) compare();
    end
    compare();
    wr_data = 32'hDEAD_BEEF;
    repeat (3) @(posedge clk); #1;
    compare();
    rst = 1;
    @(posedge clk); #1;
    rst = 0;
    foreach (ref_v[i]) ref_v[i] = 0;
    ref_p = 0;
    compare();
    write(32'h1234_5678);
    write(32'h9ABC_DEF0);
    compare();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
