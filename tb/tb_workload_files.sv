// tb_workload_files: streams files of the sizes used in the file-size
// comparison (7168, 3481, 4505, 4710, 5120 and 9625 bytes) through the
// compression system at its default size, back to back at one tuple per
// clock, and decompresses them in the same pass.
//
// The file contents are generated: a text-like mix in which three tuples
// in four come from a small vocabulary and the rest are random. A file's
// last tuple is padded with zero bytes. Each file starts after a reset, so
// it is coded on its own. For each file the test checks that every tuple
// comes back unchanged, that it takes exactly one clock per tuple plus the
// one-clock latency of each half, and reports the matches and a compressed
// size, counting 1 + 6 bits for a match code and 1 + 32 bits for a
// literal.
module tb_workload_files;
  import xmatch_ref_pkg::*;
  localparam int NFILES = 6;
  localparam int SIZES[NFILES] = '{7168, 3481, 4505, 4710, 5120, 9625};
  localparam int VOCAB = 48;

  logic        clk = 0, rst, start;
  logic [31:0] data;
  logic [5:0]  addr_out;
  logic        match_hit, out_valid;
  logic [31:0] data_out;
  logic        dec_valid_out;
  logic [31:0] dec_data_out;
  int checks = 0, failures = 0;

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
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [31:0] vocab[VOCAB];
  logic [31:0] file_q[$];
  int          n_out, n_hit;
  int          cyc, first_in, last_out;
  bit          collecting;

  // Check the restored stream as it comes out.
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (collecting && out_valid && match_hit) n_hit <= n_hit + 1;
    if (collecting && dec_valid_out) begin
      checks++;
      if (n_out >= file_q.size() || dec_data_out !== file_q[n_out]) begin
        failures++;
        $display("FAIL tuple %0d restored as %h", n_out, dec_data_out);
      end
      n_out    <= n_out + 1;
      last_out <= cyc;
    end
  end

  initial begin
    cyc = 0;
    collecting = 0;
    foreach (vocab[i]) vocab[i] = $urandom;
    rst = 1; start = 0; data = '0;
    repeat (2) @(posedge clk); #1;
    for (int f = 0; f < NFILES; f++) begin
      automatic int ntup = (SIZES[f] + 3) / 4;
      automatic int bits;
      file_q.delete();
      for (int i = 0; i < ntup; i++) begin
        automatic logic [31:0] t;
        t = ($urandom_range(0, 3) != 0) ? vocab[$urandom_range(0, VOCAB - 1)] : $urandom;
        if (i == ntup - 1 && SIZES[f] % 4 != 0)
          t = t & ~(32'hFFFF_FFFF >> (8 * (SIZES[f] % 4)));  // zero padding
        file_q.push_back(t);
      end
      rst = 1;
      @(posedge clk); #1;
      rst = 0;
      n_out = 0; n_hit = 0;
      collecting = 1;
      first_in = cyc;
      for (int i = 0; i < ntup; i++) begin
        start = 1; data = file_q[i];
        @(posedge clk); #1;
      end
      start = 0;
      repeat (4) @(posedge clk); #1;
      collecting = 0;
      checks++;
      if (n_out != ntup) begin
        failures++;
        $display("FAIL file %0d: %0d tuples in, %0d out", f, ntup, n_out);
      end
      // tuple i enters at cycle first_in + i, leaves the decompressor two
      // clocks later
      checks++;
      if (last_out - first_in != ntup + 1) begin
        failures++;
        $display("FAIL file %0d: %0d tuples took %0d clocks", f, ntup, last_out - first_in);
      end
      bits = n_hit * 7 + (ntup - n_hit) * 33;
      $display("file %0d: %0d bytes, %0d tuples, %0d matches, %0d clocks, coded %0d bytes",
               f + 1, SIZES[f], ntup, n_hit, last_out - first_in + 1, (bits + 7) / 8);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
