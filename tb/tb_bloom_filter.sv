// tb_bloom_filter: full-size Bloom filter (16384 x 64 bits, 4 hashes).
// Records 100,000 random row indices, then checks that every one of them
// hits (no false negatives) and that the false-positive ratio over 50,000
// other keys stays below 4 % (the design point is about 2 %). A clear must
// then make every key miss again.
module tb_bloom_filter;
  import spmv_pkg::*;
  localparam int NMEM = 100000, NOTHER = 50000;
  logic clk = 0, rst_n = 0, clr = 0, op_ready, op_valid = 0, op_insert = 0, res_valid, res_hit;
  key_t op_key, res_key;
  int checks = 0, failures = 0, fp = 0, fn = 0, hits_after_clear = 0;
  key_t keys [NMEM];
  bit   member [key_t];

  bloom_filter dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (600000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int phase = 0;
  always @(posedge clk) if (res_valid) begin
    if (phase == 1) begin checks++; if (!res_hit) begin fn++; failures++; end end
    if (phase == 2 && res_hit) fp++;
    if (phase == 3) begin checks++; if (res_hit) begin hits_after_clear++; failures++; end end
  end

  task automatic op(input logic ins, input key_t k);
    @(negedge clk);
    while (!op_ready) @(negedge clk);
    op_valid = 1; op_insert = ins; op_key = k;
    @(negedge clk);
    op_valid = 0;
  endtask

  initial begin
    for (int i = 0; i < NMEM; i++) begin
      keys[i] = $urandom;
      member[keys[i]] = 1;
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < NMEM; i++) op(1, keys[i]);
    phase = 1;
    for (int i = 0; i < NMEM; i++) op(0, keys[i]);
    repeat (3) @(posedge clk);
    phase = 2;
    for (int i = 0; i < NOTHER; i++) begin
      key_t k;
      k = $urandom;
      while (member.exists(k)) k = $urandom;
      op(0, k);
    end
    repeat (3) @(posedge clk);
    @(negedge clk); clr = 1; @(negedge clk); clr = 0;
    phase = 3;
    for (int i = 0; i < 1000; i++) op(0, keys[i]);
    repeat (3) @(posedge clk);
    $display("false negatives %0d, false positives %0d of %0d (%0.2f %%)", fn, fp, NOTHER, 100.0 * fp / NOTHER);
    checks++; if (fp * 25 > NOTHER) failures++;
    checks++; if (fp == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
