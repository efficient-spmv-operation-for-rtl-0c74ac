// tb_radix_presorter: random beats of 16 records (some slots masked) go
// through the pre-sorter with random output stalls. Each output beat must be
// the valid records ordered by their 4 radix bits, records of equal radix
// in input order, followed by the masked slots. Without stalls a beat must
// take exactly 10 cycles (log2(16)*(log2(16)+1)/2 stages).
module tb_radix_presorter;
  import spmv_pkg::*;
  localparam int Q = 4, NP = 16, LW = 11;
  logic clk = 0, rst_n = 0;
  logic in_valid, in_ready, in_last, out_valid, out_ready, out_last;
  logic [LW-1:0] in_list, out_list;
  rec_t [NP-1:0] in_recs, out_recs;
  logic [NP-1:0] in_mask, out_mask;
  int checks = 0, failures = 0, cyc = 0, stall_mode = 1;

  radix_presorter #(.Q(Q), .LW(LW)) dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef struct { rec_t r [NP]; logic [NP-1:0] m; logic [LW-1:0] l; int t; } beat_t;
  beat_t expq [$];

  function automatic beat_t expect_of(input rec_t [NP-1:0] r, input logic [NP-1:0] m, input logic [LW-1:0] l);
    beat_t b;
    int n = 0;
    for (int rad = 0; rad < NP; rad++)
      for (int i = 0; i < NP; i++)
        if (m[i] && r[i].key[Q-1:0] == Q'(rad)) begin b.r[n] = r[i]; b.m[n] = 1; n++; end
    for (int i = n; i < NP; i++) b.m[i] = 0;
    b.l = l;
    return b;
  endfunction

  int nbeats = 0;
  always @(posedge clk) begin
    if (in_valid && in_ready) begin
      beat_t b;
      b = expect_of(in_recs, in_mask, in_list);
      b.t = cyc;
      expq.push_back(b);
      nbeats++;
    end
    if (out_valid && out_ready) begin
      beat_t e;
      e = expq.pop_front();
      checks++;
      if (out_mask !== e.m || out_list !== e.l) failures++;
      for (int i = 0; i < NP; i++) if (e.m[i] && out_recs[i] !== e.r[i]) begin
        failures++;
        if (failures < 5) $display("slot %0d got %h exp %h", i, out_recs[i], e.r[i]);
      end
      if (stall_mode == 0) begin
        checks++;
        if (cyc - e.t != 10) begin failures++; $display("latency %0d", cyc - e.t); end
      end
    end
    #1;
    in_valid <= rst_n && ($urandom_range(3, 0) != 0) && nbeats < 3000;
    for (int i = 0; i < NP; i++) begin
      in_recs[i] <= '{key: $urandom, val: $urandom};
      in_mask[i] <= ($urandom_range(9, 0) != 0);
    end
    in_list <= LW'($urandom);
    in_last <= 0;
    out_ready <= (stall_mode == 0) || ($urandom_range(2, 0) != 0);
  end

  initial begin
    in_valid = 0; out_ready = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (nbeats >= 1500);
    @(negedge clk); stall_mode = 0;
    wait (nbeats >= 3000 && expq.size() == 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
