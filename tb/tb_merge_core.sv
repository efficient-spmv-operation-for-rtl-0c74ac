// tb_merge_core: a K-way merge core fed by a behavioural model of its input
// lists (each list a sorted queue that may run dry for a while and ends with
// the end marker). Checks that the output is the sorted union of all lists,
// that the stream ends with the end marker, and that once the tree is full
// and all lists are resident the core delivers one record per cycle
// (measured over a long window with the output always ready).
module tb_merge_core;
  import spmv_pkg::*;
  localparam int K = 64, IW = 5, PER = 60;
  logic clk = 0, rst_n = 0, start = 0;
  logic leaf_req, leaf_pop, leaf_side, out_valid, out_ready;
  logic [IW-1:0] leaf_pair;
  logic [1:0] leaf_avail;
  rec_t [1:0] leaf_rec;
  rec_t out_rec;
  int checks = 0, failures = 0, cyc = 0;

  merge_core #(.K(K)) dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  rec_t lists [K][$];
  int   hidden [K];          // records not yet visible (models DRAM latency)
  key_t expk [$];
  int   starve_mode;

  // leaf model: evaluated after every clock edge, once leaf_pair is stable
  task automatic show_leaves();
    for (int s = 0; s < 2; s++) begin
      int l;
      l = 2 * int'(leaf_pair) + s;
      if (lists[l].size() > hidden[l]) begin
        leaf_avail[s] = 1; leaf_rec[s] = lists[l][0];
      end else if (lists[l].size() == 0) begin
        leaf_avail[s] = 1; leaf_rec[s] = '{key: KEY_END, val: '0};
      end else begin
        leaf_avail[s] = 0; leaf_rec[s] = '0;
      end
    end
  endtask

  int outn = 0, t_first = 0, t_last = 0, seen_end = 0;
  always @(posedge clk) begin
    if (leaf_pop) begin
      int l;
      l = 2 * int'(leaf_pair) + int'(leaf_side);
      if (lists[l].size() == 0 || lists[l].size() <= hidden[l]) begin
        failures++; $display("pop of unavailable list %0d", l);
      end else void'(lists[l].pop_front());
    end
    for (int l = 0; l < K; l++) if (hidden[l] > 0 && $urandom_range(7, 0) == 0) hidden[l]--;
    if (out_valid && out_ready) begin
      if (out_rec.key == KEY_END) seen_end = 1;
      else begin
        key_t e;
        checks++;
        e = expk.pop_front();
        if (out_rec.key !== e) begin
          failures++; if (failures < 10) $display("got key %0d exp %0d", out_rec.key, e);
        end
        outn++;
        if (outn == 1000) t_first = cyc;
        if (outn == 3000) t_last = cyc;
      end
    end
    #1;
    show_leaves();
    out_ready <= (starve_mode == 1) ? ($urandom_range(3, 0) != 0) : 1'b1;
  end

  task automatic fill(input int with_hidden);
    key_t all [$];
    for (int l = 0; l < K; l++) begin
      key_t k;
      k = key_t'($urandom_range(50, 0));
      lists[l].delete();
      for (int i = 0; i < PER + int'($urandom_range(20, 0)) - 10; i++) begin
        lists[l].push_back('{key: k, val: 32'(l)});
        all.push_back(k);
        k = k + key_t'($urandom_range(100, 1));
      end
      hidden[l] = with_hidden ? lists[l].size() : 0;
    end
    if (!with_hidden) for (int l = 0; l < 3; l++) lists[l].delete();   // empty lists
    all.delete();
    for (int l = 0; l < K; l++) foreach (lists[l][i]) all.push_back(lists[l][i].key);
    all.sort();
    expk = all;
  endtask

  initial begin
    out_ready = 0;
    for (int l = 0; l < K; l++) hidden[l] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // run 1: lists trickle in, output randomly throttled
    starve_mode = 1;
    fill(1);
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    wait (seen_end == 1);
    checks++; if (expk.size() != 0) begin failures++; $display("%0d records missing", expk.size()); end
    // run 2: all data resident, output always ready -> one record per cycle
    starve_mode = 0; outn = 0;
    fill(0);
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    seen_end = 0;
    wait (seen_end == 1);
    checks++; if (expk.size() != 0) begin failures++; $display("%0d records missing", expk.size()); end
    $display("2000 records in %0d cycles", t_last - t_first);
    checks++; if (t_last - t_first != 2000) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
