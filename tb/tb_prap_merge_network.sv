// tb_prap_merge_network: step 2 end to end. K intermediate sparse vectors
// with random rows and values are streamed in beats of p records by a
// DRAM-side model that serves first the lists the cores report waiting
// for, then the others in turn, and retries when a beat is refused. The
// dense result must equal, row by row, the single-precision sum of all
// vectors' entries for that row added in list order, with 0 for rows no
// vector holds. Run 1 is dense-ish and throttles the output; run 2 is very
// sparse so that nearly every row is inserted as missing, and must deliver
// close to one beat (p rows) per cycle.
module tb_prap_merge_network;
  import spmv_pkg::*;
  import tb_fp_pkg::*;
  parameter int K = 32, Q = 4;
  localparam int NP = 1 << Q, LW = $clog2(K);
  logic clk = 0, rst_n = 0, start = 0;
  key_t num_rows;
  logic in_valid, in_ready, in_last, y_valid, y_ready, done;
  logic [LW-1:0] in_list;
  rec_t [NP-1:0] in_recs;
  logic [NP-1:0] in_mask, starve_valid, inserted;
  logic [NP-1:0][LW-1:0] starve_list;
  val_t [NP-1:0] y_vals;
  key_t y_base;
  int checks = 0, failures = 0, cyc = 0, n_ins = 0, n_refused = 0, n_starve = 0;

  prap_merge_network #(.K(K), .Q(Q)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef struct { rec_t r [NP]; logic [NP-1:0] m; logic last; } beat_t;
  beat_t beats [K][$];
  logic [31:0] yref [];
  int rr = 0, ybeats = 0, t0 = 0, t1 = 0, throttle = 1;
  logic running = 0;

  task automatic build(input int rows, input int dens_pct);
    yref = new[rows];
    for (int i = 0; i < rows; i++) yref[i] = 0;
    for (int k = 0; k < K; k++) begin
      rec_t lst [$];
      beats[k].delete();
      for (int row = 0; row < rows; row++)
        if ($urandom_range(99, 0) < dens_pct) begin
          rec_t t;
          t.key = key_t'(row);
          t.val = tb_fp_pkg::rand_f(4);
          lst.push_back(t);
          yref[row] = (yref[row] == 0) ? t.val : r2f(f2r(yref[row]) + f2r(t.val));
        end
      // cut into beats of NP records
      for (int b = 0; b * NP < lst.size() || b == 0; b++) begin
        beat_t bt;
        bt.m = '0;
        for (int i = 0; i < NP; i++)
          if (b * NP + i < lst.size()) begin bt.r[i] = lst[b * NP + i]; bt.m[i] = 1; end
          else bt.r[i] = '0;
        bt.last = ((b + 1) * NP >= lst.size());
        beats[k].push_back(bt);
      end
    end
  endtask

  // DRAM-side model
  int cur;
  always @(posedge clk) begin
    cyc++;
    if (in_valid && in_ready) void'(beats[cur].pop_front());
    if (in_valid && !in_ready) n_refused++;
    if (|inserted) n_ins += $countones(inserted);
    if (|starve_valid) n_starve++;
    if (y_valid && y_ready) begin
      checks++;
      if (ybeats == 0) t0 = cyc;
      t1 = cyc;
      if (y_base !== key_t'(ybeats * NP)) begin failures++; $display("y_base %0d exp %0d", y_base, ybeats * NP); end
      for (int i = 0; i < NP; i++) begin
        checks++;
        if (y_vals[i] !== yref[ybeats * NP + i]) begin
          failures++;
          if (failures < 10) $display("y[%0d] = %h exp %h", ybeats * NP + i, y_vals[i], yref[ybeats * NP + i]);
        end
      end
      ybeats++;
    end
    #1;
    cur = -1;
    for (int r = 0; r < NP; r++)
      if (cur < 0 && starve_valid[r] && beats[starve_list[r]].size() > 0) cur = int'(starve_list[r]);
    if (cur < 0 || $urandom_range(1, 0) == 0)
      for (int j = 0; j < K; j++) begin
        int l;
        l = (rr + j) % K;
        if (beats[l].size() > 0) begin cur = l; rr = l + 1; break; end
      end
    in_valid <= running && (cur >= 0);
    in_list  <= LW'((cur < 0) ? 0 : cur);
    if (cur >= 0) begin
      for (int i = 0; i < NP; i++) in_recs[i] <= beats[cur][0].r[i];
      in_mask <= beats[cur][0].m;
      in_last <= beats[cur][0].last;
    end
    y_ready <= throttle ? ($urandom_range(3, 0) != 0) : 1'b1;
  end

  task automatic run(input int rows, input int dens_pct, input int thr);
    throttle = thr; ybeats = 0; n_ins = 0;
    build(rows, dens_pct);
    num_rows = key_t'(rows);
    @(negedge clk); start = 1; @(negedge clk); start = 0; running = 1;
    wait (done);
    running = 0;
    repeat (3) @(posedge clk);
    checks++;
    if (ybeats != rows / NP) begin failures++; $display("got %0d beats exp %0d", ybeats, rows / NP); end
    checks++;
    if (n_ins == 0) begin failures++; $display("no missing key inserted"); end
    $display("rows %0d: %0d beats in %0d cycles, %0d rows inserted, %0d refused beats, %0d starve cycles",
             rows, ybeats, t1 - t0 + 1, n_ins, n_refused, n_starve);
  endtask

  initial begin
    in_valid = 0; y_ready = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    run(2048, 15, 1);
    run(16384, 0, 0);
    checks++;
    if (t1 - t0 + 1 > (16384 / NP) * 11 / 10) begin failures++; $display("sparse run too slow"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
