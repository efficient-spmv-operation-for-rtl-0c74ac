// tb_spmv_accel_top: end-to-end test of the accelerator at reduced size
// (P = 4 lanes, 16 banks, 1K-word scratchpad, K = 4 lists, p = 16 merge
// cores with 8-entry prefetch slots, VLDI blocks of 4 bits, Bloom filter of
// 1K words, HDN threshold 16).
//
// A random 256 x 256 matrix in FP32 is split into four column stripes of 64.
// Rows 4i are dense (high-degree nodes); rows 16i+5 and rows 100..131 are
// empty (the band gives deltas that need two VLDI strings); the rest are
// sparse. The test then runs:
//   1. HDN detection: the row index of every nonzero streams through the
//      populator; every row above the threshold must then hit in the filter.
//   2. Step 1 for the four stripes (x^k loaded through the load port). Stripes
//      0 and 1 run in TS mode and return v^k as records; stripes 2 and 3 run
//      in ITS mode (alternating buffers) with VLDI on and return strings,
//      which the test decodes. Every v^k must equal the reference: per row,
//      products summed in column order, each operation rounded to FP32.
//   3. Step 2, uncompressed: the four v^k go in as beats of up to 16 records
//      from a memory model that serves starving lists first and retries
//      refused beats; y is throttled. y must equal the sum of the v^k in list
//      order, with 0 for rows no list holds (these are inserted).
//   4. Step 2 with VLDI and ITS: the same lists go in as VLDI strings,
//      interleaved record by record between lists; y is checked again and is
//      written back into scratchpad buffer 1.
//   5. A step-1 pass in ITS mode reading buffer 1 with the identity matrix
//      must return y exactly, which shows the write-back.
// Each mechanism is counted (bank-conflict stalls, missing-key insertions,
// refused beats, starvation reports, ITS write-backs and mode switches,
// multi-string VLDI records, Bloom hits) and the test fails if one never
// happened.
module tb_spmv_accel_top;
  import spmv_pkg::*;
  import tb_fp_pkg::*;
  localparam int P = 4, NB = 16, SEG = 1024, K = 4, Q = 4, BLK = 4, THR = 16, SD = 8;
  localparam int NP = 1 << Q, AW = $clog2(SEG), LW = $clog2(K);
  localparam int NZW = $bits(nz_t), RW = $bits(rec_t);
  localparam int N = 256, SW = 64, NS = 4;

  logic clk = 0, rst_n = 0;
  logic its_mode = 0, rd_sel = 0, vldi_en = 0;
  logic [31:0] its_base = 0;
  logic ld_valid = 0, ld_ready; logic [AW-1:0] ld_addr = 0; logic [NP-1:0][31:0] ld_data = '0;
  logic s1_start = 0; logic [P-1:0] nz_valid = '0, nz_ready; logic [P-1:0][NZW-1:0] nz = '0;
  logic v_valid, v_ready = 1; logic [RW-1:0] v_rec;
  logic vc_valid, vc_ready = 1, vc_end, vc_first; logic [BLK:0] vc_bits; logic [31:0] vc_val;
  logic s1_done, bank_conflict;
  logic s2_start = 0; logic [31:0] num_rows = N;
  logic in_valid = 0, in_ready, in_last = 0; logic [LW-1:0] in_list = '0;
  logic [NP-1:0][RW-1:0] in_recs = '0; logic [NP-1:0] in_mask = '0;
  logic cs_valid = 0, cs_ready, cs_first = 0, cs_last = 0; logic [BLK:0] cs_bits = '0;
  logic [31:0] cs_val = 0; logic [LW-1:0] cs_list = '0;
  logic [NP-1:0] starve_valid; logic [NP-1:0][LW-1:0] starve_list;
  logic y_valid, y_ready = 0; logic [NP-1:0][31:0] y_vals; logic [31:0] y_base;
  logic [NP-1:0] inserted; logic wb_fire, s2_done;
  logic bf_clr = 0, deg_valid = 0, deg_ready; logic [31:0] deg_row = 0;
  logic hq_valid = 0, hq_ready; logic [31:0] hq_key = 0;
  logic hr_valid, hr_hit; logic [31:0] hr_key;

  spmv_accel_top #(.P(P), .NBANKS(NB), .SEG_WORDS(SEG), .K(K), .Q(Q), .SLOT_DEPTH(SD), .BLK(BLK),
                   .BF_D(1024), .HDN_THRESH(THR)) dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_conf = 0, n_ins = 0, n_refused = 0, n_starve = 0, n_wb = 0, n_its = 0;
  int n_multi = 0, n_hit = 0, n_fp = 0, n_vc = 0;

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- matrix, vectors, references
  logic [31:0] A [N][N];      // 0 = no nonzero
  logic [31:0] X [N];
  typedef struct { logic [BLK:0] bits; logic [31:0] val; logic first; logic last; } str_t;
  rec_t  vref [NS][$];        // reference v^k
  rec_t  vgot [NS][$];        // v^k as returned by step 1 (decoded for VLDI stripes)
  str_t  sgot [NS][$];        // strings of the VLDI stripes
  logic [31:0] yref [N];

  function automatic logic [31:0] fmul(logic [31:0] a, logic [31:0] b);
    return r2f(f2r(a) * f2r(b));
  endfunction
  function automatic logic [31:0] fadd(logic [31:0] a, logic [31:0] b);
    return r2f(f2r(a) + f2r(b));
  endfunction

  task automatic build();
    for (int r = 0; r < N; r++) begin
      int pct;
      pct = (r % 4 == 0) ? 20 : ((r % 16 == 5) ? 0 : 3);
      if (r >= 100 && r < 132) pct = 0;     // a band of empty rows: long deltas
      for (int c = 0; c < N; c++) begin
        A[r][c] = 0;
        if ($urandom_range(99, 0) < pct) A[r][c] = rand_f(2);
      end
    end
    for (int c = 0; c < N; c++) X[c] = rand_f(2);
    for (int r = 0; r < N; r++) yref[r] = 0;
    for (int k = 0; k < NS; k++) begin
      vref[k].delete();
      for (int r = 0; r < N; r++) begin
        logic [31:0] acc;
        logic any;
        acc = 0; any = 0;
        for (int c = k * SW; c < (k + 1) * SW; c++)
          if (A[r][c] != 0) begin
            acc = any ? fadd(acc, fmul(A[r][c], X[c])) : fmul(A[r][c], X[c]);
            any = 1;
          end
        if (any) begin
          rec_t t;
          t.key = key_t'(r); t.val = acc;
          vref[k].push_back(t);
          yref[r] = (yref[r] == 0) ? acc : fadd(yref[r], acc);
        end
      end
    end
  endtask

  // ---------------- x load
  task automatic load_x(input int k, input logic buf_sel, input logic its);
    for (int i = 0; i < SW; i += NP) begin
      @(negedge clk);
      ld_valid = 1;
      ld_addr  = its ? AW'({buf_sel, (AW-1)'(i)}) : AW'(i);
      for (int j = 0; j < NP; j++) ld_data[j] = X[k * SW + i + j];
      @(posedge clk);
      while (!ld_ready) @(posedge clk);
    end
    @(negedge clk); ld_valid = 0;
  endtask

  // ---------------- step-1 drivers
  nz_t lane_q [P][$];
  logic s1_run = 0;
  always @(posedge clk) begin
    for (int l = 0; l < P; l++)
      if (nz_valid[l] && nz_ready[l]) void'(lane_q[l].pop_front());
    if (bank_conflict) n_conf++;
    if (v_valid && v_ready) vgot[cur_k].push_back(rec_t'(v_rec));
    if (vc_valid && vc_ready) begin
      str_t s;
      s.bits = vc_bits; s.val = vc_val; s.first = vc_first; s.last = 0;
      sgot[cur_k].push_back(s);
      n_vc++;
    end
    #1;
    for (int l = 0; l < P; l++) begin
      nz_valid[l] <= s1_run && lane_q[l].size() > 0;
      if (lane_q[l].size() > 0) nz[l] <= NZW'(lane_q[l][0]);
    end
    v_ready  <= ($urandom_range(3, 0) != 0);
    vc_ready <= ($urandom_range(3, 0) != 0);
  end

  int cur_k = 0;
  // stripe k of matrix M (M = A, or identity when ident)
  task automatic run_step1(input int k, input logic ident, input int nexp);
    for (int l = 0; l < P; l++) lane_q[l].delete();
    for (int r = 0; r < N; r++)
      for (int c = 0; c < (ident ? N : SW); c++) begin
        logic [31:0] v;
        v = ident ? ((r == c) ? 32'h3f800000 : 0) : A[r][k * SW + c];
        if (v != 0) begin
          nz_t z;
          z.row = key_t'(r); z.col = 32'(c); z.val = v; z.last = 0; z.empty = 0;
          lane_q[r % P].push_back(z);
        end
      end
    for (int l = 0; l < P; l++) begin
      if (lane_q[l].size() == 0) begin
        nz_t z;
        z = '0; z.empty = 1; z.last = 1;
        lane_q[l].push_back(z);
      end else lane_q[l][$].last = 1;
    end
    cur_k = k;
    vgot[k].delete(); sgot[k].delete();
    @(negedge clk); s1_start = 1; @(negedge clk); s1_start = 0; s1_run = 1;
    repeat (3) @(posedge clk);
    wait (s1_done && (vldi_en || vgot[k].size() == nexp) && !dut.vc_valid);
    s1_run = 0;
    repeat (4) @(posedge clk);
  endtask

  // decode strings of a VLDI stripe; marks the last string of the list
  task automatic decode(input int k);
    key_t acc, prev;
    acc = 0; prev = 0;
    vgot[k].delete();
    for (int i = 0; i < sgot[k].size(); i++) begin
      acc = (acc << BLK) | key_t'(sgot[k][i].bits[BLK-1:0]);
      if (!sgot[k][i].bits[BLK]) begin
        rec_t t;
        prev = (vgot[k].size() == 0) ? acc : prev + acc;
        t.key = prev; t.val = sgot[k][i].val;
        vgot[k].push_back(t);
        acc = 0;
        if (i > 0 && sgot[k][i - 1].bits[BLK]) n_multi++;
      end
    end
    if (sgot[k].size() > 0) sgot[k][$].last = 1;
  endtask

  // encode a record list as strings (for the stripes returned uncompressed)
  task automatic encode(input int k);
    key_t prev;
    prev = 0;
    sgot[k].delete();
    for (int i = 0; i < vgot[k].size(); i++) begin
      key_t d;
      int nb;
      d = (i == 0) ? vgot[k][i].key : vgot[k][i].key - prev;
      prev = vgot[k][i].key;
      nb = 1;
      while (nb * BLK < 32 && (d >> (nb * BLK)) != 0) nb++;
      for (int b = nb - 1; b >= 0; b--) begin
        str_t s;
        s.bits = {b != 0, BLK'(d >> (b * BLK))};
        s.val = vgot[k][i].val; s.first = (i == 0 && b == nb - 1); s.last = 0;
        sgot[k].push_back(s);
      end
    end
    sgot[k][$].last = 1;
  endtask

  task automatic check_v(input int k);
    checks++;
    if (vgot[k].size() != vref[k].size()) begin
      failures++; $display("v%0d: %0d records, expected %0d", k, vgot[k].size(), vref[k].size());
    end else
      for (int i = 0; i < vref[k].size(); i++) begin
        checks++;
        if (vgot[k][i] !== vref[k][i]) begin
          failures++;
          if (failures < 10) $display("v%0d[%0d] = %h/%h exp %h/%h", k, i, vgot[k][i].key, vgot[k][i].val,
                                      vref[k][i].key, vref[k][i].val);
        end
      end
  endtask

  // ---------------- step-2 memory model
  typedef struct { rec_t r [NP]; logic [NP-1:0] m; logic last; } beat_t;
  beat_t beats [K][$];
  str_t  sq [K][$];
  int rr = 0, ybeats = 0, mode2 = 0, cur = -1, scur = -1;
  logic s2_run = 0, thr = 1;
  logic [31:0] yexp [N];

  task automatic make_beats();
    for (int k = 0; k < K; k++) begin
      beats[k].delete();
      for (int b = 0; b * NP < vgot[k].size(); b++) begin
        beat_t bt;
        bt.m = '0;
        for (int i = 0; i < NP; i++)
          if (b * NP + i < vgot[k].size()) begin bt.r[i] = vgot[k][b * NP + i]; bt.m[i] = 1; end
          else bt.r[i] = '0;
        bt.last = ((b + 1) * NP >= vgot[k].size());
        beats[k].push_back(bt);
      end
    end
  endtask

  always @(posedge clk) begin
    if (in_valid && in_ready) void'(beats[cur].pop_front());
    if (in_valid && !in_ready) n_refused++;
    if (cs_valid && cs_ready) begin
      void'(sq[scur].pop_front());
      if (sq[scur].size() == 0 || !cs_bits[BLK]) scur = -1;   // record done: may switch list
    end
    if (|inserted) n_ins += $countones(inserted);
    if (|starve_valid) n_starve++;
    if (wb_fire) n_wb++;
    if (y_valid && y_ready) begin
      checks++;
      if (y_base !== 32'(ybeats * NP)) begin failures++; $display("y_base %0d exp %0d", y_base, ybeats * NP); end
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
    // uncompressed beats
    cur = -1;
    for (int r = 0; r < NP; r++)
      if (cur < 0 && starve_valid[r] && beats[starve_list[r]].size() > 0) cur = int'(starve_list[r]);
    if (cur < 0 || $urandom_range(1, 0) == 0)
      for (int j = 0; j < K; j++) begin
        int l;
        l = (rr + j) % K;
        if (beats[l].size() > 0) begin cur = l; rr = l + 1; break; end
      end
    in_valid <= s2_run && mode2 == 0 && cur >= 0;
    in_list  <= LW'((cur < 0) ? 0 : cur);
    if (cur >= 0) begin
      for (int i = 0; i < NP; i++) in_recs[i] <= RW'(beats[cur][0].r[i]);
      in_mask <= beats[cur][0].m;
      in_last <= beats[cur][0].last;
    end
    // VLDI strings, lists switched only between records
    if (scur < 0) begin
      for (int r = 0; r < NP; r++)
        if (scur < 0 && starve_valid[r] && sq[starve_list[r]].size() > 0) scur = int'(starve_list[r]);
      if (scur < 0 || $urandom_range(1, 0) == 0)
        for (int j = 0; j < K; j++) begin
          int l;
          l = (rr + j) % K;
          if (sq[l].size() > 0) begin scur = l; rr = l + 1; break; end
        end
    end
    cs_valid <= s2_run && mode2 == 1 && scur >= 0;
    cs_list  <= LW'((scur < 0) ? 0 : scur);
    if (scur >= 0) begin
      cs_bits  <= sq[scur][0].bits;  cs_val  <= sq[scur][0].val;
      cs_first <= sq[scur][0].first; cs_last <= sq[scur][0].last;
    end
    y_ready <= thr ? ($urandom_range(3, 0) != 0) : 1'b1;
  end

  task automatic run_step2(input int m, input logic t);
    mode2 = m; thr = t; ybeats = 0;
    if (m == 0) make_beats();
    else for (int k = 0; k < K; k++) sq[k] = sgot[k];
    @(negedge clk); s2_start = 1; @(negedge clk); s2_start = 0; s2_run = 1;
    repeat (3) @(posedge clk);
    wait (s2_done);
    s2_run = 0;
    repeat (4) @(posedge clk);
    checks++;
    if (ybeats != N / NP) begin failures++; $display("step 2 mode %0d: %0d y beats", m, ybeats); end
  endtask

  // ---------------- Bloom population and queries
  task automatic hdn();
    for (int r = 0; r < N; r++)
      for (int c = 0; c < N; c++)
        if (A[r][c] != 0) begin
          @(negedge clk); deg_valid = 1; deg_row = 32'(r);
          @(posedge clk);
          while (!deg_ready) @(posedge clk);
        end
    @(negedge clk); deg_valid = 0;
    repeat (4) @(posedge clk);
    for (int r = 0; r < N; r++) begin
      int deg;
      deg = 0;
      for (int c = 0; c < N; c++) if (A[r][c] != 0) deg++;
      @(negedge clk); hq_valid = 1; hq_key = 32'(r);
      @(posedge clk);
      while (!hq_ready) @(posedge clk);
      @(negedge clk); hq_valid = 0;
      @(posedge clk);
      checks++;
      if (!hr_valid || hr_key != 32'(r)) begin failures++; $display("no Bloom result for %0d", r); end
      else if (deg > THR) begin
        n_hit++;
        if (!hr_hit) begin failures++; $display("HDN row %0d (degree %0d) missed", r, deg); end
      end else if (hr_hit) n_fp++;
    end
  endtask

  initial begin
    build();
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (dut.u_bloom.op_ready);
    hdn();
    $display("Bloom: %0d HDN hits, %0d false positives of %0d light rows", n_hit, n_fp, N - n_hit);
    // step 1, four stripes
    for (int k = 0; k < NS; k++) begin
      logic its;
      its = (k >= 2);
      if (its != its_mode) n_its++;
      its_mode = its; rd_sel = k[0]; vldi_en = its;
      load_x(k, k[0], its);
      run_step1(k, 0, vref[k].size());
      if (vldi_en) decode(k);
      check_v(k);
      $display("stripe %0d: %0d records, %0d strings", k, vgot[k].size(), sgot[k].size());
    end
    for (int k = 0; k < 2; k++) encode(k);
    // step 2, records, TS
    its_mode = 0; vldi_en = 0;
    run_step2(0, 1);
    $display("step 2 (records): %0d rows inserted, %0d refused beats, %0d starve cycles", n_ins, n_refused, n_starve);
    // step 2, VLDI strings, ITS: y into buffer 1
    its_mode = 1; n_its++; rd_sel = 0; its_base = 0; vldi_en = 1;
    run_step2(1, 0);
    $display("step 2 (VLDI, ITS): %0d write-backs", n_wb);
    // read y back through step 1 from buffer 1
    rd_sel = 1; vldi_en = 0;
    for (int r = 0; r < N; r++) X[r] = yref[r];
    vref[0].delete();
    for (int r = 0; r < N; r++) begin
      rec_t t;
      t.key = key_t'(r); t.val = yref[r];
      vref[0].push_back(t);
    end
    run_step1(0, 1, N);
    check_v(0);
    // mechanisms
    checks += 8;
    if (n_conf == 0)    begin failures++; $display("no bank conflict"); end
    if (n_ins == 0)     begin failures++; $display("no missing-key insertion"); end
    if (n_refused == 0) begin failures++; $display("no refused beat"); end
    if (n_starve == 0)  begin failures++; $display("no starvation report"); end
    if (n_wb != N / NP) begin failures++; $display("%0d ITS write-backs", n_wb); end
    if (n_its < 2)      begin failures++; $display("no ITS mode switch"); end
    if (n_multi == 0)   begin failures++; $display("no multi-string VLDI record"); end
    if (n_hit == 0)     begin failures++; $display("no Bloom hit"); end
    $display("mechanisms: conflicts %0d, inserted %0d, refused %0d, starve %0d, write-backs %0d, ITS switches %0d, multi-string records %0d, Bloom hits %0d",
             n_conf, n_ins, n_refused, n_starve, n_wb, n_its, n_multi, n_hit);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
