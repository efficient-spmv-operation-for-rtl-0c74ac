// tb_step1_unit: runs random matrix stripes through step1_unit and compares
// the intermediate vector with a reference computed in the testbench (same
// summation order as a lane: products of a row added in stream order).
// Stripe 0 uses the whole scratchpad as one segment; stripe 1 runs in
// iteration-overlap mode reading the upper buffer. Input valid and output
// ready are randomly throttled; bank conflicts must occur.
module tb_step1_unit;
  import spmv_pkg::*;
  import tb_fp_pkg::*;
  localparam int P = 4, NB = 8, SEG = 1024, AW = 10, ROWS = 300;

  logic clk = 0, rst_n = 0, start = 0, its_mode = 0, rd_sel = 0;
  logic ld_en = 0; logic [AW-1:0] ld_addr; logic [P-1:0][31:0] ld_data;
  logic [P-1:0] nz_valid, nz_ready;
  nz_t [P-1:0] nz;
  logic out_valid, out_ready, done, bank_conflict;
  rec_t out_rec;
  int checks = 0, failures = 0, conflicts = 0, cyc = 0, nrec;

  step1_unit #(.P(P), .NBANKS(NB), .SEG_WORDS(SEG), .WRW(P)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) begin
    cyc++;
    if (bank_conflict) conflicts++;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [31:0] xmem [SEG];
  nz_t         lq [P][$];
  rec_t        expq [$];

  task automatic build_stripe(input int half);
    for (int l = 0; l < P; l++) lq[l].delete();
    expq.delete();
    for (int r = 0; r < ROWS; r++) begin
      int n = $urandom_range(3, 0);
      logic [31:0] acc;
      for (int j = 0; j < n; j++) begin
        nz_t t;
        logic [31:0] pr;
        t.row = key_t'(r);
        t.col = half ? $urandom_range(SEG/2-1, 0) : $urandom_range(SEG-1, 0);
        t.val = rand_f(4);
        t.last = 0; t.empty = 0;
        pr = r2f(f2r(t.val) * f2r(xmem[half ? SEG/2 + int'(t.col) : int'(t.col)]));
        acc = (j == 0) ? pr : r2f(f2r(acc) + f2r(pr));
        lq[r % P].push_back(t);
      end
      if (n > 0) expq.push_back('{key: key_t'(r), val: acc});
    end
    for (int l = 0; l < P; l++) begin
      if (lq[l].size() == 0) begin
        nz_t e = '0;
        e.empty = 1; e.last = 1;
        lq[l].push_back(e);
      end else begin
        lq[l][lq[l].size()-1].last = 1;
      end
    end
  endtask

  // drivers
  always @(posedge clk) begin
    for (int l = 0; l < P; l++) begin
      if (nz_valid[l] && nz_ready[l]) void'(lq[l].pop_front());
    end
    #1;
    for (int l = 0; l < P; l++) begin
      nz_valid[l] <= (lq[l].size() > 0) && ($urandom_range(3, 0) != 0);
      nz[l]       <= (lq[l].size() > 0) ? lq[l][0] : '0;
    end
    out_ready <= ($urandom_range(4, 0) != 0);
  end

  // monitor
  always @(posedge clk) begin
    if (out_valid && out_ready) begin
      rec_t e;
      checks++;
      if (expq.size() == 0) begin
        failures++;
        $display("unexpected record %h", out_rec);
      end else begin
        e = expq.pop_front();
        if (e !== out_rec) begin
          failures++;
          if (failures < 10) $display("MISMATCH got %h/%h exp %h/%h", out_rec.key, out_rec.val, e.key, e.val);
        end
      end
    end
  end

  initial begin
    nz_valid = '0; out_ready = 0;
    for (int i = 0; i < SEG; i++) xmem[i] = rand_f(4);
    repeat (3) @(posedge clk);
    rst_n = 1;
    // load x
    for (int i = 0; i < SEG; i += P) begin
      @(negedge clk); ld_en = 1; ld_addr = AW'(i);
      for (int j = 0; j < P; j++) ld_data[j] = xmem[i + j];
    end
    @(negedge clk); ld_en = 0;
    for (int s = 0; s < 2; s++) begin
      its_mode = (s == 1); rd_sel = (s == 1);
      @(negedge clk); start = 1; @(negedge clk); start = 0;
      build_stripe(s);
      nrec = expq.size();
      wait (done && expq.size() == 0);
      $display("stripe %0d: %0d records", s, nrec);
      repeat (5) @(negedge clk);
    end
    checks++;
    if (conflicts == 0) begin failures++; $display("no bank conflict seen"); end
    $display("bank conflict cycles: %0d", conflicts);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
