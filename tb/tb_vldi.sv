// tb_vldi: VLDI encoder and decoder.
// 1) A BLK=7 encoder must turn the 17-bit delta 1_0100_0110_1110_1001 into
//    the three strings 1_0000101, 1_0001101, 0_1101001.
// 2) Random sorted lists (small, medium and very large gaps) pass through a
//    BLK=8 encoder into a decoder under random back-pressure; every string
//    is checked against an independently computed expectation and every
//    decoded record against the input.
module tb_vldi;
  import spmv_pkg::*;
  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- example with 7-bit blocks
  logic e7_iv, e7_ir, e7_sv, e7_se, e7_sf;
  key_t e7_key; logic [7:0] e7_bits; val_t e7_sval;
  vldi_encoder #(.BLK(7)) u_e7 (.clk, .rst_n, .in_valid(e7_iv), .in_ready(e7_ir), .in_key(e7_key),
    .in_val(32'h1234), .in_first(1'b1), .s_valid(e7_sv), .s_ready(1'b1), .s_bits(e7_bits),
    .s_val(e7_sval), .s_end(e7_se), .s_first(e7_sf));
  logic [7:0] ex7 [3] = '{8'b1_0000101, 8'b1_0001101, 8'b0_1101001};
  int n7 = 0;
  always @(posedge clk) if (rst_n && e7_sv) begin
    checks++;
    if (n7 > 2 || e7_bits !== ex7[n7] || e7_se !== (n7 == 2)) begin
      failures++; $display("example string %0d = %b", n7, e7_bits);
    end
    n7++;
  end

  // ---- random round trip with 8-bit blocks
  localparam int BLK = 8;
  logic iv, ir, sv, sr, se, sf, ov, orr;
  key_t ikey, okey; val_t ival, sval, oval; logic ifirst;
  logic [BLK:0] sbits;
  vldi_encoder #(.BLK(BLK)) u_enc (.clk, .rst_n, .in_valid(iv), .in_ready(ir), .in_key(ikey), .in_val(ival),
    .in_first(ifirst), .s_valid(sv), .s_ready(sr), .s_bits(sbits), .s_val(sval), .s_end(se), .s_first(sf));
  vldi_decoder #(.BLK(BLK)) u_dec (.clk, .rst_n, .s_valid(sv), .s_ready(sr), .s_bits(sbits), .s_val(sval),
    .s_first(sf), .s_last(1'b0), .s_list(11'd0), .out_valid(ov), .out_ready(orr), .out_key(okey), .out_val(oval),
    .out_list(), .out_last());

  typedef struct { key_t k; val_t v; logic f; } item_t;
  item_t inq [$];
  rec_t  expq [$];
  logic [BLK:0] sexp [$];
  int nstr = 0;

  task automatic make_lists();
    for (int l = 0; l < 20; l++) begin
      key_t k = 0;
      for (int i = 0; i < 50; i++) begin
        int sel = $urandom_range(2, 0);
        key_t d = (sel == 0) ? key_t'($urandom_range(200, 1)) :
                  (sel == 1) ? key_t'($urandom_range(70000, 1)) : key_t'($urandom_range(32'h7fffff, 1));
        item_t it;
        if (i == 0) d = key_t'($urandom_range(1000, 0));
        if (64'(k) + 64'(d) >= 64'hFFFF_FFFF) break;
        k = k + d;
        it.k = k; it.v = $urandom; it.f = (i == 0);
        inq.push_back(it);
        expq.push_back('{key: k, val: it.v});
        // expected strings: minimal number of 8-bit blocks, MS first
        begin
          int nb = 1;
          for (int b = 1; b < 4; b++) if ((d >> (8 * b)) != 0) nb = b + 1;
          for (int b = nb - 1; b >= 0; b--) sexp.push_back({b != 0, d[8*b +: 8]});
        end
      end
    end
  endtask

  always @(posedge clk) begin
    if (iv && ir) void'(inq.pop_front());
    if (rst_n && sv && sr) begin
      logic [BLK:0] e;
      checks++; nstr++;
      e = sexp.pop_front();
      if (sbits !== e) begin failures++; if (failures < 10) $display("string %b exp %b", sbits, e); end
    end
    if (rst_n && ov && orr) begin
      rec_t e;
      checks++;
      e = expq.pop_front();
      if (okey !== e.key || oval !== e.val) begin
        failures++; if (failures < 10) $display("decoded %h/%h exp %h/%h", okey, oval, e.key, e.val);
      end
    end
    #1;
    iv     <= rst_n && (inq.size() > 0) && ($urandom_range(3, 0) != 0);
    ikey   <= (inq.size() > 0) ? inq[0].k : '0;
    ival   <= (inq.size() > 0) ? inq[0].v : '0;
    ifirst <= (inq.size() > 0) ? inq[0].f : 1'b0;
    orr    <= ($urandom_range(3, 0) != 0);
  end

  initial begin
    iv = 0; orr = 0; e7_iv = 0;
e7_key = 32'b1_0100_0110_1110_1001;
    make_lists();
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk); e7_iv = 1; @(negedge clk); e7_iv = 0;
    wait (inq.size() == 0 && expq.size() == 0);
    repeat (5) @(posedge clk);
    checks++;
    if (n7 != 3) begin failures++; $display("example gave %0d strings", n7); end
    $display("strings sent: %0d", nstr);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
