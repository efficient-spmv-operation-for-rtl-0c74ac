// spmv_accel_top: the Two-Step SpMV accelerator, step 1 and step 2 with
// their memory-side helpers, as one block with plain-signal ports.
//
// Step 1 (partial SpMV): the host loads the current x segment into the
// banked scratchpad (ld_*, NP words per beat; in ITS mode into the buffer
// that step 1 is not reading). For one column stripe A^k, P streams of
// nonzeros (nz_*, each a packed {row, col, val, last, empty} word in
// row-major order) are multiplied by x and summed per row; the sorted
// intermediate vector v^k leaves as records (v_*) or, with vldi_en = 1, as
// VLDI strings (vc_*) for compact storage in main memory. s1_done rises when
// the stripe is finished; bank_conflict marks cycles in which a lane waited
// for a scratchpad bank.
//
// Step 2 (multi-way merge with PRaP): the K intermediate vectors come back
// from main memory as beats of up to NP records of one list (in_*), or,
// with vldi_en = 1, as VLDI strings tagged with their list (cs_*), which are
// decoded and packed into beats. The merge network pre-sorts each beat by
// the Q low key bits, keeps NP prefetch slots per list, and merges with NP
// merge cores; missing rows are inserted as zeros, so y leaves densely, NP
// consecutive rows per beat (y_*), for num_rows rows in total. starve_*
// names lists whose next records a merge core is waiting for, so that the
// memory side can fetch them first. s2_done rises when all rows are out.
//
// ITS (iteration-overlapped Two-Step): with its_mode = 1 the scratchpad is
// two half-size buffers; step 1 reads buffer rd_sel while every y beat whose
// rows fall in [its_base, its_base + SEG_WORDS/2) is also written into the
// other buffer (wb_fire), so that the next iteration's x segment is ready
// when step 2 finishes. A write-back takes the scratchpad write port for one
// cycle, so ld_ready is low in that cycle.
//
// HDN detection: a Bloom filter is populated while the row indices of the
// matrix stream past (deg_*): rows with more than HDN_THRESH nonzeros are
// inserted. hq_*/hr_* are the membership queries with which the step-1
// front end would route rows of high-degree nodes to a separate pipeline
// (that pipeline is not part of this design). bf_clr clears the filter.
//
// Defaults are the document's design point: P = 16 lanes, an 8 MB (2M word)
// scratchpad, sixteen 2048-way merge cores (Q = 4), VLDI blocks of 8 bits,
// and a 16K x 64-bit Bloom filter with 4 hash groups. The bank count, the
// port protocols, the write-back window and the sharing of the scratchpad
// write port are this design's choices.
module spmv_accel_top
  import spmv_pkg::*;
#(
  parameter int unsigned P          = 16,
  parameter int unsigned NBANKS     = 32,
  parameter int unsigned SEG_WORDS  = 2097152,
  parameter int unsigned K          = 2048,
  parameter int unsigned Q          = 4,
  parameter int unsigned SLOT_DEPTH = 16,
  parameter int unsigned BLK        = 8,
  parameter int unsigned BF_D       = 16384,
  parameter int unsigned BF_W       = 64,
  parameter int unsigned BF_G       = 4,
  parameter int unsigned HDN_THRESH = 1000,
  localparam int unsigned NP  = 1 << Q,
  localparam int unsigned AW  = $clog2(SEG_WORDS),
  localparam int unsigned LW  = $clog2(K),
  localparam int unsigned NZW = $bits(nz_t),
  localparam int unsigned RW  = $bits(rec_t)
) (
  input  logic                     clk,
  input  logic                     rst_n,
  // modes
  input  logic                     its_mode,
  input  logic                     rd_sel,
  input  logic                     vldi_en,
  input  logic [31:0]              its_base,
  // x segment load
  input  logic                     ld_valid,
  output logic                     ld_ready,
  input  logic [AW-1:0]            ld_addr,
  input  logic [NP-1:0][31:0]      ld_data,
  // step 1
  input  logic                     s1_start,
  input  logic [P-1:0]             nz_valid,
  output logic [P-1:0]             nz_ready,
  input  logic [P-1:0][NZW-1:0]    nz,
  output logic                     v_valid,
  input  logic                     v_ready,
  output logic [RW-1:0]            v_rec,
  output logic                     vc_valid,
  input  logic                     vc_ready,
  output logic [BLK:0]             vc_bits,
  output logic [31:0]              vc_val,
  output logic                     vc_end,
  output logic                     vc_first,
  output logic                     s1_done,
  output logic                     bank_conflict,
  // step 2
  input  logic                     s2_start,
  input  logic [31:0]              num_rows,
  input  logic                     in_valid,
  output logic                     in_ready,
  input  logic [LW-1:0]            in_list,
  input  logic                     in_last,
  input  logic [NP-1:0][RW-1:0]    in_recs,
  input  logic [NP-1:0]            in_mask,
  input  logic                     cs_valid,
  output logic                     cs_ready,
  input  logic [BLK:0]             cs_bits,
  input  logic [31:0]              cs_val,
  input  logic                     cs_first,
  input  logic                     cs_last,
  input  logic [LW-1:0]            cs_list,
  output logic [NP-1:0]            starve_valid,
  output logic [NP-1:0][LW-1:0]    starve_list,
  output logic                     y_valid,
  input  logic                     y_ready,
  output logic [NP-1:0][31:0]      y_vals,
  output logic [31:0]              y_base,
  output logic [NP-1:0]            inserted,
  output logic                     wb_fire,
  output logic                     s2_done,
  // HDN detection
  input  logic                     bf_clr,
  input  logic                     deg_valid,
  output logic                     deg_ready,
  input  logic [31:0]              deg_row,
  input  logic                     hq_valid,
  output logic                     hq_ready,
  input  logic [31:0]              hq_key,
  output logic                     hr_valid,
  output logic                     hr_hit,
  output logic [31:0]              hr_key
);
  // ---------------- step 1 ----------------
  logic            sp_wr;
  logic [AW-1:0]   sp_waddr;
  logic [NP-1:0][31:0] sp_wdata;
  nz_t  [P-1:0]    nz_s;
  logic            s1_ov, s1_or;
  rec_t            s1_rec;

  always_comb
    for (int i = 0; i < int'(P); i++) nz_s[i] = nz_t'(nz[i]);

  step1_unit #(.P(P), .NBANKS(NBANKS), .SEG_WORDS(SEG_WORDS), .WRW(NP)) u_step1 (
    .clk, .rst_n, .start(s1_start), .its_mode, .rd_sel,
    .ld_en(sp_wr), .ld_addr(sp_waddr), .ld_data(sp_wdata),
    .nz_valid, .nz_ready, .nz(nz_s),
    .out_valid(s1_ov), .out_ready(s1_or), .out_rec(s1_rec),
    .done(s1_done), .bank_conflict);

  // v^k: raw records, or VLDI strings
  logic enc_iv, enc_ir, v_first;
  assign v_valid = s1_ov && !vldi_en;
  assign v_rec   = RW'(s1_rec);
  assign enc_iv  = s1_ov && vldi_en;
  assign s1_or   = vldi_en ? enc_ir : v_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                     v_first <= 1'b1;
    else if (s1_start)              v_first <= 1'b1;
    else if (enc_iv && enc_ir)      v_first <= 1'b0;
  end

  vldi_encoder #(.BLK(BLK)) u_enc (
    .clk, .rst_n, .in_valid(enc_iv), .in_ready(enc_ir), .in_key(s1_rec.key),
    .in_val(s1_rec.val), .in_first(v_first),
    .s_valid(vc_valid), .s_ready(vc_ready), .s_bits(vc_bits), .s_val(vc_val),
    .s_end(vc_end), .s_first(vc_first));

  // ---------------- step 2 ----------------
  logic            dec_ov, dec_or, dec_last;
  key_t            dec_key;
  val_t            dec_val;
  logic [LW-1:0]   dec_list;

  vldi_decoder #(.BLK(BLK), .LISTS(K)) u_dec (
    .clk, .rst_n, .s_valid(cs_valid), .s_ready(cs_ready), .s_bits(cs_bits),
    .s_val(cs_val), .s_first(cs_first), .s_last(cs_last), .s_list(cs_list),
    .out_valid(dec_ov), .out_ready(dec_or), .out_key(dec_key), .out_val(dec_val),
    .out_list(dec_list), .out_last(dec_last));

  logic            pk_v, pk_r, pk_last;
  logic [LW-1:0]   pk_list;
  rec_t [NP-1:0]   pk_recs;
  logic [NP-1:0]   pk_mask;

  beat_packer #(.Q(Q), .K(K)) u_pack (
    .clk, .rst_n, .in_valid(dec_ov), .in_ready(dec_or), .in_key(dec_key),
    .in_val(dec_val), .in_list(dec_list), .in_last(dec_last),
    .out_valid(pk_v), .out_ready(pk_r), .out_list(pk_list), .out_last(pk_last),
    .out_recs(pk_recs), .out_mask(pk_mask));

  logic            m_iv, m_ir, m_last;
  logic [LW-1:0]   m_list;
  rec_t [NP-1:0]   m_recs;
  logic [NP-1:0]   m_mask;
  val_t [NP-1:0]   m_y;
  key_t            m_base;

  always_comb begin
    m_iv   = vldi_en ? pk_v    : in_valid;
    m_list = vldi_en ? pk_list : in_list;
    m_last = vldi_en ? pk_last : in_last;
    m_mask = vldi_en ? pk_mask : in_mask;
    for (int i = 0; i < int'(NP); i++) m_recs[i] = vldi_en ? pk_recs[i] : rec_t'(in_recs[i]);
  end
  assign in_ready = m_ir && !vldi_en;
  assign pk_r     = m_ir && vldi_en;

  prap_merge_network #(.K(K), .Q(Q), .SLOT_DEPTH(SLOT_DEPTH)) u_merge (
    .clk, .rst_n, .start(s2_start), .num_rows,
    .in_valid(m_iv), .in_ready(m_ir), .in_list(m_list), .in_last(m_last),
    .in_recs(m_recs), .in_mask(m_mask), .starve_valid, .starve_list,
    .y_valid, .y_ready, .y_vals(m_y), .y_base(m_base), .inserted, .done(s2_done));

  assign y_vals = m_y;
  assign y_base = m_base;

  // ---------------- ITS write-back / scratchpad write port ----------------
  logic [31:0] wb_off;
  assign wb_off  = m_base - its_base;
  assign wb_fire = its_mode && y_valid && y_ready && (m_base >= its_base) &&
                   (wb_off < 32'(SEG_WORDS / 2));
  assign ld_ready = !wb_fire;
  assign sp_wr    = wb_fire || ld_valid;
  assign sp_waddr = wb_fire ? {~rd_sel, wb_off[AW-2:0]} : ld_addr;
  assign sp_wdata = wb_fire ? m_y : ld_data;

  // ---------------- HDN detection ----------------
  logic pop_v, pop_r, bf_ready, bf_v, bf_ins;
  key_t pop_key, bf_key;

  hdn_populator #(.THRESH(HDN_THRESH)) u_pop (
    .clk, .rst_n, .in_valid(deg_valid), .in_ready(deg_ready), .in_row(deg_row),
    .ins_valid(pop_v), .ins_ready(pop_r), .ins_key(pop_key));

  assign bf_v     = pop_v || hq_valid;
  assign bf_ins   = pop_v;
  assign bf_key   = pop_v ? pop_key : hq_key;
  assign pop_r    = bf_ready;
  assign hq_ready = bf_ready && !pop_v;

  bloom_filter #(.D(BF_D), .W(BF_W), .G(BF_G)) u_bloom (
    .clk, .rst_n, .clr(bf_clr), .op_ready(bf_ready), .op_valid(bf_v),
    .op_insert(bf_ins), .op_key(bf_key),
    .res_valid(hr_valid), .res_hit(hr_hit), .res_key(hr_key));
endmodule
