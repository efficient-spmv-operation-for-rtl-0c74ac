// step1_unit: step 1 of Two-Step SpMV, the partial product v^k = A^k x^k.
//
// P lanes (multiplier plus accumulating adder) share one banked scratchpad
// that holds the source-vector segment x^k. Rows of the stripe are dealt to
// lanes by row mod P, and every lane receives its own row-major nonzero
// stream, so a lane's records come out in increasing row order. The output
// collector turns the P record streams into the single row-ordered
// intermediate vector v^k: it waits until every lane that has not finished
// shows a record, then emits the one with the smallest row (one record per
// cycle). 'done' rises once every lane has finished and drained; 'start'
// begins the next stripe.
//
// Scratchpad load: ld_en/ld_addr/ld_data write WRW consecutive words per
// cycle at a physical address (a multiple of WRW). In ITS mode (its_mode = 1) the scratchpad is split into
// two half-size buffers and rd_sel chooses the one step 1 reads.
//
// Multipliers feeding adders, the banked scratchpad and a single sorted
// output stream follow the document's step-1 figure; the lane assignment,
// the collector and all handshakes are this design's choices.
module step1_unit
  import spmv_pkg::*;
#(
  parameter int unsigned P         = 16,
  parameter int unsigned NBANKS    = 32,
  parameter int unsigned SEG_WORDS = 2097152,
  parameter int unsigned WRW       = 16,
  localparam int unsigned AW = $clog2(SEG_WORDS)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic              its_mode,
  input  logic              rd_sel,
  input  logic              ld_en,
  input  logic [AW-1:0]     ld_addr,
  input  logic [WRW-1:0][31:0] ld_data,
  input  logic [P-1:0]      nz_valid,
  output logic [P-1:0]      nz_ready,
  input  nz_t  [P-1:0]      nz,
  output logic              out_valid,
  input  logic              out_ready,
  output rec_t              out_rec,
  output logic              done,
  output logic              bank_conflict
);
  logic [P-1:0]          sp_req, sp_grant, sp_rvalid, lane_valid, lane_ready, lane_fin;
  logic [P-1:0][AW-1:0]  sp_addr;
  logic [P-1:0][31:0]    sp_rdata;
  rec_t [P-1:0]          lane_rec;

  vector_scratchpad #(.P(P), .NBANKS(NBANKS), .SEG_WORDS(SEG_WORDS), .WRW(WRW)) u_sp (
    .clk, .rst_n, .its_mode, .rd_sel,
    .wr_en(ld_en), .wr_addr(ld_addr), .wr_data(ld_data),
    .req_valid(sp_req), .req_addr(sp_addr), .req_grant(sp_grant),
    .rd_valid(sp_rvalid), .rd_data(sp_rdata), .conflict(bank_conflict)
  );

  for (genvar l = 0; l < P; l++) begin : g_lane
    step1_lane #(.AW(AW)) u_lane (
      .clk, .rst_n, .start,
      .nz_valid(nz_valid[l]), .nz_ready(nz_ready[l]), .nz(nz[l]),
      .sp_req(sp_req[l]), .sp_addr(sp_addr[l]), .sp_grant(sp_grant[l]), .sp_rdata(sp_rdata[l]),
      .rec_valid(lane_valid[l]), .rec_ready(lane_ready[l]), .rec(lane_rec[l]),
      .finished(lane_fin[l])
    );
  end

  // collector: smallest row among the lane heads, once no lane can still
  // produce a smaller one
  logic                 settled;
  logic [$clog2(P)-1:0] win;
  logic                 any;

  always_comb begin
    settled = 1'b1;
    any     = 1'b0;
    win     = '0;
    for (int l = 0; l < P; l++) begin
      if (!lane_valid[l] && !lane_fin[l]) settled = 1'b0;
      if (lane_valid[l] && (!any || lane_rec[l].key < lane_rec[win].key)) begin
        win = ($clog2(P))'(l);
        any = 1'b1;
      end
    end
    out_valid  = settled && any;
    out_rec    = lane_rec[win];
    lane_ready = '0;
    lane_ready[win] = out_valid && out_ready;
    done       = (&lane_fin) && !any;
  end

  logic unused;
  assign unused = ^sp_rvalid;
endmodule
