// prap_merge_network: step 2 of Two-Step SpMV, the parallel multi-way merge
// that accumulates the K intermediate vectors into the dense result y, using
// Parallelization by Radix Pre-sorter (PRaP).
//
// Data path:
//   DRAM beat (p records of list i)
//     -> radix_presorter (groups records by the q key LSBs)
//     -> prefetch_buffer (one page per list, one slot per radix)
//     -> p = 2^q merge_core, core r merging the radix-r records of all K lists
//     -> p mc_output_stage (sum equal rows, insert missing rows as zero)
//     -> store_queue (p consecutive y elements per cycle)
// All cores share the one prefetch buffer, so adding cores adds throughput
// (p records per cycle) without adding page storage.
//
// A beat is accepted (in_ready) only when the prefetch buffer can book room
// for it, so a beat of a list whose page is full is refused at the input and
// the fetch logic may offer another list instead.
//
// Interface: in_* is the beat stream (in_last marks a list's final beat,
// in_mask the occupied slots). starve_valid/starve_list tell the
// DRAM-side fetch logic which list each core is waiting for. y_valid/y_ready/
// y_vals/y_base deliver y(cp+0..cp+p-1). 'start' (with num_rows, a multiple
// of p) begins an operation; 'done' rises when every row has been delivered.
// 'inserted' shows per core that a missing row was inserted this cycle.
//
// The structure is the document's. Its sizes are too: K = 2048 lists and
// q = 4, i.e. 16 cores. The internal handshakes are this design's choices.
module prap_merge_network
  import spmv_pkg::*;
#(
  parameter int unsigned K          = 2048,
  parameter int unsigned Q          = 4,
  parameter int unsigned SLOT_DEPTH = 16,
  localparam int unsigned NP = 1 << Q,
  localparam int unsigned LW = $clog2(K)
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  start,
  input  key_t                  num_rows,
  input  logic                  in_valid,
  output logic                  in_ready,
  input  logic [LW-1:0]         in_list,
  input  logic                  in_last,
  input  rec_t [NP-1:0]         in_recs,
  input  logic [NP-1:0]         in_mask,
  output logic [NP-1:0]         starve_valid,
  output logic [NP-1:0][LW-1:0] starve_list,
  output logic                  y_valid,
  input  logic                  y_ready,
  output val_t [NP-1:0]         y_vals,
  output key_t                  y_base,
  output logic [NP-1:0]         inserted,
  output logic                  done
);
  logic                  ps_valid, ps_last, ps_in_ready, rsv_ok;
  logic [LW-1:0]         ps_list;
  rec_t [NP-1:0]         ps_recs;
  logic [NP-1:0]         ps_mask;
  logic [NP-1:0]         rd_req, rd_pop, rd_side;
  logic [NP-1:0][LW-2:0] rd_pair;
  logic [NP-1:0][1:0]    rd_avail;
  rec_t [NP-1:0][1:0]    rd_rec;
  logic [NP-1:0]         mc_valid, mc_ready, os_valid, os_ready, os_done;
  rec_t [NP-1:0]         mc_rec, os_rec;
  logic                  sq_empty;

  radix_presorter #(.Q(Q), .LW(LW)) u_presort (
    .clk, .rst_n,
    .in_valid(in_valid && rsv_ok), .in_ready(ps_in_ready), .in_list, .in_last, .in_recs, .in_mask,
    .out_valid(ps_valid), .out_ready(1'b1), .out_list(ps_list), .out_last(ps_last),
    .out_recs(ps_recs), .out_mask(ps_mask)
  );

  prefetch_buffer #(.K(K), .Q(Q), .SLOT_DEPTH(SLOT_DEPTH)) u_pfb (
    .clk, .rst_n, .start,
    .rsv_fire(in_valid && in_ready), .rsv_ok, .rsv_list(in_list), .rsv_recs(in_recs), .rsv_mask(in_mask),
    .wr_valid(ps_valid), .wr_list(ps_list), .wr_last(ps_last),
    .wr_recs(ps_recs), .wr_mask(ps_mask),
    .rd_req, .rd_pair, .rd_avail, .rd_rec, .rd_pop, .rd_side,
    .starve_valid, .starve_list
  );

  for (genvar r = 0; r < int'(NP); r++) begin : g_core
    merge_core #(.K(K)) u_mc (
      .clk, .rst_n, .start,
      .leaf_req(rd_req[r]), .leaf_pair(rd_pair[r]), .leaf_avail(rd_avail[r]), .leaf_rec(rd_rec[r]),
      .leaf_pop(rd_pop[r]), .leaf_side(rd_side[r]),
      .out_valid(mc_valid[r]), .out_ready(mc_ready[r]), .out_rec(mc_rec[r])
    );
    mc_output_stage #(.Q(Q)) u_os (
      .clk, .rst_n, .start, .radix(Q'(r)), .num_rows,
      .in_valid(mc_valid[r]), .in_ready(mc_ready[r]), .in_rec(mc_rec[r]),
      .out_valid(os_valid[r]), .out_ready(os_ready[r]), .out_rec(os_rec[r]),
      .inserted(inserted[r]), .done(os_done[r])
    );
  end

  store_queue #(.NP(NP)) u_sq (
    .clk, .rst_n,
    .in_valid(os_valid), .in_ready(os_ready), .in_rec(os_rec),
    .out_valid(y_valid), .out_ready(y_ready), .out_vals(y_vals), .out_base(y_base),
    .empty(sq_empty)
  );

  assign in_ready = ps_in_ready && rsv_ok;
  assign done     = (&os_done) && sq_empty;
endmodule
