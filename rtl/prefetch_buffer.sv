// prefetch_buffer: on-chip page buffer shared by all parallel merge cores.
//
// For each of the K input lists it holds a page-sized area, split into one
// slot per radix: slot (i, r) is a FIFO of SLOT_DEPTH records of list i whose
// radix is r, read only by merge core r. Because every merge core reads the
// same buffer, its size stays K x d_page however many cores there are.
//
// Space is reserved before a beat enters the pre-sorter: rsv_ok says whether
// every slot of list rsv_list has room for the records of its radix in the
// raw beat rsv_recs/rsv_mask (the count per radix does not depend on order),
// and rsv_fire books that room. A pre-sorted beat therefore always finds its
// space and the pre-sorter never blocks on a full list. Write side: one
// radix-sorted beat of list wr_list per cycle; the records of radix r,
// contiguous after the pre-sort, are appended to slot (wr_list, r) in order.
// wr_last marks the final beat of a list; from then on an empty slot of
// that list reads as the end-of-list record.
//
// Read side, per radix r: merge core r names a pair of lists (2n, 2n+1) by
// rd_pair[r] (with rd_req[r] while it needs them) and sees both heads and whether each is available (present or
// at end of list); rd_pop[r]/rd_side[r] remove the head of one of them.
// starve_valid[r]/starve_list[r] report the list a core is waiting on, for
// the DRAM-side logic that chooses what to stream next. 'start' clears all
// slots for a new operation.
//
// The shared K x d_page buffer with per-radix slots follows the document
// (d_page = 2 KB of 8-byte records split over 16 radices gives SLOT_DEPTH =
// 16). Admission control, the pair read ports and starvation reporting are
// this design's choices.
module prefetch_buffer
  import spmv_pkg::*;
#(
  parameter int unsigned K          = 2048,
  parameter int unsigned Q          = 4,
  parameter int unsigned SLOT_DEPTH = 16,
  localparam int unsigned NP = 1 << Q,
  localparam int unsigned LW = $clog2(K),
  localparam int unsigned SW = $clog2(SLOT_DEPTH)
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  start,
  input  logic                  rsv_fire,
  output logic                  rsv_ok,
  input  logic [LW-1:0]         rsv_list,
  input  rec_t [NP-1:0]         rsv_recs,
  input  logic [NP-1:0]         rsv_mask,
  input  logic                  wr_valid,
  input  logic [LW-1:0]         wr_list,
  input  logic                  wr_last,
  input  rec_t [NP-1:0]         wr_recs,
  input  logic [NP-1:0]         wr_mask,
  input  logic [NP-1:0]         rd_req,
  input  logic [NP-1:0][LW-2:0] rd_pair,
  output logic [NP-1:0][1:0]    rd_avail,
  output rec_t [NP-1:0][1:0]    rd_rec,
  input  logic [NP-1:0]         rd_pop,
  input  logic [NP-1:0]         rd_side,
  output logic [NP-1:0]         starve_valid,
  output logic [NP-1:0][LW-1:0] starve_list
);
  // records of each radix in the incoming beat and where they start
  logic [NP-1:0][Q:0]  n_of;
  logic [NP-1:0][Q-1:0] first_of;
  logic [NP-1:0][Q:0]  rn_of;
  logic [NP-1:0]       room;
  logic                wr_fire;

  always_comb begin
    for (int r = 0; r < int'(NP); r++) begin
      rn_of[r] = '0;
      for (int i = 0; i < int'(NP); i++)
        if (rsv_mask[i] && rsv_recs[i].key[Q-1:0] == Q'(r)) rn_of[r] = rn_of[r] + (Q+1)'(1);
    end
  end

  always_comb begin
    for (int r = 0; r < int'(NP); r++) begin
      n_of[r]     = '0;
      first_of[r] = '0;
      for (int i = int'(NP) - 1; i >= 0; i--)
        if (wr_mask[i] && wr_recs[i].key[Q-1:0] == Q'(r)) begin
          n_of[r]     = n_of[r] + (Q+1)'(1);
          first_of[r] = Q'(i);
        end
    end
  end

  assign rsv_ok  = &room;
  assign wr_fire = wr_valid;

  for (genvar r = 0; r < int'(NP); r++) begin : g_radix
    rec_t          mem   [K*SLOT_DEPTH];   // slot of list l at l*SLOT_DEPTH
    logic [SW:0]   cnt   [K];          // records present
    logic [SW:0]   alloc [K];          // records present or booked
    logic [SW-1:0] rp    [K];
    logic          ended [K];
    logic [LW-1:0] la, lb, lpop;

    assign la   = {rd_pair[r], 1'b0};
    assign lb   = {rd_pair[r], 1'b1};
    assign lpop = rd_side[r] ? lb : la;
    assign room[r] = (32'(alloc[rsv_list]) + 32'(rn_of[r])) <= SLOT_DEPTH;

    always_comb begin
      rd_avail[r][0] = (cnt[la] != '0) || ended[la];
      rd_avail[r][1] = (cnt[lb] != '0) || ended[lb];
      rd_rec[r][0]   = (cnt[la] != '0) ? mem[{la, rp[la]}] : '{key: KEY_END, val: '0};
      rd_rec[r][1]   = (cnt[lb] != '0) ? mem[{lb, rp[lb]}] : '{key: KEY_END, val: '0};
    end

    always_ff @(posedge clk) begin
      if (wr_fire)
        for (int k = 0; k < int'(NP); k++)
          if (k < int'(n_of[r]))
            mem[{wr_list, SW'(32'(rp[wr_list]) + 32'(cnt[wr_list]) + k)}] <= wr_recs[32'(first_of[r]) + k];
    end

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        for (int i = 0; i < int'(K); i++) begin
          cnt[i] <= '0; alloc[i] <= '0; rp[i] <= '0; ended[i] <= 1'b0;
        end
      end else if (start) begin
        for (int i = 0; i < int'(K); i++) begin
          cnt[i] <= '0; alloc[i] <= '0; rp[i] <= '0; ended[i] <= 1'b0;
        end
      end else begin
        if (wr_fire && wr_last) ended[wr_list] <= 1'b1;
        if (rsv_fire && rd_pop[r] && cnt[lpop] != '0 && lpop == rsv_list)
          alloc[rsv_list] <= alloc[rsv_list] + (SW+1)'(rn_of[r]) - (SW+1)'(1);
        else begin
          if (rsv_fire) alloc[rsv_list] <= alloc[rsv_list] + (SW+1)'(rn_of[r]);
          if (rd_pop[r] && cnt[lpop] != '0) alloc[lpop] <= alloc[lpop] - (SW+1)'(1);
        end
        if (rd_pop[r] && cnt[lpop] != '0) rp[lpop] <= rp[lpop] + SW'(1);
        if (wr_fire && rd_pop[r] && cnt[lpop] != '0 && lpop == wr_list)
          cnt[wr_list] <= cnt[wr_list] + (SW+1)'(n_of[r]) - (SW+1)'(1);
        else begin
          if (wr_fire) cnt[wr_list] <= cnt[wr_list] + (SW+1)'(n_of[r]);
          if (rd_pop[r] && cnt[lpop] != '0) cnt[lpop] <= cnt[lpop] - (SW+1)'(1);
        end
      end
    end
  end

  // a core waits when the list it must look at is neither present nor ended
  always_comb begin
    for (int r = 0; r < int'(NP); r++) begin
      starve_valid[r] = rd_req[r] && (!rd_avail[r][0] || !rd_avail[r][1]);
      starve_list[r]  = !rd_avail[r][0] ? {rd_pair[r], 1'b0} : {rd_pair[r], 1'b1};
    end
  end
endmodule
