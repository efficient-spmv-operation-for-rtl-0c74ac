// step1_lane: one multiply/accumulate lane of step 1 (partial SpMV of a
// matrix stripe A^k with the vector segment x^k).
//
// The lane receives, in row-major order, the nonzeros of the rows assigned to
// it. Stage 0 holds a nonzero and requests x[col] from the banked
// scratchpad, waiting while the bank is taken by another lane. Stage 1
// receives the word one cycle after the grant, multiplies it with the matrix
// value and adds the product into the accumulator while the row stays the
// same. When the row changes, or at the item flagged 'last', the
// accumulated row is pushed as a record {row, sum} into a 4-entry output
// FIFO (up to two records in one cycle). An item flagged 'empty' carries no
// nonzero and only ends the stream. 'finished' rises once the last item has
// been absorbed; 'start' rearms the lane for the next stripe.
//
// The multiplier followed by an accumulating adder is the lane of the
// document's step-1 figure; the handshake, the buffering and the empty item
// are this design's choices.
module step1_lane
  import spmv_pkg::*;
#(
  parameter int unsigned AW = 21
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  // nonzero stream
  input  logic          nz_valid,
  output logic          nz_ready,
  input  nz_t           nz,
  // scratchpad port
  output logic          sp_req,
  output logic [AW-1:0] sp_addr,
  input  logic          sp_grant,
  input  logic [31:0]   sp_rdata,
  // record output
  output logic          rec_valid,
  input  logic          rec_ready,
  output rec_t          rec,
  output logic          finished
);
  // stage 0
  logic s0_valid;
  nz_t  s0_nz;
  // stage 1
  logic s1_valid, s1_fresh;
  // stage-1 copy of the nonzero; the column was only needed for the read
  typedef struct packed { key_t row; val_t val; logic last; logic empty; } s1_t;
  s1_t  s1_nz;
  logic [31:0] s1_x, xval, prod, sum;
  // accumulator
  logic acc_valid;
  key_t acc_row;
  val_t acc_val;
  // output fifo
  rec_t       fq [4];
  logic [1:0] wp, rp;
  logic [2:0] cnt;
  logic       s1_fire, s1_free_next, s0_adv, got_last;
  logic       push0, push1;
  rec_t       rec0, rec1;

  assign s1_fire      = s1_valid && (cnt <= 3'd2);
  assign s1_free_next = !s1_valid || s1_fire;
  assign sp_req       = s0_valid && !s0_nz.empty && s1_free_next;
  assign sp_addr      = s0_nz.col[AW-1:0];
  assign s0_adv       = s0_valid && s1_free_next && (s0_nz.empty || sp_grant);
  assign nz_ready     = !got_last && (!s0_valid || s0_adv);
  assign xval         = s1_fresh ? sp_rdata : s1_x;

  fp32_mul u_mul (.a(s1_nz.val), .b(xval), .y(prod));
  fp32_add u_add (.a(acc_val), .b(prod), .y(sum));

  always_comb begin
    push0 = 1'b0; push1 = 1'b0;
    rec0  = '{key: acc_row, val: acc_val};
    rec1  = '{key: s1_nz.row, val: prod};
    if (s1_fire) begin
      if (s1_nz.empty) begin
        push0 = acc_valid;
      end else if (acc_valid && acc_row == s1_nz.row) begin
        if (s1_nz.last) begin
          push0 = 1'b1;
          rec0  = '{key: acc_row, val: sum};
        end
      end else begin
        push0 = acc_valid;
        push1 = s1_nz.last;
      end
    end
  end

  assign rec_valid = (cnt != 3'd0);
  assign rec       = fq[rp];

  always_ff @(posedge clk) begin
    if (push0) fq[wp] <= rec0;
    if (push1) fq[push0 ? wp + 2'd1 : wp] <= rec1;
    if (nz_valid && nz_ready) s0_nz <= nz;
    if (s0_adv) s1_nz <= '{row: s0_nz.row, val: s0_nz.val, last: s0_nz.last, empty: s0_nz.empty};
    if (s1_fresh) s1_x <= sp_rdata;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s0_valid  <= 1'b0;
      s1_valid  <= 1'b0;
      s1_fresh  <= 1'b0;
      acc_valid <= 1'b0;
      acc_row   <= '0;
      acc_val   <= '0;
      wp        <= '0;
      rp        <= '0;
      cnt       <= '0;
      finished  <= 1'b0;
      got_last  <= 1'b0;
    end else begin
      if (nz_valid && nz_ready && (nz.last || nz.empty)) got_last <= 1'b1;
      if (nz_valid && nz_ready) s0_valid <= 1'b1;
      else if (s0_adv)          s0_valid <= 1'b0;
      if (s0_adv)       s1_valid <= 1'b1;
      else if (s1_fire) s1_valid <= 1'b0;
      s1_fresh <= s0_adv && !s0_nz.empty;
      if (s1_fire) begin
        if (s1_nz.empty || s1_nz.last) begin
          acc_valid <= 1'b0;
          finished  <= 1'b1;
        end else if (acc_valid && acc_row == s1_nz.row) begin
          acc_val <= sum;
        end else begin
          acc_valid <= 1'b1;
          acc_row   <= s1_nz.row;
          acc_val   <= prod;
        end
      end
      if (start) begin
        finished <= 1'b0;
        got_last <= 1'b0;
      end
      wp  <= wp + 2'(push0) + 2'(push1);
      rp  <= rp + 2'(rec_valid && rec_ready);
      cnt <= cnt + 3'(push0) + 3'(push1) - 3'(rec_valid && rec_ready);
    end
  end
endmodule
