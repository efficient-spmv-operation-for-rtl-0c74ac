// store_queue: joins the outputs of the p parallel merge cores into the
// dense result vector.
//
// Each core has its own FIFO of QDEPTH records. Because every core delivers
// every key of its radix in order, the heads of the p FIFOs are always the
// consecutive elements y(cp+0) .. y(cp+p-1) of the result. When all FIFOs
// hold a record, the p values leave together as one beat (out_vals, with
// out_base = cp), and the beats of successive cycles are successive
// segments of y. No sorting is needed.
//
// Dequeuing all cores' records together follows the document. The depth and
// the handshake are this design's choices.
module store_queue
  import spmv_pkg::*;
#(
  parameter int unsigned NP     = 16,
  parameter int unsigned QDEPTH = 4
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic [NP-1:0]       in_valid,
  output logic [NP-1:0]       in_ready,
  input  rec_t [NP-1:0]       in_rec,
  output logic                out_valid,
  input  logic                out_ready,
  output val_t [NP-1:0]       out_vals,
  output key_t                out_base,
  output logic                empty
);
  localparam int unsigned AW = $clog2(QDEPTH);
  rec_t          q   [NP][QDEPTH];
  logic [AW-1:0] wp  [NP];
  logic [AW-1:0] rp  [NP];
  logic [AW:0]   cnt [NP];
  logic          deq;

  always_comb begin
    out_valid = 1'b1;
    empty     = 1'b1;
    for (int r = 0; r < int'(NP); r++) begin
      if (cnt[r] == '0) out_valid = 1'b0;
      else              empty     = 1'b0;
      in_ready[r] = (cnt[r] != (AW+1)'(QDEPTH));
      out_vals[r] = q[r][rp[r]].val;
    end
    out_base = q[0][rp[0]].key;
    deq      = out_valid && out_ready;
  end

  always_ff @(posedge clk) begin
    for (int r = 0; r < int'(NP); r++)
      if (in_valid[r] && in_ready[r]) q[r][wp[r]] <= in_rec[r];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int r = 0; r < int'(NP); r++) begin
        wp[r] <= '0; rp[r] <= '0; cnt[r] <= '0;
      end
    end else begin
      for (int r = 0; r < int'(NP); r++) begin
        if (in_valid[r] && in_ready[r]) wp[r] <= wp[r] + AW'(1);
        if (deq) rp[r] <= rp[r] + AW'(1);
        cnt[r] <= cnt[r] + (AW+1)'(in_valid[r] && in_ready[r]) - (AW+1)'(deq);
      end
    end
  end
endmodule
