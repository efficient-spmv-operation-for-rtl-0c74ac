// vldi_encoder: Variable Length Delta Index compression of a sorted record
// stream (intermediate vectors v^k and, optionally, matrix indices).
//
// For each record the encoder forms the delta index, the distance from the
// previous key of the same list (the first key of a list is coded as its
// distance from 0). The delta is cut into BLK-bit VLDI blocks, padding the
// most significant block with zeros, and only as many blocks as the delta
// needs are sent (at least one). Each block gets a leading bit to form a
// (BLK+1)-bit VLDI string: '1' means another string of the same delta
// follows, '0' ends it. Strings leave most-significant block first, one per
// cycle, with valid/ready. The record's value travels with the last string
// (s_end); s_first marks the first string of a list.
//
// The string format and its meaning follow the document; BLK = 8 is the
// block length it finds best for a 5 MB on-chip memory. Coding the first key
// against 0, the bit order and the handshakes are this design's choices.
module vldi_encoder
  import spmv_pkg::*;
#(
  parameter int unsigned BLK = 8,
  localparam int unsigned NBLK = (KEY_W + BLK - 1) / BLK
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           in_valid,
  output logic           in_ready,
  input  key_t           in_key,
  input  val_t           in_val,
  input  logic           in_first,
  output logic           s_valid,
  input  logic           s_ready,
  output logic [BLK:0]   s_bits,
  output val_t           s_val,
  output logic           s_end,
  output logic           s_first
);
  localparam int unsigned CW = $clog2(NBLK + 1);

  key_t                         prev;
  logic [NBLK*BLK-1:0]          dreg;      // delta of the record being sent
  logic [CW-1:0]                left;      // strings still to send
  logic                         busy, first_q;
  val_t                         vreg;
  key_t                         delta;
  logic [CW-1:0]                need;

  // number of blocks needed for 'delta'
  always_comb begin
    delta = in_first ? in_key : in_key - prev;
    need  = CW'(1);
    for (int b = 1; b < int'(NBLK); b++)
      if ((KEY_W'(delta) >> (b * BLK)) != '0) need = CW'(b + 1);
  end

  assign in_ready = !busy || (s_ready && left == CW'(1));
  assign s_valid  = busy;
  assign s_end    = (left == CW'(1));
  assign s_bits   = {left != CW'(1), dreg[(int'(left) - 1) * BLK +: BLK]};
  assign s_val    = vreg;
  assign s_first  = first_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy    <= 1'b0;
      left    <= '0;
      prev    <= '0;
      dreg    <= '0;
      vreg    <= '0;
      first_q <= 1'b0;
    end else begin
      if (busy && s_ready) begin
        left    <= left - CW'(1);
        first_q <= 1'b0;
        if (left == CW'(1)) busy <= 1'b0;
      end
      if (in_valid && in_ready) begin
        busy    <= 1'b1;
        left    <= need;
        dreg    <= (NBLK*BLK)'(delta);
        vreg    <= in_val;
        prev    <= in_key;
        first_q <= in_first;
      end
    end
  end
endmodule
