// beat_packer: gathers the decoded records of compressed intermediate
// vectors into the NP-wide beats that the PRaP merge network takes.
//
// Records arrive one per cycle with the list they belong to (in_list) and a
// flag for the last record of that list (in_last). They are written into
// positions 0, 1, ... of a fill beat. The fill beat is closed and moved to
// the output register when it holds NP records, when it holds the last
// record of its list, when a record of another list arrives, or when no
// record has arrived for IDLE_WAIT cycles. The last of these keeps a
// partial beat from waiting for records that will only be fetched after the
// merge has consumed it. While a beat is being closed, in_ready is low.
// Output beats carry the list, the record mask (low positions first) and
// the end-of-list flag, with valid/ready.
//
// Timing: a record reaches the output two cycles after it is accepted at
// the earliest. The document reads compressed v^k from main memory and
// decompresses it before the pre-sorter; this packing into beats, the flush
// rules and IDLE_WAIT are this design's choices.
module beat_packer
  import spmv_pkg::*;
#(
  parameter int unsigned Q         = 4,
  parameter int unsigned K         = 2048,
  parameter int unsigned IDLE_WAIT = 4,
  localparam int unsigned NP = 1 << Q,
  localparam int unsigned LW = $clog2(K)
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  output logic                in_ready,
  input  key_t                in_key,
  input  val_t                in_val,
  input  logic [LW-1:0]       in_list,
  input  logic                in_last,
  output logic                out_valid,
  input  logic                out_ready,
  output logic [LW-1:0]       out_list,
  output logic                out_last,
  output rec_t [NP-1:0]       out_recs,
  output logic [NP-1:0]       out_mask
);
  localparam int unsigned CW = $clog2(NP + 1);
  localparam int unsigned IW = $clog2(IDLE_WAIT + 1);

  logic [CW-1:0] cnt;
  logic [LW-1:0] f_list;
  logic          f_last;
  rec_t [NP-1:0] f_recs;
  logic [IW-1:0] idle;
  logic          close, ob_free;

  assign ob_free  = !out_valid || out_ready;
  assign close    = (cnt != '0) &&
                    ((cnt == CW'(NP)) || f_last || (in_valid && in_list != f_list) ||
                     (idle >= IW'(IDLE_WAIT)));
  assign in_ready = !close;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt       <= '0;
      f_list    <= '0;
      f_last    <= 1'b0;
      f_recs    <= '0;
      idle      <= '0;
      out_valid <= 1'b0;
      out_list  <= '0;
      out_last  <= 1'b0;
      out_recs  <= '0;
      out_mask  <= '0;
    end else begin
      if (out_valid && out_ready) out_valid <= 1'b0;
      if (close) begin
        if (ob_free) begin
          out_valid <= 1'b1;
          out_list  <= f_list;
          out_last  <= f_last;
          out_recs  <= f_recs;
          for (int i = 0; i < int'(NP); i++) out_mask[i] <= (CW'(i) < cnt);
          cnt    <= '0;
          f_last <= 1'b0;
          idle   <= '0;
        end
      end else if (in_valid) begin
        f_recs[cnt[CW-2:0]] <= '{key: in_key, val: in_val};
        f_list <= in_list;
        f_last <= in_last;
        cnt    <= cnt + CW'(1);
        idle   <= '0;
      end else if (cnt != '0) begin
        idle <= idle + IW'(1);
      end
    end
  end
endmodule
