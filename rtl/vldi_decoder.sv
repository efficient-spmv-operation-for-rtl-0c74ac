// vldi_decoder: rebuilds records from a stream of VLDI strings.
//
// Each (BLK+1)-bit string carries a leading continuation bit and a BLK-bit
// block of the delta index, most-significant block first. Blocks are shifted
// into an accumulator until a string with leading bit '0' ends the delta;
// the key is then the previous key of that list plus the delta (or the delta
// itself when the record began with s_first). The previous key is kept per
// list (s_list, LISTS entries), so the strings of different lists may be
// interleaved record by record, as page-sized fetches of many lists are.
// s_last marks the last string of a list and is passed on as out_last;
// out_list names the list of the record. One string is consumed per
// cycle; a decoded record waits in an output register (valid/ready). The
// value arriving with the last string is passed through unchanged.
//
// The inverse of vldi_encoder. The format follows the document; the
// handshakes are this design's choices.
module vldi_decoder
  import spmv_pkg::*;
#(
  parameter int unsigned BLK   = 8,
  parameter int unsigned LISTS = 2048,
  localparam int unsigned LW = (LISTS > 1) ? $clog2(LISTS) : 1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         s_valid,
  output logic         s_ready,
  input  logic [BLK:0] s_bits,
  input  val_t         s_val,
  input  logic         s_first,
  input  logic         s_last,
  input  logic [LW-1:0] s_list,
  output logic         out_valid,
  input  logic         out_ready,
  output key_t         out_key,
  output val_t         out_val,
  output logic [LW-1:0] out_list,
  output logic         out_last
);
  key_t acc;
  key_t prev [LISTS];
  logic list_start;      // current record is the first of its list
  key_t nacc;

  assign s_ready = !out_valid || out_ready;
  assign nacc    = (acc << BLK) | KEY_W'(s_bits[BLK-1:0]);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc        <= '0;
      list_start <= 1'b0;
      out_list   <= '0;
      out_last   <= 1'b0;
      out_valid  <= 1'b0;
      out_key    <= '0;
      out_val    <= '0;
    end else begin
      if (out_valid && out_ready) out_valid <= 1'b0;
      if (s_valid && s_ready) begin
        if (s_bits[BLK]) begin
          acc        <= nacc;
          if (s_first) list_start <= 1'b1;
        end else begin
          acc        <= '0;
          list_start <= 1'b0;
          out_valid  <= 1'b1;
          out_val    <= s_val;
          out_list   <= s_list;
          out_last   <= s_last;
          if (s_first || list_start) out_key <= nacc;
          else                       out_key <= prev[s_list] + nacc;
        end
      end
    end
  end

  // per-list previous key (a table without reset: written by a list's first
  // record before it is read)
  always_ff @(posedge clk) begin
    if (s_valid && s_ready && !s_bits[BLK])
      prev[s_list] <= (s_first || list_start) ? nacc : prev[s_list] + nacc;
  end
endmodule
