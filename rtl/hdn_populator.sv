// hdn_populator: finds the high-degree nodes (HDNs) of a graph while its
// matrix meta-data streams past once, and records them in the Bloom filter.
//
// The input is the row index of every nonzero in row-major order (one per
// cycle, valid/ready). A counter measures the run length of the current
// row, i.e. the degree of that node. When the count passes THRESH, one
// insert request for the row is raised (ins_valid/ins_key) and held until
// the filter takes it (ins_ready); in_ready is low meanwhile. Later
// nonzeros of the same row do not insert it again.
//
// The document populates the filter "by streaming the meta-data once from
// DRAM and using a threshold for the number of neighbors (degree) of a
// node" and calls nodes with "more than thousand neighbors" HDNs; THRESH =
// 1000 follows that. Counting runs in a row-major stream is this design's
// choice.
module hdn_populator
  import spmv_pkg::*;
#(
  parameter int unsigned THRESH = 1000
) (
  input  logic clk,
  input  logic rst_n,
  input  logic in_valid,
  output logic in_ready,
  input  key_t in_row,
  output logic ins_valid,
  input  logic ins_ready,
  output key_t ins_key
);
  localparam int unsigned CW = $clog2(THRESH + 2);

  key_t          cur;
  logic          have;
  logic [CW-1:0] cnt;
  logic [CW-1:0] ncnt;

  assign in_ready = !ins_valid;
  assign ncnt     = (have && in_row == cur) ? ((cnt == CW'(THRESH + 1)) ? cnt : cnt + CW'(1))
                                            : CW'(1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cur       <= '0;
      have      <= 1'b0;
      cnt       <= '0;
      ins_valid <= 1'b0;
      ins_key   <= '0;
    end else begin
      if (ins_valid && ins_ready) ins_valid <= 1'b0;
      if (in_valid && in_ready) begin
        cur  <= in_row;
        have <= 1'b1;
        cnt  <= ncnt;
        if (ncnt == CW'(THRESH + 1) && cnt != CW'(THRESH + 1)) begin
          ins_valid <= 1'b1;
          ins_key   <= in_row;
        end
      end
    end
  end
endmodule
