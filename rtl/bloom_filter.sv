// bloom_filter: one-memory-access Bloom filter that marks high-degree nodes
// (HDNs) of a power-law graph so that step 1 can route their rows to a
// separate pipeline.
//
// The bit array is D words of W bits. A row index is hashed into log2(D)
// bits that pick one word and G groups of log2(W) bits that pick G bit
// positions inside it, so recording or checking a key touches one word only.
// Every hash bit is the XOR of a fixed subset of the 32 key bits (an H3
// hash); the subsets come from a fixed xorshift sequence computed at
// elaboration. op_insert = 1 records the key (read-modify-write of the
// word); op_insert = 0 checks it, and res_valid/res_hit follow one cycle
// later. After reset, and after a clr pulse, the array is cleared one word
// per cycle while op_ready is low. A member always hits; a non-member hits
// with a small false-positive probability.
//
// D = 16384, W = 64 and G = 4 (38 hash bits) are the document's example
// (1 Mbit for 100K HDNs at about 2 % false positives); its XOR-based hashing
// is followed, the particular subsets, the single-cycle word update and the
// clearing sweep are this design's choices.
module bloom_filter
  import spmv_pkg::*;
#(
  parameter int unsigned D = 16384,
  parameter int unsigned W = 64,
  parameter int unsigned G = 4
) (
  input  logic clk,
  input  logic rst_n,
  input  logic clr,
  output logic op_ready,
  input  logic op_valid,
  input  logic op_insert,
  input  key_t op_key,
  output logic res_valid,
  output logic res_hit,
  output key_t res_key
);
  localparam int unsigned DW = $clog2(D);
  localparam int unsigned WW = $clog2(W);
  localparam int unsigned HB = DW + G * WW;

  typedef logic [HB-1:0][KEY_W-1:0] hmat_t;

  function automatic hmat_t gen_masks();
    hmat_t       m;
    logic [31:0] s = 32'h9E3779B9;
    for (int i = 0; i < int'(HB); i++) begin
      s = s ^ (s << 13); s = s ^ (s >> 17); s = s ^ (s << 5);
      m[i] = s;
    end
    return m;
  endfunction

  localparam hmat_t HMASK = gen_masks();

  logic [W-1:0]  mem [D];
  logic [HB-1:0] h;
  logic [DW-1:0] widx;
  logic [W-1:0]  bmask;
  logic          clearing;
  logic [DW-1:0] cptr;

  always_comb begin
    for (int i = 0; i < int'(HB); i++) h[i] = ^(op_key & HMASK[i]);
    widx  = h[DW-1:0];
    bmask = '0;
    for (int g = 0; g < int'(G); g++) bmask[h[DW + g*WW +: WW]] = 1'b1;
  end

  assign op_ready = !clearing;

  always_ff @(posedge clk) begin
    if (clearing)                           mem[cptr] <= '0;
    else if (op_valid && op_insert)         mem[widx] <= mem[widx] | bmask;
    if (op_valid && !op_insert && !clearing) begin
      res_hit <= ((mem[widx] & bmask) == bmask);
      res_key <= op_key;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      clearing  <= 1'b1;
      cptr      <= '0;
      res_valid <= 1'b0;
    end else begin
      res_valid <= op_valid && !op_insert && !clearing;
      if (clr) begin
        clearing <= 1'b1;
        cptr     <= '0;
      end else if (clearing) begin
        cptr <= cptr + DW'(1);
        if (cptr == DW'(D - 1)) clearing <= 1'b0;
      end
    end
  end
endmodule
