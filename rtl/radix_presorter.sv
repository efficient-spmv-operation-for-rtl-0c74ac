// radix_presorter: pipelined bitonic network that groups the p records of
// one DRAM beat by radix, the q least significant key bits, so that the
// records of each radix can be written into the prefetch-buffer slot of the
// merge core that owns that radix.
//
// Only the radix takes part in ordering, but records of equal radix must keep
// their order within the list. A bitonic network is not stable, so every
// compare-and-swap uses the key {invalid, radix, input position}: masked
// (unused) slots sort to the end and equal radices keep their input order.
// The network has log2(p)(log2(p)+1)/2 stages with one register each (10
// for p = 16); the whole pipeline holds while out_valid is high and
// out_ready low, and in_ready = that hold condition negated.
//
// The bitonic network on the q radix bits, the stability requirement and
// q = 4 (p = 16) follow the document. The position tie-break, the masking of
// partial beats and the stall scheme are this design's choices.
module radix_presorter
  import spmv_pkg::*;
#(
  parameter int unsigned Q    = 4,
  parameter int unsigned LW   = 11,            // list index width
  localparam int unsigned NP  = 1 << Q,
  localparam int unsigned LG  = Q,             // log2(NP)
  localparam int unsigned NST = LG * (LG + 1) / 2
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               in_valid,
  output logic               in_ready,
  input  logic [LW-1:0]      in_list,
  input  logic               in_last,
  input  rec_t [NP-1:0]      in_recs,
  input  logic [NP-1:0]      in_mask,
  output logic               out_valid,
  input  logic               out_ready,
  output logic [LW-1:0]      out_list,
  output logic               out_last,
  output rec_t [NP-1:0]      out_recs,
  output logic [NP-1:0]      out_mask
);
  typedef struct packed {
    logic          inv;
    logic [Q-1:0]  radix;
    logic [LG-1:0] pos;
    rec_t          rec;
  } ent_t;

  // stage s of the network: block size k = 2^(ks+1), distance j = 2^js
  function automatic int stage_k(input int s);
    int c = 0;
    for (int a = 1; a <= int'(LG); a++)
      for (int b = a - 1; b >= 0; b--) begin
        if (c == s) return a;
        c++;
      end
    return 0;
  endfunction
  function automatic int stage_j(input int s);
    int c = 0;
    for (int a = 1; a <= int'(LG); a++)
      for (int b = a - 1; b >= 0; b--) begin
        if (c == s) return b;
        c++;
      end
    return 0;
  endfunction

  ent_t [NP-1:0]    st   [NST+1];
  logic             v    [NST+1];
  logic [LW-1:0]    lst  [NST+1];
  logic             lastf[NST+1];
  logic             hold;

  assign hold     = v[NST] && !out_ready;
  assign in_ready = !hold;

  always_comb begin
    for (int i = 0; i < int'(NP); i++) begin
      st[0][i].inv   = !in_mask[i];
      st[0][i].radix = in_recs[i].key[Q-1:0];
      st[0][i].pos   = LG'(i);
      st[0][i].rec   = in_recs[i];
    end
    v[0]     = in_valid;
    lst[0]   = in_list;
    lastf[0] = in_last;
  end

  for (genvar s = 0; s < int'(NST); s++) begin : g_stage
    localparam int KB = stage_k(s);   // sort blocks of 2^KB
    localparam int JB = stage_j(s);   // compare distance 2^JB
    ent_t [NP-1:0] nxt;
    always_comb begin
      nxt = st[s];
      for (int i = 0; i < int'(NP); i++) begin
        int p;
        logic up;
        p  = i ^ (1 << JB);
        up = ((i >> KB) & 1) == 0;
        if (p > i) begin
          if ((({st[s][i].inv, st[s][i].radix, st[s][i].pos} >
                 {st[s][p].inv, st[s][p].radix, st[s][p].pos})) == up) begin
            nxt[i] = st[s][p];
            nxt[p] = st[s][i];
          end
        end
      end
    end
    always_ff @(posedge clk) begin
      if (!hold) begin
        st[s+1]    <= nxt;
        lst[s+1]   <= lst[s];
        lastf[s+1] <= lastf[s];
      end
    end
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n)     v[s+1] <= 1'b0;
      else if (!hold) v[s+1] <= v[s];
    end
  end

  always_comb begin
    out_valid = v[NST];
    out_list  = lst[NST];
    out_last  = lastf[NST];
    for (int i = 0; i < int'(NP); i++) begin
      out_recs[i] = st[NST][i].rec;
      out_mask[i] = !st[NST][i].inv;
    end
  end
endmodule
