// merge_core: K-way merge of sorted record lists as a pipelined binary tree,
// delivering one record per cycle in increasing key order.
//
// Stage L of the tree (L = 0 next to the inputs, L = LV-1 at the root) has
// K/2^(L+1) nodes, and each node owns a DEPTH-entry FIFO. The FIFOs of a
// stage are one packed memory indexed by node, in place of one register FIFO
// per node. A stage has one sorter cell. It serves refill requests from a
// small queue of {node, count} entries. To serve node n it compares the heads
// of the two child FIFOs (2n, 2n+1) one stage below, or of two input lists
// at stage 0, and moves the smaller record into node n's FIFO. It then sends
// a request to the stage below to refill the child it took from. A pop at
// the root therefore starts a single active path that walks down the tree,
// one stage per cycle, and in steady state each stage does one move per
// cycle.
//
// Filling is on demand. A node starts inactive and empty. The first time its
// parent needs it, the parent asks for DEPTH records (activation) and waits.
// After that, every pop is replaced by one refill. Lists end with the record
// of key KEY_END. A cell whose two children both show KEY_END passes
// KEY_END up without popping. The merged stream therefore ends with KEY_END,
// which stays at the output until 'start' begins a new merge.
//
// Inputs: at stage 0 the cell names the pair of lists leaf_pair
// (lists 2*leaf_pair and 2*leaf_pair+1) while leaf_req is high. It reads
// their heads and availability and pops one of them with
// leaf_pop/leaf_side. Output: out_valid/out_ready/out_rec.
//
// The binary tree, the FIFOs packed into one memory per stage, one active
// path per cycle and one record per cycle follow the document. The request
// queues, on-demand filling, DEPTH = 2 and the end marker are this design's
// choices.
module merge_core
  import spmv_pkg::*;
#(
  parameter int unsigned K     = 2048,
  parameter int unsigned DEPTH = 2,
  localparam int unsigned LV = $clog2(K),     // tree stages
  localparam int unsigned IW = LV - 1         // node index width at stage 0
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  output logic          leaf_req,
  output logic [IW-1:0] leaf_pair,
  input  logic [1:0]    leaf_avail,
  input  rec_t [1:0]    leaf_rec,
  output logic          leaf_pop,
  output logic          leaf_side,
  output logic          out_valid,
  input  logic          out_ready,
  output rec_t          out_rec
);
  localparam int unsigned RQ = 4;                  // request queue entries
  localparam int unsigned NW = $clog2(DEPTH + 1);  // request count width
  localparam int unsigned DW = $clog2(DEPTH + 1);  // FIFO count width
  localparam int unsigned PW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  // per stage: head of the request queue
  logic          q_has  [LV];
  logic [IW-1:0] q_node [LV];
  logic          q_full [LV];
  // index L: issued by stage L towards stage L-1 (index LV: by the root logic)
  logic          post_v   [LV+1];
  logic [IW-1:0] post_node[LV+1];
  logic [NW-1:0] post_num [LV+1];
  logic          pop_v    [LV+1];
  logic [IW-1:0] pop_node [LV+1];
  logic          act_v    [LV+1];
  logic [IW-1:0] act_node [LV+1];
  // children of the node stage L is serving, shown by stage L-1
  logic [1:0]    ch_avail [LV];
  logic [1:0]    ch_act   [LV];
  rec_t [1:0]    ch_head  [LV];
  // root FIFO
  logic          root_has;
  rec_t          root_head;
  logic          root_act;

  assign leaf_req     = q_has[0];
  assign leaf_pair    = q_node[0];
  assign ch_avail[0]  = leaf_avail;
  assign ch_act[0]    = 2'b11;
  assign ch_head[0]   = leaf_rec;

  for (genvar L = 0; L < int'(LV); L++) begin : g_stage
    localparam int unsigned NN  = K >> (L + 1);
    localparam int unsigned LIW = (NN > 1) ? $clog2(NN) : 1;
    localparam int unsigned MA  = (NN > 1) ? LIW + PW : PW;   // FIFO array address width

    // ---------------- node FIFOs of this stage
    rec_t          mem [NN*DEPTH];     // FIFO of node n at n*DEPTH
    logic [DW-1:0] cnt [NN];
    logic [PW-1:0] rp  [NN];
    logic          act [NN];

    // ---------------- request queue of this stage
    logic [IW-1:0] rq_node [RQ];
    logic [NW-1:0] rq_num  [RQ];
    logic [$clog2(RQ)-1:0] rq_rp, rq_wp;
    logic [$clog2(RQ):0]   rq_cnt;

    assign q_has[L]  = (rq_cnt != '0);
    assign q_node[L] = rq_node[rq_rp];
    assign q_full[L] = (rq_cnt == ($clog2(RQ)+1)'(RQ));

    // ---------------- sorter cell
    logic          can_post, need_act, act_side, win, serve, push;
    rec_t          win_rec;
    always_comb begin
      can_post = (L == 0) ? 1'b1 : !q_full[(L == 0) ? 0 : L - 1];
      need_act = q_has[L] && (ch_act[L] != 2'b11);
      act_side = ch_act[L][0];                  // activate the left child first
      win      = (ch_head[L][1].key < ch_head[L][0].key);
      win_rec  = ch_head[L][win];
      serve    = q_has[L] && !need_act && (&ch_avail[L]) &&
                 ((win_rec.key == KEY_END) || can_post);
      push     = serve;
      post_v[L]    = 1'b0;
      post_node[L] = {q_node[L][IW-2:0], win};
      post_num[L]  = NW'(1);
      pop_v[L]     = 1'b0;
      pop_node[L]  = {q_node[L][IW-2:0], win};
      act_v[L]     = 1'b0;
      act_node[L]  = {q_node[L][IW-2:0], act_side};
      if (need_act && can_post && L != 0) begin
        post_v[L]    = 1'b1;
        post_node[L] = {q_node[L][IW-2:0], act_side};
        post_num[L]  = NW'(DEPTH);
        act_v[L]     = 1'b1;
      end else if (serve && win_rec.key != KEY_END) begin
        pop_v[L]  = 1'b1;
        post_v[L] = (L != 0);
      end
    end
    if (L == 0) begin : g_leaf
      assign leaf_pop  = pop_v[0];
      assign leaf_side = win;
    end

    // ---------------- children view for the stage above
    if (L + 1 < int'(LV)) begin : g_up
      logic [LIW-1:0] c0, c1;
      assign c0 = LIW'({q_node[L+1], 1'b0});
      assign c1 = LIW'({q_node[L+1], 1'b1});
      assign ch_act[L+1]   = {act[c1], act[c0]};
      assign ch_avail[L+1] = {act[c1] && cnt[c1] != '0, act[c0] && cnt[c0] != '0};
      assign ch_head[L+1]  = {mem[MA'({c1, rp[c1]})], mem[MA'({c0, rp[c0]})]};
    end else begin : g_root
      assign root_has  = act[0] && cnt[0] != '0;
      assign root_head = mem[MA'(rp[0])];
    end

    // ---------------- state
    logic [LIW-1:0] pn, qn, an;
    assign pn = LIW'(pop_node[L+1]);
    assign qn = LIW'(q_node[L]);
    assign an = LIW'(act_node[L+1]);

    always_ff @(posedge clk) begin
      if (push) mem[MA'({qn, PW'(32'(rp[qn]) + 32'(cnt[qn]))})] <= win_rec;
      if (post_v[L+1]) begin
        rq_node[rq_wp] <= post_node[L+1];
        rq_num[rq_wp]  <= post_num[L+1];
      end
      if (serve && rq_num[rq_rp] != NW'(1)) rq_num[rq_rp] <= rq_num[rq_rp] - NW'(1);
    end

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        for (int i = 0; i < int'(NN); i++) begin
          cnt[i] <= '0; rp[i] <= '0; act[i] <= 1'b0;
        end
        rq_rp <= '0; rq_wp <= '0; rq_cnt <= '0;
      end else if (start) begin
        for (int i = 0; i < int'(NN); i++) begin
          cnt[i] <= '0; rp[i] <= '0; act[i] <= 1'b0;
        end
        rq_rp <= '0; rq_wp <= '0; rq_cnt <= '0;
      end else begin
        if (push && pop_v[L+1] && pn == qn) begin
          cnt[qn] <= cnt[qn];
        end else begin
          if (push)        cnt[qn] <= cnt[qn] + DW'(1);
          if (pop_v[L+1])  cnt[pn] <= cnt[pn] - DW'(1);
        end
        if (pop_v[L+1]) rp[pn] <= (32'(rp[pn]) == DEPTH - 1) ? '0 : rp[pn] + PW'(1);
        if (act_v[L+1]) act[an] <= 1'b1;
        // request queue
        if (post_v[L+1]) rq_wp <= rq_wp + 1'b1;
        if (serve && rq_num[rq_rp] == NW'(1)) rq_rp <= rq_rp + 1'b1;
        rq_cnt <= rq_cnt + ($clog2(RQ)+1)'(post_v[L+1])
                         - ($clog2(RQ)+1)'(serve && rq_num[rq_rp] == NW'(1));
      end
    end
  end

  // ---------------- root: output port and requests into the top stage
  // a record is offered only when its refill request can be queued
  assign out_valid = root_has && (root_head.key == KEY_END || !q_full[LV-1]);
  assign out_rec   = root_head;
  always_comb begin
    post_v[LV]    = 1'b0;
    post_node[LV] = '0;
    post_num[LV]  = NW'(1);
    pop_v[LV]     = 1'b0;
    pop_node[LV]  = '0;
    act_v[LV]     = 1'b0;
    act_node[LV]  = '0;
    if (!root_act && !q_full[LV-1]) begin
      post_v[LV]   = 1'b1;
      post_num[LV] = NW'(DEPTH);
      act_v[LV]    = 1'b1;
    end else if (root_has && out_ready && root_head.key != KEY_END && !q_full[LV-1]) begin
      pop_v[LV]  = 1'b1;
      post_v[LV] = 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)         root_act <= 1'b0;
    else if (start)     root_act <= 1'b0;
    else if (act_v[LV]) root_act <= 1'b1;
  end
endmodule
