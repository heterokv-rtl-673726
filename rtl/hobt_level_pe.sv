// hobt_level_pe: one level of the hardware-oriented B+ tree (HOBT).
//
// Each level of the index is kept by one PE that owns the nodes of that level in
// its own memory; the PEs of all levels are the same except for the number of
// nodes (NODES). A node holds up to FANOUT entries {key, ptr} sorted by key; ptr is
// a node index of the next level, or at the bottom level a leaf (hash table)
// pointer. Entry 0 covers every key below entry 1, so a lookup follows entry
// i = number of entries 1..cnt-1 whose key is <= the search key.
//
// Timing: every operation takes two cycles in the PE - the node is read in the
// cycle the operation is accepted, and in the next cycle the PE decides, writes
// the node back and registers its output - so a PE starts one operation every
// two clock cycles and the levels form a pipeline with two cycles per level.
//
// Downstream (towards the leaves): T_SEARCH and T_NOP pass through every level;
// the bottom PE returns the leaf pointer on `resp`. T_INSERT and T_DELETE are
// routed like a search and applied in the bottom node. Upstream (towards the
// root): when an insert meets a full node, the node splits - the lower FANOUT/2
// entries stay, the rest move to a newly allocated node of the same level - and
// the PE sends {first key of the new node, its index} to its parent on `up_out`.
//
// Updates are pipelined with lookups. Three mechanisms keep that safe:
//  - Reservation stations: operations from above and split inserts from below
//    wait in small queues (QDEPTH) in front of the PE; a split insert goes first.
//    An operation that finds the PE idle and its queue empty is taken at once.
//  - Split forwarding: the PE remembers its last RDEPTH splits {old node, split
//    key, new node}. An operation that was routed to the old node before the
//    parent learnt of the split, and whose key is at or above the split key, is
//    sent to the new node instead. The splits are applied oldest first, so a
//    chain of splits in that short window is followed too.
//  - Room check with margin: on the way down each PE tells the next whether a
//    split from below could be absorbed (`room`), counting MARGIN operations that
//    may be ahead in the tree. A bottom insert whose split could not be absorbed
//    is refused (ok = 0) and leaves the tree unchanged; so is a delete that
//    would empty a node. The root never splits; nodes are never merged or freed.
// Interface: dn_valid/dn_ready push an operation (dn_ready: queue space;
// dn_idle: it would be taken at once); up_in is a split insert from the child
// level and is always queued; dn_out, up_out, resp and upd_done are one-cycle
// registered pulses; upd_key tags an update's finish with its key.
// After reset the PE spends one cycle writing node 0 (one entry, key 0, pointing
// to node 0 below or to leaf INIT_LEAF at the bottom).
// The level-per-PE organisation, the two-cycle operation, the downstream /
// upstream update flow and the use of reservation stations follow the
// document; node format, split rule, fan-out, split forwarding, the room margin
// and the handling of full or empty nodes are this design's own choices.
module hobt_level_pe
  import hkv_pkg::*;
#(
  parameter int unsigned LEVEL     = 0,
  parameter int unsigned NODES     = 1,
  parameter bit          IS_ROOT   = 1'b1,
  parameter bit          IS_BOTTOM = 1'b1,
  parameter logic [PTR_W-1:0] INIT_LEAF = '0,
  parameter int unsigned QDEPTH    = 4,
  parameter int unsigned RDEPTH    = 4,
  parameter int unsigned MARGIN    = 3
) (
  input  logic       clk,
  input  logic       rst_n,
  // downstream in (queued) / out
  input  logic       dn_valid,
  output logic       dn_ready,     // the downstream queue has space
  output logic       dn_idle,      // an operation offered now is taken at once
  input  tree_down_t dn_in,
  output logic       dn_out_valid,
  output tree_down_t dn_out,
  // upstream in (from the child level, queued) / out (to the parent level)
  input  logic       up_in_valid,
  input  tree_up_t   up_in,
  output logic       up_out_valid,
  output tree_up_t   up_out,
  // bottom level result of searches and end markers
  output logic       resp_valid,
  output tree_resp_t resp,
  // an update finished at this level
  output logic       upd_done,
  output logic       upd_ok,
  output logic [KEY_W-1:0] upd_key,
  output logic       split_pulse
);
  localparam int unsigned NW   = (NODES > 1) ? $clog2(NODES) : 1;
  localparam int unsigned IW   = $clog2(FANOUT);
  localparam int unsigned HALF = FANOUT / 2;
  localparam int unsigned NEXT = (LEVEL + 1 < LEVELS) ? LEVEL + 1 : LEVEL;
  localparam int unsigned QW   = $clog2(QDEPTH);

  typedef struct packed {
    logic [KEY_W-1:0] key;
    logic [PTR_W-1:0] ptr;
  } entry_t;

  typedef enum logic [1:0] {S_INIT, S_IDLE, S_EXEC} state_e;

  tree_node_t     mem [NODES];
  state_e         state;
  tree_node_t     node_q;
  tree_down_t     op_q;
  logic           is_up_q;        // the operation in S_EXEC came from upstream
  logic [KEY_W-1:0] tag_q;
  logic [NW-1:0]  addr_q;
  logic [NW:0]    alloc;          // next free node index

  // ------------------------------------------------------ reservation stations
  tree_down_t     dq [QDEPTH];
  tree_up_t       uq [QDEPTH];
  logic [QW-1:0]  dq_h, dq_t, uq_h, uq_t;
  logic [QW:0]    dq_n, uq_n;
  logic           up_av, dn_av, take_up, take_dn, idle;
  tree_down_t     dn_sel;
  tree_up_t       up_sel;

  assign idle     = (state == S_IDLE);
  assign up_av    = (uq_n != 0) || up_in_valid;
  assign dn_av    = (dq_n != 0) || dn_valid;   // dn_valid alone: queue empty, so ready
  assign up_sel   = (uq_n != 0) ? uq[uq_h] : up_in;
  assign dn_sel   = (dq_n != 0) ? dq[dq_h] : dn_in;
  assign take_up  = idle && up_av;
  assign take_dn  = idle && !up_av && dn_av;
  assign dn_ready = (dq_n != (QW+1)'(QDEPTH));
  assign dn_idle  = idle && !up_av && (dq_n == 0);

  // ------------------------------------------------------------ split forwarding
  logic [RDEPTH-1:0]             fw_v;
  logic [RDEPTH-1:0][NW-1:0]     fw_old, fw_new;
  logic [RDEPTH-1:0][KEY_W-1:0]  fw_sep;

  function automatic logic [NW-1:0] forward(logic [NW-1:0] a, logic [KEY_W-1:0] k);
    logic [NW-1:0] r = a;
    for (int i = RDEPTH - 1; i >= 0; i--)     // oldest split first
      if (fw_v[i] && fw_old[i] == r && k >= fw_sep[i]) r = fw_new[i];
    return r;
  endfunction

  logic [NW-1:0]    rd_addr;
  logic [KEY_W-1:0] sel_key;
  assign sel_key = take_up ? up_sel.key : dn_sel.t.key;
  assign rd_addr = forward(take_up ? NW'(up_sel.path[LEVEL]) : NW'(dn_sel.path[LEVEL]), sel_key);

  // ---------------------------------------------------------------- node helpers
  function automatic logic [IW-1:0] child_index(tree_node_t n, logic [KEY_W-1:0] k);
    logic [IW-1:0] idx = '0;
    for (int i = 1; i < FANOUT; i++)
      if (CNT_W'(i) < n.cnt && n.keys[i] <= k) idx = IW'(i);
    return idx;
  endfunction

  // Node with {k, p} inserted in key order, FANOUT+1 entries wide (cnt+1 used).
  function automatic void insert_wide(input tree_node_t n, input logic [KEY_W-1:0] k,
                                      input logic [PTR_W-1:0] p, output entry_t w [FANOUT+1]);
    int pos = 0;
    for (int i = 0; i < FANOUT; i++)
      if (CNT_W'(i) < n.cnt && n.keys[i] <= k) pos = i + 1;
    for (int i = 0; i <= FANOUT; i++) begin
      if (i < pos)       w[i] = '{key: n.keys[i],   ptr: n.ptrs[i]};
      else if (i == pos) w[i] = '{key: k,           ptr: p};
      else               w[i] = '{key: n.keys[i-1], ptr: n.ptrs[i-1]};
    end
  endfunction

  // --------------------------------------------------------------- decide (S_EXEC)
  entry_t         wide [FANOUT+1];
  tree_node_t     node_ins, node_lo, node_hi, node_del;
  logic           full, del_found, del_ok, can_alloc, do_insert, room_here, ins_ok;
  logic [IW-1:0]  cidx, del_pos;
  logic [NW:0]    free_nodes;

  assign cidx       = child_index(node_q, op_q.t.key);
  assign do_insert  = is_up_q || (IS_BOTTOM && op_q.t.op == T_INSERT);
  assign full       = (node_q.cnt == CNT_W'(FANOUT));
  assign can_alloc  = (alloc < (NW+1)'(NODES)) && !IS_ROOT;
  assign free_nodes = (NW+1)'(NODES) - alloc;
  // room_here: a split arriving from below into this node, and every split it
  // sets off above, fits even if MARGIN other operations ahead insert first.
  assign room_here  = (32'(node_q.cnt) + MARGIN < FANOUT) ||
                      (!IS_ROOT && 32'(free_nodes) > MARGIN && op_q.room);
  // Upstream inserts were checked on the way down and always fit.
  assign ins_ok     = is_up_q || !full || (can_alloc && !IS_ROOT && op_q.room);

  always_comb begin
    insert_wide(node_q, op_q.t.key, op_q.t.ptr, wide);
    node_ins = node_q;
    node_lo  = '0;
    node_hi  = '0;
    for (int i = 0; i < FANOUT; i++) begin
      node_ins.keys[i] = wide[i].key;
      node_ins.ptrs[i] = wide[i].ptr;
    end
    node_ins.cnt = node_q.cnt + 1'b1;
    for (int i = 0; i < HALF; i++) begin
      node_lo.keys[i] = wide[i].key;
      node_lo.ptrs[i] = wide[i].ptr;
    end
    node_lo.cnt = CNT_W'(HALF);
    for (int i = 0; i < FANOUT + 1 - HALF; i++) begin
      node_hi.keys[i] = wide[HALF+i].key;
      node_hi.ptrs[i] = wide[HALF+i].ptr;
    end
    node_hi.cnt = CNT_W'(FANOUT + 1 - HALF);
  end

  always_comb begin
    del_found = 1'b0;
    del_pos   = '0;
    for (int i = FANOUT - 1; i >= 0; i--)
      if (CNT_W'(i) < node_q.cnt && node_q.keys[i] == op_q.t.key) begin
        del_found = 1'b1;
        del_pos   = IW'(i);
      end
    del_ok   = del_found && (node_q.cnt > CNT_W'(1));
    node_del = node_q;
    for (int i = 0; i < FANOUT - 1; i++)
      if (IW'(i) >= del_pos) begin
        node_del.keys[i] = node_q.keys[i+1];
        node_del.ptrs[i] = node_q.ptrs[i+1];
      end
    node_del.keys[FANOUT-1] = '0;
    node_del.ptrs[FANOUT-1] = '0;
    node_del.cnt = node_q.cnt - 1'b1;
  end

  logic do_split;
  assign do_split = (state == S_EXEC) && do_insert && ins_ok && full;

  // ------------------------------------------------------------------- sequential
  logic up_push, up_pop, dn_push, dn_pop;
  assign up_push = up_in_valid && !(take_up && uq_n == 0);
  assign up_pop  = take_up && uq_n != 0;
  assign dn_push = dn_valid && dn_ready && !(take_dn && dq_n == 0);
  assign dn_pop  = take_dn && dq_n != 0;

  tree_node_t init_node;
  always_comb begin
    init_node         = '0;
    init_node.cnt     = CNT_W'(1);
    init_node.ptrs[0] = IS_BOTTOM ? INIT_LEAF : '0;
  end

  always_ff @(posedge clk) begin
    if (state == S_INIT) mem[0] <= init_node;
    if (take_up || take_dn) node_q <= mem[rd_addr];
    if (state == S_EXEC) begin
      if (do_insert && ins_ok) begin
        if (!full) mem[addr_q] <= node_ins;
        else begin
          mem[addr_q]     <= node_lo;
          mem[NW'(alloc)] <= node_hi;
        end
      end else if (IS_BOTTOM && op_q.t.op == T_DELETE && del_ok) begin
        mem[addr_q] <= node_del;
      end
    end
    // reservation-station storage
    if (up_in_valid && !(take_up && uq_n == 0)) uq[uq_t] <= up_in;
    if (dn_push)                                dq[dq_t] <= dn_in;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state        <= S_INIT;
      alloc        <= (NW+1)'(1);
      op_q         <= '0;
      is_up_q      <= 1'b0;
      tag_q        <= '0;
      addr_q       <= '0;
      dq_h <= '0; dq_t <= '0; dq_n <= '0;
      uq_h <= '0; uq_t <= '0; uq_n <= '0;
      fw_v <= '0; fw_old <= '0; fw_new <= '0; fw_sep <= '0;
      dn_out_valid <= 1'b0;
      dn_out       <= '0;
      up_out_valid <= 1'b0;
      up_out       <= '0;
      resp_valid   <= 1'b0;
      resp         <= '0;
      upd_done     <= 1'b0;
      upd_ok       <= 1'b0;
      upd_key      <= '0;
      split_pulse  <= 1'b0;
    end else begin
      dn_out_valid <= 1'b0;
      up_out_valid <= 1'b0;
      resp_valid   <= 1'b0;
      upd_done     <= 1'b0;
      split_pulse  <= 1'b0;
      if (up_push) uq_t <= uq_t + 1'b1;
      if (up_pop)  uq_h <= uq_h + 1'b1;
      uq_n <= uq_n + (QW+1)'(up_push) - (QW+1)'(up_pop);
      if (dn_push) dq_t <= dq_t + 1'b1;
      if (dn_pop)  dq_h <= dq_h + 1'b1;
      dq_n <= dq_n + (QW+1)'(dn_push) - (QW+1)'(dn_pop);
      unique case (state)
        S_INIT: state <= S_IDLE;
        S_IDLE: begin
          if (take_up) begin
            op_q        <= '0;
            op_q.t.op   <= T_INSERT;
            op_q.t.key  <= up_sel.key;
            op_q.t.ptr  <= up_sel.ptr;
            op_q.path   <= up_sel.path;
            op_q.path[LEVEL] <= PTR_W'(rd_addr);
            is_up_q     <= 1'b1;
            tag_q       <= up_sel.tag;
            addr_q      <= rd_addr;
            state       <= S_EXEC;
          end else if (take_dn) begin
            op_q    <= dn_sel;
            op_q.path[LEVEL] <= PTR_W'(rd_addr);
            is_up_q <= 1'b0;
            tag_q   <= dn_sel.t.key;
            addr_q  <= rd_addr;
            state   <= S_EXEC;
          end
        end
        S_EXEC: begin
          state <= S_IDLE;
          if (do_insert) begin
            if (!ins_ok || !full) begin
              upd_done <= 1'b1;
              upd_ok   <= ins_ok;
              upd_key  <= tag_q;
            end else begin
              alloc        <= alloc + 1'b1;
              split_pulse  <= 1'b1;
              up_out_valid <= 1'b1;
              up_out.key   <= wide[HALF].key;
              up_out.ptr   <= PTR_W'(alloc);
              up_out.path  <= op_q.path;
              up_out.tag   <= tag_q;
              fw_v   <= {fw_v[RDEPTH-2:0], 1'b1};
              fw_old <= {fw_old[RDEPTH-2:0], addr_q};
              fw_new <= {fw_new[RDEPTH-2:0], NW'(alloc)};
              fw_sep <= {fw_sep[RDEPTH-2:0], wide[HALF].key};
            end
          end else if (IS_BOTTOM) begin
            if (op_q.t.op == T_DELETE) begin
              upd_done <= 1'b1;
              upd_ok   <= del_ok;
              upd_key  <= tag_q;
            end else begin
              resp_valid <= 1'b1;
              resp.op    <= op_q.t.op;
              resp.leaf  <= node_q.ptrs[cidx];
              resp.req   <= op_q.t.req;
              resp.last  <= op_q.t.last;
              resp.ok    <= (node_q.cnt != 0);
            end
          end else begin
            dn_out_valid      <= 1'b1;
            dn_out            <= op_q;
            dn_out.path[NEXT] <= node_q.ptrs[cidx];
            dn_out.room       <= room_here;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // The queues must never overflow, and a split insert must always fit.
  a_uq:    assert property (@(posedge clk) disable iff (!rst_n)
             up_push |-> uq_n != (QW+1)'(QDEPTH));
  a_split: assert property (@(posedge clk) disable iff (!rst_n)
             do_split |-> (can_alloc || !is_up_q));
endmodule
