// tb_hobt_level_pe: self-checking test of one B+ tree level PE, configured as a
// bottom level (leaf pointers) that is not the root, with 4 nodes.
// A reference model keeps every node as a sorted list. The test fills node 0,
// searches it, has an insert refused (no room above), splits node 0 (checking
// the upstream message and both halves), deletes entries, applies an upstream
// insert while a downstream operation waits (priority), and checks that every
// result appears exactly two cycles after its operation was accepted and that
// the PE accepts one operation every two cycles.
module tb_hobt_level_pe;
  import hkv_pkg::*;
  localparam int unsigned LV = 2;
  localparam int unsigned NN = 4;
  localparam logic [PTR_W-1:0] LEAF0 = 32'hA000_0000;

  typedef struct { logic [KEY_W-1:0] key; logic [PTR_W-1:0] ptr; } ent_t;

  logic clk = 0, rst_n = 0;
  logic dn_idle;
  logic [KEY_W-1:0] upd_key;
  logic dn_valid = 0, dn_ready, dn_out_valid, up_in_valid = 0, up_out_valid;
  tree_down_t dn_in = '0, dn_out;
  tree_up_t up_in = '0, up_out;
  logic resp_valid, upd_done, upd_ok, split_pulse;
  tree_resp_t resp;
  int checks = 0, failures = 0;
  longint cyc = 0;
  ent_t model [NN][$];
  int   alloc_m = 1;
  tree_down_t opq[$];
  longint acc_t[$];
  // expected results, in order: kind 0 search(leaf), 1 update(ok), 2 split(key,ptr)
  typedef struct { int kind; logic [PTR_W-1:0] leaf; logic ok; logic [KEY_W-1:0] key; } exp_t;
  exp_t expq[$];
  int accepted = 0;
  longint first_acc = -1, last_acc = -1;

  hobt_level_pe #(.LEVEL(LV), .NODES(NN), .IS_ROOT(1'b0), .IS_BOTTOM(1'b1), .INIT_LEAF(LEAF0))
    dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // driver
  always @(posedge clk) if (rst_n) begin
    // an operation is accepted when the PE takes it from its input or its queue
    if (dut.take_dn) begin
      acc_t.push_back(cyc);
      accepted++;
      if (first_acc < 0) first_acc = cyc;
      last_acc = cyc;
    end
    if (dn_valid && dn_ready) void'(opq.pop_front());
    if (opq.size() != 0 && !(dn_valid && dn_ready && opq.size() == 0)) begin
      dn_valid <= 1'b1;
      dn_in    <= opq[0];
    end else begin
      dn_valid <= 1'b0;
    end
  end

  // monitor
  always @(posedge clk) if (rst_n) begin
    if (resp_valid || upd_done || up_out_valid) begin
      exp_t e;
      checks++;
      if (expq.size() == 0) begin failures++; $display("unexpected result"); end
      else begin
        e = expq.pop_front();
        if (resp_valid && !(e.kind == 0 && resp.leaf == e.leaf)) begin
          failures++; $display("search: leaf %h exp %h", resp.leaf, e.leaf);
        end
        if (upd_done && !(e.kind == 1 && upd_ok == e.ok && upd_key == e.key)) begin
          failures++; $display("update: ok %b exp %b (kind %0d)", upd_ok, e.ok, e.kind);
        end
        if (up_out_valid && !(e.kind == 2 && up_out.key == e.key && up_out.ptr == e.leaf)) begin
          failures++; $display("split: %h/%h exp %h/%h", up_out.key, up_out.ptr, e.key, e.leaf);
        end
      end
      if (acc_t.size() != 0) begin
        checks++;
        if (cyc - acc_t[0] != 2) begin failures++; $display("latency %0d", cyc - acc_t[0]); end
        void'(acc_t.pop_front());
      end
    end
  end

  // ------------------------------------------------------------ reference model
  function automatic logic [PTR_W-1:0] m_search(int n, logic [KEY_W-1:0] k);
    int idx = 0;
    for (int i = 1; i < model[n].size(); i++) if (model[n][i].key <= k) idx = i;
    return model[n][idx].ptr;
  endfunction

  function automatic void m_insert(int n, logic [KEY_W-1:0] k, logic [PTR_W-1:0] p);
    int pos = 0;
    ent_t e;
    e.key = k; e.ptr = p;
    for (int i = 0; i < model[n].size(); i++) if (model[n][i].key <= k) pos = i + 1;
    model[n].insert(pos, e);
  endfunction

  function automatic logic has_key(int n, logic [KEY_W-1:0] k);
    foreach (model[n][i]) if (model[n][i].key == k) return 1'b1;
    return 1'b0;
  endfunction

  task automatic op(tree_op_e o, int n, logic [KEY_W-1:0] k, logic [PTR_W-1:0] p, logic room);
    tree_down_t d = '0;
    exp_t e;
    d.t.op = o; d.t.key = k; d.t.ptr = p; d.path[LV] = PTR_W'(n); d.room = room;
    e = '{kind: 0, leaf: '0, ok: 1'b0, key: k};
    case (o)
      T_SEARCH: begin e.kind = 0; e.leaf = m_search(n, k); end
      T_DELETE: begin
        e.kind = 1;
        e.ok = has_key(n, k) && model[n].size() > 1;
        if (e.ok) foreach (model[n][i]) if (model[n][i].key == k) begin model[n].delete(i); break; end
      end
      default: begin   // T_INSERT
        if (model[n].size() < FANOUT) begin
          e.kind = 1; e.ok = 1'b1; m_insert(n, k, p);
        end else if (!room) begin
          e.kind = 1; e.ok = 1'b0;
        end else begin
          m_insert(n, k, p);
          model[alloc_m] = {};
          for (int i = FANOUT / 2; i <= FANOUT; i++) model[alloc_m].push_back(model[n][i]);
          model[n] = model[n][0:FANOUT/2-1];
          e.kind = 2; e.key = model[alloc_m][0].key; e.leaf = PTR_W'(alloc_m);
          alloc_m++;
        end
      end
    endcase
    expq.push_back(e);
    opq.push_back(d);
  endtask

  task automatic drain();
    while (opq.size() != 0 || expq.size() != 0) @(posedge clk);
    repeat (2) @(posedge clk);
  endtask

  initial begin
    logic [KEY_W-1:0] k;
    longint t0;
    int a0;
    model[0].push_back('{key: 0, ptr: LEAF0});
    repeat (3) @(posedge clk);
    rst_n <= 1;
    repeat (2) @(posedge clk);
    // fill node 0 (15 inserts of keys that are multiples of 100)
    for (int i = 0; i < 15; i++) begin
      do k = 32'($urandom_range(1, 200) * 100); while (has_key(0, k));
      op(T_INSERT, 0, k, 32'hB000_0000 + k, 1'b1);
    end
    drain();
    // searches, back to back: one accepted every two cycles
    a0 = accepted;
    first_acc = -1;
    for (int i = 0; i < 40; i++) op(T_SEARCH, 0, 32'($urandom_range(0, 21000)), '0, 1'b0);
    drain();
    checks++;
    if (accepted - a0 != 40 || last_acc - first_acc != 2 * 39) begin
      failures++; $display("rate: %0d ops in %0d cycles", accepted - a0, last_acc - first_acc);
    end
    // full node and no room above: refused
    op(T_INSERT, 0, 32'd555, 32'hC0, 1'b0);
    drain();
    // full node with room above: split
    op(T_INSERT, 0, 32'd777, 32'hC1, 1'b1);
    drain();
    for (int i = 0; i < 30; i++) begin
      k = 32'($urandom_range(0, 21000));
      op(T_SEARCH, (k >= model[1][0].key) ? 1 : 0, k, '0, 1'b0);
    end
    drain();
    // deletes: present key, absent key
    op(T_DELETE, 1, model[1][2].key, '0, 1'b0);
    op(T_DELETE, 1, 32'd1, '0, 1'b0);
    drain();
    // upstream insert with a downstream search waiting
    @(posedge clk);
    k = model[1][0].key + 32'd7;
    up_in_valid <= 1'b1;
    up_in       <= '{key: k, ptr: 32'hD0, path: tree_path_t'(PTR_W'(1) << (LV * PTR_W)), tag: k};
    begin
      exp_t e;
      m_insert(1, k, 32'hD0);
      e = '{kind: 1, leaf: '0, ok: 1'b1, key: k};
      expq.push_back(e);
      acc_t.push_back(cyc + 1);
    end
    op(T_SEARCH, 1, k + 1, '0, 1'b0);
    @(posedge clk);
    checks++;
    if (dn_idle) begin failures++; $display("downstream not held back"); end
    up_in_valid <= 1'b0;
    drain();
    for (int i = 0; i < 20; i++) begin
      k = 32'($urandom_range(0, 21000));
      op(T_SEARCH, (k >= model[1][0].key) ? 1 : 0, k, '0, 1'b0);
    end
    drain();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
