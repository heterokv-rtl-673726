// tb_hobt: self-checking test of the 3-level B+ tree index at its default size
// (fan-out 16: 1, 16 and 256 nodes per level).
// A reference model keeps the sorted list of leaf separators; the leaf of a key is
// the one with the largest separator not above it. The test inserts random leaves
// until the bottom level runs out of nodes (splits at levels 2 and 1 and refused
// inserts must all happen), checks back-to-back lookups (one accepted every two
// cycles, result after 2*LEVELS cycles), deletes leaves (present and absent) and
// checks lookups again; keys in the range of a deleted leaf may go to either
// neighbour. A first, pipelined phase sends inserts, deletes and lookups back to
// back; their results (lookups in order, updates tagged with their key) are
// replayed in admission order against the model, and split forwarding must occur.
module tb_hobt;
  import hkv_pkg::*;
  localparam logic [PTR_W-1:0] LEAF0 = 32'hA000_0000;

  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_ready, resp_valid, upd_done, upd_ok;
  logic [KEY_W-1:0] upd_key;
  tree_req_t in_op = '0;
  tree_resp_t resp;
  logic [LEVELS-1:0] split_pulse;
  int checks = 0, failures = 0;
  longint cyc = 0;

  logic [KEY_W-1:0] mkeys[$];
  logic [PTR_W-1:0] mptrs[$];
  logic [KEY_W-1:0] deleted[$];
  tree_req_t opq[$];
  longint acc_t[$];
  tree_req_t accq[$];
  int n_split[LEVELS];
  int n_refused = 0, n_ins_ok = 0, n_search = 0;
  longint first_acc, last_acc;
  int accepted = 0;
  // pipelined phase: results are collected, then replayed in admission order
  bit pipe = 1'b0;
  logic [PTR_W-1:0] sres[$];
  logic ures[logic [KEY_W-1:0]];
  int n_res = 0;
  int n_fwd = 0;

  hobt #(.INIT_LEAF(LEAF0)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin : watchdog
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int m_find(logic [KEY_W-1:0] k);  // index of largest key <= k
    int lo = 0, hi = mkeys.size() - 1;
    int mid;
    while (lo < hi) begin
      mid = (lo + hi + 1) / 2;
      if (mkeys[mid] <= k) lo = mid; else hi = mid - 1;
    end
    return lo;
  endfunction

  function automatic logic m_has(logic [KEY_W-1:0] k);
    return mkeys[m_find(k)] == k;
  endfunction

  function automatic logic leaf_good(logic [KEY_W-1:0] k, logic [PTR_W-1:0] leaf);
    int i;
    logic good;
    i = m_find(k);
    good = (leaf == mptrs[i]);
    // key inside the range of a deleted leaf: the right neighbour is also valid
    foreach (deleted[j])
      if (mkeys[i] < deleted[j] && deleted[j] <= k &&
          i + 1 < mptrs.size() && leaf == mptrs[i+1]) good = 1'b1;
    return good;
  endfunction

  // driver
  always @(posedge clk) if (rst_n) begin
    if (in_valid && in_ready) begin
      acc_t.push_back(cyc);
      accq.push_back(in_op);
      accepted++;
      if (first_acc < 0) first_acc = cyc;
      last_acc = cyc;
      void'(opq.pop_front());
    end
    if (opq.size() != 0) begin
      in_valid <= 1'b1;
      in_op    <= opq[0];
    end else begin
      in_valid <= 1'b0;
    end
  end

  // monitor
  always @(posedge clk) if (rst_n) begin
    for (int l = 0; l < LEVELS; l++) if (split_pulse[l]) n_split[l]++;
    // operations sent on by split forwarding (routed to a node before its split was known above)
    if ((dut.g_level[1].u_pe.take_dn && dut.g_level[1].u_pe.rd_addr != dut.g_level[1].u_pe.dn_sel.path[1][3:0]) ||
        (dut.g_level[2].u_pe.take_dn && dut.g_level[2].u_pe.rd_addr != dut.g_level[2].u_pe.dn_sel.path[2][7:0]))
      n_fwd++;
    if (pipe) begin
      if (resp_valid) begin sres.push_back(resp.leaf); n_res++; end
      if (upd_done)   begin ures[upd_key] = upd_ok;    n_res++; end
    end else if (resp_valid || upd_done) begin
      tree_req_t o;
      longint t;
      int i;
      logic good, has;
      checks++;
      if (accq.size() == 0) begin failures++; $display("unexpected result"); end
      else begin
        o = accq.pop_front();
        t = acc_t.pop_front();
        if (resp_valid) begin
          n_search++;
          if (!leaf_good(o.key, resp.leaf) || o.op != T_SEARCH) begin
            failures++; $display("search %h: leaf %h", o.key, resp.leaf);
          end
          checks++;
          if (cyc - t != 2 * LEVELS) begin failures++; $display("latency %0d", cyc - t); end
        end else if (o.op == T_INSERT) begin
          if (upd_ok) begin
            i = m_find(o.key);
            mkeys.insert(i + 1, o.key);
            mptrs.insert(i + 1, o.ptr);
            n_ins_ok++;
          end else n_refused++;
        end else if (o.op == T_DELETE) begin
          has = m_has(o.key);
          if (upd_ok != has) begin failures++; $display("delete %h ok %b exp %b", o.key, upd_ok, has); end
          if (upd_ok) begin
            i = m_find(o.key);
            mkeys.delete(i); mptrs.delete(i);
            deleted.push_back(o.key);
          end
        end else begin
          failures++; $display("result for a non-update");
        end
      end
    end
  end

  task automatic issue(tree_op_e op, logic [KEY_W-1:0] k, logic [PTR_W-1:0] p);
    tree_req_t r = '0;
    r.op = op; r.key = k; r.ptr = p;
    opq.push_back(r);
  endtask

  task automatic drain();
    while (opq.size() != 0 || accq.size() != 0) @(posedge clk);
    repeat (2) @(posedge clk);
  endtask

  // Wait for all pipelined results, then check them in admission order: the
  // index must behave as if the operations had run one after the other.
  task automatic pipe_check();
    tree_req_t o;
    int i;
    logic has;
    while (opq.size() != 0 || n_res != accq.size()) @(posedge clk);
    repeat (2) @(posedge clk);
    checks++;
    if (sres.size() + ures.num() != accq.size()) begin
      failures++; $display("pipelined: %0d results for %0d operations", sres.size() + ures.num(), accq.size());
    end
    while (accq.size() != 0) begin
      o = accq.pop_front();
      void'(acc_t.pop_front());
      checks++;
      if (o.op == T_SEARCH) begin
        n_search++;
        if (sres.size() == 0) begin failures++; $display("missing search result"); end
        else if (!leaf_good(o.key, sres[0])) begin
          failures++; $display("pipelined search %h: leaf %h", o.key, sres[0]);
        end
        if (sres.size() != 0) void'(sres.pop_front());
      end else if (!ures.exists(o.key)) begin
        failures++; $display("no result for update %h", o.key);
      end else if (o.op == T_INSERT) begin
        if (ures[o.key]) begin
          i = m_find(o.key);
          mkeys.insert(i + 1, o.key);
          mptrs.insert(i + 1, o.ptr);
          n_ins_ok++;
        end else n_refused++;
      end else begin
        has = m_has(o.key);
        if (ures[o.key] != has) begin failures++; $display("pipelined delete %h ok %b exp %b", o.key, ures[o.key], has); end
        if (ures[o.key]) begin
          i = m_find(o.key);
          mkeys.delete(i); mptrs.delete(i);
          deleted.push_back(o.key);
        end
      end
    end
    ures.delete();
    n_res = 0;
  endtask

  initial begin
    logic [KEY_W-1:0] k;
    logic [KEY_W-1:0] used[logic [KEY_W-1:0]];
    int a0, r;
    longint t0;
    mkeys.push_back('0);
    mptrs.push_back(LEAF0);
    first_acc = -1;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    repeat (3) @(posedge clk);
    // pipelined: inserts, deletes and lookups back to back, no waiting
    pipe = 1'b1;
    t0 = cyc;
    for (int i = 0; i < 1600; i++) begin
      r = $urandom_range(0, 9);
      if (r < 6 || mkeys.size() < 4) begin
        do k = $urandom; while (k == 0 || m_has(k) || used.exists(k));
        used[k] = k;
        issue(T_INSERT, k, k ^ 32'h5A5A_0000);
      end else if (r < 7) begin
        k = (r == 6 && i % 50 == 0) ? 32'd3 : mkeys[$urandom_range(1, mkeys.size() - 1)];
        if (used.exists(k)) issue(T_SEARCH, k, '0);
        else begin
          used[k] = k;
          issue(T_DELETE, k, '0);
        end
      end else issue(T_SEARCH, $urandom, '0);
      if (i % 200 == 199) pipe_check();
    end
    pipe_check();
    pipe = 1'b0;
    $display("pipelined phase: %0d cycles, leaves %0d, refused %0d, splits L1 %0d L2 %0d, forwarded %0d",
             cyc - t0, mkeys.size(), n_refused, n_split[1], n_split[2], n_fwd);
    checks++;
    if (n_split[2] == 0 || n_fwd == 0) begin
      failures++; $display("expected splits and split forwarding in the pipelined phase");
    end
    // grow the index one leaf at a time until the bottom level is full
    for (int i = 0; i < 2000; i++) begin
      do k = $urandom; while (k == 0 || m_has(k));
      issue(T_INSERT, k, k ^ 32'h5A5A_0000);
      drain();
    end
    $display("leaves %0d, inserts refused %0d, splits L1 %0d L2 %0d",
             mkeys.size(), n_refused, n_split[1], n_split[2]);
    checks++;
    if (n_split[2] == 0 || n_split[1] == 0 || n_refused == 0 || n_split[0] != 0) begin
      failures++; $display("expected splits at levels 1 and 2 and refused inserts");
    end
    // lookups, back to back
    a0 = accepted;
    first_acc = -1;
    for (int i = 0; i < 2000; i++) issue(T_SEARCH, $urandom, '0);
    drain();
    checks++;
    if (last_acc - first_acc != 2 * 1999) begin
      failures++; $display("rate: 2000 lookups in %0d cycles", last_acc - first_acc + 2);
    end
    // deletes
    for (int i = 0; i < 40; i++) begin
      issue(T_DELETE, mkeys[$urandom_range(1, mkeys.size() - 1)], '0);
      drain();
    end
    issue(T_DELETE, 32'd3, '0);   // absent
    drain();
    for (int i = 0; i < 2000; i++) issue(T_SEARCH, $urandom, '0);
    drain();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
