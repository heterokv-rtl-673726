// tb_ycsb_mix: the three YCSB request mixes through the FPGA datapath at its
// default size: a GET-heavy batch (95% GET, 5% PUT), a PUT-heavy batch (95% PUT,
// 5% GET) and a SCAN-heavy batch (95% SCAN over a range of 100 keys, 5% PUT),
// 8192 requests each, 32-bit keys and values. Keys follow a skewed (Zipf-like)
// distribution: rank r = floor(N^u) - 1 for uniform u, which gives P(r) about
// 1/(r+1), scattered over the key space by a fixed odd multiplier. Between the
// batches the CPU model adds leaves, as PUTs split hash tables. Each batch is
// checked as in tb_heterokv_top (sorted, stable, per-leaf head tables, counts,
// one request every two cycles), and the dispatch rate is printed.
module tb_ycsb_mix;
  import hkv_pkg::*;
  localparam int unsigned RPB   = 4;
  localparam int unsigned IW    = 16;
  localparam int unsigned KEYS  = 1 << 20;   // key range of the test
  localparam logic [PTR_W-1:0] LEAF0 = '0;

  logic clk = 0, rst_n = 0;
  logic beat_valid = 0, beat_ready, flush = 0;
  logic [RPB-1:0][KV_REQ_W-2:0] beat_reqs = '0;
  logic [$clog2(RPB+1)-1:0] beat_count = '0;
  logic upd_valid = 0, upd_ready, upd_delete = 0, upd_done, upd_ok;
  logic [KEY_W-1:0] upd_done_key;
  logic [KEY_W-1:0] upd_key = '0;
  logic [PTR_W-1:0] upd_ptr = '0;
  logic kvq_we, htq_we, batch_done;
  logic [IW-1:0] kvq_idx, htq_idx, batch_heads, batch_reqs;
  kv_req_t kvq_data;
  head_entry_t htq_data;
  logic [LEVELS-1:0] split_pulse;

  int checks = 0, failures = 0;
  longint cyc = 0;

  heterokv_top dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin : watchdog
    repeat (300000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------------ index model
  logic [KEY_W-1:0] mkeys[$];
  logic [PTR_W-1:0] mptrs[$];
  logic [KEY_W-1:0] deleted[$];

  function automatic int m_find(logic [KEY_W-1:0] k);
    int lo = 0, hi = mkeys.size() - 1, mid;
    while (lo < hi) begin
      mid = (lo + hi + 1) / 2;
      if (mkeys[mid] <= k) lo = mid; else hi = mid - 1;
    end
    return lo;
  endfunction

  function automatic logic leaf_ok(logic [KEY_W-1:0] k, logic [PTR_W-1:0] p);
    int i = m_find(k);
    if (mptrs[i] == p) return 1'b1;
    foreach (deleted[j])
      if (mkeys[i] < deleted[j] && deleted[j] <= k && i + 1 < mptrs.size() && mptrs[i+1] == p)
        return 1'b1;
    return 1'b0;
  endfunction

  // ------------------------------------------------------------ counters
  int n_stall = 0, n_split1 = 0, n_split2 = 0, n_del = 0, n_flush = 0, n_multi = 0;
  int n_batches = 0;

  // ------------------------------------------------------------ request source
  kv_req_t srcq[$];      // requests still to send
  kv_req_t sent[$];      // requests of the current batch, in sending order

  always @(posedge clk) if (rst_n) begin
    if (beat_valid && !beat_ready) n_stall++;
    if (!beat_valid || beat_ready) begin
      if (srcq.size() != 0 && $urandom_range(0, 7) != 0) begin
        int n;
        n = $urandom_range(0, RPB);
        if (n > srcq.size()) n = srcq.size();
        for (int i = 0; i < RPB; i++) begin
          if (i < n) begin
            beat_reqs[i] <= srcq[0][KV_REQ_W-2:0];
            void'(srcq.pop_front());
          end else beat_reqs[i] <= {2'($urandom), 32'($urandom), 32'($urandom)};
        end
        beat_count <= ($bits(beat_count))'(n);
        beat_valid <= 1'b1;
      end else beat_valid <= 1'b0;
    end
  end

  // ------------------------------------------------------------ CPU update source
  logic [KEY_W-1:0] upd_k[$];
  logic [PTR_W-1:0] upd_p[$];
  logic             upd_d[$];
  logic [KEY_W-1:0] pend_k[$];
  logic [PTR_W-1:0] pend_p[$];
  logic             pend_d[$];

  always @(posedge clk) if (rst_n) begin
    if (upd_valid && upd_ready) begin
      pend_k.push_back(upd_key); pend_p.push_back(upd_ptr); pend_d.push_back(upd_delete);
    end
    if (!upd_valid || upd_ready) begin
      if (upd_k.size() != 0 && !(upd_valid && upd_ready)) begin
        upd_valid  <= 1'b1;
        upd_key    <= upd_k.pop_front();
        upd_ptr    <= upd_p.pop_front();
        upd_delete <= upd_d.pop_front();
      end else upd_valid <= 1'b0;
    end
    if (split_pulse[1]) n_split1++;
    if (split_pulse[2]) n_split2++;
    if (upd_done) begin
      int i, j;
      checks++;
      // updates may finish out of order: find the one with this key
      j = -1;
      foreach (pend_k[q]) if (j < 0 && pend_k[q] == upd_done_key) j = q;
      if (j < 0) begin failures++; $display("unexpected upd_done"); end
      else begin
        i = m_find(pend_k[j]);
        if (pend_d[j]) begin
          if (upd_ok != (mkeys[i] == pend_k[j])) begin failures++; $display("delete ok wrong"); end
          if (upd_ok) begin mkeys.delete(i); mptrs.delete(i); deleted.push_back(pend_k[j]); n_del++; end
        end else begin
          if (!upd_ok) begin failures++; $display("insert refused"); end
          else begin mkeys.insert(i + 1, pend_k[j]); mptrs.insert(i + 1, pend_p[j]); end
        end
        pend_k.delete(j); pend_p.delete(j); pend_d.delete(j);
      end
    end
  end

  // ------------------------------------------------------------ queue checker
  kv_req_t          kvq[$];
  head_entry_t      htq[$];
  longint           first_kv, last_kv;

  task automatic check_batch(int heads, int reqs);
    kv_req_t s[$];
    kv_req_t t;
    int j, pos, total;
    // stable sort of what was sent
    s = sent;
    for (int i = 1; i < s.size(); i++) begin
      t = s[i];
      j = i - 1;
      while (j >= 0 && s[j].key > t.key) begin s[j+1] = s[j]; j--; end
      s[j+1] = t;
    end
    checks++;
    if (kvq.size() != s.size()) begin
      failures++; $display("kvq holds %0d requests, sent %0d", kvq.size(), s.size());
    end else begin
      foreach (s[i]) if (kvq[i] != s[i]) begin
        failures++; $display("kvq[%0d] = %h exp %h", i, kvq[i], s[i]); break;
      end
    end
    checks++;
    pos = 0; total = 0;
    foreach (htq[h]) begin
      if (h > 0 && htq[h].ptr == htq[h-1].ptr) begin failures++; $display("same leaf twice"); end
      for (int r = 0; r < htq[h].num && pos < kvq.size(); r++) begin
        if (!leaf_ok(kvq[pos].key, htq[h].ptr)) begin
          failures++; $display("key %h in head table of leaf %h", kvq[pos].key, htq[h].ptr);
        end
        pos++;
      end
      total += htq[h].num;
    end
    if (total != kvq.size()) begin failures++; $display("head tables count %0d", total); end
    checks++;
    if (heads != htq.size() || reqs != kvq.size()) begin
      failures++; $display("batch_done heads %0d reqs %0d", heads, reqs);
    end
    if (htq.size() > 1) n_multi++;
    // dispatch rate: one request every two cycles
    checks++;
    if (last_kv - first_kv > 2 * (kvq.size() - 1) + 4) begin
      failures++; $display("dispatch took %0d cycles for %0d", last_kv - first_kv, kvq.size());
    end
    $display("batch %0d: %0d requests, %0d head tables, %0d cycles", n_batches, kvq.size(),
             htq.size(), last_kv - first_kv + 1);
    kvq.delete(); htq.delete();
    n_batches++;
  endtask

  always @(posedge clk) if (rst_n) begin
    if (kvq_we) begin
      if (kvq.size() == 0) first_kv = cyc;
      last_kv = cyc;
      if (kvq_idx != IW'(kvq.size())) begin failures++; $display("kvq index %0d", kvq_idx); end
      if (kvq_data.pad) begin failures++; $display("filler reached the queue"); end
      kvq.push_back(kvq_data);
    end
    if (htq_we) begin
      if (htq_idx != IW'(htq.size())) begin failures++; $display("htq index %0d", htq_idx); end
      htq.push_back(htq_data);
    end
    if (batch_done) check_batch(int'(batch_heads), int'(batch_reqs));
  end

  // ------------------------------------------------------------ stimulus
  // Zipf-like key: rank from a log-uniform draw, spread over the key range
  function automatic logic [KEY_W-1:0] zipf_key();
    real u;
    int r;
    u = real'($urandom) / 4294967296.0;
    r = int'($floor($pow(real'(KEYS), u))) - 1;
    if (r < 0) r = 0;
    if (r > KEYS - 1) r = KEYS - 1;
    return KEY_W'((r * 2654435761) % KEYS);
  endfunction

  // mix: 0 GET-heavy, 1 PUT-heavy, 2 SCAN-heavy
  int n_op[4];
  task automatic make_batch(int n, int mix);
    kv_req_t r;
    logic main_op;
    sent.delete();
    for (int i = 0; i < n; i++) begin
      r = '0;
      main_op = ($urandom_range(0, 99) < 95);
      case (mix)
        0: r.op = main_op ? KV_GET  : KV_PUT;
        1: r.op = main_op ? KV_PUT  : KV_GET;
        default: r.op = main_op ? KV_SCAN : KV_PUT;
      endcase
      r.key   = zipf_key();
      r.value = (r.op == KV_SCAN) ? r.key + 32'd100 : 32'($urandom);
      n_op[r.op]++;
      srcq.push_back(r);
      sent.push_back(r);
    end
  endtask

  task automatic add_leaf();
    logic [KEY_W-1:0] k;
    do k = 32'($urandom_range(1, KEYS - 1)); while (mkeys[m_find(k)] == k || k inside {upd_k});
    upd_k.push_back(k); upd_p.push_back(32'h8000_0000 | k); upd_d.push_back(1'b0);
  endtask

  task automatic wait_updates();
    while (upd_k.size() != 0 || upd_valid || pend_k.size() != 0) @(posedge clk);
  endtask

  initial begin
    int b0;
    longint t0;
    mkeys.push_back('0);
    mptrs.push_back(LEAF0);
    repeat (3) @(posedge clk);
    rst_n <= 1;
    repeat (3) @(posedge clk);
    for (int i = 0; i < 500; i++) add_leaf();
    wait_updates();
    for (int mix = 0; mix < 3; mix++) begin
      b0 = n_batches;
      make_batch(BATCH, mix);
      while (n_batches == b0) @(posedge clk);
      $display("mix %0d: dispatch rate %0.3f requests per cycle", mix,
               real'(BATCH) / real'(last_kv - first_kv + 1));
      for (int i = 0; i < 30; i++) add_leaf();   // leaf splits reported by the CPU
      wait_updates();
    end
    $display("GET %0d PUT %0d DELETE %0d SCAN %0d, stalls %0d, splits L1 %0d L2 %0d",
             n_op[KV_GET], n_op[KV_PUT], n_op[KV_DELETE], n_op[KV_SCAN], n_stall, n_split1, n_split2);
    checks++;
    if (n_batches != 3 || n_op[KV_GET] == 0 || n_op[KV_PUT] == 0 || n_op[KV_SCAN] == 0 ||
        n_stall == 0 || n_multi != 3) begin
      failures++; $display("a workload or mechanism did not happen");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
