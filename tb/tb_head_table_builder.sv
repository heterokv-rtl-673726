// tb_head_table_builder: self-checking test of head_table_builder.
// Feeds batches of lookup results (runs of requests per leaf, results two or more
// cycles apart, the batch closed by its last request or by an end marker) and
// checks every KV-queue write, every head table {pointer, number} and the counts
// reported at the end of each batch, including an empty batch.
module tb_head_table_builder;
  import hkv_pkg::*;
  localparam int unsigned IW = 16;

  logic clk = 0, rst_n = 0;
  logic in_valid = 0;
  tree_resp_t in_resp = '0;
  logic kvq_we, htq_we, batch_done;
  logic [IW-1:0] kvq_idx, htq_idx, batch_heads, batch_reqs;
  kv_req_t kvq_data;
  head_entry_t htq_data;
  int checks = 0, failures = 0;

  typedef struct { logic [IW-1:0] idx; kv_req_t d; } kvw_t;
  typedef struct { logic [IW-1:0] idx; head_entry_t h; } htw_t;
  kvw_t kv_exp[$];
  htw_t ht_exp[$];
  logic [2*IW-1:0] done_exp[$];
  tree_resp_t feed[$];
  int gap = 0;

  head_table_builder #(.IDX_W(IW)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // feeder: results at least two cycles apart
  always @(posedge clk) if (rst_n) begin
    if (gap > 0) begin
      gap <= gap - 1;
      in_valid <= 1'b0;
    end else if (feed.size() != 0) begin
      in_valid <= 1'b1;
      in_resp  <= feed.pop_front();
      gap      <= $urandom_range(1, 3);
    end else in_valid <= 1'b0;
  end

  always @(posedge clk) if (rst_n) begin
    if (kvq_we) begin
      checks++;
      if (kv_exp.size() == 0 || kvq_idx != kv_exp[0].idx || kvq_data != kv_exp[0].d) begin
        failures++; $display("kvq write %0d %h", kvq_idx, kvq_data);
      end
      if (kv_exp.size() != 0) void'(kv_exp.pop_front());
    end
    if (htq_we) begin
      checks++;
      if (ht_exp.size() == 0 || htq_idx != ht_exp[0].idx || htq_data != ht_exp[0].h) begin
        failures++; $display("htq write %0d %h/%0d", htq_idx, htq_data.ptr, htq_data.num);
      end
      if (ht_exp.size() != 0) void'(ht_exp.pop_front());
    end
    if (batch_done) begin
      checks++;
      if (done_exp.size() == 0 || {batch_heads, batch_reqs} != done_exp[0]) begin
        failures++; $display("batch_done heads %0d reqs %0d", batch_heads, batch_reqs);
      end
      if (done_exp.size() != 0) void'(done_exp.pop_front());
    end
  end

  // one batch: ngroups leaves, 1..maxn requests each; end marker or not
  task automatic make_batch(int ngroups, int maxn, bit marker);
    tree_resp_t r;
    int nreq = 0;
    logic [PTR_W-1:0] leaf;
    for (int g = 0; g < ngroups; g++) begin
      int n = $urandom_range(1, maxn);
      leaf = 32'h1000 * (g + 1) + 32'($urandom_range(0, 255));
      for (int i = 0; i < n; i++) begin
        r = '0;
        r.op = T_SEARCH; r.leaf = leaf; r.ok = 1'b1;
        r.req = kv_req_t'({1'b0, 2'($urandom), 32'($urandom), 32'($urandom)});
        r.last = !marker && (g == ngroups - 1) && (i == n - 1);
        feed.push_back(r);
        kv_exp.push_back('{idx: IW'(nreq), d: r.req});
        nreq++;
      end
      ht_exp.push_back('{idx: IW'(g), h: '{ptr: leaf, num: 32'(n)}});
    end
    if (marker) begin
      r = '0; r.op = T_NOP; r.last = 1'b1;
      r.req.pad = 1'b1;
      feed.push_back(r);
    end
    done_exp.push_back({IW'(ngroups), IW'(nreq)});
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    make_batch(1, 1, 0);
    make_batch(5, 6, 0);
    make_batch(7, 3, 1);
    make_batch(0, 1, 1);          // empty batch: only the end marker
    for (int b = 0; b < 20; b++) make_batch($urandom_range(1, 30), 10, b % 2);
    while (feed.size() != 0) @(posedge clk);
    repeat (10) @(posedge clk);
    checks++;
    if (kv_exp.size() != 0 || ht_exp.size() != 0 || done_exp.size() != 0) begin
      failures++; $display("missing writes: %0d %0d %0d", kv_exp.size(), ht_exp.size(), done_exp.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
