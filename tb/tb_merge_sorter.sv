// tb_merge_sorter: self-checking test of merge_sorter (BATCH_SIZE = 32).
// Sends batches of random keys drawn from a small range (many equal keys) with a
// sequence number in the value field, while the consumer stalls at random; each
// output batch must equal the stable sort of its input batch, with `last` on its
// final entry and fillers (pad) last. Then four batches are streamed with the
// consumer always ready: the sorter must take and deliver one entry per cycle.
module tb_merge_sorter;
  import hkv_pkg::*;
  localparam int unsigned B = 32;

  logic clk = 0, rst_n = 0;
  logic in_valid, in_ready, out_valid, out_ready, out_last;
  kv_req_t in_req, out_req;
  int checks = 0, failures = 0;
  kv_req_t expq[$];
  kv_req_t batch[$];
  logic stall = 1;
  int outn = 0, in_cycles = 0;

  merge_sorter #(.BATCH_SIZE(B)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // The consumer changes its ready signal shortly after the rising edge.
  always @(posedge clk) #2 out_ready = stall ? ($urandom_range(0, 3) != 0) : 1'b1;

  // Handshakes are sampled at the falling edge.
  always @(negedge clk) begin
    if (rst_n && out_valid && out_ready) begin
      checks++;
      outn++;
      if (expq.size() == 0 || out_req != expq[0]) begin
        failures++; $display("mismatch got %h exp %h", out_req, (expq.size() != 0) ? expq[0] : '0);
      end
      if (out_last != (outn % B == 0)) begin failures++; $display("last flag wrong"); end
      if (expq.size() != 0) void'(expq.pop_front());
    end
  end

  // reference: insertion sort, stable on {pad, key}
  task automatic make_batch(input int seq0, input int npad);
    kv_req_t r;
    batch.delete();
    for (int i = 0; i < B; i++) begin
      r = '0;
      r.pad = (i >= B - npad);
      r.op  = kv_op_e'($urandom_range(0, 3));
      r.key = r.pad ? '1 : 32'($urandom_range(0, 12));
      r.value = 32'(seq0 + i);
      batch.push_back(r);
    end
    // expected order
    begin
      kv_req_t s[$];
      s = batch;
      for (int i = 1; i < s.size(); i++) begin
        kv_req_t t = s[i];
        int j = i - 1;
        while (j >= 0 && sort_key(s[j]) > sort_key(t)) begin s[j+1] = s[j]; j--; end
        s[j+1] = t;
      end
      foreach (s[i]) expq.push_back(s[i]);
    end
  endtask

  task automatic send_batch(input bit gaps);
    foreach (batch[i]) begin
      in_req = batch[i];
      in_valid = 1;
      do begin @(negedge clk); in_cycles++; end while (!in_ready);
      @(posedge clk);
      #1 in_valid = 0;
      if (gaps) repeat ($urandom_range(0, 1)) @(posedge clk);
      #1;
    end
  endtask

  initial begin
    longint t0, t1; int c0;
    in_valid = 0; in_req = '0; out_ready = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    for (int b = 0; b < 6; b++) begin
      make_batch(b * B, (b == 5) ? 7 : 0);
      send_batch(1);
    end
    while (expq.size() != 0) @(posedge clk);
    // line rate
    stall = 0;
    repeat (2) @(posedge clk);
    #1;
    in_cycles = 0;
    c0 = outn;
    t0 = $time;
    for (int b = 0; b < 4; b++) begin
      make_batch(1000 + b * B, 0);
      foreach (batch[i]) begin
        in_req = batch[i]; in_valid = 1;
        do begin @(negedge clk); in_cycles++; end while (!in_ready);
        @(posedge clk);
        #1;
      end
    end
    in_valid = 0;
    while (expq.size() != 0) @(posedge clk);
    t1 = $time;
    checks++;
    if (in_cycles != 4 * B) begin failures++; $display("input stalled: %0d cycles", in_cycles); end
    checks++;
    // one batch of latency (B + stages) plus 4*B entries at one per cycle
    if ((t1 - t0) / 10 > 4 * B + B + 2 * $clog2(B) + 4) begin
      failures++; $display("too slow: %0d cycles", (t1 - t0) / 10);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
