// tb_unpack_pe: self-checking test of unpack_pe.
// Sends beats holding 0..4 requests while the consumer stalls at random, and
// checks that the requests come out complete and in order. A final run of full
// beats with the consumer always ready must take one cycle per request.
module tb_unpack_pe;
  import hkv_pkg::*;
  localparam int unsigned RPB = 4;
  localparam int unsigned CW  = $clog2(RPB + 1);

  logic clk = 0, rst_n = 0;
  logic beat_valid, beat_ready, req_valid, req_ready;
  logic [RPB-1:0][KV_REQ_W-2:0] beat_reqs;
  logic [$clog2(RPB+1)-1:0] beat_count;
  kv_req_t req;
  int checks = 0, failures = 0;
  logic [KV_REQ_W-2:0] expq[$];
  logic stall_mode = 1;
  int   out_cnt = 0;

  unpack_pe #(.REQS_PER_BEAT(RPB)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // consumer and checker
  // The consumer changes its ready signal shortly after the rising edge.
  always @(posedge clk) #2 req_ready = stall_mode ? ($urandom_range(0, 3) != 0) : 1'b1;

  // Handshakes are sampled at the falling edge: the values then are the ones the
  // next rising edge acts on.
  always @(negedge clk) begin
    if (rst_n && req_valid && req_ready) begin
      checks++;
      out_cnt++;
      if (expq.size() == 0 || req != kv_req_t'({1'b0, expq[0]})) begin
        failures++;
        $display("mismatch: got %h exp %h", req, (expq.size() != 0) ? expq[0] : '0);
      end
      if (expq.size() != 0) void'(expq.pop_front());
    end
  end

  task automatic send_beat(input int n);
    for (int i = 0; i < RPB; i++)
      beat_reqs[i] = {2'($urandom), 32'($urandom), 32'($urandom)};
    beat_count = CW'(n);
    for (int i = 0; i < n; i++) expq.push_back(beat_reqs[i]);
    beat_valid = 1;
    do @(negedge clk); while (!beat_ready);
    @(posedge clk);
    #1 beat_valid = 0;
  endtask

  initial begin
    longint t0, t1; int n0;
    beat_valid = 0; beat_reqs = '0; beat_count = '0; req_ready = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    for (int b = 0; b < 200; b++) send_beat($urandom_range(0, RPB));
    while (expq.size() != 0) @(posedge clk);
    // line-rate check: 50 full beats, consumer always ready
    stall_mode = 0;
    repeat (3) @(posedge clk);
    #1;
    n0 = out_cnt;
    t0 = $time;
    for (int b = 0; b < 50; b++) begin
      for (int i = 0; i < RPB; i++)
        beat_reqs[i] = {2'($urandom), 32'($urandom), 32'($urandom)};
      beat_count = CW'(RPB);
      for (int i = 0; i < RPB; i++) expq.push_back(beat_reqs[i]);
      beat_valid = 1;
      do @(negedge clk); while (!beat_ready);
      @(posedge clk);
      #1;
    end
    beat_valid = 0;
    while (expq.size() != 0) @(posedge clk);
    t1 = $time;
    checks++;
    // 200 requests; allow a few cycles of fill and drain
    if ((t1 - t0) / 10 > 200 + 4 || out_cnt - n0 != 200) begin
      failures++;
      $display("rate: %0d requests in %0d cycles", out_cnt - n0, (t1 - t0) / 10);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
