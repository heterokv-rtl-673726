// tb_kv_req_buffer: self-checking test of kv_req_buffer (BATCH_SIZE = 8).
// Writes requests with random gaps while the reader stalls at random, and checks
// that full batches come out in arrival order with `last` on every 8th entry,
// that nothing leaves before a batch is complete, and that a flush releases a
// partial batch filled up with filler entries.
module tb_kv_req_buffer;
  import hkv_pkg::*;
  localparam int unsigned B = 8;

  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_ready, flush = 0, out_valid, out_ready = 0, out_last, out_padding;
  kv_req_t in_req = '0, out_req;
  int checks = 0, failures = 0;
  kv_req_t expq[$];
  int pos = 0;          // position inside the current output batch
  int to_send = 0, got = 0, pads = 0;

  kv_req_buffer #(.BATCH_SIZE(B)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // source: one request per handshake, random gaps
  always @(posedge clk) if (rst_n) begin
    if (in_valid && in_ready) expq.push_back(in_req);
    if (!in_valid || in_ready) begin
      if (to_send > 0 && $urandom_range(0, 2) != 0) begin
        in_req   <= kv_req_t'({1'b0, 2'($urandom), 32'($urandom), 32'($urandom)});
        in_valid <= 1'b1;
        to_send  <= to_send - 1;
      end else begin
        in_valid <= 1'b0;
      end
    end
  end

  // sink and checker
  always @(posedge clk) if (rst_n) begin
    if (out_valid && out_ready) begin
      checks++;
      if (out_last != (pos == B - 1)) begin failures++; $display("last wrong at %0d", pos); end
      if (out_padding) begin
        pads++;
        if (!out_req.pad) begin failures++; $display("filler without pad flag"); end
      end else begin
        got++;
        if (expq.size() == 0 || out_req != expq[0]) begin
          failures++; $display("data mismatch %h", out_req);
        end
        if (expq.size() != 0) void'(expq.pop_front());
      end
      pos = (pos == B - 1) ? 0 : pos + 1;
    end
    out_ready <= ($urandom_range(0, 2) != 0);
  end

  task automatic send(input int n);
    @(posedge clk) to_send <= n;
    @(posedge clk);
    while (to_send != 0 || in_valid) @(posedge clk);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    // fewer than a batch: nothing may leave
    send(B - 1);
    repeat (20) @(posedge clk);
    checks++;
    if (got != 0) begin failures++; $display("released before batch was full"); end
    send(1 + 3 * B);        // completes 4 batches
    repeat (60) @(posedge clk);
    checks++;
    if (got != 4 * B || pads != 0) begin failures++; $display("got %0d pads %0d", got, pads); end
    send(3);                // partial batch, then flush
    flush <= 1; @(posedge clk); flush <= 0;
    repeat (60) @(posedge clk);
    checks++;
    if (got != 4 * B + 3 || pads != B - 3 || pos != 0) begin
      failures++; $display("flush: got %0d pads %0d pos %0d", got, pads, pos);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
