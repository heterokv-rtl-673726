// kv_req_buffer: the KV requests buffer of the preprocess PE.
//
// Requests from the unpack PE are stored in a FIFO of BATCH entries. When BATCH
// requests are waiting, the buffer releases them as one batch: BATCH entries are
// streamed out at one per cycle, the final one marked `last`. Input keeps being
// accepted while a batch drains. A `flush` pulse releases a partial batch; it is
// filled up to BATCH entries with filler entries (`pad` set, key all ones), which
// sort behind every real request, so the downstream merge sorter always sees
// batches of exactly BATCH entries. Batching until a threshold and the 8K batch
// size follow the document; the flush and filler mechanism is this design's own.
// The storage array is read asynchronously (distributed-RAM style).
module kv_req_buffer
  import hkv_pkg::*;
#(
  parameter int unsigned BATCH_SIZE = hkv_pkg::BATCH
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    in_valid,
  output logic    in_ready,
  input  kv_req_t in_req,
  input  logic    flush,        // release a partial batch
  output logic    out_valid,
  input  logic    out_ready,
  output kv_req_t out_req,
  output logic    out_last,
  output logic    out_padding   // current output is a filler entry
);
  localparam int unsigned AW = $clog2(BATCH_SIZE);

  kv_req_t         mem [BATCH_SIZE];
  logic [AW-1:0]   wptr, rptr;
  logic [AW:0]     count;
  logic            flush_pending;
  logic            active;
  logic [AW:0]     real_left;    // real entries of the current batch still to send
  logic [AW-1:0]   out_idx;
  logic            do_wr, do_rd, start;

  assign in_ready  = (count != (AW+1)'(BATCH_SIZE));
  assign do_wr     = in_valid && in_ready;
  assign out_valid = active;
  assign out_padding = (real_left == 0);
  assign out_req   = out_padding ? kv_req_t'({1'b1, KV_GET, {KEY_W{1'b1}}, {VAL_W{1'b0}}})
                                 : mem[rptr];
  assign out_last  = (out_idx == AW'(BATCH_SIZE - 1));
  assign do_rd     = active && out_ready && !out_padding;
  assign start     = !active && (count == (AW+1)'(BATCH_SIZE) || (flush_pending && count != 0));

  always_ff @(posedge clk) begin
    if (do_wr) mem[wptr] <= in_req;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wptr <= '0; rptr <= '0; count <= '0;
      flush_pending <= 1'b0;
      active <= 1'b0; real_left <= '0; out_idx <= '0;
    end else begin
      if (do_wr) wptr <= wptr + 1'b1;
      if (do_rd) rptr <= rptr + 1'b1;
      count <= count + (AW+1)'(do_wr) - (AW+1)'(do_rd);
      if (flush) flush_pending <= 1'b1;
      if (start) begin
        active        <= 1'b1;
        real_left     <= count;
        out_idx       <= '0;
        flush_pending <= 1'b0;
      end else if (active && out_ready) begin
        if (!out_padding) real_left <= real_left - 1'b1;
        out_idx <= out_idx + 1'b1;
        if (out_last) active <= 1'b0;
      end
      if (!active && !start && flush && count == 0 && !do_wr) flush_pending <= 1'b0;
    end
  end

  a_stable: assert property (@(posedge clk) disable iff (!rst_n)
              out_valid && !out_ready |=> out_valid && $stable(out_req));
endmodule
