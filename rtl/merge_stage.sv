// merge_stage: one stage of the pipelined merge sorter.
//
// The input stream is made of sorted runs of RUN entries; the stage merges each
// pair of consecutive runs into one sorted run of 2*RUN entries. The first run of a
// pair is written to FIFO A, the second to FIFO B, each FIFO 2*RUN deep so the
// next pair can arrive while the current one is merged. The output takes the
// smaller head of the two FIFOs (FIFO A on equal keys, which keeps the sort
// stable), and only one side once the other has given its RUN entries. Input and
// output each move at most one entry per cycle, so the stage keeps up with a
// stream of one entry per cycle. Both handshakes are valid/ready; in_ready and
// out_valid depend only on registers.
module merge_stage
  import hkv_pkg::*;
#(
  parameter int unsigned RUN = 1
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    in_valid,
  output logic    in_ready,
  input  kv_req_t in_req,
  output logic    out_valid,
  input  logic    out_ready,
  output kv_req_t out_req
);
  localparam int unsigned DEPTH = 2 * RUN;
  localparam int unsigned AW    = $clog2(DEPTH);
  localparam int unsigned RW    = $clog2(RUN + 1);

  kv_req_t        mem_a [DEPTH];
  kv_req_t        mem_b [DEPTH];
  logic [AW-1:0]  wa, ra, wb, rb;
  logic [AW:0]    ca, cb;
  logic [AW:0]    in_cnt;        // position within the incoming pair, 0 .. 2*RUN-1
  logic [RW-1:0]  taken_a, taken_b;
  logic           to_b, wr_a, wr_b;
  logic           a_done, b_done, a_av, b_av, pick_a, pick_b, fire;
  kv_req_t        head_a, head_b;

  assign to_b     = (in_cnt >= (AW+1)'(RUN));
  assign in_ready = to_b ? (cb != (AW+1)'(DEPTH)) : (ca != (AW+1)'(DEPTH));
  assign wr_a     = in_valid && in_ready && !to_b;
  assign wr_b     = in_valid && in_ready &&  to_b;

  assign head_a = mem_a[ra];
  assign head_b = mem_b[rb];
  assign a_done = (taken_a == RW'(RUN));
  assign b_done = (taken_b == RW'(RUN));
  assign a_av   = (ca != 0) && !a_done;
  assign b_av   = (cb != 0) && !b_done;
  assign pick_a = a_av && (b_done || (b_av && sort_key(head_a) <= sort_key(head_b)));
  assign pick_b = b_av && (a_done || (a_av && sort_key(head_b) <  sort_key(head_a)));
  assign out_valid = pick_a || pick_b;
  assign out_req   = pick_a ? head_a : head_b;
  assign fire      = out_valid && out_ready;

  always_ff @(posedge clk) begin
    if (wr_a) mem_a[wa] <= in_req;
    if (wr_b) mem_b[wb] <= in_req;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wa <= '0; ra <= '0; wb <= '0; rb <= '0;
      ca <= '0; cb <= '0; in_cnt <= '0;
      taken_a <= '0; taken_b <= '0;
    end else begin
      if (wr_a) wa <= wa + 1'b1;
      if (wr_b) wb <= wb + 1'b1;
      if (in_valid && in_ready)
        in_cnt <= (in_cnt == (AW+1)'(DEPTH - 1)) ? '0 : in_cnt + 1'b1;
      if (fire && pick_a) ra <= ra + 1'b1;
      if (fire && pick_b) rb <= rb + 1'b1;
      ca <= ca + (AW+1)'(wr_a) - (AW+1)'(fire && pick_a);
      cb <= cb + (AW+1)'(wr_b) - (AW+1)'(fire && pick_b);
      if (fire) begin
        if ((RW+1)'(taken_a) + (RW+1)'(taken_b) == (RW+1)'(DEPTH - 1)) begin
          taken_a <= '0;
          taken_b <= '0;
        end else if (pick_a) begin
          taken_a <= taken_a + 1'b1;
        end else begin
          taken_b <= taken_b + 1'b1;
        end
      end
    end
  end

  a_hold: assert property (@(posedge clk) disable iff (!rst_n)
            out_valid && !out_ready |=> out_valid && $stable(out_req));
endmodule
