// head_table_builder: dispatching stage of the dispatcher.
//
// It receives the sorted requests of a batch together with the leaf pointer the
// B+ tree index found for each. Because the batch is sorted by key and leaves
// own disjoint key ranges, the requests of one leaf arrive back to back. The unit
// writes every request, in order, to the KV requests queue (kvq_*), and each time
// the leaf changes it writes a head table {Pointer, Number} to the head tables
// queue (htq_*): the leaf pointer and how many requests of the batch fall into
// that leaf, so the CPU can give each leaf to a single thread. The end-of-batch
// marker (last) closes the final group: in the next cycle its head table is
// written and batch_done pulses with the numbers of head tables and requests,
// which tells the CPU that the dispatch is over. Queue indices restart at 0 with each
// batch. Results must be at least two cycles apart, as the index delivers them;
// each causes at most one write to each queue. Filler entries of a flushed batch are skipped.
// The queue contents and their meaning follow the document; the write-port
// format and the per-batch index restart are this design's own.
module head_table_builder
  import hkv_pkg::*;
#(
  parameter int unsigned IDX_W = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  tree_resp_t       in_resp,
  // KV requests queue write port
  output logic             kvq_we,
  output logic [IDX_W-1:0] kvq_idx,
  output kv_req_t          kvq_data,
  // head tables queue write port
  output logic             htq_we,
  output logic [IDX_W-1:0] htq_idx,
  output head_entry_t      htq_data,
  // end of dispatch of a batch
  output logic             batch_done,
  output logic [IDX_W-1:0] batch_heads,
  output logic [IDX_W-1:0] batch_reqs
);
  logic             have_grp;
  logic [PTR_W-1:0] grp_ptr;
  logic [31:0]      grp_num;
  logic [IDX_W-1:0] req_cnt, head_cnt;
  logic             is_real, new_grp, pend_close;

  assign is_real = in_valid && in_resp.op == T_SEARCH && !in_resp.req.pad;
  assign new_grp = is_real && (!have_grp || in_resp.leaf != grp_ptr);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      have_grp <= 1'b0; grp_ptr <= '0; grp_num <= '0;
      req_cnt <= '0; head_cnt <= '0; pend_close <= 1'b0;
      kvq_we <= 1'b0; kvq_idx <= '0; kvq_data <= '0;
      htq_we <= 1'b0; htq_idx <= '0; htq_data <= '0;
      batch_done <= 1'b0; batch_heads <= '0; batch_reqs <= '0;
    end else begin
      kvq_we     <= 1'b0;
      htq_we     <= 1'b0;
      batch_done <= 1'b0;
      if (pend_close) begin
        // the batch ended in the previous cycle: close its last group
        pend_close  <= 1'b0;
        if (have_grp) begin
          htq_we   <= 1'b1;
          htq_idx  <= head_cnt;
          htq_data <= '{ptr: grp_ptr, num: grp_num};
        end
        batch_done  <= 1'b1;
        batch_reqs  <= req_cnt;
        batch_heads <= head_cnt + IDX_W'(have_grp);
        have_grp    <= 1'b0;
        req_cnt     <= '0;
        head_cnt    <= '0;
      end else begin
        if (is_real) begin
          kvq_we   <= 1'b1;
          kvq_idx  <= req_cnt;
          kvq_data <= in_resp.req;
          req_cnt  <= req_cnt + 1'b1;
          if (new_grp) begin
            if (have_grp) begin
              // a new leaf starts: the previous group is complete
              htq_we   <= 1'b1;
              htq_idx  <= head_cnt;
              htq_data <= '{ptr: grp_ptr, num: grp_num};
              head_cnt <= head_cnt + 1'b1;
            end
            have_grp <= 1'b1;
            grp_ptr  <= in_resp.leaf;
            grp_num  <= 32'd1;
          end else begin
            grp_num  <= grp_num + 1;
          end
        end
        if (in_valid && in_resp.last) pend_close <= 1'b1;
      end
    end
  end

  // Results arrive at most every other cycle (the index takes one every two).
  a_spacing: assert property (@(posedge clk) disable iff (!rst_n) pend_close |-> !in_valid);
endmodule
