// heterokv_top: FPGA part of the HeteroKV key-value store.
//
// KV requests arrive from the NIC in packet beats and leave as work lists for the
// CPU threads that serve the partitioned hash tables:
//   unpack_pe          one request per cycle out of each beat
//   kv_req_buffer      collects BATCH_SIZE requests (or a flushed partial batch)
//   merge_sorter       sorts the batch by key at one request per cycle
//   dispatch front     turns sorted requests into index lookups; takes index
//                      updates sent back by the CPU (leaf splits / deletions)
//                      with priority; drops fillers, keeping the end marker
//   hobt               B+ tree index: key -> leaf (hash table) pointer
//   head_table_builder writes the KV requests queue and the head tables queue
//                      ({leaf pointer, number of requests}) and flags the end
// The two queue write ports and the update input stand for the shared memory
// reached over PCIe, which is outside this design. The index takes one
// operation every two cycles, so a busy dispatcher back-pressures the sorter,
// the buffer and finally the NIC side (beat_ready).
module heterokv_top
  import hkv_pkg::*;
#(
  parameter int unsigned REQS_PER_BEAT = 4,
  parameter int unsigned BATCH_SIZE    = hkv_pkg::BATCH,
  parameter int unsigned IDX_W         = 16,
  parameter logic [PTR_W-1:0] INIT_LEAF = '0
) (
  input  logic                                   clk,
  input  logic                                   rst_n,
  // from the NIC
  input  logic                                   beat_valid,
  output logic                                   beat_ready,
  input  logic [REQS_PER_BEAT-1:0][KV_REQ_W-2:0] beat_reqs,
  input  logic [$clog2(REQS_PER_BEAT+1)-1:0]     beat_count,
  input  logic                                   flush,
  // B+ tree update operations from the CPU (b+ tree operations queue)
  input  logic                                   upd_valid,
  output logic                                   upd_ready,
  input  logic                                   upd_delete,   // 0: insert, 1: delete
  input  logic [KEY_W-1:0]                       upd_key,
  input  logic [PTR_W-1:0]                       upd_ptr,
  output logic                                   upd_done,
  output logic                                   upd_ok,
  output logic [KEY_W-1:0]                       upd_done_key, // key of the finished update
  // KV requests queue and head tables queue (towards shared memory)
  output logic                                   kvq_we,
  output logic [IDX_W-1:0]                       kvq_idx,
  output kv_req_t                                kvq_data,
  output logic                                   htq_we,
  output logic [IDX_W-1:0]                       htq_idx,
  output head_entry_t                            htq_data,
  output logic                                   batch_done,
  output logic [IDX_W-1:0]                       batch_heads,
  output logic [IDX_W-1:0]                       batch_reqs,
  output logic [LEVELS-1:0]                      split_pulse
);
  logic    u_v, u_r;  kv_req_t u_d;
  logic    b_v, b_r;  kv_req_t b_d;
  logic    s_v, s_r, s_last;  kv_req_t s_d;
  logic    t_v, t_r;  tree_req_t t_d;
  logic    r_v;       tree_resp_t r_d;

  unpack_pe #(.REQS_PER_BEAT(REQS_PER_BEAT)) u_unpack (
    .clk, .rst_n,
    .beat_valid, .beat_ready, .beat_reqs, .beat_count,
    .req_valid(u_v), .req_ready(u_r), .req(u_d)
  );

  kv_req_buffer #(.BATCH_SIZE(BATCH_SIZE)) u_buffer (
    .clk, .rst_n,
    .in_valid(u_v), .in_ready(u_r), .in_req(u_d), .flush,
    .out_valid(b_v), .out_ready(b_r), .out_req(b_d), .out_last(), .out_padding()
  );

  merge_sorter #(.BATCH_SIZE(BATCH_SIZE)) u_sorter (
    .clk, .rst_n,
    .in_valid(b_v), .in_ready(b_r), .in_req(b_d),
    .out_valid(s_v), .out_ready(s_r), .out_req(s_d), .out_last(s_last)
  );

  // ---- dispatch front: CPU updates first, then sorted requests
  logic drop_pad;
  assign drop_pad  = s_v && s_d.pad && !s_last;     // filler: consumed at once
  assign upd_ready = t_r;
  assign t_v       = upd_valid || (s_v && !drop_pad);
  assign s_r       = drop_pad || (t_r && !upd_valid);

  always_comb begin
    t_d = '0;
    if (upd_valid) begin
      t_d.op  = upd_delete ? T_DELETE : T_INSERT;
      t_d.key = upd_key;
      t_d.ptr = upd_ptr;
    end else begin
      t_d.op   = s_d.pad ? T_NOP : T_SEARCH;
      t_d.key  = s_d.key;
      t_d.req  = s_d;
      t_d.last = s_last;
    end
  end

  hobt #(.INIT_LEAF(INIT_LEAF)) u_index (
    .clk, .rst_n,
    .in_valid(t_v), .in_ready(t_r), .in_op(t_d),
    .resp_valid(r_v), .resp(r_d),
    .upd_done, .upd_ok, .upd_key(upd_done_key), .split_pulse
  );

  head_table_builder #(.IDX_W(IDX_W)) u_heads (
    .clk, .rst_n,
    .in_valid(r_v), .in_resp(r_d),
    .kvq_we, .kvq_idx, .kvq_data,
    .htq_we, .htq_idx, .htq_data,
    .batch_done, .batch_heads, .batch_reqs
  );
endmodule
