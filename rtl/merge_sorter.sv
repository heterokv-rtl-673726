// merge_sorter: line-rate merge sorter of the preprocess PE.
//
// Sorts each batch of BATCH_SIZE requests by key (fillers of a flushed batch
// last). It is a chain of log2(BATCH_SIZE) merge stages; stage k turns sorted
// runs of 2^k entries into runs of 2^(k+1), so the last stage emits the whole
// batch in order. Every stage moves one entry per cycle, so the sorter accepts and
// delivers one request per clock cycle (the line rate of the datapath); the first
// sorted entry of a batch leaves about BATCH_SIZE + log2(BATCH_SIZE) cycles
// after the first entry enters (stage k waits for 2^k + 1 entries). Requests with equal keys leave in arrival order.
// `out_last` marks every BATCH_SIZE-th output. BATCH_SIZE must be a power of two.
// The document asks for a line-rate merge sorter; the FIFO-based stage structure
// is this design's own.
module merge_sorter
  import hkv_pkg::*;
#(
  parameter int unsigned BATCH_SIZE = hkv_pkg::BATCH
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    in_valid,
  output logic    in_ready,
  input  kv_req_t in_req,
  output logic    out_valid,
  input  logic    out_ready,
  output kv_req_t out_req,
  output logic    out_last
);
  localparam int unsigned STAGES = $clog2(BATCH_SIZE);

  logic    v [STAGES+1];
  logic    r [STAGES+1];
  kv_req_t d [STAGES+1];

  assign v[0]     = in_valid;
  assign in_ready = r[0];
  assign d[0]     = in_req;

  for (genvar k = 0; k < STAGES; k++) begin : g_stage
    merge_stage #(.RUN(1 << k)) u_stage (
      .clk, .rst_n,
      .in_valid (v[k]),   .in_ready (r[k]),   .in_req (d[k]),
      .out_valid(v[k+1]), .out_ready(r[k+1]), .out_req(d[k+1])
    );
  end

  assign out_valid   = v[STAGES];
  assign r[STAGES]   = out_ready;
  assign out_req     = d[STAGES];

  logic [STAGES-1:0] out_cnt;
  assign out_last = (out_cnt == STAGES'(BATCH_SIZE - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                      out_cnt <= '0;
    else if (out_valid && out_ready) out_cnt <= out_cnt + 1'b1;
  end
endmodule
