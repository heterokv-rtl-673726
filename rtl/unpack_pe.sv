// unpack_pe: splits the request payload of received packets into single KV requests.
//
// Each accepted beat from the network side holds up to REQS_PER_BEAT requests,
// packed as {op[1:0], key[31:0], value[31:0]} with request 0 in the least
// significant bits, and a count of how many of them are valid. The unit emits the
// valid requests in order, one per clock cycle, on a valid/ready stream and takes
// the next beat in the cycle its last request leaves, so a stream of full beats
// sustains one request per cycle. A beat with count 0 is dropped.
// The surrounding design places this unit between the NIC and the preprocess PE;
// the beat format, the per-beat count and the handshake are this design's choice.
module unpack_pe
  import hkv_pkg::*;
#(
  parameter int unsigned REQS_PER_BEAT = 4
) (
  input  logic                                    clk,
  input  logic                                    rst_n,
  input  logic                                    beat_valid,
  output logic                                    beat_ready,
  input  logic [REQS_PER_BEAT-1:0][KV_REQ_W-2:0]  beat_reqs,
  input  logic [$clog2(REQS_PER_BEAT+1)-1:0]      beat_count,
  output logic                                    req_valid,
  input  logic                                    req_ready,
  output kv_req_t                                 req
);
  localparam int unsigned IW = $clog2(REQS_PER_BEAT+1);

  logic [REQS_PER_BEAT-1:0][KV_REQ_W-2:0] hold;
  logic [IW-1:0] cnt, idx;
  logic          busy;
  logic          last_out;

  assign req_valid  = busy;
  assign req        = kv_req_t'({1'b0, hold[idx[$clog2(REQS_PER_BEAT)-1:0]]});
  assign last_out   = busy && req_ready && (idx == cnt - 1'b1);
  assign beat_ready = !busy || last_out;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0;
      cnt  <= '0;
      idx  <= '0;
      hold <= '0;
    end else begin
      if (busy && req_ready) idx <= idx + 1'b1;
      if (last_out) busy <= 1'b0;
      if (beat_valid && beat_ready && beat_count != 0) begin
        hold <= beat_reqs;
        cnt  <= (beat_count > IW'(REQS_PER_BEAT)) ? IW'(REQS_PER_BEAT) : beat_count;
        idx  <= '0;
        busy <= 1'b1;
      end
    end
  end

  a_hold: assert property (@(posedge clk) disable iff (!rst_n)
            req_valid && !req_ready |=> req_valid && $stable(req));
endmodule
