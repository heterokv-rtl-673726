// hobt: hardware-oriented B+ tree index of the dispatcher.
//
// A chain of LEVELS level PEs (hobt_level_pe); level l holds FANOUT^l nodes. An
// operation enters at the root and moves one level every two cycles, so
// operations are accepted one every two clock cycles and a search leaves the
// bottom level 2*LEVELS cycles after it enters (more if it waits behind a split
// in a reservation station), with the pointer of the leaf (hash table) whose key
// range holds the key. Searches leave in the order they entered.
// Updates (T_INSERT of a new leaf after a hash table split, T_DELETE of a
// removed leaf) are pipelined with the searches: they go down like a search and,
// when a node splits, back up towards the root. Each update reports once on
// upd_done / upd_ok / upd_key (its key). An update that splits nodes finishes
// at the highest level it reaches, so updates can finish out of order; finishes
// of several levels in one cycle are queued and reported one per cycle.
// At most MAX_FLIGHT operations are in the tree at a time (a search counts until
// its result leaves, an update until it is reported); the level PEs size their
// queues, split-forwarding tables and room margin for that bound.
// Input: in_ready is high when the root takes an operation at once and the
// in-flight bound allows it.
// Pipelined updates through reservation stations follow the document; the
// in-flight bound and the completion queue are this design's own.
module hobt
  import hkv_pkg::*;
#(
  parameter logic [PTR_W-1:0] INIT_LEAF  = '0,
  parameter int unsigned      MAX_FLIGHT = 4
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_valid,
  output logic       in_ready,
  input  tree_req_t  in_op,
  output logic       resp_valid,
  output tree_resp_t resp,
  output logic       upd_done,
  output logic       upd_ok,
  output logic [KEY_W-1:0] upd_key,
  output logic [LEVELS-1:0] split_pulse
);
  localparam int unsigned FW = $clog2(MAX_FLIGHT + 1);
  localparam int unsigned CW = $clog2(MAX_FLIGHT);

  logic       dn_v   [LEVELS+1];
  tree_down_t dn_d   [LEVELS+1];
  logic       dn_rdy [LEVELS];
  logic       dn_idl [LEVELS];
  logic       up_v   [LEVELS+1];
  tree_up_t   up_d   [LEVELS+1];
  logic       rv     [LEVELS];
  tree_resp_t rd     [LEVELS];
  logic       ud     [LEVELS];
  logic       uo     [LEVELS];
  logic [KEY_W-1:0] uk [LEVELS];
  logic [FW-1:0] flight;

  assign in_ready = dn_idl[0] && (flight < FW'(MAX_FLIGHT));
  assign dn_v[0]  = in_valid && in_ready;
  always_comb begin
    dn_d[0]      = '0;
    dn_d[0].t    = in_op;
    dn_d[0].room = 1'b0;
  end
  assign up_v[LEVELS] = 1'b0;
  assign up_d[LEVELS] = '0;

  for (genvar l = 0; l < LEVELS; l++) begin : g_level
    hobt_level_pe #(
      .LEVEL(l), .NODES(FANOUT ** l),
      .IS_ROOT(l == 0), .IS_BOTTOM(l == LEVELS - 1), .INIT_LEAF(INIT_LEAF),
      .QDEPTH(MAX_FLIGHT), .RDEPTH(MAX_FLIGHT), .MARGIN(MAX_FLIGHT - 1)
    ) u_pe (
      .clk, .rst_n,
      .dn_valid(dn_v[l]),     .dn_ready(dn_rdy[l]), .dn_idle(dn_idl[l]), .dn_in(dn_d[l]),
      .dn_out_valid(dn_v[l+1]), .dn_out(dn_d[l+1]),
      .up_in_valid(up_v[l+1]), .up_in(up_d[l+1]),
      .up_out_valid(up_v[l]),  .up_out(up_d[l]),
      .resp_valid(rv[l]), .resp(rd[l]),
      .upd_done(ud[l]), .upd_ok(uo[l]), .upd_key(uk[l]),
      .split_pulse(split_pulse[l])
    );
  end

  assign resp_valid = rv[LEVELS-1];
  assign resp       = rd[LEVELS-1];

  // completion queue: up to LEVELS finishes per cycle in, one per cycle out
  logic [KEY_W:0] cq [MAX_FLIGHT];   // {ok, key}
  logic [CW-1:0]  cq_h, cq_t;
  logic [FW-1:0]  cq_n;
  logic [CW-1:0]  wp [LEVELS];
  logic [FW-1:0]  n_fin;

  always_comb begin
    n_fin = '0;
    for (int l = 0; l < LEVELS; l++) begin
      wp[l] = cq_t + CW'(n_fin);
      n_fin = n_fin + FW'(ud[l]);
    end
  end

  assign upd_done = (cq_n != 0);
  assign upd_ok   = cq[cq_h][KEY_W];
  assign upd_key  = cq[cq_h][KEY_W-1:0];

  always_ff @(posedge clk)
    for (int l = 0; l < LEVELS; l++)
      if (ud[l]) cq[wp[l]] <= {uo[l], uk[l]};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cq_h   <= '0;
      cq_t   <= '0;
      cq_n   <= '0;
      flight <= '0;
    end else begin
      cq_t   <= cq_t + CW'(n_fin);
      if (upd_done) cq_h <= cq_h + 1'b1;
      cq_n   <= cq_n + n_fin - FW'(upd_done);
      flight <= flight + FW'(dn_v[0]) - FW'(resp_valid) - FW'(upd_done);
    end
  end

  // Inner queues are sized for MAX_FLIGHT and never refuse an operation.
  for (genvar l = 1; l < LEVELS; l++) begin : g_chk
    a_no_drop: assert property (@(posedge clk) disable iff (!rst_n) dn_v[l] |-> dn_rdy[l]);
  end

  // The root never splits, so nothing leaves it upstream.
  a_root: assert property (@(posedge clk) disable iff (!rst_n) !up_v[0]);
endmodule
