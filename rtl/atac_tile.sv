// atac_tile: one tile of the ATAC chip.
//
// Holds the tile's ENet router, its network interface, the tile's slice of the ACKwise
// directory and, in the one tile per cluster that has it in place of a core, the memory
// controller. The core with its caches is outside this module: its network port (core_tx_*
// for packets it sends, core_rx_* for packets it receives) is brought out. In the memory
// controller tile that port is unused: nothing is accepted from it and nothing is delivered to
// it.
//
// Mesh ports are indexed N=0, E=1, S=2, W=3. hub_* is the router's extra output towards the
// cluster's Hub; only tiles HUB_TILE_W and HUB_TILE_E ever drive it. bnet_* are the cluster's
// two BNet broadcast buses. Requests for the directory slice wait in a REQ_DEPTH-entry queue
// of their own, while acknowledgements and evictions go straight in, so a waiting request
// never holds up the answers the directory is waiting for. A request that finds the queue full
// is dropped and its requester noted; it is later sent a GRANT carrying the nack bit (a retry)
// and asks again, so the tile never stops taking requests from the network. Directory size,
// sharer count, queue depth and memory-controller placement are parameters; the tile organisation follows the document, the
// rest is this design's choice.
module atac_tile
  import atac_pkg::*;
#(
  parameter bit          IS_MC = 1'b0,
  parameter int unsigned K     = 4,
  parameter int unsigned SETS  = 256,
  parameter int unsigned REQ_DEPTH = 16
) (
  input  logic              clk,
  input  logic              rst_n,
  input  core_id_t          my_id,
  // mesh links to the four neighbours
  input  logic              nb_in_valid  [4],
  input  flit_t             nb_in_flit   [4],
  output logic              nb_in_ready  [4],
  output logic              nb_out_valid [4],
  output flit_t             nb_out_flit  [4],
  input  logic              nb_out_ready [4],
  // router port to the Hub
  output logic              hub_valid,
  output flit_t             hub_flit,
  input  logic              hub_ready,
  // BNet buses
  input  logic              bnet_valid [2],
  input  flit_t             bnet_flit  [2],
  output logic              bnet_ready [2],
  // core network port
  input  logic              core_tx_valid,
  input  flit_t             core_tx_flit,
  output logic              core_tx_ready,
  output logic              core_rx_valid,
  output flit_t             core_rx_flit,
  input  logic              core_rx_ready,
  // memory bus (used when IS_MC)
  output logic              mem_req_valid,
  input  logic              mem_req_ready,
  output logic              mem_req_we,
  output addr_t             mem_req_addr,
  output logic [DATA_W-1:0] mem_req_wdata,
  input  logic              mem_resp_valid,
  input  logic [DATA_W-1:0] mem_resp_rdata,
  // directory events
  output logic              ev_bcast_inv,
  output logic              ev_g_set,
  output logic              ev_recall,
  output logic              ev_nack
);
  logic  r_in_valid [5];
  flit_t r_in_flit  [5];
  logic  r_in_ready [5];
  logic  r_out_valid[6];
  flit_t r_out_flit [6];
  logic  r_out_ready[6];

  logic  s_valid [3];
  flit_t s_flit  [3];
  logic  s_ready [3];
  logic  d_valid [3];
  flit_t d_flit  [3];
  logic  d_ready [3];

  for (genvar p = 0; p < 4; p++) begin : g_nb
    assign r_in_valid[p]  = nb_in_valid[p];
    assign r_in_flit[p]   = nb_in_flit[p];
    assign nb_in_ready[p] = r_in_ready[p];
    assign nb_out_valid[p] = r_out_valid[p];
    assign nb_out_flit[p]  = r_out_flit[p];
    assign r_out_ready[p]  = nb_out_ready[p];
  end
  assign hub_valid = r_out_valid[P_H];
  assign hub_flit  = r_out_flit[P_H];
  assign r_out_ready[P_H] = hub_ready;

  emesh_router u_router (
    .clk, .rst_n, .my_id,
    .in_valid(r_in_valid), .in_flit(r_in_flit), .in_ready(r_in_ready),
    .out_valid(r_out_valid), .out_flit(r_out_flit), .out_ready(r_out_ready)
  );

  tile_ni u_ni (
    .clk, .rst_n, .my_id,
    .src_valid(s_valid), .src_flit(s_flit), .src_ready(s_ready),
    .dst_valid(d_valid), .dst_flit(d_flit), .dst_ready(d_ready),
    .inj_valid(r_in_valid[P_L]), .inj_flit(r_in_flit[P_L]), .inj_ready(r_in_ready[P_L]),
    .ej_valid(r_out_valid[P_L]), .ej_flit(r_out_flit[P_L]), .ej_ready(r_out_ready[P_L]),
    .bnet_valid, .bnet_flit, .bnet_ready
  );

  // Requests for the directory wait in their own queue, so a request that the busy directory
  // cannot take yet never holds up the acknowledgements and evictions it is waiting for.
  logic  d_is_req, rq_full, rq_empty, rq_pop;
  flit_t rq_head;
  logic  dir_in_valid, dir_in_ready;
  flit_t dir_in_flit;
  assign d_is_req = d_flit[1].meta.mtype == MSG_REQ_SH || d_flit[1].meta.mtype == MSG_REQ_EX;

  sync_fifo #(.T(flit_t), .DEPTH(REQ_DEPTH)) u_reqq (
    .clk, .rst_n, .push(d_valid[1] && d_is_req && !rq_full), .wr_data(d_flit[1]),
    .pop(rq_pop), .rd_data(rq_head), .full(rq_full), .empty(rq_empty), .count()
  );

  // A request that finds the queue full is turned away: it is dropped at once (so the tile
  // keeps taking messages from the network) and the requester's bit is set in a vector with
  // one bit per core. A pointer walks the vector one position per cycle; at a set bit the
  // requester is sent a GRANT with the nack bit set (a retry) whenever the directory is not
  // sending, and asks again.
  localparam int unsigned NCORES = 1 << CORE_W;
  logic [NCORES-1:0] turned;
  core_id_t          rt_ptr;
  logic              rt_v, rt_sent;
  flit_t             rt_f;
  logic              dir_out_valid, dir_out_ready;
  flit_t             dir_out_flit;
  logic              rt_drop;

  assign rt_drop = d_valid[1] && d_is_req && rq_full;
  assign rt_v    = turned[rt_ptr];
  assign rt_sent = rt_v && !dir_out_valid && s_ready[1];

  always_comb begin
    coh_t r;
    r      = '0;
    r.req  = rt_ptr;
    r.home = my_id;
    r.nack = 1'b1;
    rt_f   = '0;
    rt_f.meta.head  = 1'b1;
    rt_f.meta.tail  = 1'b1;
    rt_f.meta.dst   = rt_ptr;
    rt_f.meta.src   = my_id;
    rt_f.meta.mtype = MSG_GRANT;
    rt_f.data       = DATA_W'(r);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      turned <= '0;
      rt_ptr <= '0;
    end else begin
      if (rt_sent) turned[rt_ptr] <= 1'b0;
      if (rt_drop) turned[d_flit[1].meta.src] <= 1'b1;
      if (!rt_v || rt_sent) rt_ptr <= rt_ptr + 1'b1;
    end
  end

  always_comb begin
    if (d_valid[1] && !d_is_req) begin
      dir_in_valid = 1'b1;
      dir_in_flit  = d_flit[1];
      d_ready[1]   = dir_in_ready;
      rq_pop       = 1'b0;
    end else begin
      dir_in_valid = !rq_empty;
      dir_in_flit  = rq_head;
      d_ready[1]   = d_valid[1];
      rq_pop       = !rq_empty && dir_in_ready;
    end
  end

  // directory replies first, turned-away replies when the directory is silent
  assign s_valid[1]    = dir_out_valid || rt_v;
  assign s_flit[1]     = dir_out_valid ? dir_out_flit : rt_f;
  assign dir_out_ready = s_ready[1];

  ackwise_dir #(.K(K), .SETS(SETS)) u_dir (
    .clk, .rst_n, .my_id,
    .in_valid(dir_in_valid), .in_flit(dir_in_flit), .in_ready(dir_in_ready),
    .out_valid(dir_out_valid), .out_flit(dir_out_flit), .out_ready(dir_out_ready),
    .ev_bcast_inv, .ev_g_set, .ev_recall, .ev_nack
  );

  if (IS_MC) begin : g_mc
    mem_ctrl u_mc (
      .clk, .rst_n, .my_id,
      .in_valid(d_valid[2]), .in_flit(d_flit[2]), .in_ready(d_ready[2]),
      .out_valid(s_valid[2]), .out_flit(s_flit[2]), .out_ready(s_ready[2]),
      .mem_req_valid, .mem_req_ready, .mem_req_we, .mem_req_addr, .mem_req_wdata,
      .mem_resp_valid, .mem_resp_rdata
    );
    // no core in this tile
    assign s_valid[0]    = 1'b0;
    assign s_flit[0]     = '0;
    assign core_tx_ready = 1'b0;
    assign core_rx_valid = 1'b0;
    assign core_rx_flit  = '0;
    assign d_ready[0]    = 1'b1;
  end else begin : g_core
    assign s_valid[0]    = core_tx_valid;
    assign s_flit[0]     = core_tx_flit;
    assign core_tx_ready = s_ready[0];
    assign core_rx_valid = d_valid[0];
    assign core_rx_flit  = d_flit[0];
    assign d_ready[0]    = core_rx_ready;
    // memory messages never reach a tile without a controller; drop any that do
    assign s_valid[2]    = 1'b0;
    assign s_flit[2]     = '0;
    assign d_ready[2]    = 1'b1;
    assign mem_req_valid = 1'b0;
    assign mem_req_we    = 1'b0;
    assign mem_req_addr  = '0;
    assign mem_req_wdata = '0;
  end
endmodule
