// tile_ni: network interface of a tile.
//
// Joins a tile's agents (agent 0: the core and its caches, agent 1: the directory slice,
// agent 2: the memory controller, present only in the tile that holds one) to the two ways
// into and out of the tile. Outgoing packets from the agents are merged by a round-robin
// arbiter that keeps its grant for a whole packet and enter the ENet router's local port.
// Incoming packets arrive from the router's local output (traffic from the same cluster) and
// from the cluster's two BNet buses (traffic that came over the ONet). Each BNet bus has a
// receive buffer at the tile; a flit is written into it only if it is a broadcast or is
// addressed to this core, so unicasts for the other cores of the cluster are dropped at once.
// The three incoming streams are merged (again a whole packet at a time) and handed to the
// agent that handles the message type: requests, evictions and acknowledgements to the
// directory, memory reads and write-backs to the memory controller, all else to the core.
//
// Timing: no added cycle on the send side; one cycle through a receive buffer on the BNet
// side; none on the router side. The drop-at-the-tile filtering follows the document; the
// buffers, the arbitration and the agent split are choices of this design.
module tile_ni
  import atac_pkg::*;
#(
  parameter int unsigned RX_DEPTH = 4
) (
  input  logic     clk,
  input  logic     rst_n,
  input  core_id_t my_id,
  // agents -> network
  input  logic     src_valid [3],
  input  flit_t    src_flit  [3],
  output logic     src_ready [3],
  // network -> agents
  output logic     dst_valid [3],
  output flit_t    dst_flit  [3],
  input  logic     dst_ready [3],
  // router local port
  output logic     inj_valid,
  output flit_t    inj_flit,
  input  logic     inj_ready,
  input  logic     ej_valid,
  input  flit_t    ej_flit,
  output logic     ej_ready,
  // BNet buses of the cluster
  input  logic     bnet_valid [2],
  input  flit_t    bnet_flit  [2],
  output logic     bnet_ready [2]
);
  // ---------------- injection ----------------
  logic [2:0] ireq, ignt;
  logic [1:0] iidx;
  logic       iany, itake;

  always_comb for (int i = 0; i < 3; i++) ireq[i] = src_valid[i];

  rr_arb #(.N(3)) u_inj (
    .clk, .rst_n, .req(ireq), .adv(itake), .tail(src_flit[iidx].meta.tail),
    .gnt(ignt), .gnt_idx(iidx), .any(iany)
  );
  assign itake     = iany && inj_ready;
  assign inj_valid = iany;
  assign inj_flit  = src_flit[iidx];
  always_comb for (int i = 0; i < 3; i++) src_ready[i] = itake && ignt[i];

  // ---------------- BNet receive buffers ----------------
  logic  b_empty [2];
  logic  b_full  [2];
  logic  b_pop   [2];
  flit_t b_head  [2];

  for (genvar b = 0; b < 2; b++) begin : g_rx
    logic mine;
    assign mine = bnet_valid[b] && (bnet_flit[b].meta.bcast || bnet_flit[b].meta.dst == my_id);
    sync_fifo #(.T(flit_t), .DEPTH(RX_DEPTH)) u_rx (
      .clk, .rst_n, .push(mine), .wr_data(bnet_flit[b]),
      .pop(b_pop[b]), .rd_data(b_head[b]),
      .full(b_full[b]), .empty(b_empty[b]), .count()
    );
    assign bnet_ready[b] = !b_full[b];
  end

  // ---------------- ejection ----------------
  logic [2:0] ereq, egnt;
  logic [1:0] eidx;
  logic       eany, etake;
  flit_t      ecand [3];
  flit_t      ef;
  logic [1:0] agent;

  assign ecand[0] = ej_flit;
  assign ecand[1] = b_head[0];
  assign ecand[2] = b_head[1];
  assign ereq = {!b_empty[1], !b_empty[0], ej_valid};
  assign ef   = ecand[eidx];

  always_comb begin
    unique case (ef.meta.mtype)
      MSG_REQ_SH, MSG_REQ_EX, MSG_EVICT, MSG_ACK: agent = 2'd1;
      MSG_MEM_RD, MSG_MEM_WB:                     agent = 2'd2;
      default:                                    agent = 2'd0;
    endcase
  end

  rr_arb #(.N(3)) u_ej (
    .clk, .rst_n, .req(ereq), .adv(etake), .tail(ef.meta.tail),
    .gnt(egnt), .gnt_idx(eidx), .any(eany)
  );
  assign etake = eany && dst_ready[agent];

  always_comb begin
    for (int a = 0; a < 3; a++) begin
      dst_valid[a] = eany && (agent == 2'(a));
      dst_flit[a]  = ef;
    end
  end
  assign ej_ready = etake && egnt[0];
  assign b_pop[0] = etake && egnt[1];
  assign b_pop[1] = etake && egnt[2];
endmodule
