// hub: a cluster's endpoint on the optical ONet.
//
// Send side: the two Hub-attached routers of the cluster's ENet each offer packets; a
// round-robin arbiter (holding its grant for a whole packet) picks one flit per cycle, the
// Hub's rate of 128 bits per cycle, and places it on the Hub's own wavelength. Sending pauses
// while the destination Hub (or, for a broadcast, any Hub) signals on the flow-control
// waveguide that it is nearly out of receive space.
//
// Receive side: every Hub sees every sender's lane. A flit is kept if it is a broadcast or is
// addressed to a core of this cluster, and goes into the FIFO of its sender Hub, so flits from
// different senders never mix. Senders with even IDs are served by BNet 0, odd by BNet 1
// (static partition). The Hub raises its flow-control bit while any of its FIFOs holds
// RX_DEPTH - FC_MARGIN flits or more; FC_MARGIN covers the flits still in flight in the
// round trip (3 + 3 cycles of ONet plus the send register).
//
// Timing: one cycle from an ENet port to the ONet lane (send register). Broadcast delivery
// through ONet, FIFO and BNet as given by those blocks. The Hub also keeps broadcasts it sent
// itself, so cores of the sending cluster receive them too. The even/odd BNet split, sender
// FIFOs and the flow-control waveguide follow the document; FIFO depth, the one-bit-per-Hub
// flow-control rule and the own-broadcast loopback are choices of this design.
module hub
  import atac_pkg::*;
#(
  parameter int unsigned NCL       = 64,
  parameter int unsigned NT        = 16,
  parameter int unsigned RX_DEPTH  = 16,
  parameter int unsigned FC_MARGIN = 8
) (
  input  logic        clk,
  input  logic        rst_n,
  input  cluster_id_t my_cluster,
  // from the two Hub-attached ENet routers
  input  logic        enet_valid [2],
  input  flit_t       enet_flit  [2],
  output logic        enet_ready [2],
  // ONet send lane and flow-control bit of this Hub
  output logic        tx_valid,
  output flit_t       tx_flit,
  output logic        fc_out,
  // ONet receive lanes (one per sender Hub) and flow-control bits of all Hubs
  input  logic        rx_valid [NCL],
  input  flit_t       rx_flit  [NCL],
  input  logic        fc_in    [NCL],
  // the two BNet broadcast buses
  output logic        bnet_valid [2],
  output flit_t       bnet_flit  [2],
  input  logic        tile_ready [2][NT]
);
  localparam int unsigned NB = NCL / 2;

  // ---------------- send side ----------------
  logic [1:0] req, gnt;
  logic       gidx, any, take, blocked;
  flit_t      cand;

  assign req  = {enet_valid[1], enet_valid[0]};
  assign cand = enet_flit[gidx];

  always_comb begin
    blocked = 1'b0;
    if (cand.meta.bcast) begin
      for (int h = 0; h < NCL; h++) blocked |= fc_in[h];
    end else begin
      blocked = fc_in[32'(cluster_of(cand.meta.dst)) % NCL];
    end
  end

  assign take = any && !blocked;

  rr_arb #(.N(2)) u_tx_arb (
    .clk, .rst_n, .req, .adv(take), .tail(cand.meta.tail),
    .gnt, .gnt_idx(gidx), .any
  );

  assign enet_ready[0] = take && gnt[0];
  assign enet_ready[1] = take && gnt[1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tx_valid <= 1'b0; tx_flit <= '0;
    end else begin
      tx_valid <= take;
      if (take) tx_flit <= cand;
    end
  end

  // ---------------- receive side ----------------
  logic  q_empty [NCL];
  logic  q_full  [NCL];
  logic  q_pop   [NCL];
  flit_t q_head  [NCL];
  logic [$clog2(RX_DEPTH):0] q_cnt [NCL];

  for (genvar s = 0; s < NCL; s++) begin : g_rx
    logic keep;
    assign keep = rx_valid[s] &&
                  (rx_flit[s].meta.bcast || cluster_of(rx_flit[s].meta.dst) == my_cluster);
    sync_fifo #(.T(flit_t), .DEPTH(RX_DEPTH)) u_q (
      .clk, .rst_n, .push(keep), .wr_data(rx_flit[s]),
      .pop(q_pop[s]), .rd_data(q_head[s]),
      .full(q_full[s]), .empty(q_empty[s]), .count(q_cnt[s])
    );
    a_fc_works: assert property (@(posedge clk) disable iff (!rst_n) !(keep && q_full[s]));
  end

  always_comb begin
    fc_out = 1'b0;
    for (int s = 0; s < NCL; s++)
      if (32'(q_cnt[s]) >= RX_DEPTH - FC_MARGIN) fc_out = 1'b1;
  end

  for (genvar b = 0; b < 2; b++) begin : g_bnet
    logic  iv [NB];
    flit_t iflit [NB];
    logic  ipop [NB];
    for (genvar j = 0; j < NB; j++) begin : g_map
      assign iv[j]    = !q_empty[2*j+b];
      assign iflit[j] = q_head[2*j+b];
      assign q_pop[2*j+b] = ipop[j];
    end
    bnet #(.NIN(NB), .NT(NT)) u_bnet (
      .clk, .rst_n, .in_valid(iv), .in_flit(iflit), .in_pop(ipop),
      .bus_valid(bnet_valid[b]), .bus_flit(bnet_flit[b]), .tile_ready(tile_ready[b])
    );
  end
endmodule
