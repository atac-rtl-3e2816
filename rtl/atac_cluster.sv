// atac_cluster: one cluster of the ATAC chip, 16 tiles and a Hub.
//
// The tiles form a 4x4 electrical mesh (the ENet, tile = y*4 + x); tiles 5 and 10 have the
// extra router port to the Hub. Tile 0 holds the cluster's memory controller in place of a
// core. The Hub sends on the cluster's ONet wavelength and receives every other cluster's
// lane; its two BNet buses reach all 16 tiles.
//
// Ports: the cluster's ONet send lane and flow-control bit, the ONet receive lanes of all
// clusters, the network ports of the 16 cores (tile 0's is unused) and the memory bus of the
// controller. The cluster size, the Hub and the memory controller per cluster follow the
// document; which tiles reach the Hub and which tile holds the controller are this design's
// choices.
module atac_cluster
  import atac_pkg::*;
#(
  parameter int unsigned NCL   = 64,
  parameter int unsigned K     = 4,
  parameter int unsigned SETS  = 256
) (
  input  logic              clk,
  input  logic              rst_n,
  input  cluster_id_t       my_cluster,
  // ONet
  output logic              tx_valid,
  output flit_t             tx_flit,
  output logic              fc_out,
  input  logic              rx_valid [NCL],
  input  flit_t             rx_flit  [NCL],
  input  logic              fc_in    [NCL],
  // cores
  input  logic              core_tx_valid [16],
  input  flit_t             core_tx_flit  [16],
  output logic              core_tx_ready [16],
  output logic              core_rx_valid [16],
  output flit_t             core_rx_flit  [16],
  input  logic              core_rx_ready [16],
  // memory bus
  output logic              mem_req_valid,
  input  logic              mem_req_ready,
  output logic              mem_req_we,
  output addr_t             mem_req_addr,
  output logic [DATA_W-1:0] mem_req_wdata,
  input  logic              mem_resp_valid,
  input  logic [DATA_W-1:0] mem_resp_rdata,
  // directory events, one bit per tile
  output logic [15:0]       ev_bcast_inv,
  output logic [15:0]       ev_g_set,
  output logic [15:0]       ev_recall,
  output logic [15:0]       ev_nack
);
  // link from tile t out of port p
  logic  lv [16][4];
  flit_t lf [16][4];
  logic  lr [16][4];   // ready seen by tile t's output port p

  logic  hv [16];
  flit_t hf [16];
  logic  hr [16];

  logic  bv [2];
  flit_t bf [2];
  logic  brdy [16][2];
  logic  trdy [2][16];

  logic  mrv [16];
  logic  mwe [16];
  addr_t mad [16];
  logic [DATA_W-1:0] mwd [16];

  function automatic int nbr(int t, int p);
    int x, y;
    x = t % 4; y = t / 4;
    unique case (p)
      P_N:     return (y > 0) ? t - 4 : -1;
      P_E:     return (x < 3) ? t + 1 : -1;
      P_S:     return (y < 3) ? t + 4 : -1;
      default: return (x > 0) ? t - 1 : -1;
    endcase
  endfunction

  for (genvar t = 0; t < 16; t++) begin : g_tile
    logic  iv [4];
    flit_t ifl [4];
    logic  ir [4];
    logic  ordy [4];
    for (genvar p = 0; p < 4; p++) begin : g_p
      localparam int N = nbr(t, p);
      localparam int Q = (p + 2) % 4;     // the neighbour's port facing back
      if (N >= 0) begin : g_link
        assign iv[p]   = lv[N][Q];
        assign ifl[p]  = lf[N][Q];
        assign lr[N][Q] = ir[p];
      end else begin : g_edge
        assign iv[p]  = 1'b0;
        assign ifl[p] = '0;
        assign lr[t][p] = 1'b1;
      end
      assign ordy[p] = lr[t][p];
    end
    for (genvar b = 0; b < 2; b++) begin : g_b
      assign trdy[b][t] = brdy[t][b];
    end

    atac_tile #(.IS_MC(t == 0), .K(K), .SETS(SETS)) u_tile (
      .clk, .rst_n, .my_id({my_cluster, tile_id_t'(t)}),
      .nb_in_valid(iv), .nb_in_flit(ifl), .nb_in_ready(ir),
      .nb_out_valid(lv[t]), .nb_out_flit(lf[t]), .nb_out_ready(ordy),
      .hub_valid(hv[t]), .hub_flit(hf[t]), .hub_ready(hr[t]),
      .bnet_valid(bv), .bnet_flit(bf), .bnet_ready(brdy[t]),
      .core_tx_valid(core_tx_valid[t]), .core_tx_flit(core_tx_flit[t]),
      .core_tx_ready(core_tx_ready[t]),
      .core_rx_valid(core_rx_valid[t]), .core_rx_flit(core_rx_flit[t]),
      .core_rx_ready(core_rx_ready[t]),
      .mem_req_valid(mrv[t]), .mem_req_ready(t == 0 ? mem_req_ready : 1'b1),
      .mem_req_we(mwe[t]), .mem_req_addr(mad[t]), .mem_req_wdata(mwd[t]),
      .mem_resp_valid(t == 0 ? mem_resp_valid : 1'b0), .mem_resp_rdata(mem_resp_rdata),
      .ev_bcast_inv(ev_bcast_inv[t]), .ev_g_set(ev_g_set[t]),
      .ev_recall(ev_recall[t]), .ev_nack(ev_nack[t])
    );
    if (t != int'(HUB_TILE_W) && t != int'(HUB_TILE_E)) begin : g_nohub
      assign hr[t] = 1'b1;
    end
  end

  assign mem_req_valid = mrv[0];
  assign mem_req_we    = mwe[0];
  assign mem_req_addr  = mad[0];
  assign mem_req_wdata = mwd[0];

  logic  ev [2];
  flit_t ef [2];
  logic  er [2];
  assign ev[0] = hv[HUB_TILE_W];
  assign ef[0] = hf[HUB_TILE_W];
  assign ev[1] = hv[HUB_TILE_E];
  assign ef[1] = hf[HUB_TILE_E];
  assign hr[HUB_TILE_W] = er[0];
  assign hr[HUB_TILE_E] = er[1];

  hub #(.NCL(NCL), .NT(16)) u_hub (
    .clk, .rst_n, .my_cluster,
    .enet_valid(ev), .enet_flit(ef), .enet_ready(er),
    .tx_valid, .tx_flit, .fc_out,
    .rx_valid, .rx_flit, .fc_in,
    .bnet_valid(bv), .bnet_flit(bf), .tile_ready(trdy)
  );
endmodule
