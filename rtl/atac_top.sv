// atac_top: the ATAC processor's on-chip network and coherence fabric (ANet with ACKwise).
//
// NCL clusters of 16 tiles (64 x 16 = 1024 cores by default) whose Hubs are linked by the
// optical ONet. Inside a cluster, tiles talk over the electrical mesh (ENet); a packet for
// another cluster, or any broadcast, goes over the ENet to the Hub, over the ONet to every Hub,
// and from the receiving Hubs over their BNets to the tiles. Every tile holds a slice of the
// ACKwise directory; tile 0 of each cluster holds a memory controller instead of a core.
//
// Ports: the network port of every core (index = cluster*16 + tile; the ports of tile 0 of
// each cluster are unused) and the memory bus of every cluster's controller. The cores and
// the external memory are not part of this design. Directory event pulses are brought out for
// performance counting.
module atac_top
  import atac_pkg::*;
#(
  parameter int unsigned NCL  = 64,
  parameter int unsigned K    = 4,
  parameter int unsigned SETS = 256
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              core_tx_valid [NCL*16],
  input  flit_t             core_tx_flit  [NCL*16],
  output logic              core_tx_ready [NCL*16],
  output logic              core_rx_valid [NCL*16],
  output flit_t             core_rx_flit  [NCL*16],
  input  logic              core_rx_ready [NCL*16],
  output logic              mem_req_valid [NCL],
  input  logic              mem_req_ready [NCL],
  output logic              mem_req_we    [NCL],
  output addr_t             mem_req_addr  [NCL],
  output logic [DATA_W-1:0] mem_req_wdata [NCL],
  input  logic              mem_resp_valid[NCL],
  input  logic [DATA_W-1:0] mem_resp_rdata[NCL],
  output logic [15:0]       ev_bcast_inv  [NCL],
  output logic [15:0]       ev_g_set      [NCL],
  output logic [15:0]       ev_recall     [NCL],
  output logic [15:0]       ev_nack       [NCL]
);
  logic  tx_v  [NCL];
  flit_t tx_f  [NCL];
  logic  fc_t  [NCL];
  logic  rx_v  [NCL];
  flit_t rx_f  [NCL];
  logic  fc_r  [NCL];

  onet #(.NHUB(NCL)) u_onet (
    .clk, .rst_n,
    .tx_valid(tx_v), .tx_flit(tx_f), .fc_tx(fc_t),
    .rx_valid(rx_v), .rx_flit(rx_f), .fc_rx(fc_r)
  );

  for (genvar c = 0; c < NCL; c++) begin : g_cl
    logic  ctv [16];
    flit_t ctf [16];
    logic  ctr [16];
    logic  crv [16];
    flit_t crf [16];
    logic  crr [16];
    for (genvar t = 0; t < 16; t++) begin : g_t
      assign ctv[t] = core_tx_valid[c*16+t];
      assign ctf[t] = core_tx_flit[c*16+t];
      assign core_tx_ready[c*16+t] = ctr[t];
      assign core_rx_valid[c*16+t] = crv[t];
      assign core_rx_flit[c*16+t]  = crf[t];
      assign crr[t] = core_rx_ready[c*16+t];
    end

    atac_cluster #(.NCL(NCL), .K(K), .SETS(SETS)) u_cluster (
      .clk, .rst_n, .my_cluster(cluster_id_t'(c)),
      .tx_valid(tx_v[c]), .tx_flit(tx_f[c]), .fc_out(fc_t[c]),
      .rx_valid(rx_v), .rx_flit(rx_f), .fc_in(fc_r),
      .core_tx_valid(ctv), .core_tx_flit(ctf), .core_tx_ready(ctr),
      .core_rx_valid(crv), .core_rx_flit(crf), .core_rx_ready(crr),
      .mem_req_valid(mem_req_valid[c]), .mem_req_ready(mem_req_ready[c]),
      .mem_req_we(mem_req_we[c]), .mem_req_addr(mem_req_addr[c]),
      .mem_req_wdata(mem_req_wdata[c]),
      .mem_resp_valid(mem_resp_valid[c]), .mem_resp_rdata(mem_resp_rdata[c]),
      .ev_bcast_inv(ev_bcast_inv[c]), .ev_g_set(ev_g_set[c]),
      .ev_recall(ev_recall[c]), .ev_nack(ev_nack[c])
    );
  end
endmodule
