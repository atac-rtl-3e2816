// bnet: one BNet, the electrical broadcast network from a Hub to the tiles of its cluster.
//
// Two parts, as the document describes: a C/2 x 1 router at the Hub that arbitrates among the
// sender-specific receive FIFOs assigned to this BNet and forwards one flit per cycle, and a
// pipelined broadcast tree that carries that flit to every tile of the cluster. The router is a
// round-robin arbiter that keeps its grant for a whole packet, with an output register; the
// tree is one more register stage, since a flit reaches all tiles of a cluster in one cycle.
// The tree has no routers or buffers; the tiles hold receive buffers and drop what is not
// theirs.
//
// Interface: in_valid/in_flit are the heads of the NIN FIFOs, in_pop pops the one granted.
// bus_valid/bus_flit is the tree's output, the same for all NT tiles; it advances only when
// every tile reports tile_ready (room in its receive buffer). Latency: 2 cycles from FIFO
// head to the tiles when nothing stalls. The all-tiles-ready rule is a choice of this design.
module bnet
  import atac_pkg::*;
#(
  parameter int unsigned NIN = 32,
  parameter int unsigned NT  = 16
) (
  input  logic     clk,
  input  logic     rst_n,
  input  logic     in_valid [NIN],
  input  flit_t    in_flit  [NIN],
  output logic     in_pop   [NIN],
  output logic     bus_valid,
  output flit_t    bus_flit,
  input  logic     tile_ready [NT]
);
  localparam int unsigned IW = $clog2(NIN > 1 ? NIN : 2);

  logic [NIN-1:0] req, gnt;
  logic [IW-1:0]  gidx;
  logic           any, take, adv1, all_ready;
  logic           v1, v2;
  flit_t          f1, f2;

  always_comb begin
    all_ready = 1'b1;
    for (int t = 0; t < NT; t++) all_ready &= tile_ready[t];
    for (int i = 0; i < NIN; i++) req[i] = in_valid[i];
  end

  assign adv1 = v1 && (!v2 || all_ready);
  assign take = any && (!v1 || adv1);

  rr_arb #(.N(NIN)) u_arb (
    .clk, .rst_n, .req, .adv(take), .tail(in_flit[gidx].meta.tail),
    .gnt, .gnt_idx(gidx), .any
  );

  always_comb
    for (int i = 0; i < NIN; i++) in_pop[i] = take && gnt[i];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v1 <= 1'b0; v2 <= 1'b0; f1 <= '0; f2 <= '0;
    end else begin
      if (take)      begin v1 <= 1'b1; f1 <= in_flit[gidx]; end
      else if (adv1) v1 <= 1'b0;
      if (adv1)      begin v2 <= 1'b1; f2 <= f1; end
      else if (all_ready) v2 <= 1'b0;
    end
  end

  assign bus_valid = v2;
  assign bus_flit  = f2;
endmodule
