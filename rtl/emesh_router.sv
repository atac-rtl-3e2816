// emesh_router: one router of the electrical mesh inside a cluster (the ENet).
//
// Five inputs (north, east, south, west, local) and six outputs: the same five plus a port to
// the cluster's Hub, which only the two Hub-attached routers of a cluster ever use. A packet for
// a core of the same cluster goes by dimension-order (X first, then Y) routing; a broadcast or a
// packet for another cluster is routed, again X then Y, to the Hub router of the sender's half
// of the cluster and leaves there on the Hub port.
//
// Each input has a FIFO (buffer write), each output a round-robin switch allocator that holds
// its grant for a whole packet, a crossbar, and an output register that stands for the link
// traversal. A flit therefore takes two cycles per hop: one in the router, one on the link.
// Valid/ready handshakes on every port; in_ready is !full of the input FIFO and does not depend
// on in_valid. The stage list and the 2-cycle hop follow the document; buffer depth, the port
// handshake and which routers reach the Hub are choices of this design.
module emesh_router
  import atac_pkg::*;
#(
  parameter int unsigned BUF_DEPTH = 4
) (
  input  logic     clk,
  input  logic     rst_n,
  input  core_id_t my_id,
  input  logic     in_valid [5],
  input  flit_t    in_flit  [5],
  output logic     in_ready [5],
  output logic     out_valid[6],
  output flit_t    out_flit [6],
  input  logic     out_ready[6]
);
  typedef logic [2:0] port_t;

  // X-then-Y step from this tile towards tile t.
  function automatic port_t xy_step(tile_id_t here, tile_id_t t);
    logic [1:0] hx, hy, tx, ty;
    hx = here[1:0]; hy = here[3:2]; tx = t[1:0]; ty = t[3:2];
    if (tx > hx)      return port_t'(P_E);
    else if (tx < hx) return port_t'(P_W);
    else if (ty > hy) return port_t'(P_S);
    else if (ty < hy) return port_t'(P_N);
    else              return port_t'(P_L);
  endfunction

  function automatic port_t route(flit_t f, core_id_t me);
    tile_id_t hub_t;
    port_t    p;
    if (!f.meta.bcast && cluster_of(f.meta.dst) == cluster_of(me)) begin
      p = xy_step(tile_of(me), tile_of(f.meta.dst));
    end else begin
      hub_t = (f.meta.src[1] == 1'b0) ? HUB_TILE_W : HUB_TILE_E;
      p = xy_step(tile_of(me), hub_t);
      if (p == port_t'(P_L)) p = port_t'(P_H);
    end
    return p;
  endfunction

  flit_t  head   [5];
  logic   empty  [5];
  logic   full   [5];
  logic   pop    [5];
  port_t  rsel   [5];
  port_t  saved  [5];
  logic   in_pkt [5];

  for (genvar i = 0; i < 5; i++) begin : g_in
    sync_fifo #(.T(flit_t), .DEPTH(BUF_DEPTH)) u_buf (
      .clk, .rst_n,
      .push(in_valid[i]), .wr_data(in_flit[i]),
      .pop(pop[i]), .rd_data(head[i]),
      .full(full[i]), .empty(empty[i]), .count()
    );
    assign in_ready[i] = !full[i];
    assign rsel[i] = (in_pkt[i]) ? saved[i] : route(head[i], my_id);

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        in_pkt[i] <= 1'b0; saved[i] <= '0;
      end else if (pop[i]) begin
        in_pkt[i] <= !head[i].meta.tail;
        saved[i]  <= rsel[i];
      end
    end
  end

  logic  ov [6];
  flit_t of [6];
  logic [4:0] gnt [6];
  logic [2:0] gidx [6];
  logic       gany [6];
  logic       take [6];

  for (genvar o = 0; o < 6; o++) begin : g_out
    logic [4:0] req;
    always_comb
      for (int i = 0; i < 5; i++) req[i] = !empty[i] && (rsel[i] == port_t'(o));

    rr_arb #(.N(5)) u_sa (
      .clk, .rst_n, .req,
      .adv(take[o]), .tail(head[gidx[o]].meta.tail),
      .gnt(gnt[o]), .gnt_idx(gidx[o]), .any(gany[o])
    );
    assign take[o] = gany[o] && (!ov[o] || out_ready[o]);

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        ov[o] <= 1'b0; of[o] <= '0;
      end else if (take[o]) begin
        ov[o] <= 1'b1; of[o] <= head[gidx[o]];
      end else if (out_ready[o]) begin
        ov[o] <= 1'b0;
      end
    end
    assign out_valid[o] = ov[o];
    assign out_flit[o]  = of[o];
  end

  always_comb begin
    for (int i = 0; i < 5; i++) begin
      pop[i] = 1'b0;
      for (int o = 0; o < 6; o++)
        if (take[o] && gnt[o][i]) pop[i] = 1'b1;
    end
  end

  for (genvar i = 0; i < 5; i++) begin : g_chk
    a_one_output: assert property (@(posedge clk) disable iff (!rst_n)
      pop[i] |-> !empty[i]);
  end
endmodule
