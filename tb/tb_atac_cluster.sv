// tb_atac_cluster: self-checking test of one cluster (16 tiles, Hub, two BNets) of a
// two-cluster chip.
//
// The testbench stands in for everything outside cluster 0: it loops the cluster's own ONet lane
// back after 3 cycles (a Hub sees its own wavelength too), plays cluster 1 on the other lane,
// models the external memory behind tile 0's controller and answers for the cores.
// Checks:
//   1. a packet between two tiles of the cluster takes 2 cycles per ENet hop plus 2;
//   2. a packet for cluster 1 leaves on the cluster's ONet lane, from the Hub, unchanged;
//   3. a unicast arriving from cluster 1 reaches only its core; a broadcast reaches all 15 cores;
//   4. a read miss to a line homed in the cluster goes directory -> memory controller -> memory
//      -> requester, and the directory is free again after the requester's acknowledgement;
//   5. when a core stops accepting, the cluster raises its flow-control bit before its receive
//      FIFO overflows (the Hub's own assertion checks the overflow); a sender that obeys the
//      bit stalls until the core takes packets again and loses nothing, in order.
module tb_atac_cluster;
  import atac_pkg::*;

  localparam int unsigned NCL = 2;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic              tx_valid, fc_out;
  flit_t             tx_flit;
  logic              rx_valid [NCL];
  flit_t             rx_flit  [NCL];
  logic              fc_in    [NCL];
  logic              core_tx_valid [16];
  flit_t             core_tx_flit  [16];
  logic              core_tx_ready [16];
  logic              core_rx_valid [16];
  flit_t             core_rx_flit  [16];
  logic              core_rx_ready [16];
  logic              mem_req_valid, mem_req_ready, mem_req_we;
  addr_t             mem_req_addr;
  logic [DATA_W-1:0] mem_req_wdata;
  logic              mem_resp_valid;
  logic [DATA_W-1:0] mem_resp_rdata;
  logic [15:0]       ev_bcast_inv, ev_g_set, ev_recall, ev_nack;

  atac_cluster #(.NCL(NCL)) dut (
    .clk, .rst_n, .my_cluster(cluster_id_t'(0)),
    .tx_valid, .tx_flit, .fc_out, .rx_valid, .rx_flit, .fc_in,
    .core_tx_valid, .core_tx_flit, .core_tx_ready,
    .core_rx_valid, .core_rx_flit, .core_rx_ready,
    .mem_req_valid, .mem_req_ready, .mem_req_we, .mem_req_addr, .mem_req_wdata,
    .mem_resp_valid, .mem_resp_rdata,
    .ev_bcast_inv, .ev_g_set, .ev_recall, .ev_nack
  );

  int checks = 0, failures = 0, cycle = 0;
  always @(posedge clk) cycle++;

  initial begin
    #200000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- ONet stand-in: own lane looped back after 3 cycles, cluster 1 from the bench
  logic  lb_v [3];
  flit_t lb_f [3];
  logic  fc_d [3];
  logic  r1_v;
  flit_t r1_f;
  flit_t tx_seen [$];
  always @(posedge clk) begin
    lb_v[2] <= lb_v[1]; lb_f[2] <= lb_f[1];
    lb_v[1] <= lb_v[0]; lb_f[1] <= lb_f[0];
    lb_v[0] <= rst_n && tx_valid; lb_f[0] <= tx_flit;
    fc_d[2] <= fc_d[1]; fc_d[1] <= fc_d[0]; fc_d[0] <= fc_out;
    if (rst_n && tx_valid) tx_seen.push_back(tx_flit);
  end
  always_comb begin
    rx_valid[0] = lb_v[2]; rx_flit[0] = lb_f[2];
    rx_valid[1] = r1_v;    rx_flit[1] = r1_f;
    fc_in[0] = fc_d[2]; fc_in[1] = 1'b0;
  end

  // ---------------- memory
  int    mem_reads = 0, mem_wait = 0;
  always @(negedge clk) begin
    mem_req_ready  = 1'b1;
    mem_resp_valid = 1'b0;
    if (mem_wait > 0) begin
      mem_wait--;
      if (mem_wait == 0) mem_resp_valid = 1'b1;
    end
    if (rst_n && mem_req_valid && !mem_req_we) begin
      mem_reads++;
      mem_wait = 4;
      mem_resp_rdata = {96'h5eed, mem_req_addr};
    end
  end

  // ---------------- cores: senders and receivers
  flit_t rxq [16][$];
  int    rx_cycle [16];
  logic  block_rx [16];

  always @(negedge clk) begin
    #1;
    for (int t = 0; t < 16; t++)
      if (core_rx_valid[t] && core_rx_ready[t]) begin
        rxq[t].push_back(core_rx_flit[t]);
        rx_cycle[t] = cycle;
      end
  end
  always_comb for (int t = 0; t < 16; t++) core_rx_ready[t] = !block_rx[t];

  function automatic flit_t mk(msg_t ty, core_id_t src, core_id_t dst, logic head, logic tail,
                               logic bc, logic [DATA_W-1:0] data);
    flit_t f;
    f = '0;
    f.meta.head = head; f.meta.tail = tail; f.meta.bcast = bc; f.meta.dst = dst;
    f.meta.src = src; f.meta.mtype = ty; f.data = data;
    return f;
  endfunction

  task automatic core_send(int t, flit_t f);
    core_tx_valid[t] = 1; core_tx_flit[t] = f;
    #1;
    while (!core_tx_ready[t]) begin @(negedge clk); #1; end
    @(negedge clk);
    core_tx_valid[t] = 0;
  endtask

  // one flit on cluster 1's lane, obeying this cluster's flow-control bit as seen 3 cycles late
  task automatic remote_send(flit_t f, bit obey_fc);
    if (obey_fc) while (fc_d[2]) @(negedge clk);
    r1_v = 1; r1_f = f;
    @(negedge clk);
    r1_v = 0;
  endtask

  function automatic core_id_t me(int t);
    return {6'd0, 4'(t)};
  endfunction

  task automatic clear_rx();
    for (int t = 0; t < 16; t++) rxq[t].delete();
  endtask

  initial begin
    int t0, lat, got;
    flit_t f;
    for (int t = 0; t < 16; t++) begin
      core_tx_valid[t] = 0; core_tx_flit[t] = '0; block_rx[t] = 0;
    end
    r1_v = 0; r1_f = '0;
    for (int i = 0; i < 3; i++) begin lb_v[i] = 0; lb_f[i] = '0; fc_d[i] = 0; end
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (3) @(negedge clk);

    // 1. intra-cluster latency: (1,0) -> (2,3) is 4 hops
    t0 = cycle;
    core_send(1, mk(MSG_RAW, me(1), me(14), 1, 1, 0, 128'h1234));
    repeat (20) @(negedge clk);
    checks++;
    lat = rx_cycle[14] - t0;
    if (rxq[14].size() != 1 || rxq[14][0].data != 128'h1234 || lat != 2 * 4 + 2) begin
      failures++; $display("FAIL mesh packet: %0d received, latency %0d", rxq[14].size(), lat);
    end
    clear_rx();

    // 2. to cluster 1 through the Hub
    tx_seen.delete();
    core_send(3, mk(MSG_RAW, me(3), {6'd1, 4'd6}, 1, 1, 0, 128'hbeef));
    repeat (20) @(negedge clk);
    checks++;
    if (tx_seen.size() != 1 || tx_seen[0].meta.dst != {6'd1, 4'd6} || tx_seen[0].data != 128'hbeef) begin
      failures++; $display("FAIL packet for cluster 1: %0d on the lane", tx_seen.size());
    end
    checks++;
    got = 0;
    for (int t = 0; t < 16; t++) got += rxq[t].size();
    if (got != 0) begin failures++; $display("FAIL unicast for cluster 1 delivered locally"); end

    // 3. from cluster 1: unicast to core 7, then a broadcast
    remote_send(mk(MSG_RAW, {6'd1, 4'd2}, me(7), 1, 0, 0, 128'h77), 0);
    remote_send(mk(MSG_RAW, {6'd1, 4'd2}, me(7), 0, 1, 0, 128'h78), 0);
    repeat (20) @(negedge clk);
    checks++;
    got = 0;
    for (int t = 0; t < 16; t++) if (t != 7) got += rxq[t].size();
    if (rxq[7].size() != 2 || rxq[7][1].data != 128'h78 || got != 0) begin
      failures++; $display("FAIL inbound unicast: core 7 got %0d, others %0d", rxq[7].size(), got);
    end
    clear_rx();
    remote_send(mk(MSG_RAW, {6'd1, 4'd2}, '0, 1, 1, 1, 128'hb0), 0);
    repeat (20) @(negedge clk);
    for (int t = 1; t < 16; t++) begin
      checks++;
      if (rxq[t].size() != 1) begin failures++; $display("FAIL broadcast at core %0d", t); end
    end
    clear_rx();

    // 4. read miss: core 5 asks for a line homed at tile 9
    begin
      coh_t c;
      addr_t a;
      a = addr_t'({12'h3, 8'h2, 6'd0, 4'd9, 4'h0});
      c = '0; c.addr = a; c.req = me(5); c.home = me(9);
      core_send(5, mk(MSG_REQ_SH, me(5), me(9), 1, 1, 0, DATA_W'(c)));
      t0 = cycle;
      while (rxq[5].size() < 2 && cycle < t0 + 200) @(negedge clk);
      checks++;
      if (rxq[5].size() != 2 || rxq[5][0].meta.mtype != MSG_DATA ||
          rxq[5][1].data != {96'h5eed, a} || mem_reads != 1) begin
        failures++; $display("FAIL read miss: %0d flits, %0d memory reads", rxq[5].size(), mem_reads);
      end
      checks++;
      if (dut.g_tile[9].u_tile.u_dir.st == 0) begin
        failures++; $display("FAIL directory finished before the requester acknowledged");
      end
      core_send(5, mk(MSG_ACK, me(5), me(9), 1, 1, 0, DATA_W'(c)));
      repeat (10) @(negedge clk);
      checks++;
      if (dut.g_tile[9].u_tile.u_dir.st != 0) begin
        failures++; $display("FAIL directory still busy after the acknowledgement");
      end
    end
    clear_rx();

    // 5. flow control: core 7 stops taking packets; cluster 1 keeps sending to it
    block_rx[7] = 1;
    begin
      int sent;
      bit fc_seen;
      sent = 0; fc_seen = 0;
      fork
        begin
          // the core starts taking packets again after a while
          repeat (300) @(negedge clk);
          block_rx[7] = 0;
        end
        begin
          for (int i = 0; i < 40; i++) begin
            remote_send(mk(MSG_RAW, {6'd1, 4'd2}, me(7), 1, 1, 0, 128'(i)), 1);
            sent++;
            if (fc_out) fc_seen = 1;
          end
        end
      join
      checks++;
      if (!fc_seen) begin failures++; $display("FAIL flow-control bit never raised"); end
      repeat (400) @(negedge clk);
      checks++;
      if (rxq[7].size() != sent) begin
        failures++; $display("FAIL %0d of %0d packets arrived", rxq[7].size(), sent);
      end else begin
        for (int i = 0; i < sent; i++) begin
          checks++;
          if (rxq[7][i].data != 128'(i)) begin failures++; $display("FAIL packet %0d out of order", i); end
        end
      end
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
