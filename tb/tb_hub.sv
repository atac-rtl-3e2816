// tb_hub: self-checking test of a Hub in a 4-cluster system (this Hub is cluster 1).
//
// Send side: a unicast offered by an ENet port appears on the Hub's ONet lane one cycle later;
// packets offered by both ENet ports at once leave whole and in order; a unicast waits while
// its destination Hub raises flow control, others pass; a broadcast waits while any Hub does.
// Receive side: flits are driven on the ONet receive lanes; broadcasts and unicasts for this
// cluster must appear on BNet 0 (even senders) or BNet 1 (odd senders), unicasts for other
// clusters must not. Holding the tiles not ready must fill a sender FIFO and raise the Hub's
// flow-control bit, which must fall again once the tiles drain it.
module tb_hub;
  import atac_pkg::*;
  localparam int NCL = 4, NT = 4;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  cluster_id_t my_cluster = 6'd1;
  logic  enet_valid [2];
  flit_t enet_flit  [2];
  logic  enet_ready [2];
  logic  tx_valid;
  flit_t tx_flit;
  logic  fc_out;
  logic  rx_valid [NCL];
  flit_t rx_flit  [NCL];
  logic  fc_in    [NCL];
  logic  bnet_valid [2];
  flit_t bnet_flit  [2];
  logic  tile_ready [2][NT];

  hub #(.NCL(NCL), .NT(NT)) dut (.*);

  int checks = 0, failures = 0, cycle = 0;
  always @(posedge clk) cycle++;

  int bn_cnt [2];
  int bn_bad = 0;
  always @(posedge clk) begin
    for (int b = 0; b < 2; b++) begin
      logic ar;
      ar = 1;
      for (int t = 0; t < NT; t++) ar &= tile_ready[b][t];
      if (rst_n && bnet_valid[b] && ar) begin
        bn_cnt[b]++;
        // even senders on BNet 0, odd on BNet 1; nothing for other clusters
        if (int'(bnet_flit[b].meta.src[9:4]) % 2 != b) bn_bad++;
        if (!bnet_flit[b].meta.bcast && bnet_flit[b].meta.dst[9:4] != 6'd1) bn_bad++;
      end
    end
  end

  flit_t txlog [$];
  always @(posedge clk) if (rst_n && tx_valid) txlog.push_back(tx_flit);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic flit_t mk(int port, int seq, int dcl, logic bc, logic hd, logic tl,
                               int scl = 1);
    flit_t f;
    f = '0;
    f.meta.head = hd; f.meta.tail = tl; f.meta.bcast = bc;
    f.meta.dst = {6'(dcl), 4'd3}; f.meta.src = {6'(scl), 4'(port)};
    f.meta.mtype = MSG_RAW;
    f.data[7:0] = 8'(port); f.data[39:8] = 32'(seq);
    return f;
  endfunction

  task automatic send(int port, flit_t f);
    @(negedge clk);
    enet_valid[port] = 1; enet_flit[port] = f;
    #1;
    while (!enet_ready[port]) begin @(negedge clk); #1; end
    @(negedge clk);
    enet_valid[port] = 0;
  endtask

  initial begin
    for (int p = 0; p < 2; p++) begin enet_valid[p] = 0; enet_flit[p] = '0; end
    for (int h = 0; h < NCL; h++) begin rx_valid[h] = 0; rx_flit[h] = '0; fc_in[h] = 0; end
    for (int b = 0; b < 2; b++) for (int t = 0; t < NT; t++) tile_ready[b][t] = 1;
    bn_cnt[0] = 0; bn_cnt[1] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);

    // 1. one unicast: on the lane one cycle after it is offered
    begin
      int t0;
      flit_t f;
      f = mk(0, 1, 2, 0, 1, 1);
      enet_valid[0] = 1; enet_flit[0] = f;
      t0 = cycle;
      @(negedge clk);
      enet_valid[0] = 0;
      checks++;
      if (!(tx_valid && tx_flit == f && cycle - t0 == 1)) begin
        failures++; $display("FAIL send latency / content");
      end
      @(negedge clk);
    end

    // 2. both ports at once, 2-flit packets
    txlog.delete();
    fork
      begin send(0, mk(0, 10, 2, 0, 1, 0)); send(0, mk(0, 11, 2, 0, 0, 1)); end
      begin send(1, mk(1, 20, 3, 0, 1, 0)); send(1, mk(1, 21, 3, 0, 0, 1)); end
    join
    repeat (3) @(negedge clk);
    checks++;
    if (txlog.size() != 4 || txlog[0].data[7:0] != txlog[1].data[7:0] ||
        !txlog[0].meta.head || !txlog[1].meta.tail) begin
      failures++; $display("FAIL send arbitration: %0d flits", txlog.size());
    end

    // 3. flow control
    txlog.delete();
    fc_in[2] = 1;
    fork
      send(0, mk(0, 30, 2, 0, 1, 1));
      begin
        repeat (6) @(negedge clk);
        checks++;
        if (txlog.size() != 0) begin failures++; $display("FAIL sent into a full Hub"); end
        fc_in[2] = 0;
      end
    join
    repeat (2) @(negedge clk);
    checks++;
    if (txlog.size() != 1) begin failures++; $display("FAIL unicast not released"); end
    txlog.delete();
    fc_in[3] = 1;
    send(0, mk(0, 31, 2, 0, 1, 1));              // other destination passes
    repeat (2) @(negedge clk);
    checks++;
    if (txlog.size() != 1) begin failures++; $display("FAIL unrelated unicast held"); end
    fork
      send(1, mk(1, 32, 2, 1, 1, 1));            // broadcast waits for any Hub
      begin
        repeat (5) @(negedge clk);
        checks++;
        if (txlog.size() != 1) begin failures++; $display("FAIL broadcast sent into a full Hub"); end
        fc_in[3] = 0;
      end
    join
    repeat (2) @(negedge clk);
    checks++;
    if (txlog.size() != 2) begin failures++; $display("FAIL broadcast not released"); end

    // 4. receive filtering and BNet partition
    @(negedge clk);
    rx_valid[0] = 1; rx_flit[0] = mk(0, 40, 3, 1, 1, 1, 0);   // broadcast from 0: BNet 0
    rx_valid[3] = 1; rx_flit[3] = mk(3, 41, 1, 0, 1, 1, 3);   // unicast to us from 3: BNet 1
    rx_valid[2] = 1; rx_flit[2] = mk(2, 42, 3, 0, 1, 1, 2);   // unicast elsewhere: dropped
    @(negedge clk);
    rx_valid[3] = 0;
    rx_valid[0] = 0;
    rx_flit[2] = mk(2, 43, 1, 0, 1, 1, 2);                    // unicast to us from 2: BNet 0
    @(negedge clk);
    rx_valid[2] = 0;
    repeat (8) @(negedge clk);
    checks++;
    if (bn_cnt[0] != 2 || bn_cnt[1] != 1 || bn_bad != 0) begin
      failures++; $display("FAIL receive: bnet0 %0d bnet1 %0d bad %0d", bn_cnt[0], bn_cnt[1], bn_bad);
    end

    // 5. receive flow control
    for (int t = 0; t < NT; t++) tile_ready[0][t] = 0;
    for (int k = 0; k < 12; k++) begin
      rx_valid[2] = 1; rx_flit[2] = mk(2, 50 + k, 1, 0, 1, 1, 2);
      @(negedge clk);
    end
    rx_valid[2] = 0;
    checks++;
    if (!fc_out) begin failures++; $display("FAIL flow control not raised"); end
    for (int t = 0; t < NT; t++) tile_ready[0][t] = 1;
    repeat (20) @(negedge clk);
    checks++;
    if (fc_out) begin failures++; $display("FAIL flow control stuck"); end
    checks++;
    if (bn_cnt[0] != 14 || bn_bad != 0) begin
      failures++; $display("FAIL lost flits: %0d", bn_cnt[0]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
