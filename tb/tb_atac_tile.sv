// tb_atac_tile: self-checking test of one tile, the memory-controller tile (tile 0) of cluster 2.
//
// The testbench drives the tile's four mesh ports and watches what leaves them, and models the
// external memory. Checks:
//   1. a flit passing through (west in, for tile 2 of the same row) leaves east 2 cycles later;
//   2. a read request for a line homed here goes to the directory, the directory's memory read
//      goes to this tile's own controller, memory is read once, and the two-flit DATA packet
//      leaves towards the requester; the directory stays busy until the requester's ACK;
//   3. while the directory is busy, requests queue; once the queue is full further requests
//      are turned away with a retry (GRANT with nack), one per requester, and the tile never
//      stops taking flits from the mesh;
//   4. nothing is ever delivered to or taken from the core port (this tile has no core).
module tb_atac_tile;
  import atac_pkg::*;

  localparam core_id_t ME = {6'd2, 4'd0};

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic              nb_in_valid  [4];
  flit_t             nb_in_flit   [4];
  logic              nb_in_ready  [4];
  logic              nb_out_valid [4];
  flit_t             nb_out_flit  [4];
  logic              nb_out_ready [4];
  logic              hub_valid, hub_ready;
  flit_t             hub_flit;
  logic              bnet_valid [2];
  flit_t             bnet_flit  [2];
  logic              bnet_ready [2];
  logic              core_tx_valid, core_tx_ready, core_rx_valid, core_rx_ready;
  flit_t             core_tx_flit, core_rx_flit;
  logic              mem_req_valid, mem_req_ready, mem_req_we;
  addr_t             mem_req_addr;
  logic [DATA_W-1:0] mem_req_wdata;
  logic              mem_resp_valid;
  logic [DATA_W-1:0] mem_resp_rdata;
  logic              ev_bcast_inv, ev_g_set, ev_recall, ev_nack;

  atac_tile #(.IS_MC(1'b1), .K(4), .SETS(256), .REQ_DEPTH(16)) dut (
    .clk, .rst_n, .my_id(ME), .*
  );

  int checks = 0, failures = 0, cycle = 0;
  always @(posedge clk) cycle++;

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // memory
  int mem_reads = 0, mem_wait = 0;
  always @(negedge clk) begin
    mem_req_ready  = 1'b1;
    mem_resp_valid = 1'b0;
    if (mem_wait > 0) begin
      mem_wait--;
      if (mem_wait == 0) mem_resp_valid = 1'b1;
    end
    if (rst_n && mem_req_valid && !mem_req_we) begin
      mem_reads++;
      mem_wait = 3;
      mem_resp_rdata = {96'hace, mem_req_addr};
    end
  end

  // everything leaving the mesh ports, with its port and cycle
  flit_t out_f [$];
  int    out_p [$];
  int    out_c [$];
  int    core_rx_seen = 0;
  always @(negedge clk) begin
    #1;
    for (int p = 0; p < 4; p++)
      if (nb_out_valid[p] && nb_out_ready[p]) begin
        out_f.push_back(nb_out_flit[p]); out_p.push_back(p); out_c.push_back(cycle);
      end
    if (core_rx_valid) core_rx_seen++;
  end

  always_comb begin
    for (int p = 0; p < 4; p++) nb_out_ready[p] = 1'b1;
    hub_ready = 1'b1;
    core_rx_ready = 1'b1;
  end

  function automatic flit_t mk(msg_t ty, core_id_t src, core_id_t dst, logic [DATA_W-1:0] data);
    flit_t f;
    f = '0;
    f.meta.head = 1; f.meta.tail = 1; f.meta.dst = dst; f.meta.src = src; f.meta.mtype = ty;
    f.data = data;
    return f;
  endfunction

  function automatic logic [DATA_W-1:0] coh(addr_t a, core_id_t req);
    coh_t c;
    c = '0; c.addr = a; c.req = req; c.home = ME;
    return DATA_W'(c);
  endfunction

  int stalls = 0;
  task automatic put(int p, flit_t f);
    nb_in_valid[p] = 1; nb_in_flit[p] = f;
    #1;
    while (!nb_in_ready[p]) begin stalls++; @(negedge clk); #1; end
    @(negedge clk);
    nb_in_valid[p] = 0;
  endtask

  initial begin
    addr_t a;
    int t0, n_retry, n_data;
    for (int p = 0; p < 4; p++) begin nb_in_valid[p] = 0; nb_in_flit[p] = '0; end
    for (int b = 0; b < 2; b++) begin bnet_valid[b] = 0; bnet_flit[b] = '0; end
    core_tx_valid = 0; core_tx_flit = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (3) @(negedge clk);

    // 1. pass-through
    t0 = cycle;
    put(P_W, mk(MSG_RAW, {6'd2, 4'd4}, {6'd2, 4'd2}, 128'h42));
    repeat (5) @(negedge clk);
    checks++;
    if (out_f.size() != 1 || out_p[0] != P_E || out_c[0] - t0 != 2) begin
      failures++; $display("FAIL pass-through: %0d flits, port %0d, %0d cycles", out_f.size(),
                           out_p.size() ? out_p[0] : -1, out_c.size() ? out_c[0] - t0 : -1);
    end
    out_f.delete(); out_p.delete(); out_c.delete();

    // 2. read miss served by this tile's directory and controller; requester is tile 1 (east)
    a = addr_t'({18'h5, 6'd2, 4'd0, 4'h0});
    core_tx_valid = 1; core_tx_flit = mk(MSG_RAW, ME, ME, 128'h0);   // must be ignored
    put(P_E, mk(MSG_REQ_SH, {6'd2, 4'd1}, ME, coh(a, {6'd2, 4'd1})));
    t0 = cycle;
    while (out_f.size() < 2 && cycle < t0 + 100) @(negedge clk);
    checks++;
    if (out_f.size() != 2 || out_f[0].meta.mtype != MSG_DATA || out_f[1].data != {96'hace, a} ||
        out_p[0] != P_E || out_f[1].meta.dst != {6'd2, 4'd1} || mem_reads != 1) begin
      failures++; $display("FAIL read miss: %0d flits, %0d memory reads", out_f.size(), mem_reads);
    end
    checks++;
    if (dut.u_dir.st == 0) begin failures++; $display("FAIL directory free before the ACK"); end
    out_f.delete(); out_p.delete(); out_c.delete();

    // 3. 20 more requests for the same line from other cores while the ACK is held back
    stalls = 0;
    for (int i = 0; i < 20; i++)
      put(P_S, mk(MSG_REQ_SH, {6'(10 + i), 4'd3}, ME, coh(a, {6'(10 + i), 4'd3})));
    repeat (2500) @(negedge clk);                  // the retry pointer walks all 1024 ids
    n_retry = 0;
    foreach (out_f[i]) begin
      coh_t c;
      c = coh_t'(out_f[i].data);
      if (out_f[i].meta.mtype == MSG_GRANT && c.nack) n_retry++;
    end
    checks++;
    if (n_retry != 4 || stalls != 0) begin
      failures++; $display("FAIL %0d retries (want 4), %0d input stalls", n_retry, stalls);
    end
    checks++;
    if (dut.rq_empty || !dut.rq_full) begin failures++; $display("FAIL request queue not full"); end
    out_f.delete(); out_p.delete(); out_c.delete();

    // the requester's ACK releases the line; the queued requests are forwarded to it in turn
    put(P_E, mk(MSG_ACK, {6'd2, 4'd1}, ME, coh(a, {6'd2, 4'd1})));
    repeat (20) @(negedge clk);
    n_data = 0;
    foreach (out_f[i]) if (out_f[i].meta.mtype == MSG_FWD_SH) n_data++;
    checks++;
    if (n_data != 1 || out_f[0].meta.dst != {6'd2, 4'd1}) begin
      failures++; $display("FAIL next queued request not forwarded to the sharer");
    end

    // 4. core port
    checks++;
    if (core_rx_seen != 0 || core_tx_ready) begin failures++; $display("FAIL core port used"); end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
