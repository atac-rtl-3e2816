// tb_atac_top: end-to-end self-checking test of the ATAC chip.
//
// The testbench supplies what the chip leaves outside: a model of every core's cache (lines in
// state I, S or M, one miss outstanding at a time) and an external memory behind each
// cluster's memory controller. Three phases:
//   1. Latency: on an idle chip one core sends a plain packet to cores 1, 2 and 5 mesh hops
//      away in its own cluster and one packet to another cluster. Each extra ENet hop must add
//      exactly 2 cycles (router + link).
//   2. Coherence: every core reads, writes and evicts lines from a small pool for a fixed time
//      (hot lines shared by many cores, two lines that fall in the same directory set, lines
//      homed in every cluster). The cache model answers forwards and invalidations as the
//      protocol requires, writes back dirty lines and checks that every reply is one it can
//      expect. Every miss must complete.
//   3. Flow control: the cores of cluster 0 stop accepting packets while every other core
//      sends it multi-flit packets; the Hub receive buffers fill, flow control must stop the
//      senders, and once the cores accept again every packet must arrive intact and once.
// Each mechanism of the design is counted (ENet hops, Hub sends, ONet unicasts and broadcasts,
// BNet 0 and 1, flow-control stalls, multi-flit packets, memory reads and write-backs,
// forwards, unicast and broadcast invalidations, the global bit, recalls, nacks and upgrade
// grants); one that never happened is a failure.
//
// Size: NCL clusters of 16 tiles. The default is the reduced 4-cluster chip (60 cores); the
// same bench runs the full 64-cluster chip with NCL=64.
module tb_atac_top;
  import atac_pkg::*;

  parameter int unsigned NCL = 4;
  localparam int unsigned NC = NCL * 16;
  localparam int unsigned NL = 12;            // lines in the pool
  localparam int unsigned TXR = 128;          // send ring per core
  localparam int unsigned COH_CYCLES = 6000;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic              core_tx_valid [NC];
  flit_t             core_tx_flit  [NC];
  logic              core_tx_ready [NC];
  logic              core_rx_valid [NC];
  flit_t             core_rx_flit  [NC];
  logic              core_rx_ready [NC];
  logic              mem_req_valid [NCL];
  logic              mem_req_ready [NCL];
  logic              mem_req_we    [NCL];
  addr_t             mem_req_addr  [NCL];
  logic [DATA_W-1:0] mem_req_wdata [NCL];
  logic              mem_resp_valid[NCL];
  logic [DATA_W-1:0] mem_resp_rdata[NCL];
  logic [15:0]       ev_bcast_inv  [NCL];
  logic [15:0]       ev_g_set      [NCL];
  logic [15:0]       ev_recall     [NCL];
  logic [15:0]       ev_nack       [NCL];

  atac_top #(.NCL(NCL)) dut (.*);

  int checks = 0, failures = 0, cycle = 0;
  always @(posedge clk) cycle++;

  initial begin
    #(64'd200000 * 10);
    failures++;
    $display("FAIL watchdog at cycle %0d", cycle);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------------------ mechanism counters
  int m_hop_lat, m_hub_uni, m_onet_bcast, m_bnet0, m_bnet1, m_fc_stall, m_multiflit;
  int m_retry;
  int m_memrd, m_memwb, m_fwd, m_uinv, m_binv_rx, m_gset, m_binv, m_recall, m_nack, m_grant;

  for (genvar c = 0; c < NCL; c++) begin : g_mon
    always @(posedge clk) if (rst_n) begin
      if (dut.tx_v[c] && !dut.tx_f[c].meta.bcast) m_hub_uni++;
      if (dut.tx_v[c] && dut.tx_f[c].meta.bcast) m_onet_bcast++;
      if (dut.g_cl[c].u_cluster.u_hub.bnet_valid[0]) m_bnet0++;
      if (dut.g_cl[c].u_cluster.u_hub.bnet_valid[1]) m_bnet1++;
      if (dut.g_cl[c].u_cluster.u_hub.any && dut.g_cl[c].u_cluster.u_hub.blocked) m_fc_stall++;
      m_gset   += $countones(ev_g_set[c]);
      m_binv   += $countones(ev_bcast_inv[c]);
      m_recall += $countones(ev_recall[c]);
      m_nack   += $countones(ev_nack[c]);
    end
  end

  // ------------------------------------------------------------------ external memory
  int mem_wait [NCL];
  always @(negedge clk) begin
    for (int c = 0; c < NCL; c++) begin
      mem_req_ready[c] = 1'b1;
      mem_resp_valid[c] = 1'b0;
      if (mem_wait[c] > 0) begin
        mem_wait[c]--;
        if (mem_wait[c] == 0) mem_resp_valid[c] = 1'b1;
      end
      if (rst_n && mem_req_valid[c]) begin
        if (mem_req_we[c]) m_memwb++;
        else begin
          m_memrd++;
          mem_wait[c] = 2 + $urandom_range(0, 6);
          mem_resp_rdata[c] = DATA_W'(mem_req_addr[c]);
        end
      end
    end
  end

  // ------------------------------------------------------------------ core models
  localparam logic [1:0] L_I = 2'd0, L_S = 2'd1, L_M = 2'd2;

  addr_t      pool [NL];
  logic [1:0] lst  [NC][NL];
  logic       had_s [NC][NL];        // asked for exclusive access while holding a shared copy
  logic       pend [NC];
  int         p_line [NC];
  logic       p_ex [NC];
  flit_t      p_req [NC];            // the request, kept for a retry
  int         think [NC];
  int         misses_issued = 0, misses_done = 0;
  logic       coh_on = 0;
  logic       rx_block [NC];

  flit_t txb [NC][TXR];
  int    txh [NC], txt [NC];
  logic  in_data [NC];                 // between the head and the tail of a DATA packet
  logic  fired_tx [NC];

  function automatic core_id_t cid(int c);
    return core_id_t'(c);
  endfunction

  function automatic int line_idx(addr_t a);
    for (int l = 0; l < NL; l++) if (pool[l] == a) return l;
    return -1;
  endfunction

  function automatic flit_t mk(msg_t t, int src, core_id_t dst, logic head, logic tail,
                               logic [DATA_W-1:0] data);
    flit_t f;
    f = '0;
    f.meta.head = head; f.meta.tail = tail; f.meta.dst = dst; f.meta.src = cid(src);
    f.meta.mtype = t; f.data = data;
    return f;
  endfunction

  function automatic logic [DATA_W-1:0] coh(addr_t a, core_id_t req, logic upg, logic nk,
                                            logic dirty);
    coh_t c;
    c = '0; c.addr = a; c.req = req; c.home = home_of(a); c.upgrade = upg; c.nack = nk;
    c.dirty = dirty;
    return DATA_W'(c);
  endfunction

  task automatic send(int c, flit_t f);
    if (txt[c] - txh[c] >= TXR) begin
      failures++; $display("FAIL send ring of core %0d overflowed", c);
    end else begin
      txb[c][txt[c] % TXR] = f;
      txt[c]++;
    end
  endtask

  // give up a line: dirty lines are written back to memory first
  task automatic drop(int c, int l);
    had_s[c][l] = 0;
    if (lst[c][l] == L_M) begin
      send(c, mk(MSG_MEM_WB, c, mc_of(pool[l]), 1'b1, 1'b0, coh(pool[l], cid(c), 0, 0, 1)));
      send(c, mk(MSG_MEM_WB, c, mc_of(pool[l]), 1'b0, 1'b1, DATA_W'(c)));
    end
    lst[c][l] = L_I;
  endtask

  task automatic handle_coh(int c, flit_t f);
    coh_t cm;
    int   l;
    cm = coh_t'(f.data);
    if (f.meta.mtype == MSG_GRANT && cm.nack) begin
      // turned away by a full request queue: ask again
      checks++;
      if (!pend[c]) begin
        failures++; $display("FAIL core %0d: unexpected retry", c);
      end else begin
        m_retry++;
        send(c, p_req[c]);
      end
      return;
    end
    l  = line_idx(cm.addr);
    if (l < 0) begin
      failures++; $display("FAIL core %0d got a message for unknown line %h", c, cm.addr);
      return;
    end
    unique case (f.meta.mtype)
      MSG_FWD_SH, MSG_FWD_EX: begin
        m_fwd++;
        if (lst[c][l] == L_I) begin
          send(c, mk(MSG_ACK, c, cm.home, 1'b1, 1'b1, coh(cm.addr, cm.req, 0, 1, 0)));
        end else begin
          send(c, mk(MSG_DATA, c, cm.req, 1'b1, 1'b0, coh(cm.addr, cm.req, 0, 0, 0)));
          send(c, mk(MSG_DATA, c, cm.req, 1'b0, 1'b1, DATA_W'(cm.addr)));
          // an owner keeps responsibility for the dirty line (O); a forward for exclusive
          // hands it over
          if (f.meta.mtype == MSG_FWD_EX) begin lst[c][l] = L_I; had_s[c][l] = 0; end
        end
      end
      MSG_INV: begin
        if (f.meta.bcast && cm.req == cid(c)) begin
          // the broadcast of this core's own exclusive request: answer if the shared copy it
          // asked from was still here, keep the line
          if (had_s[c][l]) begin
            had_s[c][l] = 0;
            send(c, mk(MSG_ACK, c, cm.home, 1'b1, 1'b1, coh(cm.addr, cm.req, 0, 0, 0)));
          end
        end else if (f.meta.bcast) begin
          m_binv_rx++;
          if (!(cm.exc1_v && cm.exc1 == cid(c)) && !(cm.exc2_v && cm.exc2 == cid(c)) &&
              lst[c][l] != L_I) begin
            drop(c, l);
            send(c, mk(MSG_ACK, c, cm.home, 1'b1, 1'b1, coh(cm.addr, cm.req, 0, 0, 0)));
          end
        end else begin
          m_uinv++;
          drop(c, l);
          send(c, mk(MSG_ACK, c, cm.home, 1'b1, 1'b1, coh(cm.addr, cm.req, 0, 0, 0)));
        end
      end
      MSG_GRANT: begin
        checks++;

        if (!pend[c] || p_line[c] != l || !p_ex[c]) begin
          failures++; $display("FAIL core %0d: unexpected grant", c);
        end else begin
          m_grant++;
          lst[c][l] = L_M;
          pend[c] = 0; misses_done++;
        end
      end
      default: begin failures++; $display("FAIL core %0d: unexpected message %0d", c, f.meta.mtype); end
    endcase
  endtask

  // raw packets of phase 3: payload {sender, sequence}; received[] counts each one
  int raw_seen [NC][32];
  int raw_lat_cycles;
  logic raw_probe;
  int raw_probe_sent;

  task automatic handle_rx(int c, flit_t f);
    coh_t cm;
    if (f.meta.mtype == MSG_RAW) begin
      if (f.meta.tail) begin
        int s, q;
        s = int'(f.data[31:16]); q = int'(f.data[15:0]);
        if (!f.meta.head) m_multiflit++;
        if (raw_probe) raw_lat_cycles = cycle - raw_probe_sent;
        else if (s < NC && q < 32) raw_seen[s][q]++;
      end
      return;
    end
    if (f.meta.mtype == MSG_DATA) begin
      if (f.meta.head) begin
        cm = coh_t'(f.data);
        checks++;
        if (!pend[c] || line_idx(cm.addr) != p_line[c]) begin
          failures++; $display("FAIL core %0d: data for %h not asked for", c, cm.addr);
        end
        in_data[c] = 1;
      end
      if (f.meta.tail) begin
        checks++;
        if (!in_data[c] || f.data != DATA_W'(pool[p_line[c]])) begin
          failures++; $display("FAIL core %0d: bad data packet", c);
        end
        in_data[c] = 0;
        m_multiflit++;
        if (pend[c]) begin
          lst[c][p_line[c]] = p_ex[c] ? L_M : L_S;
          pend[c] = 0; misses_done++;
          // the line is here: tell the home
          send(c, mk(MSG_ACK, c, home_of(pool[p_line[c]]), 1'b1, 1'b1,
                     coh(pool[p_line[c]], cid(c), 0, 0, 0)));
        end
      end
      return;
    end
    handle_coh(c, f);
  endtask

  // a new access by core c
  task automatic access(int c);
    int l, op;
    l  = $urandom_range(0, NL - 1);
    op = $urandom_range(0, 9);
    if (op < 5) begin                         // read
      if (lst[c][l] == L_I) begin
        pend[c] = 1; p_line[c] = l; p_ex[c] = 0; misses_issued++;
        p_req[c] = mk(MSG_REQ_SH, c, home_of(pool[l]), 1'b1, 1'b1, coh(pool[l], cid(c), 0, 0, 0));
        send(c, p_req[c]);
      end
    end else if (op < 8) begin                // write
      if (lst[c][l] != L_M) begin
        pend[c] = 1; p_line[c] = l; p_ex[c] = 1; misses_issued++;
        had_s[c][l] = lst[c][l] == L_S;
        p_req[c] = mk(MSG_REQ_EX, c, home_of(pool[l]), 1'b1, 1'b1,
                      coh(pool[l], cid(c), lst[c][l] == L_S, 0, 0));
        send(c, p_req[c]);
      end
    end else if (lst[c][l] != L_I) begin      // evict
      logic d;
      d = lst[c][l] == L_M;
      drop(c, l);
      send(c, mk(MSG_EVICT, c, home_of(pool[l]), 1'b1, 1'b1, coh(pool[l], cid(c), 0, 0, d)));
    end
  endtask

  // all core ports, driven at the falling edge
  always @(negedge clk) begin
    for (int c = 0; c < NC; c++) begin
      if (fired_tx[c]) txh[c]++;
      core_tx_valid[c] = rst_n && (txh[c] != txt[c]);
      core_tx_flit[c]  = txb[c][txh[c] % TXR];
      core_rx_ready[c] = !rx_block[c];
      if (coh_on && (c % 16) != 0 && !pend[c]) begin
        if (think[c] > 0) think[c]--;
        else begin
          access(c);
          think[c] = $urandom_range(0, 20);
        end
      end
    end
    #1;
    for (int c = 0; c < NC; c++) begin
      fired_tx[c] = core_tx_valid[c] && core_tx_ready[c];
      if (core_rx_valid[c] && core_rx_ready[c]) begin
        if (!rst_n || (c % 16) == 0) begin
          failures++; $display("FAIL delivery to memory-controller tile %0d", c);
        end else handle_rx(c, core_rx_flit[c]);
      end
    end
  end

  function automatic addr_t mkline(int tag, int idx, int home);
    return addr_t'((tag << 22) | (idx << 14) | (home << 4));
  endfunction

  function automatic bit tx_idle();
    for (int c = 0; c < NC; c++) if (txh[c] != txt[c]) return 0;
    return 1;
  endfunction

  task automatic probe(int from, int to, output int lat);
    raw_probe = 1;
    raw_lat_cycles = -1;
    @(negedge clk);
    raw_probe_sent = cycle;
    send(from, mk(MSG_RAW, from, cid(to), 1'b1, 1'b1, '0));
    while (raw_lat_cycles < 0 && cycle < raw_probe_sent + 500) @(negedge clk);
    lat = raw_lat_cycles;
    raw_probe = 0;
    repeat (5) @(negedge clk);
  endtask

  initial begin
    int l1, l2, l5, lx, t0, sent;
    for (int c = 0; c < NC; c++) begin
      txh[c] = 0; txt[c] = 0; pend[c] = 0; think[c] = 0;
      in_data[c] = 0; fired_tx[c] = 0; rx_block[c] = 0;
      for (int l = 0; l < NL; l++) begin lst[c][l] = L_I; had_s[c][l] = 0; end
      for (int q = 0; q < 32; q++) raw_seen[c][q] = 0;
      core_tx_valid[c] = 0; core_tx_flit[c] = '0; core_rx_ready[c] = 1;
    end
    for (int c = 0; c < NCL; c++) begin
      mem_wait[c] = 0; mem_resp_valid[c] = 0; mem_resp_rdata[c] = '0; mem_req_ready[c] = 1;
    end
    raw_probe = 0;
    // line pool: two hot lines, two lines in the same directory set of one home, and lines
    // homed around the chip
    pool[0] = mkline(1, 3, 1 * 16 + 6);
    pool[1] = mkline(2, 7, (NCL - 1) * 16 + 9);
    pool[2] = mkline(3, 5, 2);
    pool[3] = mkline(4, 5, 2);                 // same home and set as pool[2]
    for (int l = 4; l < NL; l++) pool[l] = mkline(5 + l, l, ((l * 5) % NCL) * 16 + 1 + (l % 15));

    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (5) @(negedge clk);

    // ---------------- phase 1: latency
    probe(1, 2, l1);                   // (1,0) -> (2,0): 1 hop
    probe(1, 3, l2);                   // (1,0) -> (3,0): 2 hops
    probe(1, 15, l5);                  // (1,0) -> (3,3): 5 hops
    probe(1, 16 + 1, lx);              // to cluster 1 over the ONet
    $display("latency: 1 hop %0d, 2 hops %0d, 5 hops %0d, other cluster %0d", l1, l2, l5, lx);
    checks++;
    if (l2 - l1 != 2 || l5 - l1 != 8 || l1 <= 0) begin
      failures++; $display("FAIL ENet hop latency is not 2 cycles");
    end else m_hop_lat++;
    checks++;
    if (lx <= 0) begin failures++; $display("FAIL inter-cluster packet lost"); end

    // ---------------- phase 2: coherence traffic
    t0 = cycle;
    coh_on = 1;
    repeat (COH_CYCLES) @(negedge clk);
    coh_on = 0;
    while ((misses_done != misses_issued || !tx_idle()) && cycle < t0 + COH_CYCLES + 20000)
      @(negedge clk);
    repeat (200) @(negedge clk);
    $display("coherence: %0d misses issued, %0d completed", misses_issued, misses_done);
    checks++;
    if (misses_done != misses_issued || misses_issued < 100) begin
      failures++; $display("FAIL not every miss completed");
    end

    // ---------------- phase 3: flow control
    for (int t = 0; t < 16; t++) rx_block[t] = 1;
    @(negedge clk);
    sent = 0;
    for (int c = 16; c < NC; c++) begin
      if (c % 16 == 0) continue;
      for (int q = 0; q < 2; q++) begin
        int d;
        d = 1 + (c + q) % 15;
        for (int k = 0; k < 3; k++)
          send(c, mk(MSG_RAW, c, cid(d), k == 0, k == 2, {96'(k), 16'(c), 16'(q)}));
        sent++;
      end
    end
    repeat (300) @(negedge clk);
    for (int t = 0; t < 16; t++) rx_block[t] = 0;
    t0 = cycle;
    while (!tx_idle() && cycle < t0 + 20000) @(negedge clk);
    repeat (300) @(negedge clk);
    for (int c = 16; c < NC; c++) begin
      if (c % 16 == 0) continue;
      for (int q = 0; q < 2; q++) begin
        checks++;
        if (raw_seen[c][q] != 1) begin
          failures++; $display("FAIL packet %0d.%0d arrived %0d times", c, q, raw_seen[c][q]);
        end
      end
    end

    // ---------------- mechanisms
    $display("mechanisms: hop %0d hub-unicast %0d onet-bcast %0d bnet0 %0d bnet1 %0d fc-stall %0d",
             m_hop_lat, m_hub_uni, m_onet_bcast, m_bnet0, m_bnet1, m_fc_stall);
    $display("  multiflit %0d memrd %0d memwb %0d fwd %0d uinv %0d binv %0d binv-rx %0d",
             m_multiflit, m_memrd, m_memwb, m_fwd, m_uinv, m_binv, m_binv_rx);
    $display("  gset %0d recall %0d nack %0d grant %0d retry %0d", m_gset, m_recall, m_nack,
             m_grant, m_retry);
    begin
      int m [17];
      m = '{m_hop_lat, m_hub_uni, m_onet_bcast, m_bnet0, m_bnet1, m_fc_stall, m_multiflit,
            m_memrd, m_memwb, m_fwd, m_uinv, m_binv, m_gset, m_recall, m_nack, m_grant, m_retry};
      for (int i = 0; i < 17; i++) begin
        checks++;
        if (m[i] == 0) begin failures++; $display("FAIL mechanism %0d never happened", i); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
