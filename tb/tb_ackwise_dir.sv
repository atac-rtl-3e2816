// tb_ackwise_dir: self-checking test of an ACKwise_4 directory slice (home core 1.2, 4 sets).
//
// The testbench plays the rest of the chip: a model of which cores hold each line, caches that
// answer forwards and invalidations (a unicast invalidation is always acknowledged, a broadcast
// one only by cores that hold the line, a forward to a core that no longer holds the line is
// nacked) and requesters that acknowledge a line once it has arrived. Acknowledgements come back after
// random delays. Scenarios, each checked against the messages the protocol calls for:
//   1. six cores read a line: memory read first, then forwards to the first sharer; the fifth
//      sharer sets the global bit;
//   2. a seventh core writes it: one forward, one broadcast invalidation that excludes the
//      requester and the supplier, and the directory waits for all six acknowledgements;
//   3. a read forwards to the new owner; an upgrade by that reader sends one unicast
//      invalidation and a grant; an eviction empties the entry, so the next read goes to memory;
//   4. a request to another line of the same set recalls the first line;
//   5. a forward that crosses an eviction is nacked and the line is fetched from memory;
//   6. an eviction that crosses a broadcast invalidation lowers the acknowledgements awaited.
module tb_ackwise_dir;
  import atac_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  core_id_t my_id = {6'd1, 4'd2};
  logic  in_valid, in_ready, out_valid, out_ready;
  flit_t in_flit, out_flit;
  logic  ev_bcast_inv, ev_g_set, ev_recall, ev_nack;

  ackwise_dir #(.K(4), .SETS(4)) dut (.*);

  int checks = 0, failures = 0, cycle = 0;
  always @(posedge clk) cycle++;

  initial begin
    #400000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic addr_t line(int tag, int idx);
    return addr_t'((tag << 16) | (idx << 14) | (int'(my_id) << 4));
  endfunction

  // ------------------------------------------------------------------ chip model
  bit [63:0] holds [addr_t];       // line -> cores holding it (test cores are below 64)
  flit_t inq [$];                  // messages waiting to enter the directory
  int    due [$];                  // cycle at which each may enter
  int    n_mem, n_fwd, n_uinv, n_binv, n_grant, n_acks_sent;
  int    last_ack_cycle;
  int    g_sets = 0, recalls = 0, nacks = 0;

  always @(posedge clk) begin
    if (ev_g_set) g_sets++;
    if (ev_recall) recalls++;
    if (ev_nack) nacks++;
  end

  function automatic flit_t msg(msg_t t, core_id_t src, addr_t a, core_id_t req,
                                logic upg, logic nk);
    flit_t f;
    coh_t  c;
    c = '0; c.addr = a; c.req = req; c.home = my_id; c.upgrade = upg; c.nack = nk;
    f = '0;
    f.meta.head = 1; f.meta.tail = 1; f.meta.dst = my_id; f.meta.src = src;
    f.meta.mtype = t; f.data = DATA_W'(c);
    return f;
  endfunction

  task automatic post(flit_t f, int delay);
    inq.push_back(f);
    due.push_back(cycle + delay);
  endtask

  task automatic ack(core_id_t from, addr_t a, logic nk);
    post(msg(MSG_ACK, from, a, '0, 1'b0, nk), $urandom_range(1, 8));
    n_acks_sent++;
  endtask

  // feed the directory in order
  initial begin
    in_valid = 0; in_flit = '0;
    forever begin
      @(negedge clk);
      if (inq.size() > 0 && due[0] <= cycle) begin
        in_valid = 1; in_flit = inq[0];
        #1;
        if (in_ready) begin
          if (in_flit.meta.mtype == MSG_ACK) last_ack_cycle = cycle;
          @(posedge clk);
          void'(inq.pop_front()); void'(due.pop_front());
          #1 in_valid = 0;
        end
      end else in_valid = 0;
    end
  end

  // answer what the directory sends
  always @(posedge clk) begin
    if (rst_n && out_valid && out_ready) begin
      coh_t c;
      int   d;
      c = coh_t'(out_flit.data);
      d = int'(out_flit.meta.dst);
      unique case (out_flit.meta.mtype)
        MSG_MEM_RD: begin
          n_mem++;
          if (out_flit.meta.dst != mc_of(c.addr)) begin
            failures++; $display("FAIL memory read sent to %h", out_flit.meta.dst);
          end
          holds[c.addr][c.req[5:0]] = 1'b1;
          ack(mc_of(c.addr), c.addr, 1'b0);
        end
        MSG_FWD_SH, MSG_FWD_EX: begin
          n_fwd++;
          if (holds.exists(c.addr) && holds[c.addr][d[5:0]]) begin
            if (out_flit.meta.mtype == MSG_FWD_EX) holds[c.addr][d[5:0]] = 1'b0;
            holds[c.addr][c.req[5:0]] = 1'b1;
            ack(core_id_t'(d), c.addr, 1'b0);
          end else ack(core_id_t'(d), c.addr, 1'b1);
        end
        MSG_INV: begin
          if (out_flit.meta.bcast) begin
            n_binv++;
            for (int h = 0; h < 64; h++) begin
              // the requester never held a shared copy in these scenarios, so it ignores the
              // broadcast of its own request
              if (holds.exists(c.addr) && holds[c.addr][h] && h != int'(c.req) &&
                  !(c.exc1_v && h == int'(c.exc1)) && !(c.exc2_v && h == int'(c.exc2))) begin
                holds[c.addr][h] = 1'b0;
                ack(core_id_t'(h), c.addr, 1'b0);
              end
            end
          end else begin
            n_uinv++;
            if (holds.exists(c.addr)) holds[c.addr][d[5:0]] = 1'b0;
            ack(core_id_t'(d), c.addr, 1'b0);
          end
        end
        MSG_GRANT: n_grant++;
        default: begin failures++; $display("FAIL unexpected message type"); end
      endcase
    end
  end

  function automatic bit idle();
    return (dut.st == 0) && inq.size() == 0;
  endfunction

  task automatic clear_counts();
    n_mem = 0; n_fwd = 0; n_uinv = 0; n_binv = 0; n_grant = 0; n_acks_sent = 0;
  endtask

  // issue one request and wait until it is finished
  task automatic request(msg_t t, int core, addr_t a, logic upg);
    post(msg(t, core_id_t'(core), a, core_id_t'(core), upg, 1'b0), 0);
    repeat (3) @(negedge clk);
    while (!idle()) @(negedge clk);
    @(negedge clk);
  endtask

  task automatic expect_counts(string what, int mem, int fwd, int uinv, int binv, int grant);
    checks++;
    if (n_mem != mem || n_fwd != fwd || n_uinv != uinv || n_binv != binv || n_grant != grant) begin
      failures++;
      $display("FAIL %s: mem %0d fwd %0d uinv %0d binv %0d grant %0d", what,
               n_mem, n_fwd, n_uinv, n_binv, n_grant);
    end
  endtask

  addr_t A, B, C, D;

  initial begin
    out_ready = 1;
    A = line(5, 1); B = line(6, 1); C = line(7, 2); D = line(8, 3);
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);

    // 1. six readers
    clear_counts();
    for (int k = 1; k <= 6; k++) request(MSG_REQ_SH, 16 + k, A, 1'b0);
    expect_counts("six readers", 1, 5, 0, 0, 0);
    checks++;
    if (g_sets != 1) begin failures++; $display("FAIL global bit set %0d times", g_sets); end

    // 2. a writer: forward + broadcast, wait for every sharer
    clear_counts();
    begin
      int t_done;
      post(msg(MSG_REQ_EX, core_id_t'(40), A, core_id_t'(40), 1'b0, 1'b0), 0);
      repeat (3) @(negedge clk);
      while (!idle()) @(negedge clk);
      t_done = cycle;
      expect_counts("writer", 0, 1, 0, 1, 0);
      checks++;
      if (n_acks_sent != 6) begin failures++; $display("FAIL %0d acks, want 6", n_acks_sent); end
      checks++;
      if (t_done <= last_ack_cycle) begin failures++; $display("FAIL finished before last ack"); end
      checks++;
      if (holds[A] != (64'd1 << 40)) begin
        failures++; $display("FAIL holders after write: %h", holds[A]);
      end
    end

    // 3. read from new owner, upgrade, evict
    clear_counts();
    request(MSG_REQ_SH, 18, A, 1'b0);
    expect_counts("read after write", 0, 1, 0, 0, 0);
    clear_counts();
    request(MSG_REQ_EX, 18, A, 1'b1);
    expect_counts("upgrade", 0, 0, 1, 0, 1);
    checks++;
    if (holds[A][40]) begin failures++; $display("FAIL old owner kept the line"); end
    holds[A][18] = 1'b0;
    post(msg(MSG_EVICT, core_id_t'(18), A, core_id_t'(18), 1'b0, 1'b0), 0);
    repeat (4) @(negedge clk);
    clear_counts();
    request(MSG_REQ_SH, 19, A, 1'b0);
    expect_counts("read after eviction", 1, 0, 0, 0, 0);

    // 4. same set, other line: recall A (held by 19) first
    clear_counts();
    request(MSG_REQ_SH, 20, B, 1'b0);
    expect_counts("recall", 1, 0, 1, 0, 0);
    checks++;
    if (recalls != 1 || holds[A] != 0) begin failures++; $display("FAIL recall"); end

    // 5. forward crosses an eviction
    request(MSG_REQ_SH, 21, C, 1'b0);
    clear_counts();
    holds[C][21] = 1'b0;                           // 21 drops C, its EVICT is still on the way
    post(msg(MSG_REQ_SH, core_id_t'(22), C, core_id_t'(22), 1'b0, 1'b0), 0);
    post(msg(MSG_EVICT, core_id_t'(21), C, core_id_t'(21), 1'b0, 1'b0), 6);
    repeat (3) @(negedge clk);
    while (!idle()) @(negedge clk);
    expect_counts("nacked forward", 1, 1, 0, 0, 0);
    checks++;
    if (nacks != 1) begin failures++; $display("FAIL nack not seen"); end
    clear_counts();
    request(MSG_REQ_SH, 23, C, 1'b0);                    // 22 is now the only sharer
    expect_counts("after nack", 0, 1, 0, 0, 0);

    // 6. eviction crosses a broadcast invalidation
    for (int k = 1; k <= 6; k++) request(MSG_REQ_SH, 48 + k, D, 1'b0);
    holds[D][52] = 1'b0;                           // 52 drops D quietly for now
    clear_counts();
    post(msg(MSG_REQ_EX, core_id_t'(60), D, core_id_t'(60), 1'b0, 1'b0), 0);
    post(msg(MSG_EVICT, core_id_t'(52), D, core_id_t'(52), 1'b0, 1'b0), 12);
    repeat (3) @(negedge clk);
    while (!idle()) @(negedge clk);
    expect_counts("eviction across broadcast", 0, 1, 0, 1, 0);
    checks++;
    if (n_acks_sent != 5) begin failures++; $display("FAIL %0d acks", n_acks_sent); end
    // the entry is consistent: a read now forwards to 60
    clear_counts();
    request(MSG_REQ_SH, 61, D, 1'b0);
    expect_counts("read after broadcast", 0, 1, 0, 0, 0);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
