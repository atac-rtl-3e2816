// tb_tile_ni: self-checking test of the tile network interface (core 2.6).
//
// Injection: packets from the core, directory and memory-controller ports, offered together,
// must all reach the router's local input, each packet whole. Ejection: messages from the
// router's local output and from both BNet buses must reach the agent that handles their type
// (requests/evictions/acks to the directory, memory messages to the controller, the rest to
// the core). BNet flits for another core of the cluster must be dropped, broadcasts kept.
module tb_tile_ni;
  import atac_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  core_id_t my_id = {6'd2, 4'd6};
  logic  src_valid [3];
  flit_t src_flit  [3];
  logic  src_ready [3];
  logic  dst_valid [3];
  flit_t dst_flit  [3];
  logic  dst_ready [3];
  logic  inj_valid, inj_ready, ej_valid, ej_ready;
  flit_t inj_flit, ej_flit;
  logic  bnet_valid [2];
  flit_t bnet_flit  [2];
  logic  bnet_ready [2];

  tile_ni dut (.*);

  int checks = 0, failures = 0;

  // what reached each agent and the router
  flit_t got [3][$];
  flit_t injected [$];
  always @(posedge clk) if (rst_n) begin
    for (int a = 0; a < 3; a++) if (dst_valid[a] && dst_ready[a]) got[a].push_back(dst_flit[a]);
    if (inj_valid && inj_ready) injected.push_back(inj_flit);
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic flit_t mk(msg_t t, core_id_t dst, logic bc, int tag, logic hd, logic tl);
    flit_t f;
    f = '0;
    f.meta.head = hd; f.meta.tail = tl; f.meta.bcast = bc; f.meta.dst = dst;
    f.meta.src = {6'd9, 4'd9}; f.meta.mtype = t; f.data[31:0] = 32'(tag);
    return f;
  endfunction

  initial begin
    for (int a = 0; a < 3; a++) begin src_valid[a] = 0; src_flit[a] = '0; dst_ready[a] = 1; end
    inj_ready = 1; ej_valid = 0; ej_flit = '0;
    for (int b = 0; b < 2; b++) begin bnet_valid[b] = 0; bnet_flit[b] = '0; end
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);

    // injection: three 2-flit packets offered at once
    fork
      for (int a = 0; a < 3; a++) begin
        automatic int aa = a;
        fork
          for (int k = 0; k < 2; k++) begin
            @(negedge clk);
            src_valid[aa] = 1; src_flit[aa] = mk(MSG_RAW, '0, 0, aa * 10 + k, k == 0, k == 1);
            #1;
            while (!src_ready[aa]) begin @(negedge clk); #1; end
            @(negedge clk);
            src_valid[aa] = 0;
          end
        join_none
      end
    join
    repeat (12) @(negedge clk);
    checks++;
    if (injected.size() != 6) begin failures++; $display("FAIL injected %0d", injected.size()); end
    else for (int p = 0; p < 3; p++) begin
      checks++;
      if (injected[2*p+1].data[31:0] != injected[2*p].data[31:0] + 1) begin
        failures++; $display("FAIL injected packet split");
      end
    end

    // ejection from the router, by type
    @(negedge clk);
    ej_valid = 1; ej_flit = mk(MSG_REQ_SH, my_id, 0, 100, 1, 1);
    @(negedge clk);
    ej_flit = mk(MSG_MEM_RD, my_id, 0, 101, 1, 1);
    @(negedge clk);
    ej_flit = mk(MSG_INV, my_id, 0, 102, 1, 1);
    @(negedge clk);
    ej_flit = mk(MSG_ACK, my_id, 0, 103, 1, 1);
    @(negedge clk);
    ej_valid = 0;
    // BNet: one for us, one for a neighbour, one broadcast
    bnet_valid[0] = 1; bnet_flit[0] = mk(MSG_RAW, my_id, 0, 200, 1, 1);
    bnet_valid[1] = 1; bnet_flit[1] = mk(MSG_RAW, {6'd2, 4'd7}, 0, 201, 1, 1);
    @(negedge clk);
    bnet_valid[1] = 1; bnet_flit[1] = mk(MSG_INV, {6'd4, 4'd4}, 1, 202, 1, 1);
    bnet_valid[0] = 0;
    @(negedge clk);
    bnet_valid[1] = 0;
    repeat (6) @(negedge clk);
    checks++;
    if (got[1].size() != 2 || got[1][0].data[31:0] != 100 || got[1][1].data[31:0] != 103) begin
      failures++; $display("FAIL directory got %0d", got[1].size());
    end
    checks++;
    if (got[2].size() != 1 || got[2][0].data[31:0] != 101) begin
      failures++; $display("FAIL memory controller got %0d", got[2].size());
    end
    checks++;
    if (got[0].size() != 3) begin
      failures++; $display("FAIL core got %0d", got[0].size());
    end else begin
      int seen;
      seen = 0;
      for (int i = 0; i < 3; i++) begin
        if (got[0][i].data[31:0] == 201) begin failures++; $display("FAIL neighbour's flit kept"); end
        seen += int'(got[0][i].data[31:0]);
      end
      checks++;
      if (seen != 102 + 200 + 202) begin failures++; $display("FAIL core flits"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
