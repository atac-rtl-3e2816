// tb_emesh_router: self-checking test of one ENet router.
//
// The router under test is tile 5 of cluster 3 (a Hub-attached router). First, directed
// single flits check the X-then-Y routing to each port, routing of broadcasts and
// other-cluster packets to the Hub port (or towards the other Hub router for the east half)
// and the 2-cycle hop latency. Then all five inputs send random 1-3 flit packets while the
// outputs apply random back-pressure; a reference model of the routing predicts each flit's
// output, and the test checks that every flit comes out once, on the right port, in order per
// input, and that the flits of a packet are never interleaved with another packet's.
module tb_emesh_router;
  import atac_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  core_id_t my_id = {6'd3, 4'd5};
  logic  in_valid [5];
  flit_t in_flit  [5];
  logic  in_ready [5];
  logic  out_valid[6];
  flit_t out_flit [6];
  logic  out_ready[6];

  emesh_router dut (.*);

  int checks = 0, failures = 0;
  int cycle = 0;
  always @(posedge clk) cycle++;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int ref_port(flit_t f);
    int hx, hy, tx, ty, t;
    hx = 1; hy = 1;
    if (!f.meta.bcast && f.meta.dst[9:4] == 6'd3) t = int'(f.meta.dst[3:0]);
    else t = (f.meta.src[1] == 1'b0) ? 5 : 10;
    tx = t % 4; ty = t / 4;
    if (tx > hx) return 1;
    if (tx < hx) return 3;
    if (ty > hy) return 2;
    if (ty < hy) return 0;
    return (f.meta.bcast || f.meta.dst[9:4] != 6'd3) ? 5 : 4;
  endfunction

  // expected flits per (output, input)
  flit_t exp_q [6][5][$];
  int    pkt_from [6];   // input whose packet is in progress on each output, -1 none
  int    received = 0, sent = 0;

  always @(posedge clk) begin
    for (int o = 0; o < 6; o++) begin
      if (rst_n && out_valid[o] && out_ready[o]) begin
        int i;
        i = int'(out_flit[o].data[7:0]);
        checks++;
        received++;
        if (i > 4 || exp_q[o][i].size() == 0) begin
          failures++;
          $display("FAIL unexpected flit on port %0d from input %0d", o, i);
        end else if (exp_q[o][i][0] != out_flit[o]) begin
          failures++;
          $display("FAIL out of order on port %0d from input %0d: got %0d want %0d t=%0d", o, i, out_flit[o].data[39:8], exp_q[o][i][0].data[39:8], cycle);
        end else begin
          void'(exp_q[o][i].pop_front());
        end
        if (pkt_from[o] >= 0 && pkt_from[o] != i) begin
          failures++;
          $display("FAIL packet interleaving on port %0d", o);
        end
        pkt_from[o] = out_flit[o].meta.tail ? -1 : i;
      end
    end
  end

  function automatic flit_t mk(int in, int seq, core_id_t dst, core_id_t src, logic bc,
                               logic hd, logic tl);
    flit_t f;
    f = '0;
    f.meta.head = hd; f.meta.tail = tl; f.meta.bcast = bc;
    f.meta.dst = dst; f.meta.src = src; f.meta.mtype = MSG_RAW;
    f.data[7:0] = 8'(in); f.data[39:8] = 32'(seq);
    return f;
  endfunction

  // directed: one flit, check port and latency
  task automatic one(int in, core_id_t dst, core_id_t src, logic bc, int want);
    flit_t f;
    int t0, got;
    f = mk(in, 1000 + sent, dst, src, bc, 1'b1, 1'b1);
    exp_q[want][in].push_back(f);
    sent++;
    @(negedge clk);
    in_valid[in] = 1'b1; in_flit[in] = f;
    t0 = cycle;
    @(negedge clk);
    in_valid[in] = 1'b0;
    got = -1;
    for (int k = 0; k < 10 && got < 0; k++) begin
      for (int o = 0; o < 6; o++) if (out_valid[o]) got = o;
      if (got < 0) @(negedge clk);
    end
    checks++;
    if (got != want) begin
      failures++; $display("FAIL dst %h bc %0d: port %0d, want %0d", dst, bc, got, want);
    end
    checks++;
    if (cycle - t0 != 2) begin
      failures++; $display("FAIL hop latency %0d cycles, want 2", cycle - t0);
    end
    @(negedge clk);
  endtask

  initial begin
    for (int i = 0; i < 5; i++) begin in_valid[i] = 0; in_flit[i] = '0; end
    for (int o = 0; o < 6; o++) begin out_ready[o] = 1; pkt_from[o] = -1; end
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    one(3, {6'd3, 4'd7},  {6'd3, 4'd4}, 1'b0, 1);   // east
    one(0, {6'd3, 4'd13}, {6'd3, 4'd1}, 1'b0, 2);   // south
    one(1, {6'd3, 4'd4},  {6'd3, 4'd6}, 1'b0, 3);   // west
    one(2, {6'd3, 4'd1},  {6'd3, 4'd9}, 1'b0, 0);   // north
    one(1, {6'd3, 4'd5},  {6'd3, 4'd6}, 1'b0, 4);   // local
    one(3, {6'd9, 4'd2},  {6'd3, 4'd4}, 1'b0, 5);   // other cluster, west half: hub port
    one(4, {6'd9, 4'd2},  {6'd3, 4'd6}, 1'b0, 1);   // other cluster, east half: towards tile 10
    one(0, {6'd3, 4'd2},  {6'd3, 4'd1}, 1'b1, 5);   // broadcast: hub port

    // random traffic with back-pressure
    fork
      for (int in = 0; in < 5; in++) begin
        automatic int ii = in;
        fork
          begin
            for (int p = 0; p < 40; p++) begin
              automatic int len;
              automatic core_id_t dst, src;
              automatic logic bc;
              len = 1 + $urandom_range(0, 2);
              dst = {($urandom_range(0, 3) == 0) ? 6'd7 : 6'd3, 4'($urandom_range(0, 15))};
              src = {6'd3, 4'($urandom_range(0, 15))};
              bc  = ($urandom_range(0, 7) == 0);
              for (int k = 0; k < len; k++) begin
                automatic flit_t f;
                f = mk(ii, sent, dst, src, bc, k == 0, k == len - 1);
                sent++;
                exp_q[ref_port(f)][ii].push_back(f);
                @(negedge clk);
                in_valid[ii] = 1'b1; in_flit[ii] = f;
                while (!in_ready[ii]) @(negedge clk);
                @(negedge clk);
                in_valid[ii] = 1'b0;
              end
            end
          end
        join_none
      end
      begin
        repeat (2000) begin
          @(negedge clk);
          for (int o = 0; o < 6; o++) out_ready[o] = ($urandom_range(0, 3) != 0);
        end
        for (int o = 0; o < 6; o++) out_ready[o] = 1'b1;
      end
    join
    repeat (50) @(negedge clk);
    checks++;
    if (received != sent) begin
      failures++; $display("FAIL received %0d of %0d flits", received, sent);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
