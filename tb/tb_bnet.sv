// tb_bnet: self-checking test of one BNet (4 inputs, 4 tiles).
//
// The testbench plays the Hub's sender FIFOs (queues) and the tiles. A first single flit checks
// the 2-cycle latency from FIFO head to the broadcast bus. Then random 1-3 flit packets are
// queued on all inputs while the tiles randomly withhold ready; every flit must appear on the
// bus exactly once, in order per input, packets whole, and the bus must hold a flit unchanged
// while any tile is not ready.
module tb_bnet;
  import atac_pkg::*;
  localparam int NIN = 4, NT = 4;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic  in_valid [NIN];
  flit_t in_flit  [NIN];
  logic  in_pop   [NIN];
  logic  bus_valid;
  flit_t bus_flit;
  logic  tile_ready [NT];

  bnet #(.NIN(NIN), .NT(NT)) dut (.*);

  int checks = 0, failures = 0, cycle = 0;
  flit_t q [NIN][$];
  flit_t expq [NIN][$];
  int cur = -1, delivered = 0, total = 0;
  logic  held_v = 0;
  flit_t held_f;

  always_comb
    for (int i = 0; i < NIN; i++) begin
      in_valid[i] = q[i].size() > 0;
      in_flit[i]  = (q[i].size() > 0) ? q[i][0] : '0;
    end

  always @(posedge clk) begin
    logic all_r;
    cycle++;
    all_r = 1;
    for (int t = 0; t < NT; t++) all_r &= tile_ready[t];
    for (int i = 0; i < NIN; i++) if (in_pop[i]) void'(q[i].pop_front());
    if (rst_n && held_v) begin
      checks++;
      if (!bus_valid || bus_flit !== held_f) begin
        failures++; $display("FAIL bus changed while stalled");
      end
    end
    held_v = 0;
    if (rst_n && bus_valid) begin
      if (!all_r) begin
        held_v = 1; held_f = bus_flit;
      end else begin
        int i;
        i = int'(bus_flit.data[7:0]);
        checks++;
        delivered++;
        if (i >= NIN || expq[i].size() == 0 || expq[i][0] !== bus_flit) begin
          failures++; $display("FAIL unexpected or out-of-order flit from %0d", i);
        end else void'(expq[i].pop_front());
        if (cur >= 0 && cur != i) begin
          failures++; $display("FAIL packets interleaved");
        end
        cur = bus_flit.meta.tail ? -1 : i;
      end
    end
  end

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic flit_t mk(int i, int seq, logic hd, logic tl);
    flit_t f;
    f = '0;
    f.meta.head = hd; f.meta.tail = tl; f.meta.mtype = MSG_RAW;
    f.data[7:0] = 8'(i); f.data[39:8] = 32'(seq);
    return f;
  endfunction

  initial begin
    int t0;
    for (int t = 0; t < NT; t++) tile_ready[t] = 1;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    // latency of one flit
    begin
      flit_t f;
      f = mk(2, total, 1, 1);
      total++;
      expq[2].push_back(f);
      q[2].push_back(f);
      t0 = cycle;
      while (!bus_valid) @(negedge clk);
      checks++;
      if (cycle - t0 != 2) begin
        failures++; $display("FAIL BNet latency %0d, want 2", cycle - t0);
      end
      @(negedge clk);
    end
    for (int p = 0; p < 60; p++) begin
      int i, len;
      i = $urandom_range(0, NIN - 1);
      len = $urandom_range(1, 3);
      for (int k = 0; k < len; k++) begin
        flit_t f;
        f = mk(i, total, k == 0, k == len - 1);
        total++;
        q[i].push_back(f);
        expq[i].push_back(f);
      end
    end
    repeat (600) begin
      @(negedge clk);
      for (int t = 0; t < NT; t++) tile_ready[t] = ($urandom_range(0, 4) != 0);
    end
    for (int t = 0; t < NT; t++) tile_ready[t] = 1;
    repeat (20) @(negedge clk);
    checks++;
    if (delivered != total) begin
      failures++; $display("FAIL delivered %0d of %0d", delivered, total);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
