// tb_onet: self-checking test of the ONet model with 8 Hubs.
//
// Every Hub sends random flits (or idles) on its lane every cycle and drives a random
// flow-control bit. The test checks that each flit, and each flow-control bit, appears on the
// sender's lane exactly 3 cycles later, for every sender at once (no arbitration, no loss).
module tb_onet;
  import atac_pkg::*;
  localparam int NH = 8;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic  tx_valid [NH];
  flit_t tx_flit  [NH];
  logic  fc_tx    [NH];
  logic  rx_valid [NH];
  flit_t rx_flit  [NH];
  logic  fc_rx    [NH];

  onet #(.NHUB(NH)) dut (.*);

  int checks = 0, failures = 0;
  logic  hv [4][NH];
  flit_t hf [4][NH];
  logic  hc [4][NH];

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int sent_flits = 0;
    for (int h = 0; h < NH; h++) begin tx_valid[h] = 0; tx_flit[h] = '0; fc_tx[h] = 0; end
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int c = 0; c < 300; c++) begin
      automatic int slot = c % 4, old = (c + 1) % 4;
      @(negedge clk);
      // compare what arrives now with what was sent 3 edges ago
      if (c >= 3) begin
        for (int h = 0; h < NH; h++) begin
          checks++;
          if (rx_valid[h] !== hv[old][h] || (hv[old][h] && rx_flit[h] !== hf[old][h]) ||
              fc_rx[h] !== hc[old][h]) begin
            failures++;
            $display("FAIL cycle %0d lane %0d", c, h);
          end
        end
      end
      for (int h = 0; h < NH; h++) begin
        hv[slot][h] = 1'($urandom_range(0, 1));
        hf[slot][h] = '0;
        for (int w = 0; w < 4; w++) hf[slot][h].data[w*32 +: 32] = $urandom;
        hf[slot][h].meta.dst = core_id_t'($urandom);
        hf[slot][h].meta.src = core_id_t'($urandom);
        hc[slot][h] = 1'($urandom_range(0, 1));
        tx_valid[h] = hv[slot][h]; tx_flit[h] = hf[slot][h]; fc_tx[h] = hc[slot][h];
        if (hv[slot][h]) sent_flits++;
      end
    end
    checks++;
    if (sent_flits == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
