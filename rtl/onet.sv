// onet: behavioural model of the all-optical ONet that links the cluster Hubs.
//
// This is a model, not synthesizable hardware of the real part: the real ONet is photonic (an
// off-chip laser, data waveguides that loop past every Hub, ring filters, modulators and
// photodetectors). Its logic function is captured here. Each Hub owns one wavelength on every
// waveguide (wavelength division multiplexing), so all Hubs may send in the same cycle without
// arbitration, and whatever a Hub sends reaches every Hub: every transmission is a broadcast
// and receivers filter. The model therefore delivers the flit sent by Hub s, LAT cycles later,
// on lane s of a receive array that every Hub sees. The metadata lanes (framing, destination,
// message type) travel with the 128 data lanes.
//
// A second path models the flow-control waveguide: each Hub drives one bit (its wavelength)
// that all other Hubs see LAT cycles later.
//
// Timing: LAT = 3 cycles (two for E/O and O/E conversion, one for traversal), as the document
// gives for an ONet hop; 64 Hubs and 128 data waveguides follow the document too. The sender
// itself also sees its own flit on its lane (the loop comes back round); whether a Hub listens
// to its own wavelength is decided in the Hub.
module onet
  import atac_pkg::*;
#(
  parameter int unsigned NHUB = 64,
  parameter int unsigned LAT  = 3
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  tx_valid [NHUB],
  input  flit_t tx_flit  [NHUB],
  input  logic  fc_tx    [NHUB],
  output logic  rx_valid [NHUB],
  output flit_t rx_flit  [NHUB],
  output logic  fc_rx    [NHUB]
);
  logic  v_q  [LAT][NHUB];
  flit_t f_q  [LAT][NHUB];
  logic  fc_q [LAT][NHUB];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int d = 0; d < LAT; d++)
        for (int h = 0; h < NHUB; h++) begin
          v_q[d][h] <= 1'b0; fc_q[d][h] <= 1'b0;
        end
    end else begin
      for (int h = 0; h < NHUB; h++) begin
        v_q[0][h]  <= tx_valid[h];
        fc_q[0][h] <= fc_tx[h];
      end
      for (int d = 1; d < LAT; d++)
        for (int h = 0; h < NHUB; h++) begin
          v_q[d][h]  <= v_q[d-1][h];
          fc_q[d][h] <= fc_q[d-1][h];
        end
    end
  end

  always_ff @(posedge clk) begin
    for (int h = 0; h < NHUB; h++) f_q[0][h] <= tx_flit[h];
    for (int d = 1; d < LAT; d++)
      for (int h = 0; h < NHUB; h++) f_q[d][h] <= f_q[d-1][h];
  end

  always_comb
    for (int h = 0; h < NHUB; h++) begin
      rx_valid[h] = v_q[LAT-1][h];
      rx_flit[h]  = f_q[LAT-1][h];
      fc_rx[h]    = fc_q[LAT-1][h];
    end
endmodule
