// rr_arb: round-robin arbiter that keeps a grant for the whole of a packet.
//
// Used wherever several packet streams merge into one: router output ports, the Hub's send
// port, the BNet's C/2 x 1 router and the tile's injection and ejection ports. When unlocked,
// the requester after the last winner (in circular order) wins. When the granted request is
// accepted (adv) on a flit that is not a tail, the arbiter locks onto that requester until its
// tail flit is accepted, so the flits of one packet are never interleaved with another's.
// gnt is combinational from req and the registered state; the state changes only on adv.
module rr_arb #(
  parameter int unsigned N = 4
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] req,
  input  logic         adv,      // the granted flit is accepted this cycle
  input  logic         tail,     // ... and it is the last flit of its packet
  output logic [N-1:0] gnt,
  output logic [$clog2(N > 1 ? N : 2)-1:0] gnt_idx,
  output logic         any
);
  localparam int unsigned IW = $clog2(N > 1 ? N : 2);

  logic [IW-1:0] last, lock_idx;
  logic          locked;

  int unsigned i;

  always_comb begin
    i       = 0;
    gnt     = '0;
    gnt_idx = '0;
    any     = 1'b0;
    if (locked) begin
      gnt_idx = lock_idx;
      any     = req[lock_idx];
      gnt[lock_idx] = req[lock_idx];
    end else begin
      for (int unsigned k = 1; k <= N; k++) begin
        i = (32'(last) + k) % N;
        if (!any && req[i]) begin
          any     = 1'b1;
          gnt_idx = IW'(i);
        end
      end
      if (any) gnt[gnt_idx] = 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      last <= IW'(N-1); lock_idx <= '0; locked <= 1'b0;
    end else if (adv && any) begin
      last     <= gnt_idx;
      lock_idx <= gnt_idx;
      locked   <= !tail;
    end
  end
endmodule
