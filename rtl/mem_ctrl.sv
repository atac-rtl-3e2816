// mem_ctrl: on-chip memory controller, one per cluster in place of a core.
//
// Turns memory requests that arrive over the network into transactions on an external memory
// bus, and sends the replies back over the network. A MEM_RD message (sent by a line's home
// directory when no cache can supply the line) becomes a bus read; the line is then sent
// directly to the requesting core as a two-flit DATA packet (header with the address, then the
// 128-bit line). The document has the controller also acknowledge the home directory; here
// the requester acknowledges once the line has arrived instead, so the home never moves on
// (and forwards or invalidates) while the line is still in flight to the requester. A two-flit
// MEM_WB packet (a write-back from a cache) becomes a bus write and needs no reply.
//
// One request is handled at a time, in arrival order. Memory bus: mem_req_* is a valid/ready
// request (we=1 write); a read answers with one mem_resp_valid pulse carrying the line, any
// number of cycles later. Memory controllers on the chip that answer the requester follow the
// document; the bus, the one-at-a-time handling and the packet formats are choices of this
// design.
module mem_ctrl
  import atac_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  core_id_t          my_id,
  // network -> controller
  input  logic              in_valid,
  input  flit_t             in_flit,
  output logic              in_ready,
  // controller -> network
  output logic              out_valid,
  output flit_t             out_flit,
  input  logic              out_ready,
  // external memory bus
  output logic              mem_req_valid,
  input  logic              mem_req_ready,
  output logic              mem_req_we,
  output addr_t             mem_req_addr,
  output logic [DATA_W-1:0] mem_req_wdata,
  input  logic              mem_resp_valid,
  input  logic [DATA_W-1:0] mem_resp_rdata
);
  typedef enum logic [2:0] {
    S_IDLE, S_WB_BODY, S_WRITE, S_READ, S_WAIT, S_DHEAD, S_DBODY
  } st_t;

  st_t               st;
  coh_t              c;
  logic [DATA_W-1:0] line;

  assign in_ready = (st == S_IDLE) || (st == S_WB_BODY);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= S_IDLE; c <= '0; line <= '0;
    end else begin
      unique case (st)
        S_IDLE: if (in_valid) begin
          c <= coh_t'(in_flit.data);
          if (in_flit.meta.mtype == MSG_MEM_RD)      st <= S_READ;
          else if (in_flit.meta.mtype == MSG_MEM_WB) st <= in_flit.meta.tail ? S_IDLE : S_WB_BODY;
        end
        S_WB_BODY: if (in_valid) begin
          line <= in_flit.data;
          st   <= in_flit.meta.tail ? S_WRITE : S_WB_BODY;
        end
        S_WRITE: if (mem_req_ready) st <= S_IDLE;
        S_READ:  if (mem_req_ready) st <= S_WAIT;
        S_WAIT:  if (mem_resp_valid) begin line <= mem_resp_rdata; st <= S_DHEAD; end
        S_DHEAD: if (out_ready) st <= S_DBODY;
        S_DBODY: if (out_ready) st <= S_IDLE;
        default: st <= S_IDLE;
      endcase
    end
  end

  assign mem_req_valid = (st == S_WRITE) || (st == S_READ);
  assign mem_req_we    = (st == S_WRITE);
  assign mem_req_addr  = {c.addr[ADDR_W-1:LINE_OFS_W], {LINE_OFS_W{1'b0}}};
  assign mem_req_wdata = line;

  always_comb begin
    coh_t r;
    r = c;
    r.nack = 1'b0;
    out_valid = (st == S_DHEAD) || (st == S_DBODY);
    out_flit  = '0;
    out_flit.meta.src   = my_id;
    out_flit.meta.bcast = 1'b0;
    unique case (st)
      S_DHEAD: begin
        out_flit.meta.head = 1'b1; out_flit.meta.tail = 1'b0;
        out_flit.meta.dst  = c.req; out_flit.meta.mtype = MSG_DATA;
        out_flit.data      = DATA_W'(r);
      end
      S_DBODY: begin
        out_flit.meta.head = 1'b0; out_flit.meta.tail = 1'b1;
        out_flit.meta.dst  = c.req; out_flit.meta.mtype = MSG_DATA;
        out_flit.data      = line;
      end
      default: ;
    endcase
  end
endmodule
