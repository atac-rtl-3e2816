// ackwise_dir: one slice of the distributed ACKwise_k coherence directory and its controller.
//
// Every core is home to a fixed set of lines (home = low 10 bits of the line address) and keeps
// their directory entries in a direct-mapped directory cache of SETS entries. An entry holds the
// MOESI state of the line, the global bit G and K sharer fields. While G is clear the first n
// fields hold the identities of all sharers. When a (K+1)-th sharer arrives G is set and the
// last field becomes a count of all sharers; the first K-1 fields keep K-1 known identities.
//
// Requests are handled one at a time:
//  * shared request, line invalid: MEM_RD to the memory controller, which sends the line to the
//    requester; the entry becomes E with the requester as only sharer.
//  * shared request, line valid: FWD_SH to a known sharer, which supplies the line; state
//    M->O, E->S, O and S unchanged; the requester is added (or the count is raised once G is
//    set).
//  In both cases the requester acknowledges once the line has arrived, so the entry is only
//  released when the line is really there (the document has the memory controller or the
//  supplying sharer acknowledge; moving the acknowledgement to the requester is this
//  design's choice and closes the race between the line and the next forward).
//  * exclusive request, line invalid: as above, the entry becomes M.
//  * exclusive request, line valid: FWD_EX to one known sharer (it supplies the line and
//    invalidates; the requester acknowledges the line); unicast INV to every other listed
//    sharer while G is clear, one broadcast INV to all cores while G is set (excluding only the
//    supplier). The directory waits for exactly as many acknowledgements as there are sharers
//    (only real sharers answer a broadcast; a requester that still holds a shared copy answers
//    its own broadcast without dropping the copy), then sets M, clears G and records the
//    requester. A listed sharer that asks for exclusive access while G is clear (upgrade) gets
//    no data, only a GRANT once all acknowledgements are in; with G set its copy cannot be
//    confirmed, so it is sent the line.
// Evictions are never silent: EVICT removes a sharer (or lowers the count). A forward that
// reaches a cache which does not hold the line is answered with a nack acknowledgement; the
// directory then fetches the line from memory instead. An EVICT that crosses a broadcast
// invalidation lowers the number of acknowledgements awaited, since that core will not answer.
// A request whose set holds another line first recalls that line (invalidating all its
// sharers, dirty owners write back) and then proceeds.
//
// Interface: single-flit messages in (in_valid/in_flit/in_ready) and out (valid/ready). While
// a request is in progress only ACK and EVICT messages are accepted. Entry layout, G, the
// count in the last field and the acknowledgement rule follow the document; the directory
// cache organisation, recall, nack and upgrade handling, and the explicit n field that marks
// which sharer fields are in use are choices of this design.
module ackwise_dir
  import atac_pkg::*;
#(
  parameter int unsigned K    = 4,
  parameter int unsigned SETS = 256
) (
  input  logic     clk,
  input  logic     rst_n,
  input  core_id_t my_id,
  input  logic     in_valid,
  input  flit_t    in_flit,
  output logic     in_ready,
  output logic     out_valid,
  output flit_t    out_flit,
  input  logic     out_ready,
  // event pulses, for performance counters
  output logic     ev_bcast_inv,
  output logic     ev_g_set,
  output logic     ev_recall,
  output logic     ev_nack
);
  localparam int unsigned IW    = $clog2(SETS);
  localparam int unsigned LINE_W = ADDR_W - LINE_OFS_W;
  localparam int unsigned TAG_W = LINE_W - CORE_W - IW;
  localparam int unsigned NW    = $clog2(K + 1);

  typedef struct packed {
    logic              valid;
    logic [TAG_W-1:0]  tag;
    dstate_t           st;
    logic              g;
    logic [NW-1:0]     n;       // sharer fields in use (identities)
    core_id_t [K-1:0]  sh;      // sh[K-1] is the sharer count while g is set
  } dent_t;

  typedef enum logic [3:0] {
    S_IDLE, S_START, S_SEND, S_WAIT, S_MEMRD, S_FINISH, S_GRANT
  } st_t;

  typedef enum logic [1:0] { R_SH, R_EX, R_RECALL } rk_t;
  typedef enum logic [1:0] { P_NONE, P_MEM, P_FWD } prim_t;

  dent_t mem [SETS];
  logic [SETS-1:0] vld;     // entry valid bits, kept apart so that they can be reset

  st_t      st;
  rk_t      rk;
  prim_t    prim;
  coh_t     rq;          // the request being served
  logic     rq_ex;       // it is an exclusive request
  addr_t    a_addr;      // line being worked on (request or recall victim)
  dent_t    e;           // working copy of the entry
  logic [IW-1:0] idx;
  core_id_t sup;         // supplier of the line
  logic     sup_v;
  logic     bmode;       // invalidation by broadcast
  logic     upg;         // effective upgrade
  logic [CORE_W:0] expect_n, acks;
  logic [NW:0]     sidx;
  logic            need_mem;  // a forward was nacked: fetch from memory

  // ------------------------------------------------------------------ helpers
  function automatic logic [IW-1:0] idx_of(addr_t a);
    return a[LINE_OFS_W + CORE_W +: IW];
  endfunction
  function automatic logic [TAG_W-1:0] tag_of(addr_t a);
    return a[ADDR_W-1 -: TAG_W];
  endfunction
  function automatic logic same_line(addr_t a, addr_t b);
    return a[ADDR_W-1:LINE_OFS_W] == b[ADDR_W-1:LINE_OFS_W];
  endfunction
  function automatic logic [CORE_W:0] total_of(dent_t d);
    return d.g ? {1'b0, d.sh[K-1]} : (CORE_W+1)'(d.n);
  endfunction
  function automatic logic known(dent_t d, core_id_t id);
    logic f;
    f = 1'b0;
    for (int j = 0; j < K; j++)
      if (j < int'(d.n) && d.sh[j] == id) f = 1'b1;
    return f;
  endfunction

  function automatic dent_t add_sharer(dent_t d, core_id_t id);
    dent_t r;
    r = d;
    if (!d.g) begin
      if (int'(d.n) < K) begin
        r.sh[d.n] = id;
        r.n = d.n + 1'b1;
      end else begin
        r.g = 1'b1;
        r.sh[K-1] = core_id_t'(K + 1);
        r.n = NW'(K - 1);
      end
    end else begin
      r.sh[K-1] = d.sh[K-1] + 1'b1;
      if (int'(d.n) < K - 1) begin
        r.sh[d.n] = id;
        r.n = d.n + 1'b1;
      end
    end
    return r;
  endfunction

  function automatic dent_t drop_sharer(dent_t d, core_id_t id);
    dent_t r;
    logic  found;
    r = d;
    found = 1'b0;
    if (d.valid && d.st != DS_I) begin
      for (int j = 0; j < K; j++) begin
        if (j < int'(d.n)) begin
          if (!found && d.sh[j] == id) found = 1'b1;
          if (found && j + 1 < int'(d.n)) r.sh[j] = d.sh[j+1];
        end
      end
      if (found) r.n = d.n - 1'b1;
      if (d.g) begin
        r.sh[K-1] = d.sh[K-1] - 1'b1;
        if (d.sh[K-1] <= 1) begin
          r.g = 1'b0; r.n = '0; r.st = DS_I;
        end
      end else if (found) begin
        if (d.n == 1) r.st = DS_I;
        else if (d.st == DS_O) r.st = DS_S;   // dirty owner wrote back
      end
    end
    return r;
  endfunction

  function automatic dstate_t on_share(dstate_t s);
    unique case (s)
      DS_M:    return DS_O;
      DS_E:    return DS_S;
      DS_I:    return DS_E;
      default: return s;
    endcase
  endfunction

  // ------------------------------------------------------------------ datapath
  function automatic dent_t ent(dent_t m, logic v);
    dent_t r;
    r = m;
    r.valid = v;
    return r;
  endfunction

  dent_t rd_e, ev_e, e_final;
  assign rd_e = ent(mem[idx], vld[idx]);

  logic     is_ack, is_evict, is_req, in_busy;
  coh_t     ic;
  assign ic       = coh_t'(in_flit.data);
  assign is_ack   = in_flit.meta.mtype == MSG_ACK;
  assign is_evict = in_flit.meta.mtype == MSG_EVICT;
  assign is_req   = in_flit.meta.mtype == MSG_REQ_SH || in_flit.meta.mtype == MSG_REQ_EX;
  assign in_busy  = (st == S_SEND) || (st == S_WAIT) || (st == S_MEMRD);

  always_comb begin
    in_ready = 1'b0;
    if (st == S_IDLE) in_ready = 1'b1;
    else if (in_busy && (is_ack || is_evict)) in_ready = 1'b1;
    else if (in_busy && !is_req) in_ready = 1'b1;   // stray messages are dropped
  end

  // message being offered
  logic      msg_v;
  msg_t      msg_t_;
  core_id_t  msg_dst;
  logic      msg_bc;
  coh_t      msg_c;

  always_comb begin
    int unsigned j;
    j = (sidx == 0) ? 0 : int'(sidx) - 1;
    msg_v   = 1'b0;
    msg_t_  = MSG_INV;
    msg_dst = '0;
    msg_bc  = 1'b0;
    msg_c   = '0;
    msg_c.addr = a_addr;
    msg_c.req  = rq.req;
    msg_c.home = my_id;
    msg_c.excl = rq_ex;
    unique case (st)
      S_SEND: begin
        if (sidx == 0) begin
          if (prim == P_MEM) begin
            msg_v = 1'b1; msg_t_ = MSG_MEM_RD; msg_dst = mc_of(a_addr);
          end else if (prim == P_FWD) begin
            msg_v = 1'b1; msg_t_ = rq_ex ? MSG_FWD_EX : MSG_FWD_SH; msg_dst = sup;
          end
        end else if (rk != R_SH) begin
          if (bmode) begin
            if (j == 0) begin
              msg_v = 1'b1; msg_bc = 1'b1; msg_dst = my_id;
              msg_c.exc1 = rq.req; msg_c.exc1_v = 1'b0;
              msg_c.exc2 = sup;    msg_c.exc2_v = sup_v;
            end
          end else if (j < int'(e.n)) begin
            if (!(rk == R_EX && e.sh[j] == rq.req) && !(sup_v && e.sh[j] == sup)) begin
              msg_v = 1'b1; msg_dst = e.sh[j];
            end
          end
        end
      end
      S_MEMRD: begin
        msg_v = 1'b1; msg_t_ = MSG_MEM_RD; msg_dst = mc_of(a_addr);
      end
      S_GRANT: begin
        msg_v = 1'b1; msg_t_ = MSG_GRANT; msg_dst = rq.req;
      end
      default: ;
    endcase
  end

  always_comb begin
    out_valid = msg_v;
    out_flit  = '0;
    out_flit.meta.head  = 1'b1;
    out_flit.meta.tail  = 1'b1;
    out_flit.meta.bcast = msg_bc;
    out_flit.meta.dst   = msg_dst;
    out_flit.meta.src   = my_id;
    out_flit.meta.mtype = msg_t_;
    out_flit.data       = DATA_W'(msg_c);
  end

  assign ev_bcast_inv = (st == S_SEND) && msg_v && msg_bc && out_ready;
  assign ev_nack      = in_busy && in_valid && is_ack && ic.nack && same_line(ic.addr, a_addr);

  // ------------------------------------------------------------------ control
  logic     start_hit, start_free;
  core_id_t first_other;
  logic     first_other_v;

  assign start_hit  = rd_e.valid && rd_e.tag == tag_of(rq.addr);
  assign start_free = !rd_e.valid || rd_e.st == DS_I;

  always_comb begin
    first_other   = '0;
    first_other_v = 1'b0;
    for (int j = K - 1; j >= 0; j--)
      if (j < int'(rd_e.n) && rd_e.sh[j] != rq.req) begin
        first_other = rd_e.sh[j]; first_other_v = 1'b1;
      end
  end

  assign ev_recall = (st == S_START) && !start_hit && !start_free;
  assign ev_g_set  = (st == S_FINISH) && (rk == R_SH) && !e.g && (int'(e.n) == K);

  // writes to the directory cache: an EVICT for a line not being worked on, or the result of
  // a finished request
  logic          ev_wr, fin_wr;
  logic [IW-1:0] ev_idx;
  assign ev_idx = idx_of(ic.addr);
  assign ev_e   = ent(mem[ev_idx], vld[ev_idx]);
  assign ev_wr  = in_valid && is_evict && ev_e.valid && ev_e.tag == tag_of(ic.addr) &&
                  ((st == S_IDLE) || (in_busy && !same_line(ic.addr, a_addr) && ev_idx != idx));
  assign fin_wr = (st == S_FINISH);

  always_ff @(posedge clk) begin
    if (fin_wr)     mem[idx]    <= e_final;
    else if (ev_wr) mem[ev_idx] <= drop_sharer(ev_e, in_flit.meta.src);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      vld <= '0;
    else if (fin_wr) vld[idx] <= e_final.valid;
  end

  always_comb begin
    e_final = e;
    unique case (rk)
      R_RECALL: begin
        e_final.valid = 1'b0; e_final.st = DS_I; e_final.g = 1'b0; e_final.n = '0;
      end
      R_EX: begin
        e_final.valid = 1'b1; e_final.st = DS_M; e_final.g = 1'b0; e_final.n = NW'(1);
        e_final.sh[0] = rq.req;
      end
      default: begin
        e_final = add_sharer(e, rq.req);
        e_final.valid = 1'b1;
        e_final.st    = on_share(e.st);
      end
    endcase
  end

  // entry a starting request works on (a fresh one on a miss), and whether it is an upgrade:
  // with G set the directory cannot tell whether the requester still holds its copy, so it is
  // sent the line and answers the broadcast like any sharer
  dent_t st_d;
  logic  st_u;
  always_comb begin
    if (start_hit) st_d = rd_e;
    else begin
      st_d = '0; st_d.valid = 1'b1; st_d.tag = tag_of(rq.addr); st_d.st = DS_I;
    end
    st_u = rq.upgrade && !st_d.g && known(st_d, rq.req);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= S_IDLE; rk <= R_SH; prim <= P_NONE; rq <= '0; rq_ex <= 1'b0; a_addr <= '0;
      e <= '0; idx <= '0; sup <= '0; sup_v <= 1'b0; bmode <= 1'b0; upg <= 1'b0;
      expect_n <= '0; acks <= '0; sidx <= '0; need_mem <= 1'b0;
    end else begin
      unique case (st)
        S_IDLE: begin
          if (in_valid && is_req) begin
            rq       <= ic;
            rq.req   <= in_flit.meta.src;
            rq_ex    <= (in_flit.meta.mtype == MSG_REQ_EX);
            idx      <= idx_of(ic.addr);
            st       <= S_START;
          end
        end

        S_START: begin
          acks  <= '0;
          sidx  <= '0;
          need_mem <= 1'b0;
          sup_v <= 1'b0;
          upg   <= 1'b0;
          bmode <= 1'b0;
          if (!start_hit && !start_free) begin
            // recall the line that occupies the set
            rk       <= R_RECALL;
            e        <= rd_e;
            a_addr   <= {rd_e.tag, idx, my_id, {LINE_OFS_W{1'b0}}};
            prim     <= P_NONE;
            bmode    <= rd_e.g;
            expect_n <= total_of(rd_e);
            st       <= S_SEND;
          end else begin
            e      <= st_d;
            a_addr <= rq.addr;
            rk     <= rq_ex ? R_EX : R_SH;
            st     <= S_SEND;
            if (st_d.st == DS_I) begin
              prim <= P_MEM; expect_n <= 1;
            end else if (!rq_ex) begin
              if (st_d.n != 0) begin
                prim <= P_FWD; sup <= st_d.sh[0]; sup_v <= 1'b1;
              end else begin
                prim <= P_MEM;
              end
              expect_n <= 1;
            end else begin
              upg   <= st_u;
              bmode <= st_d.g;
              if (!st_u && first_other_v) begin
                prim <= P_FWD; sup <= first_other; sup_v <= 1'b1;
                expect_n <= total_of(st_d) - ((!st_d.g && known(st_d, rq.req)) ? 1 : 0);
              end else if (!st_u) begin
                prim <= P_MEM;
                expect_n <= total_of(st_d) - ((!st_d.g && known(st_d, rq.req)) ? 1 : 0) + 1;
              end else begin
                prim <= P_NONE;
                expect_n <= total_of(st_d) - 1;
              end
            end
          end
        end

        S_SEND, S_WAIT, S_MEMRD: begin
          // acknowledgements and crossing evictions
          if (in_valid && same_line(ic.addr, a_addr)) begin
            if (is_ack) begin
              acks <= acks + 1'b1;
              if (ic.nack) begin
                expect_n <= expect_n + 1'b1;
                need_mem <= 1'b1;
              end
            end else if (is_evict) begin
              e <= drop_sharer(e, in_flit.meta.src);
              if (bmode && !(rk == R_EX && in_flit.meta.src == rq.req) &&
                  !(sup_v && in_flit.meta.src == sup))
                expect_n <= expect_n - 1'b1;
            end
          end
          if (st == S_SEND) begin
            if (!msg_v || out_ready) begin
              if (int'(sidx) == K) st <= S_WAIT;
              else sidx <= sidx + 1'b1;
            end
          end else if (st == S_MEMRD) begin
            if (out_ready) begin
              need_mem <= 1'b0;
              st       <= S_WAIT;
            end
          end else if (need_mem) begin
            st <= S_MEMRD;
          end else if (!(in_valid && is_ack && ic.nack)) begin
            if (acks + ((in_valid && is_ack && same_line(ic.addr, a_addr)) ? 1 : 0) >= expect_n)
              st <= S_FINISH;
          end
        end

        S_FINISH: begin
          if (rk == R_RECALL) st <= S_START;
          else if (upg)       st <= S_GRANT;
          else                st <= S_IDLE;
        end

        S_GRANT: if (out_ready) st <= S_IDLE;

        default: st <= S_IDLE;
      endcase
    end
  end

  a_acks_bounded: assert property (@(posedge clk) disable iff (!rst_n)
    (st == S_FINISH) |-> (acks >= expect_n));
endmodule
