// tb_mem_ctrl: self-checking test of the memory controller.
//
// A small memory model answers bus reads a random number of cycles later. The test writes
// lines with MEM_WB packets, then reads them back with MEM_RD messages and checks that each
// read produces a bus read of the right line, a two-flit DATA packet to the requester with the
// address and the line, and nothing else, and that write-backs become bus writes with the
// right data. The output side applies random back-pressure.
module tb_mem_ctrl;
  import atac_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  core_id_t          my_id = {6'd2, 4'd0};
  logic              in_valid, in_ready, out_valid, out_ready;
  flit_t             in_flit, out_flit;
  logic              mem_req_valid, mem_req_ready, mem_req_we;
  addr_t             mem_req_addr;
  logic [DATA_W-1:0] mem_req_wdata;
  logic              mem_resp_valid;
  logic [DATA_W-1:0] mem_resp_rdata;

  mem_ctrl dut (.*);

  int checks = 0, failures = 0;
  logic [DATA_W-1:0] store [addr_t];
  int reads = 0, writes = 0;

  // memory model
  initial begin
    mem_resp_valid = 0; mem_resp_rdata = '0; mem_req_ready = 0;
    forever begin
      @(negedge clk);
      mem_req_ready = ($urandom_range(0, 2) != 0);
      #1;
      if (mem_req_valid && mem_req_ready) begin
        addr_t a;
        logic  we;
        logic [DATA_W-1:0] wd;
        a = mem_req_addr; we = mem_req_we; wd = mem_req_wdata;
        checks++;
        if (a[3:0] != 0) begin failures++; $display("FAIL unaligned bus address"); end
        @(negedge clk);
        mem_req_ready = 0;
        if (we) begin
          store[a] = wd; writes++;
        end else begin
          reads++;
          repeat ($urandom_range(0, 6)) @(negedge clk);
          mem_resp_valid = 1;
          mem_resp_rdata = store.exists(a) ? store[a] : '0;
          @(negedge clk);
          mem_resp_valid = 0;
        end
      end
    end
  end

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    out_ready = 1;
    forever begin @(negedge clk); out_ready = ($urandom_range(0, 3) != 0); end
  end

  task automatic put(flit_t f);
    @(negedge clk);
    in_valid = 1; in_flit = f;
    #1;
    while (!in_ready) begin @(negedge clk); #1; end
    @(negedge clk);
    in_valid = 0;
  endtask

  task automatic get(output flit_t f);
    #1;
    while (!(out_valid && out_ready)) begin @(negedge clk); #1; end
    f = out_flit;
    @(negedge clk);
  endtask

  function automatic flit_t hdr(msg_t t, addr_t a, core_id_t req, core_id_t home, logic tl);
    flit_t f;
    coh_t  c;
    c = '0; c.addr = a; c.req = req; c.home = home;
    f = '0;
    f.meta.head = 1; f.meta.tail = tl; f.meta.mtype = t;
    f.meta.src = req; f.meta.dst = my_id;
    f.data = DATA_W'(c);
    return f;
  endfunction

  initial begin
    logic [DATA_W-1:0] lines [4];
    addr_t addrs [4];
    in_valid = 0; in_flit = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 4; i++) begin
      flit_t b;
      addrs[i] = addr_t'({$urandom_range(0, 1 << 20), 4'h8});
      for (int w = 0; w < 4; w++) lines[i][w*32 +: 32] = $urandom;
      put(hdr(MSG_MEM_WB, addrs[i], {6'd5, 4'd3}, '0, 0));
      b = '0; b.meta.tail = 1; b.meta.mtype = MSG_MEM_WB; b.data = lines[i];
      put(b);
    end
    repeat (10) @(negedge clk);
    checks++;
    if (writes != 4) begin failures++; $display("FAIL %0d bus writes", writes); end
    for (int i = 3; i >= 0; i--) begin
      flit_t f1, f2;
      coh_t  c;
      core_id_t rq, hm;
      rq = {6'(i + 7), 4'd9};
      hm = {6'd1, 4'(i)};
      put(hdr(MSG_MEM_RD, addrs[i], rq, hm, 1));
      get(f1); get(f2);
      c = coh_t'(f1.data);
      checks++;
      if (f1.meta.mtype != MSG_DATA || !f1.meta.head || f1.meta.tail || f1.meta.dst != rq ||
          c.addr != addrs[i]) begin
        failures++; $display("FAIL DATA header %0d", i);
      end
      checks++;
      if (f2.meta.mtype != MSG_DATA || !f2.meta.tail || f2.data != lines[i] || f2.meta.dst != rq) begin
        failures++; $display("FAIL DATA line %0d", i);
      end
    end
    repeat (20) @(negedge clk);
    checks++;
    if (out_valid) begin failures++; $display("FAIL extra message after a read"); end
    checks++;
    if (reads != 4) begin failures++; $display("FAIL %0d bus reads", reads); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
