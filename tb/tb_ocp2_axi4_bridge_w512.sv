// Self-checking testbench of the OCP2.2-to-AXI4 bridge at its widest word,
// DATA_W = 512 (64-byte beats, AxSIZE = 6); the bridge supports 32 to 512.
// Apart from the width it is the same test as tb_ocp2_axi4_bridge:
//
// An OCP2.2 master (tasks below) drives tagged SRMD bursts into the bridge; an
// AXI4 slave model with random ready/valid timing and out-of-order read
// completion sits behind it. A reference memory, updated when a write request
// is accepted, gives the expected read data. Phases:
//   1. write bursts of 1..16 beats, INCR and WRAP, some across 4 KB pages;
//   2. read those back while writing another region (both AXI response
//      channels busy together);
//   3. read the second region; 4. an access to the SLVERR region.
// Checks: every read beat (data, SResp, SRespLast), every write response,
// the tag of each response, no AXI burst crossing 4 KB (slave model), and
// that splits, back-pressure at the outstanding limit, out-of-order
// responses and simultaneous B/R responses all happened.
module tb_ocp2_axi4_bridge_w512;
  import bridge_pkg::*;

  localparam int DATA_W = 512, ID_W = 4, BL_W = 8, MAX_OUT = 8, MEM_AW = 14;
  localparam int BPB = DATA_W / 8;
  localparam logic [31:0] ERR_BASE = 32'h0010_0000;

  logic clk = 0, resetn = 0;
  always #5 clk = ~clk;

  logic [2:0]          MCmd = OCP_IDLE;
  logic [31:0]         MAddr = '0;
  logic [BL_W-1:0]     MBurstLength = '0;
  logic [2:0]          MBurstSeq = SEQ_INCR;
  logic                MBurstSingleReq = 1'b1;
  logic [ID_W-1:0]     MTagID = '0;
  logic                SCmdAccept;
  logic [DATA_W-1:0]   MData = '0;
  logic                MDataValid = 0;
  logic [BPB-1:0]      MDataByteEn = '0;
  logic                MDataLast = 0;
  logic                SDataAccept;
  logic [1:0]          SResp;
  logic [DATA_W-1:0]   SData;
  logic [ID_W-1:0]     STagID;
  logic                SRespLast;
  logic                MRespAccept = 0;

  logic [ID_W-1:0] AWID, BID, ARID, RID;
  logic [31:0] AWADDR, ARADDR;
  logic [7:0] AWLEN, ARLEN;
  logic [2:0] AWSIZE, ARSIZE;
  logic [1:0] AWBURST, ARBURST, BRESP, RRESP;
  logic AWVALID, AWREADY, WLAST, WVALID, WREADY, BVALID, BREADY;
  logic ARVALID, ARREADY, RLAST, RVALID, RREADY;
  logic [DATA_W-1:0] WDATA, RDATA;
  logic [BPB-1:0] WSTRB;

  ocp2_axi4_bridge #(.DATA_W(DATA_W), .ID_W(ID_W), .BL_W(BL_W), .MAX_OUT(MAX_OUT)) dut (.*);

  axi4_slave_model #(.DATA_W(DATA_W), .ID_W(ID_W), .MEM_AW(MEM_AW), .ERR_BASE(ERR_BASE)) slv (
    .clk, .resetn, .AWID, .AWADDR, .AWLEN, .AWSIZE, .AWBURST, .AWVALID, .AWREADY,
    .WDATA, .WSTRB, .WLAST, .WVALID, .WREADY, .BID, .BRESP, .BVALID, .BREADY,
    .ARID, .ARADDR, .ARLEN, .ARSIZE, .ARBURST, .ARVALID, .ARREADY,
    .RID, .RDATA, .RRESP, .RLAST, .RVALID, .RREADY);

  int checks = 0, failures = 0;
  int n_split = 0, n_backpressure = 0, n_bursts = 0;

  // ---- reference memory --------------------------------------------------
  logic [DATA_W-1:0] ref_mem [int];
  function automatic logic [DATA_W-1:0] ref_rd(input logic [31:0] a);
    int unsigned ix = (a / BPB) % (1 << MEM_AW);
    if (ref_mem.exists(ix)) return ref_mem[ix];
    return DATA_W'(ix * 32'h01010101 + 32'h5a);
  endfunction
  function automatic logic [31:0] beat_addr(input logic [31:0] a, input int len,
                                            input logic [2:0] seq, input int n);
    logic [31:0] size, start, base;
    start = a & ~(BPB - 1);
    if (seq == SEQ_WRAP) begin
      size = len * BPB;
      base = start & ~(size - 1);
      return base + ((start - base + n * BPB) % size);
    end
    return start + n * BPB;
  endfunction

  // ---- expected responses per tag -----------------------------------------
  typedef struct { logic [DATA_W-1:0] data; logic [1:0] resp; bit last; bit rd; } exp_t;
  exp_t exp_q [1 << ID_W][$];
  int   pending = 0;

  // random data over the whole word, 32 bits at a time
  function automatic logic [DATA_W-1:0] rnd_word();
    logic [DATA_W-1:0] v;
    for (int k = 0; k < DATA_W / 32; k++) v[32*k +: 32] = $urandom;
    return v;
  endfunction

  // ---- write data queue -----------------------------------------------------
  typedef struct { logic [DATA_W-1:0] data; logic [BPB-1:0] be; bit last; } wbeat_t;
  wbeat_t wdata_q[$];

  // issue one burst; returns when the request is accepted
  task automatic ocp_burst(input bit rd, input logic [31:0] addr, input int len,
                           input logic [2:0] seq, input logic [ID_W-1:0] tag);
    logic [1:0] r;
    logic [31:0] off;
    r   = (addr >= ERR_BASE) ? OCP_ERR : OCP_DVA;
    off = {20'd0, addr[11:0]} & ~32'(BPB - 1);
    if (seq != SEQ_WRAP && off + len * BPB > 4096) n_split++;
    @(negedge clk);
    MCmd = rd ? OCP_RD : OCP_WR; MAddr = addr; MBurstLength = BL_W'(len);
    MBurstSeq = seq; MTagID = tag;
    // the accept is sampled mid-cycle, once inputs and registers are settled
    #1;
    while (!SCmdAccept) begin
      if (dut.outstanding == MAX_OUT) n_backpressure++;
      @(negedge clk); #1;
    end
    @(posedge clk);
    // accepted at this edge: update the reference model
    for (int n = 0; n < len; n++) begin
      logic [31:0] ba;
      ba = beat_addr(addr, len, seq, n);
      if (rd) begin
        exp_q[tag].push_back('{ref_rd(ba), r, n == len - 1, 1'b1});
      end else begin
        wbeat_t w;
        logic [DATA_W-1:0] v;
        v = ref_rd(ba);
        w.data = rnd_word();
        w.be   = ($urandom_range(3) == 0) ? BPB'($urandom) : '1;
        w.last = (n == len - 1);
        for (int b = 0; b < BPB; b++) if (w.be[b]) v[8*b +: 8] = w.data[8*b +: 8];
        ref_mem[(ba / BPB) % (1 << MEM_AW)] = v;
        wdata_q.push_back(w);
      end
    end
    if (!rd) exp_q[tag].push_back('{'0, r, 1'b1, 1'b0});
    pending++;
    n_bursts++;
    @(negedge clk);
    MCmd = OCP_IDLE;
  endtask

  // data handshake driver: a beat leaves the queue when SDataAccept was high
  initial begin
    forever begin
      @(negedge clk);
      if (wdata_q.size() > 0) begin
        MDataValid  = 1;
        MData       = wdata_q[0].data;
        MDataByteEn = wdata_q[0].be;
        MDataLast   = wdata_q[0].last;
        #1;
        if (SDataAccept) begin
          @(posedge clk);
          void'(wdata_q.pop_front());
        end
      end else MDataValid = 0;
    end
  end

  // response checker, sampled mid-cycle before the edge that takes the response
  always @(negedge clk) begin
    #2;
    if (resetn && SResp != OCP_NULL && MRespAccept) begin
      exp_t e;
      checks++;
      if (exp_q[STagID].size() == 0) begin
        failures++; $display("unexpected response tag %0d", STagID);
      end else begin
        e = exp_q[STagID].pop_front();
        if (e.rd && (SData !== e.data || SResp !== e.resp || SRespLast !== e.last)) begin
          failures++;
          $display("read tag %0d: got %h/%0d/%0d want %h/%0d/%0d", STagID, SData, SResp,
                   SRespLast, e.data, e.resp, e.last);
        end
        if (!e.rd && (SResp !== e.resp || !SRespLast)) begin
          failures++; $display("write tag %0d: resp %0d want %0d", STagID, SResp, e.resp);
        end
        if (e.last) pending--;
      end
    end
  end
  always @(negedge clk) MRespAccept = ($urandom_range(99) < 80);

  // tags: pick one, possibly a busy one (the bridge must hold it back)
  int tag_rr = 0;
  function automatic logic [ID_W-1:0] next_tag();
    tag_rr = (tag_rr + 1 + $urandom_range(1)) % (1 << ID_W);
    return ID_W'(tag_rr);
  endfunction

  task automatic wait_idle();
    int t = 0;
    while ((pending != 0 || wdata_q.size() != 0) && t < 20000) begin @(posedge clk); t++; end
    repeat (5) @(posedge clk);
  endtask

  // ---- stimulus ---------------------------------------------------------------
  typedef struct { logic [31:0] a; int len; logic [2:0] seq; } burst_t;
  burst_t reg1[$], reg2[$];

  function automatic burst_t rnd_burst(input logic [31:0] base);
    burst_t b;
    if ($urandom_range(4) == 0) begin
      b.seq = SEQ_WRAP;
      b.len = 2 << $urandom_range(2);
      b.a   = base + ((32'($urandom_range(255)) * 4) & ~32'(BPB - 1));
    end else begin
      b.seq = SEQ_INCR;
      b.len = $urandom_range(1, 16);
      // half of them end near a 4 KB page end
      if ($urandom_range(1)) b.a = base + 32'h1000 - 32'($urandom_range(1, 12)) * BPB;
      // offsets in bytes, so the regions stay apart at any word size
      else                   b.a = base + ((32'($urandom_range(1000)) * 4) & ~32'(BPB - 1));
    end
    return b;
  endfunction

  initial begin
    repeat (3) @(posedge clk);
    resetn = 1;
    for (int i = 0; i < 40; i++) begin
      burst_t b;
      b = rnd_burst(32'h0000_2000 + 32'($urandom_range(3)) * 32'h1000);
      reg1.push_back(b);
      ocp_burst(0, b.a, b.len, b.seq, next_tag());
    end
    wait_idle();
    foreach (reg1[i]) ocp_burst(1, reg1[i].a, reg1[i].len, reg1[i].seq, next_tag());
    for (int i = 0; i < 30; i++) begin
      burst_t b;
      b = rnd_burst(32'h0000_8000);
      reg2.push_back(b);
      if (i % 2) ocp_burst(0, b.a, b.len, b.seq, next_tag());
      else       ocp_burst(1, reg1[i].a, reg1[i].len, reg1[i].seq, next_tag());
    end
    wait_idle();
    foreach (reg2[i]) if (i % 2) ocp_burst(1, reg2[i].a, reg2[i].len, reg2[i].seq, next_tag());
    // error region: write and read, both across a page end
    ocp_burst(0, ERR_BASE + 32'h0FF8, 4, SEQ_INCR, next_tag());
    ocp_burst(1, ERR_BASE + 32'h0FF8, 4, SEQ_INCR, next_tag());
    wait_idle();

    // mechanisms that must have happened
    checks++; if (pending != 0) begin failures++; $display("%0d bursts unanswered", pending); end
    checks++; if (slv.errors != 0) begin failures++; $display("slave model saw %0d errors", slv.errors); end
    checks++; if (n_split == 0) begin failures++; $display("no 4KB split"); end
    checks++; if (slv.aw_count + slv.ar_count != n_bursts + n_split) begin
      failures++; $display("AXI commands %0d, want %0d", slv.aw_count + slv.ar_count, n_bursts + n_split); end
    checks++; if (n_backpressure == 0) begin failures++; $display("outstanding limit never reached"); end
    checks++; if (slv.out_of_order == 0) begin failures++; $display("no out-of-order read"); end
    checks++; if (slv.both_resp == 0) begin failures++; $display("B and R never together"); end
    $display("splits=%0d backpressure=%0d ooo=%0d both=%0d", n_split, n_backpressure,
             slv.out_of_order, slv.both_resp);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
