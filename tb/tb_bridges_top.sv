// End-to-end testbench of bridges_top, the four bridges at their default
// parameters (no parameter overrides on the top).
//
// Each bridge port gets its own master and slave model, and all four run at
// the same time:
//   b1 OCP2.2 -> AXI4 : OCP2 master with tagged INCR/WRAP bursts of 1..16
//                       beats, AXI4 slave model (random timing, out-of-order
//                       reads, SLVERR region);
//   b2 OCP1.0 -> OCP2.2: OCP1 master (MRMD bursts of 1/2/4/8), OCP2 slave
//                       model answering tags out of order, ERR region;
//   b3 OCP1.0 -> AXI4 : OCP1 master, AXI4 slave model;
//   b4 OCP1.0 -> APB3 : OCP1 single requests (posted and non-posted writes,
//                       reads, decode misses), APB3 slave with wait states.
// Every read response is checked against a reference memory per port (data,
// response code, order or tag), the slave models check the protocols (4 KB,
// WLAST, MDataLast, APB sequencing). At the end the testbench fails if any
// of these mechanisms never happened: 4 KB split (b1, b3), outstanding limit
// reached (b1, b2, b3), out-of-order downstream responses (b1, b2, b3),
// simultaneous AXI B and R (b1), error responses (b1, b2, b3), APB wait
// states, ENABLE -> SETUP back-to-back transfers and decode misses (b4).
module tb_bridges_top;
  import bridge_pkg::*;

  localparam int DATA_W = 32, MEM_AW = 14;
  localparam int BPB = DATA_W / 8;
  localparam int B1_ID_W = 4, B1_BL_W = 8, B1_MAX_OUT = 8;
  localparam int B2_TAG_W = 2, B2_BL_W = 4;
  localparam int B3_ID_W = 4;
  localparam logic [31:0] ERR_BASE = 32'h0010_0000;
  localparam logic [31:0] APB_MASK = 32'hFFFF_0000;   // default decode window of b4
  localparam logic [31:0] APB_BASE = 32'h0000_0000;

  logic clk = 0, resetn = 0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  // ---- b1 ports ------------------------------------------------------------------
  logic [2:0] b1_MCmd = OCP_IDLE;
  logic [31:0] b1_MAddr = '0;
  logic [B1_BL_W-1:0] b1_MBurstLength = '0;
  logic [2:0] b1_MBurstSeq = SEQ_INCR;
  logic b1_MBurstSingleReq = 1'b1;
  logic [B1_ID_W-1:0] b1_MTagID = '0;
  logic b1_SCmdAccept;
  logic [DATA_W-1:0] b1_MData = '0;
  logic b1_MDataValid = 0;
  logic [BPB-1:0] b1_MDataByteEn = '0;
  logic b1_MDataLast = 0;
  logic b1_SDataAccept;
  logic [1:0] b1_SResp;
  logic [DATA_W-1:0] b1_SData;
  logic [B1_ID_W-1:0] b1_STagID;
  logic b1_SRespLast;
  logic b1_MRespAccept = 0;
  logic [B1_ID_W-1:0] b1_AWID, b1_BID, b1_ARID, b1_RID;
  logic [31:0] b1_AWADDR, b1_ARADDR;
  logic [7:0] b1_AWLEN, b1_ARLEN;
  logic [2:0] b1_AWSIZE, b1_ARSIZE;
  logic [1:0] b1_AWBURST, b1_ARBURST, b1_BRESP, b1_RRESP;
  logic b1_AWVALID, b1_AWREADY, b1_WLAST, b1_WVALID, b1_WREADY, b1_BVALID, b1_BREADY;
  logic b1_ARVALID, b1_ARREADY, b1_RLAST, b1_RVALID, b1_RREADY;
  logic [DATA_W-1:0] b1_WDATA, b1_RDATA;
  logic [BPB-1:0] b1_WSTRB;

  // ---- b2 ports ------------------------------------------------------------------
  logic [2:0] b2_MCmd = OCP_IDLE;
  logic [31:0] b2_MAddr = '0;
  logic [2:0] b2_MBurst = B1_LAST;
  logic [DATA_W-1:0] b2_MData = '0;
  logic [BPB-1:0] b2_MByteEn = '0;
  logic b2_SCmdAccept;
  logic [1:0] b2_SResp;
  logic [DATA_W-1:0] b2_SData;
  logic [B2_TAG_W-1:0] b2_o_MTagID, b2_o_MDataTagID, b2_o_STagID;
  logic [2:0] b2_o_MCmd, b2_o_MBurstSeq;
  logic [31:0] b2_o_MAddr;
  logic [B2_BL_W-1:0] b2_o_MBurstLength;
  logic b2_o_MBurstSingleReq, b2_o_MDataValid, b2_o_MDataLast, b2_o_SCmdAccept;
  logic b2_o_SDataAccept, b2_o_SRespLast, b2_o_MRespAccept;
  logic [DATA_W-1:0] b2_o_MData, b2_o_SData;
  logic [BPB-1:0] b2_o_MDataByteEn;
  logic [1:0] b2_o_SResp;

  // ---- b3 ports ------------------------------------------------------------------
  logic [2:0] b3_MCmd = OCP_IDLE;
  logic [31:0] b3_MAddr = '0;
  logic [2:0] b3_MBurst = B1_LAST;
  logic [BPB-1:0] b3_MByteEn = '0;
  logic [DATA_W-1:0] b3_MData = '0;
  logic b3_SCmdAccept;
  logic [1:0] b3_SResp;
  logic [DATA_W-1:0] b3_SData;
  logic [B3_ID_W-1:0] b3_AWID, b3_BID, b3_ARID, b3_RID;
  logic [31:0] b3_AWADDR, b3_ARADDR;
  logic [7:0] b3_AWLEN, b3_ARLEN;
  logic [2:0] b3_AWSIZE, b3_ARSIZE;
  logic [1:0] b3_AWBURST, b3_ARBURST, b3_BRESP, b3_RRESP;
  logic b3_AWVALID, b3_AWREADY, b3_WLAST, b3_WVALID, b3_WREADY, b3_BVALID, b3_BREADY;
  logic b3_ARVALID, b3_ARREADY, b3_RLAST, b3_RVALID, b3_RREADY;
  logic [DATA_W-1:0] b3_WDATA, b3_RDATA;
  logic [BPB-1:0] b3_WSTRB;

  // ---- b4 ports ------------------------------------------------------------------
  logic [2:0] b4_MCmd = OCP_IDLE;
  logic [31:0] b4_MAddr = '0;
  logic [2:0] b4_MBurst = B1_LAST;
  logic [DATA_W-1:0] b4_MData = '0;
  logic [BPB-1:0] b4_MByteEn = '1;
  logic b4_SCmdAccept;
  logic [1:0] b4_SResp;
  logic [DATA_W-1:0] b4_SData;
  logic [31:0] b4_PADDR;
  logic b4_PWRITE, b4_PSEL, b4_PENABLE, b4_PREADY;
  logic [DATA_W-1:0] b4_PWDATA, b4_PRDATA;

  bridges_top dut (.*);

  axi4_slave_model #(.DATA_W(DATA_W), .ID_W(B1_ID_W), .MEM_AW(MEM_AW), .ERR_BASE(ERR_BASE)) slv1 (
    .clk, .resetn, .AWID(b1_AWID), .AWADDR(b1_AWADDR), .AWLEN(b1_AWLEN), .AWSIZE(b1_AWSIZE),
    .AWBURST(b1_AWBURST), .AWVALID(b1_AWVALID), .AWREADY(b1_AWREADY), .WDATA(b1_WDATA),
    .WSTRB(b1_WSTRB), .WLAST(b1_WLAST), .WVALID(b1_WVALID), .WREADY(b1_WREADY), .BID(b1_BID),
    .BRESP(b1_BRESP), .BVALID(b1_BVALID), .BREADY(b1_BREADY), .ARID(b1_ARID),
    .ARADDR(b1_ARADDR), .ARLEN(b1_ARLEN), .ARSIZE(b1_ARSIZE), .ARBURST(b1_ARBURST),
    .ARVALID(b1_ARVALID), .ARREADY(b1_ARREADY), .RID(b1_RID), .RDATA(b1_RDATA),
    .RRESP(b1_RRESP), .RLAST(b1_RLAST), .RVALID(b1_RVALID), .RREADY(b1_RREADY));

  ocp2_slave_model #(.DATA_W(DATA_W), .TAG_W(B2_TAG_W), .BL_W(B2_BL_W), .MEM_AW(MEM_AW), .RESP_PCT(10),
                     .ERR_BASE(ERR_BASE)) slv2 (
    .clk, .resetn, .MCmd(b2_o_MCmd), .MAddr(b2_o_MAddr), .MBurstLength(b2_o_MBurstLength),
    .MBurstSeq(b2_o_MBurstSeq), .MTagID(b2_o_MTagID), .SCmdAccept(b2_o_SCmdAccept),
    .MData(b2_o_MData), .MDataByteEn(b2_o_MDataByteEn), .MDataValid(b2_o_MDataValid),
    .MDataLast(b2_o_MDataLast), .SDataAccept(b2_o_SDataAccept), .SResp(b2_o_SResp),
    .SData(b2_o_SData), .SRespLast(b2_o_SRespLast), .STagID(b2_o_STagID),
    .MRespAccept(b2_o_MRespAccept));

  axi4_slave_model #(.DATA_W(DATA_W), .ID_W(B3_ID_W), .MEM_AW(MEM_AW), .ERR_BASE(ERR_BASE)) slv3 (
    .clk, .resetn, .AWID(b3_AWID), .AWADDR(b3_AWADDR), .AWLEN(b3_AWLEN), .AWSIZE(b3_AWSIZE),
    .AWBURST(b3_AWBURST), .AWVALID(b3_AWVALID), .AWREADY(b3_AWREADY), .WDATA(b3_WDATA),
    .WSTRB(b3_WSTRB), .WLAST(b3_WLAST), .WVALID(b3_WVALID), .WREADY(b3_WREADY), .BID(b3_BID),
    .BRESP(b3_BRESP), .BVALID(b3_BVALID), .BREADY(b3_BREADY), .ARID(b3_ARID),
    .ARADDR(b3_ARADDR), .ARLEN(b3_ARLEN), .ARSIZE(b3_ARSIZE), .ARBURST(b3_ARBURST),
    .ARVALID(b3_ARVALID), .ARREADY(b3_ARREADY), .RID(b3_RID), .RDATA(b3_RDATA),
    .RRESP(b3_RRESP), .RLAST(b3_RLAST), .RVALID(b3_RVALID), .RREADY(b3_RREADY));

  apb3_slave_model #(.DATA_W(DATA_W), .MEM_AW(10)) slv4 (
    .clk, .resetn, .PADDR(b4_PADDR), .PWRITE(b4_PWRITE), .PSEL(b4_PSEL),
    .PENABLE(b4_PENABLE), .PWDATA(b4_PWDATA), .PREADY(b4_PREADY), .PRDATA(b4_PRDATA));

  // ---- shared helpers ------------------------------------------------------------
  typedef struct { logic [DATA_W-1:0] data; logic [1:0] resp; } exp1_t;
  typedef struct { logic [31:0] a; int len; logic [2:0] seq; } burst_t;

  function automatic logic [2:0] burst_code(input int len);
    case (len)
      2: return B1_TWO;
      4: return B1_FOUR;
      8: return B1_EIGHT;
      default: return B1_LAST;
    endcase
  endfunction

  function automatic burst_t rnd_burst1(input logic [31:0] base);
    burst_t b;
    b.seq = SEQ_INCR;
    b.len = 1 << $urandom_range(3);
    if ($urandom_range(1)) b.a = base + 32'h1000 - 32'($urandom_range(1, 7)) * BPB;
    else                   b.a = base + 32'($urandom_range(1000)) * BPB;
    return b;
  endfunction

  // ---- OCP1 master on port b2_ --------------------------------------------------
  logic [DATA_W-1:0] b2_ref_mem [int];
  function automatic logic [DATA_W-1:0] b2_ref_rd(input logic [31:0] a);
    int unsigned ix;
    ix = (a / BPB) % (1 << MEM_AW);
    if (b2_ref_mem.exists(ix)) return b2_ref_mem[ix];
    return DATA_W'(ix * 32'h01010101 + 32'h5a);
  endfunction
  exp1_t b2_exp_q[$];
  int b2_bursts = 0, b2_split = 0, b2_bp = 0;

  task automatic b2_burst(input bit rd, input logic [31:0] addr, input int len);
    logic [1:0] r;
    logic [31:0] a;
    r = (addr >= ERR_BASE) ? OCP_ERR : OCP_DVA;
    if ((addr[11:0] + len * BPB) > 4096) b2_split++;
    for (int n = 0; n < len; n++) begin
      a = addr + n * BPB;
      @(negedge clk);
      b2_MCmd    = rd ? OCP_RD : OCP_WR;
      b2_MAddr   = a;
      b2_MBurst  = (n == len - 1) ? B1_LAST : burst_code(len);
      b2_MData   = $urandom;
      b2_MByteEn = ($urandom_range(3) == 0) ? BPB'($urandom) : '1;
      #1;
      while (!b2_SCmdAccept) begin
        if (n == 0 && !dut.u_ocp1_ocp2.alloc_ready) b2_bp++;
        @(negedge clk); #1;
      end
      @(posedge clk);
      if (rd) b2_exp_q.push_back('{b2_ref_rd(a), r});
      else begin
        logic [DATA_W-1:0] v;
        v = b2_ref_rd(a);
        for (int b = 0; b < BPB; b++) if (b2_MByteEn[b]) v[8*b +: 8] = b2_MData[8*b +: 8];
        b2_ref_mem[(a / BPB) % (1 << MEM_AW)] = v;
      end
    end
    b2_bursts++;
    @(negedge clk);
    b2_MCmd = OCP_IDLE;
  endtask

  always @(negedge clk) begin
    #2;   // mid-cycle: the values the next clock edge will see
    if (resetn && b2_SResp != OCP_NULL) begin
      exp1_t e;
      checks++;
      if (b2_exp_q.size() == 0) begin
        failures++; $display("b2_: unexpected response %0d", b2_SResp);
      end else begin
        e = b2_exp_q.pop_front();
        if (b2_SResp !== e.resp || (e.resp == OCP_DVA && b2_SData !== e.data)) begin
          failures++;
          $display("b2_ read: got %h/%0d want %h/%0d", b2_SData, b2_SResp, e.data, e.resp);
        end
      end
    end
  end

  task automatic b2_wait_idle();
    int t;
    t = 0;
    while (b2_exp_q.size() != 0 && t < 20000) begin @(posedge clk); t++; end
    repeat (100) @(posedge clk);
  endtask

  task automatic b2_run(input logic [31:0] base);
    burst_t regs[$];
    for (int i = 0; i < 40; i++) begin
      burst_t b;
      b = rnd_burst1(base + 32'(i % 4) * 32'h1000);
      regs.push_back(b);
      b2_burst(0, b.a, b.len);
    end
    b2_wait_idle();
    foreach (regs[i]) b2_burst(1, regs[i].a, regs[i].len);
    for (int i = 0; i < 16; i++) b2_burst(1, regs[i].a, 1);
    b2_wait_idle();
    for (int i = 0; i < 24; i++) b2_burst(0, regs[i].a, 1);
    b2_wait_idle();
    b2_burst(0, ERR_BASE + 32'h0FF8, 4);
    b2_wait_idle();
    b2_burst(1, ERR_BASE + 32'h0FF8, 4);
    b2_wait_idle();
  endtask


  // ---- OCP1 master on port b3_ --------------------------------------------------
  logic [DATA_W-1:0] b3_ref_mem [int];
  function automatic logic [DATA_W-1:0] b3_ref_rd(input logic [31:0] a);
    int unsigned ix;
    ix = (a / BPB) % (1 << MEM_AW);
    if (b3_ref_mem.exists(ix)) return b3_ref_mem[ix];
    return DATA_W'(ix * 32'h01010101 + 32'h5a);
  endfunction
  exp1_t b3_exp_q[$];
  int b3_bursts = 0, b3_split = 0, b3_bp = 0;

  task automatic b3_burst(input bit rd, input logic [31:0] addr, input int len);
    logic [1:0] r;
    logic [31:0] a;
    r = (addr >= ERR_BASE) ? OCP_ERR : OCP_DVA;
    if ((addr[11:0] + len * BPB) > 4096) b3_split++;
    for (int n = 0; n < len; n++) begin
      a = addr + n * BPB;
      @(negedge clk);
      b3_MCmd    = rd ? OCP_RD : OCP_WR;
      b3_MAddr   = a;
      b3_MBurst  = (n == len - 1) ? B1_LAST : burst_code(len);
      b3_MData   = $urandom;
      b3_MByteEn = ($urandom_range(3) == 0) ? BPB'($urandom) : '1;
      #1;
      while (!b3_SCmdAccept) begin
        if (n == 0 && !dut.u_ocp1_axi4.alloc_ready) b3_bp++;
        @(negedge clk); #1;
      end
      @(posedge clk);
      if (rd) b3_exp_q.push_back('{b3_ref_rd(a), r});
      else begin
        logic [DATA_W-1:0] v;
        v = b3_ref_rd(a);
        for (int b = 0; b < BPB; b++) if (b3_MByteEn[b]) v[8*b +: 8] = b3_MData[8*b +: 8];
        b3_ref_mem[(a / BPB) % (1 << MEM_AW)] = v;
      end
    end
    b3_bursts++;
    @(negedge clk);
    b3_MCmd = OCP_IDLE;
  endtask

  always @(negedge clk) begin
    #2;   // mid-cycle: the values the next clock edge will see
    if (resetn && b3_SResp != OCP_NULL) begin
      exp1_t e;
      checks++;
      if (b3_exp_q.size() == 0) begin
        failures++; $display("b3_: unexpected response %0d", b3_SResp);
      end else begin
        e = b3_exp_q.pop_front();
        if (b3_SResp !== e.resp || (e.resp == OCP_DVA && b3_SData !== e.data)) begin
          failures++;
          $display("b3_ read: got %h/%0d want %h/%0d", b3_SData, b3_SResp, e.data, e.resp);
        end
      end
    end
  end

  task automatic b3_wait_idle();
    int t;
    t = 0;
    while (b3_exp_q.size() != 0 && t < 20000) begin @(posedge clk); t++; end
    repeat (100) @(posedge clk);
  endtask

  task automatic b3_run(input logic [31:0] base);
    burst_t regs[$];
    for (int i = 0; i < 40; i++) begin
      burst_t b;
      b = rnd_burst1(base + 32'(i % 4) * 32'h1000);
      regs.push_back(b);
      b3_burst(0, b.a, b.len);
    end
    b3_wait_idle();
    foreach (regs[i]) b3_burst(1, regs[i].a, regs[i].len);
    for (int i = 0; i < 16; i++) b3_burst(1, regs[i].a, 1);
    b3_wait_idle();
    for (int i = 0; i < 24; i++) b3_burst(0, regs[i].a, 1);
    b3_wait_idle();
    b3_burst(0, ERR_BASE + 32'h0FF8, 4);
    b3_wait_idle();
    b3_burst(1, ERR_BASE + 32'h0FF8, 4);
    b3_wait_idle();
  endtask

  // ---- OCP2 master on port b1 --------------------------------------------------------
  logic [DATA_W-1:0] b1_ref_mem [int];
  function automatic logic [DATA_W-1:0] b1_ref_rd(input logic [31:0] a);
    int unsigned ix;
    ix = (a / BPB) % (1 << MEM_AW);
    if (b1_ref_mem.exists(ix)) return b1_ref_mem[ix];
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
  typedef struct { logic [DATA_W-1:0] data; logic [1:0] resp; bit last; bit rd; } exp2_t;
  exp2_t b1_exp_q [1 << B1_ID_W][$];
  int b1_pending = 0, b1_split = 0, b1_bp = 0, b1_bursts = 0;
  typedef struct { logic [DATA_W-1:0] data; logic [BPB-1:0] be; bit last; } wbeat_t;
  wbeat_t b1_wdata_q[$];

  task automatic b1_burst(input bit rd, input logic [31:0] addr, input int len,
                          input logic [2:0] seq, input logic [B1_ID_W-1:0] tag);
    logic [1:0] r;
    logic [31:0] off, ba;
    r   = (addr >= ERR_BASE) ? OCP_ERR : OCP_DVA;
    off = {20'd0, addr[11:0]} & ~32'(BPB - 1);
    if (seq != SEQ_WRAP && off + len * BPB > 4096) b1_split++;
    @(negedge clk);
    b1_MCmd = rd ? OCP_RD : OCP_WR; b1_MAddr = addr; b1_MBurstLength = B1_BL_W'(len);
    b1_MBurstSeq = seq; b1_MTagID = tag;
    #1;
    while (!b1_SCmdAccept) begin
      if (dut.u_ocp2_axi4.outstanding == B1_MAX_OUT) b1_bp++;
      @(negedge clk); #1;
    end
    @(posedge clk);
    for (int n = 0; n < len; n++) begin
      ba = beat_addr(addr, len, seq, n);
      if (rd) b1_exp_q[tag].push_back('{b1_ref_rd(ba), r, n == len - 1, 1'b1});
      else begin
        wbeat_t w;
        logic [DATA_W-1:0] v;
        v = b1_ref_rd(ba);
        w.data = $urandom;
        w.be   = ($urandom_range(3) == 0) ? BPB'($urandom) : '1;
        w.last = (n == len - 1);
        for (int b = 0; b < BPB; b++) if (w.be[b]) v[8*b +: 8] = w.data[8*b +: 8];
        b1_ref_mem[(ba / BPB) % (1 << MEM_AW)] = v;
        b1_wdata_q.push_back(w);
      end
    end
    if (!rd) b1_exp_q[tag].push_back('{'0, r, 1'b1, 1'b0});
    b1_pending++;
    b1_bursts++;
    @(negedge clk);
    b1_MCmd = OCP_IDLE;
  endtask

  // write data driver: a beat leaves the queue when SDataAccept was high
  initial begin
    forever begin
      @(negedge clk);
      if (b1_wdata_q.size() > 0) begin
        b1_MDataValid  = 1;
        b1_MData       = b1_wdata_q[0].data;
        b1_MDataByteEn = b1_wdata_q[0].be;
        b1_MDataLast   = b1_wdata_q[0].last;
        #1;
        if (b1_SDataAccept) begin
          @(posedge clk);
          void'(b1_wdata_q.pop_front());
        end
      end else b1_MDataValid = 0;
    end
  end

  always @(negedge clk) begin
    #2;   // mid-cycle: the values the next clock edge will see
    if (resetn && b1_SResp != OCP_NULL && b1_MRespAccept) begin
      exp2_t e;
      checks++;
      if (b1_exp_q[b1_STagID].size() == 0) begin
        failures++; $display("b1: unexpected response tag %0d", b1_STagID);
      end else begin
        e = b1_exp_q[b1_STagID].pop_front();
        if (e.rd && (b1_SData !== e.data || b1_SResp !== e.resp || b1_SRespLast !== e.last)) begin
          failures++;
          $display("b1 read tag %0d: got %h/%0d/%0d want %h/%0d/%0d", b1_STagID, b1_SData,
                   b1_SResp, b1_SRespLast, e.data, e.resp, e.last);
        end
        if (!e.rd && (b1_SResp !== e.resp || !b1_SRespLast)) begin
          failures++; $display("b1 write tag %0d: resp %0d want %0d", b1_STagID, b1_SResp, e.resp);
        end
        if (e.last) b1_pending--;
      end
    end
  end
  always @(negedge clk) b1_MRespAccept = ($urandom_range(99) < 80);

  int b1_tag_rr = 0;
  function automatic logic [B1_ID_W-1:0] b1_next_tag();
    b1_tag_rr = (b1_tag_rr + 1 + $urandom_range(1)) % (1 << B1_ID_W);
    return B1_ID_W'(b1_tag_rr);
  endfunction

  task automatic b1_wait_idle();
    int t;
    t = 0;
    while ((b1_pending != 0 || b1_wdata_q.size() != 0) && t < 20000) begin @(posedge clk); t++; end
    repeat (5) @(posedge clk);
  endtask

  function automatic burst_t rnd_burst2(input logic [31:0] base);
    burst_t b;
    if ($urandom_range(4) == 0) begin
      b.seq = SEQ_WRAP;
      b.len = 2 << $urandom_range(2);
      b.a   = base + 32'($urandom_range(255)) * BPB;
    end else begin
      b.seq = SEQ_INCR;
      b.len = $urandom_range(1, 16);
      if ($urandom_range(1)) b.a = base + 32'h1000 - 32'($urandom_range(1, 12)) * BPB;
      else                   b.a = base + 32'($urandom_range(1000)) * BPB;
    end
    return b;
  endfunction

  task automatic b1_run();
    burst_t reg1[$], reg2[$];
    for (int i = 0; i < 40; i++) begin
      burst_t b;
      b = rnd_burst2(32'h0000_2000 + 32'(i % 4) * 32'h1000);
      reg1.push_back(b);
      b1_burst(0, b.a, b.len, b.seq, b1_next_tag());
    end
    b1_wait_idle();
    foreach (reg1[i]) b1_burst(1, reg1[i].a, reg1[i].len, reg1[i].seq, b1_next_tag());
    // reads of region 1 mixed with writes of region 2: B and R together
    for (int i = 0; i < 30; i++) begin
      burst_t b;
      b = rnd_burst2(32'h0000_8000);
      reg2.push_back(b);
      if (i % 2) b1_burst(0, b.a, b.len, b.seq, b1_next_tag());
      else       b1_burst(1, reg1[i].a, reg1[i].len, reg1[i].seq, b1_next_tag());
    end
    b1_wait_idle();
    foreach (reg2[i]) if (i % 2) b1_burst(1, reg2[i].a, reg2[i].len, reg2[i].seq, b1_next_tag());
    b1_burst(0, ERR_BASE + 32'h0FF8, 4, SEQ_INCR, b1_next_tag());
    b1_burst(1, ERR_BASE + 32'h0FF8, 4, SEQ_INCR, b1_next_tag());
    b1_wait_idle();
  endtask

  // ---- OCP1 master on port b4 (APB) ---------------------------------------------------
  logic [DATA_W-1:0] b4_ref_mem [int];
  int b4_apb = 0, b4_miss = 0;
  function automatic logic [DATA_W-1:0] b4_ref_rd(input logic [31:0] a);
    int unsigned ix;
    ix = (a / BPB) % (1 << 10);
    if (b4_ref_mem.exists(ix)) return b4_ref_mem[ix];
    return DATA_W'(ix * 32'h00010001 + 32'h0a0b);
  endfunction

  always @(negedge clk) begin
    #2;   // mid-cycle: the values the next clock edge will see
    if (resetn && b4_SResp != OCP_NULL && !b4_SCmdAccept) begin
      checks++; failures++; $display("b4: response without accept");
    end
  end

  task automatic b4_req(input logic [2:0] cmd, input logic [31:0] addr);
    bit hit;
    logic [1:0] want;
    logic [DATA_W-1:0] d;
    hit = ((addr & APB_MASK) == APB_BASE);
    @(negedge clk);
    b4_MCmd  = cmd;
    b4_MAddr = addr;
    b4_MData = $urandom;
    d        = b4_MData;
    #1;
    while (!b4_SCmdAccept) begin @(negedge clk); #1; end
    want = (cmd == OCP_WR) ? OCP_NULL : (hit ? OCP_DVA : OCP_ERR);
    checks++;
    if (b4_SResp !== want || (cmd == OCP_RD && hit && b4_SData !== b4_ref_rd(addr))) begin
      failures++;
      $display("b4 cmd %0d addr %h: got %0d/%h want %0d/%h", cmd, addr, b4_SResp, b4_SData,
               want, b4_ref_rd(addr));
    end
    @(posedge clk);
    if (hit) b4_apb++; else b4_miss++;
    if (hit && cmd != OCP_RD) b4_ref_mem[(addr / BPB) % (1 << 10)] = d;
  endtask

  task automatic b4_run();
    logic [2:0] cmd;
    logic [31:0] a;
    for (int i = 0; i < 300; i++) begin
      case ($urandom_range(3))
        0, 1: cmd = OCP_WR;
        2:    cmd = OCP_WRNP;
        default: cmd = OCP_RD;
      endcase
      a = APB_BASE + 32'($urandom_range(63)) * BPB;
      if ($urandom_range(9) == 0) a = 32'h0009_0000 + 32'($urandom_range(63)) * BPB;
      b4_req(cmd, a);
      if ($urandom_range(3) == 0) begin
        @(negedge clk); b4_MCmd = OCP_IDLE;
        repeat ($urandom_range(3)) @(posedge clk);
      end
    end
    @(negedge clk); b4_MCmd = OCP_IDLE;
    for (int i = 0; i < 64; i++) b4_req(OCP_RD, APB_BASE + 32'(i) * BPB);
    @(negedge clk); b4_MCmd = OCP_IDLE;
    repeat (10) @(posedge clk);
  endtask

  // ---- main --------------------------------------------------------------------------
  task automatic need(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("mechanism never seen: %s", what); end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    resetn = 1;
    fork
      b1_run();
      b2_run(32'h0000_4000);
      b3_run(32'h0000_2000);
      b4_run();
    join

    checks++; if (b1_pending != 0) begin failures++; $display("b1: %0d bursts unanswered", b1_pending); end
    checks++; if (b2_exp_q.size() != 0) begin failures++; $display("b2: responses missing"); end
    checks++; if (b3_exp_q.size() != 0) begin failures++; $display("b3: responses missing"); end
    checks++; if (slv1.errors + slv2.errors + slv3.errors + slv4.errors != 0) begin
      failures++; $display("slave models saw protocol errors"); end
    checks++; if (slv1.aw_count + slv1.ar_count != b1_bursts + b1_split) begin
      failures++; $display("b1: AXI command count"); end
    checks++; if (slv2.reqs != b2_bursts) begin failures++; $display("b2: OCP2 request count"); end
    checks++; if (slv3.aw_count + slv3.ar_count != b3_bursts + b3_split) begin
      failures++; $display("b3: AXI command count"); end
    checks++; if (slv4.transfers != b4_apb) begin failures++; $display("b4: APB transfer count"); end

    need(b1_split > 0,            "b1 4KB split");
    need(b3_split > 0,            "b3 4KB split");
    need(b1_bp > 0,               "b1 outstanding limit");
    need(b2_bp > 0,               "b2 tag slots exhausted");
    need(b3_bp > 0,               "b3 read slots exhausted");
    need(slv1.out_of_order > 0,   "b1 out-of-order AXI read data");
    need(slv2.out_of_order > 0,   "b2 out-of-order OCP2 responses");
    need(slv3.out_of_order > 0,   "b3 out-of-order AXI read data");
    need(slv1.both_resp > 0,      "b1 B and R together");
    need(slv4.waits > 0,          "b4 APB wait states");
    need(slv4.back_to_back > 0,   "b4 ENABLE->SETUP");
    need(b4_miss > 0,             "b4 decode miss");
    $display("b1 split=%0d bp=%0d ooo=%0d both=%0d | b2 bp=%0d ooo=%0d | b3 split=%0d bp=%0d ooo=%0d | b4 waits=%0d b2b=%0d miss=%0d",
             b1_split, b1_bp, slv1.out_of_order, slv1.both_resp, b2_bp, slv2.out_of_order,
             b3_split, b3_bp, slv3.out_of_order, slv4.waits, slv4.back_to_back, b4_miss);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
