// Behavioural AXI4 slave with a word memory, for testbenches only.
//
// - AW/W/B: addresses are queued; W beats are written in AW order (WSTRB
//   honoured) and WLAST is checked against AWLEN; one B per AW, in order.
// - AR/R: read commands are queued; when the R channel is free the model
//   picks, at random, one of the commands that are the oldest of their ID
//   (so responses with different IDs come back out of order, same-ID ones in
//   order) and returns its burst without interleaving.
// - READY and VALID timing is random (a percentage set by READY_PCT).
// - Addresses at or above ERR_BASE answer SLVERR.
// - Every burst is checked for crossing a 4 KB boundary.
// Counters (errors, out_of_order, both_resp) are read by the testbench.
module axi4_slave_model #(
  parameter int unsigned DATA_W    = 32,
  parameter int unsigned ID_W      = 4,
  parameter int unsigned MEM_AW    = 14,          // memory words = 2**MEM_AW
  parameter int unsigned READY_PCT = 70,
  parameter logic [31:0] ERR_BASE  = 32'hFFFF_0000
) (
  input  logic                clk,
  input  logic                resetn,
  input  logic [ID_W-1:0]     AWID,
  input  logic [31:0]         AWADDR,
  input  logic [7:0]          AWLEN,
  input  logic [2:0]          AWSIZE,
  input  logic [1:0]          AWBURST,
  input  logic                AWVALID,
  output logic                AWREADY,
  input  logic [DATA_W-1:0]   WDATA,
  input  logic [DATA_W/8-1:0] WSTRB,
  input  logic                WLAST,
  input  logic                WVALID,
  output logic                WREADY,
  output logic [ID_W-1:0]     BID,
  output logic [1:0]          BRESP,
  output logic                BVALID,
  input  logic                BREADY,
  input  logic [ID_W-1:0]     ARID,
  input  logic [31:0]         ARADDR,
  input  logic [7:0]          ARLEN,
  input  logic [2:0]          ARSIZE,
  input  logic [1:0]          ARBURST,
  input  logic                ARVALID,
  output logic                ARREADY,
  output logic [ID_W-1:0]     RID,
  output logic [DATA_W-1:0]   RDATA,
  output logic [1:0]          RRESP,
  output logic                RLAST,
  output logic                RVALID,
  input  logic                RREADY
);

  localparam int unsigned BPB = DATA_W / 8;

  typedef struct {
    logic [ID_W-1:0] id;
    logic [31:0]     addr;
    int              len;
    logic [1:0]      burst;
  } cmd_t;

  logic [DATA_W-1:0] mem [1 << MEM_AW];
  cmd_t aw_q[$], ar_q[$];
  cmd_t b_q[$];
  cmd_t rcur;
  int   wbeat, rbeat;
  bit   rbusy;

  int errors, out_of_order, both_resp, aw_count, ar_count, splits_seen;

  function automatic int unsigned widx(input logic [31:0] a);
    return (a / BPB) % (1 << MEM_AW);
  endfunction

  function automatic logic [31:0] beat_addr(input cmd_t c, input int n);
    logic [31:0] base, size, start;
    if (c.burst == 2'b10) begin          // WRAP
      size  = (c.len) * BPB;
      start = c.addr & ~(BPB - 1);
      base  = start & ~(size - 1);
      return base + ((start - base + n * BPB) % size);
    end
    return (c.addr & ~(BPB - 1)) + n * BPB;
  endfunction

  function automatic void check_4k(input cmd_t c);
    logic [31:0] first, last;
    if (c.burst == 2'b10) return;
    first = c.addr & ~(BPB - 1);
    last  = first + (c.len - 1) * BPB;
    if (first[31:12] != last[31:12]) begin
      errors++;
      $display("axi4_slave_model: burst at %h len %0d crosses 4KB", c.addr, c.len);
    end
  endfunction

  initial begin
    for (int i = 0; i < (1 << MEM_AW); i++) mem[i] = DATA_W'(i * 32'h01010101 + 32'h5a);
  end

  always @(posedge clk) begin
    if (!resetn) begin
      AWREADY <= 0; WREADY <= 0; BVALID <= 0; ARREADY <= 0; RVALID <= 0;
      RLAST <= 0; BID <= '0; BRESP <= '0; RID <= '0; RDATA <= '0; RRESP <= '0;
      aw_q.delete(); ar_q.delete(); b_q.delete();
      wbeat = 0; rbusy = 0;
    end else begin
      // ---- handshakes of this edge --------------------------------------
      if (AWVALID && AWREADY) begin
        cmd_t c;
        c.id = AWID; c.addr = AWADDR; c.len = int'(AWLEN) + 1; c.burst = AWBURST;
        if (AWSIZE != 3'($clog2(BPB))) begin errors++; $display("axi4_slave_model: AWSIZE"); end
        check_4k(c);
        aw_q.push_back(c);
        aw_count++;
      end
      if (WVALID && WREADY) begin
        cmd_t c;
        int unsigned ix;
        c = aw_q[0];
        ix = widx(beat_addr(c, wbeat));
        for (int b = 0; b < BPB; b++)
          if (WSTRB[b]) mem[ix][8*b +: 8] = WDATA[8*b +: 8];
        if (WLAST != (wbeat == c.len - 1)) begin
          errors++;
          $display("axi4_slave_model: WLAST wrong at beat %0d of %0d", wbeat, c.len);
        end
        if (wbeat == c.len - 1) begin
          b_q.push_back(c);
          void'(aw_q.pop_front());
          wbeat = 0;
        end else wbeat++;
      end
      if (BVALID && BREADY) void'(b_q.pop_front());
      if (ARVALID && ARREADY) begin
        cmd_t c;
        c.id = ARID; c.addr = ARADDR; c.len = int'(ARLEN) + 1; c.burst = ARBURST;
        if (ARSIZE != 3'($clog2(BPB))) begin errors++; $display("axi4_slave_model: ARSIZE"); end
        check_4k(c);
        ar_q.push_back(c);
        ar_count++;
      end
      if (RVALID && RREADY) begin
        if (rbeat == rcur.len - 1) rbusy = 0;
        else rbeat++;
      end
      if (BVALID && RVALID) both_resp++;

      // ---- next outputs ----------------------------------------------------
      AWREADY <= ($urandom_range(99) < READY_PCT);
      ARREADY <= ($urandom_range(99) < READY_PCT);
      WREADY  <= (aw_q.size() > 0) && ($urandom_range(99) < READY_PCT);

      if (b_q.size() > 0 && ((BVALID && !BREADY) || $urandom_range(99) < READY_PCT)) begin
        BVALID <= 1;
        BID    <= b_q[0].id;
        BRESP  <= (b_q[0].addr >= ERR_BASE) ? 2'b10 : 2'b00;
      end else BVALID <= 0;

      if (!rbusy && (ar_q.size() > 1 || (ar_q.size() == 1 && $urandom_range(99) < 25))) begin
        // candidates: the oldest command of each ID
        int cand[$];
        int k;
        cand.delete();
        for (int i = 0; i < ar_q.size(); i++) begin
          bit older;
          older = 0;
          for (int j = 0; j < i; j++) if (ar_q[j].id == ar_q[i].id) older = 1;
          if (!older) cand.push_back(i);
        end
        k = cand[$urandom_range(cand.size() - 1)];
        if (k != 0) out_of_order++;
        rcur = ar_q[k];
        ar_q.delete(k);
        rbusy = 1;
        rbeat = 0;
      end
      if (rbusy && (RVALID ? !RREADY : 1'b1) && !(RVALID && RREADY)) begin
        if (RVALID || $urandom_range(99) < READY_PCT) begin
          RVALID <= 1;
          RID    <= rcur.id;
          RDATA  <= mem[widx(beat_addr(rcur, rbeat))];
          RRESP  <= (rcur.addr >= ERR_BASE) ? 2'b10 : 2'b00;
          RLAST  <= (rbeat == rcur.len - 1);
        end else RVALID <= 0;
      end else if (rbusy) begin
        // previous beat taken: offer the next one
        RVALID <= 1;
        RID    <= rcur.id;
        RDATA  <= mem[widx(beat_addr(rcur, rbeat))];
        RRESP  <= (rcur.addr >= ERR_BASE) ? 2'b10 : 2'b00;
        RLAST  <= (rbeat == rcur.len - 1);
      end else RVALID <= 0;
    end
  end

endmodule
