// Self-checking testbench of ocp2_axi_resp_comb, the 4 KB response combining
// block of the OCP2.2-to-AXI4 bridge.
//
// The testbench allocates transactions the way the splitting block does
// (alloc pulse with direction, tag and split flag, only on a tag free in both
// directions, at most MAX_OUT), then acts as the AXI slave: a write gets one
// B (two for a split, first half first), a read gets its R beats (two RLAST-
// terminated halves for a split). Responses of different tags are returned
// in random order, same-tag ones in order; codes are mostly OKAY, sometimes
// SLVERR. MRespAccept is random.
// Checks per tag: a write gives exactly one OCP response, SRespLast high,
// ERR if either half was SLVERR; a read gives every beat in order with its
// data, ERR for SLVERR beats, SRespLast only on the very last beat. Also
// checked: busy_w/busy_r and outstanding match the live transactions, the
// ready outputs never take a response that is not forwarded or absorbed,
// and splits, write priority (B chosen while R waits) and back-pressure
// from MRespAccept all happened.
module tb_ocp2_axi_resp_comb;
  import bridge_pkg::*;

  localparam int DATA_W = 32, ID_W = 4, MAX_OUT = 8;
  localparam int NT = 1 << ID_W;
  localparam int OW = $clog2(MAX_OUT + 1);
  localparam int N = 500;

  logic clk = 0, resetn = 0;
  always #5 clk = ~clk;

  logic              alloc_valid = 0, alloc_read = 0, alloc_split = 0;
  logic [ID_W-1:0]   alloc_id = '0;
  logic [NT-1:0]     busy_w, busy_r;
  logic [OW-1:0]     outstanding;
  logic [ID_W-1:0]   BID = '0, RID = '0;
  logic [1:0]        BRESP = '0, RRESP = '0;
  logic              BVALID = 0, BREADY, RLAST = 0, RVALID = 0, RREADY;
  logic [DATA_W-1:0] RDATA = '0;
  logic [1:0]        SResp;
  logic [DATA_W-1:0] SData;
  logic [ID_W-1:0]   STagID;
  logic              SRespLast;
  logic              MRespAccept = 0;

  ocp2_axi_resp_comb #(.DATA_W(DATA_W), .ID_W(ID_W), .MAX_OUT(MAX_OUT)) dut (.*);

  int checks = 0, failures = 0, n_split = 0, n_wpri = 0, n_hold = 0;

  // AXI responses still to send, per tag: one entry per B or R beat
  typedef struct { bit rd; logic [1:0] resp; logic [DATA_W-1:0] data; bit last; } axr_t;
  axr_t axi_q [NT][$];
  // expected OCP responses per tag
  typedef struct { logic [1:0] resp; logic [DATA_W-1:0] data; bit last; bit rd; } exp_t;
  exp_t exp_q [NT][$];
  bit live_w [NT], live_r [NT];
  int n_live = 0, n_alloc = 0;

  // allocation
  initial begin
    @(posedge resetn);
    while (n_alloc < N) begin
      int t;
      bit rd, sp;
      @(negedge clk);
      alloc_valid = 0;
      t  = $urandom_range(NT - 1);
      rd = $urandom_range(1);
      sp = ($urandom_range(2) == 0);
      if (!live_w[t] && !live_r[t] && n_live < MAX_OUT && $urandom_range(99) < 50) begin
        int l1, l2;
        logic [1:0] r1, r2;
        alloc_valid = 1; alloc_read = rd; alloc_split = sp; alloc_id = ID_W'(t);
        @(posedge clk);
        n_alloc++; n_live++;
        if (sp) n_split++;
        if (rd) begin
          live_r[t] = 1;
          l1 = $urandom_range(1, 4);
          l2 = sp ? $urandom_range(1, 4) : 0;
          for (int n = 0; n < l1 + l2; n++) begin
            axr_t a;
            a.rd = 1; a.data = $urandom; a.resp = ($urandom_range(9) == 0) ? 2'b10 : 2'b00;
            a.last = (n == l1 - 1) || (n == l1 + l2 - 1);
            axi_q[t].push_back(a);
            exp_q[t].push_back('{axi_to_ocp_resp(a.resp), a.data, n == l1 + l2 - 1, 1'b1});
          end
        end else begin
          live_w[t] = 1;
          r1 = ($urandom_range(5) == 0) ? 2'b10 : 2'b00;
          r2 = ($urandom_range(5) == 0) ? 2'b10 : 2'b00;
          axi_q[t].push_back('{1'b0, r1, '0, 1'b1});
          if (sp) axi_q[t].push_back('{1'b0, r2, '0, 1'b1});
          exp_q[t].push_back('{sp ? ocp_resp_merge(axi_to_ocp_resp(r1), axi_to_ocp_resp(r2))
                                  : axi_to_ocp_resp(r1), '0, 1'b1, 1'b0});
        end
      end
    end
    @(negedge clk); alloc_valid = 0;
  end

  // AXI slave side: B and R, each held until taken. Handshakes are sampled
  // mid-cycle, when everything the next clock edge will see is settled.
  bit b_take, r_take;
  initial begin
    @(posedge resetn);
    forever begin
      @(negedge clk);
      // a response taken at the last edge leaves now (not at the edge itself)
      if (b_take) begin void'(axi_q[BID].pop_front()); BVALID = 0; end
      if (r_take) begin void'(axi_q[RID].pop_front()); RVALID = 0; end
      MRespAccept = ($urandom_range(99) < 70);
      if (!BVALID) begin
        int c[$];
        c.delete();
        for (int t = 0; t < NT; t++) if (axi_q[t].size() > 0 && !axi_q[t][0].rd) c.push_back(t);
        if (c.size() > 0 && $urandom_range(99) < 40) begin
          int t;
          t = c[$urandom_range(c.size() - 1)];
          BVALID = 1; BID = ID_W'(t); BRESP = axi_q[t][0].resp;
        end
      end
      if (!RVALID) begin
        int c[$];
        c.delete();
        for (int t = 0; t < NT; t++) if (axi_q[t].size() > 0 && axi_q[t][0].rd) c.push_back(t);
        if (c.size() > 0 && $urandom_range(99) < 60) begin
          int t;
          t = c[$urandom_range(c.size() - 1)];
          RVALID = 1; RID = ID_W'(t); RDATA = axi_q[t][0].data; RRESP = axi_q[t][0].resp;
          RLAST = axi_q[t][0].last;
        end
      end
      #1;
      if (BVALID && RVALID && BREADY && !RREADY) n_wpri++;
      if (SResp != OCP_NULL && !MRespAccept) n_hold++;
      b_take = BVALID && BREADY;
      r_take = RVALID && RREADY;
      @(posedge clk);
    end
  end

  // OCP response checker (sampled mid-cycle, before the edge that takes the
  // response) and table checks
  always @(negedge clk) begin
    #2;
    if (resetn) begin
      if (SResp != OCP_NULL && MRespAccept) begin
        exp_t e;
        checks++;
        if (exp_q[STagID].size() == 0) begin
          failures++; $display("unexpected response tag %0d", STagID);
        end else begin
          e = exp_q[STagID].pop_front();
          if (SResp !== e.resp || SRespLast !== e.last || (e.rd && SData !== e.data)) begin
            failures++;
            $display("tag %0d: got %0d/%0d/%h want %0d/%0d/%h", STagID, SResp, SRespLast, SData,
                     e.resp, e.last, e.data);
          end
          if (e.last) begin
            n_live--;
            if (e.rd) live_r[STagID] = 0; else live_w[STagID] = 0;
          end
        end
      end
    end
  end
  always @(negedge clk) begin
    if (resetn) begin
      checks++;
      for (int t = 0; t < NT; t++)
        if (busy_w[t] !== live_w[t] || busy_r[t] !== live_r[t]) begin
          failures++; $display("busy flags of tag %0d: %0d%0d want %0d%0d", t, busy_w[t],
                               busy_r[t], live_w[t], live_r[t]);
          break;
        end
      if (int'(outstanding) != n_live) begin
        failures++; $display("outstanding %0d want %0d", outstanding, n_live);
      end
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    resetn = 1;
    wait (n_alloc == N);
    repeat (300) @(posedge clk);
    checks++; if (n_live != 0) begin failures++; $display("%0d transactions unanswered", n_live); end
    checks++; if (n_split == 0) begin failures++; $display("no split transaction"); end
    checks++; if (n_wpri == 0) begin failures++; $display("write priority never used"); end
    checks++; if (n_hold == 0) begin failures++; $display("MRespAccept never low"); end
    $display("splits=%0d write_priority=%0d held=%0d", n_split, n_wpri, n_hold);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
