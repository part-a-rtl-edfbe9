// Self-checking testbench of ocp1_axi_resp, the response channel of the
// OCP1.0-to-AXI4 bridge.
//
// Stimulus: read bursts of 1..8 beats are allocated whenever a slot is free
// (alloc_tag becomes the ARID); the testbench, acting as the AXI slave,
// returns their R beats in random order across IDs (in order within an ID),
// sometimes with SLVERR. Write commands are counted in with aw_fire while
// wr_room allows and answered later on B, sometimes in the same cycle as an
// R beat.
// Checks: the OCP1 response stream equals the read beats in allocation order
// (data, DVA/ERR); BREADY is always high and RREADY low while BVALID is high
// (write channel first); wr_room matches the number of outstanding writes;
// allocation refused while full, out-of-order R data and B together with R
// all happened.
module tb_ocp1_axi_resp;
  import bridge_pkg::*;

  localparam int DATA_W = 32, ID_W = 4, MAX_RD = 4, MAX_WR = 4, MAX_BEATS = 8;
  localparam int TAG_W = 2, BL_W = 4;
  localparam int N = 400;

  logic clk = 0, resetn = 0;
  always #5 clk = ~clk;

  logic              alloc_valid = 0;
  logic [BL_W-1:0]   alloc_len = '0;
  logic              alloc_ready;
  logic [TAG_W-1:0]  alloc_tag;
  logic              aw_fire = 0;
  logic              wr_room;
  logic [ID_W-1:0]   BID = '0, RID = '0;
  logic [1:0]        BRESP = '0, RRESP = '0;
  logic              BVALID = 0, BREADY, RLAST = 0, RVALID = 0, RREADY;
  logic [DATA_W-1:0] RDATA = '0;
  logic [1:0]        SResp;
  logic [DATA_W-1:0] SData;

  ocp1_axi_resp #(.DATA_W(DATA_W), .ID_W(ID_W), .MAX_RD(MAX_RD), .MAX_WR(MAX_WR),
                  .MAX_BEATS(MAX_BEATS)) dut (.*);

  int checks = 0, failures = 0, n_full = 0, n_ooo = 0, n_both = 0;

  int                len_a  [N];
  int                tag_a  [N];
  int                sent_a [N];
  logic [DATA_W-1:0] data_a [N][MAX_BEATS];
  logic [1:0]        resp_a [N][MAX_BEATS];
  int n_alloc = 0, wr_out = 0, wr_pending_b = 0;
  int live[$];

  // read allocation and write commands
  initial begin
    @(posedge resetn);
    while (n_alloc < N) begin
      @(negedge clk);
      alloc_valid = ($urandom_range(99) < 60);
      alloc_len   = BL_W'($urandom_range(1, MAX_BEATS));
      aw_fire     = wr_room && ($urandom_range(99) < 20);
      #1;
      if (alloc_valid && !alloc_ready) n_full++;
      checks++;
      if (wr_room !== (wr_out + 2 <= MAX_WR)) begin
        failures++; $display("wr_room %0d with %0d writes outstanding", wr_room, wr_out);
      end
      @(posedge clk);
      if (aw_fire) begin wr_out++; wr_pending_b++; end
      if (alloc_valid && alloc_ready) begin
        len_a[n_alloc] = int'(alloc_len); tag_a[n_alloc] = int'(alloc_tag); sent_a[n_alloc] = 0;
        live.push_back(n_alloc);
        n_alloc++;
      end
    end
    @(negedge clk); alloc_valid = 0; aw_fire = 0;
  end

  // AXI slave side: R beats and B responses
  initial begin
    int s, k;
    bit hold_r;
    hold_r = 0;
    s = 0;
    @(posedge resetn);
    forever begin
      @(negedge clk);
      // B
      if (!(BVALID && !BREADY)) begin
        BVALID = (wr_pending_b > 0) && ($urandom_range(99) < 30);
        BID    = ID_W'($urandom);
        BRESP  = 2'($urandom);
      end
      // R: keep the beat until taken
      if (!hold_r) begin
        RVALID = 0;
        if (live.size() > 0 && $urandom_range(99) < 70) begin
          k = $urandom_range(live.size() - 1);
          s = live[k];
          if (k != 0) n_ooo++;
          RVALID = 1;
          RID    = ID_W'(tag_a[s]);
          RDATA  = $urandom;
          RRESP  = ($urandom_range(9) == 0) ? 2'b10 : 2'b00;
          RLAST  = (sent_a[s] == len_a[s] - 1);
          data_a[s][sent_a[s]] = RDATA;
          resp_a[s][sent_a[s]] = axi_to_ocp_resp(RRESP);
          sent_a[s]++;
          if (sent_a[s] == len_a[s]) live.delete(k);
        end
      end
      #1;
      checks++;
      if (BREADY !== 1'b1 || RREADY !== !BVALID) begin
        failures++; $display("ready rule broken: BREADY=%0d RREADY=%0d BVALID=%0d", BREADY, RREADY, BVALID);
      end
      if (BVALID && RVALID) n_both++;
      @(posedge clk);
      hold_r = RVALID && !RREADY;
      if (BVALID && BREADY) begin wr_out--; wr_pending_b--; end
    end
  end

  // OCP1 response checker
  int head = 0, beat = 0;
  always @(negedge clk) begin
    #2;   // mid-cycle: the values the next clock edge will see
    if (resetn && SResp != OCP_NULL) begin
      checks++;
      if (head >= n_alloc || beat >= sent_a[head]) begin
        failures++; $display("response before its data arrived");
      end else if (SResp !== resp_a[head][beat] ||
                   (SResp == OCP_DVA && SData !== data_a[head][beat])) begin
        failures++;
        $display("burst %0d beat %0d: got %0d/%h want %0d/%h", head, beat, SResp, SData,
                 resp_a[head][beat], data_a[head][beat]);
      end
      beat++;
      if (head < n_alloc && beat == len_a[head]) begin head++; beat = 0; end
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    resetn = 1;
    wait (n_alloc == N);
    repeat (300) @(posedge clk);
    checks++; if (head != N) begin failures++; $display("only %0d of %0d bursts returned", head, N); end
    checks++; if (n_full == 0) begin failures++; $display("read slots never full"); end
    checks++; if (n_ooo == 0) begin failures++; $display("no out-of-order R data"); end
    checks++; if (n_both == 0) begin failures++; $display("B never together with R"); end
    $display("full=%0d ooo=%0d both=%0d", n_full, n_ooo, n_both);
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
