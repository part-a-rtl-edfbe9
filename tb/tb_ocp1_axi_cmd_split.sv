// Self-checking testbench of ocp1_axi_cmd_split, the command splitting
// logic of the OCP1.0-to-AXI4 bridge.
//
// An OCP1.0 master issues random read and write MRMD bursts (1, 2, 4 or 8
// beats, many near a 4 KB page end) into the block; the AXI4 slave model
// (random ready timing, checks 4 KB crossing, AxSIZE and WLAST) sits on the
// AXI side. The testbench plays the response channel: alloc_ready and
// wr_room are random and alloc_tag counts up on every read allocation.
// Checks: for every burst the AXI commands (one, or two at a 4 KB crossing)
// have the burst's addresses and lengths, INCR type, ARID = the slot tag of
// the read and the two halves share one ID; the number of AXI commands is
// bursts + splits; the written data reach the slave memory; the master is
// stalled while no slot / no write room is free.
module tb_ocp1_axi_cmd_split;
  import bridge_pkg::*;

  localparam int DATA_W = 32, ID_W = 4, TAG_W = 2, BL_W = 4, MEM_AW = 14;
  localparam int BPB = DATA_W / 8;

  logic clk = 0, resetn = 0;
  always #5 clk = ~clk;

  logic [2:0]        MCmd = OCP_IDLE;
  logic [31:0]       MAddr = '0;
  logic [2:0]        MBurst = B1_LAST;
  logic [DATA_W-1:0] MData = '0;
  logic [BPB-1:0]    MByteEn = '0;
  logic              SCmdAccept;
  logic [ID_W-1:0] AWID, BID, ARID, RID;
  logic [31:0] AWADDR, ARADDR;
  logic [7:0] AWLEN, ARLEN;
  logic [2:0] AWSIZE, ARSIZE;
  logic [1:0] AWBURST, ARBURST, BRESP, RRESP;
  logic AWVALID, AWREADY, WLAST, WVALID, WREADY, BVALID;
  logic ARVALID, ARREADY, RLAST, RVALID;
  logic [DATA_W-1:0] WDATA, RDATA;
  logic [BPB-1:0] WSTRB;
  logic              alloc_valid;
  logic [BL_W-1:0]   alloc_len;
  logic              alloc_ready = 0, wr_room = 0;
  logic [TAG_W-1:0]  alloc_tag = '0;
  logic              alloc_ok;

  ocp1_axi_cmd_split #(.DATA_W(DATA_W), .ID_W(ID_W), .TAG_W(TAG_W), .BL_W(BL_W)) dut (
    .clk, .resetn, .MCmd, .MAddr, .MBurst, .MByteEn, .MData, .SCmdAccept,
    .AWID, .AWADDR, .AWLEN, .AWSIZE, .AWBURST, .AWVALID, .AWREADY,
    .WDATA, .WSTRB, .WLAST, .WVALID, .WREADY,
    .ARID, .ARADDR, .ARLEN, .ARSIZE, .ARBURST, .ARVALID, .ARREADY,
    .alloc_valid, .alloc_len, .alloc_ready, .alloc_tag, .wr_room);

  axi4_slave_model #(.DATA_W(DATA_W), .ID_W(ID_W), .MEM_AW(MEM_AW)) slv (
    .clk, .resetn, .AWID, .AWADDR, .AWLEN, .AWSIZE, .AWBURST, .AWVALID, .AWREADY,
    .WDATA, .WSTRB, .WLAST, .WVALID, .WREADY, .BID, .BRESP, .BVALID, .BREADY(1'b1),
    .ARID, .ARADDR, .ARLEN, .ARSIZE, .ARBURST, .ARVALID, .ARREADY,
    .RID, .RDATA, .RRESP, .RLAST, .RVALID, .RREADY(1'b1));

  int checks = 0, failures = 0;
  assign alloc_ok = ocp_is_read(MCmd) ? alloc_ready : wr_room;

  function automatic logic [2:0] burst_code(input int len);
    case (len)
      2: return B1_TWO;
      4: return B1_FOUR;
      8: return B1_EIGHT;
      default: return B1_LAST;
    endcase
  endfunction

  logic [DATA_W-1:0] ref_mem [int];
  function automatic logic [DATA_W-1:0] ref_rd(input logic [31:0] a);
    int unsigned ix;
    ix = (a / BPB) % (1 << MEM_AW);
    if (ref_mem.exists(ix)) return ref_mem[ix];
    return DATA_W'(ix * 32'h01010101 + 32'h5a);
  endfunction

  typedef struct { logic [31:0] a; int len; bit rd; } burst_t;
  burst_t issued[$];     // bursts in the order their first request was accepted
  int n_bursts = 0, n_split = 0, n_stall = 0;

  // one OCP1 burst, one request per beat
  task automatic ocp1_burst(input bit rd, input logic [31:0] addr, input int len);
    logic [31:0] a;
    if ((addr[11:0] + len * BPB) > 4096) n_split++;
    for (int n = 0; n < len; n++) begin
      a = addr + n * BPB;
      @(negedge clk);
      MCmd    = rd ? OCP_RD : OCP_WR;
      MAddr   = a;
      MBurst  = (n == len - 1) ? B1_LAST : burst_code(len);
      MData   = $urandom;
      MByteEn = ($urandom_range(3) == 0) ? BPB'($urandom) : '1;
      #1;
      while (!SCmdAccept) begin
        if (n == 0 && !alloc_ok) n_stall++;
        @(negedge clk); #1;
      end
      @(posedge clk);
      if (n == 0) issued.push_back('{addr, len, rd});
      if (!rd) begin
        logic [DATA_W-1:0] v;
        v = ref_rd(a);
        for (int b = 0; b < BPB; b++) if (MByteEn[b]) v[8*b +: 8] = MData[8*b +: 8];
        ref_mem[(a / BPB) % (1 << MEM_AW)] = v;
      end
    end
    n_bursts++;
    @(negedge clk);
    MCmd = OCP_IDLE;
  endtask

  function automatic burst_t rnd_burst(input logic [31:0] base, input bit rd);
    burst_t b;
    b.rd  = rd;
    b.len = 1 << $urandom_range(3);
    if ($urandom_range(1)) b.a = base + 32'h1000 - 32'($urandom_range(1, 7)) * BPB;
    else                   b.a = base + 32'($urandom_range(1000)) * BPB;
    return b;
  endfunction

  // every written word must be in the slave memory
  task automatic check_memory();
    foreach (ref_mem[ix]) begin
      checks++;
      if (slv.mem[ix] !== ref_mem[ix]) begin
        failures++; $display("memory word %0d: %h want %h", ix, slv.mem[ix], ref_mem[ix]);
      end
    end
  endtask

  task automatic traffic(input logic [31:0] base);
    burst_t regs[$];
    for (int i = 0; i < 80; i++) begin
      burst_t b;
      b = rnd_burst(base + 32'(i % 4) * 32'h1000, $urandom_range(2) == 0);
      regs.push_back(b);
      ocp1_burst(b.rd, b.a, b.len);
    end
    for (int i = 0; i < 20; i++) ocp1_burst($urandom_range(1), regs[i].a, 1);
    repeat (300) @(posedge clk);
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // response channel stand-in
  always @(negedge clk) begin
    alloc_ready = resetn && ($urandom_range(99) < 60);
    wr_room     = resetn && ($urandom_range(99) < 60);
  end
  logic [TAG_W-1:0] rd_tags[$];
  always @(posedge clk) if (alloc_valid && alloc_ready) begin
    checks++;
    if (int'(alloc_len) != int'(ocp1_burst_len(MBurst))) begin
      failures++; $display("alloc_len %0d for MBurst %0d", alloc_len, MBurst);
    end
    rd_tags.push_back(alloc_tag);
    alloc_tag <= alloc_tag + 1'b1;
  end

  // expected AXI commands of a burst
  typedef struct { logic [31:0] a; int len; } axcmd_t;
  function automatic void expect_cmds(input burst_t b, ref axcmd_t q[$]);
    int first;
    first = (4096 - int'(b.a[11:0])) / BPB;
    if (first < b.len) begin
      q.push_back('{b.a, first});
      q.push_back('{{b.a[31:12] + 20'd1, 12'h000}, b.len - first});
    end else q.push_back('{b.a, b.len});
  endfunction

  axcmd_t exp_aw[$], exp_ar[$], got_aw[$], got_ar[$];
  always @(posedge clk) begin
    if (resetn && ARVALID && ARREADY) got_ar.push_back('{ARADDR, int'(ARLEN) + 1});
    if (resetn && AWVALID && AWREADY) got_aw.push_back('{AWADDR, int'(AWLEN) + 1});
    if (resetn && ((ARVALID && ARREADY && ARBURST != AXI_INCR) ||
                   (AWVALID && AWREADY && AWBURST != AXI_INCR))) begin
      checks++; failures++; $display("burst type not INCR");
    end
  end

  task automatic compare_cmds(input string ch, ref axcmd_t e[$], ref axcmd_t g[$]);
    checks++;
    if (e.size() != g.size()) begin
      failures++; $display("%s: %0d commands, want %0d", ch, g.size(), e.size());
    end
    foreach (e[i]) if (i < g.size()) begin
      checks++;
      if (e[i].a !== g[i].a || e[i].len != g[i].len) begin
        failures++; $display("%s %0d: %h/%0d want %h/%0d", ch, i, g[i].a, g[i].len, e[i].a, e[i].len);
      end
    end
  endtask

  // ARID: the slot tag of the read (both halves)
  logic [ID_W-1:0] arids[$];
  always @(posedge clk) if (resetn && ARVALID && ARREADY) arids.push_back(ARID);

  initial begin
    repeat (3) @(posedge clk);
    resetn = 1;
    traffic(32'h0000_2000);
    check_memory();
    foreach (issued[i]) begin
      if (issued[i].rd) expect_cmds(issued[i], exp_ar);
      else              expect_cmds(issued[i], exp_aw);
    end
    compare_cmds("AR", exp_ar, got_ar);
    compare_cmds("AW", exp_aw, got_aw);
    // ARIDs: one or two per read burst, equal to the allocated tags
    begin
      int k;
      k = 0;
      foreach (issued[i]) if (issued[i].rd) begin
        int halves;
        halves = ((4096 - int'(issued[i].a[11:0])) / BPB < issued[i].len) ? 2 : 1;
        for (int h = 0; h < halves; h++) begin
          checks++;
          if (k >= arids.size() || arids[k] !== ID_W'(rd_tags[0])) begin
            failures++; $display("ARID mismatch for read burst %0d", i);
          end
          k++;
        end
        void'(rd_tags.pop_front());
      end
    end
    checks++; if (slv.errors != 0) begin failures++; $display("slave model saw %0d errors", slv.errors); end
    checks++; if (slv.aw_count + slv.ar_count != n_bursts + n_split) begin
      failures++; $display("AXI commands %0d, want %0d", slv.aw_count + slv.ar_count, n_bursts + n_split); end
    checks++; if (n_split == 0) begin failures++; $display("no 4KB split"); end
    checks++; if (n_stall == 0) begin failures++; $display("never stalled"); end
    $display("bursts=%0d splits=%0d stalls=%0d", n_bursts, n_split, n_stall);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
