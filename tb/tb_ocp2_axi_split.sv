// Self-checking testbench of ocp2_axi_split, the splitting logic of the
// OCP2.2-to-AXI4 bridge.
//
// An OCP2.2 master issues random tagged bursts: INCR of 1..32 beats (many
// close to a 4 KB page end, some starting at an unaligned byte address) and
// WRAP of 2/4/8 beats. The testbench plays the response combining block and
// the write-length queue: busy_w/busy_r, outstanding and wq_ready are random
// every cycle; AWREADY/ARREADY are random.
// Checks:
//  - a command is accepted only if its tag is free in both directions, the
//    outstanding count is below MAX_OUT and the block is idle; with the
//    accept, alloc_* report direction, tag and whether a split happens;
//  - the AXI commands (per channel, in order) equal the expected ones: one
//    command with the OCP2 address/length/type, or two INCR commands split
//    at the 4 KB boundary, with AxID = tag and AxSIZE = 2;
//  - AWVALID only with wq_ready (the testbench keeps wq_ready high while an
//    AW waits, as the bridge's write-length queue does).
// It must also see splits, WRAP bursts and refusals because of a busy tag.
module tb_ocp2_axi_split;
  import bridge_pkg::*;

  localparam int DATA_W = 32, ID_W = 4, BL_W = 8, MAX_OUT = 8;
  localparam int BPB = DATA_W / 8;
  localparam int OW = $clog2(MAX_OUT + 1);

  logic clk = 0, resetn = 0;
  always #5 clk = ~clk;

  logic [2:0]        MCmd = OCP_IDLE;
  logic [31:0]       MAddr = '0;
  logic [BL_W-1:0]   MBurstLength = '0;
  logic [2:0]        MBurstSeq = SEQ_INCR;
  logic              MBurstSingleReq = 1'b1;
  logic [ID_W-1:0]   MTagID = '0;
  logic              SCmdAccept;
  logic [ID_W-1:0]   AWID, ARID;
  logic [31:0]       AWADDR, ARADDR;
  logic [7:0]        AWLEN, ARLEN;
  logic [2:0]        AWSIZE, ARSIZE;
  logic [1:0]        AWBURST, ARBURST;
  logic              AWVALID, ARVALID;
  logic              AWREADY = 0, ARREADY = 0;
  logic [(1<<ID_W)-1:0] busy_w = '0, busy_r = '0;
  logic [OW-1:0]     outstanding = '0;
  logic              wq_ready = 0;
  logic              alloc_valid, alloc_read, alloc_split;
  logic [ID_W-1:0]   alloc_id;

  ocp2_axi_split #(.DATA_W(DATA_W), .ID_W(ID_W), .BL_W(BL_W), .MAX_OUT(MAX_OUT)) dut (.*);

  int checks = 0, failures = 0, n_split = 0, n_wrap = 0, n_busy = 0;

  typedef struct { logic [31:0] a; int len; logic [1:0] burst; logic [ID_W-1:0] id; } axcmd_t;
  axcmd_t exp_aw[$], exp_ar[$], got_aw[$], got_ar[$];

  logic aw_wait = 0;
  always @(posedge clk) aw_wait <= AWVALID && !AWREADY;

  // environment: random status inputs and readies
  always @(negedge clk) begin
    busy_w      = resetn ? (1 << ID_W)'({$urandom, $urandom}) & (1 << ID_W)'({$urandom, $urandom}) : '0;
    busy_r      = resetn ? (1 << ID_W)'({$urandom, $urandom}) & (1 << ID_W)'({$urandom, $urandom}) : '0;
    outstanding = OW'($urandom_range(MAX_OUT));
    // like the bridge's write-length queue: it cannot fill while an AW waits
    wq_ready    = aw_wait || ($urandom_range(99) < 70);
    AWREADY     = ($urandom_range(99) < 70);
    ARREADY     = ($urandom_range(99) < 70);
  end

  always @(posedge clk) begin
    if (resetn && ARVALID && ARREADY) got_ar.push_back('{ARADDR, int'(ARLEN) + 1, ARBURST, ARID});
    if (resetn && AWVALID && AWREADY) got_aw.push_back('{AWADDR, int'(AWLEN) + 1, AWBURST, AWID});
    if (resetn && AWVALID && !wq_ready) begin checks++; failures++; $display("AWVALID without wq_ready"); end
    if (resetn && ((ARVALID && ARSIZE != 3'd2) || (AWVALID && AWSIZE != 3'd2))) begin
      checks++; failures++; $display("AxSIZE not 4 bytes");
    end
  end

  task automatic burst(input bit rd, input logic [31:0] addr, input int len,
                       input logic [2:0] seq, input logic [ID_W-1:0] tag);
    int first;
    bit crosses, ok;
    @(negedge clk);
    MCmd = rd ? OCP_RD : OCP_WR; MAddr = addr; MBurstLength = BL_W'(len);
    MBurstSeq = seq; MTagID = tag;
    first   = (4096 - int'({addr[11:2], 2'b00})) / BPB;
    crosses = (seq != SEQ_WRAP) && (first < len);
    forever begin
      #1;
      ok = !busy_w[tag] && !busy_r[tag] && (int'(outstanding) < MAX_OUT) &&
           (dut.state_q == dut.S_IDLE);
      checks++;
      if (SCmdAccept !== ok) begin
        failures++; $display("SCmdAccept %0d, expected %0d", SCmdAccept, ok);
      end
      if (!SCmdAccept && (busy_w[tag] || busy_r[tag])) n_busy++;
      if (SCmdAccept) begin
        checks++;
        if (alloc_valid !== 1'b1 || alloc_read !== rd || alloc_split !== crosses ||
            alloc_id !== tag) begin
          failures++; $display("alloc %0d/%0d/%0d/%0d want 1/%0d/%0d/%0d", alloc_valid,
                               alloc_read, alloc_split, alloc_id, rd, crosses, tag);
        end
        break;
      end
      @(negedge clk);
    end
    @(posedge clk);
    if (crosses) begin
      n_split++;
      if (rd) begin
        exp_ar.push_back('{addr, first, AXI_INCR, tag});
        exp_ar.push_back('{{addr[31:12] + 20'd1, 12'h000}, len - first, AXI_INCR, tag});
      end else begin
        exp_aw.push_back('{addr, first, AXI_INCR, tag});
        exp_aw.push_back('{{addr[31:12] + 20'd1, 12'h000}, len - first, AXI_INCR, tag});
      end
    end else begin
      if (seq == SEQ_WRAP) n_wrap++;
      if (rd) exp_ar.push_back('{addr, len, seq == SEQ_WRAP ? AXI_WRAP : AXI_INCR, tag});
      else    exp_aw.push_back('{addr, len, seq == SEQ_WRAP ? AXI_WRAP : AXI_INCR, tag});
    end
    @(negedge clk);
    MCmd = OCP_IDLE;
  endtask

  task automatic compare_cmds(input string ch, ref axcmd_t e[$], ref axcmd_t g[$]);
    checks++;
    if (e.size() != g.size()) begin
      failures++; $display("%s: %0d commands, want %0d", ch, g.size(), e.size());
    end
    foreach (e[i]) if (i < g.size()) begin
      checks++;
      if (e[i].a !== g[i].a || e[i].len != g[i].len || e[i].burst !== g[i].burst ||
          e[i].id !== g[i].id) begin
        failures++;
        $display("%s %0d: %h/%0d/%0d/%0d want %h/%0d/%0d/%0d", ch, i, g[i].a, g[i].len,
                 g[i].burst, g[i].id, e[i].a, e[i].len, e[i].burst, e[i].id);
      end
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    resetn = 1;
    for (int i = 0; i < 400; i++) begin
      logic [31:0] a;
      int len;
      logic [2:0] seq;
      if ($urandom_range(4) == 0) begin
        seq = SEQ_WRAP;
        len = 2 << $urandom_range(2);
        a   = 32'h0001_0000 + 32'($urandom_range(1023)) * BPB;
      end else begin
        seq = SEQ_INCR;
        len = $urandom_range(1, 32);
        a   = 32'h0001_0000 + 32'($urandom_range(15)) * 32'h1000;
        if ($urandom_range(1)) a = a + 32'h1000 - 32'($urandom_range(1, 40)) * BPB;
        else                   a = a + 32'($urandom_range(1000)) * BPB;
        if ($urandom_range(7) == 0) a = a + 32'($urandom_range(1, 3));   // unaligned start
      end
      burst($urandom_range(1), a, len, seq, ID_W'($urandom));
    end
    repeat (50) @(posedge clk);
    compare_cmds("AR", exp_ar, got_ar);
    compare_cmds("AW", exp_aw, got_aw);
    checks++; if (n_split == 0) begin failures++; $display("no 4KB split"); end
    checks++; if (n_wrap == 0) begin failures++; $display("no WRAP burst"); end
    checks++; if (n_busy == 0) begin failures++; $display("never refused a busy tag"); end
    $display("splits=%0d wraps=%0d busy_refusals=%0d", n_split, n_wrap, n_busy);
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
