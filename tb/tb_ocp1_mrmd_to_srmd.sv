// Self-checking testbench of ocp1_mrmd_to_srmd, the MRMD-to-SRMD converter.
//
// An OCP1.0 master issues random read and write MRMD bursts (1, 2, 4 or 8
// beats, one request per beat) into the converter; the OCP2.2 slave model
// (random SCmdAccept/SDataAccept, checks MDataLast against MBurstLength)
// sits on the output. The testbench plays the response buffer: alloc_ready
// is random and alloc_tag counts up on every allocation.
// Checks, per OCP2 request: command, address and length equal the OCP1
// burst, the tag equals the slot being allocated, alloc_len is the burst
// length for a read and 1 for a write; one OCP2 request per burst; the
// written data reach the slave memory (byte enables honoured); the OCP1
// master is stalled while no slot is free.
module tb_ocp1_mrmd_to_srmd;
  import bridge_pkg::*;

  localparam int DATA_W = 32, TAG_W = 2, BL_W = 4, MEM_AW = 14;
  localparam int BPB = DATA_W / 8;

  logic clk = 0, resetn = 0;
  always #5 clk = ~clk;

  logic [2:0]        MCmd = OCP_IDLE;
  logic [31:0]       MAddr = '0;
  logic [2:0]        MBurst = B1_LAST;
  logic [DATA_W-1:0] MData = '0;
  logic [BPB-1:0]    MByteEn = '0;
  logic              SCmdAccept;
  logic [2:0]        o_MCmd, o_MBurstSeq;
  logic [31:0]       o_MAddr;
  logic [BL_W-1:0]   o_MBurstLength;
  logic              o_MBurstSingleReq;
  logic [TAG_W-1:0]  o_MTagID, o_MDataTagID, o_STagID;
  logic              o_SCmdAccept;
  logic [DATA_W-1:0] o_MData, o_SData;
  logic [BPB-1:0]    o_MDataByteEn;
  logic              o_MDataValid, o_MDataLast, o_SDataAccept, o_SRespLast;
  logic [1:0]        o_SResp;
  logic              alloc_valid, alloc_read;
  logic [BL_W-1:0]   alloc_len;
  logic              alloc_ready = 0;
  logic [TAG_W-1:0]  alloc_tag = '0;
  logic              alloc_ok;

  ocp1_mrmd_to_srmd #(.DATA_W(DATA_W), .TAG_W(TAG_W), .BL_W(BL_W)) dut (
    .clk, .resetn, .MCmd, .MAddr, .MBurst, .MData, .MByteEn, .SCmdAccept,
    .o_MCmd, .o_MAddr, .o_MBurstLength, .o_MBurstSeq, .o_MBurstSingleReq, .o_MTagID,
    .o_SCmdAccept, .o_MData, .o_MDataByteEn, .o_MDataValid, .o_MDataLast, .o_MDataTagID,
    .o_SDataAccept, .alloc_valid, .alloc_read, .alloc_len, .alloc_ready, .alloc_tag);

  ocp2_slave_model #(.DATA_W(DATA_W), .TAG_W(TAG_W), .BL_W(BL_W), .MEM_AW(MEM_AW)) slv (
    .clk, .resetn, .MCmd(o_MCmd), .MAddr(o_MAddr), .MBurstLength(o_MBurstLength),
    .MBurstSeq(o_MBurstSeq), .MTagID(o_MTagID), .SCmdAccept(o_SCmdAccept),
    .MData(o_MData), .MDataByteEn(o_MDataByteEn), .MDataValid(o_MDataValid),
    .MDataLast(o_MDataLast), .SDataAccept(o_SDataAccept), .SResp(o_SResp),
    .SData(o_SData), .SRespLast(o_SRespLast), .STagID(o_STagID), .MRespAccept(1'b1));

  int checks = 0, failures = 0;
  assign alloc_ok = alloc_ready;

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

  // response buffer stand-in
  always @(negedge clk) alloc_ready = resetn && ($urandom_range(99) < 60);
  always @(posedge clk) if (alloc_valid && alloc_ready) alloc_tag <= alloc_tag + 1'b1;

  // OCP2 request monitor
  int n_req = 0;
  always @(posedge clk) begin
    if (resetn && o_MCmd != OCP_IDLE && o_SCmdAccept) begin
      checks++;
      if (n_req >= issued.size() + 1) begin
        failures++; $display("OCP2 request without OCP1 burst");
      end else begin
        // the OCP1 burst is recorded when its first request is accepted,
        // which is at or after this OCP2 request: compare with the inputs
        if (o_MAddr !== MAddr || int'(o_MBurstLength) != ocp1_burst_len(MBurst) ||
            o_MCmd !== MCmd || o_MTagID !== alloc_tag || o_MBurstSeq !== SEQ_INCR) begin
          failures++;
          $display("OCP2 request %h/%0d/%0d tag %0d, OCP1 %h/%0d/%0d tag %0d", o_MAddr,
                   o_MBurstLength, o_MCmd, o_MTagID, MAddr, ocp1_burst_len(MBurst), MCmd, alloc_tag);
        end
      end
      n_req++;
    end
    if (resetn && alloc_valid && alloc_ready) begin
      checks++;
      if (alloc_read !== ocp_is_read(MCmd) ||
          int'(alloc_len) != (ocp_is_read(MCmd) ? int'(ocp1_burst_len(MBurst)) : 1)) begin
        failures++; $display("alloc read=%0d len=%0d for MCmd %0d MBurst %0d", alloc_read,
                             alloc_len, MCmd, MBurst);
      end
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    resetn = 1;
    traffic(32'h0000_2000);
    check_memory();
    checks++; if (slv.errors != 0) begin failures++; $display("slave model saw %0d errors", slv.errors); end
    checks++; if (n_req != n_bursts) begin failures++; $display("%0d OCP2 requests for %0d bursts", n_req, n_bursts); end
    checks++; if (n_stall == 0) begin failures++; $display("never stalled on a full buffer"); end
    $display("bursts=%0d stalls=%0d", n_bursts, n_stall);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
