// Self-checking testbench of the OCP1.0-to-OCP2.2 bridge.
//
// An OCP1.0 master (task ocp1_burst) issues MRMD bursts of 1, 2, 4 or 8 beats
// (one request per beat, MBurst = TWO/FOUR/EIGHT on all but the last request,
// LAST on the last one). Behind the bridge sits the OCP2.2 slave model with
// random accept timing that answers different tags out of order. A reference
// memory, updated when a write request is accepted, gives the expected read
// data; OCP1 read responses must come back in request order and writes must
// give no response. Phases: writes, reads of them (burst and single-beat,
// back to back), then the ERR region.
// Checks: every read response (data and SResp), no unexpected responses, one
// OCP2 request per OCP1 burst, MDataLast and burst sequence (slave model),
// and that out-of-order OCP2 responses and tag back-pressure (all response
// slots in use) happened.
module tb_ocp1_ocp2_bridge;
  import bridge_pkg::*;

  localparam int DATA_W = 32, MAX_OUT = 4, MEM_AW = 14;
  localparam int BPB = DATA_W / 8;
  localparam int TAG_W = 2, BL_W = 4;
  localparam logic [31:0] ERR_BASE = 32'h0010_0000;

  logic clk = 0, resetn = 0;
  always #5 clk = ~clk;

  logic [2:0]        MCmd = OCP_IDLE;
  logic [31:0]       MAddr = '0;
  logic [2:0]        MBurst = B1_LAST;
  logic [BPB-1:0]    MByteEn = '0;
  logic [DATA_W-1:0] MData = '0;
  logic              SCmdAccept;
  logic [1:0]        SResp;
  logic [DATA_W-1:0] SData;

  logic [TAG_W-1:0]  o_MTagID, o_MDataTagID, o_STagID;
  logic [2:0]        o_MCmd, o_MBurstSeq;
  logic [31:0]       o_MAddr;
  logic [BL_W-1:0]   o_MBurstLength;
  logic              o_MBurstSingleReq, o_MDataValid, o_MDataLast, o_SCmdAccept;
  logic              o_SDataAccept, o_SRespLast, o_MRespAccept;
  logic [DATA_W-1:0] o_MData, o_SData;
  logic [BPB-1:0]    o_MDataByteEn;
  logic [1:0]        o_SResp;

  ocp1_ocp2_bridge #(.DATA_W(DATA_W), .MAX_OUT(MAX_OUT)) dut (.*);

  ocp2_slave_model #(.DATA_W(DATA_W), .TAG_W(TAG_W), .BL_W(BL_W), .MEM_AW(MEM_AW), .RESP_PCT(20),
                     .ERR_BASE(ERR_BASE)) slv (
    .clk, .resetn, .MCmd(o_MCmd), .MAddr(o_MAddr), .MBurstLength(o_MBurstLength),
    .MBurstSeq(o_MBurstSeq), .MTagID(o_MTagID), .SCmdAccept(o_SCmdAccept),
    .MData(o_MData), .MDataByteEn(o_MDataByteEn), .MDataValid(o_MDataValid),
    .MDataLast(o_MDataLast), .SDataAccept(o_SDataAccept), .SResp(o_SResp),
    .SData(o_SData), .SRespLast(o_SRespLast), .STagID(o_STagID),
    .MRespAccept(o_MRespAccept));

  int checks = 0, failures = 0;
  int n_bursts = 0, n_backpressure = 0;

  // ---- reference memory ----------------------------------------------------
  logic [DATA_W-1:0] ref_mem [int];
  function automatic logic [DATA_W-1:0] ref_rd(input logic [31:0] a);
    int unsigned ix;
    ix = (a / BPB) % (1 << MEM_AW);
    if (ref_mem.exists(ix)) return ref_mem[ix];
    return DATA_W'(ix * 32'h01010101 + 32'h5a);
  endfunction

  typedef struct { logic [DATA_W-1:0] data; logic [1:0] resp; } exp_t;
  exp_t exp_q[$];

  function automatic logic [2:0] burst_code(input int len);
    case (len)
      2: return B1_TWO;
      4: return B1_FOUR;
      8: return B1_EIGHT;
      default: return B1_LAST;
    endcase
  endfunction

  // one OCP1 burst, one request per beat
  task automatic ocp1_burst(input bit rd, input logic [31:0] addr, input int len);
    logic [1:0] r;
    logic [31:0] a;
    r = (addr >= ERR_BASE) ? OCP_ERR : OCP_DVA;
    for (int n = 0; n < len; n++) begin
      a = addr + n * BPB;
      @(negedge clk);
      MCmd    = rd ? OCP_RD : OCP_WR;
      MAddr   = a;
      MBurst  = (n == len - 1) ? B1_LAST : burst_code(len);
      MData   = $urandom;
      MByteEn = ($urandom_range(3) == 0) ? BPB'($urandom) : '1;
      // the accept is sampled mid-cycle, once inputs and registers are settled
      #1;
      while (!SCmdAccept) begin
        if (n == 0 && !dut.alloc_ready) n_backpressure++;
        @(negedge clk); #1;
      end
      @(posedge clk);
      if (rd) exp_q.push_back('{ref_rd(a), r});
      else begin
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

  // response checker: in request order, no handshake
  always @(negedge clk) begin
    #2;   // mid-cycle: the values the next clock edge will see
    if (resetn && SResp != OCP_NULL) begin
      exp_t e;
      checks++;
      if (exp_q.size() == 0) begin
        failures++; $display("unexpected response %0d", SResp);
      end else begin
        e = exp_q.pop_front();
        if (SResp !== e.resp || (e.resp == OCP_DVA && SData !== e.data)) begin
          failures++;
          $display("read: got %h/%0d want %h/%0d", SData, SResp, e.data, e.resp);
        end
      end
    end
  end

  task automatic wait_idle();
    int t;
    t = 0;
    while (exp_q.size() != 0 && t < 20000) begin @(posedge clk); t++; end
    repeat (100) @(posedge clk);
  endtask

  typedef struct { logic [31:0] a; int len; } burst_t;
  burst_t regs[$];

  function automatic burst_t rnd_burst(input logic [31:0] base);
    burst_t b;
    b.len = 1 << $urandom_range(3);
    if ($urandom_range(1)) b.a = base + 32'h1000 - 32'($urandom_range(1, 7)) * BPB;
    else                   b.a = base + 32'($urandom_range(1000)) * BPB;
    return b;
  endfunction

  initial begin
    repeat (3) @(posedge clk);
    resetn = 1;
    for (int i = 0; i < 60; i++) begin
      burst_t b;
      b = rnd_burst(32'h0000_2000 + 32'(i % 4) * 32'h1000);
      regs.push_back(b);
      ocp1_burst(0, b.a, b.len);
    end
    wait_idle();
    foreach (regs[i]) ocp1_burst(1, regs[i].a, regs[i].len);
    foreach (regs[i]) ocp1_burst(1, regs[i].a, regs[i].len);
    // back-to-back single reads: fills every read slot
    for (int i = 0; i < 20; i++) ocp1_burst(1, regs[i].a, 1);
    wait_idle();
    // ERR region
    ocp1_burst(0, ERR_BASE + 32'h0FF8, 4);
    wait_idle();
    ocp1_burst(1, ERR_BASE + 32'h0FF8, 4);
    ocp1_burst(1, ERR_BASE + 32'h0100, 2);
    wait_idle();

    checks++; if (exp_q.size() != 0) begin failures++; $display("%0d responses missing", exp_q.size()); end
    checks++; if (slv.errors != 0) begin failures++; $display("slave model saw %0d errors", slv.errors); end
    checks++; if (slv.reqs != n_bursts) begin
      failures++; $display("OCP2 requests %0d, want %0d", slv.reqs, n_bursts); end
    checks++; if (n_backpressure == 0) begin failures++; $display("response slots never exhausted"); end
    checks++; if (slv.out_of_order == 0) begin failures++; $display("no out-of-order response"); end
    $display("backpressure=%0d ooo=%0d", n_backpressure, slv.out_of_order);
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
