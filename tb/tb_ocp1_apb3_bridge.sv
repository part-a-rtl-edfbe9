// Self-checking testbench of the OCP1.0-to-APB3 bridge.
//
// An OCP1.0 master issues single requests: posted writes (WR), non-posted
// writes (WRNP) and reads (RD), most inside the APB slave's address window
// and some outside it. Behind the bridge sits the APB3 slave model with
// random PREADY wait states. A reference memory gives the expected read data.
// The response is expected in the cycle the request is accepted:
//   RD / WRNP inside the window : DVA (with the read data);
//   RD / WRNP outside           : ERR, and no APB transfer;
//   WR                          : no response.
// Checks: every accept cycle (response code and data), no response outside
// an accept, APB sequencing (slave model), the number of APB transfers, and
// that wait states, back-to-back ENABLE -> SETUP transfers and decode-miss
// errors all happened.
module tb_ocp1_apb3_bridge;
  import bridge_pkg::*;

  localparam int DATA_W = 32, MEM_AW = 10;
  localparam int BPB = DATA_W / 8;
  localparam logic [31:0] SLV_BASE = 32'h0004_0000;
  localparam logic [31:0] SLV_MASK = 32'hFFFF_0000;

  logic clk = 0, resetn = 0;
  always #5 clk = ~clk;

  logic [2:0]        MCmd = OCP_IDLE;
  logic [31:0]       MAddr = '0;
  logic [2:0]        MBurst = B1_LAST;
  logic [DATA_W-1:0] MData = '0;
  logic [BPB-1:0]    MByteEn = '1;
  logic              SCmdAccept;
  logic [1:0]        SResp;
  logic [DATA_W-1:0] SData;
  logic [31:0]       PADDR;
  logic              PWRITE, PSEL, PENABLE, PREADY;
  logic [DATA_W-1:0] PWDATA, PRDATA;

  ocp1_apb3_bridge #(.DATA_W(DATA_W), .SLV_BASE(SLV_BASE), .SLV_MASK(SLV_MASK)) dut (.*);

  apb3_slave_model #(.DATA_W(DATA_W), .MEM_AW(MEM_AW)) slv (
    .clk, .resetn, .PADDR, .PWRITE, .PSEL, .PENABLE, .PWDATA, .PREADY, .PRDATA);

  int checks = 0, failures = 0;
  int n_apb = 0, n_miss = 0;

  logic [DATA_W-1:0] ref_mem [int];
  function automatic logic [DATA_W-1:0] ref_rd(input logic [31:0] a);
    int unsigned ix;
    ix = (a / BPB) % (1 << MEM_AW);
    if (ref_mem.exists(ix)) return ref_mem[ix];
    return DATA_W'(ix * 32'h00010001 + 32'h0a0b);
  endfunction

  // no response may appear outside an accept cycle
  always @(negedge clk) begin
    #2;   // mid-cycle: the values the next clock edge will see
    if (resetn && SResp != OCP_NULL && !SCmdAccept) begin
      checks++; failures++; $display("response without accept");
    end
  end

  // one request; checks the response given with the accept
  task automatic ocp1_req(input logic [2:0] cmd, input logic [31:0] addr);
    bit hit;
    logic [1:0] want;
    logic [DATA_W-1:0] d;
    hit = ((addr & SLV_MASK) == SLV_BASE);
    @(negedge clk);
    MCmd  = cmd;
    MAddr = addr;
    MData = $urandom;
    d     = MData;
    #1;
    while (!SCmdAccept) begin @(negedge clk); #1; end
    // response seen in the accept cycle
    want = (cmd == OCP_WR) ? OCP_NULL : (hit ? OCP_DVA : OCP_ERR);
    checks++;
    if (SResp !== want || (cmd == OCP_RD && hit && SData !== ref_rd(addr))) begin
      failures++;
      $display("cmd %0d addr %h: got %0d/%h want %0d/%h", cmd, addr, SResp, SData, want,
               ref_rd(addr));
    end
    @(posedge clk);
    if (hit) n_apb++; else n_miss++;
    if (hit && cmd != OCP_RD) ref_mem[(addr / BPB) % (1 << MEM_AW)] = d;
  endtask

  initial begin
    logic [2:0] cmd;
    logic [31:0] a;
    repeat (3) @(posedge clk);
    resetn = 1;
    for (int i = 0; i < 400; i++) begin
      case ($urandom_range(3))
        0, 1: cmd = OCP_WR;
        2:    cmd = OCP_WRNP;
        default: cmd = OCP_RD;
      endcase
      a = SLV_BASE + 32'($urandom_range(63)) * BPB;
      if ($urandom_range(9) == 0) a = 32'h0009_0000 + 32'($urandom_range(63)) * BPB;
      ocp1_req(cmd, a);
      if ($urandom_range(3) == 0) begin
        @(negedge clk); MCmd = OCP_IDLE;
        repeat ($urandom_range(3)) @(posedge clk);
      end
    end
    @(negedge clk); MCmd = OCP_IDLE;
    // read back the whole window
    for (int i = 0; i < 64; i++) ocp1_req(OCP_RD, SLV_BASE + 32'(i) * BPB);
    @(negedge clk); MCmd = OCP_IDLE;
    repeat (10) @(posedge clk);

    checks++; if (slv.errors != 0) begin failures++; $display("slave model saw %0d errors", slv.errors); end
    checks++; if (slv.transfers != n_apb) begin
      failures++; $display("APB transfers %0d, want %0d", slv.transfers, n_apb); end
    checks++; if (slv.waits == 0) begin failures++; $display("no wait state"); end
    checks++; if (slv.back_to_back == 0) begin failures++; $display("no ENABLE->SETUP transfer"); end
    checks++; if (n_miss == 0) begin failures++; $display("no decode miss"); end
    $display("transfers=%0d waits=%0d back_to_back=%0d misses=%0d", slv.transfers, slv.waits,
             slv.back_to_back, n_miss);
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
