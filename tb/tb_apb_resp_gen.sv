// Self-checking testbench of apb_resp_gen (combinational).
//
// Drives every combination of cmpl, cmpl_rd and cmpl_err with random PRDATA
// and checks SResp/SData against the rule: no completion -> NULL and zero
// data; error completion -> ERR and zero data; read completion -> DVA with
// PRDATA; write completion -> DVA and zero data. A clock only paces the
// stimulus.
module tb_apb_resp_gen;
  import bridge_pkg::*;

  localparam int DATA_W = 32;

  logic clk = 0;
  always #5 clk = ~clk;

  logic              cmpl = 0, cmpl_rd = 0, cmpl_err = 0;
  logic [DATA_W-1:0] PRDATA = '0;
  logic [1:0]        SResp;
  logic [DATA_W-1:0] SData;

  apb_resp_gen #(.DATA_W(DATA_W)) dut (.*);

  int checks = 0, failures = 0;

  initial begin
    logic [1:0] want_r;
    logic [DATA_W-1:0] want_d;
    for (int i = 0; i < 400; i++) begin
      @(negedge clk);
      {cmpl, cmpl_rd, cmpl_err} = 3'(i % 8);
      PRDATA = $urandom;
      #1;
      want_r = !cmpl ? OCP_NULL : (cmpl_err ? OCP_ERR : OCP_DVA);
      want_d = (cmpl && cmpl_rd && !cmpl_err) ? PRDATA : '0;
      checks++;
      if (SResp !== want_r || SData !== want_d) begin
        failures++;
        $display("cmpl=%0d rd=%0d err=%0d: got %0d/%h want %0d/%h", cmpl, cmpl_rd, cmpl_err,
                 SResp, SData, want_r, want_d);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
