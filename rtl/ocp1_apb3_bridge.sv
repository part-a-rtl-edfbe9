// OCP1.0-to-APB3 bridge.
//
// Connects an OCP1.0 master to an APB3 slave. APB has no bursts, no
// pipelining and no response code, so:
//  - every OCP1 request (each beat of an OCP1 burst is its own request) becomes
//    one APB transfer: MAddr -> PADDR, MCmd -> PWRITE, MData -> PWDATA;
//  - apb_psel_penable_gen runs the IDLE/SETUP/ENABLE machine, decodes the
//    address for PSEL, and stretches ENABLE while PREADY is low; SCmdAccept
//    follows PENABLE && PREADY for reads and non-posted writes;
//  - apb_resp_gen answers the OCP1 master itself in the completing cycle
//    (PRDATA -> SData with DVA; ERR for an address outside the slave window).
// A response is produced immediately, so there are never outstanding
// transactions and responses cannot be out of order. 32-bit data and address.
// MBurst and MByteEn are accepted but not used: APB3 has neither bursts nor
// byte strobes.
module ocp1_apb3_bridge
  import bridge_pkg::*;
#(
  parameter int unsigned       ADDR_W   = 32,
  parameter int unsigned       DATA_W   = 32,
  parameter logic [ADDR_W-1:0] SLV_BASE = 32'h0000_0000,
  parameter logic [ADDR_W-1:0] SLV_MASK = 32'hFFFF_0000
) (
  input  logic                clk,
  input  logic                resetn,
  // OCP1.0 slave port
  input  logic [2:0]          MCmd,
  input  logic [ADDR_W-1:0]   MAddr,
  input  logic [2:0]          MBurst,
  input  logic [DATA_W-1:0]   MData,
  input  logic [DATA_W/8-1:0] MByteEn,
  output logic                SCmdAccept,
  output logic [1:0]          SResp,
  output logic [DATA_W-1:0]   SData,
  // APB3 master port (PCLK is clk)
  output logic [ADDR_W-1:0]   PADDR,
  output logic                PWRITE,
  output logic                PSEL,
  output logic                PENABLE,
  output logic [DATA_W-1:0]   PWDATA,
  input  logic [DATA_W-1:0]   PRDATA,
  input  logic                PREADY
);

  logic cmpl, cmpl_rd, cmpl_err;

  apb_psel_penable_gen #(
    .ADDR_W(ADDR_W), .DATA_W(DATA_W), .SLV_BASE(SLV_BASE), .SLV_MASK(SLV_MASK)
  ) u_fsm (
    .clk, .resetn,
    .MCmd, .MAddr, .MData, .SCmdAccept,
    .PADDR, .PWRITE, .PSEL, .PENABLE, .PWDATA, .PREADY,
    .cmpl, .cmpl_rd, .cmpl_err
  );

  apb_resp_gen #(.DATA_W(DATA_W)) u_resp (
    .cmpl, .cmpl_rd, .cmpl_err, .PRDATA, .SResp, .SData
  );

  logic unused;
  assign unused = ^{MBurst, MByteEn};

endmodule
