// OCP1.0-to-AXI4 bridge.
//
// Connects an OCP1.0 master (bursts of one request per beat, write data on
// the request handshake, responses only for reads, no response handshake) to
// an AXI4 slave. 32-bit data and 32-bit addresses; a data-width upsizer may
// follow the bridge for a wider AXI bus.
//
// Two blocks:
//  - ocp1_axi_cmd_split : command splitting logic with its write channel (AW
//                         and W) and read channel (AR): length from MBurst,
//                         INCR bursts, generated AWID/ARID, 4 KB boundary
//                         split;
//  - ocp1_axi_resp      : response channel: B and R accepted one at a time,
//                         write first; write responses discarded; read data
//                         returned in request order through a buffer indexed
//                         by ARID.
//
// Outstanding limit: MAX_RD read bursts (the number of read slots, and so of
// distinct ARIDs) and MAX_WR write commands. Both values are this design's
// choice; the document only says a fixed number is supported.
module ocp1_axi4_bridge
  import bridge_pkg::*;
#(
  parameter int unsigned ADDR_W = 32,
  parameter int unsigned DATA_W = 32,
  parameter int unsigned ID_W   = 4,
  parameter int unsigned MAX_RD = 4,
  parameter int unsigned MAX_WR = 4
) (
  input  logic                clk,
  input  logic                resetn,
  // OCP1.0 slave port
  input  logic [2:0]          MCmd,
  input  logic [ADDR_W-1:0]   MAddr,
  input  logic [2:0]          MBurst,
  input  logic [DATA_W/8-1:0] MByteEn,
  input  logic [DATA_W-1:0]   MData,
  output logic                SCmdAccept,
  output logic [1:0]          SResp,
  output logic [DATA_W-1:0]   SData,
  // AXI4 master port
  output logic [ID_W-1:0]     AWID,
  output logic [ADDR_W-1:0]   AWADDR,
  output logic [7:0]          AWLEN,
  output logic [2:0]          AWSIZE,
  output logic [1:0]          AWBURST,
  output logic                AWVALID,
  input  logic                AWREADY,
  output logic [DATA_W-1:0]   WDATA,
  output logic [DATA_W/8-1:0] WSTRB,
  output logic                WLAST,
  output logic                WVALID,
  input  logic                WREADY,
  input  logic [ID_W-1:0]     BID,
  input  logic [1:0]          BRESP,
  input  logic                BVALID,
  output logic                BREADY,
  output logic [ID_W-1:0]     ARID,
  output logic [ADDR_W-1:0]   ARADDR,
  output logic [7:0]          ARLEN,
  output logic [2:0]          ARSIZE,
  output logic [1:0]          ARBURST,
  output logic                ARVALID,
  input  logic                ARREADY,
  input  logic [ID_W-1:0]     RID,
  input  logic [DATA_W-1:0]   RDATA,
  input  logic [1:0]          RRESP,
  input  logic                RLAST,
  input  logic                RVALID,
  output logic                RREADY
);

  localparam int unsigned TAG_W = (MAX_RD > 1) ? $clog2(MAX_RD) : 1;
  localparam int unsigned BL_W  = $clog2(OCP1_MAX_BEATS + 1);

  logic             alloc_valid, alloc_ready, wr_room;
  logic [BL_W-1:0]  alloc_len;
  logic [TAG_W-1:0] alloc_tag;

  ocp1_axi_cmd_split #(
    .ADDR_W(ADDR_W), .DATA_W(DATA_W), .ID_W(ID_W), .TAG_W(TAG_W), .BL_W(BL_W)
  ) u_cmd (
    .clk, .resetn,
    .MCmd, .MAddr, .MBurst, .MByteEn, .MData, .SCmdAccept,
    .AWID, .AWADDR, .AWLEN, .AWSIZE, .AWBURST, .AWVALID, .AWREADY,
    .WDATA, .WSTRB, .WLAST, .WVALID, .WREADY,
    .ARID, .ARADDR, .ARLEN, .ARSIZE, .ARBURST, .ARVALID, .ARREADY,
    .alloc_valid, .alloc_len, .alloc_ready, .alloc_tag, .wr_room
  );

  ocp1_axi_resp #(
    .DATA_W(DATA_W), .ID_W(ID_W), .MAX_RD(MAX_RD), .MAX_WR(MAX_WR),
    .MAX_BEATS(OCP1_MAX_BEATS)
  ) u_resp (
    .clk, .resetn,
    .alloc_valid, .alloc_len, .alloc_ready, .alloc_tag,
    .aw_fire (AWVALID && AWREADY),
    .wr_room,
    .BID, .BRESP, .BVALID, .BREADY,
    .RID, .RDATA, .RRESP, .RLAST, .RVALID, .RREADY,
    .SResp, .SData
  );

endmodule
