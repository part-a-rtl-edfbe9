// Bus bridge collection: four protocol bridges for a system-on-chip
// interconnect, instantiated side by side.
//
//   b1_*  OCP2.2 master  -> ocp2_axi4_bridge -> AXI4 slave
//   b2_*  OCP1.0 master  -> ocp1_ocp2_bridge -> OCP2.2 slave
//   b3_*  OCP1.0 master  -> ocp1_axi4_bridge -> AXI4 slave
//   b4_*  OCP1.0 master  -> ocp1_apb3_bridge -> APB3 slave
//
// The bridges are independent; they share only clk and the active-low
// asynchronous reset resetn. Each bridge's ports are brought out unchanged
// under its prefix (the master-side ports keep their OCP names, the
// OCP2.2-side ports of b2 carry the o_ prefix of the bridge). Sizes are the
// bridges' defaults: b1 has a 32-bit OCP2 word (the smallest the bridge
// supports), 4-bit tags/IDs, 8-bit MBurstLength and 8 outstanding commands;
// b2 keeps 4 bursts outstanding; b3 4 read bursts and 4 write commands.
module bridges_top
  import bridge_pkg::*;
#(
  parameter int unsigned B1_DATA_W  = 32,
  parameter int unsigned B1_ID_W    = 4,
  parameter int unsigned B1_BL_W    = 8,
  parameter int unsigned B1_MAX_OUT = 8,
  parameter int unsigned B2_MAX_OUT = 4,
  parameter int unsigned B3_ID_W    = 4,
  parameter int unsigned B3_MAX_RD  = 4,
  parameter int unsigned B3_MAX_WR  = 4,
  localparam int unsigned B2_TAG_W  = (B2_MAX_OUT > 1) ? $clog2(B2_MAX_OUT) : 1
) (
  input  logic clk,
  input  logic resetn,
  // ---- ocp2_axi4_bridge ----
  input  logic [2:0]            b1_MCmd,
  input  logic [32-1:0]         b1_MAddr,
  input  logic [B1_BL_W-1:0]    b1_MBurstLength,
  input  logic [2:0]            b1_MBurstSeq,
  input  logic                  b1_MBurstSingleReq,
  input  logic [B1_ID_W-1:0]    b1_MTagID,
  output logic                  b1_SCmdAccept,
  input  logic [B1_DATA_W-1:0]  b1_MData,
  input  logic                  b1_MDataValid,
  input  logic [B1_DATA_W/8-1:0] b1_MDataByteEn,
  input  logic                  b1_MDataLast,
  output logic                  b1_SDataAccept,
  output logic [1:0]            b1_SResp,
  output logic [B1_DATA_W-1:0]  b1_SData,
  output logic [B1_ID_W-1:0]    b1_STagID,
  output logic                  b1_SRespLast,
  input  logic                  b1_MRespAccept,
  output logic [B1_ID_W-1:0]    b1_AWID,
  output logic [32-1:0]         b1_AWADDR,
  output logic [7:0]            b1_AWLEN,
  output logic [2:0]            b1_AWSIZE,
  output logic [1:0]            b1_AWBURST,
  output logic                  b1_AWVALID,
  input  logic                  b1_AWREADY,
  output logic [B1_DATA_W-1:0]  b1_WDATA,
  output logic [B1_DATA_W/8-1:0] b1_WSTRB,
  output logic                  b1_WLAST,
  output logic                  b1_WVALID,
  input  logic                  b1_WREADY,
  input  logic [B1_ID_W-1:0]    b1_BID,
  input  logic [1:0]            b1_BRESP,
  input  logic                  b1_BVALID,
  output logic                  b1_BREADY,
  output logic [B1_ID_W-1:0]    b1_ARID,
  output logic [32-1:0]         b1_ARADDR,
  output logic [7:0]            b1_ARLEN,
  output logic [2:0]            b1_ARSIZE,
  output logic [1:0]            b1_ARBURST,
  output logic                  b1_ARVALID,
  input  logic                  b1_ARREADY,
  input  logic [B1_ID_W-1:0]    b1_RID,
  input  logic [B1_DATA_W-1:0]  b1_RDATA,
  input  logic [1:0]            b1_RRESP,
  input  logic                  b1_RLAST,
  input  logic                  b1_RVALID,
  output logic                  b1_RREADY,
  // ---- ocp1_ocp2_bridge ----
  input  logic [2:0]            b2_MCmd,
  input  logic [32-1:0]         b2_MAddr,
  input  logic [2:0]            b2_MBurst,
  input  logic [32-1:0]         b2_MData,
  input  logic [32/8-1:0]       b2_MByteEn,
  output logic                  b2_SCmdAccept,
  output logic [1:0]            b2_SResp,
  output logic [32-1:0]         b2_SData,
  output logic [B2_TAG_W-1:0]   b2_o_MTagID,
  output logic [2:0]            b2_o_MCmd,
  output logic [32-1:0]         b2_o_MAddr,
  output logic [4-1:0]          b2_o_MBurstLength,
  output logic [2:0]            b2_o_MBurstSeq,
  output logic                  b2_o_MBurstSingleReq,
  output logic [32-1:0]         b2_o_MData,
  output logic [32/8-1:0]       b2_o_MDataByteEn,
  output logic                  b2_o_MDataValid,
  output logic                  b2_o_MDataLast,
  output logic [B2_TAG_W-1:0]   b2_o_MDataTagID,
  input  logic                  b2_o_SCmdAccept,
  input  logic                  b2_o_SDataAccept,
  input  logic [1:0]            b2_o_SResp,
  input  logic [32-1:0]         b2_o_SData,
  input  logic                  b2_o_SRespLast,
  input  logic [B2_TAG_W-1:0]   b2_o_STagID,
  output logic                  b2_o_MRespAccept,
  // ---- ocp1_axi4_bridge ----
  input  logic [2:0]            b3_MCmd,
  input  logic [32-1:0]         b3_MAddr,
  input  logic [2:0]            b3_MBurst,
  input  logic [32/8-1:0]       b3_MByteEn,
  input  logic [32-1:0]         b3_MData,
  output logic                  b3_SCmdAccept,
  output logic [1:0]            b3_SResp,
  output logic [32-1:0]         b3_SData,
  output logic [B3_ID_W-1:0]    b3_AWID,
  output logic [32-1:0]         b3_AWADDR,
  output logic [7:0]            b3_AWLEN,
  output logic [2:0]            b3_AWSIZE,
  output logic [1:0]            b3_AWBURST,
  output logic                  b3_AWVALID,
  input  logic                  b3_AWREADY,
  output logic [32-1:0]         b3_WDATA,
  output logic [32/8-1:0]       b3_WSTRB,
  output logic                  b3_WLAST,
  output logic                  b3_WVALID,
  input  logic                  b3_WREADY,
  input  logic [B3_ID_W-1:0]    b3_BID,
  input  logic [1:0]            b3_BRESP,
  input  logic                  b3_BVALID,
  output logic                  b3_BREADY,
  output logic [B3_ID_W-1:0]    b3_ARID,
  output logic [32-1:0]         b3_ARADDR,
  output logic [7:0]            b3_ARLEN,
  output logic [2:0]            b3_ARSIZE,
  output logic [1:0]            b3_ARBURST,
  output logic                  b3_ARVALID,
  input  logic                  b3_ARREADY,
  input  logic [B3_ID_W-1:0]    b3_RID,
  input  logic [32-1:0]         b3_RDATA,
  input  logic [1:0]            b3_RRESP,
  input  logic                  b3_RLAST,
  input  logic                  b3_RVALID,
  output logic                  b3_RREADY,
  // ---- ocp1_apb3_bridge ----
  input  logic [2:0]            b4_MCmd,
  input  logic [32-1:0]         b4_MAddr,
  input  logic [2:0]            b4_MBurst,
  input  logic [32-1:0]         b4_MData,
  input  logic [32/8-1:0]       b4_MByteEn,
  output logic                  b4_SCmdAccept,
  output logic [1:0]            b4_SResp,
  output logic [32-1:0]         b4_SData,
  output logic [32-1:0]         b4_PADDR,
  output logic                  b4_PWRITE,
  output logic                  b4_PSEL,
  output logic                  b4_PENABLE,
  output logic [32-1:0]         b4_PWDATA,
  input  logic [32-1:0]         b4_PRDATA,
  input  logic                  b4_PREADY
);

  ocp2_axi4_bridge #(.DATA_W(B1_DATA_W), .ID_W(B1_ID_W), .BL_W(B1_BL_W), .MAX_OUT(B1_MAX_OUT)) u_ocp2_axi4 (
    .clk,
    .resetn,
    .MCmd              (b1_MCmd),
    .MAddr             (b1_MAddr),
    .MBurstLength      (b1_MBurstLength),
    .MBurstSeq         (b1_MBurstSeq),
    .MBurstSingleReq   (b1_MBurstSingleReq),
    .MTagID            (b1_MTagID),
    .SCmdAccept        (b1_SCmdAccept),
    .MData             (b1_MData),
    .MDataValid        (b1_MDataValid),
    .MDataByteEn       (b1_MDataByteEn),
    .MDataLast         (b1_MDataLast),
    .SDataAccept       (b1_SDataAccept),
    .SResp             (b1_SResp),
    .SData             (b1_SData),
    .STagID            (b1_STagID),
    .SRespLast         (b1_SRespLast),
    .MRespAccept       (b1_MRespAccept),
    .AWID              (b1_AWID),
    .AWADDR            (b1_AWADDR),
    .AWLEN             (b1_AWLEN),
    .AWSIZE            (b1_AWSIZE),
    .AWBURST           (b1_AWBURST),
    .AWVALID           (b1_AWVALID),
    .AWREADY           (b1_AWREADY),
    .WDATA             (b1_WDATA),
    .WSTRB             (b1_WSTRB),
    .WLAST             (b1_WLAST),
    .WVALID            (b1_WVALID),
    .WREADY            (b1_WREADY),
    .BID               (b1_BID),
    .BRESP             (b1_BRESP),
    .BVALID            (b1_BVALID),
    .BREADY            (b1_BREADY),
    .ARID              (b1_ARID),
    .ARADDR            (b1_ARADDR),
    .ARLEN             (b1_ARLEN),
    .ARSIZE            (b1_ARSIZE),
    .ARBURST           (b1_ARBURST),
    .ARVALID           (b1_ARVALID),
    .ARREADY           (b1_ARREADY),
    .RID               (b1_RID),
    .RDATA             (b1_RDATA),
    .RRESP             (b1_RRESP),
    .RLAST             (b1_RLAST),
    .RVALID            (b1_RVALID),
    .RREADY            (b1_RREADY)
  );

  ocp1_ocp2_bridge #(.MAX_OUT(B2_MAX_OUT)) u_ocp1_ocp2 (
    .clk,
    .resetn,
    .MCmd              (b2_MCmd),
    .MAddr             (b2_MAddr),
    .MBurst            (b2_MBurst),
    .MData             (b2_MData),
    .MByteEn           (b2_MByteEn),
    .SCmdAccept        (b2_SCmdAccept),
    .SResp             (b2_SResp),
    .SData             (b2_SData),
    .o_MTagID          (b2_o_MTagID),
    .o_MCmd            (b2_o_MCmd),
    .o_MAddr           (b2_o_MAddr),
    .o_MBurstLength    (b2_o_MBurstLength),
    .o_MBurstSeq       (b2_o_MBurstSeq),
    .o_MBurstSingleReq (b2_o_MBurstSingleReq),
    .o_MData           (b2_o_MData),
    .o_MDataByteEn     (b2_o_MDataByteEn),
    .o_MDataValid      (b2_o_MDataValid),
    .o_MDataLast       (b2_o_MDataLast),
    .o_MDataTagID      (b2_o_MDataTagID),
    .o_SCmdAccept      (b2_o_SCmdAccept),
    .o_SDataAccept     (b2_o_SDataAccept),
    .o_SResp           (b2_o_SResp),
    .o_SData           (b2_o_SData),
    .o_SRespLast       (b2_o_SRespLast),
    .o_STagID          (b2_o_STagID),
    .o_MRespAccept     (b2_o_MRespAccept)
  );

  ocp1_axi4_bridge #(.ID_W(B3_ID_W), .MAX_RD(B3_MAX_RD), .MAX_WR(B3_MAX_WR)) u_ocp1_axi4 (
    .clk,
    .resetn,
    .MCmd              (b3_MCmd),
    .MAddr             (b3_MAddr),
    .MBurst            (b3_MBurst),
    .MByteEn           (b3_MByteEn),
    .MData             (b3_MData),
    .SCmdAccept        (b3_SCmdAccept),
    .SResp             (b3_SResp),
    .SData             (b3_SData),
    .AWID              (b3_AWID),
    .AWADDR            (b3_AWADDR),
    .AWLEN             (b3_AWLEN),
    .AWSIZE            (b3_AWSIZE),
    .AWBURST           (b3_AWBURST),
    .AWVALID           (b3_AWVALID),
    .AWREADY           (b3_AWREADY),
    .WDATA             (b3_WDATA),
    .WSTRB             (b3_WSTRB),
    .WLAST             (b3_WLAST),
    .WVALID            (b3_WVALID),
    .WREADY            (b3_WREADY),
    .BID               (b3_BID),
    .BRESP             (b3_BRESP),
    .BVALID            (b3_BVALID),
    .BREADY            (b3_BREADY),
    .ARID              (b3_ARID),
    .ARADDR            (b3_ARADDR),
    .ARLEN             (b3_ARLEN),
    .ARSIZE            (b3_ARSIZE),
    .ARBURST           (b3_ARBURST),
    .ARVALID           (b3_ARVALID),
    .ARREADY           (b3_ARREADY),
    .RID               (b3_RID),
    .RDATA             (b3_RDATA),
    .RRESP             (b3_RRESP),
    .RLAST             (b3_RLAST),
    .RVALID            (b3_RVALID),
    .RREADY            (b3_RREADY)
  );

  ocp1_apb3_bridge  u_ocp1_apb3 (
    .clk,
    .resetn,
    .MCmd              (b4_MCmd),
    .MAddr             (b4_MAddr),
    .MBurst            (b4_MBurst),
    .MData             (b4_MData),
    .MByteEn           (b4_MByteEn),
    .SCmdAccept        (b4_SCmdAccept),
    .SResp             (b4_SResp),
    .SData             (b4_SData),
    .PADDR             (b4_PADDR),
    .PWRITE            (b4_PWRITE),
    .PSEL              (b4_PSEL),
    .PENABLE           (b4_PENABLE),
    .PWDATA            (b4_PWDATA),
    .PRDATA            (b4_PRDATA),
    .PREADY            (b4_PREADY)
  );

endmodule
