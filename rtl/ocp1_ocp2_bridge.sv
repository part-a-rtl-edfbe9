// OCP1.0-to-OCP2.2 bridge.
//
// Connects an OCP1.0 master (multiple-request bursts, request and write data
// on one handshake, no tags, no response handshake, responses only for reads)
// to an OCP2.2 slave (single-request bursts, separate data handshake, tags,
// response handshake, responses for reads and writes).
//
// Two blocks:
//  - ocp1_mrmd_to_srmd : turns each OCP1 burst into one OCP2 request plus one
//                        data phase per write beat, with MBurstLength and
//                        MBurstSeq computed from MBurst and a bridge-generated
//                        tag on MTagID/MDataTagID;
//  - ocp_resp_reorder  : response channel. The tag is the index of a response
//                        slot; OCP2 responses (STagID) are stored in their slot
//                        whatever their order, write responses are dropped and
//                        read data is returned to the OCP1 master in order.
//
// MRespAccept is held high: the response buffer always has room for a
// response because a slot is reserved before its request is issued.
// MAX_OUT (number of slots, hence of outstanding bursts) is this design's
// choice; the document only says outstanding transactions are supported.
module ocp1_ocp2_bridge
  import bridge_pkg::*;
#(
  parameter int unsigned ADDR_W  = 32,
  parameter int unsigned DATA_W  = 32,
  parameter int unsigned MAX_OUT = 4,
  localparam int unsigned TAG_W  = (MAX_OUT > 1) ? $clog2(MAX_OUT) : 1,
  localparam int unsigned BL_W   = $clog2(OCP1_MAX_BEATS + 1)
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
  // OCP2.2 master port
  output logic [TAG_W-1:0]    o_MTagID,
  output logic [2:0]          o_MCmd,
  output logic [ADDR_W-1:0]   o_MAddr,
  output logic [BL_W-1:0]     o_MBurstLength,
  output logic [2:0]          o_MBurstSeq,
  output logic                o_MBurstSingleReq,
  output logic [DATA_W-1:0]   o_MData,
  output logic [DATA_W/8-1:0] o_MDataByteEn,
  output logic                o_MDataValid,
  output logic                o_MDataLast,
  output logic [TAG_W-1:0]    o_MDataTagID,
  input  logic                o_SCmdAccept,
  input  logic                o_SDataAccept,
  input  logic [1:0]          o_SResp,
  input  logic [DATA_W-1:0]   o_SData,
  input  logic                o_SRespLast,
  input  logic [TAG_W-1:0]    o_STagID,
  output logic                o_MRespAccept
);

  logic             alloc_valid, alloc_read, alloc_ready;
  logic [BL_W-1:0]  alloc_len;
  logic [TAG_W-1:0] alloc_tag;
  logic             rsp_empty;

  ocp1_mrmd_to_srmd #(
    .ADDR_W(ADDR_W), .DATA_W(DATA_W), .TAG_W(TAG_W), .BL_W(BL_W)
  ) u_conv (
    .clk, .resetn,
    .MCmd, .MAddr, .MBurst, .MData, .MByteEn, .SCmdAccept,
    .o_MCmd, .o_MAddr, .o_MBurstLength, .o_MBurstSeq, .o_MBurstSingleReq,
    .o_MTagID, .o_SCmdAccept,
    .o_MData, .o_MDataByteEn, .o_MDataValid, .o_MDataLast, .o_MDataTagID,
    .o_SDataAccept,
    .alloc_valid, .alloc_read, .alloc_len, .alloc_ready, .alloc_tag
  );

  ocp_resp_reorder #(
    .DATA_W(DATA_W), .SLOTS(MAX_OUT), .MAX_BEATS(OCP1_MAX_BEATS)
  ) u_resp (
    .clk, .resetn,
    .alloc_valid, .alloc_read, .alloc_len, .alloc_ready, .alloc_tag,
    .in_valid (o_SResp != OCP_NULL),
    .in_tag   (o_STagID),
    .in_resp  (o_SResp),
    .in_data  (o_SData),
    .out_resp (SResp),
    .out_data (SData),
    .empty    (rsp_empty)
  );

  assign o_MRespAccept = 1'b1;

  // SRespLast is implied by the beat count kept per slot.
  logic unused;
  assign unused = o_SRespLast ^ rsp_empty;

endmodule
