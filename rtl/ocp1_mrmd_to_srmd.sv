// MRMD-to-SRMD converter of the OCP1.0-to-OCP2.2 bridge.
//
// An OCP1.0 master issues a burst as multiple requests with multiple data
// (MRMD): one request per beat, each with its own address and, for a write,
// its data on the same handshake (SCmdAccept). MBurst on the first request
// gives the burst length (TWO, FOUR, EIGHT; any other code is a single
// transfer). The OCP2.2 side wants a single request per burst (SRMD) with
// MBurstLength, MBurstSeq (always INCR: OCP1 bursts are incrementing), a tag
// (MTagID/MDataTagID) and, for a write, a separate data phase per beat with
// MDataValid/MDataLast.
//
// Operation:
//  - first request of a burst: a response slot (and with it the tag) must be
//    free. The OCP2 request is offered; for a write the first data beat
//    follows from the cycle after the request was accepted (data never runs
//    ahead of its request). When both are done the OCP1 request is accepted
//    and the slot is allocated.
//  - further requests of the same burst: a read request is accepted at once
//    (the single OCP2 request already covers it); a write request is accepted
//    when the OCP2 slave accepts its data beat (SDataAccept).
//
// Timing: no registers on the data path; SCmdAccept to OCP1 is combinational
// from the OCP2 accepts. Taking the burst length from the first request and
// ignoring MBurst on the following ones is this design's reading of OCP1.0.
module ocp1_mrmd_to_srmd
  import bridge_pkg::*;
#(
  parameter int unsigned ADDR_W = 32,
  parameter int unsigned DATA_W = 32,
  parameter int unsigned TAG_W  = 2,
  parameter int unsigned BL_W   = 4
) (
  input  logic                clk,
  input  logic                resetn,
  // OCP1.0 slave port (request + data)
  input  logic [2:0]          MCmd,
  input  logic [ADDR_W-1:0]   MAddr,
  input  logic [2:0]          MBurst,
  input  logic [DATA_W-1:0]   MData,
  input  logic [DATA_W/8-1:0] MByteEn,
  output logic                SCmdAccept,
  // OCP2.2 master port (request + data handshake)
  output logic [2:0]          o_MCmd,
  output logic [ADDR_W-1:0]   o_MAddr,
  output logic [BL_W-1:0]     o_MBurstLength,
  output logic [2:0]          o_MBurstSeq,
  output logic                o_MBurstSingleReq,
  output logic [TAG_W-1:0]    o_MTagID,
  input  logic                o_SCmdAccept,
  output logic [DATA_W-1:0]   o_MData,
  output logic [DATA_W/8-1:0] o_MDataByteEn,
  output logic                o_MDataValid,
  output logic                o_MDataLast,
  output logic [TAG_W-1:0]    o_MDataTagID,
  input  logic                o_SDataAccept,
  // response slot allocation
  output logic                alloc_valid,
  output logic                alloc_read,
  output logic [BL_W-1:0]     alloc_len,
  input  logic                alloc_ready,
  input  logic [TAG_W-1:0]    alloc_tag
);

  typedef enum logic {S_FIRST, S_BURST} state_e;
  state_e          state_q;
  logic            req_done_q, dat_done_q;
  logic            rd_q;
  logic [BL_W-1:0] left_q;        // beats still to come in this burst
  logic [TAG_W-1:0] tag_q;

  logic            valid, is_rd, is_wr;
  logic [BL_W-1:0] len;
  logic            req_ok, dat_ok, first_done;

  always_comb begin
    valid = (MCmd != OCP_IDLE);
    is_rd = ocp_is_read(MCmd);
    is_wr = ocp_is_write(MCmd);
    len   = BL_W'(ocp1_burst_len(MBurst));

    o_MCmd            = OCP_IDLE;
    o_MAddr           = MAddr;
    o_MBurstLength    = len;
    o_MBurstSeq       = SEQ_INCR;
    o_MBurstSingleReq = 1'b1;
    o_MTagID          = alloc_tag;
    o_MData           = MData;
    o_MDataByteEn     = MByteEn;
    o_MDataValid      = 1'b0;
    o_MDataLast       = 1'b0;
    o_MDataTagID      = tag_q;
    SCmdAccept        = 1'b0;
    alloc_valid       = 1'b0;
    alloc_read        = is_rd;
    alloc_len         = is_rd ? len : BL_W'(1);   // one OCP2 response per write burst
    req_ok            = 1'b0;
    dat_ok            = 1'b0;
    first_done        = 1'b0;

    if (state_q == S_FIRST) begin
      if (valid && alloc_ready) begin
        o_MCmd       = req_done_q ? OCP_IDLE : MCmd;
        o_MDataValid = is_wr && req_done_q && !dat_done_q;
        o_MDataLast  = (len == BL_W'(1));
        o_MDataTagID = alloc_tag;
        req_ok       = req_done_q || o_SCmdAccept;
        dat_ok       = !is_wr || dat_done_q || (o_MDataValid && o_SDataAccept);
        first_done   = req_ok && dat_ok;
        SCmdAccept   = first_done;
        alloc_valid  = first_done;
      end
    end else begin
      if (valid) begin
        if (rd_q) begin
          SCmdAccept = 1'b1;
        end else begin
          o_MDataValid = 1'b1;
          o_MDataLast  = (left_q == BL_W'(1));
          SCmdAccept   = o_SDataAccept;
        end
      end
    end
  end

  always_ff @(posedge clk or negedge resetn) begin
    if (!resetn) begin
      state_q    <= S_FIRST;
      req_done_q <= 1'b0;
      dat_done_q <= 1'b0;
      rd_q       <= 1'b0;
      left_q     <= '0;
      tag_q      <= '0;
    end else if (state_q == S_FIRST) begin
      if (first_done) begin
        req_done_q <= 1'b0;
        dat_done_q <= 1'b0;
        rd_q       <= is_rd;
        tag_q      <= alloc_tag;
        left_q     <= len - 1'b1;
        if (len != BL_W'(1)) state_q <= S_BURST;
      end else if (valid && alloc_ready) begin
        if (o_SCmdAccept && o_MCmd != OCP_IDLE) req_done_q <= 1'b1;
        if (o_SDataAccept && o_MDataValid)      dat_done_q <= 1'b1;
      end
    end else begin
      if (SCmdAccept) begin
        left_q <= left_q - 1'b1;
        if (left_q == BL_W'(1)) state_q <= S_FIRST;
      end
    end
  end

  a_burst_same_dir: assert property (@(posedge clk) disable iff (!resetn)
    (state_q == S_BURST && valid) |-> (ocp_is_read(MCmd) == rd_q));

endmodule
