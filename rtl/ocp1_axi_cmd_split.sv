// Command splitting logic of the OCP1.0-to-AXI4 bridge, with its write and
// read channels.
//
// The OCP1.0 master issues bursts as one request per beat (MRMD); MBurst on
// the first request gives the length (TWO, FOUR, EIGHT, otherwise single)
// and the burst is incrementing. MCmd picks the AXI channel: read-type
// commands activate the read channel (ARVALID), all others the write channel
// (AWVALID). The block
//  - decodes the first request into one AXI INCR burst of the same length,
//    32-bit beats (AxSIZE = 2), or into two bursts when it would cross a 4 KB
//    boundary, both with the same ID;
//  - generates the IDs: ARID is the response slot given by the response
//    channel (so read data can be put back in order), AWID comes from a
//    rolling counter (write responses are discarded, their order is free);
//  - streams the beats: every write request of the burst becomes a W beat
//    (MData/MByteEn -> WDATA/WSTRB, SCmdAccept = WREADY, WLAST at the end of
//    each AXI half); read requests after the first are accepted at once,
//    as the AR command already covers them.
//
// Timing: the first request is decoded in the cycle it appears and the burst
// starts the next cycle (its address and data channels run independently);
// the block returns to idle when all beats are accepted and all address
// halves issued. A new burst needs a free read slot (reads) or room for two
// more outstanding write commands (writes) - the outstanding limit.
module ocp1_axi_cmd_split
  import bridge_pkg::*;
#(
  parameter int unsigned ADDR_W = 32,
  parameter int unsigned DATA_W = 32,
  parameter int unsigned ID_W   = 4,
  parameter int unsigned TAG_W  = 2,
  parameter int unsigned BL_W   = 4
) (
  input  logic                clk,
  input  logic                resetn,
  // OCP1.0 request group
  input  logic [2:0]          MCmd,
  input  logic [ADDR_W-1:0]   MAddr,
  input  logic [2:0]          MBurst,
  input  logic [DATA_W/8-1:0] MByteEn,
  input  logic [DATA_W-1:0]   MData,
  output logic                SCmdAccept,
  // AXI4 write address + write data
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
  // AXI4 read address
  output logic [ID_W-1:0]     ARID,
  output logic [ADDR_W-1:0]   ARADDR,
  output logic [7:0]          ARLEN,
  output logic [2:0]          ARSIZE,
  output logic [1:0]          ARBURST,
  output logic                ARVALID,
  input  logic                ARREADY,
  // resources from the response channel
  output logic                alloc_valid,
  output logic [BL_W-1:0]     alloc_len,
  input  logic                alloc_ready,
  input  logic [TAG_W-1:0]    alloc_tag,
  input  logic                wr_room
);

  localparam int unsigned BPB  = DATA_W / 8;
  localparam int unsigned SIZE = $clog2(BPB);

  typedef enum logic {S_IDLE, S_ACT} state_e;
  state_e            state_q;
  logic              rd_q, split_q;
  logic [1:0]        part_q;          // address halves issued: 0, 1 or 2
  logic [ADDR_W-1:0] addr1_q, addr2_q;
  logic [BL_W-1:0]   len_q, len1_q, beat_q;
  logic [ID_W-1:0]   id_q, wid_q;

  // ---- decode of the first request --------------------------------------
  logic              valid, is_rd, start, crosses;
  logic [BL_W-1:0]   len, len1;
  logic [12:0]       page_off, end_off;

  always_comb begin
    valid    = (MCmd != OCP_IDLE);
    is_rd    = ocp_is_read(MCmd);
    len      = BL_W'(ocp1_burst_len(MBurst));
    page_off = {1'b0, MAddr[11:SIZE], SIZE'(0)};
    end_off  = page_off + (13'(len) << SIZE);
    crosses  = (end_off > 13'd4096);
    len1     = crosses ? BL_W'((13'd4096 - page_off) >> SIZE) : len;
    start    = (state_q == S_IDLE) && valid && (is_rd ? alloc_ready : wr_room);
  end

  assign alloc_valid = start && is_rd;
  assign alloc_len   = len;

  // ---- burst in progress -------------------------------------------------
  logic addr_busy, beats_left, aw_fire, ar_fire, beat_fire;
  logic [ADDR_W-1:0] cur_addr;
  logic [BL_W-1:0]   cur_len;

  assign addr_busy  = (state_q == S_ACT) && (part_q != (split_q ? 2'd2 : 2'd1));
  assign beats_left = (state_q == S_ACT) && (beat_q != len_q);
  assign cur_addr   = (part_q == 2'd0) ? addr1_q : addr2_q;
  assign cur_len    = (part_q == 2'd0) ? len1_q : (len_q - len1_q);

  assign AWID    = wid_q;
  assign AWADDR  = cur_addr;
  assign AWLEN   = 8'(cur_len - 1'b1);
  assign AWSIZE  = 3'(SIZE);
  assign AWBURST = AXI_INCR;
  assign AWVALID = addr_busy && !rd_q;

  assign ARID    = id_q;
  assign ARADDR  = cur_addr;
  assign ARLEN   = 8'(cur_len - 1'b1);
  assign ARSIZE  = 3'(SIZE);
  assign ARBURST = AXI_INCR;
  assign ARVALID = addr_busy && rd_q;

  assign WDATA  = MData;
  assign WSTRB  = MByteEn;
  assign WVALID = beats_left && !rd_q && valid;
  assign WLAST  = (beat_q == len_q - 1'b1) || (split_q && (beat_q == len1_q - 1'b1));

  assign SCmdAccept = beats_left && valid && (rd_q || WREADY);

  assign aw_fire   = AWVALID && AWREADY;
  assign ar_fire   = ARVALID && ARREADY;
  assign beat_fire = SCmdAccept;

  always_ff @(posedge clk or negedge resetn) begin
    if (!resetn) begin
      state_q <= S_IDLE;
      rd_q    <= 1'b0;
      split_q <= 1'b0;
      part_q  <= '0;
      addr1_q <= '0;
      addr2_q <= '0;
      len_q   <= '0;
      len1_q  <= '0;
      beat_q  <= '0;
      id_q    <= '0;
      wid_q   <= '0;
    end else begin
      case (state_q)
        S_IDLE: if (start) begin
          state_q <= S_ACT;
          rd_q    <= is_rd;
          split_q <= crosses;
          part_q  <= '0;
          addr1_q <= MAddr;
          addr2_q <= {MAddr[ADDR_W-1:12] + 1'b1, 12'h000};
          len_q   <= len;
          len1_q  <= len1;
          beat_q  <= '0;
          if (is_rd) id_q <= ID_W'(alloc_tag);
        end
        S_ACT: begin
          if (aw_fire || ar_fire) part_q <= part_q + 1'b1;
          if (aw_fire && (part_q + 1'b1 == (split_q ? 2'd2 : 2'd1))) wid_q <= wid_q + 1'b1;
          if (beat_fire) beat_q <= beat_q + 1'b1;
          if ((beat_q + BL_W'(beat_fire) == len_q) &&
              (part_q + 2'(aw_fire || ar_fire) == (split_q ? 2'd2 : 2'd1)))
            state_q <= S_IDLE;
        end
        default: state_q <= S_IDLE;
      endcase
    end
  end

  a_aw_hold: assert property (@(posedge clk) disable iff (!resetn)
    (AWVALID && !AWREADY) |=> AWVALID && $stable(AWADDR));
  a_ar_hold: assert property (@(posedge clk) disable iff (!resetn)
    (ARVALID && !ARREADY) |=> ARVALID && $stable(ARADDR));

endmodule
