// OCP2.2-to-AXI4 bridge.
//
// An OCP2.2 slave port faces an OCP2.2 master that issues tagged
// single-request/multiple-data (SRMD) bursts; an AXI4 master port faces an
// AXI4 slave. Read-type commands (RD, RDEX, RDL) go to the AXI read channel,
// every other command to the write channel. The tag (MTagID) becomes the AXI
// ID, so responses may return out of order across tags and are delivered to
// the OCP2 master with STagID.
//
// Structure:
//  - ocp2_axi_split      : 4 KB splitting block (address channels, split of
//                          INCR bursts that cross a 4 KB page, back-pressure
//                          at MAX_OUT outstanding commands);
//  - ocp2_axi_resp_comb  : 4 KB response combining block (B/R to the single
//                          OCP2 response channel, write first, halves of a
//                          split command joined);
//  - write data path     : a queue of the beat counts of the AW commands
//                          issued, so WLAST is raised at the end of each AXI
//                          half. OCP2 MData/MDataByteEn/MDataValid map to
//                          WDATA/WSTRB/WVALID and WREADY to SDataAccept. A
//                          write beat waits until its AW command is issued.
//                          MDataLast is not used: WLAST is recomputed because
//                          a split changes where bursts end.
//
// Widths: 32-bit address; DATA_W from 32 to 512 (AxSIZE derived from it);
// ID_W-bit tags; MBurstLength of BL_W bits (1..255 beats). AxCACHE, AxPROT,
// AxQOS and the AXI3 WID are not generated.
module ocp2_axi4_bridge
  import bridge_pkg::*;
#(
  parameter int unsigned ADDR_W  = 32,
  parameter int unsigned DATA_W  = 32,
  parameter int unsigned ID_W    = 4,
  parameter int unsigned BL_W    = 8,
  parameter int unsigned MAX_OUT = 8,
  parameter int unsigned WQ_DEPTH = 4
) (
  input  logic                clk,
  input  logic                resetn,
  // OCP2.2 slave port: request group
  input  logic [2:0]          MCmd,
  input  logic [ADDR_W-1:0]   MAddr,
  input  logic [BL_W-1:0]     MBurstLength,
  input  logic [2:0]          MBurstSeq,
  input  logic                MBurstSingleReq,
  input  logic [ID_W-1:0]     MTagID,
  output logic                SCmdAccept,
  // OCP2.2 data handshake group
  input  logic [DATA_W-1:0]   MData,
  input  logic                MDataValid,
  input  logic [DATA_W/8-1:0] MDataByteEn,
  input  logic                MDataLast,
  output logic                SDataAccept,
  // OCP2.2 response group
  output logic [1:0]          SResp,
  output logic [DATA_W-1:0]   SData,
  output logic [ID_W-1:0]     STagID,
  output logic                SRespLast,
  input  logic                MRespAccept,
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

  localparam int unsigned NID = 1 << ID_W;
  localparam int unsigned CW  = $clog2(MAX_OUT + 1);
  localparam int unsigned QW  = $clog2(WQ_DEPTH);

  logic [NID-1:0] busy_w, busy_r;
  logic [CW-1:0]  outstanding;
  logic           alloc_valid, alloc_read, alloc_split;
  logic [ID_W-1:0] alloc_id;
  logic           wq_ready;

  ocp2_axi_split #(
    .ADDR_W(ADDR_W), .DATA_W(DATA_W), .ID_W(ID_W), .BL_W(BL_W), .MAX_OUT(MAX_OUT)
  ) u_split (
    .clk, .resetn,
    .MCmd, .MAddr, .MBurstLength, .MBurstSeq, .MBurstSingleReq, .MTagID, .SCmdAccept,
    .AWID, .AWADDR, .AWLEN, .AWSIZE, .AWBURST, .AWVALID, .AWREADY,
    .ARID, .ARADDR, .ARLEN, .ARSIZE, .ARBURST, .ARVALID, .ARREADY,
    .busy_w, .busy_r, .outstanding, .wq_ready,
    .alloc_valid, .alloc_read, .alloc_split, .alloc_id
  );

  ocp2_axi_resp_comb #(
    .DATA_W(DATA_W), .ID_W(ID_W), .MAX_OUT(MAX_OUT)
  ) u_comb (
    .clk, .resetn,
    .alloc_valid, .alloc_read, .alloc_split, .alloc_id,
    .busy_w, .busy_r, .outstanding,
    .BID, .BRESP, .BVALID, .BREADY,
    .RID, .RDATA, .RRESP, .RLAST, .RVALID, .RREADY,
    .SResp, .SData, .STagID, .SRespLast, .MRespAccept
  );

  // ---- write data path: beat counts of issued AW commands ----------------
  logic [8:0]  wq_len [WQ_DEPTH];
  logic [QW-1:0] wq_rd, wq_wr;
  logic [QW:0]   wq_cnt;
  logic [8:0]    wbeat_q;
  logic          wq_push, wq_pop, wq_empty;

  assign wq_empty = (wq_cnt == '0);
  assign wq_ready = (wq_cnt != (QW+1)'(WQ_DEPTH));
  assign wq_push  = AWVALID && AWREADY;
  assign wq_pop   = WVALID && WREADY && WLAST;

  assign WDATA       = MData;
  assign WSTRB       = MDataByteEn;
  assign WVALID      = MDataValid && !wq_empty;
  assign WLAST       = (wbeat_q == wq_len[wq_rd] - 9'd1);
  assign SDataAccept = WREADY && !wq_empty;

  always_ff @(posedge clk or negedge resetn) begin
    if (!resetn) begin
      wq_rd   <= '0;
      wq_wr   <= '0;
      wq_cnt  <= '0;
      wbeat_q <= '0;
      for (int i = 0; i < WQ_DEPTH; i++) wq_len[i] <= 9'd1;
    end else begin
      if (wq_push) begin
        wq_len[wq_wr] <= 9'(AWLEN) + 9'd1;
        wq_wr         <= (wq_wr == QW'(WQ_DEPTH - 1)) ? '0 : wq_wr + 1'b1;
      end
      if (wq_pop)
        wq_rd <= (wq_rd == QW'(WQ_DEPTH - 1)) ? '0 : wq_rd + 1'b1;
      wq_cnt <= wq_cnt + (QW+1)'(wq_push) - (QW+1)'(wq_pop);
      if (WVALID && WREADY)
        wbeat_q <= WLAST ? '0 : wbeat_q + 9'd1;
    end
  end

  // MDataLast is implied by the burst length; it is not needed here.
  logic unused_dl;
  assign unused_dl = MDataLast;

  a_w_stable: assert property (@(posedge clk) disable iff (!resetn)
    (WVALID && !WREADY) |=> WVALID);
  a_ar_stable: assert property (@(posedge clk) disable iff (!resetn)
    (ARVALID && !ARREADY) |=> ARVALID && $stable(ARADDR) && $stable(ARID));

endmodule
