// Response channel of the OCP1.0-to-AXI4 bridge.
//
// AXI4 returns write responses on B and read data on R; the OCP1.0 master
// wants no write responses and its read data in request order, without a
// response handshake. Only one AXI response channel is accepted per cycle and
// the write channel has priority: BREADY is always high, RREADY only when no
// B response is offered. B responses are counted (to free outstanding write
// commands) and dropped; R beats go into the tag-indexed reorder buffer
// (ocp_resp_reorder), whose slot index is the ARID the command splitting
// logic used, and leave it in order on SResp/SData (RRESP OKAY/EXOKAY -> DVA,
// SLVERR/DECERR -> ERR).
//
// wr_room tells the command splitting logic that at least two more write
// commands (a split burst) may be issued without exceeding MAX_WR
// outstanding writes. MAX_WR and the slot count are this design's choices.
module ocp1_axi_resp
  import bridge_pkg::*;
#(
  parameter int unsigned DATA_W  = 32,
  parameter int unsigned ID_W    = 4,
  parameter int unsigned MAX_RD  = 4,
  parameter int unsigned MAX_WR  = 4,
  parameter int unsigned MAX_BEATS = 8,
  localparam int unsigned TAG_W  = (MAX_RD > 1) ? $clog2(MAX_RD) : 1,
  localparam int unsigned BL_W   = $clog2(MAX_BEATS + 1)
) (
  input  logic              clk,
  input  logic              resetn,
  // read slot allocation / write bookkeeping, with the splitting logic
  input  logic              alloc_valid,
  input  logic [BL_W-1:0]   alloc_len,
  output logic              alloc_ready,
  output logic [TAG_W-1:0]  alloc_tag,
  input  logic              aw_fire,
  output logic              wr_room,
  // AXI4 write response channel
  input  logic [ID_W-1:0]   BID,
  input  logic [1:0]        BRESP,
  input  logic              BVALID,
  output logic              BREADY,
  // AXI4 read data channel
  input  logic [ID_W-1:0]   RID,
  input  logic [DATA_W-1:0] RDATA,
  input  logic [1:0]        RRESP,
  input  logic              RLAST,
  input  logic              RVALID,
  output logic              RREADY,
  // OCP1.0 response
  output logic [1:0]        SResp,
  output logic [DATA_W-1:0] SData
);

  localparam int unsigned WW = $clog2(MAX_WR + 1);

  logic [WW-1:0] wr_cnt_q;
  logic          empty;

  assign BREADY  = 1'b1;
  assign RREADY  = !BVALID;
  assign wr_room = (32'(wr_cnt_q) + 2 <= MAX_WR);

  always_ff @(posedge clk or negedge resetn) begin
    if (!resetn) wr_cnt_q <= '0;
    else         wr_cnt_q <= wr_cnt_q + WW'(aw_fire) - WW'(BVALID && BREADY);
  end

  ocp_resp_reorder #(
    .DATA_W(DATA_W), .SLOTS(MAX_RD), .MAX_BEATS(MAX_BEATS)
  ) u_rob (
    .clk, .resetn,
    .alloc_valid, .alloc_read(1'b1), .alloc_len, .alloc_ready, .alloc_tag,
    .in_valid (RVALID && RREADY),
    .in_tag   (TAG_W'(RID)),
    .in_resp  (axi_to_ocp_resp(RRESP)),
    .in_data  (RDATA),
    .out_resp (SResp),
    .out_data (SData),
    .empty
  );

  // Write responses are not forwarded; BID/BRESP and RLAST carry nothing the
  // OCP1 side needs (beats are counted per slot).
  logic unused;
  assign unused = ^{BID, BRESP, RLAST, empty, RID};

  a_one_channel: assert property (@(posedge clk) disable iff (!resetn)
    !(BVALID && BREADY && RVALID && RREADY));
  a_wr_count: assert property (@(posedge clk) disable iff (!resetn)
    BVALID |-> (wr_cnt_q != '0));

endmodule
