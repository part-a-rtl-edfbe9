// 4 KB splitting block of the OCP2.2-to-AXI4 bridge.
//
// Takes one OCP2.2 single-request (SRMD) command at a time, steers it by MCmd
// to the AXI4 write-address (AW) or read-address (AR) channel and, because an
// AXI4 burst may not cross a 4 KB address boundary while an OCP2 burst may,
// cuts an INCR burst that crosses one into two AXI commands carrying the same
// ID (the OCP2 MTagID). WRAP bursts never cross a boundary and pass whole.
//
// Timing: SCmdAccept is high in the cycle the command is latched (one command
// in flight in this block). The next cycle the first AXI command is offered;
// a split command offers its second half after the first is accepted. So a
// command takes at least two cycles, three if split.
//
// Outstanding limit: the response combining block reports, per direction and
// per tag, whether a command is still waiting for its response (busy_w /
// busy_r) and the total number outstanding. A command is refused (SCmdAccept
// low, i.e. the master is back-pressured) while an earlier command with the
// same tag is still outstanding, or MAX_OUT commands are. One command per tag
// keeps same-tag responses in order, as OCP requires, although AXI would
// reorder a read and a write with the same ID; this rule and the
// register-then-issue structure are this design's choices.
//
// On every accepted command alloc_* tells the combining block whether it is a
// read and whether it was split. wq_ready stops a write half from being
// issued while the write-length queue of the bridge is full.
module ocp2_axi_split
  import bridge_pkg::*;
#(
  parameter int unsigned ADDR_W  = 32,
  parameter int unsigned DATA_W  = 32,
  parameter int unsigned ID_W    = 4,
  parameter int unsigned BL_W    = 8,
  parameter int unsigned MAX_OUT = 8
) (
  input  logic              clk,
  input  logic              resetn,
  // OCP2 request group
  input  logic [2:0]        MCmd,
  input  logic [ADDR_W-1:0] MAddr,
  input  logic [BL_W-1:0]   MBurstLength,
  input  logic [2:0]        MBurstSeq,
  input  logic              MBurstSingleReq,
  input  logic [ID_W-1:0]   MTagID,
  output logic              SCmdAccept,
  // AXI4 write address channel
  output logic [ID_W-1:0]   AWID,
  output logic [ADDR_W-1:0] AWADDR,
  output logic [7:0]        AWLEN,
  output logic [2:0]        AWSIZE,
  output logic [1:0]        AWBURST,
  output logic              AWVALID,
  input  logic              AWREADY,
  // AXI4 read address channel
  output logic [ID_W-1:0]   ARID,
  output logic [ADDR_W-1:0] ARADDR,
  output logic [7:0]        ARLEN,
  output logic [2:0]        ARSIZE,
  output logic [1:0]        ARBURST,
  output logic              ARVALID,
  input  logic              ARREADY,
  // outstanding bookkeeping, from the response combining block
  input  logic [(1<<ID_W)-1:0] busy_w,
  input  logic [(1<<ID_W)-1:0] busy_r,
  input  logic [$clog2(MAX_OUT+1)-1:0] outstanding,
  input  logic              wq_ready,
  output logic              alloc_valid,
  output logic              alloc_read,
  output logic              alloc_split,
  output logic [ID_W-1:0]   alloc_id
);

  localparam int unsigned BPB  = DATA_W / 8;            // bytes per beat
  localparam int unsigned SIZE = $clog2(BPB);           // AxSIZE

  typedef enum logic [1:0] {S_IDLE, S_PART1, S_PART2} state_e;
  state_e state_q;

  logic              rd_q, split_q;
  logic [ID_W-1:0]   id_q;
  logic [ADDR_W-1:0] addr1_q, addr2_q;
  logic [8:0]        len1_q, len2_q;     // beats, 1..256
  logic [1:0]        burst_q;

  // ---- split arithmetic on the incoming command -------------------------
  logic [12:0]       page_off;           // offset inside the 4 KB page
  logic [13+BL_W:0]  end_off;            // offset just past the burst
  logic [12:0]       beats_left;         // beats that still fit in the page
  logic              crosses, is_wrap, take;
  logic [ADDR_W-1:0] next_page;

  always_comb begin
    // an unaligned start address counts from the start of its beat
    page_off   = {1'b0, MAddr[11:SIZE], SIZE'(0)};
    end_off    = (14+BL_W)'(page_off) + ((14+BL_W)'(MBurstLength) << SIZE);
    beats_left = (13'd4096 - page_off) >> SIZE;
    is_wrap    = (MBurstSeq == SEQ_WRAP);
    crosses    = !is_wrap && (end_off > (14+BL_W)'(4096));
    next_page  = {MAddr[ADDR_W-1:12] + 1'b1, 12'h000};
  end

  assign take = (state_q == S_IDLE) && (MCmd != OCP_IDLE) &&
                !busy_r[MTagID] && !busy_w[MTagID] &&
                (outstanding < ($clog2(MAX_OUT+1))'(MAX_OUT));

  assign SCmdAccept  = take;
  assign alloc_valid = take;
  assign alloc_read  = ocp_is_read(MCmd);
  assign alloc_split = crosses;
  assign alloc_id    = MTagID;

  always_ff @(posedge clk or negedge resetn) begin
    if (!resetn) begin
      state_q <= S_IDLE;
      rd_q    <= 1'b0;
      split_q <= 1'b0;
      id_q    <= '0;
      addr1_q <= '0;
      addr2_q <= '0;
      len1_q  <= '0;
      len2_q  <= '0;
      burst_q <= AXI_INCR;
    end else begin
      case (state_q)
        S_IDLE: if (take) begin
          state_q <= S_PART1;
          rd_q    <= ocp_is_read(MCmd);
          split_q <= crosses;
          id_q    <= MTagID;
          addr1_q <= MAddr;
          addr2_q <= next_page;
          burst_q <= is_wrap ? AXI_WRAP : AXI_INCR;
          if (crosses) begin
            len1_q <= 9'(beats_left);
            len2_q <= 9'(MBurstLength) - 9'(beats_left);
          end else begin
            len1_q <= 9'(MBurstLength);
            len2_q <= '0;
          end
        end
        S_PART1: if (rd_q ? ARREADY : (AWREADY && wq_ready))
          state_q <= split_q ? S_PART2 : S_IDLE;
        S_PART2: if (rd_q ? ARREADY : (AWREADY && wq_ready))
          state_q <= S_IDLE;
        default: state_q <= S_IDLE;
      endcase
    end
  end

  // ---- AXI address channels ----------------------------------------------
  logic [ADDR_W-1:0] cur_addr;
  logic [8:0]        cur_len;
  logic              issuing;

  assign issuing  = (state_q == S_PART1) || (state_q == S_PART2);
  assign cur_addr = (state_q == S_PART2) ? addr2_q : addr1_q;
  assign cur_len  = (state_q == S_PART2) ? len2_q : len1_q;

  assign AWID    = id_q;
  assign AWADDR  = cur_addr;
  assign AWLEN   = 8'(cur_len - 9'd1);
  assign AWSIZE  = 3'(SIZE);
  assign AWBURST = burst_q;
  assign AWVALID = issuing && !rd_q && wq_ready;

  assign ARID    = id_q;
  assign ARADDR  = cur_addr;
  assign ARLEN   = 8'(cur_len - 9'd1);
  assign ARSIZE  = 3'(SIZE);
  assign ARBURST = burst_q;
  assign ARVALID = issuing && rd_q;

  // MBurstSingleReq: only single-request bursts are generated by the OCP2
  // master of this bridge; the flag is carried for protocol completeness.
  logic unused_sr;
  assign unused_sr = MBurstSingleReq;

  // An issued INCR burst must not cross a 4 KB page.
  logic [20:0] issue_end;
  assign issue_end = 21'({cur_addr[11:SIZE], SIZE'(0)}) + (21'(cur_len) << SIZE);
  a_no_4k_cross: assert property (@(posedge clk) disable iff (!resetn)
    (issuing && burst_q == AXI_INCR) |-> (issue_end <= 21'd4096));
  a_aw_stable: assert property (@(posedge clk) disable iff (!resetn)
    (AWVALID && !AWREADY) |=> AWVALID && $stable(AWADDR) && $stable(AWLEN));

endmodule
