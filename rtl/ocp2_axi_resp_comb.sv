// 4 KB response combining block of the OCP2.2-to-AXI4 bridge.
//
// AXI4 has two response channels (B for writes, R for reads); OCP2.2 has one.
// This block merges them onto SResp/SData/STagID/SRespLast, giving priority to
// the write channel whenever both hold a response (a read response already on
// offer is held until accepted, as OCP requires), and hides the second AXI
// command that the splitting block created for a 4 KB crossing:
//  - write: the B response of the first half is taken (BREADY high) without
//    an OCP2 response and remembered; the second half's B produces a single
//    OCP2 response whose SResp is the worse of the two;
//  - read: the R beats of both halves go out in order, but SRespLast is only
//    raised on the final beat of the second half.
//
// Bookkeeping: a table per direction, indexed by AXI ID (= OCP2 tag), holds
// busy, split and first-half-done flags and the first half's write response.
// busy_w/busy_r and the outstanding count go back to the splitting block,
// which refuses new commands on a busy tag or at MAX_OUT.
//
// Timing: purely combinational from B/R to the OCP2 response; BREADY/RREADY
// follow MRespAccept, so the block adds no latency. AXI response codes map to
// OCP as OKAY/EXOKAY -> DVA and SLVERR/DECERR -> ERR (this design's mapping).
module ocp2_axi_resp_comb
  import bridge_pkg::*;
#(
  parameter int unsigned DATA_W  = 32,
  parameter int unsigned ID_W    = 4,
  parameter int unsigned MAX_OUT = 8
) (
  input  logic              clk,
  input  logic              resetn,
  // command allocation, from the splitting block
  input  logic              alloc_valid,
  input  logic              alloc_read,
  input  logic              alloc_split,
  input  logic [ID_W-1:0]   alloc_id,
  output logic [(1<<ID_W)-1:0] busy_w,
  output logic [(1<<ID_W)-1:0] busy_r,
  output logic [$clog2(MAX_OUT+1)-1:0] outstanding,
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
  // OCP2 response group
  output logic [1:0]        SResp,
  output logic [DATA_W-1:0] SData,
  output logic [ID_W-1:0]   STagID,
  output logic              SRespLast,
  input  logic              MRespAccept
);

  localparam int unsigned NID = 1 << ID_W;
  localparam int unsigned CW  = $clog2(MAX_OUT + 1);

  logic [NID-1:0] wsplit_q, wseen_q, rsplit_q, rseen_q;
  logic [1:0]     wresp_q [NID];
  logic [CW-1:0]  out_q;

  // ---- channel selection and OCP2 response ------------------------------
  logic b_first_half;     // B of the first half of a split write: absorb it
  logic r_first_half;     // R of the first half of a split read
  logic b_fire, r_fire, b_done, r_done;
  logic r_lock_q;         // a read response is on offer and not yet accepted
  logic r_sel;            // the read channel drives the OCP2 response

  always_comb begin
    b_first_half = wsplit_q[BID] && !wseen_q[BID];
    r_first_half = rsplit_q[RID] && !rseen_q[RID];
    SResp     = OCP_NULL;
    SData     = RDATA;
    STagID    = BID;
    SRespLast = 1'b0;
    BREADY    = 1'b0;
    RREADY    = 1'b0;
    r_sel     = 1'b0;
    if (BVALID && !r_lock_q) begin
      // write channel first
      if (b_first_half) begin
        BREADY = 1'b1;
      end else begin
        SResp     = wseen_q[BID] ? ocp_resp_merge(axi_to_ocp_resp(BRESP), wresp_q[BID])
                                 : axi_to_ocp_resp(BRESP);
        STagID    = BID;
        SRespLast = 1'b1;
        BREADY    = MRespAccept;
      end
    end else if (RVALID) begin
      r_sel     = 1'b1;
      SResp     = axi_to_ocp_resp(RRESP);
      SData     = RDATA;
      STagID    = RID;
      SRespLast = RLAST && !r_first_half;
      RREADY    = MRespAccept;
    end
  end

  assign b_fire = BVALID && BREADY;
  assign r_fire = RVALID && RREADY;
  assign b_done = b_fire && !b_first_half;            // write command finished
  assign r_done = r_fire && RLAST && !r_first_half;   // read command finished

  // ---- bookkeeping tables ---------------------------------------------------
  always_ff @(posedge clk or negedge resetn) begin
    if (!resetn) begin
      busy_w   <= '0;
      busy_r   <= '0;
      wsplit_q <= '0;
      wseen_q  <= '0;
      rsplit_q <= '0;
      rseen_q  <= '0;
      out_q    <= '0;
      r_lock_q <= 1'b0;
      for (int i = 0; i < NID; i++) wresp_q[i] <= OCP_DVA;
    end else begin
      if (b_fire && b_first_half) begin
        wseen_q[BID] <= 1'b1;
        wresp_q[BID] <= axi_to_ocp_resp(BRESP);
      end
      if (b_done) begin
        busy_w[BID]  <= 1'b0;
        wseen_q[BID] <= 1'b0;
      end
      if (r_fire && RLAST && r_first_half) rseen_q[RID] <= 1'b1;
      if (r_done) begin
        busy_r[RID]  <= 1'b0;
        rseen_q[RID] <= 1'b0;
      end
      // a new command never reuses a busy tag, so this cannot collide with
      // the clearing above
      if (alloc_valid) begin
        if (alloc_read) begin
          busy_r[alloc_id]   <= 1'b1;
          rsplit_q[alloc_id] <= alloc_split;
          rseen_q[alloc_id]  <= 1'b0;
        end else begin
          busy_w[alloc_id]   <= 1'b1;
          wsplit_q[alloc_id] <= alloc_split;
          wseen_q[alloc_id]  <= 1'b0;
        end
      end
      r_lock_q <= r_sel && !MRespAccept;
      out_q <= out_q + CW'(alloc_valid) - CW'(b_done) - CW'(r_done);
    end
  end

  assign outstanding = out_q;

  a_b_known: assert property (@(posedge clk) disable iff (!resetn)
    BVALID |-> busy_w[BID]);
  a_r_known: assert property (@(posedge clk) disable iff (!resetn)
    RVALID |-> busy_r[RID]);
  a_resp_stable: assert property (@(posedge clk) disable iff (!resetn)
    (SResp != OCP_NULL && !MRespAccept) |=> SResp != OCP_NULL);

endmodule
