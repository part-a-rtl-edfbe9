// Response channel for bridges whose upstream side is an OCP1.0 master.
//
// The OCP1 master has no tags and no response handshake: it expects the read
// data of its bursts back in request order, one response per read request,
// and no response for a write. Downstream (OCP2.2 or AXI4) responses carry a
// tag, may arrive out of order across tags and also exist for writes. This
// block bridges the two with a tag-indexed buffer:
//  - alloc: every downstream transaction takes the next slot in a circular
//    order; its index is the tag the bridge puts on the transaction. The slot
//    records whether it is a read and how many responses (beats) it expects.
//    alloc_ready is low when all SLOTS are in use (outstanding limit).
//  - in: every downstream response beat is written into its tag's slot at the
//    slot's next beat position. The input is never stalled, so the
//    downstream response handshake can be answered at once.
//  - out: the oldest slot (head) is drained in order. A read slot sends each
//    beat as soon as it is present (one per cycle, SResp/SData); a write slot
//    sends nothing and is freed when all its responses are in - the write
//    response is dropped.
//
// Timing: a response beat written in cycle t can leave in cycle t+1 at the
// earliest. Storage is SLOTS x MAX_BEATS words. Slot order and cut-through
// drain are this design's choices; the document states the function (tags
// generated by the bridge, write responses discarded, order kept).
module ocp_resp_reorder
  import bridge_pkg::*;
#(
  parameter int unsigned DATA_W    = 32,
  parameter int unsigned SLOTS     = 4,
  parameter int unsigned MAX_BEATS = 8,
  localparam int unsigned TW = (SLOTS > 1) ? $clog2(SLOTS) : 1,
  localparam int unsigned BW = $clog2(MAX_BEATS + 1)
) (
  input  logic              clk,
  input  logic              resetn,
  // slot allocation
  input  logic              alloc_valid,
  input  logic              alloc_read,
  input  logic [BW-1:0]     alloc_len,
  output logic              alloc_ready,
  output logic [TW-1:0]     alloc_tag,
  // downstream response beats
  input  logic              in_valid,
  input  logic [TW-1:0]     in_tag,
  input  logic [1:0]        in_resp,
  input  logic [DATA_W-1:0] in_data,
  // in-order responses to the OCP1 master
  output logic [1:0]        out_resp,
  output logic [DATA_W-1:0] out_data,
  output logic              empty
);

  localparam int unsigned IW = $clog2(SLOTS * MAX_BEATS);
  localparam int unsigned PW = $clog2(MAX_BEATS);

  typedef struct packed {
    logic          used;
    logic          rd;
    logic [BW-1:0] len;
    logic [BW-1:0] rcv;
    logic [BW-1:0] snt;
  } slot_t;

  slot_t              slot_q [SLOTS];
  logic [DATA_W+1:0]  mem_q  [SLOTS * MAX_BEATS];   // {resp, data}
  logic [TW-1:0]      head_q, tail_q;
  logic [TW:0]        cnt_q;

  function automatic logic [TW-1:0] nxt(input logic [TW-1:0] p);
    return (p == TW'(SLOTS - 1)) ? '0 : p + 1'b1;
  endfunction

  function automatic logic [IW-1:0] idx(input logic [TW-1:0] s, input logic [BW-1:0] b);
    return IW'(s) * IW'(MAX_BEATS) + IW'(b[PW-1:0]);
  endfunction

  assign alloc_ready = (cnt_q != (TW+1)'(SLOTS));
  assign alloc_tag   = tail_q;
  assign empty       = (cnt_q == '0);

  slot_t h;
  logic  send, drop, free_head, do_alloc;

  always_comb begin
    h         = slot_q[head_q];
    send      = h.used && h.rd && (h.snt != h.rcv);
    drop      = h.used && !h.rd && (h.rcv == h.len);
    free_head = drop || (send && (h.snt + 1'b1 == h.len));
    do_alloc  = alloc_valid && alloc_ready;
    out_resp  = send ? mem_q[idx(head_q, h.snt)][DATA_W+1:DATA_W] : OCP_NULL;
    out_data  = send ? mem_q[idx(head_q, h.snt)][DATA_W-1:0] : '0;
  end

  always_ff @(posedge clk) begin
    if (in_valid)
      mem_q[idx(in_tag, slot_q[in_tag].used ? slot_q[in_tag].rcv : '0)] <= {in_resp, in_data};
  end

  always_ff @(posedge clk or negedge resetn) begin
    if (!resetn) begin
      head_q <= '0;
      tail_q <= '0;
      cnt_q  <= '0;
      for (int i = 0; i < SLOTS; i++) slot_q[i] <= '0;
    end else begin
      if (in_valid)
        slot_q[in_tag].rcv <= slot_q[in_tag].rcv + 1'b1;
      if (send)
        slot_q[head_q].snt <= h.snt + 1'b1;
      if (free_head) begin
        slot_q[head_q].used <= 1'b0;
        head_q <= nxt(head_q);
      end
      if (do_alloc) begin
        // a response may arrive in the very cycle its slot is allocated
        slot_q[tail_q] <= '{used: 1'b1, rd: alloc_read, len: alloc_len,
                            rcv: BW'(in_valid && (in_tag == tail_q)), snt: '0};
        tail_q <= nxt(tail_q);
      end
      cnt_q <= cnt_q + (TW+1)'(do_alloc) - (TW+1)'(free_head);
    end
  end

  a_in_known: assert property (@(posedge clk) disable iff (!resetn)
    in_valid |-> (slot_q[in_tag].used && (slot_q[in_tag].rcv != slot_q[in_tag].len)) ||
                 (alloc_valid && alloc_ready && (in_tag == tail_q)));
  a_len_ok: assert property (@(posedge clk) disable iff (!resetn)
    alloc_valid |-> (alloc_len != '0) && (alloc_len <= BW'(MAX_BEATS)));

endmodule
