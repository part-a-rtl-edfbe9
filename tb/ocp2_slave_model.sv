// Behavioural OCP2.2 slave with a word memory, for testbenches only.
//
// - Requests (SRMD, MBurstLength beats, INCR) are accepted with random
//   SCmdAccept and queued. Write data beats (MDataValid) are accepted with
//   random SDataAccept and written in write-request order; MDataLast is
//   checked against the burst length.
// - Responses: when no response is in progress the model picks at random one
//   of the ready transactions that is the oldest of its tag (reads at once,
//   writes once all their data is in), so different tags complete out of
//   order and same-tag ones in order. A read gives one response per beat
//   (SRespLast on the last), a write one response. SResp is held until
//   MRespAccept.
// - Addresses at or above ERR_BASE answer ERR.
// Counters (errors, out_of_order, reqs) are read by the testbench.
module ocp2_slave_model #(
  parameter int unsigned DATA_W    = 32,
  parameter int unsigned TAG_W     = 2,
  parameter int unsigned BL_W      = 4,
  parameter int unsigned MEM_AW    = 14,
  parameter int unsigned READY_PCT = 70,
  parameter int unsigned RESP_PCT  = 50,          // chance per cycle to start a response
  parameter logic [31:0] ERR_BASE  = 32'hFFFF_0000
) (
  input  logic                clk,
  input  logic                resetn,
  input  logic [2:0]          MCmd,
  input  logic [31:0]         MAddr,
  input  logic [BL_W-1:0]     MBurstLength,
  input  logic [2:0]          MBurstSeq,
  input  logic [TAG_W-1:0]    MTagID,
  output logic                SCmdAccept,
  input  logic [DATA_W-1:0]   MData,
  input  logic [DATA_W/8-1:0] MDataByteEn,
  input  logic                MDataValid,
  input  logic                MDataLast,
  output logic                SDataAccept,
  output logic [1:0]          SResp,
  output logic [DATA_W-1:0]   SData,
  output logic                SRespLast,
  output logic [TAG_W-1:0]    STagID,
  input  logic                MRespAccept
);

  localparam int unsigned BPB = DATA_W / 8;

  typedef struct {
    logic [TAG_W-1:0] tag;
    logic [31:0]      addr;
    int               len;
    bit               rd;
    bit               done;      // write: all data in
  } txn_t;

  logic [DATA_W-1:0] mem [1 << MEM_AW];
  txn_t q[$];          // all transactions without a finished response
  int   wq[$];         // positions (serial numbers) of writes waiting for data
  int   serial[$];     // serial number of each entry of q
  int   next_serial, wbeat, cur, rbeat;
  bit   busy;

  int errors, out_of_order, reqs;

  function automatic int unsigned widx(input logic [31:0] a);
    return (a / BPB) % (1 << MEM_AW);
  endfunction

  function automatic int find(input int sn);
    for (int i = 0; i < q.size(); i++) if (serial[i] == sn) return i;
    return -1;
  endfunction

  initial begin
    for (int i = 0; i < (1 << MEM_AW); i++) mem[i] = DATA_W'(i * 32'h01010101 + 32'h5a);
  end

  always @(posedge clk) begin
    if (!resetn) begin
      SCmdAccept <= 0; SDataAccept <= 0; SResp <= 2'd0; SData <= '0; SRespLast <= 0;
      STagID <= '0;
      q.delete(); wq.delete(); serial.delete();
      next_serial = 0; wbeat = 0; busy = 0; cur = 0; rbeat = 0;
    end else begin
      // ---- handshakes of this edge ------------------------------------------
      if (MCmd != 3'd0 && SCmdAccept) begin
        txn_t t;
        t.tag = MTagID; t.addr = MAddr; t.len = int'(MBurstLength); t.rd = (MCmd == 3'd2);
        t.done = t.rd;
        if (MBurstSeq != 3'd0) begin errors++; $display("ocp2_slave_model: MBurstSeq"); end
        if (t.len == 0) begin errors++; $display("ocp2_slave_model: zero length"); end
        q.push_back(t);
        serial.push_back(next_serial);
        if (!t.rd) wq.push_back(next_serial);
        next_serial++;
        reqs++;
      end
      if (MDataValid && SDataAccept) begin
        int k;
        k = (wq.size() > 0) ? find(wq[0]) : -1;
        if (k < 0) begin
          errors++; $display("ocp2_slave_model: data without write request");
        end else begin
          int unsigned ix;
          ix = widx(q[k].addr + wbeat * BPB);
          for (int b = 0; b < BPB; b++)
            if (MDataByteEn[b]) mem[ix][8*b +: 8] = MData[8*b +: 8];
          if (MDataLast != (wbeat == q[k].len - 1)) begin
            errors++; $display("ocp2_slave_model: MDataLast wrong at beat %0d of %0d", wbeat, q[k].len);
          end
          if (wbeat == q[k].len - 1) begin
            q[k].done = 1;
            void'(wq.pop_front());
            wbeat = 0;
          end else wbeat++;
        end
      end
      if (SResp != 2'd0 && MRespAccept) begin
        int k;
        k = find(cur);
        if (!q[k].rd || rbeat == q[k].len - 1) begin
          q.delete(k); serial.delete(k); busy = 0;
        end else rbeat++;
      end

      // ---- next outputs ------------------------------------------------------
      SCmdAccept  <= ($urandom_range(99) < READY_PCT);
      SDataAccept <= ($urandom_range(99) < READY_PCT);

      if (!busy && q.size() > 0 && $urandom_range(99) < RESP_PCT) begin
        int cand[$];
        int pick;
        cand.delete();
        for (int i = 0; i < q.size(); i++) begin
          bit older;
          older = 0;
          for (int j = 0; j < i; j++) if (q[j].tag == q[i].tag) older = 1;
          if (!older && q[i].done) cand.push_back(i);
        end
        if (cand.size() > 0) begin
          pick = cand[$urandom_range(cand.size() - 1)];
          if (pick != 0) out_of_order++;
          cur = serial[pick]; rbeat = 0; busy = 1;
        end
      end
      if (busy && !(SResp != 2'd0 && !MRespAccept)) begin
        int k;
        k = find(cur);
        SResp     <= (q[k].addr >= ERR_BASE) ? 2'd3 : 2'd1;
        STagID    <= q[k].tag;
        SRespLast <= !q[k].rd || (rbeat == q[k].len - 1);
        SData     <= q[k].rd ? mem[widx(q[k].addr + rbeat * BPB)] : '0;
      end else if (!busy) begin
        SResp <= 2'd0; SRespLast <= 0;
      end
    end
  end

endmodule
