// PENABLE/PSEL generation block of the OCP1.0-to-APB3 bridge.
//
// Runs the APB transfer state machine IDLE -> SETUP -> ENABLE:
//   IDLE   : PSEL = 0, PENABLE = 0; a request whose address decodes to the
//            slave moves to SETUP, latching address, direction and data;
//   SETUP  : PSEL = 1, PENABLE = 0; always one cycle, then ENABLE;
//   ENABLE : PSEL = 1, PENABLE = 1; held while PREADY is low. With PREADY
//            high the transfer ends and the machine goes to SETUP if another
//            request is already waiting, otherwise to IDLE.
// Every OCP1 request becomes exactly one APB transfer (no bursts on APB).
//
// PSEL comes from address decoding: the slave occupies the window
// (MAddr & SLV_MASK) == SLV_BASE. A request outside it makes no APB transfer
// and is accepted at once with an error completion.
//
// OCP1 acceptance: a posted write (MCmd = WR, no response wanted) is accepted
// when it is latched into SETUP, so the next request can be waiting when the
// transfer ends and the ENABLE -> SETUP path is taken. A read or a non-posted
// write is accepted in the cycle its ENABLE phase completes, with cmpl high so
// the response generation block can answer in that same cycle.
// The decoding window and the posted-write early accept are this design's
// choices; APB3's PSLVERR is not used.
module apb_psel_penable_gen
  import bridge_pkg::*;
#(
  parameter int unsigned      ADDR_W   = 32,
  parameter int unsigned      DATA_W   = 32,
  parameter logic [ADDR_W-1:0] SLV_BASE = '0,
  parameter logic [ADDR_W-1:0] SLV_MASK = 32'hFFFF_0000
) (
  input  logic              clk,
  input  logic              resetn,
  // OCP1 request
  input  logic [2:0]        MCmd,
  input  logic [ADDR_W-1:0] MAddr,
  input  logic [DATA_W-1:0] MData,
  output logic              SCmdAccept,
  // APB3 master
  output logic [ADDR_W-1:0] PADDR,
  output logic              PWRITE,
  output logic              PSEL,
  output logic              PENABLE,
  output logic [DATA_W-1:0] PWDATA,
  input  logic              PREADY,
  // completion of a request that needs a response
  output logic              cmpl,
  output logic              cmpl_rd,
  output logic              cmpl_err
);

  typedef enum logic [1:0] {ST_IDLE, ST_SETUP, ST_ENABLE} apb_state_e;
  apb_state_e state_q, state_d;

  logic valid, hit, posted, load;
  logic posted_q;

  always_comb begin
    valid  = (MCmd != OCP_IDLE);
    hit    = ((MAddr & SLV_MASK) == SLV_BASE);
    posted = (MCmd == OCP_WR);

    state_d    = state_q;
    load       = 1'b0;
    SCmdAccept = 1'b0;
    cmpl       = 1'b0;
    cmpl_rd    = 1'b0;
    cmpl_err   = 1'b0;

    case (state_q)
      ST_IDLE: begin
        if (valid && hit) begin
          load       = 1'b1;
          state_d    = ST_SETUP;
          SCmdAccept = posted;
        end else if (valid) begin
          // decode miss: no slave selected, answer at once
          SCmdAccept = 1'b1;
          cmpl       = !posted;
          cmpl_rd    = ocp_is_read(MCmd);
          cmpl_err   = 1'b1;
        end
      end
      ST_SETUP: state_d = ST_ENABLE;
      ST_ENABLE: begin
        if (PREADY) begin
          if (!posted_q) begin
            SCmdAccept = 1'b1;
            cmpl       = 1'b1;
            cmpl_rd    = !PWRITE;
            state_d    = ST_IDLE;
          end else if (valid && hit) begin
            // next request already waiting: back-to-back transfer
            load       = 1'b1;
            state_d    = ST_SETUP;
            SCmdAccept = posted;
          end else begin
            state_d    = ST_IDLE;
          end
        end
      end
      default: state_d = ST_IDLE;
    endcase
  end

  always_ff @(posedge clk or negedge resetn) begin
    if (!resetn) begin
      state_q  <= ST_IDLE;
      posted_q <= 1'b0;
      PADDR    <= '0;
      PWRITE   <= 1'b0;
      PWDATA   <= '0;
    end else begin
      state_q <= state_d;
      if (load) begin
        posted_q <= posted;
        PADDR    <= MAddr;
        PWRITE   <= ocp_is_write(MCmd);
        PWDATA   <= MData;
      end
    end
  end

  assign PSEL    = (state_q != ST_IDLE);
  assign PENABLE = (state_q == ST_ENABLE);

  a_setup_one_cycle: assert property (@(posedge clk) disable iff (!resetn)
    (PSEL && !PENABLE) |=> (PSEL && PENABLE));
  a_hold_in_enable: assert property (@(posedge clk) disable iff (!resetn)
    (PENABLE && !PREADY) |=> (PENABLE && $stable(PADDR) && $stable(PWRITE) && $stable(PWDATA)));

endmodule
