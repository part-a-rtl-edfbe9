// Shared encodings and helper functions for the OCP1.0 / OCP2.2 / AXI4 / APB3
// protocol bridges.
//
// OCP command (MCmd), response (SResp), OCP2 burst sequence (MBurstSeq) and
// OCP1 burst (MBurst) codes, plus the AXI4 burst and response codes. The code
// values are those of the public OCP and AMBA specifications; the bridges
// themselves only name the signals and their widths (MCmd 3 bits, SResp 2
// bits, MBurst/MBurstSeq 3 bits, AxBURST and xRESP 2 bits).
package bridge_pkg;

  // OCP transfer command, MCmd[2:0]
  typedef enum logic [2:0] {
    OCP_IDLE = 3'd0,
    OCP_WR   = 3'd1,
    OCP_RD   = 3'd2,
    OCP_RDEX = 3'd3,
    OCP_RDL  = 3'd4,
    OCP_WRNP = 3'd5,
    OCP_WRC  = 3'd6,
    OCP_BCST = 3'd7
  } ocp_cmd_e;

  // OCP response, SResp[1:0]
  typedef enum logic [1:0] {
    OCP_NULL = 2'd0,
    OCP_DVA  = 2'd1,
    OCP_FAIL = 2'd2,
    OCP_ERR  = 2'd3
  } ocp_resp_e;

  // OCP2.2 address sequence of a burst, MBurstSeq[2:0]
  typedef enum logic [2:0] {
    SEQ_INCR  = 3'd0,
    SEQ_DFLT1 = 3'd1,
    SEQ_WRAP  = 3'd2,
    SEQ_DFLT2 = 3'd3,
    SEQ_XOR   = 3'd4,
    SEQ_STRM  = 3'd5,
    SEQ_UNKN  = 3'd6,
    SEQ_BLCK  = 3'd7
  } ocp_burstseq_e;

  // OCP1.0 burst code, MBurst[2:0]: carries both the kind and the length of
  // a burst.
  typedef enum logic [2:0] {
    B1_LAST  = 3'd0,
    B1_DFLT1 = 3'd1,
    B1_TWO   = 3'd2,
    B1_FOUR  = 3'd3,
    B1_STRM  = 3'd4,
    B1_EIGHT = 3'd5,
    B1_CONT  = 3'd6,
    B1_DFLT2 = 3'd7
  } ocp1_burst_e;

  // AXI4 burst type, AxBURST[1:0]
  typedef enum logic [1:0] {
    AXI_FIXED = 2'b00,
    AXI_INCR  = 2'b01,
    AXI_WRAP  = 2'b10
  } axi_burst_e;

  // AXI4 response, xRESP[1:0]
  typedef enum logic [1:0] {
    AXI_OKAY   = 2'b00,
    AXI_EXOKAY = 2'b01,
    AXI_SLVERR = 2'b10,
    AXI_DECERR = 2'b11
  } axi_resp_e;

  // Maximum number of beats in an OCP1 burst (MBurst = EIGHT).
  localparam int unsigned OCP1_MAX_BEATS = 8;

  // Read-type OCP commands go to the AXI read channel, all others (that are
  // not IDLE) to the write channel.
  function automatic logic ocp_is_read(input logic [2:0] cmd);
    return (cmd == OCP_RD) || (cmd == OCP_RDEX) || (cmd == OCP_RDL);
  endfunction

  function automatic logic ocp_is_write(input logic [2:0] cmd);
    return (cmd != OCP_IDLE) && !ocp_is_read(cmd);
  endfunction

  // Number of transfers announced by an OCP1 MBurst code. Codes that carry no
  // length (LAST, CONT, STRM, DFLT1/2) start a single transfer.
  function automatic logic [3:0] ocp1_burst_len(input logic [2:0] mburst);
    case (mburst)
      B1_TWO:   return 4'd2;
      B1_FOUR:  return 4'd4;
      B1_EIGHT: return 4'd8;
      default:  return 4'd1;
    endcase
  endfunction

  // AXI response to OCP response: OKAY/EXOKAY give DVA, SLVERR/DECERR give ERR.
  function automatic logic [1:0] axi_to_ocp_resp(input logic [1:0] resp);
    return resp[1] ? OCP_ERR : OCP_DVA;
  endfunction

  // Combine the responses of the two halves of a split command: an error in
  // either half wins.
  function automatic logic [1:0] ocp_resp_merge(input logic [1:0] a, input logic [1:0] b);
    if (a == OCP_ERR || b == OCP_ERR) return OCP_ERR;
    if (a == OCP_FAIL || b == OCP_FAIL) return OCP_FAIL;
    return OCP_DVA;
  endfunction

endpackage
