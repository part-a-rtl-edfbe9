// Response generation block of the OCP1.0-to-APB3 bridge.
//
// An APB3 slave returns read data but no response code, and the OCP1.0
// master expects a response for reads (and non-posted writes) in the cycle
// its request completes. This block produces it from the completion pulse of
// the PENABLE/PSEL generation block:
//   completion of a decoded transfer : SResp = DVA, SData = PRDATA for a read
//                                      (zero for a write);
//   completion of a decode miss      : SResp = ERR, SData = zero;
//   otherwise                        : SResp = NULL.
// The response is combinational, so it appears with SCmdAccept and there is
// never more than one transfer outstanding.
module apb_resp_gen
  import bridge_pkg::*;
#(
  parameter int unsigned DATA_W = 32
) (
  input  logic              cmpl,
  input  logic              cmpl_rd,
  input  logic              cmpl_err,
  input  logic [DATA_W-1:0] PRDATA,
  output logic [1:0]        SResp,
  output logic [DATA_W-1:0] SData
);

  always_comb begin
    SResp = OCP_NULL;
    SData = '0;
    if (cmpl) begin
      SResp = cmpl_err ? OCP_ERR : OCP_DVA;
      if (cmpl_rd && !cmpl_err) SData = PRDATA;
    end
  end

endmodule
