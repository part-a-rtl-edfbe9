// Behavioural APB3 slave with a word memory, for testbenches only.
//
// PREADY is random (wait states) during ENABLE; a write is stored and a read
// returns PRDATA when PENABLE and PREADY are both high. PRDATA is driven
// from the memory at PADDR during the transfer. The model checks the APB
// sequence (a SETUP cycle before every ENABLE, address and controls stable
// through ENABLE) and counts wait states, transfers and back-to-back
// transfers (ENABLE followed directly by SETUP).
module apb3_slave_model #(
  parameter int unsigned DATA_W    = 32,
  parameter int unsigned MEM_AW    = 10,
  parameter int unsigned READY_PCT = 50
) (
  input  logic              clk,
  input  logic              resetn,
  input  logic [31:0]       PADDR,
  input  logic              PWRITE,
  input  logic              PSEL,
  input  logic              PENABLE,
  input  logic [DATA_W-1:0] PWDATA,
  output logic              PREADY,
  output logic [DATA_W-1:0] PRDATA
);

  localparam int unsigned BPB = DATA_W / 8;

  logic [DATA_W-1:0] mem [1 << MEM_AW];
  logic              prev_setup, prev_end, prev_wait;
  logic [31:0]       prev_addr;
  logic              prev_write;

  int errors, waits, transfers, back_to_back;

  function automatic int unsigned widx(input logic [31:0] a);
    return (a / BPB) % (1 << MEM_AW);
  endfunction

  initial begin
    for (int i = 0; i < (1 << MEM_AW); i++) mem[i] = DATA_W'(i * 32'h00010001 + 32'h0a0b);
  end

  assign PRDATA = (PSEL && !PWRITE) ? mem[widx(PADDR)] : '0;

  always @(posedge clk) begin
    if (!resetn) begin
      PREADY <= 0; prev_wait <= 0; prev_setup <= 0; prev_end <= 0; prev_addr <= '0; prev_write <= 0;
    end else begin
      if (PENABLE && !prev_setup && !prev_wait) begin
        errors++; $display("apb3_slave_model: ENABLE without SETUP");
      end
      if (PENABLE && (PADDR != prev_addr || PWRITE != prev_write)) begin
        errors++; $display("apb3_slave_model: address changed in ENABLE");
      end
      if (PSEL && PENABLE && !PREADY) waits++;
      if (PSEL && PENABLE && PREADY) begin
        transfers++;
        if (PWRITE) mem[widx(PADDR)] <= PWDATA;
      end
      if (PSEL && !PENABLE && prev_end) back_to_back++;
      prev_setup <= PSEL && !PENABLE;
      prev_end   <= PSEL && PENABLE && PREADY;
      prev_wait  <= PSEL && PENABLE && !PREADY;
      prev_addr  <= PADDR;
      prev_write <= PWRITE;
      // next PREADY: random while a transfer is in its SETUP or ENABLE phase
      PREADY <= PSEL && ($urandom_range(99) < READY_PCT) && !(PENABLE && PREADY);
    end
  end

endmodule
