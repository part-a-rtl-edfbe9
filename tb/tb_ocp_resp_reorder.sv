// Self-checking testbench of ocp_resp_reorder, the in-order response buffer.
//
// Stimulus: transactions are allocated at random (reads of 1..MAX_BEATS
// beats, writes of one response) whenever a slot is free; their response
// beats are then delivered on the in_* port in random order across slots
// (in order within a slot), with random data and mostly DVA, sometimes ERR.
// Deliveries may follow an allocation in the very next cycle.
// Checks: the out_* stream equals the read beats in allocation order, with
// their data and response codes; write responses never appear; the buffer
// ends empty. Also required: allocation refused while full, and responses
// delivered out of allocation order.
module tb_ocp_resp_reorder;
  import bridge_pkg::*;

  localparam int DATA_W = 32, SLOTS = 4, MAX_BEATS = 8;
  localparam int TW = 2, BW = 4;
  localparam int N = 600;

  logic clk = 0, resetn = 0;
  always #5 clk = ~clk;

  logic              alloc_valid = 0, alloc_read = 0;
  logic [BW-1:0]     alloc_len = '0;
  logic              alloc_ready;
  logic [TW-1:0]     alloc_tag;
  logic              in_valid = 0;
  logic [TW-1:0]     in_tag = '0;
  logic [1:0]        in_resp = '0;
  logic [DATA_W-1:0] in_data = '0;
  logic [1:0]        out_resp;
  logic [DATA_W-1:0] out_data;
  logic              empty;

  ocp_resp_reorder #(.DATA_W(DATA_W), .SLOTS(SLOTS), .MAX_BEATS(MAX_BEATS)) dut (.*);

  int checks = 0, failures = 0, n_full = 0, n_ooo = 0;

  // per transaction (serial number = allocation order)
  bit                rd_a   [N];
  int                len_a  [N];
  int                tag_a  [N];
  int                sent_a [N];
  logic [DATA_W-1:0] data_a [N][MAX_BEATS];
  logic [1:0]        resp_a [N][MAX_BEATS];
  int n_alloc = 0;
  int live[$];               // allocated, responses not all delivered

  // allocation
  initial begin
    @(posedge resetn);
    while (n_alloc < N) begin
      @(negedge clk);
      alloc_valid = ($urandom_range(99) < 60);
      alloc_read  = ($urandom_range(2) != 0);
      alloc_len   = alloc_read ? BW'($urandom_range(1, MAX_BEATS)) : BW'(1);
      #1;
      if (alloc_valid && !alloc_ready) n_full++;
      if (alloc_valid && alloc_ready) begin
        @(posedge clk);
        rd_a[n_alloc] = alloc_read; len_a[n_alloc] = int'(alloc_len);
        tag_a[n_alloc] = int'(alloc_tag); sent_a[n_alloc] = 0;
        live.push_back(n_alloc);
        n_alloc++;
      end
    end
    @(negedge clk); alloc_valid = 0;
  end

  // response delivery: random live transaction, oldest-first within a tag
  initial begin
    @(posedge resetn);
    forever begin
      @(negedge clk);
      in_valid = 0;
      if (live.size() > 0 && $urandom_range(99) < 70) begin
        int k, s;
        k = $urandom_range(live.size() - 1);
        s = live[k];
        if (k != 0) n_ooo++;
        in_valid = 1;
        in_tag   = TW'(tag_a[s]);
        in_data  = $urandom;
        in_resp  = ($urandom_range(9) == 0) ? OCP_ERR : OCP_DVA;
        data_a[s][sent_a[s]] = in_data;
        resp_a[s][sent_a[s]] = in_resp;
        sent_a[s]++;
        if (sent_a[s] == len_a[s]) live.delete(k);
      end
    end
  end

  // output checker
  int head = 0, beat = 0;
  always @(posedge clk) begin
    if (resetn) begin
      while (head < n_alloc && !rd_a[head]) head++;   // writes give no output
      if (out_resp != OCP_NULL) begin
        checks++;
        if (head >= n_alloc || beat >= sent_a[head]) begin
          failures++; $display("output before its response arrived");
        end else if (out_resp !== resp_a[head][beat] || out_data !== data_a[head][beat]) begin
          failures++;
          $display("txn %0d beat %0d: got %0d/%h want %0d/%h", head, beat, out_resp, out_data,
                   resp_a[head][beat], data_a[head][beat]);
        end
        beat++;
        if (head < n_alloc && beat == len_a[head]) begin head++; beat = 0; end
      end
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    resetn = 1;
    wait (n_alloc == N);
    repeat (200) @(posedge clk);
    while (head < n_alloc && !rd_a[head]) head++;
    checks++; if (head != N) begin failures++; $display("only %0d of %0d drained", head, N); end
    checks++; if (!empty) begin failures++; $display("buffer not empty at the end"); end
    checks++; if (n_full == 0) begin failures++; $display("buffer never full"); end
    checks++; if (n_ooo == 0) begin failures++; $display("no out-of-order delivery"); end
    $display("full=%0d ooo=%0d", n_full, n_ooo);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
