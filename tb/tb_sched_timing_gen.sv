// Testbench of sched_timing_gen: random request counts (with many ties)
// are presented, a schedule is started, and the sequence of polled output
// ports is compared with a stable sort of the counts done here. Also
// checks that a schedule has exactly N arbitration clocks, that last marks
// the final one, that a req_sync during a schedule is ignored and that a
// new schedule starts right after the previous one.
module tb_sched_timing_gen;
  localparam int N  = 16;
  localparam int PW = 4;
  localparam int CW = 5;

  logic          clk = 0, rst_n = 0, req_sync = 0;
  logic [CW-1:0] counts [N];
  logic          start, busy, arb_en, last;
  logic [PW-1:0] cur_out;
  int checks = 0, failures = 0, cycles = 0, ignored = 0;

  sched_timing_gen #(.N(N)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  initial begin
    for (int j = 0; j < N; j++) counts[j] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    checks++;
    if (busy || arb_en) begin failures++; $display("FAIL busy after reset"); end
    for (int t = 0; t < 200; t++) begin
      int order [N];
      int cnt [N];
      for (int j = 0; j < N; j++) begin
        cnt[j]    = (t % 3 == 0) ? $urandom_range(3) : $urandom_range(N);
        counts[j] = CW'(cnt[j]);
        order[j]  = j;
      end
      for (int a = 1; a < N; a++)
        for (int b = a; b > 0 && cnt[order[b-1]] > cnt[order[b]]; b--) begin
          int x;
          x = order[b]; order[b] = order[b-1]; order[b-1] = x;
        end
      req_sync = 1;
      #1;
      checks++;
      if (!start) begin failures++; $display("FAIL start not raised when idle"); end
      @(negedge clk);
      req_sync = 0;
      for (int s = 0; s < N; s++) begin
        if (s == 5 && (t % 2 == 1)) begin
          req_sync = 1;          // must be ignored while busy
          #1;
          checks++;
          if (start) begin failures++; $display("FAIL start while busy"); end
          else ignored++;
        end
        checks += 3;
        if (!arb_en) begin failures++; $display("FAIL arb_en low at step %0d", s); end
        if (int'(cur_out) != order[s]) begin
          failures++; $display("FAIL t=%0d step %0d polled %0d exp %0d", t, s, cur_out, order[s]);
        end
        if (last != (s == N - 1)) begin failures++; $display("FAIL last at step %0d", s); end
        @(negedge clk);
        req_sync = 0;
      end
      checks++;
      if (busy) begin failures++; $display("FAIL still busy after N arbitration clocks"); end
      if (t % 5 == 0) @(negedge clk);
    end
    checks++;
    if (ignored == 0) begin failures++; $display("FAIL no ignored req_sync exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wait (cycles == 100000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
