// Testbench of output_ctrl: drives schedules of N arbitration clocks with
// random polling orders and random grants (some outputs unmatched) and
// checks that match appears only with sync_out, one clock after the last
// arbitration, holds the collected matching, stays unchanged until the
// next schedule ends, and that results of one schedule do not leak into
// the next.
module tb_output_ctrl;
  localparam int N  = 16;
  localparam int PW = 4;

  logic          clk = 0, rst_n = 0, start = 0, arb_en = 0, last = 0, gnt_valid = 0;
  logic [PW-1:0] cur_out = '0, gnt_idx = '0;
  logic          sync_out;
  logic [N-1:0]  match [N];
  bit   [N-1:0]  exp_m [N];
  bit   [N-1:0]  prev_m [N];
  int checks = 0, failures = 0, cycles = 0;

  output_ctrl #(.N(N)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  task automatic cmp(bit [N-1:0] e [N], string what);
    for (int i = 0; i < N; i++) begin
      checks++;
      if (match[i] !== e[i]) begin
        failures++; $display("FAIL %s match[%0d]=%h exp %h", what, i, match[i], e[i]);
      end
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < N; i++) prev_m[i] = '0;
    for (int t = 0; t < 100; t++) begin
      int outs [N];
      int ins [N];
      for (int k = 0; k < N; k++) begin outs[k] = k; ins[k] = k; end
      outs.shuffle(); ins.shuffle();
      for (int i = 0; i < N; i++) exp_m[i] = '0;
      start = 1;
      @(negedge clk);
      start = 0;
      for (int s = 0; s < N; s++) begin
        arb_en    = 1;
        last      = (s == N - 1);
        cur_out   = PW'(outs[s]);
        gnt_valid = ($urandom_range(4) != 0);
        gnt_idx   = PW'(ins[s]);
        if (gnt_valid) exp_m[ins[s]][outs[s]] = 1'b1;
        @(negedge clk);
        checks++;
        if (s != N - 1) begin
          if (sync_out) begin failures++; $display("FAIL early sync_out"); end
          cmp(prev_m, "hold");
        end else begin
          if (!sync_out) begin failures++; $display("FAIL no sync_out"); end
          cmp(exp_m, "result");
        end
      end
      arb_en = 0; last = 0; gnt_valid = 0;
      @(negedge clk);
      checks++;
      if (sync_out) begin failures++; $display("FAIL sync_out longer than one clock"); end
      cmp(exp_m, "after");
      prev_m = exp_m;
    end
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
