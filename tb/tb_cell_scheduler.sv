// End-to-end testbench of cell_scheduler at its default size (16 x 16).
//
// Runs a long series of schedules with request matrices of several
// densities and compares every matching with the reference model in
// sched_ref_pkg, whose round-robin pointers are carried from schedule to
// schedule exactly as in the scheduler. For each schedule it also checks
// the order in which the output ports are polled (cur_outport), that the
// matching arrives exactly N + 1 clocks after the requests were taken, and
// that sync_out is a single-clock pulse. A phase with every queue full
// checks that every schedule is a complete matching and that no input
// waits more than N cell slots for any output. Each mechanism (back-to-back
// schedules, req_sync ignored while busy, unmatched inputs, outputs with no
// requests, tied request counts, pointer wrap-around, fewest-requests-first
// changing the result) is counted and must happen at least once.
module tb_cell_scheduler;
  import sched_ref_pkg::*;

  localparam int N  = sched_pkg::N_PORTS;
  localparam int PW = $clog2(N);

  logic          clk = 0, rst_n = 0, req_sync = 0;
  logic [N-1:0]  req [N];
  logic          busy, sync_out;
  logic [N-1:0]  match [N];
  logic [PW-1:0] cur_outport, cur_pointer;

  cell_scheduler dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0, cycles = 0;
  int n_b2b = 0, n_ignored = 0, n_unmatched = 0, n_zero_out = 0, n_ties = 0,
      n_wrap = 0, n_order_matters = 0, n_full = 0;
  vec_t ptr_ref;

  always @(posedge clk) cycles++;

  function automatic mat_t gen(int dens);
    mat_t m;
    for (int i = 0; i < MAXN; i++) m[i] = '0;
    for (int i = 0; i < N; i++)
      for (int j = 0; j < N; j++)
        case (dens)
          0: m[i][j] = ($urandom_range(9) == 0);
          1: m[i][j] = ($urandom_range(3) == 0);
          2: m[i][j] = ($urandom_range(1) == 0);
          3: m[i][j] = ($urandom_range(5) != 0);
          default: m[i][j] = 1'b1;
        endcase
    return m;
  endfunction

  // Same matrix, output ports polled in plain index order (no sorting).
  function automatic bit index_order_differs(mat_t m, vec_t p, vec_t res);
    bit used [MAXN];
    vec_t r;
    for (int i = 0; i < N; i++) begin used[i] = 0; r[i] = -1; end
    for (int j = 0; j < N; j++)
      for (int k = 0; k < N; k++) begin
        int i;
        i = (p[j] + k) % N;
        if (m[i][j] && !used[i]) begin used[i] = 1; r[i] = j; break; end
      end
    for (int i = 0; i < N; i++) if (r[i] != res[i]) return 1;
    return 0;
  endfunction

  // Runs one schedule starting at a negedge with the scheduler idle; returns
  // at the negedge in which the new matching is first visible.
  task automatic run_sched(mat_t m, bit inject, output vec_t res);
    vec_t order, pbefore, cnt;
    order_outputs(N, m, order);
    pbefore = ptr_ref;
    schedule(N, m, ptr_ref, res);
    for (int j = 0; j < N; j++) begin
      cnt[j] = 0;
      for (int i = 0; i < N; i++) cnt[j] += int'(m[i][j]);
      if (cnt[j] == 0) n_zero_out++;
    end
    for (int j = 1; j < N; j++) if (cnt[order[j]] == cnt[order[j-1]]) begin n_ties++; break; end
    for (int i = 0; i < N; i++) begin
      if (res[i] < 0 && m[i][N-1:0] != 0) n_unmatched++;
      if (res[i] >= 0 && i < pbefore[res[i]]) n_wrap++;
    end
    if (index_order_differs(m, pbefore, res)) n_order_matters++;

    checks++;
    if (busy) begin failures++; $display("FAIL busy when a schedule should start"); end
    for (int i = 0; i < N; i++) req[i] = m[i][N-1:0];
    req_sync = 1;
    @(negedge clk);
    req_sync = 0;
    for (int i = 0; i < N; i++) req[i] = N'($urandom);   // ignored from now on
    for (int s = 0; s < N; s++) begin
      checks += 3;
      if (int'(cur_outport) != order[s]) begin
        failures++; $display("FAIL step %0d polls output %0d, expected %0d", s, cur_outport, order[s]);
      end
      if (!busy) begin failures++; $display("FAIL not busy at arbitration step %0d", s); end
      if (sync_out) begin failures++; $display("FAIL sync_out early at step %0d", s); end
      if (inject && s == 4) begin
        req_sync = 1;
        n_ignored++;
      end
      @(negedge clk);
      req_sync = 0;
    end
    // N + 1 clocks after the requests were taken
    checks++;
    if (!sync_out) begin failures++; $display("FAIL no sync_out after N+1 clocks"); end
    for (int i = 0; i < N; i++) begin
      logic [N-1:0] e;
      e = (res[i] < 0) ? '0 : (N'(1) << res[i]);
      checks++;
      if (match[i] !== e) begin
        failures++; $display("FAIL input %0d match %h expected %h", i, match[i], e);
      end
    end
  endtask

  initial begin
    vec_t res;
    int last_served [N][N];
    for (int i = 0; i < N; i++) req[i] = '0;
    for (int j = 0; j < MAXN; j++) ptr_ref[j] = j;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);

    // Random traffic of several densities.
    for (int t = 0; t < 1500; t++) begin
      mat_t m;
      m = gen(t % 5);
      run_sched(m, (t % 7 == 3), res);
      // leave sync_out for one clock, or start the next schedule at once
      if (t % 3 == 0) n_b2b++;
      else begin
        @(negedge clk);
        checks++;
        if (sync_out) begin failures++; $display("FAIL sync_out wider than one clock"); end
      end
    end

    // Every queue full: complete matchings and a wait of at most N slots.
    for (int i = 0; i < N; i++) for (int j = 0; j < N; j++) last_served[i][j] = 0;
    for (int t = 1; t <= 4 * N; t++) begin
      run_sched(gen(4), 1'b0, res);
      n_full++;
      n_b2b++;
      for (int i = 0; i < N; i++) begin
        checks++;
        if (res[i] < 0 || match[i] == 0) begin
          failures++; $display("FAIL full load: input %0d unmatched", i);
        end else last_served[i][res[i]] = t;
      end
      if (t > N) begin   // pointers have settled after the first full slot
        for (int i = 0; i < N; i++)
          for (int j = 0; j < N; j++) begin
            checks++;
            if (t - last_served[i][j] >= N) begin
              failures++; $display("FAIL full load: input %0d waited %0d slots for output %0d",
                                   i, t - last_served[i][j], j);
            end
          end
      end
    end

    $display("mechanisms: back_to_back=%0d ignored_sync=%0d unmatched_inputs=%0d zero_request_outputs=%0d",
             n_b2b, n_ignored, n_unmatched, n_zero_out);
    $display("            tied_counts=%0d pointer_wraps=%0d order_changed_result=%0d full_load_slots=%0d",
             n_ties, n_wrap, n_order_matters, n_full);
    if (n_b2b == 0)           begin failures++; $display("FAIL never back to back"); end
    if (n_ignored == 0)       begin failures++; $display("FAIL never ignored req_sync"); end
    if (n_unmatched == 0)     begin failures++; $display("FAIL never an unmatched input"); end
    if (n_zero_out == 0)      begin failures++; $display("FAIL never an output without requests"); end
    if (n_ties == 0)          begin failures++; $display("FAIL never tied counts"); end
    if (n_wrap == 0)          begin failures++; $display("FAIL never a pointer wrap"); end
    if (n_order_matters == 0) begin failures++; $display("FAIL order never mattered"); end
    if (n_full == 0)          begin failures++; $display("FAIL never full load"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wait (cycles == 200000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
