// Workload testbench: the 16 x 16 scheduler serving bursty traffic through
// virtual output queues.
//
// Each input port holds one queue per output port (a behavioural model, of
// limited capacity). Every cell slot, each input is either in a burst,
// sending one cell per slot to one output drawn at random for the whole
// burst, or idle; burst and idle lengths are geometric, the mean burst
// length is B and the idle mean B * (1 - load) / load, so the offered load
// per input is load. A cell that finds its queue full is lost. The non-empty
// queues form the request matrix, the scheduler runs one schedule, and the
// matched head cells leave. Three settings are run: load 0.95 with bursts
// of 32 and large queues, and loads 0.65 and 0.95 with bursts of 10 and
// queues of 40 cells. Each schedule is compared with the reference model,
// cell conservation is checked, and the mean delay (in slots) and cell loss
// ratio are printed. The runs are short (a few thousand slots), so the
// numbers show the trend only. Cell loss must occur in the small-queue,
// high-load setting, and every setting must deliver cells.
module tb_traffic_workload;
  import sched_ref_pkg::*;

  localparam int N = sched_pkg::N_PORTS;

  logic         clk = 0, rst_n = 0, req_sync = 0;
  logic [N-1:0] req [N];
  logic         busy, sync_out;
  logic [N-1:0] match [N];
  logic [$clog2(N)-1:0] cur_outport, cur_pointer;

  cell_scheduler dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0, cycles = 0;
  always @(posedge clk) cycles++;

  int   q [N][N][$];      // arrival slot of each queued cell
  vec_t ptr_ref;

  // One setting: returns number of cells lost and delivered.
  task automatic run_load(real load, int burst, int cap, int slots,
                          output int lost, output int delivered);
    int   dest [N];
    int   left [N];         // cells left in the current burst, 0 = idle
    int   arrived = 0, queued = 0;
    real  delay_sum = 0.0;
    real  p_end_burst, p_start_burst;
    mat_t m;
    vec_t res;
    lost = 0; delivered = 0;
    p_end_burst   = 1.0 / burst;
    p_start_burst = load / (burst * (1.0 - load) + load);
    for (int i = 0; i < N; i++) begin
      left[i] = 0; dest[i] = 0;
      for (int j = 0; j < N; j++) q[i][j].delete();
    end
    for (int s = 0; s < slots; s++) begin
      // arrivals
      for (int i = 0; i < N; i++) begin
        if (left[i] == 0 && ($urandom_range(1000000) < int'(p_start_burst * 1000000.0))) begin
          left[i] = 1;
          dest[i] = $urandom_range(N - 1);
        end
        if (left[i] != 0) begin
          arrived++;
          if (q[i][dest[i]].size() < cap) q[i][dest[i]].push_back(s);
          else lost++;
          if ($urandom_range(1000000) < int'(p_end_burst * 1000000.0)) left[i] = 0;
        end
      end
      // requests from the non-empty queues
      for (int i = 0; i < MAXN; i++) m[i] = '0;
      for (int i = 0; i < N; i++)
        for (int j = 0; j < N; j++) m[i][j] = (q[i][j].size() != 0);
      schedule(N, m, ptr_ref, res);
      for (int i = 0; i < N; i++) req[i] = m[i][N-1:0];
      req_sync = 1;
      @(negedge clk);
      req_sync = 0;
      while (!sync_out) @(negedge clk);
      for (int i = 0; i < N; i++) begin
        logic [N-1:0] e;
        e = (res[i] < 0) ? '0 : (N'(1) << res[i]);
        checks++;
        if (match[i] !== e) begin
          failures++; $display("FAIL slot %0d input %0d match %h expected %h", s, i, match[i], e);
        end
        for (int j = 0; j < N; j++)
          if (match[i][j]) begin
            checks++;
            if (q[i][j].size() == 0) begin
              failures++; $display("FAIL slot %0d: input %0d matched to empty queue %0d", s, i, j);
            end else begin
              delay_sum += real'(s - q[i][j].pop_front() + 1);
              delivered++;
            end
          end
      end
    end
    for (int i = 0; i < N; i++) for (int j = 0; j < N; j++) queued += q[i][j].size();
    checks++;
    if (arrived != delivered + lost + queued) begin
      failures++; $display("FAIL cells: arrived %0d != delivered %0d + lost %0d + queued %0d",
                           arrived, delivered, lost, queued);
    end
    $display("load %.2f burst %0d queue %0d cells, %0d slots: arrived %0d delivered %0d lost %0d queued %0d, mean delay %.2f slots, loss ratio %.5f",
             load, burst, cap, slots, arrived, delivered, lost, queued,
             (delivered > 0) ? delay_sum / delivered : 0.0,
             (arrived > 0) ? real'(lost) / arrived : 0.0);
  endtask

  initial begin
    int lost, delivered;
    for (int i = 0; i < N; i++) req[i] = '0;
    for (int j = 0; j < MAXN; j++) ptr_ref[j] = j;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);

    run_load(0.95, 32, 100000, 4000, lost, delivered);
    checks++;
    if (delivered == 0) begin failures++; $display("FAIL nothing delivered"); end
    run_load(0.65, 10, 40, 4000, lost, delivered);
    checks++;
    if (delivered == 0) begin failures++; $display("FAIL nothing delivered"); end
    run_load(0.95, 10, 40, 4000, lost, delivered);
    checks += 2;
    if (delivered == 0) begin failures++; $display("FAIL nothing delivered"); end
    if (lost == 0) begin failures++; $display("FAIL no queue overflow at load 0.95"); end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wait (cycles == 1000000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
