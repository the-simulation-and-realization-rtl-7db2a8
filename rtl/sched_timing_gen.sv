// Timing generation: runs one schedule and picks the output port to poll.
//
// A schedule starts when req_sync is high while the scheduler is idle
// (start, a one-clock pulse). The following N clocks are arbitration clocks
// (arb_en). In each of them, cur_out names the output port polled now: of
// the output ports not yet arbitrated in this schedule, the one with the
// fewest requesting inputs (counts, from the request processing), the lowest
// port number winning a tie. Arbitrating the output with the fewest requests
// first follows the algorithm; the tie rule is this design's choice. Outputs
// with no requests are polled too, so a schedule always takes N + 1 clocks:
// one to take the requests in and N to arbitrate. last marks the final
// arbitration clock. A req_sync that arrives while busy is ignored.
//
// Timing: start is combinational from req_sync; busy, the step count and the
// done mask are registers. Active-low synchronous reset returns to idle.
module sched_timing_gen #(
  parameter int unsigned N  = sched_pkg::N_PORTS,
  parameter int unsigned PW = (N > 1) ? $clog2(N) : 1,
  parameter int unsigned CW = $clog2(N + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          req_sync,
  input  logic [CW-1:0] counts [N],
  output logic          start,
  output logic          busy,
  output logic          arb_en,
  output logic          last,
  output logic [PW-1:0] cur_out
);

  logic [N-1:0]  done_q;
  logic [PW-1:0] step_q;

  assign start  = req_sync && !busy;
  assign arb_en = busy;
  assign last   = busy && (int'(step_q) == N - 1);

  // Minimum search over the output ports not yet arbitrated.
  always_comb begin
    logic          found;
    logic [CW-1:0] best;
    found   = 1'b0;
    best    = '0;
    cur_out = '0;
    for (int unsigned j = 0; j < N; j++) begin
      if (!done_q[j] && (!found || counts[j] < best)) begin
        found   = 1'b1;
        best    = counts[j];
        cur_out = PW'(j);
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy   <= 1'b0;
      step_q <= '0;
      done_q <= '0;
    end else if (start) begin
      busy   <= 1'b1;
      step_q <= '0;
      done_q <= '0;
    end else if (busy) begin
      done_q[cur_out] <= 1'b1;
      step_q          <= step_q + 1'b1;
      if (last) busy <= 1'b0;
    end
  end

endmodule
