// Request processing: holds the request matrix of one schedule.
//
// When a schedule starts (start), the requests of all input ports are
// latched (req_in[i][j] = input i has a cell queued for output j) and the
// number of requesting inputs of every output port is counted; those counts
// steer the order in which the output ports are arbitrated. During the
// schedule it presents, for the output port being polled (cur_out), the
// requests of the inputs that are not matched yet (cur_req); every grant
// (gnt_valid, one-hot gnt) marks its input as matched. The counts are taken
// once, from the requests as received, and are not reduced as inputs become
// matched: that reading of "the output port with minimum requests" is this
// design's choice.
//
// Timing: latch, counts and matched mask are registers updated at the rising
// clock edge; cur_req is combinational from cur_out. Active-low synchronous
// reset clears everything.
module request_proc #(
  parameter int unsigned N  = sched_pkg::N_PORTS,
  parameter int unsigned PW = (N > 1) ? $clog2(N) : 1,
  parameter int unsigned CW = $clog2(N + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [N-1:0]  req_in [N],
  input  logic [PW-1:0] cur_out,
  input  logic          gnt_valid,
  input  logic [N-1:0]  gnt,
  output logic [CW-1:0] counts [N],
  output logic [N-1:0]  cur_req,
  output logic [N-1:0]  matched
);

  logic [N-1:0]  req_q [N];   // req_q[i][j]: input i requests output j
  logic [CW-1:0] cnt_d [N];

  always_comb begin
    for (int unsigned j = 0; j < N; j++) begin
      cnt_d[j] = '0;
      for (int unsigned i = 0; i < N; i++)
        cnt_d[j] = cnt_d[j] + CW'(req_in[i][j]);
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int unsigned i = 0; i < N; i++) begin
        req_q[i]  <= '0;
        counts[i] <= '0;
      end
      matched <= '0;
    end else if (start) begin
      req_q   <= req_in;
      counts  <= cnt_d;
      matched <= '0;
    end else if (gnt_valid) begin
      matched <= matched | gnt;
    end
  end

  always_comb begin
    for (int unsigned i = 0; i < N; i++)
      cur_req[i] = req_q[i][cur_out] & ~matched[i];
  end

endmodule
