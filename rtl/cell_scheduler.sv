// Input-buffer cell scheduler for an N x N crossbar (improved output-serial
// scheduling).
//
// Each input port keeps virtual output queues and tells the scheduler, once
// per cell slot, which output ports it has cells for (req[i][j]). The
// scheduler then arbitrates the output ports one after another, one per
// clock, starting with the output port that received the fewest requests
// and ending with the most requested one. Each output port grants, among
// the inputs that request it and are still unmatched, the first one at or
// after its own round-robin polling pointer, and moves that pointer one past
// the granted input. When every output port has been arbitrated, each input
// port receives a one-hot matching result (match[i][j] = 1: input i sends to
// output j in the next cell slot) and sync_out pulses.
//
// Structure (one sub-block per function): sched_timing_gen sequences the
// schedule and picks the polled output port, request_proc holds the request
// matrix, the per-output request counts and the matched inputs,
// rr_pointer_gen holds the pointers, rr_arbiter makes one grant, and
// output_ctrl collects and delivers the matching. cur_outport and
// cur_pointer show the polled output port and its pointer for debugging.
// The block split, the serial order by request count, the per-output
// pointers and the N + 1 clock schedule follow the algorithm; widths,
// handshake, reset values and the tie rule are this design's own.
//
// Timing: req is sampled in the clock in which req_sync is high and the
// scheduler is idle (busy low); sync_out and the new match appear N + 1
// clocks later, and the next req_sync is accepted from that clock on. At
// 50 MHz and N = 16 a schedule takes 340 ns, which keeps up with 64-byte
// cells on ports of about 1.5 Gbit/s.
module cell_scheduler #(
  parameter int unsigned N = sched_pkg::N_PORTS
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 req_sync,
  input  logic [N-1:0]         req [N],
  output logic                 busy,
  output logic                 sync_out,
  output logic [N-1:0]         match [N],
  output logic [$clog2(N)-1:0] cur_outport,
  output logic [$clog2(N)-1:0] cur_pointer
);

  localparam int unsigned PW = (N > 1) ? $clog2(N) : 1;
  localparam int unsigned CW = $clog2(N + 1);

  logic          start, arb_en, last;
  logic [PW-1:0] cur_out, ptr, next_ptr, gnt_idx;
  logic [CW-1:0] counts [N];
  logic [N-1:0]  cur_req, gnt, matched;
  logic          gnt_valid, arb_gnt;

  sched_timing_gen #(.N(N), .PW(PW), .CW(CW)) u_timing (
    .clk, .rst_n, .req_sync, .counts,
    .start, .busy, .arb_en, .last, .cur_out
  );

  request_proc #(.N(N), .PW(PW), .CW(CW)) u_req (
    .clk, .rst_n, .start, .req_in(req), .cur_out,
    .gnt_valid(arb_gnt), .gnt, .counts, .cur_req, .matched
  );

  rr_pointer_gen #(.N(N), .PW(PW)) u_ptr (
    .clk, .rst_n, .rd_idx(cur_out), .rd_ptr(ptr),
    .we(arb_gnt), .wr_idx(cur_out), .wr_ptr(next_ptr)
  );

  rr_arbiter #(.N(N), .PW(PW)) u_arb (
    .req(cur_req), .ptr, .gnt_valid, .gnt, .gnt_idx, .next_ptr
  );

  // A grant only counts in an arbitration clock.
  assign arb_gnt = arb_en && gnt_valid;

  output_ctrl #(.N(N), .PW(PW)) u_out (
    .clk, .rst_n, .start, .arb_en, .last, .cur_out,
    .gnt_valid, .gnt_idx, .sync_out, .match
  );

  assign cur_outport = cur_out;
  assign cur_pointer = ptr;

  // The matching is conflict free: an input sends to at most one output,
  // an output receives from at most one input, and only where requested.
  logic [N-1:0] match_col [N];
  always_comb begin
    for (int unsigned j = 0; j < N; j++)
      for (int unsigned i = 0; i < N; i++)
        match_col[j][i] = match[i][j];
  end

  generate
    for (genvar g = 0; g < N; g++) begin : g_chk
      a_row_onehot: assert property (@(posedge clk) disable iff (!rst_n)
                                     $onehot0(match[g]));
      a_col_onehot: assert property (@(posedge clk) disable iff (!rst_n)
                                     $onehot0(match_col[g]));
    end
  endgenerate

  // A grant never goes to an input that is already matched.
  a_gnt_unmatched: assert property (@(posedge clk) disable iff (!rst_n)
                                    arb_gnt |-> ((gnt & matched) == '0));

endmodule
