// Output control: gathers the matching and hands it to the input ports.
//
// During a schedule every arbitration clock (arb_en) reports the polled
// output port (cur_out) and, if it was matched, the granted input
// (gnt_valid, gnt_idx). The results are collected per input port. On the
// last arbitration clock the collected matching, including that clock's
// grant, is copied to the outputs: match[i] is one-hot with bit j set when
// input i may send its cell to output j in the next cell slot, and zero
// when input i stays unmatched. sync_out is high for the one clock in which
// a new matching first appears; match holds its value until the next
// schedule ends. Collecting all outputs' results before delivering them
// follows the design; the one-clock sync pulse is this design's choice.
//
// Timing: match and sync_out are registers; sync_out rises N + 1 clocks
// after the clock in which the schedule's requests were taken in.
module output_ctrl #(
  parameter int unsigned N  = sched_pkg::N_PORTS,
  parameter int unsigned PW = (N > 1) ? $clog2(N) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic          arb_en,
  input  logic          last,
  input  logic [PW-1:0] cur_out,
  input  logic          gnt_valid,
  input  logic [PW-1:0] gnt_idx,
  output logic          sync_out,
  output logic [N-1:0]  match [N]
);

  logic [N-1:0] acc_q [N];
  logic [N-1:0] acc_d [N];

  always_comb begin
    acc_d = acc_q;
    if (arb_en && gnt_valid)
      acc_d[gnt_idx][cur_out] = 1'b1;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int unsigned i = 0; i < N; i++) begin
        acc_q[i] <= '0;
        match[i] <= '0;
      end
      sync_out <= 1'b0;
    end else begin
      sync_out <= arb_en && last;
      if (start) begin
        for (int unsigned i = 0; i < N; i++) acc_q[i] <= '0;
      end else begin
        acc_q <= acc_d;
      end
      if (arb_en && last) match <= acc_d;
    end
  end

endmodule
