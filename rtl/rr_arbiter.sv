// Round-robin arbiter for one output port (combinational).
//
// Given the requests of the still unmatched input ports for the output port
// being polled and that port's polling pointer, it grants the first
// requesting input found when scanning from the pointer upwards, wrapping
// from N-1 to 0. With a grant, the updated pointer is the input after the
// granted one, so that input has the lowest priority next time; with no
// grant the pointer is returned unchanged. Scanning from the pointer and
// updating it only after a match follow the scheduling algorithm; the
// "one past the grant" update rule is this design's choice.
//
// Interface: req[i] = input i requests this output and is unmatched;
// ptr = polling pointer (0..N-1). Outputs: gnt_valid, one-hot gnt, its index
// gnt_idx and next_ptr. Purely combinational, no clock.
module rr_arbiter #(
  parameter int unsigned N  = sched_pkg::N_PORTS,
  parameter int unsigned PW = (N > 1) ? $clog2(N) : 1
) (
  input  logic [N-1:0]  req,
  input  logic [PW-1:0] ptr,
  output logic          gnt_valid,
  output logic [N-1:0]  gnt,
  output logic [PW-1:0] gnt_idx,
  output logic [PW-1:0] next_ptr
);

  always_comb begin
    logic [PW-1:0] idx;
    gnt_valid = 1'b0;
    gnt       = '0;
    gnt_idx   = '0;
    for (int unsigned k = 0; k < N; k++) begin
      idx = PW'((int'(ptr) + k) % N);
      if (!gnt_valid && req[idx]) begin
        gnt_valid = 1'b1;
        gnt[idx]  = 1'b1;
        gnt_idx   = idx;
      end
    end
    if (gnt_valid)
      next_ptr = (int'(gnt_idx) == N - 1) ? '0 : PW'(int'(gnt_idx) + 1);
    else
      next_ptr = ptr;
  end

endmodule
