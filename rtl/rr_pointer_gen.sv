// Round-robin pointer store: one polling pointer per output port.
//
// The pointer of the output port being polled is read combinationally
// (rd_idx -> rd_ptr) and handed to the arbiter; when that arbitration
// produced a match, the arbiter's updated pointer is written back on the
// same clock edge (we, wr_idx, wr_ptr). Pointers of outputs that got no
// match keep their value. Keeping a separate pointer per output port and
// updating it only after a successful match follow the algorithm. After
// reset, output j points at input j, so every output starts with a
// different pointer; that reset value is this design's choice.
//
// Timing: one register per output, written at the rising clock edge;
// active-low synchronous reset.
module rr_pointer_gen #(
  parameter int unsigned N  = sched_pkg::N_PORTS,
  parameter int unsigned PW = (N > 1) ? $clog2(N) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [PW-1:0] rd_idx,
  output logic [PW-1:0] rd_ptr,
  input  logic          we,
  input  logic [PW-1:0] wr_idx,
  input  logic [PW-1:0] wr_ptr
);

  logic [PW-1:0] ptr_q [N];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int unsigned j = 0; j < N; j++) ptr_q[j] <= PW'(j);
    end else if (we) begin
      ptr_q[wr_idx] <= wr_ptr;
    end
  end

  assign rd_ptr = ptr_q[rd_idx];

endmodule
