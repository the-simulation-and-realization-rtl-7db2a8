// Shared constants of the input-buffer cell scheduler.
//
// N_PORTS is the port count of the N x N crossbar the scheduler serves; 16 is
// the size the design is sized and checked at. CELL_BITS is the fixed cell
// (64 bytes) that one schedule has to keep pace with: one matching must be
// ready within the time one cell takes on a port. SCHED_CYCLES gives the
// clocks one schedule takes (one to take the requests in, one per output
// port to arbitrate), so the port rate the scheduler sustains at clock f is
// f * CELL_BITS / SCHED_CYCLES (50 MHz, 16 ports: about 1.5 Gbit/s).
package sched_pkg;

  localparam int unsigned N_PORTS   = 16;
  localparam int unsigned CELL_BYTES = 64;
  localparam int unsigned CELL_BITS  = CELL_BYTES * 8;

  function automatic int unsigned sched_cycles(int unsigned n);
    return n + 1;
  endfunction

endpackage
