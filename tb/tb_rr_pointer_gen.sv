// Testbench of rr_pointer_gen: reset values, then random writes and reads
// compared with an array kept here.
module tb_rr_pointer_gen;
  localparam int N  = 16;
  localparam int PW = 4;

  logic          clk = 0, rst_n = 0, we = 0;
  logic [PW-1:0] rd_idx = '0, rd_ptr, wr_idx = '0, wr_ptr = '0;
  int model [N];
  int checks = 0, failures = 0, cycles = 0;

  rr_pointer_gen #(.N(N)) dut (.*);

  always #50 clk = ~clk;
  always @(posedge clk) cycles++;

  task automatic read_all();
    for (int j = 0; j < N; j++) begin
      rd_idx = PW'(j);
      #1;
      checks++;
      if (int'(rd_ptr) != model[j]) begin
        failures++;
        $display("FAIL ptr[%0d]=%0d expected %0d", j, rd_ptr, model[j]);
      end
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int j = 0; j < N; j++) model[j] = j;
    read_all();
    for (int t = 0; t < 400; t++) begin
      @(negedge clk);
      we     = ($urandom_range(3) != 0);
      wr_idx = PW'($urandom_range(N - 1));
      wr_ptr = PW'($urandom_range(N - 1));
      @(posedge clk);
      if (we) model[wr_idx] = int'(wr_ptr);
      @(negedge clk);
      we = 0;
      read_all();
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
