// Testbench of request_proc: random request matrices of several densities
// are latched with start; the per-output counts and, for every output
// port, the requests of unmatched inputs are compared with values worked
// out here, while random grants mark inputs as matched. A change of req_in
// after start must not reach the latched matrix.
module tb_request_proc;
  localparam int N  = 16;
  localparam int PW = 4;
  localparam int CW = 5;

  logic          clk = 0, rst_n = 0, start = 0, gnt_valid = 0;
  logic [N-1:0]  req_in [N];
  logic [PW-1:0] cur_out = '0;
  logic [N-1:0]  gnt = '0, cur_req, matched;
  logic [CW-1:0] counts [N];
  bit   [N-1:0]  m [N];
  bit   [N-1:0]  mmask;
  int checks = 0, failures = 0, cycles = 0;

  request_proc #(.N(N)) dut (.*);

  always #50 clk = ~clk;
  always @(posedge clk) cycles++;

  task automatic check_all();
    for (int j = 0; j < N; j++) begin
      int c = 0;
      bit [N-1:0] col;
      for (int i = 0; i < N; i++) begin
        c += int'(m[i][j]);
        col[i] = m[i][j] & ~mmask[i];
      end
      cur_out = PW'(j);
      #1;
      checks += 2;
      if (int'(counts[j]) != c) begin
        failures++; $display("FAIL count[%0d]=%0d exp %0d", j, counts[j], c);
      end
      if (cur_req !== col) begin
        failures++; $display("FAIL cur_req out %0d = %h exp %h", j, cur_req, col);
      end
    end
  endtask

  initial begin
    for (int i = 0; i < N; i++) req_in[i] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 60; t++) begin
      int dens;
      dens = t % 4;   // 0: sparse .. 3: full
      for (int i = 0; i < N; i++) begin
        m[i] = (dens == 3) ? '1 : (dens == 2) ? N'($urandom) | N'($urandom)
             : (dens == 1) ? N'($urandom) : N'($urandom) & N'($urandom) & N'($urandom);
        req_in[i] = m[i];
      end
      mmask = '0;
      start = 1;
      @(negedge clk);
      start = 0;
      for (int i = 0; i < N; i++) req_in[i] = N'($urandom);   // must be ignored now
      check_all();
      checks++;
      if (matched != 0) begin failures++; $display("FAIL matched not cleared"); end
      for (int g = 0; g < 4; g++) begin
        gnt       = N'(1) << $urandom_range(N - 1);
        gnt_valid = 1;
        @(negedge clk);
        gnt_valid = 0;
        mmask |= gnt;
        check_all();
        checks++;
        if (matched !== mmask) begin failures++; $display("FAIL matched %h exp %h", matched, mmask); end
      end
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
