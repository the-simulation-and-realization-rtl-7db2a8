// Testbench of rr_arbiter: random requests and pointers, plus the corner
// cases (no request, request only just below the pointer, pointer at N-1),
// compared with a scan written here.
module tb_rr_arbiter;
  localparam int N  = 16;
  localparam int PW = 4;

  logic [N-1:0]  req, gnt;
  logic [PW-1:0] ptr, gnt_idx, next_ptr;
  logic          gnt_valid;
  int checks = 0, failures = 0;

  rr_arbiter #(.N(N)) dut (.*);

  task automatic check_one();
    int exp_i = -1;
    #1;
    for (int d = 0; d < N; d++)
      if (exp_i < 0 && req[(int'(ptr) + d) % N]) exp_i = (int'(ptr) + d) % N;
    checks++;
    if (exp_i < 0) begin
      if (gnt_valid || gnt != 0 || next_ptr != ptr) begin
        failures++;
        $display("FAIL no-req: req=%h ptr=%0d valid=%b gnt=%h next=%0d", req, ptr, gnt_valid, gnt, next_ptr);
      end
    end else if (!gnt_valid || gnt != (N'(1) << exp_i) || int'(gnt_idx) != exp_i
                 || int'(next_ptr) != (exp_i + 1) % N) begin
      failures++;
      $display("FAIL: req=%h ptr=%0d exp=%0d got valid=%b gnt=%h idx=%0d next=%0d",
               req, ptr, exp_i, gnt_valid, gnt, gnt_idx, next_ptr);
    end
  endtask

  initial begin
    req = '0; ptr = '0;
    for (int p = 0; p < N; p++) begin
      ptr = PW'(p);
      req = '0;                          check_one();
      req = N'(1) << ((p + N - 1) % N);  check_one();   // only just below pointer
      req = N'(1) << p;                  check_one();   // exactly at pointer
      req = '1;                          check_one();
    end
    for (int t = 0; t < 3000; t++) begin
      ptr = PW'($urandom_range(N - 1));
      req = N'($urandom) & N'($urandom);
      check_one();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
