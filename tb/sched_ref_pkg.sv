// Reference model of the improved output-serial schedule, for testbenches.
//
// Written independently of the RTL: the output ports are put in order once
// by a stable insertion sort on their request counts (fewest first, lower
// port number first on a tie), then each output in that order takes the
// first requesting, still free input at or after its pointer, and its
// pointer moves one past that input. in_match[i] is the output given to
// input i, or -1.
package sched_ref_pkg;

  localparam int MAXN = 32;
  typedef bit [MAXN-1:0] mat_t [MAXN];   // mat[i][j]: input i requests output j
  typedef int            vec_t [MAXN];

  function automatic void order_outputs(input int n, input mat_t req,
                                        output vec_t order);
    vec_t cnt;
    for (int j = 0; j < n; j++) begin
      cnt[j] = 0;
      for (int i = 0; i < n; i++) cnt[j] += int'(req[i][j]);
      order[j] = j;
    end
    for (int a = 1; a < n; a++) begin
      int b = a;
      while (b > 0 && cnt[order[b-1]] > cnt[order[b]]) begin
        int t = order[b]; order[b] = order[b-1]; order[b-1] = t;
        b--;
      end
    end
  endfunction

  function automatic void schedule(input int n, input mat_t req,
                                   inout vec_t ptr, output vec_t in_match);
    vec_t order;
    bit   used [MAXN];
    order_outputs(n, req, order);
    for (int i = 0; i < n; i++) begin
      in_match[i] = -1;
      used[i]     = 1'b0;
    end
    for (int s = 0; s < n; s++) begin
      int j = order[s];
      for (int k = 0; k < n; k++) begin
        int i = (ptr[j] + k) % n;
        if (req[i][j] && !used[i]) begin
          used[i]     = 1'b1;
          in_match[i] = j;
          ptr[j]      = (i + 1) % n;
          break;
        end
      end
    end
  endfunction

endpackage
