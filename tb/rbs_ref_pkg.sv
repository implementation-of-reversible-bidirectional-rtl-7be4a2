// rbs_ref_pkg: behavioural reference for the testbenches. ref_shift computes,
// bit by bit from the definition of each shift kind, what an n-bit (n <= 64)
// bidirectional barrel shifter must produce. It shares no code with the RTL.
package rbs_ref_pkg;

  function automatic logic [63:0] ref_shift(logic [63:0] d, int n, int k,
                                            bit left, logic [1:0] mode);
    logic [63:0] r;
    bit rotate, arith;
    int src;
    rotate = mode[1];
    arith  = (mode == 2'b01);
    r = '0;
    for (int i = 0; i < n; i++) begin
      if (left) begin
        src = i - k;
        if (src >= 0)    r[i] = d[src];
        else if (rotate) r[i] = d[src + n];
        else             r[i] = 1'b0;
      end else begin
        src = i + k;
        if (src < n)     r[i] = d[src];
        else if (rotate) r[i] = d[src - n];
        else if (arith)  r[i] = d[n - 1];
        else             r[i] = 1'b0;
      end
    end
    return r;
  endfunction

  function automatic logic [63:0] ref_mirror(logic [63:0] d, int n);
    logic [63:0] r;
    r = '0;
    for (int i = 0; i < n; i++) r[i] = d[n - 1 - i];
    return r;
  endfunction

endpackage
