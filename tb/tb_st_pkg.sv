// Reference timing model of the self-timed pipeline, used by the testbenches.
//
// The source shows sample k as DATA in [t0 + k*T, t0 + k*T + T/2) and as
// SPACER for the rest of the period. Register 1 takes a DATA word when its
// request is high, and a SPACER when the request is low and the input is
// SPACER. Each wave needs D to reach register 2, which then flips the
// request. Stepping through the samples gives, for each one, whether it is
// taken and when its output becomes complete. The model knows nothing of
// the RTL beyond these rules.
package tb_st_pkg;
  timeunit 1ps; timeprecision 1ps;

  function automatic void predict(input int K, input longint t0, input longint T,
                                  input longint D, output bit deliv[],
                                  output longint tout[], output bit late[]);
    longint r, ws, we, p, s, off, sp, h;
    h = T / 2;
    r = 0;  // request is high from reset on
    deliv = new[K];
    tout  = new[K];
    late  = new[K];
    for (int k = 0; k < K; k++) begin
      ws = t0 + longint'(k) * T;
      we = ws + h;
      if (r >= we) begin
        deliv[k] = 0; tout[k] = 0; late[k] = 0;
        continue;
      end
      p        = (r > ws) ? r : ws;
      s        = p + D;
      deliv[k] = 1;
      tout[k]  = s;
      late[k]  = (p > ws);
      // Request falls at s; SPACER passes as soon as the input is SPACER.
      off = (s - ws) % T;
      sp  = (off < h) ? (s - off + h) : s;
      r   = sp + D;
    end
  endfunction
endpackage
