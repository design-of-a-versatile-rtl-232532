// tb_util_pkg: reference arithmetic for the testbenches, in double precision.
// Converts the 32-bit FLP and LNS words to real values, builds words from reals and
// measures errors in units of the last place, independently of the RTL.
package tb_util_pkg;

  // FLP word -> real (exponent field 0 is zero)
  function automatic real flp2real(logic [31:0] w);
    real m;
    if (w[30:23] == 8'd0) return 0.0;
    m = 1.0 + real'(w[22:0]) / 8388608.0;
    return (w[31] ? -m : m) * $pow(2.0, real'(int'(w[30:23]) - 127));
  endfunction

  // LNS word -> base-2 logarithm of its magnitude (unbiased)
  function automatic real lns2log(logic [31:0] w);
    return real'(w[30:0]) / 8388608.0 - 127.0;
  endfunction

  // LNS word -> real value
  function automatic real lns2real(logic [31:0] w);
    real m;
    if (w[30:23] == 8'd0) return 0.0;
    m = $pow(2.0, lns2log(w));
    return w[31] ? -m : m;
  endfunction

  // random FLP word with biased exponent in [emin, emax]
  function automatic logic [31:0] rand_flp(int emin, int emax);
    logic [31:0] w;
    w[31]    = 1'($urandom);
    w[30:23] = 8'(emin + int'($urandom % (emax - emin + 1)));
    w[22:0]  = 23'($urandom);
    return w;
  endfunction

  // real -> LNS word, rounded to 23 fraction bits of the logarithm
  function automatic logic [31:0] real2lns(real x);
    real l;
    longint q;
    if (x == 0.0) return 32'd0;
    l = $ln(x < 0.0 ? -x : x) / $ln(2.0) + 127.0;
    q = longint'(l * 8388608.0);
    return {x < 0.0 ? 1'b1 : 1'b0, 31'(q)};
  endfunction

  // |got - ref| in units of the 24-bit ULP of ref
  function automatic real ulp_err(real got, real ref_v);
    real mag, e;
    mag = (ref_v < 0.0) ? -ref_v : ref_v;
    if (mag == 0.0) return (got == 0.0) ? 0.0 : 1.0e30;
    e = $floor($ln(mag) / $ln(2.0) + 1.0e-12);
    return ((got > ref_v) ? got - ref_v : ref_v - got) / $pow(2.0, e - 23.0);
  endfunction

  // Error of a processor result against the double-precision value of the
  // instruction (opcode encoding as in hyb_pkg), in ULPs for FLP results and in
  // LSBs of the 23-bit logarithm fraction for LNS results.  Returns -1.0 when the
  // reference is zero and the result is zero, 1e30 for a wrong zero/non-zero result.
  function automatic real op_error(logic [2:0] op, logic [31:0] r1, r2, r3, got);
    real ref_v, la, lb, v, s;
    logic sb;
    case (op)
      3'd0, 3'd1: begin
        ref_v = flp2real(r2) * flp2real(r3) + (op == 3'd1 ? -flp2real(r1) : flp2real(r1));
        if (ref_v == 0.0) return (got[30:0] == 0) ? -1.0 : 1.0e30;
        return ulp_err(flp2real(got), ref_v);
      end
      3'd2: return ulp_err(flp2real(got), flp2real(r1) / flp2real(r2));
      3'd3: begin
        if (got[31] != r1[31]) return 1.0e30;
        ref_v = real'(r1[30:23]) + $ln(1.0 + real'(r1[22:0]) / 8388608.0) / $ln(2.0);
        return (real'(got[30:0]) / 8388608.0 - ref_v) * 8388608.0;
      end
      3'd4: return ulp_err(flp2real(got), lns2real(r1));
      default: begin
        sb = r2[31] ^ (op == 3'd6);
        la = lns2log(r1);
        lb = lns2log(r2);
        if (r1[30:0] >= r2[30:0]) begin
          v = la - lb;  s = r1[31] ? -1.0 : 1.0;
        end else begin
          v = lb - la;  la = lb;  s = sb ? -1.0 : 1.0;
        end
        if (r1[31] != sb && v == 0.0) return (got[30:23] == 0) ? -1.0 : 1.0e30;
        if ((s < 0.0) != got[31]) return 1.0e30;
        if (r1[31] == sb) ref_v = la + $ln(1.0 + $pow(2.0, -v)) / $ln(2.0);
        else              ref_v = la + $ln(1.0 - $pow(2.0, -v)) / $ln(2.0);
        return (real'(got[30:0]) / 8388608.0 - (ref_v + 127.0)) * 8388608.0;
      end
    endcase
  endfunction

  function automatic real abs_r(real x);
    return (x < 0.0) ? -x : x;
  endfunction

endpackage
