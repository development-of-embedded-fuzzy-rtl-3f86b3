// flc_ref_pkg: reference models used by the testbenches.
//
// The models are written from the textbook forms of the equations (division
// form of the triangular and trapezoidal membership functions, min for the
// fuzzy AND, weighted average of singleton consequents, floor division for the
// fixed-point gains) rather than from the structure of the RTL, so that a
// testbench compares the hardware against an independent computation.
package flc_ref_pkg;
  import flc_pkg::*;

  // floor(a / 2^16)
  function automatic longint floor_q16(longint a);
    longint q;
    q = a / 65536;
    if ((a % 65536) != 0 && a < 0) q = q - 1;
    return q;
  endfunction

  function automatic longint sat(longint v, longint lim);
    if (v > lim)  return lim;
    if (v < -lim) return -lim;
    return v;
  endfunction

  // Triangle (a, b, c) with grade in 0..10000, Equation-1 form
  function automatic longint ref_tri(longint x, longint a, longint b, longint c);
    if (x <= a || x >= c) return 0;
    if (x <= b) return (x - a) * 10000 / (b - a);
    return (c - x) * 10000 / (c - b);
  endfunction

  // Trapezoid (a, b, c, d) with grade in 0..10000, Equation-2 form
  function automatic longint ref_trap(longint x, longint a, longint b, longint c, longint d);
    if (x <= a || x >= d) return 0;
    if (x < b) return (x - a) * 10000 / (b - a);
    if (x <= c) return 10000;
    return (d - x) * 10000 / (d - c);
  endfunction

  // Five-set fuzzification of a raw input (triangles, centres -10000..10000)
  function automatic void fuzzify(longint x_raw, output longint mu [5]);
    longint x;
    x = sat(x_raw, 10000);
    for (int i = 0; i < 5; i++)
      mu[i] = ref_tri(x, (i - 2) * 5000 - 5000, (i - 2) * 5000, (i - 2) * 5000 + 5000);
  endfunction

  // Zero-order Sugeno controller output for normalised inputs e and de
  function automatic longint flc(longint e, longint de, rule_table_t rules);
    longint me [5], md [5];
    longint w, num, den;
    fuzzify(e, me);
    fuzzify(de, md);
    num = 0;
    den = 0;
    for (int r = 0; r < 5; r++)
      for (int c = 0; c < 5; c++) begin
        w   = (me[r] < md[c]) ? me[r] : md[c];
        num += w * longint'($signed(rules[r][c])) * 5000;
        den += w;
      end
    if (den == 0) return 0;
    return num / den;   // SystemVerilog division truncates toward zero
  endfunction

  // Controller state carried from one control step to the next
  typedef struct {
    longint e_prev;
    longint acc;      // PI accumulator, 16 fraction bits
  } pid_state_t;

  // One step of the PID-like fuzzy controller; returns u, updates st
  function automatic longint pid_step(longint sp, longint y, flc_gains_t g, flc_mode_e mode,
                                      rule_table_t rules, inout pid_state_t st,
                                      output longint f_o, output bit in_sat_o,
                                      output bit out_sat_o);
    longint e, de, en, den_, f, upd, acc_n, upi, u;
    e  = sp - y;
    de = e - st.e_prev;
    st.e_prev = e;
    en   = floor_q16(e * longint'(g.kp));
    den_ = floor_q16(de * longint'(g.kd));
    in_sat_o = (en > 10000 || en < -10000 || den_ > 10000 || den_ < -10000);
    f   = flc(en, den_, rules);
    f_o = f;
    upd = floor_q16(f * longint'(g.kc_pd));
    if (mode == MODE_PD) begin
      st.acc = 0;
      upi    = 0;
    end else begin
      acc_n  = sat(st.acc + f * longint'(g.kc_pi), longint'(10000) * 65536);
      st.acc = acc_n;
      upi    = floor_q16(acc_n);
    end
    case (mode)
      MODE_PD: u = upd;
      MODE_PI: u = upi;
      default: u = upd + upi;
    endcase
    out_sat_o = (u > 10000 || u < -10000);
    return sat(u, 10000);
  endfunction
endpackage
