// comp_model_pkg: reference model of the bumpless compensator for the testbenches.
//
// A class that takes one ADC sample at a time (with its main-sample flag) and returns what
// the compensator must produce: the operation mode, whether a compensator executed, the duty
// word and the integrator. It is written directly from the control law, with 64-bit
// integers: mode detection on |e_N - e_N-1| > e_thres with the one-sample sign filter, return
// to steady state after ss_min quiet samples on a main sample only, PID at the switching rate
// (derivative over one switching period), PD at the sampling rate with the integrator as its
// bias, and the K_cross * e_N-1 integrator update on the transfer.
package comp_model_pkg;
  import ctrl_pkg::*;

  class comp_model;
    cfg_t   cfg;
    int     st;          // 0 steady, 1 filter, 2 transient
    int     sgn, quiet;
    longint ep, eps, di, duty;
    // results of the last step
    bit     ran, pd, transfer, tm, spike, enter, waited;

    function new(cfg_t c);
      cfg = c;
      reset();
    endfunction

    function void reset();
      st = 0; sgn = 0; quiet = 0; ep = 0; eps = 0; di = 0; duty = 0;
    endfunction

    static function longint clampl(longint v, longint lo, longint hi);
      return v < lo ? lo : (v > hi ? hi : v);
    endfunction

    static function longint fdiv(longint v, longint q);
      return (v >= 0) ? v / q : -((-v + q - 1) / q);
    endfunction

    function void step(int adc, bit is_main);
      longint e, df, ds, sum, dinew;
      int mag, nst, nq, s;
      e  = longint'(cfg.vref) - adc;
      df = e - ep;
      ds = e - eps;
      mag = int'(df < 0 ? -df : df);
      tm = mag > int'(cfg.e_thres);
      s = (df < 0);
      nq = tm ? 0 : (quiet < 63 ? quiet + 1 : 63);
      nst = st;
      waited = 0;
      case (st)
        0: if (tm) nst = 1;
        1: nst = (tm && s == sgn) ? 2 : 0;
        default: if (!tm && nq >= int'(cfg.ss_min)) begin
                   if (is_main) nst = 0; else waited = 1;
                 end
      endcase
      spike    = (st == 1 && nst == 0);
      enter    = (st == 1 && nst == 2);
      transfer = (st == 2 && nst == 0);
      pd       = (nst == 2);
      ran      = pd || is_main;
      if (pd) begin
        sum  = di + longint'(cfg.kp_tr) * e + longint'(cfg.kd_tr) * df;
        duty = clampl(fdiv(sum, 256), 0, 4095);
      end else if (is_main) begin
        dinew = di + longint'(cfg.ki_ss) * e;
        if (transfer) dinew += longint'(cfg.k_cross) * ep;
        di = clampl(dinew, 0, 4095 * 256);
        sum  = longint'(cfg.kp_ss) * e + longint'(cfg.kd_ss) * ds + di;
        duty = clampl(fdiv(sum, 256), 0, 4095);
      end
      if (st == 0) sgn = s;
      quiet = (nst == 2) ? nq : 0;
      st = nst;
      ep = e;
      if (is_main) eps = e;
    endfunction
  endclass

endpackage
