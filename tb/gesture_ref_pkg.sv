// gesture_ref_pkg: bit-accurate software model of the gesture CNN, used by
// the testbenches to compute expected values independently of the RTL.
//
// Values are plain integers holding the fixed-point bit patterns. rq()
// removes fraction bits with round-half-to-even and wraps to the given
// width, which is the arithmetic the hardware is specified to perform. The
// parameter image uses the accelerator's parameter address map. The word
// length of each value group is a field of the model (default: the package
// formats), so one model serves every word-length configuration; biases are
// aligned to the products by the input's fraction bits, as in the hardware.
package gesture_ref_pkg;
  import gesture_pkg::*;

  // convergent rounding of v by d fraction bits, then wrap to w bits
  function automatic longint rq(longint v, int d, int w);
    longint fl, rem, half, q, m;
    if (d <= 0) q = v <<< (-d);
    else begin
      fl   = v >>> d;
      rem  = v - (fl <<< d);
      half = longint'(1) <<< (d - 1);
      q = fl;
      if (rem > half || (rem == half && fl[0])) q = fl + 1;
    end
    m = (longint'(1) <<< w) - 1;
    q = q & m;
    if (q[w-1]) q = q - (longint'(1) <<< w);
    return q;
  endfunction

  // sign-extend the low w bits of v
  function automatic longint sx(longint v, int w);
    longint m, q;
    m = (longint'(1) <<< w) - 1;
    q = v & m;
    if (q[w-1]) q = q - (longint'(1) <<< w);
    return q;
  endfunction

  // ---------------- reference network ----------------
  class gesture_model;
    longint x   [N_IN];        // input samples, t*3 + axis
    longint prm [N_PARAMS];    // parameter image
    longint p1  [P1_T][C1_K];  // pool1 result
    longint p2  [FLAT];        // flattened pool2 result
    longint d1  [D1_N];
    longint d2  [D2_N];
    real    pr  [D2_N];
    int     cls;
    int     relu_zero_p1;      // pool1 outputs clamped to 0
    // word lengths (total width w, fraction bits f); defaults = T7
    int in_w  = IN_W,  in_f  = IN_F;
    int prm_w = PRM_W, prm_f = PRM_F;
    int c1_w  = C1_W,  c1_f  = C1_F;
    int c2_w  = C2_W,  c2_f  = C2_F;
    int d1_w  = D1_W,  d1_f  = D1_F;
    int d2_w  = D2_W,  d2_f  = D2_F;

    function void run();
      // conv1 + pool1
      relu_zero_p1 = 0;
      for (int k = 0; k < C1_K; k++)
        for (int p = 0; p < P1_T; p++) begin
          longint mx;
          mx = 0;
          for (int t = 3*p; t < 3*p + 3; t++)
            for (int a = 0; a < AXES; a++) begin
              longint s;
              s = prm[PA_C1 + k*C1_LANES + C1_TAPS] <<< in_f;
              for (int kt = 0; kt < 4; kt++)
                for (int ka = 0; ka < 3; ka++) begin
                  int tt, aa;
                  tt = t + kt - 1; aa = a + ka - 1;
                  if (tt >= 0 && tt < T_IN && aa >= 0 && aa < AXES)
                    s += x[tt*AXES + aa] * prm[PA_C1 + k*C1_LANES + kt*3 + ka];
                end
              s = rq(s, in_f + prm_f - c1_f, c1_w);
              if (s > mx) mx = s;
            end
          p1[p][k] = mx;
          if (mx == 0) relu_zero_p1++;
        end
      // conv2 + pool2, flatten channel-major
      for (int oc = 0; oc < C2_K; oc++)
        for (int p = 0; p < P2_T; p++) begin
          longint mx;
          mx = 0;
          for (int t = 3*p; t < 3*p + 3; t++) begin
            longint s;
            s = prm[PA_C2 + oc*C2_LANES + C2_TAPS] <<< c1_f;
            for (int kt = 0; kt < 4; kt++)
              for (int ic = 0; ic < C1_K; ic++) begin
                int tt;
                tt = t + kt - 1;
                if (tt >= 0 && tt < P1_T)
                  s += p1[tt][ic] * prm[PA_C2 + oc*C2_LANES + kt*C1_K + ic];
              end
            s = rq(s, c1_f + prm_f - c2_f, c2_w);
            if (s > mx) mx = s;
          end
          p2[oc*P2_T + p] = mx;
        end
      // dense1 with ReLU
      for (int j = 0; j < D1_N; j++) begin
        longint s;
        s = prm[PA_D1 + FLAT*D1_N + j] <<< c2_f;
        for (int i = 0; i < FLAT; i++) s += p2[i] * prm[PA_D1 + i*D1_N + j];
        s = rq(s, c2_f + prm_f - d1_f, d1_w);
        d1[j] = (s < 0) ? 0 : s;
      end
      // dense2
      for (int o = 0; o < D2_N; o++) begin
        longint s;
        s = prm[PA_D2 + D1_N*D2_N + o] <<< d1_f;
        for (int i = 0; i < D1_N; i++) s += d1[i] * prm[PA_D2 + i*D2_N + o];
        d2[o] = rq(s, d1_f + prm_f - d2_f, d2_w);
      end
      // softmax and arg-max
      begin
        longint mx;
        real sum;
        mx = d2[0]; cls = 0;
        for (int o = 1; o < D2_N; o++) if (d2[o] > mx) begin mx = d2[o]; cls = o; end
        sum = 0.0;
        for (int o = 0; o < D2_N; o++) begin
          pr[o] = $exp(real'(d2[o] - mx) / real'(longint'(1) <<< d2_f));
          sum += pr[o];
        end
        for (int o = 0; o < D2_N; o++) pr[o] = pr[o] / sum;
      end
    endfunction

    // random network: inputs in [-xr, xr], parameters in [-wr, wr] (LSBs)
    function void randomise(int xr, int wr);
      for (int i = 0; i < N_IN; i++) x[i] = longint'($urandom_range(2*xr, 0)) - longint'(xr);
      for (int i = 0; i < N_PARAMS; i++) prm[i] = longint'($urandom_range(2*wr, 0)) - longint'(wr);
    endfunction
  endclass
endpackage
