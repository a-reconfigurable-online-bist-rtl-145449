// tb_nn_ref_pkg: bit-true reference model of the network tester, written
// independently of the RTL with plain integer and real arithmetic.
//
// coef[] mirrors the coefficient ROM (signed s6.7 words as integers).
// plan_ref() is the PLAN logsig evaluated in real arithmetic and floored to a
// 7-bit fraction; predict() runs one full network (hidden then output layer)
// and returns the output bits the tester should produce.  Also holds the
// cycle-count formula of one test and behavioural models of the five circuits.
package tb_nn_ref_pkg;
  localparam int NC = 5;
  localparam int NIN  [NC] = '{5, 9, 9, 11, 8};
  localparam int NHID [NC] = '{3, 5, 8, 3, 43};
  localparam int NOUT [NC] = '{2, 5, 5, 3, 8};
  localparam int PTR  [NC] = '{0, 26, 106, 231, 279};   // running sums of the network sizes
  localparam int ACC_MAX = 4095, ACC_MIN = -4096;        // s6.7

  int coef [1024];

  function automatic int clamp(int v);
    return v > ACC_MAX ? ACC_MAX : (v < ACC_MIN ? ACC_MIN : v);
  endfunction

  // PLAN logsig of an s6.7 integer, result as u1.7 integer (0..128)
  function automatic int plan_ref(int acc);
    real x, ax, y;
    x  = real'(acc) / 128.0;
    ax = x < 0 ? -x : x;
    if (ax >= 5.0)        y = 1.0;
    else if (ax >= 2.375) y = ax / 32.0 + 0.84375;
    else if (ax >= 1.0)   y = ax / 8.0 + 0.625;
    else                  y = ax / 4.0 + 0.5;
    if (x < 0) y = 1.0 - y;
    return int'($floor(y * 128.0));
  endfunction

  // one multiply-accumulate step: value a (u1.7 int) times weight w (s6.7 int)
  function automatic int mac(int acc, int a, int w);
    int p;
    p = (a * w) >>> 7;
    return clamp(acc + clamp(p));
  endfunction

  function automatic int sext13(int v);
    v = v & 32'h1fff;
    return (v & 32'h1000) != 0 ? v - 8192 : v;
  endfunction

  // network outputs of circuit 'cut' for input vector 'in'
  function automatic int predict(int cut, int in);
    int a, acc, res;
    int h [64];
    a   = PTR[cut];
    res = 0;
    for (int j = 0; j < NHID[cut]; j++) begin
      acc = coef[a]; a++;
      for (int i = 0; i < NIN[cut]; i++) begin
        acc = mac(acc, ((in >> i) & 1) != 0 ? 128 : 0, coef[a]); a++;
      end
      h[j] = plan_ref(acc);
    end
    for (int k = 0; k < NOUT[cut]; k++) begin
      acc = coef[a]; a++;
      for (int j = 0; j < NHID[cut]; j++) begin
        acc = mac(acc, h[j], coef[a]); a++;
      end
      if (plan_ref(acc) >= 64) res |= (1 << k);
    end
    return res;
  endfunction

  function automatic int test_cycles(int cut);
    return 2 + NHID[cut] * (2 + NIN[cut] * 10) + NOUT[cut] * (2 + NHID[cut] * 10);
  endfunction

  // behavioural circuit models, vector orders as in the RTL
  function automatic int cut_model(int cut, int in);
    int a, b, r;
    case (cut)
      0: begin
        bit n1, n2, n3, n6, n7, o22, o23;
        {n7, n6, n3, n2, n1} = 5'(in);
        o22 = (n1 & n3) | (n2 & ~(n3 & n6));
        o23 = ~(n3 & n6) & (n2 | n7);
        r = {30'd0, o23, o22};
      end
      1: begin
        int g, p, c1, c2, c3, gg;
        p = ~(in >> 1) & 15; g = ~(in >> 5) & 15;
        // carries through the slices, by the recurrence c[i+1] = g[i] | p[i]&c[i]
        c1 = ((g >> 0) & 1) | ((p >> 0) & 1 & in);
        c2 = ((g >> 1) & 1) | ((p >> 1) & 1 & c1);
        c3 = ((g >> 2) & 1) | ((p >> 2) & 1 & c2);
        // block generate: carry out of slice 3 with carry-in 0
        gg = (g & 1);
        gg = ((g >> 1) & 1) | ((p >> 1) & 1 & gg);
        gg = ((g >> 2) & 1) | ((p >> 2) & 1 & gg);
        gg = ((g >> 3) & 1) | ((p >> 3) & 1 & gg);
        r = c1 | (c2 << 1) | (c3 << 2) | ((gg ^ 1) << 3) | ((p == 15 ? 0 : 1) << 4);
      end
      2: r = (in & 15) + ((in >> 4) & 15) + ((in >> 8) & 1);
      3: begin
        a = in & 15; b = (in >> 4) & 15;
        if (a > b)      r = 4;
        else if (a < b) r = 1;
        else begin
          int ilt, ieq, igt;
          ilt = (in >> 8) & 1; ieq = (in >> 9) & 1; igt = (in >> 10) & 1;
          r = ieq << 1;
          if (ieq == 0 && ilt == 0) r |= 4;
          if (ieq == 0 && igt == 0) r |= 1;
        end
      end
      default: begin
        a = in & 15; b = (in >> 4) & 15;
        if (b == 0) r = 15 | (a << 4);
        else        r = (a / b) | ((a % b) << 4);
      end
    endcase
    return r;
  endfunction
endpackage
