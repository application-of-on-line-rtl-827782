// ol_tb_pkg: testbench helpers for on-line operands.  Converts between
// `real` values and (exponent, signed-digit mantissa) operands, with an
// optional random redundant recoding of the digits, so that the arithmetic
// units see genuine signed-digit inputs.
package ol_tb_pkg;

  typedef struct {
    int e;
    int d[];   // d[0] is the most significant digit, each in {-1,0,1}
  } opnd_t;

  // value of an operand
  function automatic real to_real(input opnd_t o);
    real m = 0.0;
    real w = 0.5;
    foreach (o.d[i]) begin
      m += o.d[i] * w;
      w = w / 2.0;
    end
    return m * (2.0 ** o.e);
  endfunction

  // quasi-normalized operand of v with m digits; recode > 0 rewrites some
  // digit pairs (0,1) as (1,-1) and (0,-1) as (-1,1) below the first digit
  function automatic opnd_t from_real(input real v, input int m, input int recode = 0);
    opnd_t o;
    real a = (v < 0) ? -v : v;
    int  s = (v < 0) ? -1 : 1;
    o.d = new[m];
    if (a == 0.0) begin
      o.e = -128;
      foreach (o.d[i]) o.d[i] = 0;
      return o;
    end
    o.e = 0;
    while (a >= 1.0) begin a = a / 2.0; o.e++; end
    while (a < 0.5)  begin a = a * 2.0; o.e--; end
    for (int i = 0; i < m; i++) begin
      a = a * 2.0;
      if (a >= 1.0) begin o.d[i] = s; a -= 1.0; end
      else          o.d[i] = 0;
    end
    if (recode > 0) begin
      for (int i = 2; i < m - 1; i++) begin
        if (o.d[i] == 0 && o.d[i+1] != 0 && ($urandom % 100) < recode) begin
          o.d[i]   = o.d[i+1];
          o.d[i+1] = -o.d[i+1];
        end
      end
    end
    return o;
  endfunction

  function automatic real fabs(input real v);
    return (v < 0) ? -v : v;
  endfunction

  // uniform random real in [lo, hi)
  function automatic real urand(input real lo, input real hi);
    return lo + (hi - lo) * (real'($urandom) / 4294967296.0);
  endfunction

  // random value with magnitude mantissa in [1/4,1) and exponent in [elo,ehi]
  function automatic real rand_val(input int elo, input int ehi);
    real m = urand(0.25, 1.0);
    int  e = elo + int'($urandom % (ehi - elo + 1));
    if ($urandom % 2) m = -m;
    return m * (2.0 ** e);
  endfunction

endpackage
