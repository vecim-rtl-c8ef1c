// tb_fp_ref_pkg: reference arithmetic for the testbenches. Floating point is
// computed with real numbers and integers with plain signed arithmetic, so
// that nothing is shared with the RTL's bit-level datapaths.
// BF16 is 1/8/7 bits (bias 127), FP16 1/5/10 bits (bias 15). Rounding is
// round-to-nearest-even; zero and subnormal encodings read as zero; results
// below the normal range become signed zero and above it infinity.
package tb_fp_ref_pkg;

  function automatic real fp_to_real(input logic [15:0] v, input bit bf);
    int unsigned e, f, fb, bias;
    real m;
    fb   = bf ? 7 : 10;
    bias = bf ? 127 : 15;
    e    = bf ? int'(v[14:7]) : int'(v[14:10]);
    f    = bf ? int'(v[6:0]) : int'(v[9:0]);
    if (e == 0) return 0.0;
    m = (1.0 + real'(f) / real'(1 << fb)) * (2.0 ** (real'(e) - real'(bias)));
    return v[15] ? -m : m;
  endfunction

  function automatic logic [15:0] real_to_fp(input real x, input bit bf);
    int   fb, bias, emax, e, m;
    real  ax, fs, fl, rem;
    bit   s;
    fb   = bf ? 7 : 10;
    bias = bf ? 127 : 15;
    emax = bf ? 255 : 31;
    if (x == 0.0) return 16'h0000;
    s  = (x < 0.0);
    ax = s ? -x : x;
    e  = 0;
    while (ax >= 2.0) begin ax = ax / 2.0; e++; end
    while (ax < 1.0)  begin ax = ax * 2.0; e--; end
    fs  = (ax - 1.0) * real'(1 << fb);
    fl  = $floor(fs);
    rem = fs - fl;
    m   = int'(fl);
    if (rem > 0.5 || (rem == 0.5 && (m % 2) == 1)) m++;
    if (m == (1 << fb)) begin m = 0; e++; end
    e = e + bias;
    if (e <= 0) return {s, 15'h0};
    if (e >= emax) return bf ? {s, 8'hFF, 7'h0} : {s, 5'h1F, 10'h0};
    return bf ? {s, 8'(e), 7'(m)} : {s, 5'(e), 10'(m)};
  endfunction

  // A random normal number whose unbiased exponent lies in [-span, span].
  function automatic logic [15:0] rand_fp(input bit bf, input int span);
    int e;
    e = int'($urandom_range(2 * span)) - span;
    if (bf) return {1'($urandom), 8'(e + 127), 7'($urandom)};
    else    return {1'($urandom), 5'(e + 15), 10'($urandom)};
  endfunction

  // Expected bank word of a CIM operation: a = vs2 word, b = vs1 word,
  // c = old vd word.
  function automatic logic [63:0] cim_ref_word(input vecim_pkg::cim_op_e op, input logic [63:0] a,
                                               input logic [63:0] b, input logic [63:0] c);
    logic [63:0] r;
    bit bf;
    r = '0;
    bf = (op == vecim_pkg::CIM_VFMACC_BF || op == vecim_pkg::CIM_VFADD_BF);
    case (op)
      vecim_pkg::CIM_VMACC_I8:
        for (int e = 0; e < 8; e++)
          r[8*e +: 8] = 8'(int'($signed(c[8*e +: 8])) +
                           int'($signed(a[8*e +: 8])) * int'($signed(b[8*e +: 8])));
      vecim_pkg::CIM_VDOT_I8:
        for (int k = 0; k < 2; k++) begin
          int s;
          s = int'($signed(c[32*k +: 32]));
          for (int e = 4*k; e < 4*k + 4; e++)
            s += int'($signed(a[8*e +: 8])) * int'($signed(b[8*e +: 8]));
          r[32*k +: 32] = 32'(s);
        end
      vecim_pkg::CIM_VFMACC_BF:
        for (int s = 0; s < 4; s++)
          r[16*s +: 16] = real_to_fp(fp_to_real(a[16*s +: 16], 1) * fp_to_real(b[16*s +: 16], 1)
                                     + fp_to_real(c[16*s +: 16], 1), 1);
      vecim_pkg::CIM_VFMUL_HF:
        for (int s = 0; s < 4; s++)
          r[16*s +: 16] = real_to_fp(fp_to_real(a[16*s +: 16], 0) * fp_to_real(b[16*s +: 16], 0), 0);
      default:
        for (int s = 0; s < 4; s++)
          r[16*s +: 16] = real_to_fp(fp_to_real(a[16*s +: 16], bf) + fp_to_real(b[16*s +: 16], bf), bf);
    endcase
    return r;
  endfunction

  // A random word of operands suited to the operation.
  function automatic logic [63:0] rand_word(input vecim_pkg::cim_op_e op);
    logic [63:0] w;
    w = {$urandom, $urandom};
    if (op == vecim_pkg::CIM_VFMACC_BF || op == vecim_pkg::CIM_VFADD_BF)
      for (int s = 0; s < 4; s++) w[16*s +: 16] = rand_fp(1, 12);
    if (op == vecim_pkg::CIM_VFMUL_HF || op == vecim_pkg::CIM_VFADD_HF)
      for (int s = 0; s < 4; s++) w[16*s +: 16] = rand_fp(0, 6);
    return w;
  endfunction

endpackage
