// nm_fp_unit: near-memory floating-point logic of one 16-bit slot.
//
// The in-memory multiplier supplies only the mantissa product; everything
// else of a BF16/FP16 operation is done here, next to the array:
//   FP_MAC_BF: vd = a*b + c in BF16 (1/8/7). mprod_i[15:0] = {1,ma}*{1,mb}
//              from the 8-bit ring. The product is kept exact and added to c
//              with one rounding (fused multiply-add).
//   FP_MUL_HF: vd = a*b in FP16 (1/5/10). mprod_i = ma*mb from the 10-bit ring;
//              the hidden-one terms are added here:
//              (2^10+ma)(2^10+mb) = 2^20 + 2^10*(ma+mb) + ma*mb.
//   FP_ADD_BF, FP_ADD_HF: vd = a + b.
// Exponents are added, signs combined, the sum is aligned, normalised and
// rounded ("FP adjust"). The split of work (mantissa in memory; exponent,
// hidden-bit terms and addition near memory) follows the described design.
// Choices of this implementation, where the document says nothing: rounding
// is round-to-nearest-even; subnormal inputs and results are flushed to zero;
// results too large become infinity; infinities and NaNs on the inputs are not
// treated specially.
//
// Purely combinational; the bank registers the result.
module nm_fp_unit
  import vecim_pkg::*;
(
  input  fp_mode_e           mode_i,
  input  logic [SLOT_W-1:0]  a_i,       // vs2 element
  input  logic [SLOT_W-1:0]  b_i,       // vs1 element
  input  logic [SLOT_W-1:0]  c_i,       // op3 element (MAC only)
  input  logic [19:0]        mprod_i,   // in-memory mantissa product
  output logic [SLOT_W-1:0]  res_o
);

  typedef struct packed {
    logic        s;
    logic        z;      // value is zero
    logic [15:0] e;      // unbiased exponent, two's complement
    logic [23:0] sig;    // value = sig * 2^(e-22), sig in [2^22, 2^24)
  } unp_t;

  logic is_bf;
  assign is_bf = (mode_i == FP_MAC_BF) || (mode_i == FP_ADD_BF);

  function automatic unp_t unpack(input logic [15:0] v, input logic bf);
    unp_t u;
    u.s = v[15];
    if (bf) begin
      u.z   = (v[14:7] == 8'd0);
      u.e   = 16'(v[14:7]) - 16'd127;
      u.sig = {2'b01, v[6:0], 15'h0000};
    end else begin
      u.z   = (v[14:10] == 5'd0);
      u.e   = 16'(v[14:10]) - 16'd15;
      u.sig = {2'b01, v[9:0], 12'h000};
    end
    return u;
  endfunction

  unp_t ua, ub, uc, x, y;
  logic [21:0] hf_mant;

  always_comb begin
    ua = unpack(a_i, is_bf);
    ub = unpack(b_i, is_bf);
    uc = unpack(c_i, is_bf);
    hf_mant = 22'h100000 + (22'(a_i[9:0]) << 10) + (22'(b_i[9:0]) << 10) + 22'(mprod_i);
    // first operand: the product, or a for additions
    x = ua;
    y = ub;
    case (mode_i)
      FP_MAC_BF, FP_MUL_HF: begin
        x.s   = ua.s ^ ub.s;
        x.z   = ua.z | ub.z;
        x.e   = ua.e + ub.e;
        x.sig = (mode_i == FP_MAC_BF) ? {mprod_i[15:0], 8'h00} : {hf_mant, 2'b00};
        y     = uc;
        if (mode_i == FP_MUL_HF) y.z = 1'b1;
      end
      default: ;
    endcase
  end

  // Alignment, addition, normalisation and rounding.
  logic        big_s, small_s, rs;
  logic [15:0] big_e, diff, er, biased;
  logic [47:0] big_m, small_m, sh;
  logic [48:0] r;
  logic [47:0] rn;
  logic [5:0]  p;
  logic [10:0] mant;
  logic        g, st, lsb, rz;
  int unsigned frac;

  always_comb begin
    frac = is_bf ? 7 : 10;
    // choose the operand with the larger exponent
    if (x.z || (!y.z && $signed(y.e) > $signed(x.e))) begin
      big_s = y.s; big_e = y.e; big_m = {y.sig, 24'h0};
      small_s = x.s; small_m = x.z ? 48'h0 : {x.sig, 24'h0};
      diff = y.e - x.e;
    end else begin
      big_s = x.s; big_e = x.e; big_m = {x.sig, 24'h0};
      small_s = y.s; small_m = y.z ? 48'h0 : {y.sig, 24'h0};
      diff = x.e - y.e;
    end
    if (x.z && y.z) begin
      big_m = '0; small_m = '0; diff = '0;
    end
    // shift the smaller operand right, keeping a sticky bit
    if (diff >= 16'd48) sh = {47'h0, |small_m};
    else                sh = (small_m >> diff) | 48'(|(small_m & ((48'h1 << diff) - 48'h1)));
    if (big_s == small_s) begin
      r = {1'b0, big_m} + {1'b0, sh};
      rs = big_s;
    end else if (big_m >= sh) begin
      r = {1'b0, big_m} - {1'b0, sh};
      rs = big_s;
    end else begin
      r = {1'b0, sh} - {1'b0, big_m};
      rs = small_s;
    end
    // leading one
    p = '0;
    for (int i = 0; i < 49; i++) if (r[i]) p = 6'(i);
    rz = (r == '0);
    rn = 48'(r << (6'd48 - p));
    er = big_e - 16'd46 + 16'(p);
    if (is_bf) begin
      mant = {4'h0, rn[47:41]};
      g    = rn[40];
      st   = |rn[39:0];
      lsb  = rn[41];
    end else begin
      mant = {1'b0, rn[47:38]};
      g    = rn[37];
      st   = |rn[36:0];
      lsb  = rn[38];
    end
    if (g && (st || lsb)) mant = mant + 11'd1;
    if (mant == (11'd1 << frac)) begin
      mant = '0;
      er   = er + 16'd1;
    end
    biased = er + (is_bf ? 16'd127 : 16'd15);
    if (rz || $signed(biased) <= 0) begin
      res_o = {rz ? 1'b0 : rs, 15'h0};
    end else if (is_bf) begin
      res_o = ($signed(biased) >= 255) ? {rs, 8'hFF, 7'h0} : {rs, biased[7:0], mant[6:0]};
    end else begin
      res_o = ($signed(biased) >= 31) ? {rs, 5'h1F, 10'h0} : {rs, biased[4:0], mant[9:0]};
    end
  end

endmodule
