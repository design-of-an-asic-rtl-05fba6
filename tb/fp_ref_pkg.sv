// fp_ref_pkg: bit-exact reference model of IEEE 754 single-precision
// addition (round to nearest even), used by the testbenches. It does not
// mirror the hardware: it scales both operands to their common smallest
// exponent in a 300-bit integer, adds or subtracts exactly, and rounds the
// exact sum once. It also offers helpers to build random operands.
package fp_ref_pkg;

  localparam int unsigned XW = 300;

  function automatic logic [31:0] ref_add(input logic [31:0] a, input logic [31:0] b);
    logic          sa, sb, sr;
    int            ea, eb, emin, p, e, sh;
    logic [XW-1:0] va, vb, mag, rem, half, m;
    sa = a[31]; sb = b[31];
    ea = int'(a[30:23]); eb = int'(b[30:23]);
    // Specials
    if ((ea == 255 && a[22:0] != 0) || (eb == 255 && b[22:0] != 0)) return 32'h7FC0_0000;
    if (ea == 255 && eb == 255) return (sa == sb) ? a : 32'h7FC0_0000;
    if (ea == 255) return a;
    if (eb == 255) return b;
    va = XW'({(ea != 0), a[22:0]});
    vb = XW'({(eb != 0), b[22:0]});
    if (ea == 0) ea = 1;
    if (eb == 0) eb = 1;
    emin = (ea < eb) ? ea : eb;
    va = va << (ea - emin);
    vb = vb << (eb - emin);
    if (sa == sb) begin
      mag = va + vb; sr = sa;
    end else if (va >= vb) begin
      mag = va - vb; sr = sa;
    end else begin
      mag = vb - va; sr = sb;
    end
    if (mag == 0) return {sa & sb, 31'b0};
    p = 0;
    for (int i = 0; i < XW; i++) if (mag[i]) p = i;
    // value = mag * 2^(emin-150); target M * 2^(e-150), M < 2^24
    e = emin + p - 23;
    if (e < 1) e = 1;
    sh = e - emin;
    if (sh <= 0) begin
      m = mag << (-sh);
    end else begin
      m    = mag >> sh;
      rem  = mag & ((XW'(1) << sh) - 1);
      half = XW'(1) << (sh - 1);
      if (rem > half || (rem == half && m[0])) m = m + 1;
      if (m[24]) begin
        m = m >> 1;
        e = e + 1;
      end
    end
    if (e >= 255) return {sr, 8'hFF, 23'b0};
    if (!m[23]) return {sr, 8'h00, m[22:0]};
    return {sr, 8'(e), m[22:0]};
  endfunction

  // Random operand of a chosen kind: 0 normal, 1 denormal, 2 zero,
  // 3 infinity, 4 NaN, 5 normal with a small exponent (1..4).
  function automatic logic [31:0] rand_op(input int kind);
    logic [31:0] r;
    r = $urandom;
    case (kind)
      0: begin
        r[30:23] = 8'($urandom_range(1, 254));
      end
      1: begin
        r[30:23] = 8'h00;
        if (r[22:0] == 0) r[0] = 1'b1;
        r[22:0] = r[22:0] >> $urandom_range(0, 22);
        if (r[22:0] == 0) r[0] = 1'b1;
      end
      2: r[30:0] = '0;
      3: r[30:0] = {8'hFF, 23'b0};
      4: begin
        r[30:23] = 8'hFF;
        if (r[22:0] == 0) r[5] = 1'b1;
      end
      default: r[30:23] = 8'($urandom_range(1, 4));
    endcase
    return r;
  endfunction

  // An operand close to x: same or neighbouring exponent, so that
  // subtraction cancels; random sign.
  function automatic logic [31:0] near_op(input logic [31:0] x);
    logic [31:0] r;
    int          e;
    r = x;
    e = int'(x[30:23]) + $urandom_range(0, 2) - 1;
    if (e < 1) e = 1;
    if (e > 254) e = 254;
    r[30:23] = 8'(e);
    r[31]    = 1'($urandom);
    case ($urandom_range(0, 3))
      0: r[22:0] = x[22:0] ^ 23'(1 << $urandom_range(0, 22));
      1: r[22:0] = x[22:0] ^ 23'($urandom_range(0, 255));
      2: r[22:0] = $urandom;
      default: r[22:0] = x[22:0];
    endcase
    return r;
  endfunction

endpackage
