// tb_px_models: reference models shared by the PX-CGRA testbenches.
//
// The models compute, by plain integer arithmetic, what the accuracy-
// configurable adder, multiplier and ALU must return, without sharing code
// with the RTL: the approximate adder's carry into bit i is the carry out of
// an arithmetic addition of the WIN bits below i, and the approximate
// multiplier adds the partial-product bits of each low column through the
// 4:2 compressor rule sum = (x1^x2)|(x3^x4), carry = (x1&x2)|(x3&x4).
package tb_px_models;

  localparam int W   = 16;
  localparam int WIN = 4;

  function automatic logic [W-1:0] m_add(logic [W-1:0] a, logic [W-1:0] b,
                                         logic cin, logic apx);
    logic [W-1:0] s;
    int unsigned lo, len, sa, sb, tot;
    if (!apx) return a + b + W'(cin);
    for (int i = 0; i < W; i++) begin
      lo  = (i > WIN) ? i - WIN : 0;
      len = i - lo;
      sa  = (int'(a) >> lo) & ((1 << len) - 1);
      sb  = (int'(b) >> lo) & ((1 << len) - 1);
      tot = sa + sb + ((lo == 0) ? int'(cin) : 0);
      s[i] = a[i] ^ b[i] ^ tot[len];
    end
    return s;
  endfunction

  function automatic logic [2*W-1:0] m_mul(logic [W-1:0] a, logic [W-1:0] b, logic apx);
    longint unsigned acc;
    int bits[$];
    acc = 0;
    for (int j = 0; j < 2 * W - 1; j++) begin
      bits.delete();
      for (int i = 0; i < W; i++)
        if (j - i >= 0 && j - i < W) bits.push_back(int'(b[i] & a[j-i]));
      if (apx && j < W / 2) begin
        while (bits.size() >= 4) begin
          int x1, x2, x3, x4;
          x1 = bits.pop_front(); x2 = bits.pop_front();
          x3 = bits.pop_front(); x4 = bits.pop_front();
          acc += longint'((x1 ^ x2) | (x3 ^ x4)) << j;
          acc += longint'((x1 & x2) | (x3 & x4)) << (j + 1);
        end
      end
      foreach (bits[k]) acc += longint'(bits[k]) << j;
    end
    return acc[2*W-1:0];
  endfunction

  // ALU reference. op numbers: 0 NOP 1 ADD 2 SUB 3 MUL 4 MAC 5 ABS 6 AND 7 OR
  // 8 XOR 9 NOT 10 GT 11 LT 12 EQ 13 LSR 14 LSL 15 ASR.
  function automatic logic [W-1:0] m_alu(int op, logic [W-1:0] a, logic [W-1:0] b,
                                         logic [W-1:0] acc, logic add_apx, logic mul_apx);
    logic [2*W-1:0] pr;
    int sh;
    sh = int'(b[3:0]);
    case (op)
      1:  return m_add(a, b, 1'b0, add_apx);
      2:  return m_add(a, ~b, 1'b1, add_apx);
      3:  begin pr = m_mul(a, b, mul_apx); return pr[W-1:0]; end
      4:  begin pr = m_mul(a, b, mul_apx); return m_add(pr[W-1:0], acc, 1'b0, add_apx); end
      5:  return a[W-1] ? m_add('0, ~a, 1'b1, add_apx) : a;
      6:  return a & b;
      7:  return a | b;
      8:  return a ^ b;
      9:  return ~a;
      10: return ($signed(a) > $signed(b)) ? 1 : 0;
      11: return ($signed(a) < $signed(b)) ? 1 : 0;
      12: return (a == b) ? 1 : 0;
      13: return a >> sh;
      14: return a << sh;
      15: return W'($signed(a) >>> sh);
      default: return acc;
    endcase
  endfunction

endpackage
