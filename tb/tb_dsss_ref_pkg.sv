// tb_dsss_ref_pkg: reference models for the DS-SS testbenches.
//
// ref_code builds the chips of one data bit for a code select word straight
// from the feedback tap lists of the code selection table, by the linear
// recurrence of a Fibonacci LFSR: b(t) = XOR of b(t-k) over the taps k, with
// the register seeded with ones, b(-1) .. b(-n) = 1. The output stage n
// delivers b(t-n) at chip t. The code is restarted for every bit, so a bit has
// 2^n chips. Without coding a bit is one chip of value 0.
package tb_dsss_ref_pkg;

  function automatic int ref_degree(input logic [3:0] sel);
    if (sel[1:0] == 2'b00) return 0;
    return 5 + int'(sel[3:2]);
  endfunction

  function automatic int ref_len(input logic [3:0] sel);
    if (ref_degree(sel) == 0) return 1;
    return 1 << ref_degree(sel);
  endfunction

  // Tap list of the code selection table, highest stage first.
  function automatic void ref_taps(input logic [3:0] sel, output int t[$]);
    case (sel)
      4'd1:  t = '{5, 2};
      4'd2:  t = '{5, 4, 3, 2};
      4'd3:  t = '{5, 4, 2, 1};
      4'd5:  t = '{6, 1};
      4'd6:  t = '{6, 5, 2, 1};
      4'd7:  t = '{6, 5, 3, 2};
      4'd9:  t = '{7, 1};
      4'd10: t = '{7, 3};
      4'd11: t = '{7, 3, 2, 1};
      4'd13: t = '{8, 4, 3, 2};
      4'd14: t = '{8, 6, 5, 3};
      4'd15: t = '{8, 6, 5, 2};
      default: t = {};
    endcase
  endfunction

  // Chips 0 .. len-1 of the code (len may exceed one bit, for period checks
  // of the free-running sequence).
  function automatic void ref_seq(input logic [3:0] sel, input int len, output bit c[$]);
    int n;
    int t[$];
    bit b[$];   // b[i] holds b(i - n)
    n = ref_degree(sel);
    c = {};
    if (n == 0) begin
      repeat (len) c.push_back(1'b0);
      return;
    end
    ref_taps(sel, t);
    repeat (n) b.push_back(1'b1);
    for (int i = 0; i < len; i++) begin
      bit f;
      f = 1'b0;
      foreach (t[j]) f ^= b[n + i - t[j]];
      b.push_back(f);
      c.push_back(b[i]);    // b(i - n)
    end
  endfunction

endpackage
