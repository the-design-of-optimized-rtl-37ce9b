// dsss_pkg: code-selection constants shared by the DS-SS transmitter and receiver.
//
// The 4-bit code select word S3S2S1S0 chooses the PN code. S3S2 picks the LFSR
// degree n (5, 6, 7 or 8) and so the code length 2^n (32, 64, 128, 256); S1S0
// picks one of three feedback tap sets for that degree. S1S0 = 00 is "no coding"
// for S3S2 = 00 and reserved otherwise; this design treats the reserved words as
// no coding as well (its own choice). The tap sets are those of the code
// selection table of the original design; stage k of the register is bit k-1 of
// a tap mask.
package dsss_pkg;

  localparam int unsigned LFSR_STAGES = 8;   // eight-stage LFSR
  localparam int unsigned CNT_W       = 8;   // chip counter width, codes up to 256 chips

  typedef logic [3:0]             code_sel_t;  // S3S2S1S0
  typedef logic [1:0]             thr_sel_t;   // S5S4
  typedef logic [LFSR_STAGES-1:0] tap_mask_t;

  // Feedback taps for a code select word; zero means no coding.
  function automatic tap_mask_t tap_mask(input code_sel_t sel);
    unique case (sel)
      4'b0001: return 8'h12;  // [5,2]
      4'b0010: return 8'h1E;  // [5,4,3,2]
      4'b0011: return 8'h1B;  // [5,4,2,1]
      4'b0101: return 8'h21;  // [6,1]
      4'b0110: return 8'h33;  // [6,5,2,1]
      4'b0111: return 8'h36;  // [6,5,3,2]
      4'b1001: return 8'h41;  // [7,1]
      4'b1010: return 8'h44;  // [7,3]
      4'b1011: return 8'h47;  // [7,3,2,1]
      4'b1101: return 8'h8E;  // [8,4,3,2]
      4'b1110: return 8'hB4;  // [8,6,5,3]
      4'b1111: return 8'hB2;  // [8,6,5,2]
      default: return '0;     // no coding or reserved
    endcase
  endfunction

  // True when the select word names a PN code (S1S0 of the select word).
  function automatic logic is_coded(input logic [1:0] s1s0);
    return s1s0 != 2'b00;
  endfunction

  // LFSR degree (the output stage) from S3S2: 5..8.
  function automatic int unsigned degree(input logic [1:0] s3s2);
    return 5 + int'(s3s2);
  endfunction

  // Chips per data bit minus one: 2^n - 1 for a coded word, 0 without coding.
  function automatic logic [CNT_W-1:0] last_chip(input code_sel_t sel);
    if (!is_coded(sel[1:0])) return '0;
    unique case (sel[3:2])
      2'b00:   return 8'd31;
      2'b01:   return 8'd63;
      2'b10:   return 8'd127;
      default: return 8'd255;
    endcase
  endfunction

endpackage
