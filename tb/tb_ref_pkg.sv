// Reference arithmetic for the testbenches, written independently of the RTL.
//
// daub4_lp() computes one low-pass Daub4 output the way the hardware is
// specified to: 64-bit integer products of the Q22.10 pixels with the
// coefficients scaled by 8192 (3952, 6853, 1836, -1060), the sum divided by
// 8192 rounding toward minus infinity, and the low 32 bits kept.
// daub4_real() gives the same filter in floating point, for a check that the
// hardware rounds down by less than one least significant bit.
package tb_ref_pkg;

  localparam longint C0 = 3952;
  localparam longint C1 = 6853;
  localparam longint C2 = 1836;
  localparam longint C3 = -1060;

  function automatic int daub4_lp(int s0, int s1, int s2, int s3);
    longint sum, quo;
    sum = longint'(s0) * C0 + longint'(s1) * C1 + longint'(s2) * C2 + longint'(s3) * C3;
    // floor division by 8192
    quo = sum / 8192;
    if ((sum % 8192) != 0 && sum < 0) quo = quo - 1;
    return int'(quo);
  endfunction

  function automatic real daub4_real(int s0, int s1, int s2, int s3);
    return (real'(C0) * real'(s0) + real'(C1) * real'(s1) +
            real'(C2) * real'(s2) + real'(C3) * real'(s3)) / 8192.0 / 1024.0;
  endfunction

  function automatic int smax(int a, int b);
    return (a > b) ? a : b;
  endfunction

endpackage
