// tb_gf_ref_pkg: reference GF(2^83) arithmetic for the testbenches.
//
// Written independently of the RTL: the multiplication forms the full
// 165-bit carry-less product first and then reduces it from the top with
// x^83 = x^7 + x^4 + x^2 + 1, whereas the RTL interleaves the reduction with
// the multiplication.
package tb_gf_ref_pkg;

  localparam int M = 83;

  function automatic logic [M-1:0] gf_mul(input logic [M-1:0] a, input logic [M-1:0] b);
    logic [2*M-2:0] t;
    t = '0;
    for (int i = 0; i < M; i++)
      if (b[i]) t = t ^ ((2*M-1)'(a) << i);
    for (int i = 2*M - 2; i >= M; i--)
      if (t[i]) begin
        t[i]       = 1'b0;
        t[i-M+7]   = t[i-M+7] ^ 1'b1;
        t[i-M+4]   = t[i-M+4] ^ 1'b1;
        t[i-M+2]   = t[i-M+2] ^ 1'b1;
        t[i-M]     = t[i-M]   ^ 1'b1;
      end
    return t[M-1:0];
  endfunction

  function automatic logic [M-1:0] rand_elem();
    logic [95:0] r;
    r = {$urandom, $urandom, $urandom};
    return r[M-1:0];
  endfunction

endpackage
