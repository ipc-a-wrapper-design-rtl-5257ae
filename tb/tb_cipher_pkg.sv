// tb_cipher_pkg: reference functions for the DES IP stand-in.
//
// The testbenches do not model real DES; they need only a keyed, invertible
// 64-bit transform so that an encryption followed by a decryption with the
// same key can be checked end to end.  toy_encrypt/toy_decrypt are that
// transform: XOR with the key, rotate left 13, XOR with the key's halves
// swapped; decryption undoes the steps in reverse order.
package tb_cipher_pkg;

  function automatic logic [63:0] swap_halves(input logic [63:0] k);
    return {k[31:0], k[63:32]};
  endfunction

  function automatic logic [63:0] toy_encrypt(input logic [63:0] key,
                                              input logic [63:0] p);
    logic [63:0] x = p ^ key;
    x = {x[50:0], x[63:51]};
    return x ^ swap_halves(key);
  endfunction

  function automatic logic [63:0] toy_decrypt(input logic [63:0] key,
                                              input logic [63:0] c);
    logic [63:0] x = c ^ swap_halves(key);
    x = {x[12:0], x[63:13]};
    return x ^ key;
  endfunction

endpackage
