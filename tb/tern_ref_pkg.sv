// tern_ref_pkg: reference three-valued (Kleene) logic for the testbenches,
// written on symbolic values 0, 1, X rather than on the two-bit codes, so
// that it is independent of the way the RTL computes.
package tern_ref_pkg;

  typedef enum int {V0 = 0, V1 = 1, VX = 2} tv_e;

  function automatic tv_e r_not(tv_e a);
    return (a == V0) ? V1 : (a == V1) ? V0 : VX;
  endfunction
  function automatic tv_e r_and(tv_e a, tv_e b);
    if (a == V0 || b == V0) return V0;
    if (a == V1 && b == V1) return V1;
    return VX;
  endfunction
  function automatic tv_e r_or(tv_e a, tv_e b);
    if (a == V1 || b == V1) return V1;
    if (a == V0 && b == V0) return V0;
    return VX;
  endfunction
  function automatic tv_e r_xor(tv_e a, tv_e b);
    if (a == VX || b == VX) return VX;
    return (a != b) ? V1 : V0;
  endfunction

  // Function codes 1..7: and, or, xor, imp, nand, nor, xnor.
  function automatic tv_e r_func(int f, tv_e a, tv_e b);
    case (f)
      1: return r_and(a, b);
      2: return r_or(a, b);
      3: return r_xor(a, b);
      4: return r_or(r_not(a), b);
      5: return r_not(r_and(a, b));
      6: return r_not(r_or(a, b));
      7: return r_not(r_xor(a, b));
      default: return VX;
    endcase
  endfunction

  // Two-bit code of a value: 0 -> 00, 1 -> 11, X -> 01.
  function automatic logic [1:0] code(tv_e v);
    return (v == V0) ? 2'b00 : (v == V1) ? 2'b11 : 2'b01;
  endfunction
  function automatic tv_e val(logic [1:0] c);
    return (c == 2'b00) ? V0 : (c == 2'b11) ? V1 : VX;
  endfunction
  function automatic tv_e rand_tv();
    return tv_e'($urandom_range(2));
  endfunction

endpackage
