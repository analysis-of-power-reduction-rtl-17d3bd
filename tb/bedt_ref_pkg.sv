// bedt_ref_pkg: reference model for the BEDT testbenches.
//
// It does not share code with the design. The coupling cost of sending word
// cur after word prev is summed over all adjacent line pairs with weight 1
// when exactly one line of the pair switches and weight 2 when both switch
// in opposite directions. Each encoder decision is then taken directly from
// the costs of the candidate words:
//   scheme I    odd  if cost(odd) < cost(none)
//   scheme II   odd  if cost(odd) < cost(none) and cost(odd) < cost(full),
//               else full if cost(full) < cost(none), else none
//   scheme III  even if cost(even) is below none, odd and full,
//               else the scheme II rule
// which is what the published count inequalities stand for.
package bedt_ref_pkg;

  localparam int MAXW = 64;

  function automatic logic [MAXW-1:0] odd_mask(int w);
    logic [MAXW-1:0] m;
    m = '0;
    for (int i = 1; i < w; i += 2) m[i] = 1'b1;
    return m;
  endfunction

  function automatic logic [MAXW-1:0] all_mask(int w);
    logic [MAXW-1:0] m;
    m = '0;
    for (int i = 0; i < w; i++) m[i] = 1'b1;
    return m;
  endfunction

  function automatic logic [MAXW-1:0] even_mask(int w);
    return all_mask(w) & ~odd_mask(w);
  endfunction

  // mode codes as {FI,HI}
  function automatic logic [MAXW-1:0] mode_mask(int w, logic [1:0] mode);
    case (mode)
      2'b01:   return odd_mask(w);
      2'b10:   return all_mask(w);
      2'b11:   return even_mask(w);
      default: return '0;
    endcase
  endfunction

  function automatic int cost(int w, logic [MAXW-1:0] prev, logic [MAXW-1:0] cur);
    int c;
    bit sa, sb;
    c = 0;
    for (int i = 0; i + 1 < w; i++) begin
      sa = prev[i] ^ cur[i];
      sb = prev[i+1] ^ cur[i+1];
      if (sa != sb) c += 1;
      else if (sa && sb && (cur[i] != cur[i+1])) c += 2;
    end
    return c;
  endfunction

  function automatic int ones(int w, logic [MAXW-1:0] v);
    int n;
    n = 0;
    for (int i = 0; i < w; i++) n += int'(v[i]);
    return n;
  endfunction

  // Number of lines that switch between two words (self switching).
  function automatic int toggles(int w, logic [MAXW-1:0] a, logic [MAXW-1:0] b);
    return ones(w, a ^ b);
  endfunction

  function automatic logic [1:0] decide(int scheme, int w,
                                        logic [MAXW-1:0] prev,
                                        logic [MAXW-1:0] x);
    int cn, co, cf, ce;
    cn = cost(w, prev, x);
    co = cost(w, prev, x ^ odd_mask(w));
    cf = cost(w, prev, x ^ all_mask(w));
    ce = cost(w, prev, x ^ even_mask(w));
    if (scheme == 1) return (co < cn) ? 2'b01 : 2'b00;
    if (scheme == 3 && ce < cn && ce < co && ce < cf) return 2'b11;
    if (co < cn && co < cf) return 2'b01;
    if (cf < cn) return 2'b10;
    return 2'b00;
  endfunction

endpackage
