// tb_cnn_ref_pkg: reference model used by the testbenches.
//
// It restates the time code independently of the RTL: the high slots of each
// weight pattern are listed slot by slot (slots numbered 1..15, as in the
// timing diagram of the weight code), an input of magnitude m is high in
// slots 1..m, and a product is the number of slots where both are high. On
// top of that it models a whole cell update y = f(sum of signed products)
// with the saturating-linear or hard-limiting transfer function. Call
// ref_init once at time 0 before using it.
package tb_cnn_ref_pkg;
  import cnn_pkg::*;

  // slots (1..15) in which a weight of magnitude k/15 is high
  function automatic void ref_slots(input int k, output int s[$]);
    case (k)
      0:  s = {};
      1:  s = {8};
      2:  s = {4, 12};
      3:  s = {3, 8, 13};
      4:  s = {2, 6, 10, 14};
      5:  s = {2, 5, 8, 11, 14};
      6:  s = {2, 4, 7, 9, 12, 14};
      7:  s = {2, 4, 6, 8, 10, 12, 14};
      8:  s = {1, 3, 5, 7, 9, 11, 13, 15};
      9:  s = {1, 3, 5, 6, 8, 10, 11, 13, 15};
      10: s = {1, 3, 4, 6, 7, 9, 10, 12, 13, 15};
      11: s = {1, 3, 4, 5, 7, 8, 9, 11, 12, 13, 15};
      12: s = {1, 2, 4, 5, 6, 7, 9, 10, 11, 12, 14, 15};
      13: s = {1, 2, 3, 5, 6, 7, 8, 9, 10, 11, 13, 14, 15};
      14: s = {1, 2, 3, 4, 5, 6, 7, 9, 10, 11, 12, 13, 14, 15};
      default: s = {1, 2, 3, 4, 5, 6, 7, 8, 9, 10, 11, 12, 13, 14, 15};
    endcase
  endfunction

  // the slot lists as 15-bit masks (bit t = slot t+1); ref_init fills them
  bit [14:0] ref_wmask [16];

  function automatic void ref_init();
    for (int k = 0; k < 16; k++) begin
      int s[$];
      ref_slots(k, s);
      ref_wmask[k] = '0;
      foreach (s[i]) ref_wmask[k][s[i] - 1] = 1'b1;
    end
  endfunction

  // weight bit in slot t (t = 0..14 is slot t+1)
  function automatic bit ref_wbit(input int k, input int t);
    return ref_wmask[k][t];
  endfunction

  // input interval bit in slot t
  function automatic bit ref_xbit(input int m, input int t);
    return t < m;
  endfunction

  // |x*w| in units of 1/15 as the AND code computes it
  function automatic int ref_prod(input int xm, input int wm);
    int n = 0;
    for (int t = 0; t < 15; t++) if (ref_xbit(xm, t) && ref_wbit(wm, t)) n++;
    return n;
  endfunction

  function automatic int ref_term(input cnn_val_t x, input cnn_val_t w);
    int p = ref_prod(int'(x.mag), int'(w.mag));
    return (x.sign != w.sign) ? -p : p;
  endfunction

  function automatic cnn_val_t ref_f(input int net, input bit hardlim);
    cnn_val_t y;
    y.sign = net < 0;
    if (hardlim)        y.mag = 4'd15;
    else if (net > 15)  y.mag = 4'd15;
    else if (net < -15) y.mag = 4'd15;
    else                y.mag = 4'(net < 0 ? -net : net);
    return y;
  endfunction

  function automatic cnn_val_t rand_val();
    cnn_val_t v;
    v.sign = 1'($urandom);
    v.mag  = 4'($urandom);
    return v;
  endfunction

endpackage
