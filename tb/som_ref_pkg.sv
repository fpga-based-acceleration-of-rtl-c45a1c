// som_ref_pkg: reference model of the SOM kernels for the testbenches.
//
// Works on plain arrays of binary32 words with the double-based arithmetic
// of fp_ref_pkg:
//   ref_dist    Manhattan distance, lane terms |w-x| summed pairwise level
//               by level (an odd last term moves up unchanged)
//   ref_pass    one SOMComp pass: for every input, BMU = first neuron with
//               the smallest distance, then w <- w - (w-x)*NR[max(|dx|,|dy|)]
//   ref_neigred NR[i-1] <- NR[i], last entry 0
package som_ref_pkg;
  import fp_ref_pkg::*;

  typedef logic [31:0] f_t;

  function automatic f_t ref_dist(f_t w[], f_t x[]);
    f_t t[$];
    f_t nt[$];
    foreach (w[i]) t.push_back(ref_abs(ref_sub(w[i], x[i])));
    while (t.size() > 1) begin
      nt = {};
      for (int k = 0; k + 1 < t.size(); k += 2) nt.push_back(ref_add(t[k], t[k+1]));
      if (t.size() % 2 == 1) nt.push_back(t[t.size()-1]);
      t = nt;
    end
    return t[0];
  endfunction

  // New weights of one neuron.
  function automatic void ref_neuron_update(f_t w[], f_t x[], f_t coef, ref f_t w_new[]);
    w_new = new[w.size()];
    foreach (w[i]) w_new[i] = ref_sub(w[i], ref_mul(ref_sub(w[i], x[i]), coef));
  endfunction

  function automatic int ref_nbh(int s, int j, int b);
    int dx, dy;
    dx = (j % s) - (b % s);
    dy = (j / s) - (b / s);
    if (dx < 0) dx = -dx;
    if (dy < 0) dy = -dy;
    return (dx > dy) ? dx : dy;
  endfunction

  // One training pass. map: S*S*D words, inp: N*D words, nr: S words.
  function automatic void ref_pass(int s, int d, int n, ref f_t map[], ref f_t inp[],
                                   ref f_t nr[], ref int bmu[]);
    f_t w[], x[], wn[];
    f_t dd, best;
    int win;
    w = new[d];
    x = new[d];
    bmu = new[n];
    for (int i = 0; i < n; i++) begin
      for (int l = 0; l < d; l++) x[l] = inp[i*d + l];
      win = 0;
      best = 32'd0;
      for (int j = 0; j < s*s; j++) begin
        for (int l = 0; l < d; l++) w[l] = map[j*d + l];
        dd = ref_dist(w, x);
        if (j == 0 || f2r(dd) < f2r(best)) begin
          best = dd;
          win  = j;
        end
      end
      bmu[i] = win;
      for (int j = 0; j < s*s; j++) begin
        for (int l = 0; l < d; l++) w[l] = map[j*d + l];
        ref_neuron_update(w, x, nr[ref_nbh(s, j, win)], wn);
        for (int l = 0; l < d; l++) map[j*d + l] = wn[l];
      end
    end
  endfunction

  function automatic void ref_neigred(ref f_t nr[]);
    for (int i = 1; i < nr.size(); i++) nr[i-1] = nr[i];
    nr[nr.size()-1] = 32'd0;
  endfunction

endpackage
