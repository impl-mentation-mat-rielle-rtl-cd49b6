// Reference arithmetic for the event-driven network testbenches, written
// independently of the RTL: the charging curve, its inverse and the weight
// rule in the same 13-bit codes, plus one synapse update.
package tb_ed_ref_pkg;
  function automatic real kconst();
    return -$ln(1.0 - 1.0 * 0.1447 / 6.918);
  endfunction
  function automatic int ref_pot(int left);
    real x;
    x = (8191.0 - left) / 8191.0;
    return int'($floor((1.0 - $exp(-kconst() * x)) / (1.0 - $exp(-kconst())) * 8191.0 + 0.5));
  endfunction
  function automatic int ref_left(int p);
    real x;
    x = -$ln(1.0 - (p / 8191.0) * (1.0 - $exp(-kconst()))) / kconst();
    return int'($floor((1.0 - x) * 8191.0 + 0.5));
  endfunction
  function automatic int ref_w(int d);
    real w;
    w = 0.0325 * (1.0 - 1.0 / (1.0 + $exp(-(100.0 * d / 255.0 - 6.0))));
    return int'($floor(w * 8191.0 + 0.5));
  endfunction
  // New firing time of a neuron at firing time ft, pixel px, hit at time now
  // by a neuron of pixel prepx (or reset if same).
  function automatic int ref_update(int ft, int px, int prepx, bit same, int now);
    int left, p, d;
    left = (ft - now) & 8191;
    p = ref_pot(left);
    if (same) p = (p >= 8191) ? p - 8191 : 0;
    else begin
      d = (px > prepx) ? px - prepx : prepx - px;
      p = p + ref_w(d);
      if (p >= 8191) p = 8191;
    end
    return (ref_left(p) + now) & 8191;
  endfunction
endpackage
