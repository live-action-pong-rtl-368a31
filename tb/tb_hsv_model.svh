// Behavioural RGB -> HSV model shared by the keying testbenches: V = max,
// S = 255 * delta / max, H on a 0..255 circle with sectors at 0/85/170.
`ifndef TB_HSV_MODEL_SVH
`define TB_HSV_MODEL_SVH
function automatic logic [23:0] model(input int rr, input int gg, input int bb);
  int mx, mn, dl, num, q, add, hh, ss;
  bit neg;
  mx = (rr > gg) ? rr : gg; mx = (bb > mx) ? bb : mx;
  mn = (rr < gg) ? rr : gg; mn = (bb < mn) ? bb : mn;
  dl = mx - mn;
  ss = (255 * dl) / ((mx == 0) ? 1 : mx);
  if (rr == mx)      begin num = gg - bb; add = 0;   end
  else if (gg == mx) begin num = bb - rr; add = 85;  end
  else               begin num = rr - gg; add = 170; end
  neg = num < 0;
  if (neg) num = -num;
  q = (num * 255) / ((dl == 0) ? 6 : 6 * dl);
  if (neg && q > add) hh = 255 - (q - add);
  else if (neg)       hh = add - q;
  else                hh = add + q;
  return {8'(hh), 8'(ss), 8'(mx)};
endfunction
`endif
