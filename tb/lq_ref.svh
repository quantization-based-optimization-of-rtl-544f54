// Reference arithmetic shared by the layer and system testbenches. These
// functions restate the intended behaviour independently of the RTL:
// Q16.16 values held in 64-bit integers, nearest-level search by brute force.

function automatic int ref_quant(int acc, int bias, int scale, int shift, int v1, int v2);
  longint y, r, best, d, lv;
  int code;
  y = (longint'(acc + bias) * longint'(scale)) >>> 16;
  y = longint'(int'(y));               // keep 32 bits, as the hardware word does
  y = longint'(int'(y + longint'(shift)));
  r = (y < 0) ? 0 : y;
  code = 0;
  best = r;
  for (int k = 1; k < 4; k++) begin
    lv = ((k & 2) ? longint'(v1) : 0) + ((k & 1) ? longint'(v2) : 0);
    d = r - lv;
    if (d < 0) d = -d;
    if (d < best) begin best = d; code = k; end
  end
  return code;
endfunction

// value of a 2-bit activation code: bit 1 weighs v1, bit 0 weighs v2, 0 bits add nothing
function automatic longint ref_aval(int code, int v1, int v2);
  return ((code & 2) ? longint'(v1) : 0) + ((code & 1) ? longint'(v2) : 0);
endfunction

// value of a 2-bit weight code: each bit selects +basis or -basis
function automatic longint ref_wval(int code, int c, int d);
  return ((code & 2) ? longint'(c) : -longint'(c)) + ((code & 1) ? longint'(d) : -longint'(d));
endfunction

function automatic int ref_fixmul(longint a, longint b);
  return int'((a * b) >>> 16);
endfunction
