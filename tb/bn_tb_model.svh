// Reference arithmetic shared by the accelerator testbenches: log-space
// addition computed with real numbers, and stride / wrap / offset / size
// of each factor computed directly from the variable table.
function automatic int ref_g(input int d);
  real r;
  r = 4.0 * $ln(1.0 + $pow(2.0, -d / 4.0)) / $ln(2.0);
  return $rtoi(r + 0.5);
endfunction

function automatic int ref_logadd(input int a, input int b);
  int mn, d;
  mn = (a < b) ? a : b;
  d  = (a < b) ? b - a : a - b;
  return mn - ref_g(d);
endfunction

function automatic bit ref_member(input bn_pkg::var_cfg_t v, input int f);
  return (f == 0) ? v.in_a : (f == 1) ? v.in_b : v.in_o;
endfunction

function automatic int ref_card(input bn_pkg::var_cfg_t v);
  return (v.card == 0) ? 256 : int'(v.card);
endfunction

function automatic int ref_stride(input bn_pkg::var_cfg_t c [bn_pkg::NV], input int f, input int v);
  int s;
  if (!ref_member(c[v], f)) return 0;
  s = 1;
  for (int j = 0; j < v; j++) if (ref_member(c[j], f)) s *= ref_card(c[j]);
  return s;
endfunction

function automatic int ref_size(input bn_pkg::var_cfg_t c [bn_pkg::NV], input int f);
  int s;
  s = 1;
  for (int j = 0; j < bn_pkg::NV; j++) if (ref_member(c[j], f)) s *= ref_card(c[j]);
  return s;
endfunction

function automatic int ref_offset(input bn_pkg::var_cfg_t c [bn_pkg::NV], input int f);
  int s;
  s = 0;
  for (int j = 0; j < bn_pkg::NV; j++)
    if (c[j].pinned) s += ref_stride(c, f, j) * int'(c[j].pin_val);
  return s;
endfunction

// A random table: up to six small variables spread over the three
// factors, with the rest of the rows unused (cardinality 1).
function automatic void ref_random_cfg(output bn_pkg::var_cfg_t c [bn_pkg::NV], input bit allow_pin);
  for (int v = 0; v < bn_pkg::NV; v++) begin
    c[v] = '0;
    c[v].card = 8'd1;
  end
  for (int k = 0; k < 6; k++) begin
    int v;
    v = $urandom_range(bn_pkg::NV - 1);
    c[v].card   = 8'($urandom_range(4, 2));
    c[v].in_a   = $urandom_range(1);
    c[v].in_b   = $urandom_range(1);
    c[v].in_o   = $urandom_range(1);
    c[v].elim   = $urandom_range(1);
    c[v].pinned = allow_pin && ($urandom_range(3) == 0);
    c[v].pin_val = 8'($urandom_range(int'(c[v].card) - 1));
  end
endfunction
