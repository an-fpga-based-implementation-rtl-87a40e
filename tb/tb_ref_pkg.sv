// tb_ref_pkg: floating-point reference models shared by the testbenches.
//
// The expected values are computed from first principles with real
// arithmetic, independently of the tables inside the design:
//   - rc(t): raised-cosine impulse response, roll-off 0.5, t in symbols;
//   - shaped(bits, k): the pulse-shaping filter output for a 5-bit history
//     (bit 0 newest) and sample phase k, 65 taps, 16 samples per symbol,
//     scaled so that 1.0 = 64;
//   - sin_ref(i): 127 * sin(2*pi*i/1024).
package tb_ref_pkg;
  localparam real PI   = 3.14159265358979323846;
  localparam real BETA = 0.5;

  function automatic real rc(input real t);
    real d, s, x;
    d = 1.0 - (2.0 * BETA * t) ** 2;
    if (t == 0.0) s = 1.0;
    else          s = $sin(PI * t) / (PI * t);
    if (d < 1e-12 && d > -1e-12) begin
      x = 1.0 / (2.0 * BETA);
      return PI / 4.0 * $sin(PI * x) / (PI * x);
    end
    return s * $cos(PI * BETA * t) / d;
  endfunction

  function automatic real shaped(input logic [4:0] bits, input int k);
    real acc = 0.0;
    for (int j = 0; j < 5; j++) begin
      int n = 16 * j + k;
      if (n <= 64) acc += (bits[j] ? 1.0 : -1.0) * rc(real'(n - 32) / 16.0);
    end
    return acc * 64.0;
  endfunction

  function automatic real sin_ref(input int i);
    return 127.0 * $sin(2.0 * PI * real'(i) / 1024.0);
  endfunction

  function automatic real abs_r(input real v);
    return (v < 0.0) ? -v : v;
  endfunction
endpackage
