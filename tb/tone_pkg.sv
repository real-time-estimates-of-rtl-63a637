// tone_pkg: test-signal helpers shared by the testbenches.
//
// tone_code() returns the 8-bit offset-binary ADC code of sample n of the tone
// A*cos(2*pi*f*n/Fs + phase) with the ADC's mid-scale at code 127, plus an
// optional uniformly distributed noise of +-noise LSB, clipped to 0..255.
// The conversions turn 32-bit binary angles into degrees and back.
package tone_pkg;
  localparam real PI = 3.14159265358979323846;

  function automatic logic [7:0] tone_code(input longint n, input real amp, input real f_over_fs,
                                           input real phase_deg, input int noise);
    real    x;
    int     c;
    x = 127.0 + amp * $cos(2.0 * PI * f_over_fs * real'(n) + phase_deg * PI / 180.0);
    c = int'($floor(x + 0.5));
    if (noise > 0) c = c + int'($urandom_range(2 * noise)) - noise;
    if (c < 0) c = 0;
    if (c > 255) c = 255;
    return 8'(c);
  endfunction

  function automatic real bam_to_deg(input logic [31:0] a);
    return real'(a) * 360.0 / 4294967296.0;
  endfunction

  // signed difference of two binary angles in degrees, in (-180, 180]
  function automatic real bam_diff_deg(input logic [31:0] a, input logic [31:0] b);
    logic [31:0] d;
    d = a - b;
    return real'($signed(d)) * 360.0 / 4294967296.0;
  endfunction

  function automatic logic [31:0] deg_to_bam(input real deg);
    real t;
    t = deg / 360.0;
    t = t - $floor(t);
    return 32'(longint'(t * 4294967296.0));
  endfunction

  function automatic real wrap_deg(input real d);
    real r;
    r = d - 360.0 * $floor(d / 360.0);
    if (r > 180.0) r = r - 360.0;
    return r;
  endfunction
endpackage
