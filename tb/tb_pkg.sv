// tb_pkg: stimulus shared by the testbenches and the behavioural models.
// tone_sample(n) is the left-channel PCM value the AC97 codec model sends in
// its n-th frame: two sine tones, 1.5 kHz and 6 kHz, at 48 kHz sampling,
// each of amplitude 8000, rounded to 16 bits. Bins 32 and 128 of a
// 1024-point FFT get the two tones exactly.
package tb_pkg;
  localparam real PI = 3.14159265358979323846;

  function automatic logic signed [15:0] tone_sample(input int n);
    real v;
    v = 8000.0 * $sin(2.0 * PI * 1500.0 * n / 48000.0)
      + 8000.0 * $sin(2.0 * PI * 6000.0 * n / 48000.0);
    return 16'($rtoi(v >= 0.0 ? v + 0.5 : v - 0.5));
  endfunction

  function automatic logic signed [15:0] right_sample(input int n);
    return 16'(n * 7);
  endfunction
endpackage
