// ddfs_pkg: constants and elaboration-time functions shared by the sine/cosine
// synthesizer built on vector rotation with angle recoding.
//
// The angle theta in [0, pi/4) is held as THETA_W fraction bits b_1..b_N
// (N = THETA_W, b_1 the most significant). Recoding turns it into
//   theta = theta0 + sum_{k=2..N+1} r_k 2^-k,  r_k = 2 b_{k-1} - 1,
//   theta0 = 1/2 - 2^-(N+1)
// so every rotation direction is just one bit of the angle. The first
// ROM_BITS digits are absorbed in a ROM whose entries are the start vector
// K*(cos a, sin a); K cancels the growth of the shift-and-add stages that
// follow it. Stages from k = (p-1)/2 upward are merged into one.
//
// The recoding, theta0 and the merge rule follow the method; the amplitude
// (full scale minus one LSB, times 2^GUARD internally) and the guard bits are
// this design's choices.
package ddfs_pkg;

  localparam real PI = 3.14159265358979323846;

  // First recoded digit index that is merged into the end stage:
  // merging is exact to the LSB for k >= (p-1)/2, p the datapath word length.
  function automatic int unsigned merge_start(int unsigned p);
    return (p + 0) / 2;  // ceil((p-1)/2) == floor(p/2)
  endfunction

  // theta0 = 1/2 - 2^-(N+1): the first half-rotations, all counter-clockwise,
  // gathered into one fixed rotation.
  function automatic real theta0(int unsigned n);
    return 0.5 - 2.0 ** (-real'(n + 1));
  endfunction

  // Rotation angle reached after the digits r_2..r_{rom_bits+1} that the ROM
  // absorbs; addr holds b_1..b_rom_bits, b_1 in its most significant bit.
  function automatic real rom_angle(int unsigned addr, int unsigned rom_bits,
                                    int unsigned n);
    real a;
    a = theta0(n);
    for (int unsigned k = 2; k <= rom_bits + 1; k++) begin
      if (((addr >> (rom_bits - k + 1)) & 1) != 0) a = a + 2.0 ** (-real'(k));
      else                                         a = a - 2.0 ** (-real'(k));
    end
    return a;
  endfunction

  // Scale factor K: the inverse of the gain sqrt(1 + 2^-2k) of every
  // shift-and-add stage k_first..k_last that follows the ROM.
  function automatic real stage_gain_inv(int unsigned k_first, int unsigned k_last);
    real g;
    g = 1.0;
    for (int unsigned k = k_first; k <= k_last; k++)
      g = g / $sqrt(1.0 + 2.0 ** (-2.0 * real'(k)));
    return g;
  endfunction

  function automatic longint round_real(real v);
    return (v >= 0.0) ? longint'($floor(v + 0.5)) : -longint'($floor(-v + 0.5));
  endfunction

  // One ROM word: K*A*cos(a) (sin_not_cos = 0) or K*A*sin(a) (sin_not_cos = 1)
  // with A = (2^(p-1) - 1) * 2^guard, the internal full scale.
  function automatic longint rom_value(int unsigned addr, int unsigned rom_bits,
                                       int unsigned n, int unsigned p,
                                       int unsigned guard, bit sin_not_cos);
    real a, amp, k;
    a   = rom_angle(addr, rom_bits, n);
    amp = real'((longint'(1) << (p - 1)) - 1) * real'(longint'(1) << guard);
    k   = stage_gain_inv(rom_bits + 2, merge_start(p) - 1);
    return round_real(amp * k * (sin_not_cos ? $sin(a) : $cos(a)));
  endfunction

endpackage
