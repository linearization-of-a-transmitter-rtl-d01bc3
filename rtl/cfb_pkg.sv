// cfb_pkg: constants and helper functions shared by the Cartesian-feedback
// digital part (CORDIC vectoring, angle normalisation, CORDIC rotation).
//
// Angles are signed fixed-point radians. A table of atan(2^-i), of pi and of
// the CORDIC gain-compensation factor K(n) = prod_{i<n} cos(atan(2^-i)) is
// kept at 20 fraction bits (atan) and 16 fraction bits (K) and rounded to the
// precision a module asks for:
//   ATAN_Q20[i] = round(atan(2^-i) * 2^20)
//   PI_Q20      = round(pi * 2^20)
//   KGAIN_Q16[n-1] = round(K(n) * 2^16)
// The elementary angles and the gain factor follow the CORDIC equations of the
// design (pseudo-rotations by +/-2^-i, angle accumulator updated by
// atan(2^-i)); the number formats are this design's own choice.
package cfb_pkg;

  localparam int unsigned TAB_N    = 20;
  localparam int unsigned TAB_FRAC = 20;

  localparam int ATAN_Q20 [TAB_N] = '{
    823550, 486170, 256879, 130396, 65451, 32757, 16383, 8192, 4096, 2048,
    1024, 512, 256, 128, 64, 32, 16, 8, 4, 2
  };

  localparam longint PI_Q20 = 64'sd3294199;

  localparam int KGAIN_Q16 [TAB_N] = '{
    46341, 41449, 40211, 39901, 39823, 39803, 39799, 39797, 39797, 39797,
    39797, 39797, 39797, 39797, 39797, 39797, 39797, 39797, 39797, 39797
  };

  // Round a Q20 constant to 'frac' fraction bits (frac <= 20).
  function automatic longint round_q20(longint v, int unsigned frac);
    if (frac >= TAB_FRAC) return v;
    return (v + (64'sd1 <<< (TAB_FRAC - frac - 1))) >>> (TAB_FRAC - frac);
  endfunction

  // atan(2^-i) in radians with 'frac' fraction bits; 0 beyond the table.
  function automatic longint atan_q(int unsigned i, int unsigned frac);
    if (i >= TAB_N) return 64'sd0;
    return round_q20(longint'(ATAN_Q20[i]), frac);
  endfunction

  function automatic longint pi_q(int unsigned frac);
    return round_q20(PI_Q20, frac);
  endfunction

  // pi/2 and 2*pi are derived from the same Q20 value so that the three
  // constants stay consistent after rounding.
  function automatic longint half_pi_q(int unsigned frac);
    return round_q20(PI_Q20 >>> 1, frac);
  endfunction

  function automatic longint two_pi_q(int unsigned frac);
    return round_q20(PI_Q20 <<< 1, frac);
  endfunction

  // CORDIC gain-compensation factor for 'iter' iterations, unsigned Q16.
  function automatic int unsigned kgain_q16(int unsigned iter);
    if (iter == 0) return 32'd65536;
    if (iter > TAB_N) return 32'(KGAIN_Q16[TAB_N-1]);
    return 32'(KGAIN_Q16[iter-1]);
  endfunction

  // Cycles through a CORDIC core: one pre-rotation register, then a register
  // after every REG_EVERY iterations and always after the last one.
  function automatic int unsigned cordic_core_latency(int unsigned iter,
                                                      int unsigned reg_every);
    return 1 + (iter + reg_every - 1) / reg_every;
  endfunction

  // Stage i of a CORDIC core ends in a register.
  function automatic bit cordic_stage_registered(int unsigned i, int unsigned iter,
                                                 int unsigned reg_every);
    return (((i + 1) % reg_every) == 0) || (i == iter - 1);
  endfunction

endpackage
