// fit_stim_pkg - reproducible detector-hit scenario for the testbenches.
//
// Time base: sample bins of 416.7 ps (8 per 300 MHz cycle) and fine units of
// 13 ps (32 per bin). The 40 MHz reference rises at bin 60*m + REF_OFS and
// stays high for 30 bins. Whether channel `ch` is hit in crossing m, where
// (bin offset 0..36 after the reference edge, sub-bin position 0..31) and
// the fine-TDC error (-15..15 units, under 200 ps) are pure functions of
// (seed, m, ch), so stimulus and expected values agree without shared state.
// A CFD pulse lasts 10 bins. The fine TDC is modelled as counting absolute
// time modulo 256 units from an origin on a reference edge; REF_OFS is a
// multiple of 4 bins so reference edges sit on multiples of 128 units.
package fit_stim_pkg;
  localparam int REF_OFS = 4;
  localparam int CFD_LEN = 10;

  function automatic int unsigned mix(int unsigned a, int unsigned b, int unsigned c);
    int unsigned h;
    h = a * 32'h9E3779B1 ^ (b + 32'h7F4A7C15) * 32'h85EBCA77 ^ (c + 32'h165667B1) * 32'hC2B2AE3D;
    h = h ^ (h >> 15);
    h = h * 32'h2C1B3C6D;
    h = h ^ (h >> 12);
    return h;
  endfunction

  // hit probability in percent; returns -1 when the channel is not hit.
  // prob above 100 selects a varying pattern for the full detector (channel
  // ch < 96 on side A): base probability prob - 100, no A-side hits in
  // crossings m % 8 == 1, no C-side hits in m % 8 == 5, and 90 % in
  // m % 8 == 3 (high-multiplicity crossings).
  function automatic int hit_pos(int seed, int m, int ch, int prob);
    if (m < 3) return -1;
    if (prob > 100) begin
      if (m % 8 == 1 && ch < 96) return -1;
      if (m % 8 == 5 && ch >= 96) return -1;
      prob = (m % 8 == 3) ? 90 : prob - 100;
    end
    if (mix(seed, m, ch) % 100 >= prob) return -1;
    return int'(mix(seed + 1, m, ch) % 37);
  endfunction

  function automatic int hit_sub(int seed, int m, int ch);
    return int'(mix(seed + 2, m, ch) % 32);
  endfunction

  function automatic int hit_err(int seed, int m, int ch);
    return int'(mix(seed + 3, m, ch) % 31) - 15;
  endfunction

  function automatic logic ref_at(int b);
    return (b >= REF_OFS) && (((b - REF_OFS) % 60) < 30);
  endfunction

  function automatic logic cfd_at(int seed, int ch, int b, int prob);
    int m, p;
    if (b < REF_OFS) return 1'b0;
    m = (b - REF_OFS) / 60;
    for (int j = m - 1; j <= m; j++) begin
      p = hit_pos(seed, j, ch, prob);
      if (j >= 0 && p >= 0) begin
        int s;
        s = 60 * j + REF_OFS + p;
        if (b >= s && b < s + CFD_LEN) return 1'b1;
      end
    end
    return 1'b0;
  endfunction

  // 8-bit fine TDC result of the hit of crossing m
  function automatic logic [7:0] fine_value(int seed, int m, int ch);
    int t_abs;
    t_abs = (60 * m + REF_OFS + hit_pos(seed, m, ch, 100)) * 32 + hit_sub(seed, m, ch) + hit_err(seed, m, ch);
    return 8'(t_abs);
  endfunction

  // merged channel time, 13 ps units after the reference edge
  function automatic int merged_time(int seed, int m, int ch);
    return hit_pos(seed, m, ch, 100) * 32 + hit_sub(seed, m, ch) + hit_err(seed, m, ch);
  endfunction

  // ADC codes of the two integrators for the crossing of a hit
  function automatic logic [11:0] adc_code(int seed, int m, int ch, int which);
    return 12'(mix(seed + 4 + which, m, ch) % 4096);
  endfunction

  // the integrator flag of crossing m: the PM toggles it on every reference
  // edge starting from 0, so crossing 0 runs with flag 1
  function automatic logic odd_of(int m);
    return ((m + 1) % 2) != 0;
  endfunction
endpackage
