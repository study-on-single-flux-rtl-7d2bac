// recip_lut: lookup table for the Goldschmidt seed x0 ~ 1/d0.
//
// The divisor significand enters as d = 0.1xxx (N fraction bits, the leading
// one included, i.e. the significand 1.xxx halved). The table returns
// x0 = 1.xxx with N-1 fraction bits, the largest such value not above 1/d0:
//   x0 = min( floor(2^(2N-1) / D), 2^N - 1 ) / 2^(N-1),  D = d0 * 2^N,
// so 0 <= 1/d0 - x0 < 2^-(N-1), the seed accuracy p = N - 1 (p = 3 for the
// 4-bit design). The only clipped entry, d0 = 0.5 (x0 would be 2), gives
// 1.111 with error exactly 2^-p, which still converges (d0 * eps = 2^-4).
// Entries with the leading bit of d clear are not valid significands and
// return the clipped maximum. The table is combinational; the user
// registers its output. The published SFQ design only states the seed's accuracy and that
// the table is a semiconductor/superconductor hybrid; the truncating rule
// above is this design's reading of that accuracy bound.
module recip_lut #(
  parameter int unsigned N = 4
) (
  input  logic [N-1:0] d,
  output logic [N-1:0] x0
);
  localparam longint unsigned ENTRIES = longint'(1) << N;

  function automatic logic [ENTRIES*N-1:0] build_rom();
    logic [ENTRIES*N-1:0] rom;
    longint unsigned      q;
    rom = '0;
    for (longint unsigned i = 0; i < ENTRIES; i++) begin
      if (i < (ENTRIES >> 1)) q = ENTRIES - 1;
      else                    q = (longint'(1) << (2 * N - 1)) / i;
      if (q > ENTRIES - 1) q = ENTRIES - 1;
      rom[int'(i)*N +: N] = N'(q);
    end
    return rom;
  endfunction

  localparam logic [ENTRIES*N-1:0] ROM = build_rom();

  assign x0 = ROM[d*N +: N];
endmodule
