// DPA countermeasure circuit: random-domain generator of the processor.
//
// Combines the RNG postprocessor (sampler plus LFSR whitening of the ring
// oscillator output) with the domain shift register. While refresh is high
// the register takes one new random bit per clock; afterwards the GFAU
// steps through r with shift and reads the domain flag r_i on dflag. The
// ring oscillators themselves are outside: their XORed output enters on
// ro_in. Structure as in the published countermeasure circuit; see the two
// submodules for the choices made here.
module dpa_countermeasure #(
  parameter  int unsigned N  = 521,
  localparam int unsigned MW = $clog2(N + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          ro_in,
  input  logic [MW-1:0] m,
  input  logic          refresh,
  input  logic          shift,
  output logic          dflag,
  output logic [N-1:0]  value
);

  logic rnd_bit;

  rng_postproc u_rng (
    .clk     (clk),
    .rst_n   (rst_n),
    .ro_in   (ro_in),
    .rnd_bit (rnd_bit)
  );

  domain_shift_reg #(.N(N)) u_dsr (
    .clk     (clk),
    .rst_n   (rst_n),
    .m       (m),
    .shift   (shift),
    .refresh (refresh),
    .rnd_bit (rnd_bit),
    .dflag   (dflag),
    .value   (value)
  );

endmodule
