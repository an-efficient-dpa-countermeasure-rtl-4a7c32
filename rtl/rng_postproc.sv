// Digital part of the 1-bit random number generator.
//
// The XOR of two free-running ring oscillators (a Fibonacci and a Galois
// ring oscillator, outside this module) is sampled on the rising edge of the
// system clock, whose frequency is lower than the oscillators'. The sampled
// bit is whitened by a synchronous feedback postprocessor: it is XORed with
// the feedback of a 19-stage LFSR with characteristic polynomial
// x^19 + x^18 + x^17 + x^14 + 1, and the XOR result is both the random output
// bit and the bit shifted into the LFSR. One random bit per clock cycle.
//
// The polynomial and the sampling by the clock follow the published circuit.
// The Fibonacci arrangement of the LFSR taps, the single sampling flip-flop
// and the reset to zero are this design's choices. ro_in is asynchronous to
// clk; a silicon implementation would accept the occasional metastable sample
// as extra entropy, exactly as the sampling flip-flop is meant to do.
//
// Timing: rnd_bit is registered; it changes on every rising edge of clk.
module rng_postproc (
  input  logic clk,
  input  logic rst_n,
  input  logic ro_in,     // XOR of the ring oscillators
  output logic rnd_bit
);

  logic        sample_q;
  logic [18:0] lfsr_q;    // lfsr_q[0] holds the newest bit
  logic        fb, mix;

  assign fb  = lfsr_q[18] ^ lfsr_q[17] ^ lfsr_q[16] ^ lfsr_q[13];
  assign mix = sample_q ^ fb;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sample_q <= 1'b0;
      lfsr_q   <= '0;
      rnd_bit  <= 1'b0;
    end else begin
      sample_q <= ro_in;
      lfsr_q   <= {lfsr_q[17:0], mix};
      rnd_bit  <= mix;
    end
  end

endmodule
