// Behavioural model of the entropy source: a Fibonacci and a Galois ring
// oscillator whose outputs are XORed. Not synthesizable. Each oscillator is
// modelled as a square wave whose half period is a nominal value plus random
// cycle-to-cycle jitter, which is the property the random number generator
// relies on. f1 is the XOR of the two waves.
module ro_pair_model #(
  parameter int unsigned HALF_A = 3,   // nominal half period of oscillator A, time units
  parameter int unsigned HALF_B = 4,   // nominal half period of oscillator B, time units
  parameter int unsigned JITTER = 3     // jitter range per half period, time units
) (
  output logic f1
);

  logic osc_a = 1'b0;
  logic osc_b = 1'b0;

  always begin
    #(HALF_A + ($urandom % JITTER));
    osc_a = ~osc_a;
  end
  always begin
    #(HALF_B + ($urandom % JITTER));
    osc_b = ~osc_b;
  end

  assign f1 = osc_a ^ osc_b;
endmodule
