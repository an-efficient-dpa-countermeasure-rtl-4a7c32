// Domain shift register: holds the random value r that fixes the randomized
// Montgomery domain 2^lambda, lambda = HW(r).
//
// r has N bits (the maximum field length n); bits r[N-1:m] are held at zero
// so that lambda never exceeds the current field length m. dflag = r[0] is
// the domain flag r_i used by the current GFAU iteration. Each shift pulse
// rotates r[m-1:0] right by one (r[0] re-enters at position m-1), so after
// the m shifts of one RMM or RMD the register is back at r_0 for the next
// field operation. A refresh pulse shifts the same way but enters the fresh
// random bit instead of r[0]; m refresh cycles give a new r, which the
// controller does before every scalar multiplication.
//
// The recirculating shift register with a refresh multiplexer follows the
// published circuit. Making the ring length follow m (so the same value
// serves every field operation) is this design's own choice.
//
// Interface: shift and refresh act on the rising clock edge (refresh wins);
// value shows the whole register.
module domain_shift_reg #(
  parameter  int unsigned N  = 521,
  localparam int unsigned MW = $clog2(N + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [MW-1:0] m,
  input  logic          shift,
  input  logic          refresh,
  input  logic          rnd_bit,
  output logic          dflag,
  output logic [N-1:0]  value
);

  logic [N-1:0] r_q, r_d;
  logic         in_bit;

  assign in_bit = refresh ? rnd_bit : r_q[0];

  always_comb begin
    for (int j = 0; j < N; j++) begin
      if (j + 1 == int'(m))  r_d[j] = in_bit;
      else if (j + 1 < int'(m)) r_d[j] = r_q[j+1];
      else                   r_d[j] = 1'b0;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                r_q <= '0;
    else if (shift || refresh) r_q <= r_d;
  end

  assign dflag = r_q[0];
  assign value = r_q;

endmodule
