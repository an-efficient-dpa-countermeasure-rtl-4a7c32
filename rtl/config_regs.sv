// Field configuration registers of the DF-ECC processor: the Prime/Poly
// register (the prime p of GF(p) or the field polynomial of GF(2^m), N bits)
// and the FieldLen register (field length m and the field type).
//
// The host writes them through the bus wrapper: the modulus in 32-bit words
// (word 0 = bits 31:0), FieldLen as one word with m in the low bits and the
// field type in bit 16 (0: GF(p), 1: GF(2^m)). Both registers are named in
// the published block diagram; the word layout and reset values (p = 0,
// m = N, GF(p)) are this design's choices. For GF(2^m) the polynomial,
// including its x^m term, must fit in N bits, so m < N there.
module config_regs #(
  parameter  int unsigned N  = 521,
  localparam int unsigned MW = $clog2(N + 1),
  localparam int unsigned KW = (N + 31) / 32
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          prime_we,
  input  logic [4:0]    prime_idx,
  input  logic          fieldlen_we,
  input  logic [31:0]   wdata,
  output logic [N-1:0]  p,
  output logic [MW-1:0] m,
  output logic          field,
  output logic [31:0]   prime_word,   // read-back of word prime_idx
  output logic [31:0]   fieldlen_word
);

  logic [KW*32-1:0] p_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      p_q   <= '0;
      m     <= MW'(N);
      field <= 1'b0;
    end else begin
      if (prime_we && int'(prime_idx) < KW) p_q[prime_idx*32 +: 32] <= wdata;
      if (fieldlen_we) begin
        m     <= (wdata[MW-1:0] > MW'(N)) ? MW'(N) : wdata[MW-1:0];
        field <= wdata[16];
      end
    end
  end

  assign p             = p_q[N-1:0];
  assign prime_word    = (int'(prime_idx) < KW) ? p_q[prime_idx*32 +: 32] : '0;
  assign fieldlen_word = {15'd0, field, {(16-MW){1'b0}}, m};

endmodule
