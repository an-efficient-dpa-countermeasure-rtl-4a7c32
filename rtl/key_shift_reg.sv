// Key shift register: holds the private scalar K of the scalar
// multiplication and presents its bits most significant first.
//
// The host writes K in 32-bit words (word 0 = bits 31:0). The controller
// reads the current bit on kbit, which is K[m-1] of the shifted value, and
// advances to the next lower bit with shift (a left shift by one). After a
// scalar multiplication the key has been shifted out, so the host writes it
// again before the next one. Only the name of this register is published;
// width N (the maximum key length), word access and the shift direction are
// this design's choices.
module key_shift_reg #(
  parameter  int unsigned N  = 521,
  localparam int unsigned MW = $clog2(N + 1),
  localparam int unsigned KW = (N + 31) / 32
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [MW-1:0] m,
  input  logic          wr_en,
  input  logic [4:0]    wr_idx,
  input  logic [31:0]   wr_data,
  input  logic          shift,
  output logic          kbit
);

  logic [KW*32-1:0] key_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) key_q <= '0;
    else if (wr_en && int'(wr_idx) < KW) key_q[wr_idx*32 +: 32] <= wr_data;
    else if (shift) key_q <= key_q << 1;
  end

  assign kbit = (m != '0) ? key_q[m - 1'b1] : 1'b0;

endmodule
