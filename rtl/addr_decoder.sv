// Address decoder of the DF-ECC bus interface (combinational).
//
// Byte address map (32-bit words, low 16 address bits decoded):
//   0x0000            CTRL      write: instruction, read: status
//   0x0004            FIELDLEN  m in bits 9:0, field type in bit 16
//   0x0100 + 4k       PRIME     word k of the prime / field polynomial
//   0x0200 + 4k       KEY       word k of the private key (write only)
//   0x1000 + 32e + 4s RF        sub-word s (0..4) of register-file word e
// Addresses outside the map, beyond the register sizes, decode to T_NONE.
// The decoder is a named block of the published design; the map is this
// design's own.
module addr_decoder
  import dfecc_pkg::*;
#(
  parameter int unsigned N        = 521,
  parameter int unsigned RF_DEPTH = 36,
  parameter int unsigned RF_WIDTH = 132
) (
  input  logic [15:0] haddr,
  output decode_t     dec
);

  localparam int unsigned KW  = (N + 31) / 32;
  localparam int unsigned NSW = (RF_WIDTH + 31) / 32;

  always_comb begin
    dec        = '0;
    dec.target = T_NONE;
    dec.word   = haddr[6:2];
    dec.entry  = haddr[10:5];
    dec.sub    = haddr[4:2];
    if (haddr == 16'h0000)                                   dec.target = T_CTRL;
    else if (haddr == 16'h0004)                              dec.target = T_FIELDLEN;
    else if (haddr[15:8] == 8'h01 && int'(haddr[7:2]) < KW)  dec.target = T_PRIME;
    else if (haddr[15:8] == 8'h02 && int'(haddr[7:2]) < KW)  dec.target = T_KEY;
    else if (haddr[15:12] == 4'h1 && haddr[11] == 1'b0 &&
             int'(haddr[10:5]) < RF_DEPTH && int'(haddr[4:2]) < NSW)
                                                             dec.target = T_RF;
  end

endmodule
