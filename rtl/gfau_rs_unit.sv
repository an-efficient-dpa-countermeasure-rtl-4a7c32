// Shared modular arithmetic of the GFAU RS datapath (combinational).
//
// One unit serves randomized Montgomery multiplication, randomized Montgomery
// division and plain addition/subtraction in both GF(p) and GF(2^m). With A
// the primary and B the secondary operand it computes
//     T  = A, A + B or A - B            (mod p; XOR in GF(2^m))
//     A' = half ? T/2 : T               (mod p; division by x in GF(2^m))
//     B' = dbl  ? 2B  : B               (mod p; multiplication by x in GF(2^m))
// Every step of Algorithms 2 and 3 has this form once R and S are assigned
// to A and B by the swap logic in the GFAU. The carry-save adders of the
// original arrangement are written here as plain adders; the additions are
// exact, operands are fully reduced (0 <= A, B < p). In GF(2^m) the modulus
// is the field polynomial of degree m, which must be below N, and ptop is
// the one-hot bit x^m.
module gfau_rs_unit
  import dfecc_pkg::*;
#(
  parameter int unsigned N = 521
) (
  input  logic         field,   // 0: GF(p), 1: GF(2^m)
  input  logic [N-1:0] p,       // prime or field polynomial
  input  logic [N-1:0] ptop,    // x^m (GF(2^m) only)
  input  rs_comb_e     comb,
  input  logic         half,
  input  logic         dbl,
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  output logic [N-1:0] a_out,
  output logic [N-1:0] b_out
);

  logic [N:0]   sum, dif, sum_red, dif_cor, t_half, b2;
  logic [N-1:0] t, t_bin, b2_bin;

  always_comb begin
    // GF(p) paths
    sum     = {1'b0, a} + {1'b0, b};
    sum_red = (sum >= {1'b0, p}) ? sum - {1'b0, p} : sum;
    dif     = {1'b0, a} - {1'b0, b};
    dif_cor = dif[N] ? dif + {1'b0, p} : dif;   // borrow: add p back
    // GF(2^m) path
    t_bin   = (comb == RS_NONE) ? a : (a ^ b);

    unique case (comb)
      RS_ADD:  t = field ? t_bin : sum_red[N-1:0];
      RS_SUB:  t = field ? t_bin : dif_cor[N-1:0];
      default: t = a;
    endcase

    // halving: add the (odd) modulus when T is odd, then shift
    if (!t[0])       t_half = {1'b0, t};
    else if (field)  t_half = {1'b0, t ^ p};
    else             t_half = {1'b0, t} + {1'b0, p};
    a_out = half ? t_half[N:1] : t;

    // doubling
    b2     = {b, 1'b0};
    b2_bin = ((b2[N-1:0] & ptop) != '0) ? (b2[N-1:0] ^ p) : b2[N-1:0];
    if (!dbl)        b_out = b;
    else if (field)  b_out = b2_bin;
    else             b_out = (b2 >= {1'b0, p}) ? b2[N-1:0] - p : b2[N-1:0];
  end

endmodule
