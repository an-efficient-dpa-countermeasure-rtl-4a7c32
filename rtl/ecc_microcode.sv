// Field-operation sequences of the DF-ECC controller (combinational table).
//
// Every elliptic-curve step is a fixed list of GFAU operations on
// register-file slots, dst = fs(src1, src2). Because every field element is
// kept in the same randomized domain a*2^lambda, the ordinary affine formulas
// apply unchanged: RMM(a2^l, b2^l) = ab*2^l and RMD(a2^l, b2^l) = (a/b)*2^l.
// D/O name the destination and the other working point, picked by the
// controller from the key bit; TX/TY are temporaries.
//
//   RT_PRE   Q0 = (RMD(x,1), RMD(y,1)) and a = RMD(a,1): into the domain;
//            then Q1 = Q2 = Q0.
//   RT_PD_P  GF(p) doubling:  l = (3x^2+a)/(2y), x' = l^2-2x, y' = l(x-x')-y
//   RT_PA_P  GF(p) addition:  l = (yO-yD)/(xO-xD), x' = l^2-xD-xO,
//            y' = l(xD-x')-yD
//   RT_PD_B  GF(2^m) doubling: l = x+y/x, x' = l^2+l+a, y' = x^2+l*x'+x'
//   RT_PA_B  GF(2^m) addition: l = (yO+yD)/(xO+xD), x' = l^2+l+xD+xO+a,
//            y' = l(xD+x')+x'+yD
//   RT_POST  Q1 = (RMM(x,1), RMM(y,1)): back to the integer domain.
//
// The domain conversions (three RMD, two RMM) follow the published scheme;
// the affine formulas are the textbook ones for y^2 = x^3+ax+b over GF(p)
// and y^2+xy = x^3+ax^2+b over GF(2^m); their ordering into slot operations
// is this design's. Interface: step selects the operation of routine rt;
// last marks the final one.
module ecc_microcode
  import dfecc_pkg::*;
(
  input  routine_e   rt,
  input  logic [3:0] step,
  output uop_t       uop,
  output logic       last
);

  function automatic uop_t u(input funcsel_e fs, input slot_e s1, input slot_e s2, input slot_e d);
    return '{fs: fs, src1: s1, src2: s2, dst: d};
  endfunction

  always_comb begin
    uop  = u(FS_ADD, SL_ZERO, SL_ZERO, SL_NONE);
    last = 1'b0;
    unique case (rt)
      RT_PRE: unique case (step)
        4'd0: uop = u(FS_DIV, SL_Q0X, SL_ONE,  SL_Q0X);
        4'd1: uop = u(FS_DIV, SL_Q0Y, SL_ONE,  SL_Q0Y);
        4'd2: uop = u(FS_DIV, SL_A,   SL_ONE,  SL_A);
        4'd3: uop = u(FS_ADD, SL_Q0X, SL_ZERO, SL_Q1X);
        4'd4: uop = u(FS_ADD, SL_Q0Y, SL_ZERO, SL_Q1Y);
        4'd5: uop = u(FS_ADD, SL_Q0X, SL_ZERO, SL_Q2X);
        default: begin uop = u(FS_ADD, SL_Q0Y, SL_ZERO, SL_Q2Y); last = 1'b1; end
      endcase
      RT_PD_P: unique case (step)
        4'd0:  uop = u(FS_MUL, SL_DX,  SL_DX,  SL_QTX);   // x^2
        4'd1:  uop = u(FS_ADD, SL_QTX, SL_QTX, SL_QTY);   // 2x^2
        4'd2:  uop = u(FS_ADD, SL_QTY, SL_QTX, SL_QTX);   // 3x^2
        4'd3:  uop = u(FS_ADD, SL_QTX, SL_A,   SL_QTX);   // 3x^2 + a
        4'd4:  uop = u(FS_ADD, SL_DY,  SL_DY,  SL_QTY);   // 2y
        4'd5:  uop = u(FS_DIV, SL_QTX, SL_QTY, SL_QTX);   // l
        4'd6:  uop = u(FS_MUL, SL_QTX, SL_QTX, SL_QTY);   // l^2
        4'd7:  uop = u(FS_SUB, SL_QTY, SL_DX,  SL_QTY);
        4'd8:  uop = u(FS_SUB, SL_QTY, SL_DX,  SL_QTY);   // x'
        4'd9:  uop = u(FS_SUB, SL_DX,  SL_QTY, SL_DX);    // x - x'
        4'd10: uop = u(FS_MUL, SL_QTX, SL_DX,  SL_DX);    // l(x - x')
        4'd11: uop = u(FS_SUB, SL_DX,  SL_DY,  SL_DY);    // y'
        default: begin uop = u(FS_ADD, SL_QTY, SL_ZERO, SL_DX); last = 1'b1; end
      endcase
      RT_PA_P: unique case (step)
        4'd0: uop = u(FS_SUB, SL_OY,  SL_DY,  SL_QTX);
        4'd1: uop = u(FS_SUB, SL_OX,  SL_DX,  SL_QTY);
        4'd2: uop = u(FS_DIV, SL_QTX, SL_QTY, SL_QTX);    // l
        4'd3: uop = u(FS_MUL, SL_QTX, SL_QTX, SL_QTY);    // l^2
        4'd4: uop = u(FS_SUB, SL_QTY, SL_DX,  SL_QTY);
        4'd5: uop = u(FS_SUB, SL_QTY, SL_OX,  SL_QTY);    // x'
        4'd6: uop = u(FS_SUB, SL_DX,  SL_QTY, SL_DX);     // xD - x'
        4'd7: uop = u(FS_MUL, SL_QTX, SL_DX,  SL_DX);
        4'd8: uop = u(FS_SUB, SL_DX,  SL_DY,  SL_DY);     // y'
        default: begin uop = u(FS_ADD, SL_QTY, SL_ZERO, SL_DX); last = 1'b1; end
      endcase
      RT_PD_B: unique case (step)
        4'd0: uop = u(FS_DIV, SL_DY,  SL_DX,  SL_QTX);    // y/x
        4'd1: uop = u(FS_ADD, SL_QTX, SL_DX,  SL_QTX);    // l
        4'd2: uop = u(FS_MUL, SL_QTX, SL_QTX, SL_QTY);    // l^2
        4'd3: uop = u(FS_ADD, SL_QTY, SL_QTX, SL_QTY);
        4'd4: uop = u(FS_ADD, SL_QTY, SL_A,   SL_QTY);    // x'
        4'd5: uop = u(FS_MUL, SL_DX,  SL_DX,  SL_DX);     // x^2
        4'd6: uop = u(FS_MUL, SL_QTX, SL_QTY, SL_DY);     // l x'
        4'd7: uop = u(FS_ADD, SL_DY,  SL_DX,  SL_DY);
        4'd8: uop = u(FS_ADD, SL_DY,  SL_QTY, SL_DY);     // y'
        default: begin uop = u(FS_ADD, SL_QTY, SL_ZERO, SL_DX); last = 1'b1; end
      endcase
      RT_PA_B: unique case (step)
        4'd0:  uop = u(FS_ADD, SL_OY,  SL_DY,  SL_QTX);
        4'd1:  uop = u(FS_ADD, SL_OX,  SL_DX,  SL_QTY);
        4'd2:  uop = u(FS_DIV, SL_QTX, SL_QTY, SL_QTX);   // l
        4'd3:  uop = u(FS_MUL, SL_QTX, SL_QTX, SL_QTY);   // l^2
        4'd4:  uop = u(FS_ADD, SL_QTY, SL_QTX, SL_QTY);
        4'd5:  uop = u(FS_ADD, SL_QTY, SL_DX,  SL_QTY);
        4'd6:  uop = u(FS_ADD, SL_QTY, SL_OX,  SL_QTY);
        4'd7:  uop = u(FS_ADD, SL_QTY, SL_A,   SL_QTY);   // x'
        4'd8:  uop = u(FS_ADD, SL_DX,  SL_QTY, SL_DX);    // xD + x'
        4'd9:  uop = u(FS_MUL, SL_QTX, SL_DX,  SL_DX);
        4'd10: uop = u(FS_ADD, SL_DX,  SL_QTY, SL_DX);
        4'd11: uop = u(FS_ADD, SL_DX,  SL_DY,  SL_DY);    // y'
        default: begin uop = u(FS_ADD, SL_QTY, SL_ZERO, SL_DX); last = 1'b1; end
      endcase
      default: unique case (step)  // RT_POST
        4'd0:    uop = u(FS_MUL, SL_Q1X, SL_ONE, SL_Q1X);
        default: begin uop = u(FS_MUL, SL_Q1Y, SL_ONE, SL_Q1Y); last = 1'b1; end
      endcase
    endcase
  end

endmodule
