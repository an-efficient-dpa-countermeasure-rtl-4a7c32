// Self-checking testbench for ecc_microcode. Interprets every routine of the
// table with an independent field model in a random domain 2^lambda
// (RMM(x,y) = x*y*2^-lambda, RMD(x,y) = x/y*2^lambda) and compares the
// converted-back results with textbook affine point doubling and addition
// (tb_ecc_ref_pkg) over GF(2^127-1) and GF(2^163), for both choices of the
// destination point, and checks the pre-/post-process conversions.
module tb_ecc_microcode;
  import dfecc_pkg::*;
  import tb_ecc_ref_pkg::*;

  routine_e   rt;
  logic [3:0] step;
  uop_t       uop;
  logic       last;
  ecc_microcode dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask
  initial begin
    #100000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  fe_t sl [9];
  logic fld; fe_t p; int m; fe_t e, einv;

  function automatic int res(slot_e s, bit d);
    case (s)
      SL_DX: return d ? 5 : 3;
      SL_DY: return d ? 6 : 4;
      SL_OX: return d ? 3 : 5;
      SL_OY: return d ? 4 : 6;
      default: return int'(s);
    endcase
  endfunction

  function automatic fe_t rd(slot_e s, bit d);
    if (s == SL_ZERO) return '0;
    if (s == SL_ONE)  return 1;
    return sl[res(s, d)];
  endfunction

  task automatic exec(input routine_e r, input bit d);
    fe_t x, y, z;
    int n = 0;
    rt = r;
    for (int k = 0; k < 16; k++) begin
      step = 4'(k); #1;
      x = rd(uop.src1, d); y = rd(uop.src2, d);
      case (uop.fs)
        FS_ADD: z = addm(x, y, fld, p);
        FS_SUB: z = subm(x, y, fld, p);
        FS_MUL: z = mulm(mulm(x, y, fld, p, m), einv, fld, p, m);
        default: z = mulm(mulm(x, inv(y, fld, p), fld, p, m), e, fld, p, m);
      endcase
      sl[res(uop.dst, d)] = z;
      n++;
      if (last) break;
    end
    check(last, "routine terminates");
  endtask

  function automatic fe_t to_d(fe_t v);   return mulm(v, e, fld, p, m);    endfunction
  function automatic fe_t from_d(fe_t v); return mulm(v, einv, fld, p, m); endfunction

  initial begin
    fe_t a, x1, y1, x2, y2, rx, ry;
    for (int f = 0; f < 2; f++) begin
      fld = 1'(f);
      m   = f ? 163 : 127;
      p   = f ? ((fe_t'(1) << 163) | (fe_t'(1) << 7) | (fe_t'(1) << 6) | (fe_t'(1) << 3) | 1)
              : ((fe_t'(1) << 127) - 1);
      for (int t = 0; t < 4; t++) begin
        e    = pow2(1 + $urandom % (m - 1), fld, p, m);
        einv = inv(e, fld, p);
        a  = rand_elem(fld, p, m);
        x1 = rand_elem(fld, p, m); y1 = rand_elem(fld, p, m);
        x2 = rand_elem(fld, p, m); y2 = rand_elem(fld, p, m);
        // pre-process: integer-domain inputs in a, Q0
        sl[0] = a; sl[1] = x1; sl[2] = y1;
        exec(RT_PRE, 0);
        check(sl[0] == to_d(a) && sl[1] == to_d(x1) && sl[2] == to_d(y1), "pre: conversion");
        check(sl[3] == sl[1] && sl[4] == sl[2] && sl[5] == sl[1] && sl[6] == sl[2], "pre: copies");
        for (int d = 0; d < 2; d++) begin
          // doubling of D
          sl[3] = to_d(x1); sl[4] = to_d(y1); sl[5] = to_d(x2); sl[6] = to_d(y2);
          exec(f ? RT_PD_B : RT_PD_P, 1'(d));
          rx = d ? x2 : x1; ry = d ? y2 : y1;
          pdbl(rx, ry, a, fld, p, m);
          check(from_d(sl[d ? 5 : 3]) == rx && from_d(sl[d ? 6 : 4]) == ry, $sformatf("PD f=%0d d=%0d", f, d));
          check(sl[d ? 3 : 5] == to_d(d ? x1 : x2), "PD leaves O alone");
          // addition into D
          sl[3] = to_d(x1); sl[4] = to_d(y1); sl[5] = to_d(x2); sl[6] = to_d(y2);
          exec(f ? RT_PA_B : RT_PA_P, 1'(d));
          rx = x1; ry = y1;
          padd(rx, ry, x2, y2, a, fld, p, m);
          check(from_d(sl[d ? 5 : 3]) == rx && from_d(sl[d ? 6 : 4]) == ry, $sformatf("PA f=%0d d=%0d", f, d));
          check(sl[d ? 3 : 5] == to_d(d ? x1 : x2), "PA leaves O alone");
        end
        // post-process
        sl[3] = to_d(x1); sl[4] = to_d(y1);
        exec(RT_POST, 0);
        check(sl[3] == x1 && sl[4] == y1, "post: conversion");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
