// Workload testbench: one complete scalar multiplication with a full-length
// random key for each remaining field size of the processor's evaluation:
// GF(p) with the 160-bit prime 2^160-2^31-1 and the 256-bit prime
// 2^256-2^224+2^192+2^96-1, and GF(2^283) with x^283+x^12+x^7+x^5+1 (the
// 521-, 409- and 163-bit sizes are run by the other processor testbenches).
// Curve coefficient a and base point are random (b is implied and never
// used by the processor). Results are compared with the reference model and
// the cycle counts reported.
module tb_dfecc_workloads;
  import tb_ecc_ref_pkg::*;

  dfecc_tb_harness h ();

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask
  initial begin
    repeat (10000000) @(posedge h.clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic ecsm(input logic fld, input fe_t p, input int m, input string name);
    fe_t a, x, y, k, ex, ey, rx, ry;
    longint cyc;
    logic [31:0] st;
    a = rand_elem(fld, p, m); x = rand_elem(fld, p, m); y = rand_elem(fld, p, m);
    k = rand_elem(fld, p, m);
    k[m-1] = 1'b1;
    smul(k, x, y, a, fld, p, m, ex, ey);
    h.setup_field(fld, p, m);
    h.write_key(k);
    h.write_elem(0, a); h.write_elem(1, x); h.write_elem(2, y);
    h.run(32'h1, cyc, st);
    h.read_elem(3, rx); h.read_elem(4, ry);
    check(st[1] && !st[2], $sformatf("%s status", name));
    check(rx == ex && ry == ey, $sformatf("%s result", name));
    $display("%s: %0d-bit key, %0d cycles", name, m, cyc);
  endtask

  initial begin
    h.reset();
    ecsm(1'b0, (fe_t'(1) << 160) - (fe_t'(1) << 31) - 1, 160, "GF(p160)");
    ecsm(1'b0, (fe_t'(1) << 256) - (fe_t'(1) << 224) + (fe_t'(1) << 192) + (fe_t'(1) << 96) - 1,
         256, "GF(p256)");
    ecsm(1'b1, (fe_t'(1) << 283) | (fe_t'(1) << 12) | (fe_t'(1) << 7) | (fe_t'(1) << 5) | 1,
         283, "GF(2^283)");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
