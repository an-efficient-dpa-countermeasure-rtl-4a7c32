// Full-size testbench: the DF-ECC processor at its default parameters
// (N = 521) computes one complete scalar multiplication over GF(2^521-1)
// with a random 521-bit key and one over GF(2^409) (x^409+x^87+1) with a
// random 409-bit key, driven through the AHB port. Results are compared with
// the independent reference model; the cycle counts are reported.
module tb_dfecc_full;
  import tb_ecc_ref_pkg::*;

  dfecc_tb_harness h ();

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask
  initial begin
    repeat (20000000) @(posedge h.clk);
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
    ecsm(1'b1, (fe_t'(1) << 409) | (fe_t'(1) << 87) | 1, 409, "GF(2^409)");
    ecsm(1'b0, '1, 521, "GF(2^521-1)");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
