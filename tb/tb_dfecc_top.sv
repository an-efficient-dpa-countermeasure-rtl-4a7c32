// End-to-end testbench of the DF-ECC processor (default parameters, N = 521)
// driven only through its AHB port.
//  1. GF(2^163), x^163+x^7+x^6+x^3+1: random a, point and 163-bit key;
//     the result is compared with an independent double-and-add model. The
//     same scalar multiplication is run again: the result must be the same
//     while the randomized domain (visible in the converted Q0 left in the
//     register file) must differ. A host register-file write issued while
//     busy must be dropped.
//  2. GF(2^127-1) with a key that has leading zero bits.
//  3. FIELD instructions (RMM, RMD, add) checked against the current
//     domain value; an illegal instruction and an all-zero key are rejected.
// Every mechanism (domain refresh, pre-/post-process, additions for key bits
// 0 and 1, doublings, RMD with R/S swap, RMM/RMD with r_i = 0 and 1,
// constant operands, leading-zero skip, dropped host writes) must occur.
module tb_dfecc_top;
  import dfecc_pkg::*;
  import tb_ecc_ref_pkg::*;

  dfecc_tb_harness h ();

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (3000000) @(posedge h.clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic ecsm_test(input logic fld, input fe_t p, input int m, input fe_t k,
                           input bit twice, input string name);
    fe_t a, x, y, rx, ry, ex, ey, q0x_1, q0x_2, lam_pow;
    longint cyc;
    logic [31:0] st;
    a = rand_elem(fld, p, m);
    x = rand_elem(fld, p, m);
    y = rand_elem(fld, p, m);
    smul(k, x, y, a, fld, p, m, ex, ey);
    h.setup_field(fld, p, m);
    for (int rep = 0; rep < (twice ? 2 : 1); rep++) begin
      h.write_key(k);
      h.write_elem(0, a);
      h.write_elem(1, x);
      h.write_elem(2, y);
      h.ahb_write(32'h0000, 32'h1);              // ECSM
      if (rep == 0) begin
        // host write to the register file while busy must be dropped
        repeat (50) @(negedge h.clk);
        h.write_elem(0, fe_t'(12345));
      end
      cyc = 0;
      do begin
        repeat (64) @(negedge h.clk);
        h.ahb_read(32'h0000, st);
      end while (st[0]);
      check(st[1] && !st[2], $sformatf("%s status %h", name, st));
      h.read_elem(3, rx);
      h.read_elem(4, ry);
      check(rx == ex && ry == ey, $sformatf("%s result rep %0d", name, rep));
      // Q0 was left converted: x * 2^lambda with lambda = HW(r)
      h.read_elem(1, q0x_1);
      lam_pow = pow2($countones(h.dut.u_dpa.value), fld, p, m);
      check(q0x_1 == mulm(x, lam_pow, fld, p, m), $sformatf("%s Q0 in randomized domain", name));
      if (rep == 0) q0x_2 = q0x_1;
      else check(q0x_1 != q0x_2, $sformatf("%s domain differs between runs", name));
      $display("%s rep %0d: lambda=%0d", name, rep, $countones(h.dut.u_dpa.value));
    end
  endtask

  fe_t f163, p127, k, x, y, r, lp;
  logic [31:0] st;
  longint cyc;

  initial begin
    f163 = (fe_t'(1) << 163) | (fe_t'(1) << 7) | (fe_t'(1) << 6) | (fe_t'(1) << 3) | 1;
    p127 = (fe_t'(1) << 127) - 1;
    h.reset();

    k = rand_elem(1'b1, f163, 163);
    k[162] = 1'b1;
    ecsm_test(1'b1, f163, 163, k, 1'b1, "GF(2^163)");

    k = rand_elem(1'b0, p127, 127) >> 27;                      // 100-bit key
    k[99] = 1'b1;
    ecsm_test(1'b0, p127, 127, k, 1'b0, "GF(2^127-1)");

    // FIELD instructions in the current domain (Q0x, Q0y hold fresh values)
    x = rand_elem(1'b0, p127, 127);
    y = rand_elem(1'b0, p127, 127);
    h.write_elem(1, x);
    h.write_elem(2, y);
    lp = pow2($countones(h.dut.u_dpa.value), 1'b0, p127, 127);
    h.run({16'h0, 4'd7, 4'd2, 4'd1, 2'(FS_MUL), 2'(OP_FIELD)}, cyc, st);     // QTX = RMM(Q0x,Q0y)
    h.read_elem(7, r);
    check(mulm(r, lp, 1'b0, p127, 127) == mulm(x, y, 1'b0, p127, 127), "FIELD RMM");
    check(cyc < 127 + 200, $sformatf("FIELD RMM cycles %0d", cyc));
    h.run({16'h0, 4'd8, 4'd2, 4'd1, 2'(FS_DIV), 2'(OP_FIELD)}, cyc, st);     // QTY = RMD(Q0x,Q0y)
    h.read_elem(8, r);
    check(mulm(r, y, 1'b0, p127, 127) == mulm(x, lp, 1'b0, p127, 127), "FIELD RMD");
    h.run({16'h0, 4'd7, 4'd14, 4'd1, 2'(FS_ADD), 2'(OP_FIELD)}, cyc, st);    // QTX = Q0x + 1
    h.read_elem(7, r);
    check(r == addm(x, 1, 1'b0, p127), "FIELD add constant one");

    // rejected instructions
    h.ahb_write(32'h0000, 32'h3);
    h.ahb_read(32'h0000, st);
    check(st[3] && !st[0], "reserved opcode rejected");
    h.ahb_write(32'h0000, {16'h0, 4'd12, 4'd2, 4'd1, 2'(FS_ADD), 2'(OP_FIELD)});
    h.ahb_read(32'h0000, st);
    check(st[3] && !st[0], "bad slot rejected");
    h.write_key('0);
    h.run(32'h1, cyc, st);
    check(st[2] && st[1], "zero key flagged");

    // every mechanism must have happened
    $display("refresh=%0d skip=%0d pre=%0d post=%0d pa(k=1)=%0d pa(k=0)=%0d pd=%0d",
             h.n_refresh, h.n_skip, h.n_pre, h.n_post, h.n_pa_k1, h.n_pa_k0, h.n_pd);
    $display("div=%0d mul=%0d add=%0d sub=%0d swaps=%0d sub_steps=%0d r1=%0d r0=%0d dropped=%0d one=%0d",
             h.n_div, h.n_mul, h.n_add, h.n_sub, h.n_swap, h.n_sub_step, h.n_r1, h.n_r0,
             h.n_dropped_rf_writes, h.n_const_one);
    check(h.n_refresh > 0, "domain refresh");
    check(h.n_skip > 0, "leading-zero skip");
    check(h.n_pre > 0 && h.n_post > 0, "pre/post-process");
    check(h.n_pa_k1 > 0 && h.n_pa_k0 > 0, "addition for both key bits");
    check(h.n_pd > 0, "doubling");
    check(h.n_div > 0 && h.n_mul > 0 && h.n_add > 0 && h.n_sub > 0, "all GFAU functions");
    check(h.n_swap > 0 && h.n_sub_step > 0, "RMD swap logic and subtracting steps");
    check(h.n_r1 > 0 && h.n_r0 > 0, "both domain flag values");
    check(h.n_dropped_rf_writes > 0, "host write while busy");
    check(h.n_const_one > 0, "constant operand");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
