// Self-checking testbench for gfau.
//
// Runs addition, subtraction, randomized Montgomery multiplication and
// division on random operands over GF(2^521-1), GF(2^255-19), GF(2^409)
// (x^409+x^87+1) and GF(2^163) (x^163+x^7+x^6+x^3+1), each with a fresh
// random domain value r. Results are checked with independent bit-serial
// modular arithmetic:  RMM:  R * 2^lambda == X*Y,  RMD:  R * Y == X * 2^lambda.
// It also checks that exactly m domain bits are consumed per RMM/RMD, that an
// RMM takes m cycles and an RMD at most 2m+1 cycles.
module tb_gfau;
  import dfecc_pkg::*;

  localparam int unsigned N    = 521;
  localparam int unsigned WORD = 132;
  localparam int unsigned NW   = (N + WORD - 1) / WORD;
  localparam int unsigned MW   = $clog2(N + 1);

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic            field;
  logic [MW-1:0]   m;
  logic [N-1:0]    p;
  funcsel_e        funcsel;
  logic            start, ld1, ld2;
  logic [1:0]      widx;
  logic [WORD-1:0] in1, in2, out;
  logic            dflag, dshift, busy, done;

  gfau #(.N(N), .WORD(WORD)) dut (.*);

  int checks = 0, failures = 0;

  // domain shift register model
  logic [N-1:0] r;
  int           ridx, shifts;
  assign dflag = r[ridx];
  always_ff @(posedge clk) if (dshift) begin ridx <= (ridx + 1) % int'(m); shifts <= shifts + 1; end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------- reference arithmetic ----------
  function automatic logic [N-1:0] addm(input logic [N-1:0] a, b, input logic fld, input logic [N-1:0] pp);
    logic [N+1:0] s;
    if (fld) return a ^ b;
    s = {2'b0, a} + {2'b0, b};
    if (s >= {2'b0, pp}) s = s - {2'b0, pp};
    return s[N-1:0];
  endfunction
  function automatic logic [N-1:0] subm(input logic [N-1:0] a, b, input logic fld, input logic [N-1:0] pp);
    if (fld) return a ^ b;
    if (a >= b) return a - b;
    return a + (pp - b);
  endfunction
  function automatic logic [N-1:0] dblm(input logic [N-1:0] a, input logic fld, input logic [N-1:0] pp, input int mm);
    logic [N:0] s;
    s = {a, 1'b0};
    if (fld) begin
      if (s[mm]) s = s ^ {1'b0, pp};
      return s[N-1:0];
    end
    if (s >= {1'b0, pp}) s = s - {1'b0, pp};
    return s[N-1:0];
  endfunction
  function automatic logic [N-1:0] mulm(input logic [N-1:0] a, b, input logic fld, input logic [N-1:0] pp, input int mm);
    logic [N-1:0] acc = '0;
    for (int k = N - 1; k >= 0; k--) begin
      acc = dblm(acc, fld, pp, mm);
      if (b[k]) acc = addm(acc, a, fld, pp);
    end
    return acc;
  endfunction
  function automatic logic [N-1:0] pow2m(input int e, input logic fld, input logic [N-1:0] pp, input int mm);
    logic [N-1:0] acc = 1;
    for (int k = 0; k < e; k++) acc = dblm(acc, fld, pp, mm);
    return acc;
  endfunction
  function automatic logic [N-1:0] rand_elem(input logic fld, input logic [N-1:0] pp, input int mm);
    logic [N-1:0] x;
    for (int k = 0; k < N; k += 32) x[k +: 32] = $urandom;
    x = x & ((N'(1) << mm) - 1);
    if (!fld) while (x >= pp) x = x - pp;
    return x;
  endfunction

  // ---------- driver ----------
  task automatic run_op(input funcsel_e f, input logic [N-1:0] x, y, output logic [N-1:0] res, output int cyc);
    logic [NW*WORD-1:0] xw, yw, rw;
    xw = '0; yw = '0;
    xw[N-1:0] = x; yw[N-1:0] = y;
    for (int w = 0; w < NW; w++) begin
      @(negedge clk);
      ld1 = 1; ld2 = 1; widx = 2'(w);
      in1 = xw[w*WORD +: WORD]; in2 = yw[w*WORD +: WORD];
    end
    @(negedge clk);
    ld1 = 0; ld2 = 0; funcsel = f; start = 1;
    @(negedge clk);
    start = 0;
    cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    for (int w = 0; w < NW; w++) begin
      widx = 2'(w); #1;
      rw[w*WORD +: WORD] = out;
    end
    res = rw[N-1:0];
  endtask

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic test_field(input logic fld, input logic [N-1:0] pp, input int mm, input int reps);
    logic [N-1:0] x, y, res, e, lhs, rhs;
    int cyc, lam;
    field = fld; p = pp; m = MW'(mm);
    for (int t = 0; t < reps; t++) begin
      r = '0;
      for (int k = 0; k < mm; k++) r[k] = 1'($urandom);
      if (t == 0) r = '0;                 // lambda = 0: plain division / multiplication
      lam = $countones(r);
      ridx = 0;
      x = rand_elem(fld, pp, mm);
      y = rand_elem(fld, pp, mm);
      if (y == 0) y = 1;
      if (t == 1) y = 1;                  // domain conversion RMD(x,1) = x*2^lambda
      e = pow2m(lam, fld, pp, mm);

      run_op(FS_ADD, x, y, res, cyc);
      check(res == addm(x, y, fld, pp) && cyc == 2, $sformatf("add f=%0d", fld));
      run_op(FS_SUB, x, y, res, cyc);
      check(res == subm(x, y, fld, pp) && cyc == 2, $sformatf("sub f=%0d", fld));

      shifts = 0;
      run_op(FS_MUL, x, y, res, cyc);
      lhs = mulm(res, e, fld, pp, mm);
      rhs = mulm(x, y, fld, pp, mm);
      check(lhs == rhs && res < ((fld ? (N'(1) << mm) : pp)), $sformatf("rmm f=%0d m=%0d", fld, mm));
      check(cyc == mm + 1 && shifts == mm && ridx == 0, $sformatf("rmm timing cyc=%0d shifts=%0d", cyc, shifts));

      shifts = 0;
      run_op(FS_DIV, x, y, res, cyc);
      lhs = mulm(res, y, fld, pp, mm);
      rhs = mulm(x, e, fld, pp, mm);
      check(lhs == rhs && res < ((fld ? (N'(1) << mm) : pp)), $sformatf("rmd f=%0d m=%0d t=%0d", fld, mm, t));
      check(cyc <= 2 * mm + 2 && shifts == mm && ridx == 0, $sformatf("rmd timing cyc=%0d shifts=%0d", cyc, shifts));
      if (t == 1) check(res == mulm(x, e, fld, pp, mm), "domain conversion RMD(x,1)");
    end
  endtask

  logic [N-1:0] p521, p255, f409, f163;
  initial begin
    start = 0; ld1 = 0; ld2 = 0; widx = 0; in1 = 0; in2 = 0; funcsel = FS_ADD;
    field = 0; m = MW'(N); p = '1; r = '0; ridx = 0; shifts = 0;
    p521 = '1;                                          // 2^521 - 1
    p255 = (N'(1) << 255) - 19;
    f409 = (N'(1) << 409) | (N'(1) << 87) | 1;
    f163 = (N'(1) << 163) | (N'(1) << 7) | (N'(1) << 6) | (N'(1) << 3) | 1;
    repeat (3) @(negedge clk);
    rst_n = 1;
    test_field(1'b0, p521, 521, 6);
    test_field(1'b0, p255, 255, 4);
    test_field(1'b1, f409, 409, 6);
    test_field(1'b1, f163, 163, 4);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
