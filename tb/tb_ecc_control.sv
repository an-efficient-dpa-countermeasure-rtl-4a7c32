// Self-checking testbench for ecc_control, connected to the real GFAU and
// register file; the key and domain shift registers are modelled here.
// Checks a scalar multiplication over GF(2^127-1) with a 24-bit key against
// the reference model, that exactly m domain-refresh cycles precede it and
// that the key is consumed bit by bit, a FIELD RMD instruction, the
// busy/done protocol, the cycle count of a FIELD addition, and the error
// flag for an all-zero key.
module tb_ecc_control;
  import dfecc_pkg::*;
  import tb_ecc_ref_pkg::*;

  localparam int unsigned WORD = 132, NW = 4, MW = $clog2(N + 1);
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  instr_t instr;
  logic field = 1'b0;
  logic [MW-1:0] m;
  fe_t p;
  logic kbit, key_shift, dsr_refresh, busy, done, error;
  funcsel_e g_funcsel;
  logic g_start, g_ld1, g_ld2, g_done, g_busy, dflag, dshift;
  logic [1:0] g_widx;
  logic [WORD-1:0] g_in1, g_in2, g_out;
  logic [5:0] c_addr, t_addr = '0;
  logic c_we, t_we = 1'b0;
  logic [WORD-1:0] c_wdata, t_wdata = '0, rf_rdata;

  ecc_control dut (
    .clk, .rst_n, .instr, .field, .m, .kbit, .key_shift, .dsr_refresh,
    .g_funcsel, .g_start, .g_ld1, .g_ld2, .g_widx, .g_in1, .g_in2, .g_out, .g_done,
    .rf_addr(c_addr), .rf_we(c_we), .rf_wdata(c_wdata), .rf_rdata,
    .busy, .done, .error
  );
  gfau u_gfau (
    .clk, .rst_n, .field, .m, .p, .funcsel(g_funcsel), .start(g_start), .ld1(g_ld1), .ld2(g_ld2),
    .widx(g_widx), .in1(g_in1), .in2(g_in2), .out(g_out), .dflag, .dshift, .busy(g_busy), .done(g_done)
  );
  register_file u_rf (
    .clk, .addr(busy ? c_addr : t_addr), .we(busy ? c_we : t_we),
    .wdata(busy ? c_wdata : t_wdata), .rdata(rf_rdata)
  );

  // key register model: kbit = K[m-1], shifted left by key_shift
  fe_t key_q;
  int  n_key_shift = 0, n_refresh = 0;
  assign kbit = key_q[m - 1];
  always @(posedge clk) begin
    if (key_shift) begin key_q <= key_q << 1; n_key_shift++; end
  end
  // domain register model: rotates r[m-1:0], refreshed with random bits
  fe_t r_q;
  assign dflag = r_q[0];
  always @(posedge clk) begin
    if (dsr_refresh) begin
      r_q <= (r_q >> 1) | (fe_t'($urandom % 2) << (m - 1));
      n_refresh++;
    end else if (dshift) r_q <= (r_q >> 1) | (fe_t'(r_q[0]) << (m - 1));
  end

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask
  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic put(input int slot, input fe_t v);
    logic [NW*WORD-1:0] ext;
    ext = '0; ext[N-1:0] = v;
    for (int w = 0; w < NW; w++) begin
      @(negedge clk);
      t_addr = 6'(slot * NW + w); t_wdata = ext[w*WORD +: WORD]; t_we = 1'b1;
    end
    @(negedge clk);
    t_we = 1'b0;
  endtask
  task automatic get(input int slot, output fe_t v);
    logic [NW*WORD-1:0] ext;
    for (int w = 0; w < NW; w++) begin
      t_addr = 6'(slot * NW + w); #1;
      ext[w*WORD +: WORD] = rf_rdata;
    end
    v = ext[N-1:0];
  endtask
  task automatic issue(input opcode_e op, input funcsel_e fs, input slot_e s1, input slot_e s2,
                       input slot_e d, output int cyc);
    @(negedge clk);
    instr = '{op: op, fs: fs, src1: s1, src2: s2, dst: d, valid: 1'b1};
    @(negedge clk);
    instr.valid = 1'b0;
    check(busy, "busy after instruction");
    cyc = 1;
    while (busy) begin @(negedge clk); cyc++; end
    check(done, "done after completion");
  endtask

  initial begin
    fe_t a, x, y, ex, ey, rx, ry, k, v;
    int cyc;
    instr = '0;
    m = MW'(127);
    p = (fe_t'(1) << 127) - 1;
    key_q = '0; r_q = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    a = rand_elem(0, p, 127); x = rand_elem(0, p, 127); y = rand_elem(0, p, 127);
    k = fe_t'($urandom % (1 << 24)) | (fe_t'(1) << 23);
    smul(k, x, y, a, 0, p, 127, ex, ey);
    put(0, a); put(1, x); put(2, y);
    key_q = k;
    n_key_shift = 0; n_refresh = 0;
    issue(OP_ECSM, FS_ADD, SL_A, SL_A, SL_A, cyc);
    get(3, rx); get(4, ry);
    check(rx == ex && ry == ey, "ECSM result");
    check(!error, "no error");
    check(n_refresh == 127, $sformatf("refresh cycles %0d", n_refresh));
    check(n_key_shift == 127, $sformatf("key shifts %0d", n_key_shift));
    $display("ECSM 24-bit key, m=127: %0d cycles", cyc);

    // FIELD: QTX = RMD(Q1x, Q1y) = x/y * 2^lambda
    put(3, x); put(4, y);
    issue(OP_FIELD, FS_DIV, SL_Q1X, SL_Q1Y, SL_QTX, cyc);
    get(7, v);
    check(mulm(v, y, 0, p, 127) == mulm(x, pow2($countones(r_q), 0, p, 127), 0, p, 127), "FIELD RMD");
    // FIELD add: load 2*NW, start, GFAU 2, write NW, done
    issue(OP_FIELD, FS_ADD, SL_Q1X, SL_ZERO, SL_QTY, cyc);
    get(8, v);
    check(v == x, "FIELD copy via add zero");
    check(cyc == 2 * NW + 1 + 3 + NW + 1, $sformatf("FIELD add cycles %0d", cyc));

    key_q = '0;
    issue(OP_ECSM, FS_ADD, SL_A, SL_A, SL_A, cyc);
    check(error, "zero key flagged");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
