// Reduced-build testbench: the processor built with N = 256 (the size of the
// smaller 256-bit variant of the design), so that every element takes two
// 132-bit register-file words and the register file is 18 words deep. It runs
// one scalar multiplication over GF(p256) with the prime
// 2^256-2^224+2^192+2^96-1 and one over GF(2^163) with x^163+x^7+x^6+x^3+1,
// both with full-length random keys, through the AHB port only. Results are
// compared with the double-and-add reference model (which works on 521-bit
// values; the upper bits stay zero). It also checks the read-back of the
// FieldLen register, whose m field is clamped to N.
module tb_dfecc_n256;
  import tb_ecc_ref_pkg::*;

  localparam int unsigned NB   = 256;
  localparam int unsigned WORD = 132;
  localparam int unsigned NW   = (NB + WORD - 1) / WORD;
  localparam int unsigned NSW  = (WORD + 31) / 32;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic        hsel = 1'b0, hwrite = 1'b0, hready = 1'b1, hreadyout, hresp, ro_in;
  logic [31:0] haddr = '0, hwdata = '0, hrdata;
  logic [1:0]  htrans = 2'b00;

  ro_pair_model u_ro (.f1(ro_in));

  dfecc_top #(.N(NB)) dut (.*);

  longint cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask
  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic ahb_write(input logic [31:0] addr, input logic [31:0] data);
    @(negedge clk);
    hsel = 1'b1; htrans = 2'b10; hwrite = 1'b1; haddr = addr;
    @(negedge clk);
    hsel = 1'b0; htrans = 2'b00; hwrite = 1'b0; hwdata = data;
  endtask

  task automatic ahb_read(input logic [31:0] addr, output logic [31:0] data);
    @(negedge clk);
    hsel = 1'b1; htrans = 2'b10; hwrite = 1'b0; haddr = addr;
    @(negedge clk);
    hsel = 1'b0; htrans = 2'b00;
    data = hrdata;
  endtask

  task automatic write_elem(input int slot, input fe_t v);
    logic [NW*WORD-1:0] ext;
    logic [NSW*32-1:0]  wd;
    ext = v[NW*WORD-1:0];
    for (int w = 0; w < NW; w++) begin
      wd = '0;
      wd[WORD-1:0] = ext[w*WORD +: WORD];
      for (int s = 0; s < NSW; s++)
        ahb_write(32'h1000 + 32 * (slot * NW + w) + 4 * s, wd[s*32 +: 32]);
    end
  endtask

  task automatic read_elem(input int slot, output fe_t v);
    logic [NW*WORD-1:0] ext;
    logic [NSW*32-1:0]  wd;
    logic [31:0]        d;
    for (int w = 0; w < NW; w++) begin
      for (int s = 0; s < NSW; s++) begin
        ahb_read(32'h1000 + 32 * (slot * NW + w) + 4 * s, d);
        wd[s*32 +: 32] = d;
      end
      ext[w*WORD +: WORD] = wd[WORD-1:0];
    end
    v = '0;
    v[NB-1:0] = ext[NB-1:0];
  endtask

  task automatic ecsm(input logic fld, input fe_t p, input int m, input string name);
    fe_t a, x, y, k, ex, ey, rx, ry;
    longint t0;
    logic [31:0] st;
    a = rand_elem(fld, p, m); x = rand_elem(fld, p, m); y = rand_elem(fld, p, m);
    k = rand_elem(fld, p, m);
    k[m-1] = 1'b1;
    smul(k, x, y, a, fld, p, m, ex, ey);
    ahb_write(32'h0004, {15'd0, fld, 16'(m)});
    for (int j = 0; j < (NB + 31) / 32; j++) ahb_write(32'h0100 + 4 * j, 32'(p >> (32 * j)));
    for (int j = 0; j < (NB + 31) / 32; j++) ahb_write(32'h0200 + 4 * j, 32'(k >> (32 * j)));
    write_elem(0, a); write_elem(1, x); write_elem(2, y);
    ahb_write(32'h0000, 32'h1);
    t0 = cycle;
    do begin
      repeat (16) @(negedge clk);
      ahb_read(32'h0000, st);
    end while (st[0]);
    read_elem(3, rx); read_elem(4, ry);
    check(st[1] && !st[2], $sformatf("%s status", name));
    check(rx == ex && ry == ey, $sformatf("%s result", name));
    $display("N=%0d build, %s: %0d-bit key, %0d cycles", NB, name, m, cycle - t0);
  endtask

  initial begin
    logic [31:0] d;
    rst_n = 1'b0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    repeat (2) @(negedge clk);
    ahb_write(32'h0004, 32'd400);                       // m above N is clamped
    ahb_read(32'h0004, d);
    check(d == NB, $sformatf("FieldLen clamp read back %0d", d));
    ecsm(1'b0, (fe_t'(1) << 256) - (fe_t'(1) << 224) + (fe_t'(1) << 192) + (fe_t'(1) << 96) - 1,
         256, "GF(p256)");
    ecsm(1'b1, (fe_t'(1) << 163) | (fe_t'(1) << 7) | (fe_t'(1) << 6) | (fe_t'(1) << 3) | 1,
         163, "GF(2^163)");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
