// Shared test harness for the DF-ECC processor testbenches: clock, reset,
// behavioural ring-oscillator entropy source, the processor at its default
// parameters, an AHB master bus-functional model with register-level
// helpers, and counters of how often each internal mechanism was used.
module dfecc_tb_harness;
  import dfecc_pkg::*;
  import tb_ecc_ref_pkg::*;

  localparam int unsigned WORD = 132;
  localparam int unsigned NW   = (N + WORD - 1) / WORD;
  localparam int unsigned NSW  = (WORD + 31) / 32;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic        hsel = 1'b0, hwrite = 1'b0, hready = 1'b1, hreadyout, hresp, ro_in;
  logic [31:0] haddr = '0, hwdata = '0, hrdata;
  logic [1:0]  htrans = 2'b00;

  ro_pair_model u_ro (.f1(ro_in));

  dfecc_top dut (.*);

  longint cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  // ---------------- mechanism counters ----------------
  int n_refresh = 0, n_skip = 0, n_pre = 0, n_post = 0, n_pa_k1 = 0, n_pa_k0 = 0;
  int n_pd = 0, n_div = 0, n_mul = 0, n_add = 0, n_sub = 0, n_swap = 0, n_sub_step = 0;
  int n_r1 = 0, n_r0 = 0, n_dropped_rf_writes = 0, n_const_one = 0;
  always @(posedge clk) if (rst_n) begin
    if (dut.dsr_refresh) n_refresh++;
    if (dut.u_ctrl.st_q == dut.u_ctrl.C_SKIP && !dut.kbit && dut.u_ctrl.bits_q != 0) n_skip++;
    if (dut.u_ctrl.st_q == dut.u_ctrl.C_LOAD && dut.u_ctrl.cnt_q == 0 && dut.u_ctrl.step_q == 0) begin
      case (dut.u_ctrl.ph_q)
        dut.u_ctrl.PH_PRE:  n_pre++;
        dut.u_ctrl.PH_POST: n_post++;
        dut.u_ctrl.PH_PA:   if (dut.u_ctrl.dpt_q) n_pa_k0++; else n_pa_k1++;
        dut.u_ctrl.PH_PD, dut.u_ctrl.PH_INIT_PD: n_pd++;
        default: ;
      endcase
    end
    if (dut.g_start) begin
      case (dut.g_funcsel)
        FS_DIV:  n_div++;
        FS_MUL:  n_mul++;
        FS_ADD:  n_add++;
        default: n_sub++;
      endcase
    end
    if (dut.u_gfau.state_q == 3'd3 && dut.u_gfau.sel_q.valid) begin
      if (dut.u_gfau.sel_q.group != dut.u_gfau.orient_q) n_swap++;
      if (dut.u_gfau.sel_q.comb == RS_SUB) n_sub_step++;
    end
    if (dut.dshift) begin
      if (dut.dflag) n_r1++; else n_r0++;
    end
    if (dut.u_wrapper.wr && dut.u_wrapper.dec_q.target == T_RF && dut.busy) n_dropped_rf_writes++;
    if (dut.g_ld2 && dut.u_ctrl.uop.src2 == SL_ONE) n_const_one++;
  end

  // ---------------- AHB master ----------------
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

  task automatic reset();
    rst_n = 1'b0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    repeat (2) @(negedge clk);
  endtask

  task automatic setup_field(input logic fld, input fe_t p, input int m);
    logic [31:0] w;
    ahb_write(32'h0004, {15'd0, fld, 16'(m)});
    for (int k = 0; k < (N + 31) / 32; k++) begin
      w = 32'(p >> (32 * k));
      ahb_write(32'h0100 + 4 * k, w);
    end
  endtask

  task automatic write_key(input fe_t k);
    for (int j = 0; j < (N + 31) / 32; j++) ahb_write(32'h0200 + 4 * j, 32'(k >> (32 * j)));
  endtask

  task automatic write_elem(input int slot, input fe_t v);
    logic [NW*WORD-1:0] ext;
    logic [NSW*32-1:0]  wd;
    ext = '0;
    ext[N-1:0] = v;
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
    v = ext[N-1:0];
  endtask

  // issue an instruction, wait until the processor is idle again
  task automatic run(input logic [31:0] word, output longint cycles, output logic [31:0] status);
    longint t0;
    ahb_write(32'h0000, word);
    t0 = cycle;
    do begin
      repeat (16) @(negedge clk);
      ahb_read(32'h0000, status);
    end while (status[0]);
    cycles = cycle - t0;
  endtask
endmodule
