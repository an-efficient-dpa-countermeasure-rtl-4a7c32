// Self-checking testbench for ahb_wrapper (with its address decoder).
// Acts as AHB master and as the processor side: checks the write strobes,
// word index and data for CTRL, FIELDLEN, PRIME and KEY writes; that a
// register-file word is stored only on the last of its five sub-word
// writes, with the assembled 132-bit value; the read data of every target;
// that writes and reads of the register file are blocked while the core is
// busy; that transfers with HTRANS IDLE or HSEL low have no effect; and that
// HREADYOUT/HRESP signal zero-wait OKAY.
module tb_ahb_wrapper;
  import dfecc_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic hsel = 0, hwrite = 0, hready = 1, hreadyout, hresp;
  logic [31:0] haddr = 0, hwdata = 0, hrdata;
  logic [1:0] htrans = 0;
  logic core_busy = 0;
  logic [31:0] status_word = 32'h5a5a_0003, prime_word, fieldlen_word = 32'h0001_00a3;
  logic instr_we, prime_we, fieldlen_we, key_we, rf_we;
  logic [31:0] instr_word, wdata;
  logic [4:0] word_idx;
  logic [5:0] rf_addr;
  logic [131:0] rf_wdata, rf_rdata;
  logic [131:0] rf_model [36];

  ahb_wrapper dut (.*);

  assign prime_word = {27'd0, word_idx} ^ 32'hc0de_0000;
  assign rf_rdata   = rf_model[rf_addr];
  always @(posedge clk) if (rf_we) rf_model[rf_addr] <= rf_wdata;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // strobe monitor: records what the data phase of the last write produced
  int n_instr = 0, n_prime = 0, n_field = 0, n_key = 0, n_rf = 0;
  logic [31:0] last_w; logic [4:0] last_idx;
  always @(posedge clk) begin
    if (instr_we)    begin n_instr++; last_w <= instr_word; end
    if (prime_we)    begin n_prime++; last_w <= wdata; last_idx <= word_idx; end
    if (fieldlen_we) begin n_field++; last_w <= wdata; end
    if (key_we)      begin n_key++;   last_w <= wdata; last_idx <= word_idx; end
    if (rf_we)       n_rf++;
  end

  task automatic wr(input logic [31:0] a, input logic [31:0] d, input logic [1:0] tr = 2'b10, input logic sel = 1);
    @(negedge clk);
    hsel = sel; htrans = tr; hwrite = 1; haddr = a;
    @(negedge clk);
    check(hreadyout && !hresp, "zero-wait OKAY");
    hsel = 0; htrans = 0; hwrite = 0; hwdata = d;
    @(negedge clk);
  endtask
  task automatic rd(input logic [31:0] a, output logic [31:0] d);
    @(negedge clk);
    hsel = 1; htrans = 2'b10; hwrite = 0; haddr = a;
    @(negedge clk);
    hsel = 0; htrans = 0;
    d = hrdata;
  endtask

  logic [159:0] v;
  logic [31:0] d;
  initial begin
    foreach (rf_model[i]) rf_model[i] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    wr(32'h0000, 32'h0000_1235);
    check(n_instr == 1 && last_w == 32'h0000_1235, "instruction write");
    wr(32'h0004, 32'h0001_0199);
    check(n_field == 1 && last_w == 32'h0001_0199, "FieldLen write");
    wr(32'h0108, 32'hdead_beef);
    check(n_prime == 1 && last_w == 32'hdead_beef && last_idx == 5'd2, "prime word 2 write");
    wr(32'h0240, 32'h1234_5678);
    check(n_key == 1 && last_w == 32'h1234_5678 && last_idx == 5'd16, "key word 16 write");
    wr(32'h0000, 32'h1, 2'b00);          // IDLE transfer
    wr(32'h0000, 32'h1, 2'b10, 1'b0);    // not selected
    check(n_instr == 1, "IDLE / unselected transfers ignored");
    // register-file word 7, five sub-words
    for (int k = 0; k < 5; k++) v[k*32 +: 32] = $urandom;
    for (int k = 0; k < 5; k++) begin
      wr(32'h1000 + 32 * 7 + 4 * k, v[k*32 +: 32]);
      check(n_rf == (k == 4 ? 1 : 0), $sformatf("RF store only on last sub-word (%0d)", k));
    end
    check(rf_model[7] == v[131:0], "RF word assembled");
    for (int k = 0; k < 5; k++) begin
      rd(32'h1000 + 32 * 7 + 4 * k, d);
      check(d == (k < 4 ? v[k*32 +: 32] : {28'd0, v[131:128]}), $sformatf("RF read sub-word %0d", k));
    end
    rd(32'h0000, d);  check(d == status_word, "status read");
    rd(32'h0004, d);  check(d == fieldlen_word, "FieldLen read");
    rd(32'h010c, d);  check(d == (32'hc0de_0000 ^ 32'd3), "prime read word 3");
    rd(32'h0204, d);  check(d == 32'h0, "key is write only");
    // blocked while busy
    core_busy = 1;
    for (int k = 0; k < 5; k++) wr(32'h1000 + 32 * 8 + 4 * k, 32'hffff_ffff);
    check(n_rf == 1 && rf_model[8] == '0, "RF write blocked while busy");
    rd(32'h1000 + 32 * 7, d);
    check(d == 32'h0, "RF read blocked while busy");
    core_busy = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
