// Self-checking testbench for config_regs: writes a random modulus word by
// word and the FieldLen word, checks the parallel outputs, the read-back
// words, the clamping of m to N, and the reset values.
module tb_config_regs;
  localparam int unsigned N = 521, MW = $clog2(N + 1), KW = (N + 31) / 32;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic prime_we = 1'b0, fieldlen_we = 1'b0, field;
  logic [4:0] prime_idx = '0;
  logic [31:0] wdata = '0, prime_word, fieldlen_word;
  logic [N-1:0] p;
  logic [MW-1:0] m;
  config_regs #(.N(N)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask
  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [KW*32-1:0] pv;
  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    check(p == '0 && m == MW'(N) && field == 1'b0, "reset values");
    for (int t = 0; t < 3; t++) begin
      for (int j = 0; j < KW; j++) pv[j*32 +: 32] = $urandom;
      for (int j = 0; j < KW; j++) begin
        prime_we = 1'b1; prime_idx = 5'(j); wdata = pv[j*32 +: 32];
        @(negedge clk);
      end
      prime_we = 1'b0;
      check(p == pv[N-1:0], "modulus");
      for (int j = 0; j < KW; j++) begin
        prime_idx = 5'(j); #1;
        check(prime_word == pv[j*32 +: 32], $sformatf("read-back word %0d", j));
      end
      @(negedge clk);
      fieldlen_we = 1'b1; wdata = {15'd0, 1'(t), 16'(163 + 100 * t)};
      @(negedge clk);
      fieldlen_we = 1'b0;
      check(m == MW'(163 + 100 * t) && field == 1'(t), "FieldLen");
      check(fieldlen_word == {15'd0, 1'(t), 16'(163 + 100 * t)}, "FieldLen read-back");
    end
    fieldlen_we = 1'b1; wdata = 32'd1000;
    @(negedge clk);
    fieldlen_we = 1'b0;
    check(m == MW'(N), "m clamped to N");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
