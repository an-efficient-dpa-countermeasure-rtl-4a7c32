// Self-checking testbench for domain_shift_reg.
// For several field lengths m: refreshes the register with m random bits,
// checks that the value holds exactly those bits (first-entered bit at
// r[0]) with r[N-1:m] zero, then shifts m times and checks that dflag
// presents r_0 .. r_(m-1) in order and that the register is back at its
// starting value afterwards; also checks that it holds without a pulse.
module tb_domain_shift_reg;
  localparam int unsigned N  = 521;
  localparam int unsigned MW = $clog2(N + 1);

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic [MW-1:0] m;
  logic shift = 1'b0, refresh = 1'b0, rnd_bit = 1'b0, dflag;
  logic [N-1:0] value;

  domain_shift_reg #(.N(N)) dut (.*);

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

  int ms[4] = '{521, 409, 163, 7};
  logic [N-1:0] exp, start_val;

  initial begin
    m = MW'(N);
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    foreach (ms[k]) begin
      m = MW'(ms[k]);
      exp = '0;
      refresh = 1'b1;
      for (int j = 0; j < ms[k]; j++) begin
        rnd_bit = 1'($urandom);
        exp[j] = rnd_bit;
        @(negedge clk);
      end
      refresh = 1'b0;
      check(value == exp, $sformatf("refresh value m=%0d", ms[k]));
      start_val = value;
      repeat (3) @(negedge clk);
      check(value == start_val, "holds when idle");
      shift = 1'b1;
      for (int j = 0; j < ms[k]; j++) begin
        check(dflag == exp[j], $sformatf("dflag r_%0d m=%0d", j, ms[k]));
        @(negedge clk);
      end
      shift = 1'b0;
      check(value == start_val, $sformatf("rotation closes after m shifts m=%0d", ms[k]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
