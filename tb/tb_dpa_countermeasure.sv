// Self-checking testbench for dpa_countermeasure, fed by the behavioural
// ring-oscillator model. Refreshes the domain value several times and checks
// that r[N-1:m] stays zero, that the shifting domain flag walks through the
// refreshed value bit by bit, that successive refreshes give different
// values, and that the bit stream is not grossly biased (ones between 40%
// and 60% over all refreshes).
module tb_dpa_countermeasure;
  localparam int unsigned N  = 521;
  localparam int unsigned MW = $clog2(N + 1);

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic ro_in;
  logic [MW-1:0] m;
  logic refresh = 1'b0, shift = 1'b0, dflag;
  logic [N-1:0] value, prev, mask;

  ro_pair_model u_ro (.f1(ro_in));
  dpa_countermeasure #(.N(N)) dut (.*);

  int checks = 0, failures = 0, ones = 0, total = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    m = MW'(409);
    prev = '0;
    repeat (30) @(negedge clk);
    rst_n = 1'b1;
    repeat (30) @(negedge clk);
    for (int k = 0; k < 8; k++) begin
      m = (k % 2 == 0) ? MW'(409) : MW'(521);
      mask = (int'(m) == N) ? '1 : ((N'(1) << m) - 1);
      refresh = 1'b1;
      repeat (int'(m)) @(negedge clk);
      refresh = 1'b0;
      check((value & ~mask) == '0, "bits above m are zero");
      check(value != prev, "refresh gives a new value");
      prev = value;
      ones  += $countones(value);
      total += int'(m);
      shift = 1'b1;
      for (int j = 0; j < int'(m); j++) begin
        if (dflag != prev[j]) begin
          check(1'b0, $sformatf("dflag bit %0d", j));
          break;
        end
        @(negedge clk);
      end
      shift = 1'b0;
      check(value == prev, "rotation closes");
    end
    $display("ones=%0d of %0d", ones, total);
    check(ones * 10 > total * 4 && ones * 10 < total * 6, "bias");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
