// Self-checking testbench for rng_postproc.
// Drives the oscillator input with random bits, one per clock, and checks
// every output bit against the recurrence
//     out[t] = in[t] ^ out[t-14] ^ out[t-17] ^ out[t-18] ^ out[t-19]
// (the feedback polynomial x^19 + x^18 + x^17 + x^14 + 1), with the
// one-cycle sampling and one-cycle output register taken into account.
module tb_rng_postproc;
  logic clk = 1'b0, rst_n = 1'b0, ro_in = 1'b0, rnd_bit;
  always #5 clk = ~clk;
  rng_postproc dut (.*);

  int checks = 0, failures = 0, ones = 0;
  bit ins[$];
  bit outs[$];

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic bit hist(int back);
    if (back > outs.size()) return 1'b0;
    return outs[outs.size() - back];
  endfunction

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    // ins[k] is sampled at the k-th rising edge after reset release
    for (int t = 0; t < 2000; t++) begin
      ro_in = 1'($urandom);
      ins.push_back(ro_in);
      @(negedge clk);
      // at this point the k-th sample has been taken; output holds mix of sample k-1
      if (t >= 1) begin
        bit exp;
        exp = ins[t-1] ^ hist(14) ^ hist(17) ^ hist(18) ^ hist(19);
        outs.push_back(exp);
        checks++;
        if (rnd_bit !== exp) begin
          failures++;
          if (failures < 5) $display("FAIL t=%0d got %0b exp %0b", t, rnd_bit, exp);
        end
        ones += int'(rnd_bit);
      end
    end
    $display("ones=%0d of %0d", ones, checks);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
