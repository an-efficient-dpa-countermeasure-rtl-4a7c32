// Self-checking testbench for addr_decoder: checks the decoded target and
// indices for every register of the address map and for addresses just
// outside each region.
module tb_addr_decoder;
  import dfecc_pkg::*;
  logic [15:0] haddr;
  decode_t dec;
  addr_decoder dut (.*);

  int checks = 0, failures = 0;
  task automatic expect_dec(input logic [15:0] a, input target_e t, input int word, input int entry, input int sub);
    haddr = a; #1;
    checks++;
    if (dec.target != t || (t inside {T_PRIME, T_KEY} && int'(dec.word) != word) ||
        (t == T_RF && (int'(dec.entry) != entry || int'(dec.sub) != sub))) begin
      failures++;
      $display("FAIL addr %h: target %0d word %0d entry %0d sub %0d", a, dec.target, dec.word, dec.entry, dec.sub);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    expect_dec(16'h0000, T_CTRL, 0, 0, 0);
    expect_dec(16'h0004, T_FIELDLEN, 0, 0, 0);
    expect_dec(16'h0008, T_NONE, 0, 0, 0);
    for (int k = 0; k < 17; k++) begin
      expect_dec(16'(16'h0100 + 4 * k), T_PRIME, k, 0, 0);
      expect_dec(16'(16'h0200 + 4 * k), T_KEY, k, 0, 0);
    end
    expect_dec(16'h0144, T_NONE, 0, 0, 0);
    expect_dec(16'h0244, T_NONE, 0, 0, 0);
    for (int e = 0; e < 36; e++)
      for (int s = 0; s < 5; s++)
        expect_dec(16'(16'h1000 + 32 * e + 4 * s), T_RF, 0, e, s);
    expect_dec(16'h1014, T_NONE, 0, 0, 0);           // sub-word 5
    expect_dec(16'(16'h1000 + 32 * 36), T_NONE, 0, 0, 0);
    expect_dec(16'h2000, T_NONE, 0, 0, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
