// Self-checking testbench for instr_decoder: sweeps opcodes, functions and
// slot numbers (random combinations plus all slot values) with and without
// busy, and checks the decoded fields, valid and illegal against the
// instruction-format rules.
module tb_instr_decoder;
  import dfecc_pkg::*;
  logic we, busy, illegal;
  logic [31:0] word;
  instr_t instr;
  instr_decoder dut (.*);

  int checks = 0, failures = 0;
  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic bit slot_ok(int s, bit is_src2);
    return s <= 8 || (is_src2 && (s == 13 || s == 14));
  endfunction

  initial begin
    for (int t = 0; t < 3000; t++) begin
      bit exp_legal, exp_valid, exp_illegal;
      int op, s1, s2, d;
      word = $urandom;
      if (t < 16 * 4) begin            // every slot value in every position
        word[1:0]  = 2'd2;
        word[7:4]  = 4'(t % 16);
        word[11:8] = 4'((t + 5) % 16);
        word[15:12]= 4'((t / 16) * 3 % 16);
      end
      we   = 1'($urandom % 4 != 0);
      busy = 1'($urandom % 4 == 0);
      #1;
      op = int'(word[1:0]); s1 = int'(word[7:4]); s2 = int'(word[11:8]); d = int'(word[15:12]);
      exp_legal   = (op == 1) || (op == 2 && slot_ok(s1, 0) && slot_ok(s2, 1) && slot_ok(d, 0));
      exp_valid   = we && !busy && exp_legal;
      exp_illegal = we && (busy || (!exp_legal && op != 0));
      checks++;
      if (instr.valid != exp_valid || illegal != exp_illegal ||
          (exp_valid && (int'(instr.op) != op || int'(instr.fs) != int'(word[3:2]) ||
                         int'(instr.src1) != s1 || int'(instr.src2) != s2 || int'(instr.dst) != d))) begin
        failures++;
        if (failures < 10) $display("FAIL word=%h we=%0b busy=%0b valid=%0b illegal=%0b", word, we, busy, instr.valid, illegal);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
