// Self-checking testbench for key_shift_reg: loads random keys word by word
// and checks that kbit walks through K[m-1], K[m-2], ..., K[0] as the
// register is shifted, for several key lengths m; also that kbit holds
// while neither write nor shift is active.
module tb_key_shift_reg;
  localparam int unsigned N = 521, MW = $clog2(N + 1), KW = (N + 31) / 32;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic [MW-1:0] m;
  logic wr_en = 1'b0, shift = 1'b0, kbit;
  logic [4:0] wr_idx = '0;
  logic [31:0] wr_data = '0;
  key_shift_reg #(.N(N)) dut (.*);

  int checks = 0, failures = 0;
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int ms[3] = '{521, 409, 64};
  logic [KW*32-1:0] key;
  initial begin
    m = MW'(N);
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    foreach (ms[t]) begin
      m = MW'(ms[t]);
      for (int j = 0; j < KW; j++) key[j*32 +: 32] = $urandom;
      for (int j = 0; j < KW; j++) begin
        wr_en = 1'b1; wr_idx = 5'(j); wr_data = key[j*32 +: 32];
        @(negedge clk);
      end
      wr_en = 1'b0;
      repeat (2) @(negedge clk);
      for (int i = ms[t] - 1; i >= 0; i--) begin
        checks++;
        if (kbit != key[i]) begin failures++; $display("FAIL m=%0d bit %0d", ms[t], i); end
        shift = 1'b1;
        @(negedge clk);
        shift = 1'b0;
        if (i % 50 == 0) @(negedge clk);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
