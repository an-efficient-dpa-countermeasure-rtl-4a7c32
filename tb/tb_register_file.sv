// Self-checking testbench for register_file: writes random data to every
// word in random order, reads everything back against a shadow copy, and
// checks that a cycle without write enable changes nothing.
module tb_register_file;
  localparam int unsigned DEPTH = 36, WIDTH = 132;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic [5:0] addr = '0;
  logic we = 1'b0;
  logic [WIDTH-1:0] wdata = '0, rdata;
  logic [WIDTH-1:0] shadow [DEPTH];

  register_file dut (.*);

  int checks = 0, failures = 0;
  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [WIDTH-1:0] rnd();
    logic [WIDTH-1:0] v;
    for (int k = 0; k < WIDTH; k += 32) v[k +: 32] = $urandom;
    return v;
  endfunction

  initial begin
    for (int round = 0; round < 3; round++) begin
      for (int j = 0; j < DEPTH; j++) begin
        int a;
        a = (j * 7 + round * 5) % DEPTH;
        @(negedge clk);
        addr = 6'(a); wdata = rnd(); we = 1'b1;
        shadow[a] = wdata;
      end
      @(negedge clk);
      we = 1'b0;
      wdata = rnd();           // must not be written
      for (int j = 0; j < DEPTH; j++) begin
        addr = 6'(j);
        @(negedge clk);
        checks++;
        if (rdata != shadow[j]) begin
          failures++;
          $display("FAIL word %0d", j);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
