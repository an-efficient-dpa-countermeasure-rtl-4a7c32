// Instruction decoder of the DF-ECC controller (combinational).
//
// Instruction word written by the host (this design's format):
//   [1:0]   opcode: 0 NOP, 1 ECSM (Q1 = K * Q0), 2 FIELD (one field operation)
//   [3:2]   FIELD only: function 0 add, 1 sub, 2 RMM, 3 RMD
//   [7:4]   FIELD only: source slot 1 (0..8)
//   [11:8]  FIELD only: source slot 2 (0..8, or 13 = zero, 14 = one)
//   [15:12] FIELD only: destination slot (0..8)
// Slots: 0 a, 1/2 Q0 x/y, 3/4 Q1 x/y, 5/6 Q2 x/y, 7/8 QT x/y.
// valid marks a legal instruction written while the processor is idle;
// illegal marks a write that is rejected (reserved opcode, bad slot, or the
// processor busy).
module instr_decoder
  import dfecc_pkg::*;
(
  input  logic        we,
  input  logic [31:0] word,
  input  logic        busy,
  output instr_t      instr,
  output logic        illegal
);

  function automatic logic reg_slot(input logic [3:0] s);
    return s <= 4'd8;
  endfunction

  logic legal;

  always_comb begin
    instr.op    = opcode_e'(word[1:0]);
    instr.fs    = funcsel_e'(word[3:2]);
    instr.src1  = slot_e'(word[7:4]);
    instr.src2  = slot_e'(word[11:8]);
    instr.dst   = slot_e'(word[15:12]);
    unique case (word[1:0])
      2'd1:    legal = 1'b1;
      2'd2:    legal = reg_slot(word[7:4]) && reg_slot(word[15:12]) &&
                       (reg_slot(word[11:8]) || word[11:8] == 4'd13 || word[11:8] == 4'd14);
      default: legal = 1'b0;
    endcase
    instr.valid = we && !busy && legal;
    illegal     = we && (busy || (!legal && word[1:0] != 2'd0));
  end

endmodule
