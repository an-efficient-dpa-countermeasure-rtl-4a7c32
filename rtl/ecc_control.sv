// DF-ECC controller: runs scalar multiplications and single field
// operations on the GFAU, the register file and the DPA countermeasure.
//
// ECSM (Q1 = K * Q0, double-and-add-always, affine coordinates):
//   1. Domain value refresh: m cycles with refresh high load a fresh random
//      r[m-1:0] into the domain shift register, so every scalar
//      multiplication runs in a new domain 2^lambda, lambda = HW(r).
//   2. Leading zero bits of K[m-1:0] are skipped; the top one bit is
//      consumed. An all-zero key ends with the error flag set.
//   3. Pre-process (RT_PRE): Q0 and the coefficient a are moved into the
//      domain by RMD(v,1) = v*2^lambda and copied to Q1 = P1 and Q2 = P2;
//      then P2 = 2*P2.
//   4. For every remaining key bit K_i: if K_i = 1, P1 = P1+P2 and
//      P2 = 2*P2; else P2 = P1+P2 and P1 = 2*P1 (one addition and one
//      doubling per bit, whatever the bit value).
//   5. Post-process (RT_POST): Q1 is returned to the integer domain by
//      RMM(v,1) = v*2^-lambda.
// FIELD instructions run one GFAU operation on register-file slots.
//
// Each field operation moves its operands word by word: 2*NW cycles to load
// X (port in1) and Y (port in2) from the single-port register file (the
// constants zero and one are generated here), one start cycle, the GFAU
// operation, and NW cycles to write the result back. busy is high from the
// accepted instruction until done; done then stays high until the next
// instruction. The algorithm (steps 1, 3, 4, 5) follows the published
// processor; the operand transfer scheme, skipping of leading zeros and
// the error flag are this design's own.
module ecc_control
  import dfecc_pkg::*;
#(
  parameter  int unsigned N    = 521,
  parameter  int unsigned WORD = 132,
  localparam int unsigned NW   = (N + WORD - 1) / WORD,
  localparam int unsigned IW   = (NW > 1) ? $clog2(NW) : 1,
  localparam int unsigned AW   = $clog2(9 * NW),
  localparam int unsigned MW   = $clog2(N + 1)
) (
  input  logic            clk,
  input  logic            rst_n,
  input  instr_t          instr,
  input  logic            field,
  input  logic [MW-1:0]   m,
  // key shift register
  input  logic            kbit,
  output logic            key_shift,
  // domain shift register
  output logic            dsr_refresh,
  // GFAU
  output funcsel_e        g_funcsel,
  output logic            g_start,
  output logic            g_ld1,
  output logic            g_ld2,
  output logic [IW-1:0]   g_widx,
  output logic [WORD-1:0] g_in1,
  output logic [WORD-1:0] g_in2,
  input  logic [WORD-1:0] g_out,
  input  logic            g_done,
  // register file
  output logic [AW-1:0]   rf_addr,
  output logic            rf_we,
  output logic [WORD-1:0] rf_wdata,
  input  logic [WORD-1:0] rf_rdata,
  // status
  output logic            busy,
  output logic            done,
  output logic            error
);

  typedef enum logic [3:0] {
    C_IDLE, C_REFRESH, C_SKIP, C_LOAD, C_START, C_WAIT, C_WB, C_NEXT, C_DONE
  } cstate_e;

  typedef enum logic [2:0] {
    PH_FIELD, PH_PRE, PH_INIT_PD, PH_PA, PH_PD, PH_POST
  } phase_e;

  cstate_e       st_q;
  phase_e        ph_q;
  routine_e      rt_q;
  logic [3:0]    step_q;
  logic [MW-1:0] cnt_q;
  logic [MW-1:0] bits_q;
  logic          dpt_q;      // 0: D = Q1, O = Q2; 1: D = Q2, O = Q1
  logic          kcur_q;     // key bit of the current ladder step
  uop_t          fuop_q;     // operation of a FIELD instruction
  uop_t          mc_uop, uop;
  logic          mc_last;

  ecc_microcode u_mc (
    .rt   (rt_q),
    .step (step_q),
    .uop  (mc_uop),
    .last (mc_last)
  );

  assign uop = (ph_q == PH_FIELD) ? fuop_q : mc_uop;

  function automatic logic [3:0] slot_base(input slot_e s, input logic d);
    unique case (s)
      SL_DX:   return d ? 4'(SL_Q2X) : 4'(SL_Q1X);
      SL_DY:   return d ? 4'(SL_Q2Y) : 4'(SL_Q1Y);
      SL_OX:   return d ? 4'(SL_Q1X) : 4'(SL_Q2X);
      SL_OY:   return d ? 4'(SL_Q1Y) : 4'(SL_Q2Y);
      default: return 4'(s);
    endcase
  endfunction

  function automatic logic [AW-1:0] word_addr(input slot_e s, input logic d, input logic [IW-1:0] w);
    return AW'(int'(slot_base(s, d)) * NW + int'(w));
  endfunction

  logic [IW-1:0] lw;         // word index during load
  logic          src2_const;
  assign lw         = IW'(cnt_q >> 1);
  assign src2_const = (uop.src2 == SL_ZERO) || (uop.src2 == SL_ONE);

  // datapath control
  always_comb begin
    key_shift   = 1'b0;
    dsr_refresh = 1'b0;
    g_funcsel   = uop.fs;
    g_start     = 1'b0;
    g_ld1       = 1'b0;
    g_ld2       = 1'b0;
    g_widx      = '0;
    g_in1       = rf_rdata;
    g_in2       = rf_rdata;
    rf_addr     = '0;
    rf_we       = 1'b0;
    rf_wdata    = g_out;
    unique case (st_q)
      C_REFRESH: dsr_refresh = 1'b1;
      C_SKIP:    key_shift   = (bits_q != '0);
      C_NEXT:    key_shift   = (ph_q == PH_INIT_PD || ph_q == PH_PD) && (bits_q != '0);
      C_LOAD: begin
        g_widx = lw;
        if (!cnt_q[0]) begin
          rf_addr = word_addr(uop.src1, dpt_q, lw);
          g_ld1   = 1'b1;
        end else begin
          g_ld2 = 1'b1;
          if (src2_const)
            g_in2 = (uop.src2 == SL_ONE && lw == '0) ? WORD'(1) : '0;
          else
            rf_addr = word_addr(uop.src2, dpt_q, lw);
        end
      end
      C_START: g_start = 1'b1;
      C_WB: begin
        g_widx  = IW'(cnt_q);
        rf_addr = word_addr(uop.dst, dpt_q, IW'(cnt_q));
        rf_we   = 1'b1;
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st_q   <= C_IDLE;
      ph_q   <= PH_FIELD;
      rt_q   <= RT_PRE;
      step_q <= '0;
      cnt_q  <= '0;
      bits_q <= '0;
      dpt_q  <= 1'b0;
      kcur_q <= 1'b0;
      fuop_q <= '0;
      done   <= 1'b0;
      error  <= 1'b0;
    end else begin
      unique case (st_q)
        C_IDLE: if (instr.valid) begin
          done  <= 1'b0;
          error <= 1'b0;
          cnt_q <= '0;
          if (instr.op == OP_ECSM) begin
            st_q <= C_REFRESH;
          end else begin
            ph_q   <= PH_FIELD;
            fuop_q <= '{fs: instr.fs, src1: instr.src1, src2: instr.src2, dst: instr.dst};
            dpt_q  <= 1'b0;
            st_q   <= C_LOAD;
          end
        end
        C_REFRESH: begin
          cnt_q <= cnt_q + 1'b1;
          if (cnt_q + 1'b1 >= m) begin
            cnt_q  <= '0;
            bits_q <= m;
            st_q   <= C_SKIP;
          end
        end
        C_SKIP: begin
          if (bits_q == '0) begin
            error <= 1'b1;
            st_q  <= C_DONE;
          end else begin
            bits_q <= bits_q - 1'b1;
            if (kbit) begin
              ph_q   <= PH_PRE;
              rt_q   <= RT_PRE;
              step_q <= '0;
              st_q   <= C_LOAD;
            end
          end
        end
        C_LOAD: begin
          cnt_q <= cnt_q + 1'b1;
          if (int'(cnt_q) == 2 * NW - 1) st_q <= C_START;
        end
        C_START: st_q <= C_WAIT;
        C_WAIT: if (g_done) begin
          cnt_q <= '0;
          st_q  <= C_WB;
        end
        C_WB: begin
          cnt_q <= cnt_q + 1'b1;
          if (int'(cnt_q) == NW - 1) begin
            cnt_q <= '0;
            if (ph_q == PH_FIELD)  st_q <= C_DONE;
            else if (mc_last)      st_q <= C_NEXT;
            else begin
              step_q <= step_q + 1'b1;
              st_q   <= C_LOAD;
            end
          end
        end
        C_NEXT: begin
          step_q <= '0;
          st_q   <= C_LOAD;
          unique case (ph_q)
            PH_PRE: begin                       // P2 = 2P
              ph_q  <= PH_INIT_PD;
              rt_q  <= field ? RT_PD_B : RT_PD_P;
              dpt_q <= 1'b1;
            end
            PH_INIT_PD, PH_PD: begin
              if (bits_q == '0) begin
                ph_q <= PH_POST;
                rt_q <= RT_POST;
              end else begin                    // next key bit: addition first
                bits_q <= bits_q - 1'b1;
                kcur_q <= kbit;
                ph_q   <= PH_PA;
                rt_q   <= field ? RT_PA_B : RT_PA_P;
                dpt_q  <= !kbit;                // K_i = 1: P1 = P1 + P2
              end
            end
            PH_PA: begin
              ph_q  <= PH_PD;
              rt_q  <= field ? RT_PD_B : RT_PD_P;
              dpt_q <= kcur_q;                  // K_i = 1: P2 = 2 P2
            end
            default: st_q <= C_DONE;            // after PH_POST
          endcase
        end
        C_DONE: begin
          done <= 1'b1;
          st_q <= C_IDLE;
        end
        default: st_q <= C_IDLE;
      endcase
    end
  end

  assign busy = (st_q != C_IDLE);

endmodule
