// Galois field arithmetic unit (GFAU) with randomized Montgomery operations.
//
// Performs one field operation over GF(p) or GF(2^m) on operands loaded
// word by word:
//   FS_ADD / FS_SUB  X +/- Y mod p                      (2 cycles)
//   FS_MUL  RMM      X * Y * 2^-lambda mod p            (m cycles, Algorithm 2)
//   FS_DIV  RMD      X * Y^-1 * 2^lambda mod p          (iterations + 1 cycles)
// lambda is the Hamming weight of the random value r[m-1:0] that the domain
// shift register presents one bit at a time on dflag; the unit pulses dshift
// each time it consumes a bit (exactly m times per RMM or RMD).
//
// Division follows the randomized Kaliski-style loop: the UV datapath makes
// one binary-gcd step per cycle (U even / V even / U>V / U<=V, the comparison
// done by a subtraction in both fields) and registers the decision together
// with the domain flag in a pipeline register ("Select"). In the next cycle
// the RS datapath applies the matching modular update to R and S while the
// UV datapath already decides the next step, so a division takes one cycle
// per iteration plus one. R and S live in two registers P and Q; a swap bit
// (orient, "P holds S") lets a single RS unit serve both symmetric groups of
// steps: the operands are exchanged whenever the step group differs from the
// group of the previous step. Multiplication reuses V as the shifting
// multiplier X and the same RS unit.
//
// Design choice beyond the published loop "while V > 0": the division keeps
// iterating (with V = 0, i.e. in the V-even group) until all m bits of r have
// been used, so the result is always in the domain 2^HW(r) even when the gcd
// finishes in fewer than m steps. Operand I/O word size, function encoding
// and handshake (start/busy/done) are this design's own.
//
// Interface: ld1/ld2 write in1/in2 into word widx of the X/Y data registers;
// out shows word widx of the result. start with funcsel begins an operation;
// done pulses for one cycle when the result is valid. Reset is asynchronous,
// active low.
module gfau
  import dfecc_pkg::*;
#(
  parameter  int unsigned N    = 521,               // maximum field length n
  parameter  int unsigned WORD = 132,               // data-bus width
  localparam int unsigned NW   = (N + WORD - 1) / WORD,
  localparam int unsigned IW   = (NW > 1) ? $clog2(NW) : 1,
  localparam int unsigned MW   = $clog2(N + 1)
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            field,      // 0: GF(p), 1: GF(2^m)
  input  logic [MW-1:0]   m,          // field length (<= N; < N in GF(2^m))
  input  logic [N-1:0]    p,          // prime / field polynomial
  input  funcsel_e        funcsel,
  input  logic            start,
  input  logic            ld1,
  input  logic            ld2,
  input  logic [IW-1:0]   widx,
  input  logic [WORD-1:0] in1,
  input  logic [WORD-1:0] in2,
  output logic [WORD-1:0] out,
  input  logic            dflag,      // domain flag r_i
  output logic            dshift,     // advance to r_(i+1)
  output logic            busy,
  output logic            done
);

  typedef enum logic [2:0] {S_IDLE, S_ADDSUB, S_MUL, S_DIV} state_e;

  state_e            state_q;
  funcsel_e          fs_q;
  logic [NW*WORD-1:0] xd_q, yd_q;     // data registers
  logic [N-1:0]      u_q, v_q, rp_q, rq_q;
  logic              orient_q;        // 1: P holds S, Q holds R
  logic [MW-1:0]     i_q;
  rs_ctrl_t          sel_q, sel_d;    // pipeline register between UV and RS
  rs_ctrl_t          rs_ctl;          // step applied to the RS datapath now
  logic              rs_en;

  logic [N-1:0]      ptop;
  logic [N-1:0]      ua, rb, a_new, b_new;
  logic              i_lt_m, div_active, u_gt_v;
  logic [N:0]        u_m_v, v_m_u;
  logic [N-1:0]      u_next, v_next;
  logic              ri;

  // x^m for the GF(2^m) reduction
  always_comb begin
    ptop = '0;
    if (m < MW'(N)) ptop[m] = 1'b1;
  end

  assign i_lt_m     = (i_q < m);
  assign ri         = i_lt_m ? dflag : 1'b0;   // r_i = 0 for i >= m
  assign div_active = (v_q != '0) || i_lt_m;

  // ---------------- UV datapath: one decision per cycle ----------------
  assign u_m_v  = {1'b0, u_q} - {1'b0, v_q};
  assign v_m_u  = {1'b0, v_q} - {1'b0, u_q};
  assign u_gt_v = !u_m_v[N] && (u_m_v != '0);

  always_comb begin
    u_next      = u_q;
    v_next      = v_q;
    sel_d       = '0;
    sel_d.valid = 1'b1;
    sel_d.half  = !ri;
    sel_d.dbl   = ri;
    if (!u_q[0]) begin
      u_next       = u_q >> 1;
      sel_d.group  = 1'b0;
      sel_d.comb   = RS_NONE;
    end else if (!v_q[0]) begin
      v_next       = v_q >> 1;
      sel_d.group  = 1'b1;
      sel_d.comb   = RS_NONE;
    end else if (u_gt_v) begin
      u_next       = field ? ((u_q ^ v_q) >> 1) : u_m_v[N:1];
      sel_d.group  = 1'b0;
      sel_d.comb   = RS_SUB;
    end else begin
      v_next       = field ? ((v_q ^ u_q) >> 1) : v_m_u[N:1];
      sel_d.group  = 1'b1;
      sel_d.comb   = RS_SUB;
    end
  end

  // ---------------- RS datapath: step selection and swap ----------------
  always_comb begin
    rs_ctl = sel_q;
    rs_en  = 1'b0;
    unique case (state_q)
      S_ADDSUB: begin
        rs_en       = 1'b1;
        rs_ctl      = '0;
        rs_ctl.comb = (fs_q == FS_SUB) ? RS_SUB : RS_ADD;
      end
      S_MUL: begin
        rs_en       = 1'b1;
        rs_ctl      = '0;
        rs_ctl.comb = v_q[0] ? RS_ADD : RS_NONE;  // R = R + V0*S
        rs_ctl.half = dflag;                      // r_i = 1: R = R/2
        rs_ctl.dbl  = !dflag;                     // r_i = 0: S = 2S
      end
      S_DIV:   rs_en = sel_q.valid;
      default: rs_en = 1'b0;
    endcase
  end

  // swap logic: primary operand is R for group 0 and S for group 1
  logic swap;
  assign swap = rs_ctl.group ^ orient_q;
  assign ua   = swap ? rq_q : rp_q;
  assign rb   = swap ? rp_q : rq_q;

  gfau_rs_unit #(.N(N)) u_rs (
    .field (field),
    .p     (p),
    .ptop  (ptop),
    .comb  (rs_ctl.comb),
    .half  (rs_ctl.half),
    .dbl   (rs_ctl.dbl),
    .a     (ua),
    .b     (rb),
    .a_out (a_new),
    .b_out (b_new)
  );

  // ---------------- control ----------------
  always_comb begin
    dshift = 1'b0;
    if (state_q == S_MUL) dshift = 1'b1;
    if (state_q == S_DIV && i_lt_m) dshift = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q  <= S_IDLE;
      fs_q     <= FS_ADD;
      xd_q     <= '0;
      yd_q     <= '0;
      u_q      <= '0;
      v_q      <= '0;
      rp_q     <= '0;
      rq_q     <= '0;
      orient_q <= 1'b0;
      i_q      <= '0;
      sel_q    <= '0;
      done     <= 1'b0;
    end else begin
      done <= 1'b0;
      if (ld1) xd_q[widx*WORD +: WORD] <= in1;
      if (ld2) yd_q[widx*WORD +: WORD] <= in2;

      if (rs_en) begin
        rp_q     <= a_new;
        rq_q     <= b_new;
        orient_q <= rs_ctl.group;
      end

      unique case (state_q)
        S_IDLE: if (start) begin
          fs_q     <= funcsel;
          orient_q <= 1'b0;
          i_q      <= '0;
          sel_q    <= '0;
          unique case (funcsel)
            FS_ADD, FS_SUB: begin
              rp_q    <= xd_q[N-1:0];
              rq_q    <= yd_q[N-1:0];
              state_q <= S_ADDSUB;
            end
            FS_MUL: begin            // V = X, R = 0, S = Y
              v_q     <= xd_q[N-1:0];
              rp_q    <= '0;
              rq_q    <= yd_q[N-1:0];
              state_q <= S_MUL;
            end
            default: begin           // U = p, V = Y, R = 0, S = X
              u_q     <= p;
              v_q     <= yd_q[N-1:0];
              rp_q    <= '0;
              rq_q    <= xd_q[N-1:0];
              state_q <= S_DIV;
            end
          endcase
        end
        S_ADDSUB: begin
          done    <= 1'b1;
          state_q <= S_IDLE;
        end
        S_MUL: begin
          v_q <= v_q >> 1;
          i_q <= i_q + 1'b1;
          if (i_q + 1'b1 >= m) begin
            done    <= 1'b1;
            state_q <= S_IDLE;
          end
        end
        S_DIV: begin
          if (div_active) begin
            u_q   <= u_next;
            v_q   <= v_next;
            sel_q <= sel_d;
            if (i_lt_m) i_q <= i_q + 1'b1;
          end else begin
            // last RS step (if any) is applied this cycle
            sel_q   <= '0;
            done    <= 1'b1;
            state_q <= S_IDLE;
          end
        end
        default: state_q <= S_IDLE;
      endcase
    end
  end

  assign busy = (state_q != S_IDLE);

  // result word
  logic [NW*WORD-1:0] res_w;
  assign res_w = {{(NW*WORD-N){1'b0}}, (orient_q ? rq_q : rp_q)};
  assign out   = res_w[widx*WORD +: WORD];

endmodule
