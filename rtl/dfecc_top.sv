// Dual-field elliptic-curve (DF-ECC) processor with a DPA countermeasure
// based on randomized Montgomery operations.
//
// The processor computes the scalar multiplication K*P over GF(p) or GF(2^m)
// (field length up to N bits) with the double-and-add-always ladder in
// affine coordinates. Every field element is held in a randomized Montgomery
// domain a*2^lambda, where lambda is the Hamming weight of a random value r
// that is refreshed from an on-chip random bit generator before each scalar
// multiplication, so intermediate values differ from run to run even for
// the same key and point.
//
// Blocks: AHB wrapper with address decoder, Prime/Poly and FieldLen
// registers (config_regs), key shift register, DPA countermeasure circuit
// (RNG postprocessor + domain shift register), 36 x 132-bit register file,
// DF-ECC controller (instruction decoder, domain refresh, pre/post domain
// conversion, point operations) and the GFAU. The ring oscillators of the
// random bit generator are not part of this RTL: their XORed output enters
// on ro_in.
//
// Host use: write FIELDLEN, PRIME, KEY, a and Q0 (register-file words 0..3
// and 4..11), write an ECSM instruction to CTRL, poll CTRL until done, read
// the result from Q1 (words 12..19). The register file's a and Q0 entries
// are left in the randomized domain and the key is shifted out, so they are
// rewritten before the next scalar multiplication. The block structure and
// the 132-bit internal buses follow the published design; the bus map and
// instruction format are this design's own.
module dfecc_top
  import dfecc_pkg::*;
#(
  parameter  int unsigned N    = 521,
  parameter  int unsigned WORD = 132,
  localparam int unsigned NW   = (N + WORD - 1) / WORD,
  localparam int unsigned IW   = (NW > 1) ? $clog2(NW) : 1,
  localparam int unsigned RFD  = 9 * NW,
  localparam int unsigned AW   = $clog2(RFD),
  localparam int unsigned MW   = $clog2(N + 1)
) (
  input  logic        clk,
  input  logic        rst_n,
  // AMBA AHB slave
  input  logic        hsel,
  input  logic [31:0] haddr,
  input  logic [1:0]  htrans,
  input  logic        hwrite,
  input  logic [31:0] hwdata,
  input  logic        hready,
  output logic        hreadyout,
  output logic        hresp,
  output logic [31:0] hrdata,
  // XORed ring-oscillator output (entropy source)
  input  logic        ro_in
);

  // bus side
  logic            instr_we, prime_we, fieldlen_we, key_we;
  logic [31:0]     instr_word, bus_wdata, prime_word, fieldlen_word, status_word;
  logic [4:0]      word_idx;
  logic [AW-1:0]   h_rf_addr;
  logic            h_rf_we;
  logic [WORD-1:0] h_rf_wdata;
  // configuration
  logic [N-1:0]    p;
  logic [MW-1:0]   m;
  logic            field;
  // control
  instr_t          instr;
  logic            illegal, busy, done, error;
  logic            kbit, key_shift, dsr_refresh, dflag, dshift;
  logic [N-1:0]    domain_value;
  funcsel_e        g_funcsel;
  logic            g_start, g_ld1, g_ld2, g_done, g_busy;
  logic [IW-1:0]   g_widx;
  logic [WORD-1:0] g_in1, g_in2, g_out;
  logic [AW-1:0]   c_rf_addr, rf_addr;
  logic            c_rf_we, rf_we;
  logic [WORD-1:0] c_rf_wdata, rf_wdata, rf_rdata;

  // status: bit 0 busy, 1 done, 2 error (zero key), 3 instruction rejected
  logic illegal_q;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)           illegal_q <= 1'b0;
    else if (illegal)     illegal_q <= 1'b1;
    else if (instr.valid) illegal_q <= 1'b0;
  end
  assign status_word = {28'd0, illegal_q, error, done, busy};

  ahb_wrapper #(.N(N), .RF_DEPTH(RFD), .RF_WIDTH(WORD)) u_wrapper (
    .clk, .rst_n,
    .hsel, .haddr, .htrans, .hwrite, .hwdata, .hready, .hreadyout, .hresp, .hrdata,
    .core_busy     (busy),
    .status_word   (status_word),
    .instr_we      (instr_we),
    .instr_word    (instr_word),
    .prime_we      (prime_we),
    .fieldlen_we   (fieldlen_we),
    .key_we        (key_we),
    .word_idx      (word_idx),
    .wdata         (bus_wdata),
    .prime_word    (prime_word),
    .fieldlen_word (fieldlen_word),
    .rf_addr       (h_rf_addr),
    .rf_we         (h_rf_we),
    .rf_wdata      (h_rf_wdata),
    .rf_rdata      (rf_rdata)
  );

  config_regs #(.N(N)) u_cfg (
    .clk, .rst_n,
    .prime_we      (prime_we),
    .prime_idx     (word_idx),
    .fieldlen_we   (fieldlen_we),
    .wdata         (bus_wdata),
    .p             (p),
    .m             (m),
    .field         (field),
    .prime_word    (prime_word),
    .fieldlen_word (fieldlen_word)
  );

  key_shift_reg #(.N(N)) u_key (
    .clk, .rst_n,
    .m       (m),
    .wr_en   (key_we),
    .wr_idx  (word_idx),
    .wr_data (bus_wdata),
    .shift   (key_shift),
    .kbit    (kbit)
  );

  dpa_countermeasure #(.N(N)) u_dpa (
    .clk, .rst_n,
    .ro_in   (ro_in),
    .m       (m),
    .refresh (dsr_refresh),
    .shift   (dshift),
    .dflag   (dflag),
    .value   (domain_value)
  );

  instr_decoder u_idec (
    .we      (instr_we),
    .word    (instr_word),
    .busy    (busy),
    .instr   (instr),
    .illegal (illegal)
  );

  ecc_control #(.N(N), .WORD(WORD)) u_ctrl (
    .clk, .rst_n,
    .instr       (instr),
    .field       (field),
    .m           (m),
    .kbit        (kbit),
    .key_shift   (key_shift),
    .dsr_refresh (dsr_refresh),
    .g_funcsel   (g_funcsel),
    .g_start     (g_start),
    .g_ld1       (g_ld1),
    .g_ld2       (g_ld2),
    .g_widx      (g_widx),
    .g_in1       (g_in1),
    .g_in2       (g_in2),
    .g_out       (g_out),
    .g_done      (g_done),
    .rf_addr     (c_rf_addr),
    .rf_we       (c_rf_we),
    .rf_wdata    (c_rf_wdata),
    .rf_rdata    (rf_rdata),
    .busy        (busy),
    .done        (done),
    .error       (error)
  );

  gfau #(.N(N), .WORD(WORD)) u_gfau (
    .clk, .rst_n,
    .field   (field),
    .m       (m),
    .p       (p),
    .funcsel (g_funcsel),
    .start   (g_start),
    .ld1     (g_ld1),
    .ld2     (g_ld2),
    .widx    (g_widx),
    .in1     (g_in1),
    .in2     (g_in2),
    .out     (g_out),
    .dflag   (dflag),
    .dshift  (dshift),
    .busy    (g_busy),
    .done    (g_done)
  );

  // register-file port: controller while busy, host otherwise
  assign rf_addr  = busy ? c_rf_addr  : h_rf_addr;
  assign rf_we    = busy ? c_rf_we    : h_rf_we;
  assign rf_wdata = busy ? c_rf_wdata : h_rf_wdata;

  register_file #(.DEPTH(RFD), .WIDTH(WORD)) u_rf (
    .clk,
    .addr  (rf_addr),
    .we    (rf_we),
    .wdata (rf_wdata),
    .rdata (rf_rdata)
  );

endmodule
