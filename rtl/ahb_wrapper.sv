// AMBA AHB slave wrapper of the DF-ECC processor.
//
// Turns 32-bit AHB transfers into register accesses: field configuration,
// key words, register-file words and the instruction/status register (the
// address map is given in addr_decoder). Transfers are zero-wait-state and
// always OKAY: the address phase (HSEL, HTRANS NONSEQ/SEQ, HREADY) is
// registered, and in the data phase a write takes HWDATA, a read drives
// HRDATA combinationally from the addressed register. Only 32-bit transfers
// are supported; HSIZE and HBURST are not used.
//
// Register-file words are 132 bits wide, so they are reached in five 32-bit
// sub-words: writes collect in a staging register and the write of the last
// sub-word (4) stores the complete word. While the processor is busy the
// register file belongs to the controller: host register-file writes are
// dropped and reads return zero. The key is write only.
//
// The wrapper is a named block of the published design; everything about its
// protocol handling beyond "AHB slave" is this design's choice.
module ahb_wrapper
  import dfecc_pkg::*;
#(
  parameter  int unsigned N        = 521,
  parameter  int unsigned RF_DEPTH = 36,
  parameter  int unsigned RF_WIDTH = 132,
  localparam int unsigned AW       = $clog2(RF_DEPTH),
  localparam int unsigned NSW      = (RF_WIDTH + 31) / 32
) (
  input  logic                clk,
  input  logic                rst_n,
  // AHB slave port
  input  logic                hsel,
  input  logic [31:0]         haddr,
  input  logic [1:0]          htrans,
  input  logic                hwrite,
  input  logic [31:0]         hwdata,
  input  logic                hready,
  output logic                hreadyout,
  output logic                hresp,
  output logic [31:0]         hrdata,
  // processor side
  input  logic                core_busy,
  input  logic [31:0]         status_word,
  output logic                instr_we,
  output logic [31:0]         instr_word,
  output logic                prime_we,
  output logic                fieldlen_we,
  output logic                key_we,
  output logic [4:0]          word_idx,
  output logic [31:0]         wdata,
  input  logic [31:0]         prime_word,
  input  logic [31:0]         fieldlen_word,
  output logic [AW-1:0]       rf_addr,
  output logic                rf_we,
  output logic [RF_WIDTH-1:0] rf_wdata,
  input  logic [RF_WIDTH-1:0] rf_rdata
);

  decode_t dec, dec_q;
  logic    act_q, write_q;
  logic [NSW*32-1:0] stage_q, stage_d;
  logic [NSW*32-1:0] rf_rd_ext;

  addr_decoder #(.N(N), .RF_DEPTH(RF_DEPTH), .RF_WIDTH(RF_WIDTH)) u_dec (
    .haddr (haddr[15:0]),
    .dec   (dec)
  );

  // address phase
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      act_q   <= 1'b0;
      write_q <= 1'b0;
      dec_q   <= '0;
      stage_q <= '0;
    end else begin
      if (hready) begin
        act_q   <= hsel && htrans[1];
        write_q <= hwrite;
        dec_q   <= dec;
      end
      stage_q <= stage_d;
    end
  end

  logic wr;
  assign wr = act_q && write_q;

  always_comb begin
    stage_d = stage_q;
    if (wr && dec_q.target == T_RF && !core_busy)
      stage_d[dec_q.sub*32 +: 32] = hwdata;
  end

  // data phase: writes
  assign wdata       = hwdata;
  assign word_idx    = dec_q.word;
  assign instr_we    = wr && dec_q.target == T_CTRL;
  assign instr_word  = hwdata;
  assign prime_we    = wr && dec_q.target == T_PRIME;
  assign fieldlen_we = wr && dec_q.target == T_FIELDLEN;
  assign key_we      = wr && dec_q.target == T_KEY;
  assign rf_addr     = AW'(dec_q.entry);
  assign rf_we       = wr && dec_q.target == T_RF && !core_busy &&
                       int'(dec_q.sub) == NSW - 1;
  assign rf_wdata    = stage_d[RF_WIDTH-1:0];

  // data phase: reads
  assign rf_rd_ext = {{(NSW*32-RF_WIDTH){1'b0}}, rf_rdata};
  always_comb begin
    hrdata = '0;
    if (act_q && !write_q) begin
      unique case (dec_q.target)
        T_CTRL:     hrdata = status_word;
        T_FIELDLEN: hrdata = fieldlen_word;
        T_PRIME:    hrdata = prime_word;
        T_RF:       hrdata = core_busy ? '0 : rf_rd_ext[dec_q.sub*32 +: 32];
        default:    hrdata = '0;
      endcase
    end
  end

  assign hreadyout = 1'b1;
  assign hresp     = 1'b0;

endmodule
